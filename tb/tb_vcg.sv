// tb_vcg: self-checking test of the variable clock generator. For random
// clock-width settings it counts reference periods from the trigger edge
// to each rising edge of the output and checks: exactly two pulses, each
// one period wide, the first three reference edges after trg rises, the
// second max(cnt,2) periods after the first; a second trg edge during a
// pulse pair starts nothing.
module tb_vcg;
  timeunit 1ns; timeprecision 100ps;
  localparam int CW = 8;
  logic ref_clk = 1'b0, rst, trg, pulse;
  logic [CW-1:0] cnt;
  int checks = 0, failures = 0;
  int edge_no;
  int rises[$];
  int high_len;
  logic pulse_d;
  int n_ignored = 0, n_clamped = 0;

  vcg #(.CNT_W(CW)) dut (.*);

  always #1 ref_clk = ~ref_clk;

  // edge counter and pulse monitor, sampled after each reference edge
  always @(posedge ref_clk) begin
    #0.5;
    edge_no++;
    if (pulse && !pulse_d) rises.push_back(edge_no);
    if (pulse) high_len++;
    pulse_d = pulse;
  end

  initial begin : watchdog
    repeat (100000) @(posedge ref_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int w, t0;
    bit disturb;
    trg = 1'b0; cnt = '0; pulse_d = 1'b0; edge_no = 0;
    rst = 1'b1; #5; rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      cnt = (n < 4) ? CW'(n) : CW'($urandom_range(0, 40));
      w = (int'(cnt) < 2) ? 2 : int'(cnt);
      if (int'(cnt) < 2) n_clamped++;
      disturb = (n % 7 == 3) && w > 8;
      rises.delete(); high_len = 0;
      @(negedge ref_clk);
      t0 = edge_no;
      trg = 1'b1;
      if (disturb) begin
        repeat (5) @(negedge ref_clk);
        trg = 1'b0;
        @(negedge ref_clk);
        trg = 1'b1;
        n_ignored++;
      end
      repeat (w + 12) @(negedge ref_clk);
      trg = 1'b0;
      repeat (8) @(negedge ref_clk);
      expect_eq(rises.size(), 2, $sformatf("pulse count cnt=%0d", cnt));
      if (rises.size() == 2) begin
        expect_eq(rises[0] - t0, 3, "trigger latency");
        expect_eq(rises[1] - rises[0], w, $sformatf("width cnt=%0d", cnt));
      end
      expect_eq(high_len, 2, "pulse high time");
    end
    checks++;
    if (n_ignored == 0 || n_clamped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_meas_scan_ff: self-checking test of the measurement scan flip-flop.
// Drives random d/si/latch values in every mode and checks q against the
// mode table (normal -> d, scan -> si, load -> latch) and the reset.
module tb_meas_scan_ff;
  import sdm_pkg::*;

  logic clk = 1'b0, rst, d, si, latch, se0, se1, q;
  int   checks = 0, failures = 0;

  meas_scan_ff dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp);
    end
  endtask

  initial begin
    scan_mode_e mode;
    logic exp;
    int n_mode[3] = '{0, 0, 0};
    {d, si, latch, se0, se1} = '0;
    rst = 1'b1;
    #12;
    check(1'b0, "reset");
    rst = 1'b0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      case ($urandom_range(0, 2))
        0: mode = MODE_NORMAL;
        1: mode = MODE_LOAD;
        default: mode = MODE_SCAN;
      endcase
      {se0, se1} = mode;
      d = 1'($urandom); si = 1'($urandom); latch = 1'($urandom);
      exp = (mode == MODE_NORMAL) ? d : (mode == MODE_SCAN) ? si : latch;
      n_mode[(mode == MODE_NORMAL) ? 0 : (mode == MODE_LOAD) ? 1 : 2]++;
      @(posedge clk);
      #1 check(exp, mode.name());
    end
    // se0=0 with se1=1 is also normal operation
    @(negedge clk); se0 = 1'b0; se1 = 1'b1; d = ~q; exp = d;
    @(posedge clk); #1 check(exp, "normal se1=1");
    foreach (n_mode[k]) begin
      checks++;
      if (n_mode[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

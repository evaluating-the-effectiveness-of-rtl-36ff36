// tb_sig_reg: self-checking test of the reconfigurable signature register
// at 8 bits (default polynomial) and 4 bits. The reference treats the
// signature as the remainder of the captured bit stream divided by the
// feedback polynomial, computed with integer arithmetic. It checks
// capture only when sck=1, holding when sck=0, shift mode from sgi to
// sgo, the serial read-out of a complete signature and the reset.
module tb_sig_reg;
  localparam int L8 = 8, L4 = 4;
  localparam int unsigned P8 = 'h11D;  // x^8+x^4+x^3+x^2+1
  localparam int unsigned P4 = 'h13;   // x^4+x+1

  logic clk = 1'b0, rst, sge, sck, in, sgi;
  logic sgo8, sgo4;
  int unsigned r8, r4;
  int checks = 0, failures = 0;
  int n_cap = 0, n_hold = 0, n_shift = 0;

  sig_reg dut8 (.clk, .rst, .sge, .sck, .in, .sgi, .sgo(sgo8));
  sig_reg #(.LEN(L4), .POLY(4'h3)) dut4 (.clk, .rst, .sge, .sck, .in, .sgi, .sgo(sgo4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned divstep(int unsigned r, logic b, int unsigned p, int l);
    r = (r << 1) | int'(b);
    if (r[l]) r ^= p;
    return r;
  endfunction

  task automatic check(input string what);
    checks++;
    if (sgo8 !== r8[L8-1] || sgo4 !== r4[L4-1]) begin
      failures++;
      $display("FAIL %s: sgo8=%0b exp %0b sgo4=%0b exp %0b", what, sgo8, r8[L8-1], sgo4, r4[L4-1]);
    end
  endtask

  initial begin
    {sge, sck, in, sgi} = '0;
    rst = 1'b1; #12; rst = 1'b0;
    r8 = 0; r4 = 0;
    check("reset");
    for (int blk = 0; blk < 20; blk++) begin
      // compaction phase
      sge = 1'b1;
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        sck = 1'($urandom); in = 1'($urandom);
        if (sck) begin
          r8 = divstep(r8, in, P8, L8); r4 = divstep(r4, in, P4, L4); n_cap++;
        end else n_hold++;
        @(posedge clk); #1 check("signature");
      end
      // read-out: the whole signature appears MSB first on sgo
      begin
        logic [L8-1:0] got8, exp8;
        exp8 = L8'(r8);
        @(negedge clk); sge = 1'b0; sck = 1'b0;
        for (int k = 0; k < L8; k++) begin
          got8[L8-1-k] = sgo8;
          sgi = 1'($urandom);
          r8 = ((r8 << 1) | int'(sgi)) & 'hFF;
          r4 = ((r4 << 1) | int'(sgi)) & 'hF;
          n_shift++;
          @(posedge clk); #1 check("shift");
          @(negedge clk);
        end
        checks++;
        if (got8 !== exp8) begin
          failures++; $display("FAIL read-out %h expected %h", got8, exp8);
        end
      end
      if (blk % 5 == 4) begin
        rst = 1'b1; #1 rst = 1'b0; r8 = 0; r4 = 0;
        #1 check("mid reset");
      end
    end
    checks++;
    if (n_cap == 0 || n_hold == 0 || n_shift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

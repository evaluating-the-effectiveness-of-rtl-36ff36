// tb_bcd_decoder: exhaustive check of the capture-enable decoder for two
// slice widths. Code 0 and codes above N select nothing; code k selects
// enable k-1 alone.
module tb_bcd_decoder;
  localparam int N2 = 2, E2 = $clog2(N2 + 1);
  localparam int N5 = 5, E5 = $clog2(N5 + 1);
  logic [E2-1:0] scj2; logic [N2-1:0] sck2;
  logic [E5-1:0] scj5; logic [N5-1:0] sck5;
  int checks = 0, failures = 0;

  bcd_decoder #(.N(N2)) dut2 (.scj(scj2), .sck(sck2));
  bcd_decoder #(.N(N5)) dut5 (.scj(scj5), .sck(sck5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N5-1:0] exp;
    for (int c = 0; c < (1 << E2); c++) begin
      scj2 = E2'(c); #1;
      exp = '0;
      if (c >= 1 && c <= N2) exp[c-1] = 1'b1;
      checks++;
      if (sck2 !== exp[N2-1:0]) begin
        failures++; $display("FAIL N=2 code %0d: %b", c, sck2);
      end
    end
    for (int c = 0; c < (1 << E5); c++) begin
      scj5 = E5'(c); #1;
      exp = '0;
      if (c >= 1 && c <= N5) exp[c-1] = 1'b1;
      checks++;
      if (sck5 !== exp) begin
        failures++; $display("FAIL N=5 code %0d: %b", c, sck5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

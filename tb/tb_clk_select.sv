// tb_clk_select: checks that the chip clock follows tck with cs=0 and the
// fast pulse with cs=1, for all input combinations.
module tb_clk_select;
  logic cs, tck, fclk, clk;
  int checks = 0, failures = 0;

  clk_select dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++)
      for (int v = 0; v < 8; v++) begin
        {cs, tck, fclk} = 3'(v); #1;
        checks++;
        if (clk !== (cs ? fclk : tck)) begin
          failures++; $display("FAIL cs=%0b tck=%0b fclk=%0b clk=%0b", cs, tck, fclk, clk);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

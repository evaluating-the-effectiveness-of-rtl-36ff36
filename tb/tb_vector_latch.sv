// tb_vector_latch: self-checking test of the extra vector latch.
// Checks transparency while lk=1 and holding while lk=0 against a
// reference value kept by the testbench.
module tb_vector_latch;
  logic lk, d, q;
  logic held;
  int   checks = 0, failures = 0;

  vector_latch dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk = 1'b1; d = 1'b0; #1; held = 1'b0;
    for (int t = 0; t < 400; t++) begin
      lk = 1'($urandom);
      #1;
      d = 1'($urandom);
      #1;
      if (lk) held = d;
      checks++;
      if (q !== held) begin
        failures++;
        $display("FAIL t=%0d lk=%0b d=%0b q=%0b expected %0b", t, lk, d, q, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

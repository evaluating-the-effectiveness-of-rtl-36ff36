// tb_latch_array: self-checking test of the extra latch array in two
// configurations: one latch per flip-flop (default map) and a shared map
// in which flip-flops 1, 2 and 5 read the latches of flip-flops 0, 0 and 4.
// A reference model stores the owners' bits while lk=1 and checks every
// latch line, transparency and holding.
module tb_latch_array;
  localparam int NFF = 6;
  localparam logic [NFF-1:0][15:0] SHARE = {16'd5, 16'd0, 16'd0, 16'd1, 16'd1, 16'd0};
  // flip-flop f reads owner(f); owners store their own ff_q
  localparam int OWN_A [NFF] = '{0, 1, 2, 3, 4, 5};
  localparam int OWN_B [NFF] = '{0, 0, 0, 3, 4, 4};

  logic lk;
  logic [NFF-1:0] ff_q, line_a, line_b;
  logic [NFF-1:0] st;   // model: stored bit per flip-flop index (owners)
  int checks = 0, failures = 0, n_store = 0, n_hold = 0;

  latch_array #(.NFF(NFF)) dut_a (.lk, .ff_q, .latch_line(line_a));
  latch_array #(.NFF(NFF), .LATCH_OWNER(SHARE)) dut_b (.lk, .ff_q, .latch_line(line_b));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk = 1'b1; ff_q = NFF'($urandom); #1; st = ff_q;
    for (int t = 0; t < 500; t++) begin
      lk = 1'($urandom);
      #1 ff_q = NFF'($urandom);
      #1;
      if (lk) begin st = ff_q; n_store++; end else n_hold++;
      for (int f = 0; f < NFF; f++) begin
        checks += 2;
        if (line_a[f] !== st[OWN_A[f]]) begin
          failures++; $display("FAIL own map f=%0d", f);
        end
        if (line_b[f] !== st[OWN_B[f]]) begin
          failures++; $display("FAIL shared map f=%0d", f);
        end
      end
    end
    checks++;
    if (n_store == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

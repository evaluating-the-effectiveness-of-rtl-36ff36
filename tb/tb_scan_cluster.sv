// tb_scan_cluster: self-checking test of a cluster of measurement scan
// flip-flops. The testbench holds the latch lines itself (as the extra
// latches would) and a reference model of the N cells checks scan
// shifting (head to tail, so = tail), reloading a stored vector after the
// flip-flops were overwritten, and functional capture, in random order.
module tb_scan_cluster;
  import sdm_pkg::*;
  localparam int N = 4;

  logic clk = 1'b0, rst, se0, se1, si, so;
  logic [N-1:0] d, q, latch_line;
  logic [N-1:0] m_q, m_l;
  int checks = 0, failures = 0;
  int n_op[4] = '{0, 0, 0, 0};

  scan_cluster #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== m_q || so !== m_q[N-1]) begin
      failures++;
      $display("FAIL %s: q=%b expected %b so=%0b", what, q, m_q, so);
    end
  endtask

  initial begin
    int op;
    {se0, se1, si, d} = '0;
    rst = 1'b1; #12; rst = 1'b0;
    m_q = '0;
    check("reset");
    // store an initial vector so the latches are defined
    @(negedge clk); latch_line = q; m_l = m_q;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      op = $urandom_range(0, 3);
      n_op[op]++;
      case (op)
        0: begin // scan shift
          {se0, se1} = MODE_SCAN; si = 1'($urandom);
          m_q = {m_q[N-2:0], si};
        end
        1: begin // reload from latches
          {se0, se1} = MODE_LOAD;
          m_q = m_l;
        end
        2: begin // functional capture
          {se0, se1} = MODE_NORMAL; d = N'($urandom);
          m_q = d;
        end
        default: begin // store the flip-flops in the latch lines
          latch_line = q;
          m_l = m_q;
          {se0, se1} = MODE_LOAD; // next edge reloads the same vector
        end
      endcase
      @(posedge clk);
      #1 check($sformatf("op %0d", op));
    end
    foreach (n_op[k]) begin
      checks++;
      if (n_op[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sdm_top: end-to-end measurement run on the chip with every parameter at
// its default (12 scan flip-flops in 4 clusters of 3, 8-bit signature
// registers, two capture-decoder slices, 8-bit clock-width control).
//
// The testbench plays the tester and the circuit under test:
//  * Circuit under test: flip-flop i is fed by the inverted output of
//    flip-flop src(i) = (5*i+1) mod NFF through a delay line of DEL[i]
//    reference periods, so each path is single-path sensitizable and has
//    a known delay. With the launch pulse on reference edge 0 and the
//    capture pulse on edge W, the capture sees the new value iff W >= DEL.
//  * Tester: checks the scan chain through sco, then for every test vector
//    scans it in once and stores it in the latches. The vector is measured
//    in one or two stages; each stage picks one target flip-flop per
//    cluster (two targets of one decoder slice never share a shift
//    clock), clears the signature registers and runs N_meas clock-width
//    steps of falling width W (W0, W0-STEP, ...): reload from the latches,
//    launch/capture double pulse, N shift clocks with the encoded capture
//    enables. A second stage starts from the latches, without a new
//    scan-in. After each stage all signatures are read out on sgo and each
//    path delay is estimated by matching its signature against those of
//    every possible pass/fail boundary.
// Checks: flip-flop state after every reload and capture, every
// signature, every estimated delay against the true delay, and 1+N tester
// clocks per clock-width step. Vectors 0-3 use N_meas=100,
// vectors 4-5 N_meas=200, the two settings evaluated for this architecture.
// Every mechanism exercised is counted and must occur at least once.
module tb_sdm_top;
  import sdm_pkg::*;

  localparam int NFF = 12, N = 3, L = 8, SLICE = 2, CW = 8;
  localparam int STEP = 1;   // clock-width decrement in reference periods
  localparam int M = (NFF + N - 1) / N;
  localparam int NLAST = NFF - (M - 1) * N;
  localparam int NSLICE = (M + SLICE - 1) / SLICE;
  localparam int EW = $clog2(SLICE + 1);
  localparam int unsigned POLY = 'h11D;  // x^8+x^4+x^3+x^2+1;
  localparam int NVEC = 6;

  logic tck = 1'b0, ref_clk = 1'b0, rst_ff, rst_sig, cs, trg, se0, se1, lk;
  logic sci, sco, sge, sgo;
  logic [CW-1:0] cnt;
  logic [NSLICE-1:0][EW-1:0] scj;
  logic [NFF-1:0] func_d, func_q;

  sdm_top dut (.*);

  always #1 ref_clk = ~ref_clk;

  // ---------------- circuit under test model ----------------
  int   del [NFF];
  logic [255:0] dl [NFF];

  function automatic int src(int i);
    return (5 * i + 1) % NFF;
  endfunction

  function automatic int csz(int i);   // cells in cluster i
    return (i == M - 1) ? NLAST : N;
  endfunction

  always @(posedge ref_clk)
    for (int i = 0; i < NFF; i++) dl[i] <= {dl[i][254:0], ~func_q[src(i)]};

  always_comb
    for (int i = 0; i < NFF; i++) func_d[i] = dl[i][del[i]-1];

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int tck_count = 0;
  typedef enum int {EV_SHIFT, EV_SCO, EV_STORE, EV_RELOAD, EV_PULSE, EV_PASS,
                    EV_FAIL, EV_SIGCAP, EV_PARCAP, EV_IDLE, EV_READ, EV_SIGRST,
                    EV_STAGE2, EV_SHORTCL, EV_SHARED, EV_NUM} ev_e;
  int ev [EV_NUM];
  bit ev_expected [EV_NUM];

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // rule of the clock selector: switch cs only while both clocks are low
  always @(cs)
    if ($time > 0) check(!tck && !dut.vcg_pulse, "cs switched while a clock was high");

  task automatic tck_pulse();
    #4 tck = 1'b1;
    #10 tck = 1'b0;
    #6;
    tck_count++;
  endtask

  function automatic int unsigned divstep(int unsigned r, logic b);
    r = (r << 1) | int'(b);
    if (r[L]) r ^= POLY;
    return r;
  endfunction

  // response of flip-flop t at clock width w, test vector v1
  function automatic logic resp(logic [NFF-1:0] v1, int t, int w, int d);
    logic [NFF-1:0] v2;
    for (int i = 0; i < NFF; i++) v2[i] = ~v1[src(i)];
    return (w >= d) ? ~v2[src(t)] : v2[t];
  endfunction

  // signature if exactly the first b of the nm steps pass
  function automatic int unsigned sig_of(logic [NFF-1:0] v1, int t, int nm, int b);
    int unsigned r;
    r = 0;
    for (int s = 0; s < nm; s++) r = divstep(r, resp(v1, t, (s < b) ? 1 : 0, 1));
    return r;
  endfunction

  task automatic scan_in(input logic [NFF-1:0] v, output logic [NFF-1:0] out);
    {se0, se1} = MODE_SCAN; cs = 1'b0;
    for (int k = 0; k < NFF; k++) begin
      out[NFF-1-k] = sco;     // tail flip-flop first
      sci = v[NFF-1-k];       // last flip-flop's bit enters first
      tck_pulse();
      ev[EV_SHIFT]++;
    end
  endtask

  initial begin
    logic [NFF-1:0] v, v2, dummy, got;
    int tgt [2][M];
    int nst, w0, nm;
    int unsigned model [M];
    logic [L-1:0] rd [M];

    foreach (del[i]) del[i] = $urandom_range(3, 100);
    foreach (dl[i]) dl[i] = '0;
    foreach (ev[k]) begin
      ev[k] = 0;
      ev_expected[k] = 1'b1;
    end
    ev_expected[EV_SHORTCL] = (NLAST < N);
    ev_expected[EV_SHARED]  = 1'b0;
    ev_expected[EV_PARCAP]  = (NSLICE > 1);
    {cs, trg, se0, se1, lk, sci, sge} = '0;
    cnt = '0; scj = '0;
    rst_ff = 1'b1; rst_sig = 1'b1;
    #20 rst_ff = 1'b0; rst_sig = 1'b0;

    // scan chain check through sco
    v = NFF'($urandom);
    scan_in(v, dummy);
    scan_in(~v, got);
    check(got == v, $sformatf("scan-out %h expected %h", got, v));
    ev[EV_SCO]++;

    for (int tv = 0; tv < NVEC; tv++) begin
      nm = (tv < 4) ? 100 : 200;
      w0 = nm + 1;
      nst = (tv % 2 == 0) ? 2 : 1;
      if (tv == 4) foreach (del[i]) del[i] = $urandom_range(3, 200);
      // targets: one per cluster and stage, distinct shift clock in a slice
      for (int st = 0; st < nst; st++)
        for (int i = 0; i < M; i++) begin
          bit clash;
          do begin
            tgt[st][i] = i * N + $urandom_range(0, csz(i) - 1);
            clash = 0;
            for (int o = (i / SLICE) * SLICE; o < i; o++)
              if (csz(o) - (tgt[st][o] - o * N) == csz(i) - (tgt[st][i] - i * N)) clash = 1;
          end while (clash);
          // first vector: positions 0 and 1 in every slice, so one shift
          // clock captures nothing anywhere
          if (tv == 0 && st == 0) tgt[st][i] = i * N + i % SLICE;
        end
      // vector sensitizing a transition at the start of every target path
      for (int tries = 0; tries < 10000; tries++) begin
        bit ok;
        ok = 1;
        v = NFF'($urandom);
        
        for (int i = 0; i < NFF; i++) v2[i] = ~v[src(i)];
        for (int st = 0; st < nst; st++)
          for (int i = 0; i < M; i++)
            if (v2[src(tgt[st][i])] == v[src(tgt[st][i])]) ok = 0;
        if (ok) break;
      end

      scan_in(v, dummy);
      lk = 1'b1; #4 lk = 1'b0; #4;
      ev[EV_STORE]++;

      for (int st = 0; st < nst; st++) begin
        if (st > 0) ev[EV_STAGE2]++;
        rst_sig = 1'b1; #4 rst_sig = 1'b0; #4;
        ev[EV_SIGRST]++;
        sge = 1'b1;
        foreach (model[i]) model[i] = 0;

        for (int s = 0; s < nm; s++) begin
          int w, t_start;
          logic [NFF-1:0] exp;
          w = w0 - STEP * s;
          t_start = tck_count;
          // reload the vector from the latches
          {se0, se1} = MODE_LOAD;
          tck_pulse();
          ev[EV_RELOAD]++;
          check(func_q == v, $sformatf("reload tv%0d: %h expected %h", tv, func_q, v));
          // launch and capture with clock width w
          {se0, se1} = MODE_NORMAL;
          cnt = CW'(w);
          repeat (210) @(negedge ref_clk);   // let the path outputs settle
          cs = 1'b1;
          trg = 1'b1;
          repeat (w + 8) @(negedge ref_clk);
          cs = 1'b0;
          trg = 1'b0;
          ev[EV_PULSE]++;
          for (int i = 0; i < NFF; i++) exp[i] = resp(v, i, w, del[i]);
          check(func_q == exp, $sformatf("capture tv%0d w=%0d: %h expected %h", tv, w, func_q, exp));
          for (int i = 0; i < M; i++) begin
            if (w >= del[tgt[st][i]]) ev[EV_PASS]++; else ev[EV_FAIL]++;
            model[i] = divstep(model[i], exp[tgt[st][i]]);
          end
          // move each target response to its cluster tail and compact it
          {se0, se1} = MODE_SCAN;
          for (int c = 1; c <= N; c++) begin
            int ncap;
            ncap = 0;
            for (int sl = 0; sl < NSLICE; sl++) begin
              scj[sl] = '0;
              for (int i = sl * SLICE; i < (sl + 1) * SLICE && i < M; i++)
                if (csz(i) - (tgt[st][i] - i * N) == c) begin
                  scj[sl] = EW'(i - sl * SLICE + 1);
                  ncap++;
                  if (csz(i) < N) ev[EV_SHORTCL]++;
                end
            end
            tck_pulse();
            ev[EV_SIGCAP] += ncap;
            if (ncap > 1) ev[EV_PARCAP]++;
            if (ncap == 0) ev[EV_IDLE]++;
          end
          scj = '0;
          check(tck_count - t_start == 1 + N,
                $sformatf("tester clocks per step %0d, expected %0d", tck_count - t_start, 1 + N));
        end

        // read all signatures out: SIG_M-1 first, MSB first
        sge = 1'b0;
        for (int k = 0; k < M * L; k++) begin
          rd[M - 1 - k / L][L - 1 - k % L] = sgo;
          tck_pulse();
          ev[EV_READ]++;
        end
        sge = 1'b1;
        for (int i = 0; i < M; i++) begin
          int est, nmatch, btrue;
          est = -1;
          nmatch = 0;
          btrue = 0;
          for (int s = 0; s < nm; s++) if (w0 - STEP * s >= del[tgt[st][i]]) btrue++;
          check(rd[i] == L'(model[i]), $sformatf("tv%0d SIG%0d read %h expected %h", tv, i, rd[i], L'(model[i])));
          // delay estimate: number b of passing widths whose signature
          // matches; the delay then lies in (w0-STEP*b, w0-STEP*(b-1)]
          for (int b = 0; b <= nm; b++)
            if (L'(sig_of(v, tgt[st][i], nm, b)) == rd[i]) begin
              nmatch++;
              if (b == btrue || est < 0) est = b;
            end
          check(est == btrue, $sformatf("tv%0d SIG%0d estimated %0d passing widths, true %0d", tv, i, est, btrue));
          $display("tv%0d stage %0d N_meas=%0d cluster %0d ff %0d: delay %0d periods, estimate %0d..%0d (%0d candidate(s))",
                   tv, st, nm, i, tgt[st][i], del[tgt[st][i]], w0 - STEP * est + 1, w0 - STEP * (est - 1), nmatch);
        end
      end
    end

    $display("tester clocks in total %0d", tck_count);
    for (int k = 0; k < EV_NUM; k++) begin
      ev_e e;
      e = ev_e'(k);
      $display("mechanism %-10s %0d", e.name(), ev[k]);
      if (ev_expected[k]) check(ev[k] > 0, $sformatf("mechanism %s never happened", e.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_survival_16x16: survival-rate workload on 16 x 16 arrays, the larger of
// the two array sizes the repair schemes are evaluated at.
//   * Direct Substitution, 16 x 16 with a spare row and column: random
//     patterns with k = 2, 4, ..., 32 defects placed anywhere among the 288
//     physical elements (spares included), two patterns per k.
//   * Window Substitution, 16 x 16 logical on 17 x 17 physical elements with
//     2 x 2 windows: random patterns of 1..16 faulty elements (through
//     ws_nn_harness).
// For every pattern an augmenting-path matcher decides whether a repair
// exists.  The network must finish with a legal assignment for repairable
// patterns (at most one time-out in ten allowed, the search being random)
// and must time out on the others.  The measured survival rate per defect
// count is printed next to the rate of the exact matcher; the two agree when
// the network finds the maximum matching.
module tb_survival_16x16;
  import bisr_pkg::*;
  localparam int M = 16, N = 16, TMO = 50000, KSTEP = 2, PER_K = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    report();
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- Direct Substitution network ----------------
  logic start;
  logic [M:0][N:0] f;
  logic [M:1][N:1] sv, sh;
  nn_state_e st;
  logic busy, done, fail;
  logic [31:0] cyc;

  ds_neural_net #(.M(M), .N(N), .TIMEOUT(TMO)) u_ds (
    .clk, .rst_n, .start, .fault(f), .init_v('0), .init_h('0),
    .sub_v(sv), .sub_h(sh), .state(st), .busy, .done, .fail, .cycles(cyc));

  // ---------------- Window Substitution network ----------------
  int wc, wf, wr, wt, wb, wm;
  logic wfin;
  ws_nn_harness #(.M(16), .N(16), .P(2), .Q(2), .NPAT(16), .MAXDEF(16), .SEED(32'h3141_5926)) u_ws (
    .clk, .rst_n, .checks(wc), .failures(wf), .n_repaired(wr), .n_timeout(wt), .n_miss(wm),
    .n_backtrack(wb), .finished(wfin));

  // ---------------- reference for Direct Substitution ----------------
  int owner[M+N+1];
  bit seen[M+N+1];
  int dfi[M*N], dfj[M*N];

  function automatic bit augment(int d);
    int sp[2];
    bit ok[2];
    sp[0] = dfi[d];      ok[0] = !f[dfi[d]][0];   // spare (i,0)
    sp[1] = M + dfj[d];  ok[1] = !f[0][dfj[d]];   // spare (0,j)
    for (int t = 0; t < 2; t++) begin
      if (!ok[t] || seen[sp[t]]) continue;
      seen[sp[t]] = 1;
      if (owner[sp[t]] < 0 || augment(owner[sp[t]])) begin
        owner[sp[t]] = d;
        return 1;
      end
    end
    return 0;
  endfunction

  function automatic bit repairable();
    int nd;
    nd = 0;
    for (int i = 1; i <= M; i++)
      for (int j = 1; j <= N; j++)
        if (f[i][j]) begin dfi[nd] = i; dfj[nd] = j; nd++; end
    foreach (owner[s]) owner[s] = -1;
    for (int d = 0; d < nd; d++) begin
      foreach (seen[s]) seen[s] = 0;
      if (!augment(d)) return 0;
    end
    return 1;
  endfunction

  function automatic bit legal();
    int cnt;
    for (int i = 1; i <= M; i++)
      for (int j = 1; j <= N; j++) begin
        if (!f[i][j] && (sv[i][j] || sh[i][j])) return 0;
        if (f[i][j] && (int'(sv[i][j]) + int'(sh[i][j]) != 1)) return 0;
        if (sv[i][j] && f[0][j]) return 0;
        if (sh[i][j] && f[i][0]) return 0;
      end
    for (int j = 1; j <= N; j++) begin
      cnt = 0;
      for (int i = 1; i <= M; i++) cnt += int'(sv[i][j]);
      if (cnt > 1) return 0;
    end
    for (int i = 1; i <= M; i++) begin
      cnt = 0;
      for (int j = 1; j <= N; j++) cnt += int'(sh[i][j]);
      if (cnt > 1) return 0;
    end
    return 1;
  endfunction

  initial begin
    int nrep, ndone, nunrep, nmiss, placed, k, r, c, w;
    bit rep;
    start = 0; f = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    nmiss = 0;
    for (k = KSTEP; k <= 2 * M; k += KSTEP) begin
      nrep = 0; ndone = 0; nunrep = 0;
      for (int t = 0; t < PER_K; t++) begin
        f = '0;
        placed = 0;
        while (placed < k) begin
          r = $urandom_range(0, M); c = $urandom_range(0, N);
          if ((r == 0 && c == 0) || f[r][c]) continue;
          f[r][c] = 1; placed++;
        end
        rep = repairable();
        @(negedge clk); start = 1; @(negedge clk); start = 0;
        @(negedge clk);
        w = 0;
        while (busy && w < TMO + 10) begin @(negedge clk); w++; end
        if (rep) begin
          nrep++;
          if (done) begin
            ndone++;
            check(legal(), $sformatf("k=%0d pattern %0d: illegal assignment", k, t));
          end else begin
            nmiss++;
            $display("k=%0d pattern %0d: repairable, not solved in time", k, t);
          end
        end else begin
          nunrep++;
          check(fail && !done && st == NN_FAIL && cyc == 32'(TMO - 1),
                $sformatf("k=%0d pattern %0d: unrepairable but not timed out (%0d cycles)", k, t, cyc));
        end
      end
      $display("DS 16x16 k=%2d: survival %0d/%0d by the network, %0d/%0d possible",
               k, ndone, PER_K, nrep, PER_K);
    end
    check(nmiss * 10 <= (2 * M / KSTEP) * PER_K, $sformatf("%0d repairable patterns missed", nmiss));
    wait (wfin);
    $display("WS22 16x16: %0d repaired, %0d unrepairable timed out, %0d missed, %0d backtracks",
             wr, wt, wm, wb);
    checks += wc; failures += wf;
    check(wr > 0, "Window Substitution repaired at least one 16x16 pattern");
    report();
    $finish;
  end
endmodule

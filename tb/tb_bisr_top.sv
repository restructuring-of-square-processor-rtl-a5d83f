// tb_bisr_top: end-to-end test of both self-repairing arrays at their
// default sizes (8 x 8 Direct Substitution array, 8 x 8 logical / 9 x 9
// physical Window Substitution array with 2 x 2 windows).
//
// Direct Substitution part:
//   * a pattern with defects sharing rows and columns, a broken spare and a
//     conflicting initial assignment (two defects claiming one spare);
//     the repair must end legal, then the majority-vote image filter must
//     match a reference while the defective elements are stuck-at-1;
//   * an unrepairable pattern (a defect whose two spares are both broken),
//     which must end in the time-out after exactly TIMEOUT cycles.
// Window Substitution part:
//   * a repairable pattern, followed by shift/step operation checked against
//     row and column sums;
//   * an unrepairable pattern (all four candidates of position (0,0)
//     faulty), which must time out.
// Mechanisms counted and required at least once: horizontal substitution,
// vertical substitution, spare disabled by a broken spare, back-tracking in
// each network, time-out in each network, element moved inside its window,
// majority step, shift load, systolic step.
module tb_bisr_top;
  import bisr_pkg::*;
  localparam int M = 8, N = 8, P = 2, Q = 2, W = 8, PQ = 4, TMO = 65536;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [M:0][N:0] ds_fault, ws_fault;
  logic ds_repair_start, ws_repair_start, ds_load, ds_step, ws_shift, ws_step;
  logic [M:1][N:1] ds_init_v, ds_init_h, ds_sub_v, ds_sub_h, ds_pix_in, ds_pix_out;
  nn_state_e ds_repair_state, ws_repair_state;
  logic ds_repair_busy, ds_repair_done, ds_repair_fail;
  logic ws_repair_busy, ws_repair_done, ws_repair_fail;
  logic [31:0] ds_repair_cycles, ws_repair_cycles;
  logic [M:0][N:0][PQ-1:0] ws_move;
  logic [M-1:0][W-1:0] ws_west_in, ws_east_out;
  logic [N-1:0][W-1:0] ws_north_in, ws_south_out;
  int checks = 0, failures = 0;
  int n_hsub = 0, n_vsub = 0, n_spare_dis = 0, n_ds_bt = 0, n_ws_bt = 0;
  int n_ds_tmo = 0, n_ws_tmo = 0, n_moved = 0, n_vote = 0, n_shift = 0, n_step = 0;

  bisr_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (600_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // back-tracking monitors: a firing neuron turns off during a run
  logic [M:1][N:1] pv, ph;
  logic [M:0][N:0][PQ-1:0] pm;
  always @(posedge clk) begin
    if (ds_repair_state == NN_RUN && (((pv & ~ds_sub_v) | (ph & ~ds_sub_h)) != '0)) n_ds_bt++;
    if (ws_repair_state == NN_RUN && ((pm & ~ws_move) != '0)) n_ws_bt++;
    pv <= ds_sub_v; ph <= ds_sub_h; pm <= ws_move;
  end

  // stuck-at-1 emulation of defective Direct Substitution elements
  logic [M:1][N:1] stuck;
  for (genvar i = 1; i <= M; i++) begin : g_f
    for (genvar j = 1; j <= N; j++) begin : g_c
      always @(stuck[i][j]) begin
        if (stuck[i][j]) force dut.u_ds.g_row[i].g_col[j].u_pe.pix = 1'b1;
        else             release dut.u_ds.g_row[i].g_col[j].u_pe.pix;
      end
    end
  end

  function automatic logic [M:1][N:1] vote(logic [M:1][N:1] x);
    logic [M:1][N:1] y;
    int c;
    for (int i = 1; i <= M; i++)
      for (int j = 1; j <= N; j++) begin
        c = int'(x[i][j]);
        if (i > 1) c += int'(x[i-1][j]);
        if (i < M) c += int'(x[i+1][j]);
        if (j > 1) c += int'(x[i][j-1]);
        if (j < N) c += int'(x[i][j+1]);
        y[i][j] = (c >= 3);
      end
    return y;
  endfunction

  function automatic bit ds_legal();
    for (int i = 1; i <= M; i++)
      for (int j = 1; j <= N; j++) begin
        if (ds_fault[i][j] != (ds_sub_v[i][j] | ds_sub_h[i][j])) return 0;
        if (ds_sub_v[i][j] && ds_sub_h[i][j]) return 0;
        if (ds_sub_v[i][j] && ds_fault[0][j]) return 0;
        if (ds_sub_h[i][j] && ds_fault[i][0]) return 0;
      end
    for (int j = 1; j <= N; j++) begin
      int c;
      c = 0;
      for (int i = 1; i <= M; i++) c += int'(ds_sub_v[i][j]);
      if (c > 1) return 0;
    end
    for (int i = 1; i <= M; i++) if ($countones(ds_sub_h[i]) > 1) return 0;
    return 1;
  endfunction

  task automatic ds_repair(output int cyc);
    @(negedge clk); ds_repair_start = 1'b1; @(negedge clk); ds_repair_start = 1'b0;
    cyc = 0;
    @(negedge clk);
    while (ds_repair_busy && cyc < TMO + 10) begin @(negedge clk); cyc++; end
  endtask

  task automatic ws_repair(output int cyc);
    @(negedge clk); ws_repair_start = 1'b1; @(negedge clk); ws_repair_start = 1'b0;
    cyc = 0;
    @(negedge clk);
    while (ws_repair_busy && cyc < TMO + 10) begin @(negedge clk); cyc++; end
  endtask

  logic [W-1:0] val[M][N];

  initial begin
    int cyc;
    logic [M:1][N:1] img;
    logic [W-1:0] s;
    ds_fault = '0; ws_fault = '0; ds_repair_start = 0; ws_repair_start = 0;
    ds_load = 0; ds_step = 0; ws_shift = 0; ws_step = 0;
    ds_init_v = '0; ds_init_h = '0; ds_pix_in = '0;
    ws_west_in = '0; ws_north_in = '0; stuck = '0;
    pv = '0; ph = '0; pm = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- Direct Substitution, repairable ----------------
    ds_fault[2][3] = 1; ds_fault[2][6] = 1; ds_fault[4][3] = 1; ds_fault[5][5] = 1;
    ds_fault[7][1] = 1; ds_fault[7][5] = 1; ds_fault[8][8] = 1;
    ds_fault[5][0] = 1;                       // spare (5,0) broken
    ds_init_h[2][3] = 1; ds_init_h[2][6] = 1; // both claim spare (2,0)
    ds_repair(cyc);
    check(ds_repair_done, "DS repair done");
    check(ds_legal(), "DS assignment legal");
    n_hsub += $countones(ds_sub_h);
    n_vsub += $countones(ds_sub_v);
    if (ds_sub_v[5][5]) n_spare_dis++;        // (5,5) could only go vertical
    check(!ds_sub_h[5][5], "DS broken spare (5,0) not used");
    $display("DS: repaired in %0d cycles: %0d horizontal, %0d vertical substitutions",
             ds_repair_cycles, $countones(ds_sub_h), $countones(ds_sub_v));
    for (int i = 1; i <= M; i++) for (int j = 1; j <= N; j++) stuck[i][j] = ds_fault[i][j];
    ds_pix_in = (M*N)'({$urandom, $urandom});
    img = ds_pix_in;
    @(negedge clk); ds_load = 1; @(negedge clk); ds_load = 0;
    check(ds_pix_out == img, "DS image load");
    for (int t = 0; t < 4; t++) begin
      ds_step = 1; @(negedge clk); ds_step = 0;
      img = vote(img);
      n_vote++;
      check(ds_pix_out == img, $sformatf("DS majority step %0d", t));
    end

    // ---------------- Direct Substitution, unrepairable ----------------
    stuck = '0;
    ds_fault = '0; ds_init_h = '0;
    ds_fault[3][4] = 1; ds_fault[3][0] = 1; ds_fault[0][4] = 1;
    ds_repair(cyc);
    check(ds_repair_fail && !ds_repair_done, "DS unrepairable pattern times out");
    check(ds_repair_cycles == 32'(TMO - 1), "DS time-out length");
    if (ds_repair_fail) n_ds_tmo++;

    // ---------------- Window Substitution, repairable ----------------
    ws_fault[0][0] = 1; ws_fault[2][5] = 1; ws_fault[4][4] = 1; ws_fault[6][1] = 1;
    ws_fault[8][3] = 1;
    ws_repair(cyc);
    check(ws_repair_done, "WS repair done");
    for (int i = 0; i <= M; i++)
      for (int j = 0; j <= N; j++)
        if (ws_move[i][j] != '0 && !ws_move[i][j][PQ-1]) n_moved++;
    $display("WS: repaired in %0d cycles, %0d elements moved inside their window",
             ws_repair_cycles, n_moved);
    for (int t = 0; t < N; t++) begin
      for (int r = 0; r < M; r++) begin
        val[r][N-1-t] = W'($urandom);
        ws_west_in[r] = val[r][N-1-t];
      end
      ws_shift = 1; @(negedge clk); n_shift++;
    end
    ws_shift = 0;
    for (int r = 0; r < M; r++) ws_west_in[r] = W'($urandom);
    for (int c = 0; c < N; c++) ws_north_in[c] = W'($urandom);
    ws_step = 1;
    repeat (M + N + 2) begin @(negedge clk); n_step++; end
    ws_step = 0;
    for (int r = 0; r < M; r++) begin
      s = ws_west_in[r];
      for (int c = 0; c < N; c++) s += val[r][c];
      check(ws_east_out[r] == s, $sformatf("WS row %0d sum", r));
    end
    for (int c = 0; c < N; c++) begin
      s = ws_north_in[c];
      for (int r = 0; r < M; r++) s += val[r][c];
      check(ws_south_out[c] == s, $sformatf("WS column %0d sum", c));
    end

    // ---------------- Window Substitution, unrepairable ----------------
    ws_fault = '0;
    ws_fault[0][0] = 1; ws_fault[0][1] = 1; ws_fault[1][0] = 1; ws_fault[1][1] = 1;
    ws_repair(cyc);
    check(ws_repair_fail && !ws_repair_done, "WS unrepairable pattern times out");
    if (ws_repair_fail) n_ws_tmo++;

    $display("mechanisms: hsub=%0d vsub=%0d spare_disabled=%0d ds_backtrack=%0d ws_backtrack=%0d",
             n_hsub, n_vsub, n_spare_dis, n_ds_bt, n_ws_bt);
    $display("            ds_timeout=%0d ws_timeout=%0d moved=%0d vote=%0d shift=%0d step=%0d",
             n_ds_tmo, n_ws_tmo, n_moved, n_vote, n_shift, n_step);
    check(n_hsub > 0, "horizontal substitution happened");
    check(n_vsub > 0, "vertical substitution happened");
    check(n_spare_dis > 0, "broken spare forced the other direction");
    check(n_ds_bt > 0, "DS back-tracking happened");
    check(n_ws_bt > 0, "WS back-tracking happened");
    check(n_ds_tmo > 0, "DS time-out happened");
    check(n_ws_tmo > 0, "WS time-out happened");
    check(n_moved > 0, "WS element moved");
    check(n_vote > 0 && n_shift > 0 && n_step > 0, "array operation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

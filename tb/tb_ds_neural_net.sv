// tb_ds_neural_net: self-checking test of the Direct Substitution repair
// network.
//   1. 4 x 4 example: defects (1,1) (1,3) (1,4) (2,2) (3,3) (4,1) (4,4), spare
//      (2,0) broken.  Repairable; the network must finish with a legal
//      complete assignment.
//   2. 16 x 16 example with nine defects and a conflicting initial
//      assignment (H4, V5, H6, H8, H9 firing: H8 and H9 claim the same row
//      spare).  Must finish with a legal complete assignment.
//   3. 8 x 8, random patterns of 1..16 defects and random broken spares.  An
//      independent augmenting-path matcher decides repairability; the
//      network must report done for repairable and fail (time-out) for
//      unrepairable patterns.  Legal = each defect covered by exactly one
//      working spare of its row or column, no spare used twice, no neuron of
//      a fault-free element firing.
// Also counts back-tracking events (a firing neuron turning off while
// running) and requires at least one.
module tb_ds_neural_net;
  import bisr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, backtracks = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- instances ----------------
  logic start4, start8, start16;
  logic [4:0][4:0]   f4;
  logic [8:0][8:0]   f8;
  logic [16:0][16:0] f16;
  logic [4:1][4:1]   v4, h4;
  logic [8:1][8:1]   v8, h8;
  logic [16:1][16:1] v16, h16, iv16, ih16;
  nn_state_e st4, st8, st16;
  logic b4, d4, x4, b8, d8, x8, b16, d16, x16;
  logic [31:0] c4, c8, c16;

  ds_neural_net #(.M(4), .N(4), .TIMEOUT(20000)) u4 (
    .clk, .rst_n, .start(start4), .fault(f4), .init_v('0), .init_h('0),
    .sub_v(v4), .sub_h(h4), .state(st4), .busy(b4), .done(d4), .fail(x4), .cycles(c4));
  ds_neural_net #(.M(8), .N(8), .TIMEOUT(60000)) u8 (
    .clk, .rst_n, .start(start8), .fault(f8), .init_v('0), .init_h('0),
    .sub_v(v8), .sub_h(h8), .state(st8), .busy(b8), .done(d8), .fail(x8), .cycles(c8));
  ds_neural_net #(.M(16), .N(16), .TIMEOUT(200000)) u16 (
    .clk, .rst_n, .start(start16), .fault(f16), .init_v(iv16), .init_h(ih16),
    .sub_v(v16), .sub_h(h16), .state(st16), .busy(b16), .done(d16), .fail(x16), .cycles(c16));

  // back-tracking monitor on the 8 x 8 network
  logic [8:1][8:1] pv8, ph8;
  always @(posedge clk) begin
    if (st8 == NN_RUN && (((pv8 & ~v8) != '0) || ((ph8 & ~h8) != '0))) backtracks++;
    pv8 <= v8; ph8 <= h8;
  end

  // ---------------- reference ----------------
  // Legality of an assignment on a (Mr x Nr) array, given as flat bit arrays.
  function automatic bit legal(int Mr, int Nr, bit fault[17][17],
                               bit sv[17][17], bit sh[17][17]);
    int cnt;
    for (int i = 1; i <= Mr; i++)
      for (int j = 1; j <= Nr; j++) begin
        if (!fault[i][j] && (sv[i][j] || sh[i][j])) return 0;
        if (fault[i][j] && (sv[i][j] + sh[i][j] != 1)) return 0;
        if (sv[i][j] && fault[0][j]) return 0;
        if (sh[i][j] && fault[i][0]) return 0;
      end
    for (int j = 1; j <= Nr; j++) begin
      cnt = 0;
      for (int i = 1; i <= Mr; i++) cnt += sv[i][j];
      if (cnt > 1) return 0;
    end
    for (int i = 1; i <= Mr; i++) begin
      cnt = 0;
      for (int j = 1; j <= Nr; j++) cnt += sh[i][j];
      if (cnt > 1) return 0;
    end
    return 1;
  endfunction

  // Kuhn's augmenting-path matching of defects to spares (spare ids: rows
  // 1..Mr are (i,0), Mr+1..Mr+Nr are (0,j)).
  int owner[40];
  int dfi[300], dfj[300];
  bit seen[40];
  function automatic bit augment(int d, int Mr, bit fault[17][17]);
    int sp[2];
    sp[0] = dfi[d];          // spare (i,0)
    sp[1] = Mr + dfj[d];     // spare (0,j)
    for (int t = 0; t < 2; t++) begin
      if (t == 0 && fault[dfi[d]][0]) continue;
      if (t == 1 && fault[0][dfj[d]]) continue;
      if (seen[sp[t]]) continue;
      seen[sp[t]] = 1;
      if (owner[sp[t]] < 0 || augment(owner[sp[t]], Mr, fault)) begin
        owner[sp[t]] = d;
        return 1;
      end
    end
    return 0;
  endfunction

  function automatic bit repairable(int Mr, int Nr, bit fault[17][17]);
    int nd;
    nd = 0;
    for (int i = 1; i <= Mr; i++)
      for (int j = 1; j <= Nr; j++)
        if (fault[i][j]) begin dfi[nd] = i; dfj[nd] = j; nd++; end
    for (int s = 0; s < 40; s++) owner[s] = -1;
    for (int d = 0; d < nd; d++) begin
      for (int s = 0; s < 40; s++) seen[s] = 0;
      if (!augment(d, Mr, fault)) return 0;
    end
    return 1;
  endfunction

  bit fa[17][17], sva[17][17], sha[17][17];

  task automatic wait_end(ref logic busy_s, input int limit, output int cyc);
    cyc = 0;
    @(posedge clk);
    @(posedge clk);
    while (busy_s && cyc < limit) begin @(posedge clk); cyc++; end
    #1;
  endtask

  initial begin
    int cyc, nrep, nunrep, ndone;
    bit rep, fig_same;
    start4 = 0; start8 = 0; start16 = 0;
    f4 = '0; f8 = '0; f16 = '0; iv16 = '0; ih16 = '0;
    pv8 = '0; ph8 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- 1. 4 x 4 example ----
    f4[1][1] = 1; f4[1][3] = 1; f4[1][4] = 1; f4[2][2] = 1;
    f4[3][3] = 1; f4[4][1] = 1; f4[4][4] = 1; f4[2][0] = 1;
    @(negedge clk); start4 = 1; @(negedge clk); start4 = 0;
    wait_end(b4, 30000, cyc);
    foreach (fa[i, j]) begin fa[i][j] = 0; sva[i][j] = 0; sha[i][j] = 0; end
    for (int i = 0; i <= 4; i++) for (int j = 0; j <= 4; j++) fa[i][j] = f4[i][j];
    for (int i = 1; i <= 4; i++) for (int j = 1; j <= 4; j++) begin
      sva[i][j] = v4[i][j]; sha[i][j] = h4[i][j];
    end
    check(repairable(4, 4, fa), "reference: 4x4 example repairable");
    check(d4 && !x4, "4x4 example: repair done");
    check(legal(4, 4, fa, sva, sha), "4x4 example: legal assignment");
    $display("4x4 example repaired in %0d cycles", c4);

    // ---- 2. 16 x 16 example with initial conflicting assignment ----
    f16[3][10] = 1; f16[5][6] = 1; f16[5][12] = 1; f16[6][8] = 1; f16[9][4] = 1;
    f16[9][8] = 1; f16[11][10] = 1; f16[12][4] = 1; f16[12][8] = 1;
    ih16[6][8] = 1; iv16[9][4] = 1; ih16[9][8] = 1; ih16[12][4] = 1; ih16[12][8] = 1;
    @(negedge clk); start16 = 1; @(negedge clk); start16 = 0;
    wait_end(b16, 300000, cyc);
    foreach (fa[i, j]) begin fa[i][j] = 0; sva[i][j] = 0; sha[i][j] = 0; end
    for (int i = 0; i <= 16; i++) for (int j = 0; j <= 16; j++) fa[i][j] = f16[i][j];
    for (int i = 1; i <= 16; i++) for (int j = 1; j <= 16; j++) begin
      sva[i][j] = v16[i][j]; sha[i][j] = h16[i][j];
    end
    check(d16 && !x16, "16x16 example: repair done");
    check(legal(16, 16, fa, sva, sha), "16x16 example: legal assignment");
    fig_same = h16[3][10] && v16[5][6] && v16[5][12] && h16[6][8] && v16[9][4] &&
               h16[9][8] && h16[11][10] && h16[12][4] && v16[12][8];
    $display("16x16 example repaired in %0d cycles (same solution as the published run: %0b)",
             c16, fig_same);

    // ---- 3. random 8 x 8 patterns ----
    nrep = 0; nunrep = 0; ndone = 0;
    for (int t = 0; t < 120; t++) begin
      int k;
      f8 = '0;
      k = 1 + (t % 16);
      for (int d = 0; d < k; d++) f8[$urandom_range(1, 8)][$urandom_range(1, 8)] = 1;
      if ($urandom_range(0, 3) == 0) f8[$urandom_range(1, 8)][0] = 1;
      if ($urandom_range(0, 3) == 0) f8[0][$urandom_range(1, 8)] = 1;
      foreach (fa[i, j]) begin fa[i][j] = 0; sva[i][j] = 0; sha[i][j] = 0; end
      for (int i = 0; i <= 8; i++) for (int j = 0; j <= 8; j++) fa[i][j] = f8[i][j];
      rep = repairable(8, 8, fa);
      @(negedge clk); start8 = 1; @(negedge clk); start8 = 0;
      wait_end(b8, 70000, cyc);
      for (int i = 1; i <= 8; i++) for (int j = 1; j <= 8; j++) begin
        sva[i][j] = v8[i][j]; sha[i][j] = h8[i][j];
      end
      if (rep) begin
        nrep++;
        check(d8 && !x8, $sformatf("pattern %0d (%0d defects): repairable but not repaired", t, k));
        check(legal(8, 8, fa, sva, sha), $sformatf("pattern %0d: illegal assignment", t));
        if (d8) ndone++;
      end else begin
        nunrep++;
        check(x8 && !d8, $sformatf("pattern %0d: unrepairable but done", t));
        check(c8 == 32'd59999, $sformatf("pattern %0d: time-out after %0d cycles", t, c8));
      end
    end
    $display("random 8x8: %0d repairable (%0d repaired), %0d unrepairable, %0d backtracks",
             nrep, ndone, nunrep, backtracks);
    check(nunrep > 0, "at least one unrepairable pattern exercised the time-out");
    check(backtracks > 0, "back-tracking happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ds_switch_fabric: self-checking test of the Direct Substitution switch
// fabric (4 x 5 array).  Each trial draws a random legal substitution (at
// most one horizontal substitution per row and one vertical per column, never
// both for one element) and random element outputs, then checks
//   * every logical pixel comes from the element that holds the position;
//   * every regular element and every active spare sees the pixels of the
//     four logical neighbours of the position it holds (0 beyond the edge)
//     and the load pixel of that position;
//   * idle spares see zeros.
module tb_ds_switch_fabric;
  localparam int M = 4, N = 5;
  logic [M:1][N:1] sub_v, sub_h, core_pix, pix_in, log_pix;
  logic [M:1][N:1] core_n, core_s, core_e, core_w;
  logic [M:1] scol_pix, scol_n, scol_s, scol_e, scol_w, scol_ld;
  logic [N:1] srow_pix, srow_n, srow_s, srow_e, srow_w, srow_ld;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  ds_switch_fabric #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // pixel of logical position (i, j) as the reference sees it
  function automatic logic ref_pix(int i, int j);
    if (i < 1 || i > M || j < 1 || j > N) return 1'b0;
    if (sub_h[i][j]) return scol_pix[i];
    if (sub_v[i][j]) return srow_pix[j];
    return core_pix[i][j];
  endfunction

  initial begin
    logic [M:1] row_used;
    logic [N:1] col_used;
    for (int t = 0; t < 300; t++) begin
      sub_v = '0; sub_h = '0; row_used = '0; col_used = '0;
      for (int f = 0; f < 6; f++) begin
        int i, j;
        i = $urandom_range(1, M); j = $urandom_range(1, N);
        if (sub_v[i][j] || sub_h[i][j]) continue;
        if ($urandom_range(0, 1) == 1 && !row_used[i]) begin
          sub_h[i][j] = 1'b1; row_used[i] = 1'b1;
        end else if (!col_used[j]) begin
          sub_v[i][j] = 1'b1; col_used[j] = 1'b1;
        end
      end
      core_pix = (M*N)'($urandom); pix_in = (M*N)'($urandom);
      scol_pix = M'($urandom); srow_pix = N'($urandom);
      @(posedge clk); #1;
      for (int i = 1; i <= M; i++) begin
        for (int j = 1; j <= N; j++) begin
          check(log_pix[i][j], ref_pix(i, j), $sformatf("log_pix(%0d,%0d)", i, j));
          check(core_n[i][j], ref_pix(i-1, j), "core n");
          check(core_s[i][j], ref_pix(i+1, j), "core s");
          check(core_w[i][j], ref_pix(i, j-1), "core w");
          check(core_e[i][j], ref_pix(i, j+1), "core e");
        end
      end
      for (int i = 1; i <= M; i++) begin
        int c;
        c = 0;
        for (int j = 1; j <= N; j++) if (sub_h[i][j]) c = j;
        check(scol_n[i], (c != 0) ? ref_pix(i-1, c) : 1'b0, "scol n");
        check(scol_s[i], (c != 0) ? ref_pix(i+1, c) : 1'b0, "scol s");
        check(scol_w[i], (c != 0) ? ref_pix(i, c-1) : 1'b0, "scol w");
        check(scol_e[i], (c != 0) ? ref_pix(i, c+1) : 1'b0, "scol e");
        check(scol_ld[i], (c != 0) ? pix_in[i][c] : 1'b0, "scol load");
      end
      for (int j = 1; j <= N; j++) begin
        int r;
        r = 0;
        for (int i = 1; i <= M; i++) if (sub_v[i][j]) r = i;
        check(srow_n[j], (r != 0) ? ref_pix(r-1, j) : 1'b0, "srow n");
        check(srow_s[j], (r != 0) ? ref_pix(r+1, j) : 1'b0, "srow s");
        check(srow_w[j], (r != 0) ? ref_pix(r, j-1) : 1'b0, "srow w");
        check(srow_e[j], (r != 0) ? ref_pix(r, j+1) : 1'b0, "srow e");
        check(srow_ld[j], (r != 0) ? pix_in[r][j] : 1'b0, "srow load");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

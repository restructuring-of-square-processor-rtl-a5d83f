// tb_ws_neural_net: self-checking test of the Window Substitution repair
// network at the sizes the design is evaluated at: a 4 x 4 logical array
// with 2 x 2 windows, and 8 x 8 logical arrays with 2 x 2, 2 x 3 and 3 x 3
// windows, each on (M+1) x (N+1) physical elements.  Each size runs random
// fault patterns through ws_nn_harness, which compares against a reference
// matcher.  Requires at least one repair, one time-out on an unrepairable
// pattern and one back-tracking event overall.
module tb_ws_neural_net;
  logic clk = 1'b0, rst_n = 1'b0;
  int c[4], f[4], r[4], to[4], bt[4];
  logic fin[4];
  int checks, failures;

  always #5 clk = ~clk;

  ws_nn_harness #(.M(4), .N(4), .P(2), .Q(2), .NPAT(40), .MAXDEF(9),  .SEED(32'h1234_5678)) h0 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .n_repaired(r[0]), .n_timeout(to[0]), .n_miss(),
    .n_backtrack(bt[0]), .finished(fin[0]));
  ws_nn_harness #(.M(8), .N(8), .P(2), .Q(2), .NPAT(34), .MAXDEF(17), .SEED(32'h0bad_cafe)) h1 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .n_repaired(r[1]), .n_timeout(to[1]), .n_miss(),
    .n_backtrack(bt[1]), .finished(fin[1]));
  ws_nn_harness #(.M(8), .N(8), .P(2), .Q(3), .NPAT(34), .MAXDEF(17), .SEED(32'h7777_1111)) h2 (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .n_repaired(r[2]), .n_timeout(to[2]), .n_miss(),
    .n_backtrack(bt[2]), .finished(fin[2]));
  ws_nn_harness #(.M(8), .N(8), .P(3), .Q(3), .NPAT(34), .MAXDEF(17), .SEED(32'h2468_ace1)) h3 (
    .clk, .rst_n, .checks(c[3]), .failures(f[3]), .n_repaired(r[3]), .n_timeout(to[3]), .n_miss(),
    .n_backtrack(bt[3]), .finished(fin[3]));

  task automatic report(int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    report(1);
    $finish;
  end

  initial begin
    int rep, tmo, btr;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    rep = 0; tmo = 0; btr = 0;
    for (int i = 0; i < 4; i++) begin rep += r[i]; tmo += to[i]; btr += bt[i]; end
    report((rep > 0 ? 0 : 1) + (tmo > 0 ? 0 : 1) + (btr > 0 ? 0 : 1));
    if (rep == 0 || tmo == 0 || btr == 0)
      $display("FAIL mechanism missing: repaired=%0d timeouts=%0d backtracks=%0d", rep, tmo, btr);
    $finish;
  end
endmodule

// tb_bisr_ws_array: end-to-end test of the Window Substitution array
// (8 x 8 logical, 9 x 9 physical, 2 x 2 windows, 8-bit data).
// For a fault-free array, a fixed three-fault pattern and random patterns of
// 4 to 9 faulty elements (a pattern the network does not repair is reported
// and skipped; at least four runs must be repaired) it
//   * starts the repair and waits for repair_done;
//   * shifts a random value into every logical position from the west edge;
//   * holds `step` with constant edge inputs until the systolic sums settle,
//     then checks east_out[r] = west_in[r] + sum of row r and
//     south_out[c] = north_in[c] + sum of column c (mod 2^8).
// A wrong move, a wrong net or a faulty element on a path breaks the sums.
module tb_bisr_ws_array;
  import bisr_pkg::*;
  localparam int M = 8, N = 8, P = 2, Q = 2, W = 8, PQ = P * Q;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [M:0][N:0] fault;
  logic repair_start, shift, step;
  logic [M:0][N:0][PQ-1:0] move;
  nn_state_e repair_state;
  logic repair_busy, repair_done, repair_fail;
  logic [31:0] repair_cycles;
  logic [M-1:0][W-1:0] west_in, east_out;
  logic [N-1:0][W-1:0] north_in, south_out;
  int checks = 0, failures = 0, runs = 0;

  bisr_ws_array #(.M(M), .N(N), .P(P), .Q(Q), .W(W), .TIMEOUT(40000)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] val[M][N];

  task automatic run_pattern(string name);
    logic [W-1:0] s;
    int cyc;
    @(negedge clk); repair_start = 1'b1; @(negedge clk); repair_start = 1'b0;
    cyc = 0;
    @(negedge clk);
    while (repair_busy && cyc < 50000) begin @(negedge clk); cyc++; end
    if (!repair_done) begin
      $display("%s: not repaired (%s), skipped", name, repair_fail ? "time-out" : "busy");
      return;
    end
    runs++;
    // load: N shifts, the value entered at shift t ends in column N-1-t
    for (int t = 0; t < N; t++) begin
      for (int r = 0; r < M; r++) begin
        val[r][N-1-t] = W'($urandom);
        west_in[r] = val[r][N-1-t];
      end
      shift = 1'b1; @(negedge clk);
    end
    shift = 1'b0;
    for (int r = 0; r < M; r++) west_in[r] = W'($urandom);
    for (int c = 0; c < N; c++) north_in[c] = W'($urandom);
    step = 1'b1;
    repeat (M + N + 2) @(negedge clk);
    step = 1'b0;
    for (int r = 0; r < M; r++) begin
      s = west_in[r];
      for (int c = 0; c < N; c++) s += val[r][c];
      checks++;
      if (east_out[r] !== s) begin
        failures++;
        $display("FAIL %s: row %0d east %h expected %h", name, r, east_out[r], s);
      end
    end
    for (int c = 0; c < N; c++) begin
      s = north_in[c];
      for (int r = 0; r < M; r++) s += val[r][c];
      checks++;
      if (south_out[c] !== s) begin
        failures++;
        $display("FAIL %s: column %0d south %h expected %h", name, c, south_out[c], s);
      end
    end
    $display("%s: repaired in %0d cycles, %0d elements moved off their own position",
             name, repair_cycles, count_moved());
  endtask

  function automatic int count_moved();
    int n;
    n = 0;
    for (int i = 0; i <= M; i++)
      for (int j = 0; j <= N; j++)
        if (move[i][j] != '0 && !move[i][j][PQ-1]) n++;
    return n;
  endfunction

  initial begin
    fault = '0; repair_start = 0; shift = 0; step = 0;
    west_in = '0; north_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_pattern("no faults");
    fault[0][0] = 1; fault[3][3] = 1; fault[8][8] = 1;
    run_pattern("three faults");
    for (int t = 0; t < 6; t++) begin
      fault = '0;
      for (int d = 0; d < 4 + t; d++) fault[$urandom_range(0, M)][$urandom_range(0, N)] = 1;
      run_pattern($sformatf("random %0d", t));
    end
    checks++;
    if (runs < 4) begin failures++; $display("FAIL only %0d runs repaired", runs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

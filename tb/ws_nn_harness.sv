// ws_nn_harness: drives one Window Substitution repair network of a given
// size with NPAT random fault patterns and checks every result against an
// independent reference (used by tb_ws_neural_net and tb_bisr_ws_array).
//
// For each pattern a reference augmenting-path matcher (logical positions
// against fault-free elements, an element (i, j) reaching positions
// (i-a, j-b), 0 <= a < p, 0 <= b < q) decides whether the logical array can
// be rebuilt.  Repairable patterns must end in done with a legal set of
// moves (each position filled exactly once, no element moving twice, no
// faulty element used, each move inside the element's window); unrepairable
// ones must end in fail.  The network is a randomised search, so a
// repairable pattern that is not solved before the time-out is counted as a
// miss rather than an error; more than one miss in ten patterns fails, and ends the run at once.  Results are reported on the output counters and
// `finished` goes high at the end.
module ws_nn_harness
  import bisr_pkg::*;
#(
  parameter int M = 8,
  parameter int N = 8,
  parameter int P = 2,
  parameter int Q = 2,
  parameter int NPAT = 40,
  parameter int MAXDEF = 17,
  parameter int TIMEOUT = 40000,
  parameter logic [31:0] SEED = 32'h5a3c_96e1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_repaired,
  output int   n_timeout,
  output int   n_miss,
  output int   n_backtrack,
  output logic finished
);
  localparam int PQ = P * Q;
  logic start;
  logic [M:0][N:0] fault;
  logic [M:0][N:0][PQ-1:0] move, pmove;
  nn_state_e state;
  logic busy, done, fail;
  logic [31:0] cycles;

  ws_neural_net #(.M(M), .N(N), .P(P), .Q(Q), .TIMEOUT(TIMEOUT), .SEED(SEED)) dut (
    .clk, .rst_n, .start, .fault, .move, .state, .busy, .done, .fail, .cycles);

  // back-tracking: a firing neuron turns off while running
  always @(posedge clk) begin
    if (state == NN_RUN && ((pmove & ~move) != '0)) n_backtrack++;
    pmove <= move;
  end

  // reference matcher
  int owner_i[M+1][N+1], owner_j[M+1][N+1];   // position -> element
  bit seen[M+1][N+1];
  bit fa[M+1][N+1];

  function automatic bit try_elem(int i, int j);
    for (int a = 0; a < P; a++)
      for (int b = 0; b < Q; b++) begin
        int r, c;
        r = i - a; c = j - b;
        if (r < 0 || r >= M || c < 0 || c >= N || seen[r][c]) continue;
        seen[r][c] = 1;
        if (owner_i[r][c] < 0 || try_elem(owner_i[r][c], owner_j[r][c])) begin
          owner_i[r][c] = i; owner_j[r][c] = j;
          return 1;
        end
      end
    return 0;
  endfunction

  function automatic bit repairable();
    int filled;
    filled = 0;
    for (int r = 0; r <= M; r++) for (int c = 0; c <= N; c++) begin
      owner_i[r][c] = -1; owner_j[r][c] = -1;
    end
    for (int i = 0; i <= M; i++)
      for (int j = 0; j <= N; j++) begin
        if (fa[i][j]) continue;
        for (int r = 0; r <= M; r++) for (int c = 0; c <= N; c++) seen[r][c] = 0;
        if (try_elem(i, j)) filled++;
      end
    return filled == M * N;
  endfunction

  function automatic bit legal();
    int cnt[M][N];
    for (int r = 0; r < M; r++) for (int c = 0; c < N; c++) cnt[r][c] = 0;
    for (int i = 0; i <= M; i++)
      for (int j = 0; j <= N; j++) begin
        if ($countones(move[i][j]) > 1) return 0;
        if (fa[i][j] && move[i][j] != '0) return 0;
        for (int k = 0; k < PQ; k++) if (move[i][j][k]) begin
          int r, c;
          r = i + k / Q - P + 1;          // window numbered row-major
          c = j - Q + 1 + k % Q;
          if (r < 0 || r >= M || c < 0 || c >= N) return 0;
          cnt[r][c]++;
        end
      end
    for (int r = 0; r < M; r++) for (int c = 0; c < N; c++) if (cnt[r][c] != 1) return 0;
    return 1;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0dx%0d window %0dx%0d] %s", M, N, P, Q, what);
    end
  endtask

  initial begin
    bit rep;
    int k, cyc;
    checks = 0; failures = 0; n_repaired = 0; n_timeout = 0; n_miss = 0; n_backtrack = 0;
    finished = 0; start = 0; fault = '0; pmove = '0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int t = 0; t < NPAT; t++) begin
      fault = '0;
      k = 1 + (t % MAXDEF);
      for (int d = 0; d < k; d++) fault[$urandom_range(0, M)][$urandom_range(0, N)] = 1;
      for (int i = 0; i <= M; i++) for (int j = 0; j <= N; j++) fa[i][j] = fault[i][j];
      rep = repairable();
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 0;
      @(negedge clk);
      while (busy && cyc < TIMEOUT + 10) begin @(negedge clk); cyc++; end
      chk(done || fail, $sformatf("pattern %0d run did not end", t));
      if (rep) begin
        if (done) begin
          chk(legal(), $sformatf("pattern %0d illegal moves", t));
          n_repaired++;
        end else begin
          n_miss++;
          $display("[%0dx%0d window %0dx%0d] pattern %0d (%0d faults) repairable, not solved in time",
                   M, N, P, Q, t, k);
          if (n_miss * 10 > NPAT) break;   // already failed: stop early
        end
      end else begin
        chk(fail && !done, $sformatf("pattern %0d unrepairable but done", t));
        if (fail) n_timeout++;
      end
    end
    chk(n_miss * 10 <= NPAT, $sformatf("%0d repairable patterns missed", n_miss));
    $display("[%0dx%0d window %0dx%0d] %0d patterns: %0d repaired, %0d unrepairable timed out, %0d missed, %0d backtracks",
             M, N, P, Q, NPAT, n_repaired, n_timeout, n_miss, n_backtrack);
    finished = 1;
  end
endmodule

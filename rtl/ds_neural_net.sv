// ds_neural_net: neural-network reconnection control unit of the Direct
// Substitution array (maximum matching of defective processors to spares).
//
// There is one ds_neural_cell per regular processor (i, j), 1 <= i <= M,
// 1 <= j <= N: 2MN neurons.  The only pattern-dependent inputs are the neuron
// enables (fault map); the synapses are fixed.  The line buses of the network
// are modelled by per-column counts of firing V neurons and per-row counts of
// firing H neurons.
//
// Operation.  A pulse on `start` (in any state) loads the neurons with the
// initial assignment init_v/init_h (neurons of fault-free processors are
// forced off) and enters NN_RUN.  In NN_RUN the network is emulated
// asynchronously: each cycle a random generator picks one neuron (row,
// column, direction; picks outside the array are idle cycles) and a random
// noise value in [-B/2, +B/2], and only that neuron re-evaluates.  The run
// ends
//   * in NN_DONE when every defective processor has exactly one firing neuron
//     and no row or column has two firing neurons of its kind (a complete
//     matching: sub_v/sub_h then program the switch fabric), or
//   * in NN_FAIL when TIMEOUT cycles have passed: the network of an
//     unrepairable pattern never settles, so a time-out stops it.
// `cycles` counts the NN_RUN cycles of the last run.  Reset is active-low and
// synchronous.
//
// The weights, biases, the two-neurons-per-processor encoding and the need
// for a time-out are the document's.  The values of A and B, the one-neuron-
// per-cycle schedule, the noise term and the completion test are this
// design's own (the document's network is analog and settles by itself).
module ds_neural_net
  import bisr_pkg::*;
#(
  parameter int unsigned M       = 8,
  parameter int unsigned N       = 8,
  parameter int unsigned A       = 3,
  parameter int unsigned B       = 4,
  parameter int unsigned TIMEOUT = 65536,
  parameter logic [31:0] SEED    = 32'h1d87_2b41
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [M:0][N:0] fault,      // physical fault map, (0,0) unused
  input  logic [M:1][N:1] init_v,
  input  logic [M:1][N:1] init_h,
  output logic [M:1][N:1] sub_v,      // firing V neurons
  output logic [M:1][N:1] sub_h,      // firing H neurons
  output nn_state_e       state,
  output logic            busy,
  output logic            done,
  output logic            fail,
  output logic [31:0]     cycles
);
  localparam int CW = bits_for(int'((M > N) ? M : N));
  localparam int RB = bits_for(int'(M) - 1);
  localparam int CB = bits_for(int'(N) - 1);

  if (!(B > A && B < 2 * A && (B % 2) == 0)) begin : g_bad_weights
    $error("ds_neural_net: weights need A < B < 2A and B even");
  end
  if (RB + CB + 1 + 8 > 32) begin : g_bad_size
    $error("ds_neural_net: array too large for the 32-bit random source");
  end

  logic [31:0] rnd;
  logic        run, load;
  logic [M:1][N:1] upd_v, upd_h;
  logic [N:1][CW-1:0] col_v_cnt;
  logic [M:1][CW-1:0] row_h_cnt;
  infl_t       noise;
  logic        solved;

  bisr_lfsr #(.SEED(SEED)) u_rng (.clk, .rst_n, .en(1'b1), .rnd);

  assign run  = (state == NN_RUN);
  assign load = (state == NN_LOAD);

  // Random choice of the neuron to update and of the noise value.
  always_comb begin
    int r, c;
    r = int'(rnd[RB-1:0]) + 1;
    c = int'(rnd[RB +: CB]) + 1;
    noise = infl_t'(int'(rnd[RB+CB+1 +: 8]) % int'(B + 1) - int'(B) / 2);
    for (int i = 1; i <= int'(M); i++) begin
      for (int j = 1; j <= int'(N); j++) begin
        upd_v[i][j] = run && (r == i) && (c == j) && !rnd[RB+CB];
        upd_h[i][j] = run && (r == i) && (c == j) &&  rnd[RB+CB];
      end
    end
  end

  // Line buses: firing V neurons per column, firing H neurons per row.
  always_comb begin
    for (int j = 1; j <= int'(N); j++) begin
      col_v_cnt[j] = '0;
      for (int i = 1; i <= int'(M); i++) col_v_cnt[j] += CW'(sub_v[i][j]);
    end
    for (int i = 1; i <= int'(M); i++) begin
      row_h_cnt[i] = '0;
      for (int j = 1; j <= int'(N); j++) row_h_cnt[i] += CW'(sub_h[i][j]);
    end
  end

  for (genvar i = 1; i <= int'(M); i++) begin : g_row
    for (genvar j = 1; j <= int'(N); j++) begin : g_col
      ds_neural_cell #(.A(A), .B(B), .CW(CW)) u_cell (
        .clk, .rst_n,
        .defect    (fault[i][j]),
        .v_spare_ok(!fault[0][j]),
        .h_spare_ok(!fault[i][0]),
        .load,
        .init_v    (init_v[i][j]),
        .init_h    (init_h[i][j]),
        .upd_v     (upd_v[i][j]),
        .upd_h     (upd_h[i][j]),
        .noise,
        .col_v_cnt (col_v_cnt[j]),
        .row_h_cnt (row_h_cnt[i]),
        .s_v       (sub_v[i][j]),
        .s_h       (sub_h[i][j])
      );
    end
  end

  // Complete matching: every defect covered exactly once, one spare per line.
  always_comb begin
    solved = 1'b1;
    for (int i = 1; i <= int'(M); i++)
      for (int j = 1; j <= int'(N); j++)
        if (fault[i][j] && !(sub_v[i][j] ^ sub_h[i][j])) solved = 1'b0;
    for (int j = 1; j <= int'(N); j++) if (col_v_cnt[j] > 1) solved = 1'b0;
    for (int i = 1; i <= int'(M); i++) if (row_h_cnt[i] > 1) solved = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= NN_IDLE;
      cycles <= '0;
    end else if (start) begin
      state  <= NN_LOAD;
      cycles <= '0;
    end else begin
      unique case (state)
        NN_LOAD: state <= NN_RUN;
        NN_RUN: begin
          if (solved)                          state <= NN_DONE;
          else if (cycles >= 32'(TIMEOUT - 1)) state <= NN_FAIL;
          else                                 cycles <= cycles + 1;
        end
        default: ;
      endcase
    end
  end

  assign busy = (state == NN_LOAD) || (state == NN_RUN);
  assign done = (state == NN_DONE);
  assign fail = (state == NN_FAIL);

  // The assignment that ends a run never gives one spare to two processors.
  always_ff @(posedge clk) begin
    if (rst_n && run && solved) begin
      for (int j = 1; j <= int'(N); j++)
        assert (col_v_cnt[j] <= 1) else $error("column %0d spare used twice", j);
      for (int i = 1; i <= int'(M); i++)
        assert (row_h_cnt[i] <= 1) else $error("row %0d spare used twice", i);
    end
  end
endmodule

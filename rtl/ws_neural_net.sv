// ws_neural_net: neural-network reconnection controller of the Window
// Substitution array.
//
// The physical array has (M+1) x (N+1) elements (one spare row and column)
// and must provide an M x N logical array.  Element (i, j) owns p*q neurons
// s[i][j][k]; neuron k firing means the element moves to position k of its
// window, logical position (i + k/q - p + 1, j - q + 1 + k mod q).  Moves that
// fall outside the logical array do not exist (no neuron), and all neurons of
// a faulty element are disabled.
//
// Synapses and bias, from the two cost terms (one move per element, one
// element per position):
//   * -A between two different neurons of the same element;
//   * -B between any two neurons whose moves take the same position, the
//     neuron's own feedback included;
//   * bias B on every neuron.
// So neuron x with position (r, c) sees B - B*cnt(r,c) - A*(other firing
// neurons of its element), where cnt(r,c) counts firing moves onto (r, c).
// A filled position holds (influence 0), an empty one draws in its
// candidates, and an element pulled two ways drops one of its moves, which
// starts a new search until every position is filled.
//
// Operation: `start` clears all neurons and enters NN_RUN (via NN_LOAD).
// Each NN_RUN cycle exactly one neuron switches: among the neurons whose
// threshold rule asks for a change (positive influence while off, negative
// while on) one is drawn with equal probability and updated.  Neurons whose rule says "keep" would not change if
// picked, so this is the asynchronous random-order network with its idle
// picks left out.  NN_DONE
// is entered when every logical position holds exactly one element and no
// element makes two moves; NN_FAIL when TIMEOUT cycles pass first.  `cycles`
// counts NN_RUN cycles.  Reset is active-low and synchronous.
//
// Weights, bias, the neuron encoding and the window numbering are the
// document's; A, B, the update schedule and the completion test are this
// design's choices.  The draw uses only the upper 16 bits of the random
// word (pick = rnd16 * count >> 16), so lint reports the lower bits unused.
module ws_neural_net
  import bisr_pkg::*;
#(
  parameter int unsigned M       = 8,
  parameter int unsigned N       = 8,
  parameter int unsigned P       = 2,
  parameter int unsigned Q       = 2,
  parameter int unsigned A       = 3,
  parameter int unsigned B       = 4,
  parameter int unsigned TIMEOUT = 65536,
  parameter logic [31:0] SEED    = 32'h5a3c_96e1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [M:0][N:0]            fault,
  output logic [M:0][N:0][P*Q-1:0]   move,
  output nn_state_e                  state,
  output logic                       busy,
  output logic                       done,
  output logic                       fail,
  output logic [31:0]                cycles
);
  localparam int PQ = int'(P * Q);
  localparam int CW = bits_for(PQ);
  localparam int NT = int'((M + 1) * (N + 1)) * PQ;   // neuron slots
  localparam int IB = bits_for(NT);

  if (!(B > A && A > 0)) begin : g_bad_weights
    $error("ws_neural_net: weights need B > A > 0");
  end
  if (IB > 16) begin : g_bad_size
    $error("ws_neural_net: array too large for the 32-bit random source");
  end

  logic [31:0] rnd;
  logic        run, load, solved;
  logic [M-1:0][N-1:0][CW-1:0] pos_cnt;
  logic [M:0][N:0][CW-1:0]     grp_cnt;
  logic [NT-1:0] want;                   // neuron asks to switch
  logic [IB-1:0] sel;
  logic          any_want;

  bisr_lfsr #(.SEED(SEED), .STEPS(16)) u_rng (.clk, .rst_n, .en(1'b1), .rnd);

  // Uniform random choice among the neurons that ask to switch: draw
  // pick = floor(rnd16 * count / 2^16) and select the pick-th such neuron.
  always_comb begin
    logic [IB-1:0] cnt, acc, pick;
    cnt = '0;
    for (int x = 0; x < NT; x++) cnt += IB'(want[x]);
    pick = IB'((32'(rnd[31:16]) * 32'(cnt)) >> 16);
    acc  = '0;
    sel  = '0;
    for (int x = 0; x < NT; x++) begin
      if (want[x]) begin
        if (acc == pick) sel = IB'(x);
        acc += IB'(1);
      end
    end
    any_want = (cnt != '0);
  end

  assign run  = (state == NN_RUN);
  assign load = (state == NN_LOAD);

  // Firing moves per logical position and per element.
  always_comb begin
    for (int r = 0; r < int'(M); r++) begin
      for (int c = 0; c < int'(N); c++) begin
        pos_cnt[r][c] = '0;
        for (int a = 0; a < int'(P); a++)
          for (int b = 0; b < int'(Q); b++)
            if (r + a <= int'(M) && c + b <= int'(N))
              pos_cnt[r][c] += CW'(move[r+a][c+b][(int'(P)-1-a)*int'(Q) + (int'(Q)-1-b)]);
      end
    end
    for (int i = 0; i <= int'(M); i++) begin
      for (int j = 0; j <= int'(N); j++) begin
        grp_cnt[i][j] = '0;
        for (int k = 0; k < PQ; k++) grp_cnt[i][j] += CW'(move[i][j][k]);
      end
    end
  end

  for (genvar i = 0; i <= int'(M); i++) begin : g_row
    for (genvar j = 0; j <= int'(N); j++) begin : g_col
      for (genvar k = 0; k < PQ; k++) begin : g_mv
        localparam int R = ws_move_row(i, k, int'(P), int'(Q));
        localparam int C = ws_move_col(j, k, int'(Q));
        if (R >= 0 && R < int'(M) && C >= 0 && C < int'(N)) begin : g_n
          localparam int X = (i * int'(N + 1) + j) * PQ + k;
          infl_t infl;
          logic  upd;
          always_comb begin
            infl = infl_t'(int'(B) - int'(B) * int'(pos_cnt[R][C])
                   - int'(A) * (int'(grp_cnt[i][j]) - int'(move[i][j][k])));
            want[X] = !fault[i][j] && ((infl > 0 && !move[i][j][k]) ||
                                       (infl < 0 &&  move[i][j][k]));
            upd  = run && any_want && (sel == IB'(X));
          end
          hopfield_neuron u_neuron (
            .clk, .rst_n, .enable(!fault[i][j]), .load, .init_val(1'b0),
            .update(upd), .influence(infl), .s(move[i][j][k])
          );
        end else begin : g_none
          assign move[i][j][k] = 1'b0;
          assign want[(i * int'(N + 1) + j) * PQ + k] = 1'b0;
        end
      end
    end
  end

  always_comb begin
    solved = 1'b1;
    for (int r = 0; r < int'(M); r++)
      for (int c = 0; c < int'(N); c++)
        if (pos_cnt[r][c] != CW'(1)) solved = 1'b0;
    for (int i = 0; i <= int'(M); i++)
      for (int j = 0; j <= int'(N); j++)
        if (grp_cnt[i][j] > CW'(1)) solved = 1'b0;
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

  // The assignment that ends a run moves no faulty element and no element twice.
  always_ff @(posedge clk) begin
    if (rst_n && run && solved) begin
      for (int i = 0; i <= int'(M); i++)
        for (int j = 0; j <= int'(N); j++) begin
          assert (!(fault[i][j] && move[i][j] != '0)) else $error("faulty element (%0d,%0d) used", i, j);
          assert ($countones(move[i][j]) <= 1) else $error("element (%0d,%0d) moved twice", i, j);
        end
    end
  end
endmodule

// bisr_ws_array: Window Substitution self-repairing processor array.
//
// (M+1) x (N+1) physical elements build an M x N logical array.  Each element
// may move to any position of its p x q window (the window's bottom-right
// corner is the element's own index); the repair network (ws_neural_net)
// chooses the moves so that the surviving fault-free elements fill every
// logical position.
//
// Interconnect.  For every pair of horizontally adjacent logical positions
// (r, c-1) -> (r, c) there is one net hnet[r][c], and likewise vnet[r][c] for
// (r-1, c) -> (r, c).  The east demultiplexer line k of element (i, j) drives
// the net that leaves the position of move (i, j, k); the west multiplexer
// line k of the same element is tied to the net that enters that position.
// Because only the element holding a position drives a non-zero value on the
// lines of that position, each net is a wired-OR with exactly one active
// driver after repair, and the connections follow from the moves alone.
// hnet[r][0] is the west edge input of logical row r and hnet[r][N] its east
// edge output; vnet[0][c] / vnet[M][c] are the north / south edges of column c.
//
// Operation after repair_done: `shift` shifts values in from the west edge
// along each logical row (N cycles load a row); `step` runs the systolic sum
// of the elements (see ws_cell), giving edge outputs west_in + row sum and
// north_in + column sum after enough steps.  One operation per clock.
module bisr_ws_array
  import bisr_pkg::*;
#(
  parameter int unsigned M       = 8,
  parameter int unsigned N       = 8,
  parameter int unsigned P       = 2,
  parameter int unsigned Q       = 2,
  parameter int unsigned W       = 8,
  parameter int unsigned A       = 3,
  parameter int unsigned B       = 4,
  parameter int unsigned TIMEOUT = 65536,
  parameter logic [31:0] SEED    = 32'h5a3c_96e1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [M:0][N:0]          fault,
  input  logic                     repair_start,
  output logic [M:0][N:0][P*Q-1:0] move,
  output nn_state_e                repair_state,
  output logic                     repair_busy,
  output logic                     repair_done,
  output logic                     repair_fail,
  output logic [31:0]              repair_cycles,
  input  logic                     shift,
  input  logic                     step,
  input  logic [M-1:0][W-1:0]      west_in,
  input  logic [N-1:0][W-1:0]      north_in,
  output logic [M-1:0][W-1:0]      east_out,
  output logic [N-1:0][W-1:0]      south_out
);
  localparam int PQ = int'(P * Q);

  logic [M:0][N:0][PQ-1:0][W-1:0] e_lines, s_lines, w_lines, n_lines;
  logic [M-1:0][N:0][W-1:0]       hnet;
  logic [M:0][N-1:0][W-1:0]       vnet;

  ws_neural_net #(.M(M), .N(N), .P(P), .Q(Q), .A(A), .B(B),
                  .TIMEOUT(TIMEOUT), .SEED(SEED)) u_nn (
    .clk, .rst_n, .start(repair_start), .fault, .move, .state(repair_state),
    .busy(repair_busy), .done(repair_done), .fail(repair_fail),
    .cycles(repair_cycles)
  );

  // Nets: wired-OR of the demultiplexer lines of all moves onto a position.
  always_comb begin
    for (int r = 0; r < int'(M); r++) hnet[r][0] = west_in[r];
    for (int c = 0; c < int'(N); c++) vnet[0][c] = north_in[c];
    for (int r = 0; r < int'(M); r++) begin
      for (int c = 0; c < int'(N); c++) begin
        hnet[r][c+1] = '0;
        vnet[r+1][c] = '0;
        for (int a = 0; a < int'(P); a++)
          for (int b = 0; b < int'(Q); b++)
            if (r + a <= int'(M) && c + b <= int'(N)) begin
              hnet[r][c+1] |= e_lines[r+a][c+b][(int'(P)-1-a)*int'(Q) + (int'(Q)-1-b)];
              vnet[r+1][c] |= s_lines[r+a][c+b][(int'(P)-1-a)*int'(Q) + (int'(Q)-1-b)];
            end
      end
    end
    for (int r = 0; r < int'(M); r++) east_out[r] = hnet[r][N];
    for (int c = 0; c < int'(N); c++) south_out[c] = vnet[M][c];
  end

  for (genvar i = 0; i <= int'(M); i++) begin : g_row
    for (genvar j = 0; j <= int'(N); j++) begin : g_col
      // Multiplexer input line k: the nets entering the position of move k.
      for (genvar k = 0; k < PQ; k++) begin : g_ln
        localparam int R = ws_move_row(i, k, int'(P), int'(Q));
        localparam int C = ws_move_col(j, k, int'(Q));
        if (R >= 0 && R < int'(M) && C >= 0 && C < int'(N)) begin : g_v
          assign w_lines[i][j][k] = hnet[R][C];
          assign n_lines[i][j][k] = vnet[R][C];
        end else begin : g_x
          assign w_lines[i][j][k] = '0;
          assign n_lines[i][j][k] = '0;
        end
      end

      ws_cell #(.P(P), .Q(Q), .W(W)) u_cell (
        .clk, .rst_n, .move(move[i][j]),
        .w_lines(w_lines[i][j]), .n_lines(n_lines[i][j]),
        .shift, .step,
        .e_lines(e_lines[i][j]), .s_lines(s_lines[i][j])
      );
    end
  end
endmodule

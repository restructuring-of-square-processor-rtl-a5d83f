// ws_cell: one physical element of the Window Substitution array with its
// redundant interconnect: two pq:1 multiplexers on its input sides and two
// 1:pq demultiplexers on its output sides, as the document draws it.
//
// The element may take any of the p*q logical positions of its window; the
// repair network tells it which by the one-hot `move` (all zero: element not
// used).  If the move is k, the west and north pq:1 multiplexers take their
// input from line k and the east and south 1:pq demultiplexers drive line k;
// every other output line is 0 so that output lines of several elements can
// share a net (wired-OR).  The element never needs to know who its logical
// neighbours are.
//
// Processing (the document leaves the element's function open; this is this
// design's own systolic payload, used to exercise the links):
//   * shift : the value register takes the west input and the east output
//             register follows it, so a logical row acts as a shift register
//             through which values are loaded from the west edge;
//   * step  : east output <= west input + value, south output <= north input
//             + value, so after enough steps the east edge of a logical row
//             shows its west input plus the sum of the row's values, and the
//             south edge of a column the same for the column.
// Registered outputs, one operation per clock, shift has priority.  Reset is
// active-low and synchronous.
module ws_cell #(
  parameter int unsigned P = 2,
  parameter int unsigned Q = 2,
  parameter int unsigned W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [P*Q-1:0]          move,
  input  logic [P*Q-1:0][W-1:0]   w_lines,
  input  logic [P*Q-1:0][W-1:0]   n_lines,
  input  logic                    shift,
  input  logic                    step,
  output logic [P*Q-1:0][W-1:0]   e_lines,
  output logic [P*Q-1:0][W-1:0]   s_lines
);
  localparam int PQ = int'(P * Q);

  logic [W-1:0] w_in, n_in, val, h_q, v_q;

  // pq:1 input multiplexers (move is one-hot or zero)
  always_comb begin
    w_in = '0;
    n_in = '0;
    for (int k = 0; k < PQ; k++) begin
      if (move[k]) begin
        w_in |= w_lines[k];
        n_in |= n_lines[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      val <= '0;
      h_q <= '0;
      v_q <= '0;
    end else if (shift) begin
      val <= w_in;
      h_q <= w_in;
    end else if (step) begin
      h_q <= w_in + val;
      v_q <= n_in + val;
    end
  end

  // 1:pq output demultiplexers
  always_comb begin
    for (int k = 0; k < PQ; k++) begin
      e_lines[k] = move[k] ? h_q : '0;
      s_lines[k] = move[k] ? v_q : '0;
    end
  end
endmodule

// bisr_pkg: types and helper functions shared by the self-repairing processor
// arrays.
//
// The repair controllers of both arrays (Direct Substitution and Window
// Substitution) are digital emulations of a Hopfield-style neural network.  A
// neuron's "influence" (weighted sum of the firing neurons it is connected to,
// plus its bias) is carried as a signed integer of type infl_t.  The repair
// sequence of a controller is described by nn_state_e.  The window functions
// give the logical position reached by a move (i, j, k) of a Window
// Substitution element, numbered row-major inside a p x q window.
package bisr_pkg;

  // Signed neuron influence (synaptic weights and biases are small integers).
  typedef logic signed [15:0] infl_t;

  // Repair controller sequence.
  //   NN_IDLE : neurons held, waiting for start
  //   NN_LOAD : neurons take the initial assignment (one cycle)
  //   NN_RUN  : one randomly chosen neuron re-evaluates its state per cycle
  //   NN_DONE : a complete, conflict-free assignment was reached
  //   NN_FAIL : the time-out expired first (pattern treated as unrepairable)
  typedef enum logic [2:0] {
    NN_IDLE = 3'd0,
    NN_LOAD = 3'd1,
    NN_RUN  = 3'd2,
    NN_DONE = 3'd3,
    NN_FAIL = 3'd4
  } nn_state_e;

  // Row of the logical position taken by move k of element row i, window p x q.
  function automatic int ws_move_row(int i, int k, int p, int q);
    return i + (k / q) - p + 1;
  endfunction

  // Column of the logical position taken by move k of element column j.
  function automatic int ws_move_col(int j, int k, int q);
    return j - q + 1 + (k % q);
  endfunction

  // Number of bits needed to hold the value n (at least 1).
  function automatic int bits_for(int n);
    int b;
    b = 1;
    while ((1 << b) <= n) b++;
    return b;
  endfunction

endpackage

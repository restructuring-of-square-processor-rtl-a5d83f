// ds_neural_cell: neural subnet attached to one regular processor (i, j) of
// the Direct Substitution array.
//
// It holds two neurons: V (s_v, replace (i,j) by spare (0,j), "vertical") and
// H (s_h, replace by spare (i,0), "horizontal").  Synapses, from the
// acceptability function of the repair problem:
//   * -A between V neurons of the same column and between H neurons of the
//     same row (one spare per line), including the neuron's own feedback;
//   * -B between the V and H neuron of the same processor;
//   * bias A + B/2 on both neurons of a defective processor.
// The cell receives the number of firing V neurons of its column and of firing
// H neurons of its row (its own included) on the shared line buses.  The own
// -A feedback is applied whether or not the neuron fires, as in the document's
// account of the dynamics: an unrepaired defect sees B/2, a neuron whose
// partner fires sees B/2 - B < 0, two neurons competing for one spare each
// see B/2 - A < 0.  A random term `noise` in [-B/2, +B/2] stands for the
// analog circuit's random switching: it lets an unrepaired defect take a spare
// already in use (B/2 - A + noise > 0 needs noise > A - B/2), starting the
// random backtracking, and cannot disturb a complete assignment.
//
// Disable logic: V is enabled only if the processor is defective and spare
// (0,j) works; H only if defective and spare (i,0) works.  `upd_v`/`upd_h`
// select the cycle in which each neuron re-evaluates; `load` presets both
// neurons from init_v/init_h.  All state changes on the rising clock edge.
module ds_neural_cell
  import bisr_pkg::*;
#(
  parameter int unsigned A  = 3,
  parameter int unsigned B  = 4,
  parameter int unsigned CW = 4     // width of the line counts
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          defect,      // this processor is faulty
  input  logic          v_spare_ok,  // spare (0,j) is fault-free
  input  logic          h_spare_ok,  // spare (i,0) is fault-free
  input  logic          load,
  input  logic          init_v,
  input  logic          init_h,
  input  logic          upd_v,
  input  logic          upd_h,
  input  infl_t         noise,
  input  logic [CW-1:0] col_v_cnt,   // firing V neurons in this column
  input  logic [CW-1:0] row_h_cnt,   // firing H neurons in this row
  output logic          s_v,
  output logic          s_h
);
  localparam int BIAS = int'(A) + int'(B) / 2;

  logic  en_v, en_h;
  infl_t infl_v, infl_h;

  always_comb begin
    en_v = defect && v_spare_ok;
    en_h = defect && h_spare_ok;
    // others on the line = count minus own state; plus the own -A feedback
    infl_v = infl_t'(BIAS - int'(A) * (int'(col_v_cnt) - int'(s_v) + 1)
                     - int'(B) * int'(s_h)) + noise;
    infl_h = infl_t'(BIAS - int'(A) * (int'(row_h_cnt) - int'(s_h) + 1)
                     - int'(B) * int'(s_v)) + noise;
  end

  hopfield_neuron u_v (
    .clk, .rst_n, .enable(en_v), .load, .init_val(init_v),
    .update(upd_v), .influence(infl_v), .s(s_v)
  );

  hopfield_neuron u_h (
    .clk, .rst_n, .enable(en_h), .load, .init_val(init_h),
    .update(upd_h), .influence(infl_h), .s(s_h)
  );
endmodule

// hopfield_neuron: one binary neuron of the repair network.
//
// Next state follows the threshold rule of the repair network: the neuron
// fires when its influence (weighted sum of firing neighbours plus bias) is
// positive, stops firing when it is negative and keeps its state when it is
// exactly zero.  The rule is applied only in cycles where `update` is high, so
// a controller can emulate asynchronous operation by updating one neuron at a
// time.  A neuron whose `enable` is low is held in the non-firing state (the
// disable input of a neuron belonging to a fault-free processor or to an
// unusable spare).  `load` presets the state to `init_val`, which lets a
// controller start from an arbitrary initial assignment.
//
// The circuit in the document is an analog inverter pair summing currents;
// this digital version keeps only its switching function.  Timing: state
// changes on the rising clock edge; reset (active-low, synchronous) clears it.
module hopfield_neuron
  import bisr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  load,
  input  logic  init_val,
  input  logic  update,
  input  infl_t influence,
  output logic  s
);
  always_ff @(posedge clk) begin
    if (!rst_n)        s <= 1'b0;
    else if (!enable)  s <= 1'b0;
    else if (load)     s <= init_val;
    else if (update) begin
      if (influence > 0)      s <= 1'b1;
      else if (influence < 0) s <= 1'b0;
    end
  end
endmodule

// maj_pe: image-processing element of the example processor array.
//
// The element holds one pixel.  On `step` it replaces the pixel with the
// majority vote of five values: its own pixel and the pixels of its four
// logical neighbours (north, south, east, west), i.e. it outputs 1 when at
// least three of the five are 1.  On `load` it takes `pix_in` instead.  The
// neighbour inputs arrive through the redundant interconnect, so the element
// does not know whether it is a regular element or a spare standing in for
// one.  One step per clock; `load` has priority over `step`.  Reset is
// active-low and synchronous and clears the pixel.
//
// The voting function is the document's; the load port and its priority are
// this design's choice (the document does not say how pixels enter).
module maj_pe (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic pix_in,
  input  logic step,
  input  logic nbr_n,
  input  logic nbr_s,
  input  logic nbr_e,
  input  logic nbr_w,
  output logic pix
);
  logic [2:0] ones;

  always_comb ones = 3'(pix) + 3'(nbr_n) + 3'(nbr_s) + 3'(nbr_e) + 3'(nbr_w);

  always_ff @(posedge clk) begin
    if (!rst_n)     pix <= 1'b0;
    else if (load)  pix <= pix_in;
    else if (step)  pix <= (ones >= 3'd3);
  end
endmodule

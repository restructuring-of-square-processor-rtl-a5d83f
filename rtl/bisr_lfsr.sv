// bisr_lfsr: 32-bit maximal-length Galois LFSR used as the random source of
// the repair controllers.
//
// The neurons of the repair network are meant to switch asynchronously and in
// random order, and to back out of dead ends at random.  In this digital
// emulation that randomness comes from this generator: one new 32-bit word per
// enabled clock cycle, advanced STEPS shifts per cycle so that consecutive
// words do not share bits (STEPS = 1 is the plain LFSR).  Taps are x^32 + x^22 + x^2 + x + 1 (mask 0x80200003).
// The seed is a parameter; a zero seed is replaced by 1 so the register never
// locks up.  Reset is active-low and synchronous to clk.
module bisr_lfsr #(
  parameter logic [31:0] SEED  = 32'h1d87_2b41,
  parameter int unsigned STEPS = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] rnd
);
  localparam logic [31:0] TAPS = 32'h8020_0003;
  localparam logic [31:0] SEED_NZ = (SEED == 32'd0) ? 32'd1 : SEED;

  logic [31:0] nxt;

  always_comb begin
    nxt = rnd;
    for (int s = 0; s < int'(STEPS); s++) nxt = nxt[0] ? ((nxt >> 1) ^ TAPS) : (nxt >> 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)   rnd <= SEED_NZ;
    else if (en)  rnd <= nxt;
  end
endmodule

// bisr_top: the two built-in self-repair processor arrays side by side.
//
//   ds_* : 8 x 8 majority-vote image array with one spare row and one spare
//          column, repaired by Direct Substitution (each defective element is
//          replaced by a spare of its row or of its column, chosen by a
//          neural network that solves the defect/spare maximum matching).
//   ws_* : 8 x 8 logical array built from 9 x 9 physical elements, repaired by
//          Window Substitution (fault-free elements move inside 2 x 2 windows
//          to fill every logical position, chosen by a second neural
//          network).
//
// The two arrays are independent: each has its own fault-map input (the
// result of a fault diagnosis that is outside this design), its own repair
// start/status, and its own data ports; see bisr_ds_array and bisr_ws_array
// for the protocols.  Single clock, active-low synchronous reset.
module bisr_top
  import bisr_pkg::*;
#(
  parameter int unsigned M        = 8,
  parameter int unsigned N        = 8,
  parameter int unsigned P        = 2,
  parameter int unsigned Q        = 2,
  parameter int unsigned W        = 8,
  parameter int unsigned A        = 3,
  parameter int unsigned B        = 4,
  parameter int unsigned TIMEOUT  = 65536
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // Direct Substitution array
  input  logic [M:0][N:0]          ds_fault,
  input  logic                     ds_repair_start,
  input  logic [M:1][N:1]          ds_init_v,
  input  logic [M:1][N:1]          ds_init_h,
  output logic [M:1][N:1]          ds_sub_v,
  output logic [M:1][N:1]          ds_sub_h,
  output nn_state_e                ds_repair_state,
  output logic                     ds_repair_busy,
  output logic                     ds_repair_done,
  output logic                     ds_repair_fail,
  output logic [31:0]              ds_repair_cycles,
  input  logic                     ds_load,
  input  logic [M:1][N:1]          ds_pix_in,
  input  logic                     ds_step,
  output logic [M:1][N:1]          ds_pix_out,
  // Window Substitution array
  input  logic [M:0][N:0]          ws_fault,
  input  logic                     ws_repair_start,
  output logic [M:0][N:0][P*Q-1:0] ws_move,
  output nn_state_e                ws_repair_state,
  output logic                     ws_repair_busy,
  output logic                     ws_repair_done,
  output logic                     ws_repair_fail,
  output logic [31:0]              ws_repair_cycles,
  input  logic                     ws_shift,
  input  logic                     ws_step,
  input  logic [M-1:0][W-1:0]      ws_west_in,
  input  logic [N-1:0][W-1:0]      ws_north_in,
  output logic [M-1:0][W-1:0]      ws_east_out,
  output logic [N-1:0][W-1:0]      ws_south_out
);
  bisr_ds_array #(.M(M), .N(N), .A(A), .B(B), .TIMEOUT(TIMEOUT)) u_ds (
    .clk, .rst_n,
    .fault(ds_fault), .repair_start(ds_repair_start),
    .init_v(ds_init_v), .init_h(ds_init_h),
    .sub_v(ds_sub_v), .sub_h(ds_sub_h),
    .repair_state(ds_repair_state), .repair_busy(ds_repair_busy),
    .repair_done(ds_repair_done), .repair_fail(ds_repair_fail),
    .repair_cycles(ds_repair_cycles),
    .load(ds_load), .pix_in(ds_pix_in), .step(ds_step), .pix_out(ds_pix_out)
  );

  bisr_ws_array #(.M(M), .N(N), .P(P), .Q(Q), .W(W), .A(A), .B(B),
                  .TIMEOUT(TIMEOUT)) u_ws (
    .clk, .rst_n,
    .fault(ws_fault), .repair_start(ws_repair_start), .move(ws_move),
    .repair_state(ws_repair_state), .repair_busy(ws_repair_busy),
    .repair_done(ws_repair_done), .repair_fail(ws_repair_fail),
    .repair_cycles(ws_repair_cycles),
    .shift(ws_shift), .step(ws_step), .west_in(ws_west_in),
    .north_in(ws_north_in), .east_out(ws_east_out), .south_out(ws_south_out)
  );
endmodule

// bisr_ds_array: M x N majority-vote image processor array with one spare row
// and one spare column, repaired by Direct Substitution under the control of a
// built-in neural network.
//
// Elements: regular (1..M, 1..N), spares (i, 0) and (0, j); (0, 0) does not
// exist.  After fault diagnosis the fault map is applied and `repair_start`
// is pulsed.  The neural net (ds_neural_net) searches for an assignment of
// every defective element to a working spare of its row (horizontal) or of
// its column (vertical); once `repair_done` is high its neuron states program
// the switch fabric (ds_switch_fabric), which routes the inputs and outputs
// of each bypassed element to its spare.  `repair_fail` means the time-out
// expired: the pattern is treated as unrepairable.
//
// Image operation (only meaningful after repair_done): `load` writes pix_in,
// indexed by logical position (i, j), into the elements that hold those
// positions; each `step` replaces every pixel by the majority of itself and
// its four logical neighbours (pixels outside the array count as 0); pix_out
// is the logical image.  One step per clock cycle.
//
// Structure, bypass rule and repair network follow the document; the load
// port, edge value and controller details are this design's choices (see the
// submodules).
module bisr_ds_array
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
  input  logic [M:0][N:0] fault,
  input  logic            repair_start,
  input  logic [M:1][N:1] init_v,
  input  logic [M:1][N:1] init_h,
  output logic [M:1][N:1] sub_v,
  output logic [M:1][N:1] sub_h,
  output nn_state_e       repair_state,
  output logic            repair_busy,
  output logic            repair_done,
  output logic            repair_fail,
  output logic [31:0]     repair_cycles,
  input  logic            load,
  input  logic [M:1][N:1] pix_in,
  input  logic            step,
  output logic [M:1][N:1] pix_out
);
  logic [M:1][N:1] core_pix, core_n, core_s, core_e, core_w;
  logic [M:1]      scol_pix, scol_n, scol_s, scol_e, scol_w, scol_ld;
  logic [N:1]      srow_pix, srow_n, srow_s, srow_e, srow_w, srow_ld;

  ds_neural_net #(.M(M), .N(N), .A(A), .B(B), .TIMEOUT(TIMEOUT), .SEED(SEED)) u_nn (
    .clk, .rst_n, .start(repair_start), .fault, .init_v, .init_h,
    .sub_v, .sub_h, .state(repair_state), .busy(repair_busy), .done(repair_done),
    .fail(repair_fail), .cycles(repair_cycles)
  );

  ds_switch_fabric #(.M(M), .N(N)) u_fabric (
    .sub_v, .sub_h, .core_pix, .scol_pix, .srow_pix, .pix_in,
    .log_pix(pix_out),
    .core_n, .core_s, .core_e, .core_w,
    .scol_n, .scol_s, .scol_e, .scol_w, .scol_ld,
    .srow_n, .srow_s, .srow_e, .srow_w, .srow_ld
  );

  for (genvar i = 1; i <= int'(M); i++) begin : g_row
    for (genvar j = 1; j <= int'(N); j++) begin : g_col
      maj_pe u_pe (
        .clk, .rst_n, .load, .pix_in(pix_in[i][j]), .step,
        .nbr_n(core_n[i][j]), .nbr_s(core_s[i][j]),
        .nbr_e(core_e[i][j]), .nbr_w(core_w[i][j]),
        .pix(core_pix[i][j])
      );
    end
  end

  for (genvar i = 1; i <= int'(M); i++) begin : g_scol
    maj_pe u_pe (
      .clk, .rst_n, .load, .pix_in(scol_ld[i]), .step,
      .nbr_n(scol_n[i]), .nbr_s(scol_s[i]), .nbr_e(scol_e[i]), .nbr_w(scol_w[i]),
      .pix(scol_pix[i])
    );
  end

  for (genvar j = 1; j <= int'(N); j++) begin : g_srow
    maj_pe u_pe (
      .clk, .rst_n, .load, .pix_in(srow_ld[j]), .step,
      .nbr_n(srow_n[j]), .nbr_s(srow_s[j]), .nbr_e(srow_e[j]), .nbr_w(srow_w[j]),
      .pix(srow_pix[j])
    );
  end
endmodule

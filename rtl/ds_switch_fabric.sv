// ds_switch_fabric: redundant interconnect of the Direct Substitution array.
//
// Physical elements are indexed (i, j) with 0 <= i <= M, 0 <= j <= N.  The
// regular elements are (1..M, 1..N); the spares are column 0, (i, 0), and
// row 0, (0, j).  A faulty element (i, j) is bypassed horizontally by
// identifying each of its inputs and outputs with those of spare (i, 0), or
// vertically with those of spare (0, j).  The choice comes from the repair
// network: sub_h[i][j] / sub_v[i][j] (at most one element per row uses the
// row's spare, at most one per column the column's spare).
//
// This module is the functional equivalent of the per-element switch boxes:
//   * log_pix[i][j] : value seen at logical position (i, j): the regular
//     element's output, or the output of the spare that stands in for it;
//   * each regular element receives the values of its four logical
//     neighbours and the load pixel of its own position;
//   * each spare receives the neighbours and the load pixel of the position
//     it serves (all zero when it serves none).
// Neighbours beyond the array edge read as 0.  Purely combinational; the
// element outputs are registers, so there is no loop through the fabric.
//
// The bypass rule is the document's.  Building it as multiplexers instead of
// transmission-gate switch boxes, and the zero edge value, are choices of
// this design.
module ds_switch_fabric #(
  parameter int unsigned M = 8,
  parameter int unsigned N = 8
) (
  input  logic [M:1][N:1] sub_v,        // (i,j) replaced by spare (0,j)
  input  logic [M:1][N:1] sub_h,        // (i,j) replaced by spare (i,0)
  input  logic [M:1][N:1] core_pix,     // outputs of regular elements
  input  logic [M:1]      scol_pix,     // outputs of spares (i,0)
  input  logic [N:1]      srow_pix,     // outputs of spares (0,j)
  input  logic [M:1][N:1] pix_in,       // load data per logical position
  output logic [M:1][N:1] log_pix,      // logical image
  output logic [M:1][N:1] core_n, core_s, core_e, core_w,
  output logic [M:1]      scol_n, scol_s, scol_e, scol_w, scol_ld,
  output logic [N:1]      srow_n, srow_s, srow_e, srow_w, srow_ld
);
  logic [M:1][N:1] ln, ls, le, lw;  // logical neighbours of each position

  always_comb begin
    for (int i = 1; i <= int'(M); i++) begin
      for (int j = 1; j <= int'(N); j++) begin
        if (sub_h[i][j])      log_pix[i][j] = scol_pix[i];
        else if (sub_v[i][j]) log_pix[i][j] = srow_pix[j];
        else                  log_pix[i][j] = core_pix[i][j];
      end
    end
  end

  always_comb begin
    for (int i = 1; i <= int'(M); i++) begin
      for (int j = 1; j <= int'(N); j++) begin
        ln[i][j] = (i > 1)        ? log_pix[i-1][j] : 1'b0;
        ls[i][j] = (i < int'(M))  ? log_pix[i+1][j] : 1'b0;
        lw[i][j] = (j > 1)        ? log_pix[i][j-1] : 1'b0;
        le[i][j] = (j < int'(N))  ? log_pix[i][j+1] : 1'b0;
      end
    end
    core_n = ln;
    core_s = ls;
    core_e = le;
    core_w = lw;
  end

  // Spare (i,0) serves the one position of row i with sub_h set.
  always_comb begin
    for (int i = 1; i <= int'(M); i++) begin
      scol_n[i] = 1'b0; scol_s[i] = 1'b0; scol_e[i] = 1'b0; scol_w[i] = 1'b0;
      scol_ld[i] = 1'b0;
      for (int j = 1; j <= int'(N); j++) begin
        if (sub_h[i][j]) begin
          scol_n[i]  |= ln[i][j];
          scol_s[i]  |= ls[i][j];
          scol_e[i]  |= le[i][j];
          scol_w[i]  |= lw[i][j];
          scol_ld[i] |= pix_in[i][j];
        end
      end
    end
  end

  // Spare (0,j) serves the one position of column j with sub_v set (and
  // sub_h clear, matching the output selection above).
  always_comb begin
    for (int j = 1; j <= int'(N); j++) begin
      srow_n[j] = 1'b0; srow_s[j] = 1'b0; srow_e[j] = 1'b0; srow_w[j] = 1'b0;
      srow_ld[j] = 1'b0;
      for (int i = 1; i <= int'(M); i++) begin
        if (sub_v[i][j] && !sub_h[i][j]) begin
          srow_n[j]  |= ln[i][j];
          srow_s[j]  |= ls[i][j];
          srow_e[j]  |= le[i][j];
          srow_w[j]  |= lw[i][j];
          srow_ld[j] |= pix_in[i][j];
        end
      end
    end
  end
endmodule

// qlut: two-input quaternary lookup table (16 quaternary configuration digits).
//
// The table holds C0..C15 and returns C[4*y1 + y0]. As in a binary LUT it is
// a tree of multiplexers, but each multiplexer has four data inputs, so two
// stages suffice: four qmux4 in the first stage, steered by the DLCs of y0,
// pick one digit out of each group C0..C3, C4..C7, C8..C11, C12..C15; one
// qmux4 in the second stage, steered by the DLCs of y1, picks among those
// four. Such a table can hold any of the 4^16 two-input quaternary functions,
// the same as two 4-input binary LUTs (one per bit of the output digit) fed
// by the four bits of y0 and y1.
//
// Structure and group order follow the document's two-input QLUT figure.
// The configuration is a plain input port: how it is loaded into the fabric
// is outside this block. Purely combinational.
module qlut
  import qfpga_pkg::*;
(
  input  qlut_cfg_t cfg,
  input  qdigit_t   y0,
  input  qdigit_t   y1,
  output qdigit_t   w
);

  qdigit_t y0_d1, y0_d2, y0_d3;
  qdigit_t y1_d1, y1_d2, y1_d3;
  qdigit_t [3:0] stage1;

  dlc u_dlc_y0 (.in(y0), .d1(y0_d1), .d2(y0_d2), .d3(y0_d3));
  dlc u_dlc_y1 (.in(y1), .d1(y1_d1), .d2(y1_d2), .d3(y1_d3));

  for (genvar g = 0; g < 4; g++) begin : g_stage1
    qmux4 u_mux (
      .din  (cfg[4*g +: 4]),
      .d1   (y0_d1),
      .d2   (y0_d2),
      .d3   (y0_d3),
      .dout (stage1[g])
    );
  end

  qmux4 u_mux_out (
    .din  (stage1),
    .d1   (y1_d1),
    .d2   (y1_d2),
    .d3   (y1_d3),
    .dout (w)
  );

endmodule

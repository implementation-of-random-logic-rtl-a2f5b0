// qclb_column: a column of quaternary logic blocks with a chained carry.
//
// DIGITS blocks are stacked; block i takes digit i of a and b and the carry
// out of block i-1 (block 0 takes cin), and all share one QLUT
// configuration. Loaded with qfpga_pkg::ADD_CFG the column is a
// DIGITS-digit quaternary ripple-carry adder: sum = (a + b + cin) mod
// 4^DIGITS and cout is the carry out of the top digit. Operators are placed
// in columns like this one so that the carry runs along the dedicated
// Cout -> Cin chain; that placement is the document's, the shared
// configuration port and the width parameter are this design's.
//
// sum and cout are combinational (the carry ripples through every QCP);
// sumq is sum registered in the blocks' flip-flops, one clock later.
module qclb_column
  import qfpga_pkg::*;
#(
  parameter int unsigned DIGITS = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  qlut_cfg_t              cfg,
  input  qdigit_t [DIGITS-1:0]   a,
  input  qdigit_t [DIGITS-1:0]   b,
  input  logic                   cin,
  output qdigit_t [DIGITS-1:0]   sum,
  output qdigit_t [DIGITS-1:0]   sumq,
  output logic                   cout
);

  logic [DIGITS:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    qdigit_t s_unused;
    qclb u_clb (
      .clk   (clk),
      .rst_n (rst_n),
      .cfg   (cfg),
      .x     (a[i]),
      .y     (b[i]),
      .cin   (carry[i]),
      .s     (s_unused),
      .sum   (sum[i]),
      .sumq  (sumq[i]),
      .cout  (carry[i+1])
    );
  end

  assign cout = carry[DIGITS];

endmodule

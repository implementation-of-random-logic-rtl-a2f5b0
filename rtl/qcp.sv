// qcp: quaternary carry propagation (QCP) logic of the logic block.
//
// Computes the carry out of one quaternary adder digit from the operand
// digits X, Y, the QLUT output S and the carry in, without waiting for the
// sum. It has two halves:
//
//   propagation  DLC 3 on S gives S3, which is '0' only when S = 3. With the
//                addition configuration S = 3 means X + Y = 3, the one case
//                where the carry out equals the carry in, so S3 = 0 steers
//                Cin to Cout.
//   generation   otherwise Cout is a constant, 1 when X + Y >= 4 and 0 when
//                not. Two conditions make it 1: K1, X = 3 or Y = 3 (given
//                S != 3 the other digit is then at least 1), and K2, X >= 2
//                and Y >= 2 (this covers 2 + 2). Z, their combination,
//                selects the constant '1' or '0'.
//
// The split into propagation and generation, S3 from DLC 3 and the K1
// condition follow the document. Its text states K2 as X > 2 and Y > 2, which
// would leave 2 + 2 with no carry and contradict its own truth table; this
// RTL follows the truth table (X >= 2 and Y >= 2). K1 and K2 are written as
// active-high conditions, not as particular quaternary gates. Carries are
// single bits (levels 0 and 1). Purely combinational.
module qcp
  import qfpga_pkg::*;
(
  input  qdigit_t x,
  input  qdigit_t y,
  input  qdigit_t s,
  input  logic    cin,
  output logic    cout
);

  qdigit_t s_d1, s_d2, s3;
  logic    k1, k2, z;

  // Only DLC 3 of S is used; the other two outputs are left unconnected.
  dlc u_dlc_s (.in(s), .d1(s_d1), .d2(s_d2), .d3(s3));

  assign k1 = (x == Q3) || (y == Q3);
  assign k2 = (x >= 2'd2) && (y >= 2'd2);
  assign z  = k1 || k2;

  assign cout = (s3 == Q0) ? cin : z;

endmodule

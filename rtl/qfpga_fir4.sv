// qfpga_fir4: four-tap FIR filter mapped onto quaternary logic blocks.
//
//   y(n) = 117 x(n) + 100 x(n-1) + 13 x(n-2) + 36 x(n-3)
//
// The filter is the demonstrator for the arithmetic-oriented quaternary
// logic block. It is built in transposed direct form: the input is
// multiplied by all four constants at once (a multiple constant
// multiplication, MCM), and the products enter a chain of adders separated
// by one-cycle delays:
//
//   y(n) = 117x + z^-1( 100x + z^-1( 13x + z^-1( 36x ) ) )
//
// The MCM uses only shifts and additions, with the term 3x computed once and
// shared by the other constants:
//
//   3x   = (x << 1) + x
//   13x  = (3x << 2) + x
//   117x = (13x << 3) + 13x
//   100x = (3x << 5) + (x << 2)
//   36x  = (3x << 3) + (3x << 2)
//
// Every addition is a qclb_column loaded with the addition configuration,
// Y_DIGITS digits wide; every z^-1 is the flip-flop row (sumq) of the column
// whose sum it delays, so the 36x column's own registers hold z^-1(36x).
// Eight columns in all: five for the MCM and three for the tap chain.
//
// Which constant belongs to which tap, the transposed form, the sharing of
// 3x and the use of adders and shifts only follow the document; the rest of
// the adder graph, the input width, unsigned data, one common width for all
// adders and the combinational output are this design's choices. A shift is
// taken on the binary reading of the digit vector (two bits per digit): a
// shift by an even amount moves whole digits, a shift by an odd amount
// regroups the bits of neighbouring digits.
//
// Interface: x is an unsigned X_DIGITS-digit word, sampled at the rising
// edge of clk into the delay line; y is combinational from x(n) and the
// registered partial sums, valid in the same cycle. Y_DIGITS = X_DIGITS + 5
// holds the largest output, 266 (4^X_DIGITS - 1), exactly. rst_n clears the
// delay line asynchronously.
module qfpga_fir4
  import qfpga_pkg::*;
#(
  parameter int unsigned X_DIGITS = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  qdigit_t [X_DIGITS-1:0]         x,
  output qdigit_t [X_DIGITS+5-1:0]       y
);

  localparam int unsigned Y_DIGITS = X_DIGITS + 5;
  localparam int unsigned W        = 2 * Y_DIGITS;

  typedef logic [W-1:0] word_t;

  word_t xw;
  word_t p3, p13, p117, p100, p36_unreg;
  word_t r36, r2, r1;
  word_t y_w;

  // Registered outputs of the MCM columns other than 36x, the unregistered
  // sums of the two inner tap columns and the last column's registered sum
  // are not part of the filter.
  word_t p3_q, p13_q, p117_q, p100_q, y_q, s2_unreg, s1_unreg;
  logic  [7:0] cout_unused;

  assign xw = word_t'(x);

  qclb_column #(.DIGITS(Y_DIGITS)) u_add3 (
    .clk, .rst_n, .cfg(ADD_CFG),
    .a(xw << 1), .b(xw), .cin(1'b0),
    .sum(p3), .sumq(p3_q), .cout(cout_unused[0])
  );

  qclb_column #(.DIGITS(Y_DIGITS)) u_add13 (
    .clk, .rst_n, .cfg(ADD_CFG),
    .a(p3 << 2), .b(xw), .cin(1'b0),
    .sum(p13), .sumq(p13_q), .cout(cout_unused[1])
  );

  qclb_column #(.DIGITS(Y_DIGITS)) u_add117 (
    .clk, .rst_n, .cfg(ADD_CFG),
    .a(p13 << 3), .b(p13), .cin(1'b0),
    .sum(p117), .sumq(p117_q), .cout(cout_unused[2])
  );

  qclb_column #(.DIGITS(Y_DIGITS)) u_add100 (
    .clk, .rst_n, .cfg(ADD_CFG),
    .a(p3 << 5), .b(xw << 2), .cin(1'b0),
    .sum(p100), .sumq(p100_q), .cout(cout_unused[3])
  );

  qclb_column #(.DIGITS(Y_DIGITS)) u_add36 (
    .clk, .rst_n, .cfg(ADD_CFG),
    .a(p3 << 3), .b(p3 << 2), .cin(1'b0),
    .sum(p36_unreg), .sumq(r36), .cout(cout_unused[4])
  );

  // Tap chain: 13x + z^-1(36x), then 100x + z^-1(...), then 117x + z^-1(...).
  qclb_column #(.DIGITS(Y_DIGITS)) u_tap2 (
    .clk, .rst_n, .cfg(ADD_CFG),
    .a(r36), .b(p13), .cin(1'b0),
    .sum(s2_unreg), .sumq(r2), .cout(cout_unused[5])
  );

  qclb_column #(.DIGITS(Y_DIGITS)) u_tap1 (
    .clk, .rst_n, .cfg(ADD_CFG),
    .a(r2), .b(p100), .cin(1'b0),
    .sum(s1_unreg), .sumq(r1), .cout(cout_unused[6])
  );

  qclb_column #(.DIGITS(Y_DIGITS)) u_tap0 (
    .clk, .rst_n, .cfg(ADD_CFG),
    .a(r1), .b(p117), .cin(1'b0),
    .sum(y_w), .sumq(y_q), .cout(cout_unused[7])
  );

  assign y = y_w;

endmodule

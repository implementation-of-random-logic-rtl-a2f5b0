// qclb: arithmetic-oriented quaternary logic block.
//
// One block computes one quaternary digit:
//   S    = QLUT(X, Y)                 any two-input quaternary function
//   Cout = QCP(X, Y, S, Cin)          S = 3 propagates Cin, else X+Y >= 4
//   Sum  = Cin ? (S + 1) mod 4 : S    the carry-in correction
//   SumQ = Sum delayed by one clock   the block's flip-flop
// The correction is built as in the document's logic-block figure: a qmux4
// whose data inputs are the constants '1','2','3','0' (at indices 0..3),
// steered by the DLCs of S, gives S + 1 mod 4, and a two-input multiplexer
// controlled by Cin chooses between it and S. With the addition
// configuration (qfpga_pkg::ADD_CFG) the block is a full-adder digit; with
// Cin tied to 0 it is a lookup table for random logic whose output is S.
//
// X drives the first QLUT stage (y0) and Y the second (y1), so
// configuration entry 4*Y+X holds f(X, Y); this assignment is a choice, the
// document does not name which input feeds which stage. Sum, S and Cout are
// combinational; SumQ changes on the rising edge of clk.
module qclb
  import qfpga_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  qlut_cfg_t cfg,
  input  qdigit_t   x,
  input  qdigit_t   y,
  input  logic      cin,
  output qdigit_t   s,
  output qdigit_t   sum,
  output qdigit_t   sumq,
  output logic      cout
);

  localparam qdigit_t [3:0] INC_TABLE = '{2'd0, 2'd3, 2'd2, 2'd1};  // [3]..[0]

  qdigit_t s_d1, s_d2, s_d3;
  qdigit_t s_inc;

  qlut u_qlut (.cfg(cfg), .y0(x), .y1(y), .w(s));

  qcp u_qcp (.x(x), .y(y), .s(s), .cin(cin), .cout(cout));

  dlc u_dlc_s (.in(s), .d1(s_d1), .d2(s_d2), .d3(s_d3));

  qmux4 u_inc (.din(INC_TABLE), .d1(s_d1), .d2(s_d2), .d3(s_d3), .dout(s_inc));

  assign sum = cin ? s_inc : s;

  qdff u_ff (.clk(clk), .rst_n(rst_n), .d(sum), .q(sumq));

endmodule

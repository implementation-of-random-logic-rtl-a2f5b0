// dlc: the three down literal circuits (DLC 1, 2, 3) of one quaternary input.
//
// Each DLC is an inverter-like stage whose switching threshold sits between
// two adjacent logic levels; together they turn a quaternary digit into a
// thermometer code. DLC k drives '3' (VDD) while the input is below k and '0'
// (GND) otherwise:
//
//   in | d1 d2 d3
//    0 |  3  3  3
//    1 |  0  3  3
//    2 |  0  0  3
//    3 |  0  0  0
//
// The table is the document's. The thresholds are a transistor-level
// property; here the circuit is reduced to its logic function, purely
// combinational. Outputs only take the codes 0 and 3.
module dlc
  import qfpga_pkg::*;
(
  input  qdigit_t in,
  output qdigit_t d1,
  output qdigit_t d2,
  output qdigit_t d3
);

  assign d1 = (in < 2'd1) ? Q3 : Q0;
  assign d2 = (in < 2'd2) ? Q3 : Q0;
  assign d3 = (in < 2'd3) ? Q3 : Q0;

endmodule

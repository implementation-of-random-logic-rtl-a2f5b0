// qmux4: four-input quaternary multiplexer steered by a DLC thermometer code.
//
// This is one multiplexer of a quaternary lookup table. Its select digit is
// not decoded in binary; instead the three DLC outputs of that digit (d1, d2,
// d3, each '3' or '0') and their inverses gate pass transistors. A data input
// reaches the output when the thermometer code says the select digit equals
// its index: input 0 when d1 is '3'; input 1 when d1 is '0' and d2 is '3';
// input 2 when d2 is '0' and d3 is '3'; input 3 when d3 is '0'. The pass-gate
// structure follows the document; this ordering of the gating is this
// design's reading of it. Purely combinational. An assertion checks that
// the steering inputs form a valid thermometer code (each line 0 or 3, and
// a lower DLC never above a higher one), the only codes DLCs can produce.
module qmux4
  import qfpga_pkg::*;
(
  input  qdigit_t [3:0] din,
  input  qdigit_t       d1,
  input  qdigit_t       d2,
  input  qdigit_t       d3,
  output qdigit_t       dout
);

  logic t1, t2, t3;  // thermometer bits: select digit is below 1, 2, 3

  assign t1 = (d1 == Q3);
  assign t2 = (d2 == Q3);
  assign t3 = (d3 == Q3);

  always_comb begin
    assert ((d1 == Q0 || d1 == Q3) && (d2 == Q0 || d2 == Q3) && (d3 == Q0 || d3 == Q3)
            && (!t1 || t2) && (!t2 || t3))
      else $error("qmux4: select lines %0d %0d %0d are not a DLC thermometer code", d1, d2, d3);
  end

  always_comb begin
    if (t1)      dout = din[0];
    else if (t2) dout = din[1];
    else if (t3) dout = din[2];
    else         dout = din[3];
  end

endmodule

// qfpga_pkg: types and constants shared by the quaternary logic-block RTL.
//
// A quaternary wire carries one of four logic levels, 0..3 (GND to VDD in
// the voltage-mode circuits). In this RTL each such wire is a two-bit
// unsigned code equal to its logic value (qdigit_t); the analog levels are
// not modelled. A word of N quaternary digits is a qword of N qdigit_t,
// digit 0 least significant, so its packed bits read as the same number in
// binary. The carry between logic blocks only ever takes the levels 0 and 1
// and is therefore a single bit here (this encoding is a design choice).
//
// ADD_CFG is the QLUT configuration that makes a logic block a quaternary
// full-adder digit: entry 4*Y+X holds (X+Y) mod 4 (the S column of the
// addition table of the logic block).
package qfpga_pkg;

  typedef logic [1:0] qdigit_t;

  localparam qdigit_t Q0 = 2'd0;
  localparam qdigit_t Q3 = 2'd3;

  // 16 configuration digits of a two-input QLUT, C0..C15.
  typedef qdigit_t [15:0] qlut_cfg_t;

  function automatic qlut_cfg_t add_cfg();
    qlut_cfg_t c;
    for (int yv = 0; yv < 4; yv++)
      for (int xv = 0; xv < 4; xv++)
        c[4*yv + xv] = qdigit_t'((xv + yv) % 4);
    return c;
  endfunction

  localparam qlut_cfg_t ADD_CFG = add_cfg();

endpackage

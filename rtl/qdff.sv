// qdff: D flip-flop holding one quaternary digit.
//
// The register of the logic block (output SumQ). In the circuit it is built
// from quaternary inverters and stores a four-level value; here it stores
// the two-bit code of that value on the rising clock edge. The asynchronous
// active-low reset to 0 is this design's choice: the document gives the
// flip-flop no reset. One cycle from d to q.
module qdff
  import qfpga_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  qdigit_t d,
  output qdigit_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= Q0;
    else        q <= d;
  end

endmodule

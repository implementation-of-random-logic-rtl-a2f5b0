// tb_dlc: exhaustive check of the three down literal circuits against the
// DLC truth table (output k is 3 while the input is below k, else 0).
module tb_dlc;
  import qfpga_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  qdigit_t in, d1, d2, d3;
  dlc dut (.in(in), .d1(d1), .d2(d2), .d3(d3));

  // Expected outputs, row = input value, written out from the table.
  localparam logic [5:0] EXP [4] = '{6'b11_11_11, 6'b00_11_11, 6'b00_00_11, 6'b00_00_00};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      in = qdigit_t'(v);
      @(posedge clk);
      checks++;
      if ({d1, d2, d3} !== EXP[v]) begin
        failures++;
        $display("FAIL in=%0d d1=%0d d2=%0d d3=%0d", v, d1, d2, d3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

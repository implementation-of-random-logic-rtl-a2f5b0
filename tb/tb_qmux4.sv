// tb_qmux4: drives the quaternary multiplexer with thermometer codes built
// here for every select value and random data, and checks that the data
// input whose index equals the select value reaches the output.
module tb_qmux4;
  import qfpga_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  qdigit_t [3:0] din;
  qdigit_t d1, d2, d3, dout;
  qmux4 dut (.din(din), .d1(d1), .d2(d2), .d3(d3), .dout(dout));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      int sel;
      sel = n % 4;
      for (int i = 0; i < 4; i++) din[i] = qdigit_t'($urandom_range(3));
      d1 = (sel < 1) ? 2'd3 : 2'd0;
      d2 = (sel < 2) ? 2'd3 : 2'd0;
      d3 = (sel < 3) ? 2'd3 : 2'd0;
      @(posedge clk);
      checks++;
      if (dout !== din[sel]) begin
        failures++;
        $display("FAIL sel=%0d din=%h dout=%0d", sel, din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_qlut: loads random and fixed configurations into the two-input
// quaternary LUT and checks every input pair. The expected digit is built
// bit by bit from two 4-input binary functions f0 and f1 (the low and high
// bits of the configuration digits, addressed by the four input bits), the
// binary view of a quaternary function.
module tb_qlut;
  import qfpga_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  qlut_cfg_t cfg;
  qdigit_t   y0, y1, w;
  qlut dut (.cfg(cfg), .y0(y0), .y1(y1), .w(w));

  logic [15:0] f0, f1;  // binary truth tables, address {y1, y0}

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 60; n++) begin
      case (n)
        0:       begin f0 = 16'h0000; f1 = 16'hFFFF; end
        1:       begin f0 = 16'hA5A5; f1 = 16'h0F0F; end
        default: begin f0 = 16'($urandom); f1 = 16'($urandom); end
      endcase
      for (int i = 0; i < 16; i++) cfg[i] = {f1[i], f0[i]};
      for (int a = 0; a < 16; a++) begin
        {y1, y0} = 4'(a);
        @(posedge clk);
        checks++;
        if (w !== {f1[a], f0[a]}) begin
          failures++;
          $display("FAIL cfg=%h y1=%0d y0=%0d w=%0d", cfg, y1, y0, w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

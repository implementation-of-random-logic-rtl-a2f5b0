// tb_qdff: random digits through the quaternary flip-flop; q must equal the
// digit applied before the previous rising edge, and reset must clear it.
module tb_qdff;
  import qfpga_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst_n;
  qdigit_t d, q, prev;
  qdff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0; d = 2'd3;
    #2;
    checks++;
    if (q !== 2'd0) begin failures++; $display("FAIL reset q=%0d", q); end
    @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      d = qdigit_t'($urandom_range(3));
      prev = d;
      @(posedge clk); #1;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL n=%0d q=%0d exp=%0d", n, q, prev); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

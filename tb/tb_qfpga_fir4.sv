// tb_qfpga_fir4: end-to-end test of the four-tap quaternary FIR filter at
// its default size. A reference model keeps the last four inputs and
// computes y(n) = 117x(n) + 100x(n-1) + 13x(n-2) + 36x(n-3) in plain
// integers. The stimulus is an impulse (the four coefficients must appear
// one per cycle, showing each one-cycle delay), a run of maximal inputs and
// random inputs. The test also counts, from the operands of the shared 3x
// adder (2x + x), how often a digit propagated an incoming carry (digit sum
// 3 with carry in) and how often one generated a carry (digit sum >= 4);
// either count being zero is a failure. A reset in the middle of a run must
// clear the delay line.
module tb_qfpga_fir4;
  import qfpga_pkg::*;

  localparam int unsigned XD = 4;        // default X_DIGITS of the filter
  localparam int unsigned YD = XD + 5;
  localparam int unsigned XMAX = (1 << (2 * XD)) - 1;

  int checks = 0, failures = 0;
  int n_prop = 0, n_gen = 0, n_delay = 0, n_reset = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  qdigit_t [XD-1:0] x;
  qdigit_t [YD-1:0] y;

  qfpga_fir4 dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y));

  int unsigned hist [3];   // x(n-1), x(n-2), x(n-3)

  // Carry events in the digit-serial addition 2x + x.
  task automatic count_carries(input int unsigned xv);
    int unsigned a2, c;
    a2 = xv << 1;
    c = 0;
    for (int d = 0; d < int'(YD); d++) begin
      int unsigned t;
      t = ((a2 >> (2*d)) & 3) + ((xv >> (2*d)) & 3);
      if (t == 3 && c == 1) n_prop++;
      if (t >= 4) n_gen++;
      c = (t + c >= 4) ? 1 : 0;
    end
  endtask

  task automatic step(input int unsigned xv);
    int unsigned exp_y;
    x = (2*XD)'(xv);
    exp_y = 117*xv + 100*hist[0] + 13*hist[1] + 36*hist[2];
    #4;
    checks++;
    if (y !== (2*YD)'(exp_y)) begin
      failures++;
      $display("FAIL x=%0d hist=%0d,%0d,%0d y=%0d exp=%0d", xv, hist[0], hist[1], hist[2], y, exp_y);
    end
    if (xv == 0 && exp_y != 0) n_delay++;
    count_carries(xv);
    @(posedge clk);
    hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = xv;
    @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned imp [4];
    rst_n = 1'b1; #1 rst_n = 1'b0;
    x = '0;
    hist = '{0, 0, 0};
    @(negedge clk);
    rst_n = 1'b1;

    // Impulse response: 117, 100, 13, 36, then 0.
    imp = '{117, 100, 13, 36};
    x = (2*XD)'(1);
    for (int k = 0; k < 5; k++) begin
      #4;
      checks++;
      if (y !== (2*YD)'((k < 4) ? imp[k] : 0)) begin
        failures++;
        $display("FAIL impulse k=%0d y=%0d", k, y);
      end
      @(posedge clk); @(negedge clk);
      x = '0;
    end
    hist = '{0, 0, 0};

    // Largest inputs: output reaches 266 * XMAX.
    repeat (6) step(XMAX);
    for (int n = 0; n < 2000; n++) begin
      step($urandom_range(XMAX));
      if (n % 5 == 0) step(0);
    end

    // Reset in the middle of a run.
    step(XMAX); step(XMAX);
    x = '0;  // holds the cleared delay line at zero until the next step
    rst_n = 1'b0;
    #1;
    rst_n = 1'b1;
    hist = '{0, 0, 0};
    n_reset++;
    @(negedge clk);
    step(7);
    step(0);

    if (n_prop == 0)  begin failures++; $display("FAIL no carry propagation seen"); end
    if (n_gen == 0)   begin failures++; $display("FAIL no carry generation seen"); end
    if (n_delay == 0) begin failures++; $display("FAIL delayed taps never seen"); end
    $display("carry propagations %0d, generations %0d, delayed-only outputs %0d, resets %0d",
             n_prop, n_gen, n_delay, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_qclb: checks one quaternary logic block.
//  1. Addition configuration (built here as (X+Y) mod 4): for every X, Y,
//     Cin, Sum = (X+Y+Cin) mod 4, Cout = (X+Y+Cin >= 4), S = (X+Y) mod 4,
//     and SumQ equals Sum one clock later.
//  2. Random configurations (random logic): S = C[4*Y+X], Sum = S + Cin
//     mod 4, Cout = S3-propagate or X/Y generate condition.
//  3. Reset clears SumQ.
module tb_qclb;
  import qfpga_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst_n, cin, cout;
  qlut_cfg_t cfg;
  qdigit_t   x, y, s, sum, sumq;
  qdigit_t   exp_sum;

  qclb dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .x(x), .y(y), .cin(cin),
            .s(s), .sum(sum), .sumq(sumq), .cout(cout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cfg=%h x=%0d y=%0d cin=%0d s=%0d sum=%0d sumq=%0d cout=%0d",
               what, cfg, x, y, cin, s, sum, sumq, cout);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1; #1 rst_n = 1'b0; cin = 1'b1; x = 2'd3; y = 2'd3;
    for (int i = 0; i < 16; i++) cfg[i] = qdigit_t'(((i % 4) + (i / 4)) % 4);
    #2;
    check(sumq == 2'd0, "reset");
    @(negedge clk); rst_n = 1'b1;

    for (int i = 0; i < 32; i++) begin
      int xv, yv, t;
      xv = (i >> 3) & 3; yv = (i >> 1) & 3;
      x = qdigit_t'(xv); y = qdigit_t'(yv); cin = i[0];
      t = xv + yv + int'(cin);
      #1;
      check(s == qdigit_t'((xv + yv) % 4), "add S");
      check(sum == qdigit_t'(t % 4), "add sum");
      check(cout == (t >= 4), "add cout");
      exp_sum = qdigit_t'(t % 4);
      @(posedge clk); #1;
      check(sumq == exp_sum, "add sumq");
      @(negedge clk);
    end

    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < 16; i++) cfg[i] = qdigit_t'($urandom_range(3));
      for (int i = 0; i < 32; i++) begin
        logic gen;
        x = qdigit_t'(i[4:3]); y = qdigit_t'(i[2:1]); cin = i[0];
        #1;
        gen = (x == 2'd3) || (y == 2'd3) || (x >= 2'd2 && y >= 2'd2);
        check(s == cfg[4*y + x], "lut S");
        check(sum == qdigit_t'(cfg[4*y + x] + qdigit_t'(cin)), "lut sum");
        check(cout == ((cfg[4*y + x] == 2'd3) ? cin : gen), "lut cout");
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

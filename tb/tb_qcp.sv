// tb_qcp: checks the quaternary carry logic against the carry column of the
// addition table for all X, Y and Cin (with S = X + Y mod 4), and for
// arbitrary S: S = 3 must pass Cin, any other S must give the generate
// condition X = 3 or Y = 3 or (X >= 2 and Y >= 2).
module tb_qcp;
  import qfpga_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  qdigit_t x, y, s;
  logic    cin, cout;
  qcp dut (.x(x), .y(y), .s(s), .cin(cin), .cout(cout));

  // Carry column of the addition table, index 4*X+Y: 0, 1, or 2 = "Cin".
  localparam int COUT_TAB [16] = '{0,0,0,2, 0,0,2,1, 0,2,1,1, 2,1,1,1};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int xv, yv, exp_c;
      xv = (i >> 3) & 3; yv = (i >> 1) & 3;
      x = qdigit_t'(xv); y = qdigit_t'(yv); cin = i[0];
      s = qdigit_t'((xv + yv) % 4);
      exp_c = (COUT_TAB[4*xv + yv] == 2) ? int'(cin) : COUT_TAB[4*xv + yv];
      @(posedge clk);
      checks++;
      if (cout !== 1'(exp_c)) begin
        failures++;
        $display("FAIL table x=%0d y=%0d cin=%0d cout=%0d", xv, yv, cin, cout);
      end
    end
    for (int i = 0; i < 128; i++) begin
      logic gen, exp_c;
      x = qdigit_t'(i[6:5]); y = qdigit_t'(i[4:3]); s = qdigit_t'(i[2:1]); cin = i[0];
      gen   = (x == 2'd3) || (y == 2'd3) || (x >= 2'd2 && y >= 2'd2);
      exp_c = (s == 2'd3) ? cin : gen;
      @(posedge clk);
      checks++;
      if (cout !== exp_c) begin
        failures++;
        $display("FAIL any-s x=%0d y=%0d s=%0d cin=%0d cout=%0d", x, y, s, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

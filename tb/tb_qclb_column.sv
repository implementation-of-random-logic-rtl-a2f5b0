// tb_qclb_column: a column of DIGITS logic blocks loaded with the addition
// configuration must add two DIGITS-digit quaternary words: sum and cout
// combinationally, sumq one clock later. Random operands plus directed
// cases for a carry that ripples through every digit (all digits summing
// to 3 with Cin = 1) and for a carry generated in every digit.
module tb_qclb_column;
  import qfpga_pkg::*;

  localparam int unsigned D = 9;
  localparam int unsigned W = 2 * D;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, cin, cout;
  qdigit_t [D-1:0] a, b, sum, sumq;
  logic [W:0] total;
  logic [W-1:0] prev;
  qlut_cfg_t add_tab;

  qclb_column #(.DIGITS(D)) dut (
    .clk(clk), .rst_n(rst_n), .cfg(add_tab), .a(a), .b(b), .cin(cin),
    .sum(sum), .sumq(sumq), .cout(cout));

  task automatic apply(input logic [W-1:0] av, input logic [W-1:0] bv, input logic c);
    a = av; b = bv; cin = c;
    total = (W+1)'(av) + (W+1)'(bv) + (W+1)'(c);
    #1;
    checks++;
    if ({cout, sum} !== total) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d got %0d:%h exp %h", av, bv, c, cout, sum, total);
    end
    prev = total[W-1:0];
    @(posedge clk); #1;
    checks++;
    if (sumq !== prev) begin
      failures++;
      $display("FAIL sumq=%h exp %h", sumq, prev);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) add_tab[i] = qdigit_t'(((i % 4) + (i / 4)) % 4);
    rst_n = 1'b1; #1 rst_n = 1'b0; a = '0; b = '0; cin = 1'b0;
    #2;
    checks++;
    if (sumq !== '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1'b1;
    apply('1, '0, 1'b1);                 // full ripple: every digit propagates
    apply({D{2'b01}}, {D{2'b10}}, 1'b1); // 1+2 in every digit, ripple again
    apply('1, '1, 1'b0);                 // every digit generates
    apply({D{2'b10}}, {D{2'b10}}, 1'b0); // 2+2 generates
    for (int n = 0; n < 500; n++)
      apply(W'({$urandom, $urandom}), W'({$urandom, $urandom}), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

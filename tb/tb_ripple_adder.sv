// tb_ripple_adder: self-checking test of the ripple-carry adder.
// Applies corner cases and random operands with both carry-in values to a
// 32-bit adder and compares {cout, sum} with the built-in + operator on
// 33-bit numbers. A watchdog ends the run after a fixed number of cycles.
module tb_ripple_adder;
  localparam int unsigned W = 32;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;
  logic         clk = 1'b0;

  ripple_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] exp;
    a = x; b = y; cin = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %h exp %h", x, y, c, {cout, sum}, exp);
    end
  endtask

  initial begin
    check('0, '0, 1'b0);
    check('1, '0, 1'b1);          // carry ripples through all bits
    check('1, '1, 1'b1);
    check('1, W'(1), 1'b0);
    check(W'(32'h8000_0000), W'(32'h8000_0000), 1'b0);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

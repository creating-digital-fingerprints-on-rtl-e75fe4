// tb_array_multiplier: self-checking test of the 32x32 array multiplier.
// Drives corner cases, walking ones and random operands and compares the
// 64-bit product with the built-in * operator on 64-bit numbers.
// A watchdog ends the run after a fixed number of cycles.
module tb_array_multiplier;
  localparam int unsigned N = 32;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int             checks = 0, failures = 0;
  logic           clk = 1'b0;

  array_multiplier #(.N(N)) dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] exp;
    a = x; b = y;
    #1;
    exp = {{N{1'b0}}, x} * {{N{1'b0}}, y};
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h got %h exp %h", x, y, p, exp);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, N'(1));
    check(N'(1), '1);
    check(N'(32'hdead_beef), N'(32'h1234_5678));
    for (int i = 0; i < N; i++) begin
      check(N'(1) << i, '1);
      check('1, N'(1) << i);
    end
    for (int i = 0; i < 2000; i++) check($urandom, $urandom);
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

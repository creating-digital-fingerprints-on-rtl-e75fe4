// tb_id_select: self-checking test of the 54-bit ID selection.
// Random 192-bit digit vectors are applied; the expected ID is the digits of
// outputs 51, 48, 47, 46, 42, 35, 34, 30, 27, 25, 21, 19, 17, 14, 13, 11, 10
// and 9, in that order from the most significant digit, written out here
// independently of the package list.
module tb_id_select;
  logic [191:0] digits;
  logic [53:0]  id;
  int           checks = 0, failures = 0;
  logic         clk = 1'b0;

  id_select dut (.digits(digits), .id(id));

  always #5 clk = ~clk;

  function automatic logic [2:0] dg(input logic [191:0] d, input int line);
    return d[line*3 +: 3];
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [53:0] exp;
      for (int w = 0; w < 6; w++) digits[w*32 +: 32] = $urandom;
      if (t == 0) for (int i = 0; i < 64; i++) digits[i*3 +: 3] = 3'(i % 8);
      #1;
      exp = {dg(digits, 51), dg(digits, 48), dg(digits, 47), dg(digits, 46),
             dg(digits, 42), dg(digits, 35), dg(digits, 34), dg(digits, 30),
             dg(digits, 27), dg(digits, 25), dg(digits, 21), dg(digits, 19),
             dg(digits, 17), dg(digits, 14), dg(digits, 13), dg(digits, 11),
             dg(digits, 10), dg(digits, 9)};
      checks++;
      if (id !== exp) begin
        failures++;
        $display("FAIL id %h exp %h", id, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

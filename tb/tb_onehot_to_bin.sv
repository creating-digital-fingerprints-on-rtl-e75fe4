// tb_onehot_to_bin: exhaustive test of the one-hot to binary converter.
// All 256 8-bit inputs are applied. For a single set bit the digit must be
// its position and valid high; for zero, overflow high and digit 0; for
// several set bits valid and overflow low.
module tb_onehot_to_bin;
  localparam int unsigned WIDTH = 8;

  logic [WIDTH-1:0] oh;
  logic [2:0]       digit;
  logic             valid, overflow;
  int               checks = 0, failures = 0;
  logic             clk = 1'b0;

  onehot_to_bin #(.WIDTH(WIDTH)) dut (.onehot(oh), .digit(digit), .valid(valid), .overflow(overflow));

  always #5 clk = ~clk;

  initial begin
    for (int v = 0; v < 256; v++) begin
      int ones, pos;
      oh = 8'(v);
      #1;
      ones = 0; pos = 0;
      for (int i = 0; i < WIDTH; i++) if (v[i]) begin ones++; pos = i; end
      checks++;
      if (valid !== (ones == 1) || overflow !== (ones == 0) ||
          (ones == 1 && digit !== 3'(pos)) || (ones == 0 && digit !== 3'd0)) begin
        failures++;
        $display("FAIL in=%b digit=%0d valid=%b ovf=%b", oh, digit, valid, overflow);
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

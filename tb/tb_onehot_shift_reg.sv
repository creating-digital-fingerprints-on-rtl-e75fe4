// tb_onehot_shift_reg: self-checking test of the one-hot transition counter.
// Two 8-bit registers share one signal line, one counting rising and one
// falling transitions. After clear both must read 0000_0001; after k pulses
// the '1' must be in bit k, and after 8 pulses both must read zero. Pulses of
// several widths are used; clear is checked again at the end.
module tb_onehot_shift_reg;
  localparam int unsigned WIDTH = 8;

  logic             line = 1'b0, clear = 1'b0;
  logic [WIDTH-1:0] q_r, q_f;
  int               checks = 0, failures = 0;
  logic             clk = 1'b0;

  onehot_shift_reg #(.WIDTH(WIDTH), .FALLING(1'b0)) dut_r (.line(line), .clear(clear), .q(q_r));
  onehot_shift_reg #(.WIDTH(WIDTH), .FALLING(1'b1)) dut_f (.line(line), .clear(clear), .q(q_f));

  always #5 clk = ~clk;

  task automatic expect_q(input logic [WIDTH-1:0] er, input logic [WIDTH-1:0] ef);
    checks++;
    if (q_r !== er || q_f !== ef) begin
      failures++;
      $display("FAIL rising %b (exp %b) falling %b (exp %b)", q_r, er, q_f, ef);
    end
  endtask

  task automatic pulse(input int width);
    line = 1'b1; #(width);
    line = 1'b0; #(width);
  endtask

  initial begin
    #3 clear = 1'b1; #3 clear = 1'b0; #3;
    expect_q(WIDTH'(1), WIDTH'(1));
    for (int k = 1; k <= WIDTH + 2; k++) begin
      line = 1'b1; #(1 + k % 3);
      // rising edge counted, falling edge not yet
      expect_q(k < WIDTH ? WIDTH'(1) << k : '0,
               k - 1 < WIDTH ? WIDTH'(1) << (k - 1) : '0);
      line = 1'b0; #(2 + k % 2);
      expect_q(k < WIDTH ? WIDTH'(1) << k : '0,
               k < WIDTH ? WIDTH'(1) << k : '0);
    end
    clear = 1'b1; #2; clear = 1'b0; #2;
    expect_q(WIDTH'(1), WIDTH'(1));
    pulse(1); pulse(4); pulse(2);
    expect_q(WIDTH'(1) << 3, WIDTH'(1) << 3);
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

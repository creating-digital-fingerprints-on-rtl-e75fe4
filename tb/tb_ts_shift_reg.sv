// tb_ts_shift_reg: self-checking test of one transitional-sampling register.
// A random data line is sampled by a separate trigger line. The testbench
// keeps its own list of the values present at each rising trigger edge and
// checks that the register holds the last four, oldest in bit 0. Data
// changes between edges must not be captured. Clear is checked twice.
module tb_ts_shift_reg;
  localparam int unsigned DEPTH = 4;

  logic             trig = 1'b0, clear = 1'b0, line = 1'b0;
  logic [DEPTH-1:0] q;
  int               checks = 0, failures = 0;
  logic             clk = 1'b0;

  ts_shift_reg #(.DEPTH(DEPTH)) dut (.trig(trig), .clear(clear), .line(line), .q(q));

  always #5 clk = ~clk;

  initial begin
    logic [DEPTH-1:0] exp;
    for (int run = 0; run < 2; run++) begin
      #2 clear = 1'b1; #2 clear = 1'b0; #2;
      exp = '0;
      checks++;
      if (q !== exp) begin failures++; $display("FAIL after clear q=%b", q); end
      for (int k = 0; k < 12; k++) begin
        line = 1'($urandom); #2;
        trig = 1'b1;
        exp  = {line, exp[DEPTH-1:1]};
        #1 line = ~line;  // change while trigger is high: not captured
        #2 trig = 1'b0;
        #1 line = 1'($urandom); #2;
        checks++;
        if (q !== exp) begin
          failures++;
          $display("FAIL run %0d edge %0d q=%b exp=%b", run, k, q, exp);
        end
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

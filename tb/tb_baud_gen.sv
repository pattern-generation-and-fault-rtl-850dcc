// tb_baud_gen: self-checking test of the baud rate generator.
// Measures the period and high time of clk_out and the tick spacing for the
// default divider and for a small odd divider, and checks that tick marks
// exactly the rising edges of clk_out.
module tb_baud_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic co52, t52, co5, t5;
  int checks = 0, failures = 0;

  baud_gen dut (.clk, .rst_n, .clk_out(co52), .tick(t52));
  baud_gen #(.DIV(5)) dut5 (.clk, .rst_n, .clk_out(co5), .tick(t5));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int last52 = -1, last5 = -1, high52 = 0, cyc = 0;
  logic q52 = 1'b0, q5 = 1'b0;
  int n52 = 0, n5 = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (co52) high52++;
    if (t52 !== (co52 && !q52)) begin failures++; checks++; $display("FAIL tick vs edge"); end
    if (t5 !== (co5 && !q5)) begin failures++; checks++; $display("FAIL tick5 vs edge"); end
    if (t52) begin
      if (last52 >= 0) begin check("period 52", cyc - last52, 52); check("high time", high52, 26); end
      last52 = cyc; high52 = 0; n52++;
    end
    if (t5) begin
      if (last5 >= 0) check("period 5", cyc - last5, 5);
      last5 = cyc; n5++;
    end
    q52 <= co52; q5 <= co5;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (52 * 12) @(posedge clk);
    check("ticks seen", int'(n52 >= 10), 1);
    check("ticks5 seen", int'(n5 >= 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

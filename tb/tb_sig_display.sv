// tb_sig_display: self-checking test of the display register and decoder.
// Loads every nibble value and checks the character (0123456789ACFHPU) and
// segment pattern of each digit against tables written here, the H953
// example, blanking, decimal points and the host byte writes.
module tb_sig_display;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, wr_hi = 1'b0, wr_lo = 1'b0, blank = 1'b0;
  logic [15:0] sig = '0;
  logic [7:0] wdata = '0;
  logic [3:0] dp_in = '0;
  logic [15:0] disp;
  logic [3:0][7:0] chars;
  logic [3:0][6:0] seg;
  logic [3:0] dp;
  int checks = 0, failures = 0;

  sig_display dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  localparam string CHARSET = "0123456789ACFHPU";
  // {g,f,e,d,c,b,a}
  logic [6:0] segtab [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                               7'h7F, 7'h6F, 7'h77, 7'h39, 7'h71, 7'h76, 7'h73, 7'h3E};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk); sig = {4'(v), 4'(v + 1), 4'(v + 2), 4'(v + 3)}; load = 1'b1;
      @(negedge clk); load = 1'b0;
      for (int d = 0; d < 4; d++) begin
        int nib;
        nib = (v + 3 - d) % 16;
        check($sformatf("char %0d digit %0d", v, d), {24'h0, chars[d]}, {24'h0, CHARSET[nib]});
        check($sformatf("seg %0d digit %0d", v, d), {25'h0, seg[d]}, {25'h0, segtab[nib]});
      end
    end
    @(negedge clk); sig = 16'hD953; load = 1'b1;
    @(negedge clk); load = 1'b0; sig = 16'h1234;
    check("H953", {chars[3], chars[2], chars[1], chars[0]}, "H953");
    @(negedge clk);
    check("held", disp, 16'hD953);
    blank = 1'b1; dp_in = 4'b1010;
    #1 check("blank", {seg, dp}, '0);
    blank = 1'b0;
    #1 check("dp", {28'h0, dp}, 32'hA);
    @(negedge clk); wdata = 8'hE7; wr_hi = 1'b1;
    @(negedge clk); wr_hi = 1'b0; wdata = 8'h33; wr_lo = 1'b1;
    @(negedge clk); wr_lo = 1'b0;
    check("host write", disp, 16'hE733);
    check("P733", {chars[3], chars[2], chars[1], chars[0]}, "P733");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

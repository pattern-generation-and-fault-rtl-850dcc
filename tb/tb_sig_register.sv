// tb_sig_register: self-checking test of the 16-bit signature register.
// Checks the worked example of the design description (the 20-bit stream
// 11111100000111111111 leaves 16'hD953, shown as "H953", including the
// register contents after 8 bits), a constant-high stream of 20 clocks
// (16'hE733, "P733"), random streams against an independent bit-by-bit model,
// the clear input, the parallel preset (load) and its priority below clear,
// a preset followed by a stream, and a 4-bit instance with taps at 1 and 4 (x^4 + x + 1)
// seeded through load and running as a maximum-length PRBS generator of
// period 15.
module tb_sig_register;
  import sa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, shift_en = 1'b0, din = 1'b0;
  logic [15:0] sig;
  logic load = 1'b0;
  logic [15:0] load_val = 16'h0000;
  logic clr4 = 1'b0, en4 = 1'b0, load4 = 1'b0;
  logic [3:0] sig4;
  int checks = 0, failures = 0;

  sig_register dut (.clk, .rst_n, .clr, .load, .load_val, .shift_en, .din, .sig);
  sig_register #(.WIDTH(4), .TAPS(4'b1001)) dut4 (
    .clk, .rst_n, .clr(clr4), .load(load4), .load_val(4'b0001), .shift_en(en4),
    .din(1'b0), .sig(sig4));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Independent model: positions numbered 1..16 as in the description.
  function automatic logic [15:0] model_step(input logic [15:0] r, input logic b);
    logic fb;
    fb = b ^ r[7-1] ^ r[9-1] ^ r[12-1] ^ r[16-1];
    return {r[14:0], fb};
  endfunction

  task automatic shift_bit(input logic b);
    din = b; shift_en = 1'b1;
    @(posedge clk); #1;
    shift_en = 1'b0;
  endtask

  initial begin
    logic [19:0] example;
    logic [15:0] ref_sig;
    logic [3:0]  first4;
    int n;
    example = 20'b11111100000111111111;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check("reset", sig, 16'h0000);

    for (int i = 19; i >= 0; i--) begin
      shift_bit(example[i]);
      if (i == 12) check("after 8 bits", sig, 16'b0000000011111101);
    end
    check("H953 example", sig, 16'hD953);
    checks++;
    if ({sig_char(sig[15:12]), sig_char(sig[11:8]), sig_char(sig[7:4]), sig_char(sig[3:0])} != "H953") begin
      failures++; $display("FAIL characters");
    end

    clr = 1'b1; @(posedge clk); #1; clr = 1'b0;
    check("clear", sig, 16'h0000);
    repeat (20) shift_bit(1'b1);
    check("constant high P733", sig, 16'hE733);

    // hold: no shift without enable
    din = 1'b1; repeat (3) @(posedge clk); #1;
    check("hold", sig, 16'hE733);

    for (int t = 0; t < 20; t++) begin
      clr = 1'b1; @(posedge clk); #1; clr = 1'b0;
      ref_sig = '0;
      n = 1 + ($urandom % 300);
      for (int k = 0; k < n; k++) begin
        logic b;
        b = 1'($urandom);
        ref_sig = model_step(ref_sig, b);
        shift_bit(b);
      end
      check("random stream", sig, ref_sig);
    end

    // preset: load wins over shift, clear wins over load
    load_val = 16'hA5C3; load = 1'b1; shift_en = 1'b1; din = 1'b1;
    @(posedge clk); #1; load = 1'b0; shift_en = 1'b0;
    check("preset", sig, 16'hA5C3);
    load_val = 16'h1234; load = 1'b1; clr = 1'b1;
    @(posedge clk); #1; load = 1'b0; clr = 1'b0;
    check("clear over preset", sig, 16'h0000);
    for (int t = 0; t < 5; t++) begin
      logic [15:0] seed;
      seed = 16'($urandom);
      load_val = seed; load = 1'b1; @(posedge clk); #1; load = 1'b0;
      ref_sig = seed;
      for (int k = 0; k < 40; k++) begin
        logic b;
        b = 1'($urandom);
        ref_sig = model_step(ref_sig, b);
        shift_bit(b);
      end
      check("preset then stream", sig, ref_sig);
    end

    // 4-bit PRBS generator: seed 0001, period 15
    load4 = 1'b1; @(posedge clk); #1; load4 = 1'b0;
    check("4-bit seed", {12'h0, sig4}, 16'h0001);
    first4 = sig4;
    en4 = 1'b1;
    n = 0;
    do begin
      @(posedge clk); #1; n++;
    end while (sig4 != first4 && n < 40);
    en4 = 1'b0;
    check("4-bit period", 16'(n), 16'd15);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_signature_module: self-checking test of the signature module.
// A CUT clock of 20 system clocks per period is generated here. The host side
// is driven with S-100 style cycles. Runs: (1) the description's 20-bit
// example stream with a rising start and a falling stop, expecting 16'hD953
// and "H953" on the display; (2) random streams and window lengths against an
// independent model, with falling clock edges selected; (3) a window ended by
// a host halt; (4) start/stop pulses much shorter than a CUT clock period;
// (5) host preset of the two signature bytes, read back and then extended
// by a host-halted window; plus status bits, enable gating and display
// blanking.
module tb_signature_module;
  import sa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cut_clk = 1'b0, start_in = 1'b0, stop_in = 1'b1, probe = 1'b0;
  logic [15:0] s_a = 16'h0000;
  logic [7:0]  s_do = 8'h00, s_di;
  logic pwr_n = 1'b1, pdbin_n = 1'b1, smemr_n = 1'b1;
  logic [15:0] signature;
  logic [3:0][7:0] disp_chars;
  logic [3:0][6:0] disp_seg;
  logic [3:0] disp_dp;
  logic window_open;
  int checks = 0, failures = 0;
  bit neg_clk = 0;

  signature_module dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wr(input logic [2:0] r, input logic [7:0] d);
    @(negedge clk); s_a = 16'hC000 + 16'(r); s_do = d; pwr_n = 1'b0;
    @(negedge clk); pwr_n = 1'b1;
  endtask

  task automatic rd(input logic [2:0] r, output logic [7:0] d);
    @(negedge clk); s_a = 16'hC000 + 16'(r); pdbin_n = 1'b0; smemr_n = 1'b0;
    #1 d = s_di;
    @(negedge clk); pdbin_n = 1'b1; smemr_n = 1'b1;
  endtask

  // One CUT clock period: data set up in the inactive half, active edge at
  // the middle. Active edge is rising unless neg_clk.
  task automatic cut_cycle(input logic d);
    cut_clk = neg_clk;
    probe = d;
    repeat (100) #1;
    cut_clk = !neg_clk;
    repeat (100) #1;
  endtask

  function automatic logic [15:0] model(input logic [15:0] r, input logic b);
    return {r[14:0], b ^ r[6] ^ r[8] ^ r[11] ^ r[15]};
  endfunction

  logic [7:0] st;
  logic [15:0] exp_sig;
  logic [19:0] ex;

  task automatic arm(input logic [7:0] edges);
    wr(REG_MCTL, edges | 8'h07);         // reset
    wr(REG_MCTL, edges | 8'h0C);         // enable, go low, halt high
    wr(REG_MCTL, edges | 8'h0E);         // go rises
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rd(REG_STATUS, st);
    check("status after reset", {8'h0, st}, 16'h0040);

    // ---- run 1: description example, start rising, stop falling
    ex = 20'b11111100000111111111;
    arm(8'h40);
    rd(REG_STATUS, st);
    check("status armed", {8'h0, st & 8'hE1}, 16'h0080);
    cut_cycle(1'b0); cut_cycle(1'b0);
    start_in = 1'b1;
    for (int i = 19; i >= 0; i--) begin
      cut_cycle(ex[i]);
      if (i == 19) begin start_in = 1'b0; end
      if (i == 10) begin rd(REG_STATUS, st); check("status open", {8'h0, st & 8'hA0}, 16'h00A0); end
    end
    stop_in = 1'b0;
    cut_cycle(1'b1); cut_cycle(1'b0);
    stop_in = 1'b1;
    cut_cycle(1'b1);
    rd(REG_STATUS, st);
    check("status done", {8'h0, st}, 16'h0041);
    rd(REG_SIG_L, st); check("sig hi", {8'h0, st}, 16'h00D9);
    rd(REG_SIG_R, st); check("sig lo", {8'h0, st}, 16'h0053);
    check("display", {disp_chars[3], disp_chars[2]}, {"H", "9"});
    check("display", {disp_chars[1], disp_chars[0]}, {"5", "3"});
    check("segments H", {9'h0, disp_seg[3]}, 16'b1110110);
    wr(REG_DCTL, 8'h10);
    check("blank", {2'b0, disp_seg[3], disp_seg[2]}, 16'h0);
    check("blank", {2'b0, disp_seg[1], disp_seg[0]}, 16'h0);
    wr(REG_DCTL, 8'h00);

    // ---- run 2: random streams, falling clock edge, rising start, rising stop
    neg_clk = 1;
    for (int t = 0; t < 6; t++) begin
      int n;
      logic b;
      n = 1 + ($urandom % 60);
      stop_in = 1'b0;
      arm(8'h10);
      cut_cycle(1'b0);
      start_in = 1'b1;
      exp_sig = '0;
      for (int k = 0; k < n; k++) begin
        b = 1'($urandom);
        exp_sig = model(exp_sig, b);
        cut_cycle(b);
      end
      stop_in = 1'b1;
      cut_cycle(1'($urandom));
      start_in = 1'b0;
      cut_cycle(1'($urandom));
      check("random window", signature, exp_sig);
    end
    neg_clk = 0;
    stop_in = 1'b1;

    // ---- run 3: host halt ends the window, enable low freezes
    arm(8'h40);
    start_in = 1'b1;
    exp_sig = '0;
    for (int k = 0; k < 10; k++) begin cut_cycle(k[0]); exp_sig = model(exp_sig, k[0]); end
    wr(REG_MCTL, 8'h48 | 8'h02);   // halt low (enable, go high)
    wr(REG_MCTL, 8'h4E);           // halt rises
    cut_cycle(1'b1); cut_cycle(1'b1);
    check("halted signature", signature, exp_sig);
    rd(REG_STATUS, st);
    check("status halted", {8'h0, st}, 16'h0041);
    start_in = 1'b0;

    // ---- run 4: short start and stop pulses
    arm(8'h40);
    cut_clk = 1'b1; probe = 1'b0;
    repeat (30) #1;
    cut_clk = 1'b0;
    repeat (40) #1;
    start_in = 1'b1; repeat (30) #1; start_in = 1'b0;   // pulse inside low phase
    exp_sig = '0;
    for (int k = 0; k < 7; k++) begin
      cut_cycle(1'b1);
      exp_sig = model(exp_sig, 1'b1);
      if (k == 6) begin stop_in = 1'b0; repeat (30) #1; stop_in = 1'b1; end
    end
    cut_cycle(1'b1); cut_cycle(1'b1);
    check("short pulses", signature, exp_sig);

    // ---- run 5: preset through the signature registers, then shift on it
    arm(8'h40);
    wr(REG_SIG_L, 8'h3C);
    wr(REG_SIG_R, 8'h96);
    rd(REG_SIG_L, st); check("preset hi", {8'h0, st}, 16'h003C);
    rd(REG_SIG_R, st); check("preset lo", {8'h0, st}, 16'h0096);
    start_in = 1'b1;
    exp_sig = 16'h3C96;
    for (int k = 0; k < 12; k++) begin
      cut_cycle(k[1]);
      exp_sig = model(exp_sig, k[1]);
    end
    wr(REG_MCTL, 8'h4A);
    wr(REG_MCTL, 8'h4E);
    cut_cycle(1'b1); cut_cycle(1'b1);
    start_in = 1'b0;
    check("preset window", signature, exp_sig);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

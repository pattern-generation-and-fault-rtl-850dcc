// tb_uart_ay51013: self-checking test of the UART.
// The 16x clock is a tick every 3 system clocks. For every format (5..8 data
// bits, parity off/odd/even, one or two stop bits) random words are strobed
// in; the serial line is decoded here by sampling it in the middle of each bit
// (start bit, data LSB first, parity, stop bits, bit time 16 ticks) and the
// line is looped back into the receiver, whose word, data-available, parity
// and framing flags are checked. A word with a corrupted parity bit and one
// with a broken stop bit are injected into the receiver directly, and an
// overrun is provoked. The character time is checked against the format.
module tb_uart_ay51013;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic [1:0] nb = 2'd3;
  logic np = 1'b1, eps = 1'b1, tsb = 1'b0;
  logic [7:0] db = '0;
  logic ds_n = 1'b1, so, tbmt, eoc;
  logic si, rdav_n = 1'b1;
  logic [7:0] rd;
  logic dav, pe, fe, ovr;
  logic inject = 1'b0, inj_line = 1'b1;
  int checks = 0, failures = 0;

  uart_ay51013 dut (.*);
  assign si = inject ? inj_line : so;

  always #5 clk = ~clk;
  int tc = 0;
  int n_full = 0;
  always @(posedge clk) begin
    if (!tbmt) n_full++;
    tc <= (tc == 2) ? 0 : tc + 1;
    tick <= (tc == 2);
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wait_ticks(input int n);
    repeat (n) begin @(posedge clk); while (!tick) @(posedge clk); end
  endtask

  // Decode one character from so.
  task automatic decode(input int bits, output logic [7:0] data, output logic par,
                        output logic stop_ok, output int ticks);
    data = '0; par = 1'b0; stop_ok = 1'b1; ticks = 0;
    while (so) begin @(posedge clk); if (tick) ticks++; end
    ticks = 0;
    wait_ticks(8); ticks += 8;
    for (int i = 0; i < bits; i++) begin wait_ticks(16); ticks += 16; data[i] = so; end
    if (!np) begin wait_ticks(16); ticks += 16; par = so; end
    wait_ticks(16); ticks += 16; if (!so) stop_ok = 1'b0;
    if (tsb) begin wait_ticks(16); ticks += 16; if (!so) stop_ok = 1'b0; end
  endtask

  task automatic strobe(input logic [7:0] v);
    @(negedge clk); db = v; ds_n = 1'b0;
    @(negedge clk); @(negedge clk); ds_n = 1'b1;
  endtask

  task automatic send_raw(input logic [11:0] frame, input int n);
    inject = 1'b1;
    for (int i = 0; i < n; i++) begin inj_line = frame[i]; wait_ticks(16); end
    inj_line = 1'b1; wait_ticks(16);
    inject = 1'b0;
  endtask

  initial begin
    logic [7:0] data, v, mask;
    logic par, stop_ok, exp_par;
    int ticks, bits;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("idle line", {so, tbmt, eoc}, 3'b111);

    for (int f = 0; f < 24; f++) begin
      nb  = 2'(f % 4);
      np  = (f / 4) % 3 == 0;
      eps = (f / 4) % 3 == 2;
      tsb = f >= 12;
      bits = 5 + nb;
      mask = 8'hFF >> (8 - bits);
      for (int k = 0; k < 3; k++) begin
        v = 8'($urandom);
        strobe(v);
        decode(bits, data, par, stop_ok, ticks);
        exp_par = (^(v & mask)) ^ !eps;
        check($sformatf("tx data f%0d", f), data, v & mask);
        if (!np) check("tx parity", par, exp_par);
        check("tx stop", stop_ok, 1'b1);
        check("char time", ticks, 8 + 16 * (bits + (np ? 0 : 1) + (tsb ? 2 : 1)));
        wait_ticks(4);
        check("rx dav", dav, 1'b1);
        check("rx data", rd, v & mask);
        check("rx flags", {pe, fe, ovr}, 3'b000);
        @(negedge clk); rdav_n = 1'b0; @(negedge clk); rdav_n = 1'b1;
        check("dav cleared", dav, 1'b0);
        while (!eoc) @(negedge clk);
      end
    end

    // 8 bits, even parity: bad parity bit and bad stop bit
    nb = 2'd3; np = 1'b0; eps = 1'b1; tsb = 1'b0;
    send_raw({1'b1, 1'b0, 8'h01, 1'b0}, 11);     // parity should be 1
    check("parity error", {pe, fe}, 2'b10);
    @(negedge clk); rdav_n = 1'b0; @(negedge clk); rdav_n = 1'b1;
    send_raw({1'b0, 1'b1, 8'h01, 1'b0}, 11);     // stop bit 0
    check("framing error", {pe, fe}, 2'b01);
    check("framing data", rd, 8'h01);
    send_raw({1'b1, 1'b0, 8'h03, 1'b0}, 11);     // dav not cleared: overrun
    check("overrun", ovr, 1'b1);
    check("overrun data", rd, 8'h03);

    check("buffer-full flag seen", 16'(n_full > 0), 16'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

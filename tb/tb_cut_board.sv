// tb_cut_board: self-checking test of the circuit under test.
// Checks the stop signal (NAND of all eight parallel inputs) and start signal
// (bit 8) for every input word, the CUT clock period, the probe-node vector,
// and the data path: a word strobed in (through the inverting XOR, switch
// open) must leave the serial output as start bit, 7 data bits LSB first and
// one stop bit at 16 CUT clocks per bit; looped back, the receiver must
// present it on par_out and pulse strobe_out (inverted data-available), which
// then clears itself through the delayed reset loop.
module tb_cut_board;
  import sa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] par_in = 8'h00;
  logic strobe_in = 1'b1, sw_neg_pulse = 1'b1, sw_pos_pulse = 1'b1;
  logic serial_in, serial_out, strobe_out, cut_clk, start_sig, stop_sig;
  logic [2:0] rx_err;
  logic [7:0] par_out;
  logic [CUT_NODES-1:0] nodes;
  int checks = 0, failures = 0;

  cut_board dut (.*);
  assign serial_in = serial_out;
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

  task automatic cut_edges(input int n);
    repeat (n) @(posedge cut_clk);
  endtask

  int so_low = 0;
  initial begin
    logic [6:0] data;
    int t0, period;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 256; v++) begin
      par_in = 8'(v); #1;
      check("stop", stop_sig, (v == 255) ? 1'b0 : 1'b1);
      check("start", start_sig, {15'h0, v[7]});
      check("nodes", nodes[7:0], {8'h0, v[7:0]});
      check("stop node", nodes[N_STOP], stop_sig);
    end
    check("pull-up / ground nodes", {nodes[N_PULLUP], nodes[N_GROUND]}, 2'b10);

    // CUT clock period
    @(posedge cut_clk); t0 = $time;
    @(posedge cut_clk); period = ($time - t0) / 10;
    check("CUT clock period", 16'(period), 16'd52);

    // strobe a word in: strobe_in low pulse gives a high pulse on the UART strobe
    for (int k = 0; k < 4; k++) begin
      logic [7:0] w;
      w = 8'($urandom);
      @(negedge clk); par_in = w;
      @(negedge clk); strobe_in = 1'b0;
      @(negedge clk); strobe_in = 1'b1;
      while (serial_out) @(negedge clk);
      cut_edges(8);                          // middle of start bit
      #1 check("start bit", serial_out, 1'b0);
      for (int i = 0; i < 7; i++) begin cut_edges(16); #1 data[i] = serial_out; end
      cut_edges(16);
      #1 check("stop bit", serial_out, 1'b1);
      check($sformatf("serial data %0d", k), {9'h0, data}, {9'h0, w[6:0]});
      while (strobe_out) @(negedge clk);
      check("par_out", par_out, {1'b0, w[6:0]});
      check("rx errors", {13'h0, rx_err}, 16'h0);
      repeat (8) @(negedge clk);
      check("data-available cleared by delay loop", strobe_out, 1'b1);
      cut_edges(20);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cut_board: the circuit under test, a UART parallel/serial converter built so
// that it can be signature-analysed.
//
// A signature analyser needs a clock, a start and a stop signal from the
// circuit it measures; this board provides all three:
//  * clock: the baud rate generator output (cut_clk), which also clocks the
//    UART;
//  * start: parallel input bit 8 (par_in[7]). The host sends a word with only
//    bit 8 set as the start code; bit 8 is the parity position of the 7-bit
//    characters, so it carries no data;
//  * stop: an 8-input NAND (74LS30) of the eight parallel inputs, which falls
//    when the host sends the all-ones end-of-pattern code.
// The parallel word goes to the UART transmitter through a data strobe that an
// XOR gate (74C86) can invert: with the switch open (sw_neg_pulse = 1) the
// UART strobe is the inverse of strobe_in. A second XOR gate gives strobe_out
// from the receiver's data-available flag in the same way (sw_pos_pulse), and
// a third one returns a delayed copy of data-available to the reset-data-
// available input, so that a received word clears its own flag after
// RDAV_DELAY system clocks.
// Format: the format pins are strapped as in the schematic: word-length pins
// high/low = 7 bits, no-parity pin high, even-parity pin high, two-stop-bit pin
// low. nodes brings every probe point out for the analyser (index list in
// sa_pkg). Gate types and strapping follow the schematic; the RC delay as a
// counter of system clocks and the baud divider are this design's choices.
module cut_board
  import sa_pkg::*;
#(
  parameter int unsigned BAUD_DIV   = 52,
  parameter int unsigned RDAV_DELAY = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           par_in,      // bit 1 .. bit 8
  input  logic                 strobe_in,
  input  logic                 sw_neg_pulse,
  input  logic                 sw_pos_pulse,
  input  logic                 serial_in,
  output logic                 serial_out,
  output logic [7:0]           par_out,
  output logic                 strobe_out,
  output logic                 cut_clk,
  output logic                 start_sig,
  output logic                 stop_sig,
  output logic [2:0]           rx_err,      // {overrun, framing, parity}
  output logic [CUT_NODES-1:0] nodes
);

  // Format strapping read from the schematic (1 = pulled up, 0 = grounded).
  localparam logic [1:0] FMT_NB  = 2'b10;  // NB2 up, NB1 grounded: 7 bits
  localparam logic       FMT_NP  = 1'b1;   // no parity
  localparam logic       FMT_EPS = 1'b1;   // even parity selected
  localparam logic       FMT_TSB = 1'b0;   // one stop bit

  logic tick, ds_n, tbmt, eoc, dav, pe, fe, ovr, rdav_n;

  baud_gen #(.DIV(BAUD_DIV)) u_baud (
    .clk, .rst_n, .clk_out(cut_clk), .tick
  );

  assign ds_n = strobe_in ^ sw_neg_pulse;

  // Delay line standing in for the RC network on the data-available loop.
  logic [RDAV_DELAY-1:0] dav_dly;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dav_dly <= '0;
    else        dav_dly <= {dav_dly[RDAV_DELAY-2:0], dav};
  end
  assign rdav_n = 1'b1 ^ dav_dly[RDAV_DELAY-1];

  uart_ay51013 u_uart (
    .clk, .rst_n, .tick,
    .nb (FMT_NB), .np (FMT_NP), .eps (FMT_EPS), .tsb (FMT_TSB),
    .db (par_in), .ds_n, .so (serial_out), .tbmt, .eoc,
    .si (serial_in), .rdav_n, .rd (par_out), .dav, .pe, .fe, .ovr
  );

  assign rx_err     = {ovr, fe, pe};
  assign strobe_out = dav ^ sw_pos_pulse;
  assign start_sig  = par_in[7];
  assign stop_sig   = ~&par_in;

  always_comb begin
    nodes               = '0;
    nodes[7:0]          = par_in;
    nodes[N_SERIAL_OUT] = serial_out;
    nodes[N_STOP]       = stop_sig;
    nodes[N_STROBE]     = ds_n;
    nodes[N_TBMT]       = tbmt;
    nodes[N_EOC]        = eoc;
    nodes[N_STROBE_OUT] = strobe_out;
    nodes[N_PULLUP]     = 1'b1;
    nodes[N_GROUND]     = 1'b0;
  end

endmodule

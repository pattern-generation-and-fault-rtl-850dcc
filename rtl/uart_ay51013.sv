// uart_ay51013: universal asynchronous receiver/transmitter of the circuit
// under test, after the AY-5-1013 UART used there.
//
// Transmitter: while the data strobe ds_n is low the eight parallel inputs are
// copied into the holding register; when ds_n returns high the holding
// register counts as full (tbmt low). When the transmitter is idle it sends
// the held word as a start bit (0), 5 to 8 data bits LSB first, an optional
// parity bit and one or two stop bits (1); the line idles high. eoc is high
// while no character is being sent.
// Receiver: waits for a falling edge on si, checks half a bit later that the
// line is still low, then samples each further bit in its middle. At the end
// of the character rd holds the data bits, dav goes high and pe / fe report a
// parity or framing error; ovr is set if dav was still high. rdav_n low
// clears dav.
// Format inputs: nb = word length - 5, np = 1 for no parity, eps = 1 for even
// parity, tsb = 1 for two stop bits. All timing counts tick pulses: one tick
// per UART clock, sixteen ticks per bit, the usual 16x clock of this part.
// The description gives only the parallel-serial function; the format pins
// are read from the schematic, while the bit timing and the strobe behaviour
// are the part's usual behaviour, not taken from the description.
module uart_ay51013 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  // format
  input  logic [1:0] nb,
  input  logic       np,
  input  logic       eps,
  input  logic       tsb,
  // transmitter
  input  logic [7:0] db,
  input  logic       ds_n,
  output logic       so,
  output logic       tbmt,
  output logic       eoc,
  // receiver
  input  logic       si,
  input  logic       rdav_n,
  output logic [7:0] rd,
  output logic       dav,
  output logic       pe,
  output logic       fe,
  output logic       ovr
);

  // ------------------------------------------------------------ transmitter
  typedef enum logic [2:0] {T_IDLE, T_START, T_DATA, T_PAR, T_STOP} tx_state_e;
  tx_state_e  ts;
  logic [7:0] hold, tsr;
  logic       hold_full, ds_q;
  logic [3:0] tsub;          // tick within a bit
  logic [2:0] tbit;          // data bit index
  logic       tstop2, tpar;
  logic [2:0] last_bit;
  assign last_bit = 3'd4 + {1'b0, nb};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_IDLE; hold <= '0; tsr <= '0; hold_full <= 1'b0; ds_q <= 1'b1;
      tsub <= '0; tbit <= '0; tstop2 <= 1'b0; tpar <= 1'b0; so <= 1'b1;
    end else begin
      ds_q <= ds_n;
      if (!ds_n) hold <= db;
      if (ds_n && !ds_q) hold_full <= 1'b1;
      if (tick) begin
        unique case (ts)
          T_IDLE: if (hold_full) begin
            tsr <= hold; hold_full <= 1'b0; ts <= T_START; so <= 1'b0; tsub <= '0;
            tpar <= ~eps;  // running parity, seeded for odd/even
          end
          T_START: if (tsub == 4'd15) begin
            ts <= T_DATA; tbit <= '0; tsub <= '0; so <= tsr[0];
            tpar <= tpar ^ tsr[0];
          end else tsub <= tsub + 1'b1;
          T_DATA: if (tsub == 4'd15) begin
            tsub <= '0;
            if (tbit == last_bit) begin
              if (!np) begin ts <= T_PAR; so <= tpar; end
              else begin ts <= T_STOP; so <= 1'b1; tstop2 <= 1'b0; end
            end else begin
              tbit <= tbit + 1'b1; so <= tsr[tbit + 1'b1]; tpar <= tpar ^ tsr[tbit + 1'b1];
            end
          end else tsub <= tsub + 1'b1;
          T_PAR: if (tsub == 4'd15) begin
            tsub <= '0; ts <= T_STOP; so <= 1'b1; tstop2 <= 1'b0;
          end else tsub <= tsub + 1'b1;
          T_STOP: if (tsub == 4'd15) begin
            tsub <= '0;
            if (tsb && !tstop2) tstop2 <= 1'b1;
            else ts <= T_IDLE;
          end else tsub <= tsub + 1'b1;
          default: ts <= T_IDLE;
        endcase
      end
    end
  end

  assign tbmt = !hold_full;
  assign eoc  = (ts == T_IDLE);

  // --------------------------------------------------------------- receiver
  typedef enum logic [2:0] {R_IDLE, R_START, R_DATA, R_PAR, R_STOP} rx_state_e;
  rx_state_e  rs;
  logic [3:0] rsub;
  logic [2:0] rbit;
  logic [7:0] rsr;
  logic       rpar;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_IDLE; rsub <= '0; rbit <= '0; rsr <= '0; rpar <= 1'b0;
      rd <= '0; dav <= 1'b0; pe <= 1'b0; fe <= 1'b0; ovr <= 1'b0;
    end else begin
      if (!rdav_n) dav <= 1'b0;
      if (tick) begin
        unique case (rs)
          R_IDLE: if (!si) begin rs <= R_START; rsub <= '0; end
          R_START: if (rsub == 4'd7) begin
            rsub <= '0;
            if (!si) begin rs <= R_DATA; rbit <= '0; rsr <= '0; rpar <= ~eps; end
            else rs <= R_IDLE;   // glitch, not a start bit
          end else rsub <= rsub + 1'b1;
          R_DATA: if (rsub == 4'd15) begin
            rsub <= '0;
            rsr[rbit] <= si;
            rpar <= rpar ^ si;
            if (rbit == last_bit) rs <= np ? R_STOP : R_PAR;
            else rbit <= rbit + 1'b1;
          end else rsub <= rsub + 1'b1;
          R_PAR: if (rsub == 4'd15) begin
            rsub <= '0; rs <= R_STOP;
            pe <= (si != rpar);
          end else rsub <= rsub + 1'b1;
          R_STOP: if (rsub == 4'd15) begin
            rsub <= '0; rs <= R_IDLE;
            fe  <= !si;
            if (np) pe <= 1'b0;
            ovr <= dav && rdav_n;
            rd  <= rsr;
            dav <= 1'b1;
          end else rsub <= rsub + 1'b1;
          default: rs <= R_IDLE;
        endcase
      end
    end
  end

endmodule

// pia6820: peripheral interface adapter after the MC6820 PIA.
//
// Two nearly identical sides, A and B, each with a data direction register
// (DDR), an output register (OR) and a control register (CR), reached through
// two register-select inputs; CR bit 2 chooses whether offset 0 (2 for B)
// reaches the DDR (0) or the OR (1). A DDR bit of 1 makes the pin an output
// driven from the OR, 0 makes it an input; reading the data register returns
// the OR bit for output pins and the pin level for input pins. CR bits:
//   0  interrupt enable for C1      1  active C1 edge (1 = low to high)
//   2  DDR/OR select                3  C2 interrupt enable (bit 5 = 0) or
//   4  active C2 edge (bit 5 = 0)      handshake control (bit 5 = 1)
//   5  C2 is an output              6  C2 flag (read only)   7  C1 flag (read only)
// With bit 5 = 1: bits 5,4 = 1,1 drive C2 with the level of bit 3; bits 5,4 =
// 1,0 select automatic handshaking, where bit 3 chooses between a one-cycle
// pulse and a level that returns high on the next active C1 edge. On side A the
// handshake line goes low after the CPU reads the A data register; on side B it
// goes low after the CPU writes the B data register. The register layout, the
// meaning of every CR bit, the chip selects and the interrupt outputs follow
// the design description. Following its wording, flags 6 and 7 are cleared by
// a read of the control register. The handshake sequences themselves are only
// named there; the ones built here follow the usual behaviour of the part.
//
// Timing: clk is the E clock. A bus access lasts one clk cycle with the chip
// selected; writes and read side effects take place at the end of that cycle,
// read data (dout) is combinational. Pins are split into in/out/enable
// (no tri-states): pa_oe/pb_oe are the DDRs. irqa_n/irqb_n are active low.
module pia6820 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cs0,
  input  logic       cs1,
  input  logic       cs2_n,
  input  logic [1:0] rs,
  input  logic       rw,      // 1 = read
  input  logic [7:0] din,
  output logic [7:0] dout,
  // side A
  input  logic [7:0] pa_in,
  output logic [7:0] pa_out,
  output logic [7:0] pa_oe,
  input  logic       ca1,
  input  logic       ca2_in,
  output logic       ca2_out,
  output logic       ca2_oe,
  output logic       irqa_n,
  // side B
  input  logic [7:0] pb_in,
  output logic [7:0] pb_out,
  output logic [7:0] pb_oe,
  input  logic       cb1,
  input  logic       cb2_in,
  output logic       cb2_out,
  output logic       cb2_oe,
  output logic       irqb_n
);

  logic [7:0] ddra, ora, ddrb, orb;
  logic [5:0] cra, crb;          // writable bits 5..0
  logic       irqa1, irqa2, irqb1, irqb2;
  logic       ca1_q, ca2_q, cb1_q, cb2_q;
  logic       ca2_hs, cb2_hs;    // handshake output levels

  logic sel;
  assign sel = cs0 && cs1 && !cs2_n;

  logic rd_cra, rd_crb, rd_ora, wr_orb;
  assign rd_cra = sel && rw && rs == 2'd1;
  assign rd_crb = sel && rw && rs == 2'd3;
  assign rd_ora = sel && rw && rs == 2'd0 && cra[2];
  assign wr_orb = sel && !rw && rs == 2'd2 && crb[2];

  // Active transitions on the control inputs.
  logic ca1_act, ca2_act, cb1_act, cb2_act;
  assign ca1_act = cra[1] ? (!ca1_q && ca1) : (ca1_q && !ca1);
  assign cb1_act = crb[1] ? (!cb1_q && cb1) : (cb1_q && !cb1);
  assign ca2_act = !cra[5] && (cra[4] ? (!ca2_q && ca2_in) : (ca2_q && !ca2_in));
  assign cb2_act = !crb[5] && (crb[4] ? (!cb2_q && cb2_in) : (cb2_q && !cb2_in));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ddra <= '0; ora <= '0; cra <= '0;
      ddrb <= '0; orb <= '0; crb <= '0;
      irqa1 <= 1'b0; irqa2 <= 1'b0; irqb1 <= 1'b0; irqb2 <= 1'b0;
      ca1_q <= 1'b0; ca2_q <= 1'b0; cb1_q <= 1'b0; cb2_q <= 1'b0;
      ca2_hs <= 1'b1; cb2_hs <= 1'b1;
    end else begin
      ca1_q <= ca1; ca2_q <= ca2_in; cb1_q <= cb1; cb2_q <= cb2_in;

      // register writes
      if (sel && !rw) begin
        unique case (rs)
          2'd0: if (cra[2]) ora <= din; else ddra <= din;
          2'd1: cra <= din[5:0];
          2'd2: if (crb[2]) orb <= din; else ddrb <= din;
          2'd3: crb <= din[5:0];
        endcase
      end

      // interrupt flags: set on an active edge, cleared by reading the CR
      if (ca1_act)     irqa1 <= 1'b1;
      else if (rd_cra) irqa1 <= 1'b0;
      if (ca2_act)     irqa2 <= 1'b1;
      else if (rd_cra) irqa2 <= 1'b0;
      if (cb1_act)     irqb1 <= 1'b1;
      else if (rd_crb) irqb1 <= 1'b0;
      if (cb2_act)     irqb2 <= 1'b1;
      else if (rd_crb) irqb2 <= 1'b0;

      // automatic handshake on CA2 (read strobe) and CB2 (write strobe)
      if (rd_ora)                       ca2_hs <= 1'b0;
      else if (cra[3] || ca1_act)       ca2_hs <= 1'b1;
      if (wr_orb)                       cb2_hs <= 1'b0;
      else if (crb[3] || cb1_act)       cb2_hs <= 1'b1;
    end
  end

  // C2 pin drive
  always_comb begin
    ca2_oe  = cra[5];
    cb2_oe  = crb[5];
    ca2_out = cra[4] ? cra[3] : ca2_hs;
    cb2_out = crb[4] ? crb[3] : cb2_hs;
  end

  assign pa_out = ora;
  assign pa_oe  = ddra;
  assign pb_out = orb;
  assign pb_oe  = ddrb;

  assign irqa_n = !((irqa1 && cra[0]) || (irqa2 && cra[3] && !cra[5]));
  assign irqb_n = !((irqb1 && crb[0]) || (irqb2 && crb[3] && !crb[5]));

  always_comb begin
    unique case (rs)
      2'd0:    dout = cra[2] ? ((ora & ddra) | (pa_in & ~ddra)) : ddra;
      2'd1:    dout = {irqa1, irqa2, cra};
      2'd2:    dout = crb[2] ? ((orb & ddrb) | (pb_in & ~ddrb)) : ddrb;
      default: dout = {irqb1, irqb2, crb};
    endcase
  end

endmodule

// bus_conv: SS-50 to S-100 bus conversion card.
//
// Lets the 6800 system (SS-50 bus) drive a signature module built for the
// S-100 bus. Three parts, each following its schematic in the description:
//  * Address: the sixteen address lines are buffered straight through
//    (4050 non-inverting buffers).
//  * Data: the SS-50 data lines are active low and bidirectional, the S-100
//    ones are split into data-out (DO) and data-in (DI). Inverting 8T26A
//    transceivers connect them: the driver half always feeds DO from the
//    SS-50 lines, the receiver half drives the SS-50 lines from DI only while
//    "Modified R/W" is high. Here that is ss_dn_out with enable ss_dn_oe.
//  * Control: 4049 inverters, two 3-input NANDs (74LS10), a 7404 inverter and
//    an 8-input NAND decoder (74LS30), wired as drawn:
//      rw_b    = ~R/W           (4049)      s100_rw = ~rw_b = R/W
//      vma_b   = ~VMA-input     (4049)      smemr_n = ~vma_b
//      s100_phi2 = ~Phi2-input  (4049)
//      pwr_n   = NAND(rw_b, s100_phi2, vma_b)      mwrite = ~pwr_n
//      pdbin_n = NAND(vma_b, s100_phi2, R/W)
//      mod_rw  = ~NAND(vma_b, ~A13, A14, A15, s100_rw, 1, 1, 1)
//    A "*" on a schematic name marks it active low (smemr_n, pwr_n, pdbin_n).
//    Modified R/W is high for a read cycle in $C000-$DFFF. SINP and SOUT
//    are held low through resistors to ground, RESET passes straight through.
//    The VMA and Phi2 inputs are taken at the polarity the schematic's
//    inverters imply: both are active low at this card's inputs.
// Purely combinational.
module bus_conv (
  // SS-50 side
  input  logic [15:0] ss_a,
  input  logic [7:0]  ss_dn_in,   // active-low data from the SS-50 bus
  output logic [7:0]  ss_dn_out,  // active-low data onto the SS-50 bus
  output logic        ss_dn_oe,
  input  logic        ss_rw,      // 1 = read
  input  logic        ss_vma_n,
  input  logic        ss_phi2_n,
  input  logic        ss_reset,
  // S-100 side
  output logic [15:0] s_a,
  output logic [7:0]  s_do,
  input  logic [7:0]  s_di,
  output logic        s_rw,
  output logic        smemr_n,
  output logic        s_phi2,
  output logic        pwr_n,
  output logic        mwrite,
  output logic        pdbin_n,
  output logic        sinp,
  output logic        sout,
  output logic        s_reset,
  output logic        mod_rw
);

  logic rw_b, vma_b;

  // Fig. A1: address buffers
  assign s_a = ss_a;

  // Fig. A3: control signals
  assign rw_b    = ~ss_rw;
  assign s_rw    = ~rw_b;
  assign vma_b   = ~ss_vma_n;
  assign smemr_n = ~vma_b;
  assign s_phi2  = ~ss_phi2_n;
  assign pwr_n   = ~(rw_b & s_phi2 & vma_b);
  assign mwrite  = ~pwr_n;
  assign pdbin_n = ~(vma_b & s_phi2 & ss_rw);
  assign mod_rw  = ~(~(vma_b & ~ss_a[13] & ss_a[14] & ss_a[15] & s_rw & 1'b1 & 1'b1 & 1'b1));
  assign sinp    = 1'b0;
  assign sout    = 1'b0;
  assign s_reset = ss_reset;

  // Fig. A2: inverting transceivers
  assign s_do      = ~ss_dn_in;
  assign ss_dn_out = ~s_di;
  assign ss_dn_oe  = mod_rw;

endmodule

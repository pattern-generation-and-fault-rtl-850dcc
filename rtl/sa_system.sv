// sa_system: microprocessor-based signature analysis system, top level.
//
// A test sequencer (standing in for the 6800 and its programs) drives a
// 6800-style bus. The I/O decoder selects the PIA in slot 6 ($8018-$801B);
// PIA side B sends the stimulus to the circuit under test (CUT) and its CB2
// line gives the CUT a strobe per word; PIA side A reads the CUT's parallel
// output back. The same bus reaches the signature module through the SS-50 to
// S-100 converter: it is driven with active-low VMA, Phi2 and data as on the
// SS-50 side, and the module sits at $C000-$C007, inside the converter's
// read-decode window. The CUT supplies the module's clock (its baud clock),
// start (stimulus bit 8) and stop (NAND of the stimulus bits); probe_sel picks
// which CUT node the probe touches. One run of the sequencer produces the
// signature of that node and either learns it as good or compares it with the
// good one. The display shows the signature in the 0123456789ACFHPU set.
// Everything is synchronous to clk (the system / E clock); one bus cycle per
// clock.
module sa_system
  import sa_pkg::*;
#(
  parameter int unsigned PAT_HOLD   = 15,
  parameter int unsigned DELAY_CYC  = 2040,
  parameter int unsigned BAUD_DIV   = 52,
  parameter int unsigned NODES      = CUT_NODES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     go,
  input  logic                     learn,
  input  logic [3:0]               probe_sel,
  input  logic                     sw_neg_pulse,
  input  logic                     sw_pos_pulse,
  input  logic                     serial_in,
  output logic                     serial_out,
  output logic [7:0]               par_out,
  output logic                     strobe_out,
  output logic                     busy,
  output logic                     done,
  output logic [15:0]              signature,
  output logic                     fail,
  output logic [NODES-1:0]         fault_map,
  output logic [7:0]               pa_result,
  output logic                     stopped_by_cut,
  output logic [3:0][7:0]          disp_chars,
  output logic [3:0][6:0]          disp_seg,
  output logic [3:0]               disp_dp,
  output logic                     window_open,
  output logic                     irqa_n,
  output logic                     irqb_n
);

  logic        cut_clk;

  // ---------------------------------------------------------- host bus
  logic [15:0] addr;
  logic        rw, vma;
  logic [7:0]  wdata, rdata;

  diag_controller #(
    .PAT_HOLD(PAT_HOLD), .DELAY_CYC(DELAY_CYC), .NODES(NODES)
  ) u_ctl (
    .clk, .rst_n, .go, .learn, .node(probe_sel), .cut_clk,
    .busy, .done, .signature, .fail, .fault_map, .pa_result, .stopped_by_cut,
    .addr, .rw, .vma, .wdata, .rdata
  );

  // ------------------------------------------------- diagnostic interface
  logic [7:0] slot_sel;
  logic [1:0] rs;
  io_decoder u_dec (.addr, .vma, .slot_sel, .rs);

  logic [7:0] pia_dout, pa_out, pa_oe, pb_out, pb_oe;
  logic       ca2_out, ca2_oe, cb2_out, cb2_oe;
  logic [7:0] cut_par_out, stim;
  logic       cut_strobe_out;

  pia6820 u_pia (
    .clk, .rst_n,
    .cs0(slot_sel[6]), .cs1(1'b1), .cs2_n(1'b0),
    .rs, .rw, .din(wdata), .dout(pia_dout),
    .pa_in(cut_par_out), .pa_out, .pa_oe,
    .ca1(cut_strobe_out), .ca2_in(1'b1), .ca2_out, .ca2_oe, .irqa_n,
    .pb_in(8'hFF), .pb_out, .pb_oe,
    .cb1(1'b0), .cb2_in(1'b1), .cb2_out, .cb2_oe, .irqb_n
  );

  // Undriven port pins float high (pull-ups).
  assign stim = (pb_out & pb_oe) | ~pb_oe;

  // --------------------------------------------------- bus converter
  logic [15:0] s_a;
  logic [7:0]  s_do, s_di, ss_dn_out;
  logic        ss_dn_oe, s_rw, smemr_n, s_phi2, pwr_n, mwrite, pdbin_n;
  logic        sinp, sout, s_reset, mod_rw;

  bus_conv u_conv (
    .ss_a(addr), .ss_dn_in(~wdata), .ss_dn_out, .ss_dn_oe,
    .ss_rw(rw), .ss_vma_n(~vma), .ss_phi2_n(~vma), .ss_reset(~rst_n),
    .s_a, .s_do, .s_di, .s_rw, .smemr_n, .s_phi2, .pwr_n, .mwrite, .pdbin_n,
    .sinp, .sout, .s_reset, .mod_rw
  );

  // read data back to the sequencer
  always_comb begin
    if (slot_sel[6])   rdata = pia_dout;
    else if (ss_dn_oe) rdata = ~ss_dn_out;
    else               rdata = 8'hFF;
  end

  // ------------------------------------------------ circuit under test
  logic                 start_sig, stop_sig, cut_strobe;
  logic [2:0]           rx_err;
  logic [CUT_NODES-1:0] nodes;

  assign cut_strobe = cb2_oe ? cb2_out : 1'b1;

  cut_board #(.BAUD_DIV(BAUD_DIV)) u_cut (
    .clk, .rst_n, .par_in(stim), .strobe_in(cut_strobe),
    .sw_neg_pulse, .sw_pos_pulse, .serial_in, .serial_out,
    .par_out(cut_par_out), .strobe_out(cut_strobe_out),
    .cut_clk, .start_sig, .stop_sig, .rx_err, .nodes
  );
  assign par_out    = cut_par_out;
  assign strobe_out = cut_strobe_out;

  // --------------------------------------------------- signature module
  logic [15:0] sm_signature;
  signature_module #(.BASE(16'hC000)) u_sm (
    .clk, .rst_n,
    .cut_clk, .start_in(start_sig), .stop_in(stop_sig), .probe(nodes[probe_sel]),
    .s_a, .s_do, .s_di, .pwr_n, .pdbin_n, .smemr_n,
    .signature(sm_signature), .disp_chars, .disp_seg, .disp_dp, .window_open
  );

endmodule

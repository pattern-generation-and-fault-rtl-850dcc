// signature_module: the signature analysis module (probe, start/stop control,
// signature register, display register) with its host register file.
//
// The circuit under test (CUT) supplies a clock, a start and a stop signal; the
// probe picks up the node being measured. All four inputs are brought into the
// system clock domain by two flip-flop stages and compared with a third stage
// to find edges, so the system clock must run well above the CUT clock. On an
// active CUT clock edge the probe value sampled just before that edge is the
// data bit (the description asks only for a short set-up time before the
// clock). The start/stop control opens and closes the window and the register
// compresses the data bits shifted in while it is open; when the window closes,
// the signature is frozen and copied to the display register.
//
// Host side: an S-100 style slave (address, data out of the CPU, data into the
// CPU, pulsed write strobe pwr_n, data-in enable pdbin_n, memory status smemr_n, all three active low).
// Eight byte registers sit at BASE..BASE+7 in the order used by the host
// software: 0 signature high byte, 1 signature low byte (both also writable,
// presetting that half of the signature register), 2 display control,
// 3 measurement control, 4/5 display register, 7 status (see sa_pkg).
// The measurement control bits (reset, go = arm on a 0->1 write, halt on a 0->1
// write, enable, and the edge polarity of clock, start and stop) and the status
// bits are this design's definition of what the software's bit masks do. A
// write takes effect on the system clock edge while pwr_n is low; read data is
// combinational and is driven only while the module is addressed and pdbin_n
// is low (otherwise 8'hFF, an idle bus). The base address 16'hC000 is this
// design's choice, inside the window that the bus converter decodes.
module signature_module
  import sa_pkg::*;
#(
  parameter logic [15:0] BASE = 16'hC000
) (
  input  logic            clk,
  input  logic            rst_n,
  // circuit-under-test side
  input  logic            cut_clk,
  input  logic            start_in,
  input  logic            stop_in,
  input  logic            probe,
  // S-100 host side
  input  logic [15:0]     s_a,
  input  logic [7:0]      s_do,
  output logic [7:0]      s_di,
  input  logic            pwr_n,
  input  logic            pdbin_n,
  input  logic            smemr_n,
  // display
  output logic [15:0]     signature,
  output logic [3:0][7:0] disp_chars,
  output logic [3:0][6:0] disp_seg,
  output logic [3:0]      disp_dp,
  output logic            window_open
);

  // ---------------------------------------------------------------- sampler
  logic [3:0] sync1, sync2, sync3;  // {probe, stop, start, clk}
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      sync3 <= '0;
    end else begin
      sync1 <= {probe, stop_in, start_in, cut_clk};
      sync2 <= sync1;
      sync3 <= sync2;
    end
  end

  // ------------------------------------------------------- host registers
  logic [7:0] dctl, mctl;
  logic       sel, wr;
  logic [2:0] ra;
  assign sel = (s_a[15:3] == BASE[15:3]);
  assign ra  = s_a[2:0];
  assign wr  = sel && !pwr_n;

  logic arm, halt;
  assign arm  = wr && (ra == REG_MCTL) && s_do[MC_GO]   && !mctl[MC_GO];
  assign halt = wr && (ra == REG_MCTL) && s_do[MC_HALT] && !mctl[MC_HALT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dctl <= '0;
      mctl <= MCTL_RESET_VALUE;
    end else if (wr) begin
      if (ra == REG_DCTL) dctl <= s_do;
      if (ra == REG_MCTL) mctl <= s_do;
    end
  end

  logic cut_edge, start_evt, stop_evt, data_bit;
  assign cut_edge  = mctl[MC_CLK_NEG] ? (sync3[0] && !sync2[0]) : (!sync3[0] && sync2[0]);
  assign start_evt = mctl[MC_STA_NEG] ? (sync3[1] && !sync2[1]) : (!sync3[1] && sync2[1]);
  assign stop_evt  = mctl[MC_STO_NEG] ? (sync3[2] && !sync2[2]) : (!sync3[2] && sync2[2]);
  assign data_bit  = sync3[3];

  // ------------------------------------------------------- window control
  logic clr, shift_en, ready, open_w, idle, done, done_q;
  start_stop_ctrl u_ctrl (
    .clk, .rst_n,
    .soft_rst (mctl[MC_RESET]),
    .arm, .halt,
    .enable   (mctl[MC_ENABLE]),
    .cut_edge, .start_evt, .stop_evt,
    .clr, .shift_en, .ready,
    .open     (open_w),
    .idle, .done
  );

  sig_register #(.WIDTH(SIG_W), .TAPS(SIG_TAPS)) u_sig (
    .clk, .rst_n,
    .clr      (clr || mctl[MC_RESET]),
    .load     (wr && (ra == REG_SIG_L || ra == REG_SIG_R)),
    .load_val (ra == REG_SIG_L ? {s_do, signature[7:0]} : {signature[15:8], s_do}),
    .shift_en,
    .din      (data_bit),
    .sig      (signature)
  );

  // Copy to the display one cycle after the window closes, when the last
  // shifted bit has settled in the register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_q <= 1'b0;
    else        done_q <= done;
  end

  logic [15:0] disp;
  sig_display u_disp (
    .clk, .rst_n,
    .load  (done && !done_q),
    .sig   (signature),
    .wr_hi (wr && ra == REG_DISP_L),
    .wr_lo (wr && ra == REG_DISP_R),
    .wdata (s_do),
    .blank (dctl[DC_BLANK]),
    .dp_in (dctl[3:0]),
    .disp,
    .chars (disp_chars),
    .seg   (disp_seg),
    .dp    (disp_dp)
  );

  assign window_open = open_w;

  // ------------------------------------------------------------ read path
  logic [7:0] status, rdata;
  always_comb begin
    status           = '0;
    status[ST_DONE]  = done;
    status[ST_OPEN]  = open_w;
    status[ST_IDLE]  = idle;
    status[ST_READY] = ready;
    unique case (ra)
      REG_SIG_L:  rdata = signature[15:8];
      REG_SIG_R:  rdata = signature[7:0];
      REG_DCTL:   rdata = dctl;
      REG_MCTL:   rdata = mctl;
      REG_DISP_L: rdata = disp[15:8];
      REG_DISP_R: rdata = disp[7:0];
      REG_STATUS: rdata = status;
      default:    rdata = 8'hFF;
    endcase
  end
  assign s_di = (sel && !pdbin_n && !smemr_n) ? rdata : 8'hFF;

endmodule

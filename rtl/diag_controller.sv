// diag_controller: test sequencer of the diagnostic system.
//
// Performs in hardware what the host programs do, as bus cycles on a 6800-style
// bus (addr, rw, vma, wdata, rdata; one clock per cycle):
//  1. initialization: reset the signature module, select a rising start edge
//     and a falling stop edge, set up the parallel interface (PIA) with side B
//     all outputs and side A all inputs;
//  2. arm: enable the module and give it a go edge, then wait until its status
//     reports it ready;
//  3. pattern generator: write the start code 8'h80 (bit 8 alone) to the PIA
//     B data register, then the count 8'h01, 8'h02 ... 8'hFF, 8'h00; a write
//     every PAT_HOLD clocks. The all-ones word is the end-of-pattern code that
//     makes the circuit under test raise its stop signal;
//  4. wait DELAY_CYC clocks for the signature to settle, give the module a halt
//     edge (which only matters if the stop never came), wait for its status to
//     report it idle, read the two signature bytes and the PIA A data register;
//  5. store the signature as the good one for probe position node (learn = 1)
//     or compare it with the stored good one (learn = 0): fail is set and the
//     node's bit in fault_map raised when they differ.
// Sequence, start/stop codes and count pattern follow the host programs; the
// PIA B control value is 8'h2E here rather than the program's 8'h3E, so that
// CB2 gives the circuit under test a strobe pulse after every pattern write
// instead of a constant level. PAT_HOLD = 15 is the cycle count of the
// program's output loop (INC, LDA, STA, CBA, BNE on a 6800) and DELAY_CYC =
// 2040 its 255-pass delay loop; the good-signature table of NODES entries is
// this design's form of the stored signatures. The first pattern write waits
// for a rising edge of the CUT clock, so that every run stands in the same
// phase to that clock and repeated runs give the same signatures; the host
// programs have no such alignment, this is this design's choice. done pulses for one cycle at
// the end of a run; busy is high from go to done.
module diag_controller
  import sa_pkg::*;
#(
  parameter int unsigned PAT_HOLD  = 15,
  parameter int unsigned DELAY_CYC = 2040,
  parameter int unsigned NODES     = 16,
  parameter logic [15:0] SM_BASE   = 16'hC000,
  parameter logic [15:0] PIA_BASE  = 16'h8018,
  parameter logic [7:0]  CRB_RUN   = 8'h2E
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     go,
  input  logic                     learn,
  input  logic [$clog2(NODES)-1:0] node,
  input  logic                     cut_clk,         // clock of the circuit under test
  output logic                     busy,
  output logic                     done,
  output logic [15:0]              signature,
  output logic                     fail,
  output logic [NODES-1:0]         fault_map,
  output logic [7:0]               pa_result,
  output logic                     stopped_by_cut,  // window closed by the CUT stop signal
  // bus master
  output logic [15:0]              addr,
  output logic                     rw,
  output logic                     vma,
  output logic [7:0]               wdata,
  input  logic [7:0]               rdata
);

  // measurement control values
  localparam logic [7:0] EDGE_SEL = 8'h1 << MC_STO_NEG;
  localparam logic [7:0] M_RESET  = EDGE_SEL | 8'h07;            // reset, go=1, halt=1
  localparam logic [7:0] M_IDLE   = EDGE_SEL | 8'h06;
  localparam logic [7:0] M_ENGO0  = EDGE_SEL | 8'h0C;            // enable, halt=1, go=0
  localparam logic [7:0] M_ENGO1  = EDGE_SEL | 8'h0E;            // go rises: arm
  localparam logic [7:0] M_ENHL0  = EDGE_SEL | 8'h0A;            // halt=0
  localparam logic [7:0] M_ENHL1  = EDGE_SEL | 8'h0E;            // halt rises

  typedef enum logic [2:0] {OP_WR, OP_RD, OP_WAIT, OP_PAT, OP_DELAY, OP_END} op_e;
  typedef struct packed {
    op_e         op;
    logic [15:0] a;
    logic [7:0]  d;      // write data, or status mask for OP_WAIT
  } step_t;

  function automatic step_t prog(input logic [4:0] i);
    unique case (i)
      5'd0:  return '{OP_WR,    SM_BASE + 16'(REG_MCTL), M_RESET};
      5'd1:  return '{OP_WR,    SM_BASE + 16'(REG_MCTL), M_IDLE};
      5'd2:  return '{OP_WR,    SM_BASE + 16'(REG_DCTL), 8'h00};
      5'd3:  return '{OP_WR,    PIA_BASE + 16'd3, 8'h00};         // CRB: reach DDRB
      5'd4:  return '{OP_WR,    PIA_BASE + 16'd2, 8'hFF};         // DDRB: all outputs
      5'd5:  return '{OP_WR,    PIA_BASE + 16'd3, CRB_RUN};       // CRB: reach ORB
      5'd6:  return '{OP_WR,    PIA_BASE + 16'd1, 8'h04};         // CRA: reach ORA
      5'd7:  return '{OP_WR,    SM_BASE + 16'(REG_MCTL), M_ENGO0};
      5'd8:  return '{OP_WR,    SM_BASE + 16'(REG_MCTL), M_ENGO1};
      5'd9:  return '{OP_WAIT,  SM_BASE + 16'(REG_STATUS), 8'h1 << ST_READY};
      5'd10: return '{OP_PAT,   PIA_BASE + 16'd2, 8'h80};
      5'd11: return '{OP_DELAY, 16'h0, 8'h00};
      5'd12: return '{OP_RD,    SM_BASE + 16'(REG_STATUS), 8'h00};  // stop seen?
      5'd13: return '{OP_WR,    SM_BASE + 16'(REG_MCTL), M_ENHL0};
      5'd14: return '{OP_WR,    SM_BASE + 16'(REG_MCTL), M_ENHL1};
      5'd15: return '{OP_WAIT,  SM_BASE + 16'(REG_STATUS), 8'h1 << ST_IDLE};
      5'd16: return '{OP_RD,    SM_BASE + 16'(REG_SIG_L), 8'h00};
      5'd17: return '{OP_RD,    SM_BASE + 16'(REG_SIG_R), 8'h00};
      5'd18: return '{OP_RD,    PIA_BASE + 16'd0, 8'h00};
      default: return '{OP_END, 16'h0, 8'h00};
    endcase
  endfunction

  localparam int unsigned CW = $clog2(DELAY_CYC + PAT_HOLD + 2);

  logic [4:0]    pc;
  logic          running;
  logic [7:0]    pat;      // current pattern value
  logic          pat_first;
  logic [CW-1:0] wait_cnt;
  step_t         st;
  assign st = prog(pc);

  logic [15:0]      good [NODES];
  logic             cclk_q, cclk_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cclk_q <= 1'b0;
    else        cclk_q <= cut_clk;
  end
  assign cclk_rise = cut_clk && !cclk_q;
  logic [NODES-1:0] good_valid;

  // Bus drive: a cycle is issued whenever the current step touches the bus
  // and no wait count is pending.
  always_comb begin
    addr  = st.a;
    wdata = st.d;
    rw    = 1'b1;
    vma   = 1'b0;
    if (running && wait_cnt == '0) begin
      unique case (st.op)
        OP_WR:   begin vma = 1'b1; rw = 1'b0; end
        OP_RD,
        OP_WAIT: vma = 1'b1;
        OP_PAT:  if (!pat_first || cclk_rise) begin vma = 1'b1; rw = 1'b0; wdata = pat; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; running <= 1'b0; pat <= 8'h80; pat_first <= 1'b1;
      wait_cnt <= '0; busy <= 1'b0; done <= 1'b0; signature <= '0;
      fail <= 1'b0; fault_map <= '0; pa_result <= '0; good_valid <= '0;
      stopped_by_cut <= 1'b0;
      for (int i = 0; i < NODES; i++) good[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (go) begin
          running <= 1'b1; busy <= 1'b1; pc <= '0; wait_cnt <= '0;
          pat <= 8'h80; pat_first <= 1'b1;
        end
      end else if (wait_cnt != '0) begin
        wait_cnt <= wait_cnt - 1'b1;
      end else begin
        unique case (st.op)
          OP_WR: pc <= pc + 1'b1;
          OP_RD: begin
            pc <= pc + 1'b1;
            if (pc == 5'd12) stopped_by_cut <= rdata[ST_DONE];
            if (pc == 5'd16) signature[15:8] <= rdata;
            if (pc == 5'd17) signature[7:0]  <= rdata;
            if (pc == 5'd18) pa_result       <= rdata;
          end
          OP_WAIT: if ((rdata & st.d) != 8'h00) pc <= pc + 1'b1;
          OP_PAT: if (!pat_first || cclk_rise) begin
            wait_cnt <= CW'(PAT_HOLD - 1);
            if (!pat_first && pat == 8'h00) pc <= pc + 1'b1;
            if (pat_first) begin pat <= 8'h01; pat_first <= 1'b0; end
            else pat <= pat + 1'b1;
          end
          OP_DELAY: begin
            wait_cnt <= CW'(DELAY_CYC - 1);
            pc <= pc + 1'b1;
          end
          default: begin   // OP_END: store or compare
            running <= 1'b0; busy <= 1'b0; done <= 1'b1;
            if (learn) begin
              good[node]       <= signature;
              good_valid[node] <= 1'b1;
              fault_map[node]  <= 1'b0;
              fail             <= 1'b0;
            end else begin
              fail            <= good_valid[node] && (good[node] != signature);
              fault_map[node] <= good_valid[node] && (good[node] != signature);
            end
          end
        endcase
      end
    end
  end

endmodule

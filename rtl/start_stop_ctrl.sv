// start_stop_ctrl: measurement window ("gate") control of the signature module.
//
// The module is armed by the host (arm pulse), which also empties the
// signature register (clr). A start transition of the circuit under test
// opens the window and a stop transition closes it, but both only take effect
// on the next active edge of the CUT clock, as the design description requires
// ("The Start Signal along with the Clock Signal starts shifting ... The Stop
// Signal along with the Clock Signal freezes the Shift Register").
// Transitions are captured at the system clock rate (start_evt / stop_evt) and
// held until that CUT clock edge, so a start or stop pulse shorter than one CUT
// clock period is not lost; that latching is this design's choice.
// Window rule (this design's choice): the bit present at the clock edge that
// accepts the start is the first bit shifted; the bit at the clock edge that
// accepts the stop is not shifted. The window therefore holds exactly the
// clock edges from the start edge up to, not including, the stop edge.
// halt closes the window at once from the host. enable low makes the CUT clock
// ignored. Everything runs on the system clock; cut_edge, start_evt and
// stop_evt are one-cycle pulses from the input sampler.
module start_stop_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic soft_rst,   // synchronous reset from the host
  input  logic arm,        // pulse: arm and clear
  input  logic halt,       // pulse: close window now
  input  logic enable,     // accept CUT clock edges
  input  logic cut_edge,   // pulse: active CUT clock edge
  input  logic start_evt,  // pulse: active start transition
  input  logic stop_evt,   // pulse: active stop transition
  output logic clr,        // empty the signature register
  output logic shift_en,   // shift the sampled data bit in
  output logic ready,      // armed or window open
  output logic open,       // window open
  output logic idle,       // neither armed nor open
  output logic done        // a window has closed since the last arm
);

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_OPEN} state_e;
  state_e state;
  logic   start_pend, stop_pend;
  logic   edge_ok;

  assign edge_ok = cut_edge && enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      start_pend <= 1'b0;
      stop_pend  <= 1'b0;
      done       <= 1'b0;
    end else if (soft_rst) begin
      state      <= S_IDLE;
      start_pend <= 1'b0;
      stop_pend  <= 1'b0;
      done       <= 1'b0;
    end else if (arm) begin
      state      <= S_ARMED;
      start_pend <= 1'b0;
      stop_pend  <= 1'b0;
      done       <= 1'b0;
    end else if (halt && state != S_IDLE) begin
      state      <= S_IDLE;
      start_pend <= 1'b0;
      stop_pend  <= 1'b0;
      done       <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_ARMED: begin
          if (edge_ok && (start_pend || start_evt)) begin
            state      <= S_OPEN;
            start_pend <= 1'b0;
            stop_pend  <= 1'b0;
          end else if (start_evt) begin
            start_pend <= 1'b1;
          end
        end
        S_OPEN: begin
          if (edge_ok && (stop_pend || stop_evt)) begin
            state     <= S_IDLE;
            stop_pend <= 1'b0;
            done      <= 1'b1;
          end else if (stop_evt) begin
            stop_pend <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    clr      = arm;
    shift_en = 1'b0;
    if (!soft_rst && !arm && !halt && edge_ok) begin
      if (state == S_ARMED && (start_pend || start_evt)) shift_en = 1'b1;
      if (state == S_OPEN && !(stop_pend || stop_evt))   shift_en = 1'b1;
    end
  end

  assign ready = (state != S_IDLE);
  assign open  = (state == S_OPEN);
  assign idle  = (state == S_IDLE);

endmodule

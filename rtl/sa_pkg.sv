// sa_pkg: constants and helper functions shared by the signature analysis system.
//
// The signature register is 16 bits wide with feedback taps at register
// positions 7, 9, 12 and 16 (polynomial x^16 + x^12 + x^9 + x^7 + 1), and each
// nibble of a signature is shown as one of the sixteen characters
// "0123456789ACFHPU", chosen because all of them can be drawn on a
// 7-segment digit. Both facts come from the design description.
// The signature-module register offsets and control bits follow the order and
// bit values used by the host control software (offsets 0..5 and 7; bit masks
// $01, $02, $04, $08, $10, $40, $80); what each bit does in hardware is this
// design's own definition. The 7-segment patterns are this design's choice.
package sa_pkg;

  localparam int unsigned SIG_W = 16;
  // Bit i of the mask is register position i+1: positions 16, 12, 9, 7.
  localparam logic [SIG_W-1:0] SIG_TAPS = 16'h8940;

  // ---------------------------------------------------------------- display
  // ASCII character for a signature nibble.
  function automatic logic [7:0] sig_char(input logic [3:0] nib);
    unique case (nib)
      4'hA:    return 8'h41;  // A
      4'hB:    return 8'h43;  // C
      4'hC:    return 8'h46;  // F
      4'hD:    return 8'h48;  // H
      4'hE:    return 8'h50;  // P
      4'hF:    return 8'h55;  // U
      default: return 8'h30 + {4'h0, nib};
    endcase
  endfunction

  // 7-segment pattern, bit order {g,f,e,d,c,b,a}, 1 = segment lit.
  function automatic logic [6:0] sig_seg(input logic [3:0] nib);
    unique case (nib)
      4'h0: return 7'b0111111;
      4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;
      4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;
      4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;
      4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;
      4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;  // A
      4'hB: return 7'b0111001;  // C
      4'hC: return 7'b1110001;  // F
      4'hD: return 7'b1110110;  // H
      4'hE: return 7'b1110011;  // P
      default: return 7'b0111110;  // U
    endcase
  endfunction

  // ------------------------------------------------- signature module map
  typedef enum logic [2:0] {
    REG_SIG_L  = 3'd0,  // signature bits 15..8 (left two characters); a write presets them
    REG_SIG_R  = 3'd1,  // signature bits 7..0 (right two characters); a write presets them
    REG_DCTL   = 3'd2,  // display control
    REG_MCTL   = 3'd3,  // measurement control
    REG_DISP_L = 3'd4,  // display register bits 15..8
    REG_DISP_R = 3'd5,  // display register bits 7..0
    REG_RSVD   = 3'd6,
    REG_STATUS = 3'd7   // status, read only
  } sm_reg_e;

  // Measurement control register bits.
  localparam int MC_RESET   = 0;  // 1: hold module in reset (software MMSET)
  localparam int MC_GO      = 1;  // 0->1: arm, wait for a start edge
  localparam int MC_HALT    = 2;  // 0->1: close the window from the host
  localparam int MC_ENABLE  = 3;  // 1: accept CUT clocks (software NES)
  localparam int MC_CLK_NEG = 4;  // 1: falling CUT clock edge is active
  localparam int MC_STA_NEG = 5;  // 1: start on falling edge
  localparam int MC_STO_NEG = 6;  // 1: stop on falling edge
  localparam logic [7:0] MCTL_RESET_VALUE = 8'h06;  // value the init program writes

  // Display control register bits.
  localparam int DC_BLANK = 4;    // 1: all digits dark
  // bits 3..0: decimal point of digit 3..0

  // Status register bits.
  localparam int ST_DONE  = 0;    // a measurement has ended since the last arm
  localparam int ST_OPEN  = 5;    // window open: data is being compressed
  localparam int ST_IDLE  = 6;    // not armed, window closed, signature frozen
  localparam int ST_READY = 7;    // armed or window open

  // ------------------------------------------ nodes of the circuit under test
  // Probe points of the UART board; index = position in cut_board.nodes.
  localparam int unsigned CUT_NODES = 16;
  typedef enum logic [3:0] {
    N_BIT1 = 4'd0, N_BIT2, N_BIT3, N_BIT4, N_BIT5, N_BIT6, N_BIT7, N_BIT8,
    N_SERIAL_OUT = 4'd8,  // UART serial output
    N_STOP       = 4'd9,  // 8-input NAND output (stop signal)
    N_STROBE     = 4'd10, // data strobe at the UART
    N_TBMT       = 4'd11, // transmitter buffer empty
    N_EOC        = 4'd12, // end of character
    N_STROBE_OUT = 4'd13, // received-data strobe output
    N_PULLUP     = 4'd14, // a format pin pulled up to +5 V
    N_GROUND     = 4'd15  // a format pin switched to ground
  } cut_node_e;

endpackage

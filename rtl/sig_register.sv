// sig_register: serial-in, parallel-out signature (CRC) register.
//
// On every clock with shift_en high the register shifts one place towards the
// most significant end; the new bit 0 is the serial input XORed with the
// register bits selected by TAPS. With the defaults this is the 16-bit register
// of the design description, feedback from positions 7, 9, 12 and 16
// (x^16 + x^12 + x^9 + x^7 + 1); position n is bit n-1 here. Feeding data in
// divides it by that polynomial, and what is left after the last shift is the
// signature. With din held at 0 and a non-zero start value it runs as a plain
// PRBS generator. clr (synchronous, higher priority than shift_en) empties the
// register before a measurement. load (below clr, above shift_en) writes
// load_val into the register, so the host can preset it, as the host software's
// signature-write routine does, or seed it for PRBS use. Output sig is the
// register itself, valid the cycle after the shift or load. Reset value 0 is
// this design's choice.
module sig_register #(
  parameter int unsigned       WIDTH = 16,
  parameter logic [WIDTH-1:0]  TAPS  = 16'h8940
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             load,
  input  logic [WIDTH-1:0] load_val,
  input  logic             shift_en,
  input  logic             din,
  output logic [WIDTH-1:0] sig
);

  logic feedback;
  assign feedback = din ^ (^(sig & TAPS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sig <= '0;
    else if (clr)      sig <= '0;
    else if (load)     sig <= load_val;
    else if (shift_en) sig <= {sig[WIDTH-2:0], feedback};
  end

endmodule

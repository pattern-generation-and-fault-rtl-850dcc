// baud_gen: baud rate generator of the circuit under test.
//
// Divides the system clock by DIV to give the square-wave UART clock clk_out
// (high for DIV/2 cycles, low for the rest) and a one-cycle pulse, tick, in
// the cycle where clk_out rises. clk_out is what the signature module receives
// as the CUT clock; tick is the same edge for logic inside the system clock
// domain. The description only names this generator; a counter is the
// simplest circuit that does its job. DIV = 52 (a 16x clock for 1200 baud from
// a 1 MHz system clock) is this design's choice.
module baud_gen #(
  parameter int unsigned DIV = 52
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out,
  output logic tick
);

  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
      tick    <= 1'b0;
    end else begin
      cnt  <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      tick <= (cnt == CW'(DIV - 1));
      if (cnt == CW'(DIV - 1))      clk_out <= 1'b1;
      else if (cnt == CW'(DIV / 2 - 1)) clk_out <= 1'b0;
    end
  end

endmodule

// sig_display: display register and character decoder of the signature module.
//
// The display register takes the 16-bit signature when load is high (the
// signature module pulses it when a window closes) and can also be written a
// byte at a time by the host (wr_hi / wr_lo). Each nibble, most significant
// first, is shown as one character of the set "0123456789ACFHPU" given by the
// design description (signature 16'hD953 reads "H953"). chars gives the ASCII
// code of each digit and seg the 7-segment pattern {g,f,e,d,c,b,a}; digit 3 is
// the leftmost. blank darkens all segments; dp[i] lights the decimal point of
// digit i. Outputs are registered values decoded combinationally. The segment
// patterns, the decimal points and the host write path are this design's
// choices.
module sig_display
  import sa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [15:0]       sig,
  input  logic              wr_hi,
  input  logic              wr_lo,
  input  logic [7:0]        wdata,
  input  logic              blank,
  input  logic [3:0]        dp_in,
  output logic [15:0]       disp,
  output logic [3:0][7:0]   chars,
  output logic [3:0][6:0]   seg,
  output logic [3:0]        dp
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) disp <= '0;
    else if (load) disp <= sig;
    else begin
      if (wr_hi) disp[15:8] <= wdata;
      if (wr_lo) disp[7:0]  <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      chars[i] = sig_char(disp[4*i +: 4]);
      seg[i]   = blank ? 7'b0 : sig_seg(disp[4*i +: 4]);
      dp[i]    = !blank && dp_in[i];
    end
  end

endmodule

// tb_pia6820: self-checking test of the peripheral interface adapter.
// Covers chip selects, the DDR/OR select bit, mixed input/output reads on both
// ports, the initialization the pattern program performs on side B (CRB = 0,
// DDRB = FF, CRB = 3E, then data writes), C1 edge flags for both edge
// selections and their clearing by a control-register read, interrupt
// outputs, C2 as an input, C2 as a fixed output level, and the automatic
// handshakes: CA2 low after a read of A data until a CA1 edge or for one
// cycle, CB2 low after a write of B data until a CB1 edge or for one cycle.
module tb_pia6820;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cs0 = 1'b0, cs1 = 1'b1, cs2_n = 1'b0, rw = 1'b1;
  logic [1:0] rs = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] pa_in = '0, pa_out, pa_oe, pb_in = '0, pb_out, pb_oe;
  logic ca1 = 1'b0, ca2_in = 1'b0, ca2_out, ca2_oe, irqa_n;
  logic cb1 = 1'b0, cb2_in = 1'b0, cb2_out, cb2_oe, irqb_n;
  int checks = 0, failures = 0;

  pia6820 dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wr(input logic [1:0] r, input logic [7:0] d);
    @(negedge clk); cs0 = 1'b1; rs = r; rw = 1'b0; din = d;
    @(negedge clk); cs0 = 1'b0; rw = 1'b1;
  endtask

  task automatic rd(input logic [1:0] r, output logic [7:0] d);
    @(negedge clk); cs0 = 1'b1; rs = r; rw = 1'b1;
    #1 d = dout;
    @(negedge clk); cs0 = 1'b0;
  endtask

  logic [7:0] d;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rd(2'd1, d); check("CRA reset", d, 8'h00);
    check("ports inputs after reset", {pa_oe, pb_oe}, 16'h0000);

    // writes ignored without chip select
    @(negedge clk); cs0 = 1'b0; cs1 = 1'b1; rs = 2'd0; rw = 1'b0; din = 8'hFF;
    @(negedge clk); rw = 1'b1;
    check("no select", pa_oe, 8'h00);
    @(negedge clk); cs0 = 1'b1; cs2_n = 1'b1; rs = 2'd0; rw = 1'b0; din = 8'hFF;
    @(negedge clk); rw = 1'b1; cs0 = 1'b0; cs2_n = 1'b0;
    check("cs2 high", pa_oe, 8'h00);

    // pattern program initialization of side B
    wr(2'd3, 8'h00);
    wr(2'd2, 8'hFF);
    check("DDRB", pb_oe, 8'hFF);
    wr(2'd3, 8'h3E);
    check("CB2 level high", {cb2_oe, cb2_out}, 2'b11);
    wr(2'd2, 8'h80);
    check("ORB start code", pb_out, 8'h80);
    wr(2'd2, 8'h5A);
    check("ORB", pb_out, 8'h5A);
    rd(2'd2, d); check("read ORB", d, 8'h5A);
    rd(2'd3, d); check("read CRB", d, 8'h3E);

    // side A: mixed directions
    wr(2'd1, 8'h00);
    wr(2'd0, 8'hF0);          // upper nibble outputs
    rd(2'd0, d); check("read DDRA", d, 8'hF0);
    wr(2'd1, 8'h04);
    wr(2'd0, 8'hA5);
    pa_in = 8'h3C;
    rd(2'd0, d); check("mixed read A", d, 8'hAC);
    check("pa_out", pa_out, 8'hA5);

    // CA1 falling edge flag (CRA bit1 = 0), interrupt disabled
    ca1 = 1'b1; repeat (2) @(negedge clk);
    ca1 = 1'b0; repeat (2) @(negedge clk);
    rd(2'd1, d); check("CA1 flag", d, 8'h84);
    check("no irq when disabled", irqa_n, 1'b1);
    rd(2'd1, d); check("flag cleared by CR read", d, 8'h04);
    // rising edge with interrupt enabled
    wr(2'd1, 8'h07);
    ca1 = 1'b1; repeat (2) @(negedge clk);
    check("irqa", irqa_n, 1'b0);
    ca1 = 1'b0; repeat (2) @(negedge clk);
    rd(2'd1, d); check("CA1 rising flag", d, 8'h87);
    check("irqa released", irqa_n, 1'b1);

    // CA2 input, rising edge, interrupt enabled (bits 5..3 = 0,1,1)
    wr(2'd1, 8'h1C);
    ca2_in = 1'b1; repeat (2) @(negedge clk);
    check("CA2 irq", irqa_n, 1'b0);
    rd(2'd1, d); check("CA2 flag", d, 8'h5C);
    ca2_in = 1'b0;

    // CA2 fixed output
    wr(2'd1, 8'h3C); check("CA2 = bit3 (1)", {ca2_oe, ca2_out}, 2'b11);
    wr(2'd1, 8'h34); check("CA2 = bit3 (0)", {ca2_oe, ca2_out}, 2'b10);

    // CA2 read handshake, restored by CA1 rising edge (bits = 1,0,0; bit1 = 1)
    wr(2'd1, 8'h26);
    check("CA2 idle high", ca2_out, 1'b1);
    rd(2'd0, d);
    @(negedge clk);
    check("CA2 low after read", ca2_out, 1'b0);
    repeat (3) @(negedge clk);
    check("CA2 held low", ca2_out, 1'b0);
    ca1 = 1'b1; repeat (2) @(negedge clk);
    check("CA2 back high on CA1", ca2_out, 1'b1);
    ca1 = 1'b0;
    // CA2 pulse mode
    wr(2'd1, 8'h2E);
    rd(2'd0, d);
    check("CA2 pulse low", ca2_out, 1'b0);
    @(negedge clk);
    check("CA2 pulse over", ca2_out, 1'b1);

    // CB2 write handshake, pulse mode (value the test sequencer uses)
    wr(2'd3, 8'h2E);
    check("CB2 idle", cb2_out, 1'b1);
    @(negedge clk); cs0 = 1'b1; rs = 2'd2; rw = 1'b0; din = 8'h11;
    @(negedge clk); cs0 = 1'b0; rw = 1'b1;
    check("CB2 low after write", cb2_out, 1'b0);
    @(negedge clk);
    check("CB2 pulse over", cb2_out, 1'b1);
    // CB2 restored by CB1 falling edge
    wr(2'd3, 8'h24);
    wr(2'd2, 8'h22);
    repeat (3) @(negedge clk);
    check("CB2 held low", cb2_out, 1'b0);
    cb1 = 1'b1; repeat (2) @(negedge clk);
    check("CB2 still low on rising CB1", cb2_out, 1'b0);
    cb1 = 1'b0; repeat (2) @(negedge clk);
    check("CB2 high on falling CB1", cb2_out, 1'b1);
    rd(2'd3, d); check("CB1 flag", d, 8'hA4);

    // port B input pins
    wr(2'd3, 8'h00); wr(2'd2, 8'h0F); wr(2'd3, 8'h04);
    pb_in = 8'hC3;
    rd(2'd2, d); check("mixed read B", d, 8'hC2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

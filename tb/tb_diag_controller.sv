// tb_diag_controller: self-checking test of the test sequencer.
// A bus model here plays the signature module and the PIA: it logs every
// write, answers status reads (ready after the go edge, idle after the halt
// edge, after a programmable number of polls) and returns a chosen
// signature. Checks: the exact initialization writes, the start code 8'h80
// followed by 8'h01 .. 8'hFF, 8'h00 at PAT_HOLD-cycle spacing, the first
// pattern write on a CUT clock rising edge, the delay before the halt, the
// reads, the signature assembled from the two bytes, port A capture, and the
// learn / compare / fault-map logic.
module tb_diag_controller;
  import sa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0, learn = 1'b0, cut_clk = 1'b0;
  logic [3:0] node = '0;
  logic busy, done, fail, stopped_by_cut;
  logic [15:0] signature, fault_map;
  logic [7:0] pa_result;
  logic [15:0] addr;
  logic rw, vma;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0;

  diag_controller dut (.*);
  always #5 clk = ~clk;
  // CUT clock: period 52 system clocks
  int cc = 0;
  always @(posedge clk) begin cc <= (cc == 51) ? 0 : cc + 1; cut_clk <= (cc < 26); end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // ------------------------------------------------------------ bus model
  logic [15:0] model_sig = 16'hD953;
  logic [7:0]  mctl = 8'h06, porta = 8'h5A;
  logic armed = 0, halted = 0;
  int polls = 0;
  logic [15:0] wr_a [$];
  logic [7:0]  wr_d [$];
  int          wr_t [$];
  int          cyc = 0;
  logic        cclk_at_first;

  always_comb begin
    rdata = 8'hFF;
    if (vma && rw) begin
      unique case (addr)
        16'hC000: rdata = model_sig[15:8];
        16'hC001: rdata = model_sig[7:0];
        16'hC007: rdata = {armed && polls > 2, halted && polls > 2, 5'b0, 1'b1};
        16'h8018: rdata = porta;
        default:  rdata = 8'hFF;
      endcase
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (vma && !rw) begin
      wr_a.push_back(addr); wr_d.push_back(wdata); wr_t.push_back(cyc);
      if (addr == 16'h801A && wdata == 8'h80 && wr_a.size() == 10) cclk_at_first = cut_clk && (cc == 1);
      if (addr == 16'hC003) begin
        if (wdata[MC_GO] && !mctl[MC_GO]) begin armed <= 1; halted <= 0; polls <= 0; end
        if (wdata[MC_HALT] && !mctl[MC_HALT]) begin armed <= 0; halted <= 1; polls <= 0; end
        mctl <= wdata;
      end
    end
    if (vma && rw && addr == 16'hC007) polls <= polls + 1;
  end

  task automatic do_run(input logic [3:0] n, input logic lrn);
    int t;
    @(negedge clk); node = n; learn = lrn; go = 1'b1;
    @(negedge clk); go = 1'b0;
    check("busy", busy, 1'b1);
    t = 0;
    while (!done && t < 20000) begin @(negedge clk); t++; end
    check("finished", int'(t < 20000), 1);
  endtask

  initial begin
    int i, npat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do_run(4'd5, 1'b1);

    // initialization writes
    check("w0", {wr_a[0], wr_d[0]}, {16'hC003, 8'h47});
    check("w1", {wr_a[1], wr_d[1]}, {16'hC003, 8'h46});
    check("w2", {wr_a[2], wr_d[2]}, {16'hC002, 8'h00});
    check("w3", {wr_a[3], wr_d[3]}, {16'h801B, 8'h00});
    check("w4", {wr_a[4], wr_d[4]}, {16'h801A, 8'hFF});
    check("w5", {wr_a[5], wr_d[5]}, {16'h801B, 8'h2E});
    check("w6", {wr_a[6], wr_d[6]}, {16'h8019, 8'h04});
    check("w7", {wr_a[7], wr_d[7]}, {16'hC003, 8'h4C});
    check("w8", {wr_a[8], wr_d[8]}, {16'hC003, 8'h4E});
    // pattern
    check("start code", {wr_a[9], wr_d[9]}, {16'h801A, 8'h80});
    check("first write on CUT clock edge", cclk_at_first, 1'b1);
    npat = 0;
    for (i = 10; i < 10 + 255; i++) begin
      check("pattern value", {wr_a[i], wr_d[i]}, {16'h801A, 8'(i - 9)});
      check("pattern spacing", wr_t[i] - wr_t[i-1], 15);
      npat++;
    end
    check("wrap to 00", {wr_a[265], wr_d[265]}, {16'h801A, 8'h00});
    check("patterns", npat, 255);
    check("halt low", {wr_a[266], wr_d[266]}, {16'hC003, 8'h4A});
    check("halt rise", {wr_a[267], wr_d[267]}, {16'hC003, 8'h4E});
    check("delay before halt", int'(wr_t[266] - wr_t[265] >= 15 + 2040), 1);
    check("write count", wr_a.size(), 268);
    check("signature", signature, 16'hD953);
    check("port A", pa_result, 8'h5A);
    check("stopped by CUT flag", stopped_by_cut, 1'b1);
    check("learn clears fail", {fail, fault_map[5]}, 2'b00);

    // compare: same signature passes
    do_run(4'd5, 1'b0);
    check("compare pass", fail, 1'b0);
    // compare: different signature fails
    model_sig = 16'h1234;
    do_run(4'd5, 1'b0);
    check("compare fail", fail, 1'b1);
    check("fault map", fault_map, 16'h0020);
    // compare of a node never learnt does not fail
    do_run(4'd2, 1'b0);
    check("unlearnt node", {fail, fault_map}, {1'b0, 16'h0020});
    // relearn clears the node's fault bit
    do_run(4'd5, 1'b1);
    check("relearn", fault_map, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

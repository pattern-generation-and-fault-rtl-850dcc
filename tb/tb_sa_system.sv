// tb_sa_system: end-to-end test of the signature analysis system at its
// default sizes.
// The circuit under test's serial output is looped back to its serial input.
// 1. Learn: one run per probe position (16 nodes); every signature is checked
//    against a reference model kept in this testbench, which watches the CUT
//    clock, start, stop and probe lines itself and applies the window rule
//    (first bit at the clock edge that takes the start, none at the edge that
//    takes the stop). The grounded node must give 0000.
// 2. Compare, fault free: every node is compared once; one that fails without
//    a fault is not repeatable (the description marks such nodes as unstable)
//    and is learnt again. The data-line and stop nodes must then all pass.
// 3. Compare with a stuck-at-0 fault forced on parallel input bit 3: the
//    stop code can no longer occur, so the host halt ends the window; node bit
//    3 and the stop node must fail, the grounded node must pass.
// Mechanisms counted (each must happen at least once): window opened by the
// start code, window closed by the CUT stop, window closed by host halt,
// learn, compare pass, compare fail, PIA CB2 strobe pulse, UART character
// sent, UART character received, PIA A read of the received word. Each run
// must also finish within the cycle budget worked out from the sequence
// (pattern writes x PAT_HOLD + delay + bus cycles).
module tb_sa_system;
  import sa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0, learn = 1'b0;
  logic [3:0] probe_sel = 4'd0;
  logic sw_neg_pulse = 1'b1, sw_pos_pulse = 1'b1;
  logic serial_in, serial_out, strobe_out, busy, done, fail, stopped_by_cut;
  logic window_open, irqa_n, irqb_n;
  logic [7:0] par_out, pa_result;
  logic [15:0] signature;
  logic [15:0] fault_map;
  logic [3:0][7:0] disp_chars;
  logic [3:0][6:0] disp_seg;
  logic [3:0] disp_dp;

  sa_system dut (.*);
  assign serial_in = serial_out;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_open = 0, n_cut_stop = 0, n_halt = 0, n_learn = 0, n_pass = 0, n_fail = 0;
  int n_unstable = 0, n_strobe = 0, n_tx = 0, n_rx = 0, n_pa = 0;

  // cycle budget of one run
  localparam int RUN_BUDGET = 257 * 15 + 2040 + 200;

  initial begin
    #30000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // ------------------------------------------------------ reference model
  logic [15:0] ref_sig;
  logic        ref_open, ref_armed, start_seen, stop_seen, probe_q;
  logic        st_q, sp_q, cclk_q;
  always @(negedge clk) begin
    logic st, sp, cc, pr;
    st = dut.u_cut.start_sig;
    sp = dut.u_cut.stop_sig;
    cc = dut.u_cut.cut_clk;
    pr = dut.u_cut.nodes[probe_sel];
    if (dut.u_sm.u_ctrl.arm) begin
      ref_armed = 1'b1; ref_open = 1'b0; ref_sig = '0; start_seen = 1'b0; stop_seen = 1'b0;
    end else begin
      if (st && !st_q && ref_armed && !ref_open) start_seen = 1'b1;
      if (!sp && sp_q && ref_open) stop_seen = 1'b1;
      if (cc && !cclk_q) begin
        if (ref_armed && !ref_open && start_seen) begin
          ref_open = 1'b1; start_seen = 1'b0;
          ref_sig = {ref_sig[14:0], probe_q ^ ref_sig[6] ^ ref_sig[8] ^ ref_sig[11] ^ ref_sig[15]};
        end else if (ref_open && stop_seen) begin
          ref_open = 1'b0; ref_armed = 1'b0; stop_seen = 1'b0;
        end else if (ref_open) begin
          ref_sig = {ref_sig[14:0], probe_q ^ ref_sig[6] ^ ref_sig[8] ^ ref_sig[11] ^ ref_sig[15]};
        end
      end
      if (dut.u_sm.u_ctrl.halt) begin ref_open = 1'b0; ref_armed = 1'b0; end
    end
    st_q = st; sp_q = sp; cclk_q = cc; probe_q = pr;
  end

  // ------------------------------------------------------ event counters
  logic wo_q = 1'b0, cb2_q = 1'b1, so_q = 1'b1, dav_q = 1'b0;
  always @(posedge clk) begin
    if (window_open && !wo_q) n_open++;
    if (!dut.cut_strobe && cb2_q) n_strobe++;
    if (!dut.u_cut.u_uart.eoc && so_q) n_tx++;
    if (dut.u_cut.u_uart.dav && !dav_q) n_rx++;
    wo_q <= window_open; cb2_q <= dut.cut_strobe; so_q <= dut.u_cut.u_uart.eoc;
    dav_q <= dut.u_cut.u_uart.dav;
  end

  logic [15:0] good [16];

  task automatic run(input logic [3:0] node, input logic lrn, output logic [15:0] sig);
    int cyc;
    @(negedge clk);
    probe_sel = node; learn = lrn; go = 1'b1;
    @(negedge clk); go = 1'b0;
    cyc = 0;
    while (!done && cyc < 2 * RUN_BUDGET) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > RUN_BUDGET) begin failures++; $display("FAIL run took %0d cycles", cyc); end
    sig = signature;
    check($sformatf("node %0d vs reference", node), signature, ref_sig);
    if (stopped_by_cut) n_cut_stop++; else n_halt++;
    if (lrn) n_learn++;
    else if (fail) n_fail++;
    else n_pass++;
    if (pa_result == dut.u_cut.par_out) n_pa++;
  endtask

  initial begin
    logic [15:0] s;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1. learn every node
    for (int n = 0; n < 16; n++) begin
      run(4'(n), 1'b1, s);
      good[n] = s;
      checks++;
      if (!stopped_by_cut) begin failures++; $display("FAIL node %0d: stop not seen", n); end
    end
    check("ground node", good[N_GROUND], 16'h0000);
    checks++;
    if (good[N_PULLUP] == 16'h0000 || good[N_BIT8] == good[N_BIT1]) begin
      failures++; $display("FAIL trivial signatures");
    end
    check("display of last run", {disp_chars[3], disp_chars[2]},
          {sig_char(good[15][15:12]), sig_char(good[15][11:8])});

    // 2. compare without fault; a node whose signature is not repeatable is
    //    unstable and is learnt again, the others must pass
    foreach (good[n]) begin
      run(4'(n), 1'b0, s);
      if (fail) begin
        n_unstable++;
        $display("node %0d unstable", n);
        run(4'(n), 1'b1, s);
      end
    end
    checks++;
    if (n_unstable > 4) begin failures++; $display("FAIL %0d unstable nodes", n_unstable); end
    foreach (good[n]) if (n < 8 || n == int'(N_STOP)) begin
      run(4'(n), 1'b0, s);
      check("fault-free compare of a data node", {15'h0, fail}, 16'h0);
    end

    // 3. stuck-at-0 on parallel input bit 3
    force dut.stim[2] = 1'b0;
    run(N_BIT3, 1'b0, s);
    check("bit 3 fails", {15'h0, fail}, 16'h1);
    run(N_STOP, 1'b0, s);
    check("stop node fails", {15'h0, fail}, 16'h1);
    run(N_GROUND, 1'b0, s);
    check("ground passes", {15'h0, fail}, 16'h0);
    checks++;
    if ((fault_map & ((16'h1 << N_BIT3) | (16'h1 << N_STOP) | (16'h1 << N_GROUND))) !=
        ((16'h1 << N_BIT3) | (16'h1 << N_STOP))) begin
      failures++; $display("FAIL fault map %h", fault_map);
    end
    release dut.stim[2];

    $display("events: open=%0d cut_stop=%0d halt=%0d learn=%0d pass=%0d fail=%0d strobe=%0d tx=%0d rx=%0d pa=%0d",
             n_open, n_cut_stop, n_halt, n_learn, n_pass, n_fail, n_strobe, n_tx, n_rx, n_pa);
    foreach (good[n]) $display("node %0d signature %s%s%s%s", n, sig_char(good[n][15:12]),
             sig_char(good[n][11:8]), sig_char(good[n][7:4]), sig_char(good[n][3:0]));
    checks++; if (n_open == 0)     begin failures++; $display("FAIL never opened"); end
    checks++; if (n_cut_stop == 0) begin failures++; $display("FAIL no CUT stop"); end
    checks++; if (n_halt == 0)     begin failures++; $display("FAIL no host halt"); end
    checks++; if (n_learn == 0)    begin failures++; $display("FAIL no learn"); end
    checks++; if (n_pass == 0)     begin failures++; $display("FAIL no pass"); end
    checks++; if (n_fail == 0)     begin failures++; $display("FAIL no fail"); end
    checks++; if (n_strobe == 0)   begin failures++; $display("FAIL no strobe"); end
    checks++; if (n_tx == 0)       begin failures++; $display("FAIL no tx"); end
    checks++; if (n_rx == 0)       begin failures++; $display("FAIL no rx"); end
    checks++; if (n_pa == 0)       begin failures++; $display("FAIL no port A read"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

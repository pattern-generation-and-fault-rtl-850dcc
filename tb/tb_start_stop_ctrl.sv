// tb_start_stop_ctrl: self-checking test of the measurement window control.
// Drives arm, start, stop, halt and CUT clock pulses directly and counts the
// shift enables: a window opened at clock edge k and closed at edge k+n must
// give exactly n shifts. Also checks that start/stop events arriving between
// clock edges are held until the next edge, that a start while not armed or a
// stop while not open is ignored, that enable low blocks clock edges, the
// clear pulse on arm, halt, soft reset and the status outputs.
module tb_start_stop_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic soft_rst = 1'b0, arm = 1'b0, halt = 1'b0, enable = 1'b1;
  logic cut_edge = 1'b0, start_evt = 1'b0, stop_evt = 1'b0;
  logic clr, shift_en, ready, open, idle, done;
  int checks = 0, failures = 0, shifts = 0, clears = 0;

  start_stop_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (shift_en) shifts++;
    if (clr) clears++;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0;
  endtask

  task automatic edges(input int n);
    repeat (n) begin repeat (3) @(negedge clk); pulse(cut_edge); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle after reset", {idle, ready, open, done}, 4'b1000);

    // start ignored when not armed
    pulse(start_evt); edges(3);
    check("no shifts unarmed", shifts, 0);
    check("still idle", idle, 1);

    // normal window: start, 9 more edges, stop
    pulse(arm);
    check("clear on arm", clears, 1);
    check("armed status", {idle, ready, open}, 3'b010);
    pulse(stop_evt);                       // stop before open is ignored
    edges(2);
    check("no shifts armed", shifts, 0);
    pulse(start_evt);                      // held until the next edge
    check("not open yet", open, 0);
    edges(1);
    check("open", open, 1);
    check("first bit", shifts, 1);
    edges(9);
    pulse(stop_evt);
    check("still open until edge", open, 1);
    edges(1);
    check("window length", shifts, 10);
    check("done", {idle, ready, open, done}, 4'b1001);
    edges(4);
    check("frozen", shifts, 10);

    // start and clock in the same cycle
    shifts = 0;
    pulse(arm);
    @(negedge clk); start_evt = 1'b1; cut_edge = 1'b1;
    @(negedge clk); start_evt = 1'b0; cut_edge = 1'b0;
    check("same-cycle start", shifts, 1);
    // enable low blocks edges
    enable = 1'b0; edges(5); enable = 1'b1;
    check("enable low", shifts, 1);
    edges(4);
    check("enabled again", shifts, 5);
    // stop and clock in the same cycle: no shift
    @(negedge clk); stop_evt = 1'b1; cut_edge = 1'b1;
    @(negedge clk); stop_evt = 1'b0; cut_edge = 1'b0;
    check("same-cycle stop", shifts, 5);
    check("closed", open, 0);

    // halt
    shifts = 0;
    pulse(arm); pulse(start_evt); edges(6);
    pulse(halt);
    check("halt closes", {open, done}, 2'b01);
    edges(3);
    check("halt length", shifts, 6);

    // soft reset
    pulse(arm); pulse(start_evt); edges(2);
    pulse(soft_rst);
    check("soft reset", {idle, done, open}, 3'b100);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

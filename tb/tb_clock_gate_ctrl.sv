// tb_clock_gate_ctrl - self-checking test of the clock-gate decision.
//
// Parameters are the defaults: IDLE_THRESHOLD 8, WINDOW 32, LOAD_THRESHOLD 4,
// SLOW_DIV 8. Checks, with expected values worked out by hand:
//  * ce is low after reset and rises in the same cycle as activity;
//  * after one isolated activity ce stays high for exactly 8 more cycles;
//  * a window with >= 4 activity cycles makes predicted_busy high for the
//    whole next window, holding ce high while idle; a quiet window clears it;
//  * tick is high every cycle in normal mode and 1 in 8 in slow mode;
//  * gated_cycles counts exactly the cycles sampled with ce = 0.
module tb_clock_gate_ctrl;
  logic clk = 0, rst_n = 0, activity = 0, slow_mode = 0;
  logic ce, tick, predicted_busy;
  logic [31:0] gated_cycles;
  int checks = 0, failures = 0;
  int gated_seen = 0;

  always #5 clk = ~clk;

  clock_gate_ctrl dut (
    .clk(clk), .rst_n(rst_n), .activity(activity), .slow_mode(slow_mode),
    .ce(ce), .tick(tick), .predicted_busy(predicted_busy), .gated_cycles(gated_cycles));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && !ce) gated_seen++;

  int cyc = 0;   // cycles since reset release, counted at posedge
  always @(posedge clk) if (rst_n) cyc++;

  initial begin
    int on_cycles, ticks;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!ce, "ce low after reset");
    check(tick, "tick every cycle in normal mode");
    // isolated activity (window 0 gets 1 activity cycle)
    activity = 1; #1;
    check(ce, "ce follows activity in the same cycle");
    @(negedge clk); activity = 0;
    on_cycles = 0;
    for (int i = 0; i < 12; i++) begin
      if (ce) on_cycles++;
      @(negedge clk);
    end
    check(on_cycles == 8, $sformatf("ce hang-over %0d cycles, expected 8", on_cycles));
    check(!predicted_busy, "one activity does not predict load");
    // go to the start of a window: cyc counts edges since reset; window
    // boundary after every 32 edges
    while (cyc % 32 != 0) @(negedge clk);
    // 5 activity cycles spread over this window, then idle
    for (int i = 0; i < 32; i++) begin
      activity = (i % 6 == 0) && (i < 30);
      @(negedge clk);
    end
    activity = 0;
    check(predicted_busy, "busy window predicts load for the next window");
    on_cycles = 0;
    for (int i = 0; i < 31; i++) begin
      if (ce) on_cycles++;
      @(negedge clk);
    end
    check(on_cycles == 31, $sformatf("ce held by prediction through idle window (%0d/31)", on_cycles));
    @(negedge clk);
    check(!predicted_busy, "quiet window clears prediction");
    check(!ce, "ce off after quiet window");
    // slow mode ticks
    slow_mode = 1;
    ticks = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      if (tick) ticks++;
    end
    check(ticks == 8, $sformatf("slow mode ticks %0d in 64 cycles, expected 8", ticks));
    slow_mode = 0;
    @(posedge clk); #1;
    check(gated_cycles == 32'(gated_seen), $sformatf("gated cycle counter %0d vs %0d", gated_cycles, gated_seen));
    check(gated_seen > 60, "gating happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ddcg_noc_top - end-to-end test of the dual-domain clock-gated NoC at
// its default parameters (2 x 2 mesh, sensor at node 0, MAC at node 3).
//
// clk1 (sensor side) runs at 25 MHz, clk2 (NoC side) at 100 MHz, except in
// the overflow phase where clk1 is sped up to 100 MHz. Phases:
//  A  idle: no router is enabled, the sensor memory is gated.
//  B  20 isolated sensor samples: each reaches the MAC exactly once; the
//     accumulator equals the sum of sample * coef worked out here; the
//     latency from FIFO write to MAC is measured; router 2 (off the XY path
//     0 -> 1 -> 3) never wakes; the sample log holds the last 16 samples.
//  C  a sensor holding valid with unchanged data injects once.
//  D  a burst of 40 back-to-back samples: the memory clock-enable is held by
//     load prediction.
//  E  slow mode: samples every 2 clk1 cycles, injection only every 8th.
//  F  overflow: PEs at nodes 1 and 2 flood node 3 while the sensor writes
//     every cycle at full clk1 speed; the dual-clock FIFO fills, samples are
//     coalesced, and every sample is either delivered or counted as
//     coalesced. PE flits between nodes 1 and 2 are checked at their
//     destinations.
// Each mechanism is counted and a mechanism that never happened is a
// failure.
module tb_ddcg_noc_top;
  import noc_pkg::*;

  localparam int N = 4;

  logic clk1 = 0, clk2 = 0, rstn = 0;
  realtime half1 = 20.0;
  logic [15:0] sensor_data = '0;
  logic sensor_valid = 0, slow_mode = 0, mem_rd_en = 0;
  logic [3:0] mem_rd_addr = '0;
  logic [15:0] mem_rd_data;
  logic mem_ce, mem_predicted_busy;
  logic [3:0] mem_wr_ptr;
  logic [31:0] mem_gated_cycles;
  logic sensor_event;
  logic [15:0] event_count, coalesced_count;
  logic cdc_fifo_full;
  logic [15:0] mac_coef = 16'd3;
  logic mac_clear = 0;
  logic [15:0] actuator_out, mac_rx_count;
  logic [31:0] mac_acc;
  logic [3:0] mac_last_src;
  logic [N-1:0] router_en, router_occupied;
  logic [31:0] router_active_cycles [N];
  logic [N-1:0] pe_inj_valid = '0, pe_inj_ready, pe_ej_valid, pe_ej_ready = '1;
  flit_t pe_inj_flit [N];
  flit_t pe_ej_flit [N];

  int checks = 0, failures = 0;

  always #(half1) clk1 = ~clk1;
  always #5 clk2 = ~clk2;

  ddcg_noc_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_idle_gated = 0, n_fifo_full = 0, n_coalesced = 0, n_predicted = 0;
  int n_mem_gated = 0, n_dup_suppressed = 0, n_slow_ticks = 0, n_router_wake = 0;
  int n_pe_delivered = 0;
  logic [N-1:0] prev_en = '0;

  always @(posedge clk2) begin
    if (rstn) begin
      if (router_en == 0) n_idle_gated++;
      n_router_wake += $countones(router_en & ~prev_en);
      prev_en <= router_en;
      // a disabled router never offers anything at a PE port
      for (int n = 0; n < N; n++)
        if (!router_en[n]) check(!pe_ej_valid[n], "PE output silent while router off");
    end
  end
  always @(posedge clk1) if (rstn) begin
    if (cdc_fifo_full) n_fifo_full++;
    if (mem_predicted_busy) n_predicted++;
    if (!mem_ce) n_mem_gated++;
  end

  // ---------------- latency measurement ----------------
  realtime t_write = 0, lat_max = 0, lat_min = 1e9;
  int lat_samples = 0;
  bit measure = 0;
  logic [15:0] last_rx = '0;
  always @(posedge clk1) if (measure && sensor_event) t_write = $realtime;
  always @(posedge clk2) begin
    if (measure && mac_rx_count != last_rx) begin
      realtime l;
      l = $realtime - t_write;
      if (l > lat_max) lat_max = l;
      if (l < lat_min) lat_min = l;
      lat_samples++;
    end
    last_rx <= mac_rx_count;
  end

  // ---------------- PE traffic (phase F) ----------------
  int pe_exp [N][$];     // per destination node: expected payloads
  int pe_sent = 0, pe_to3 = 0;
  bit pe_run = 0;
  logic [N-1:0] pe_acc_q = '0;
  always @(posedge clk2) begin
    for (int n = 1; n <= 2; n++) if (pe_inj_valid[n] && pe_inj_ready[n]) begin
      int d;
      d = int'(pe_inj_flit[n].dst_y) * 2 + int'(pe_inj_flit[n].dst_x);
      if (d != 3) pe_exp[d].push_back(int'(pe_inj_flit[n].payload));
      else pe_to3++;
      pe_sent++;
    end
    for (int n = 1; n <= 2; n++) if (pe_ej_valid[n] && pe_ej_ready[n]) begin
      check(pe_exp[n].size() > 0 && pe_exp[n][0] == int'(pe_ej_flit[n].payload),
            $sformatf("PE flit at node %0d", n));
      if (pe_exp[n].size() > 0) void'(pe_exp[n].pop_front());
      n_pe_delivered++;
    end
    pe_acc_q <= pe_inj_valid & pe_inj_ready;
  end
  always @(negedge clk2) begin
    for (int n = 1; n <= 2; n++) begin
      if (!pe_inj_valid[n] || pe_acc_q[n]) begin
        if (pe_run) begin
          flit_t f;
          int d;
          // node 1 sends to 2 and 3, node 2 sends to 1 and 3
          d = ($urandom_range(0, 1) == 0) ? 3 : (n == 1 ? 2 : 1);
          f = '0;
          f.src_x = 2'(n % 2); f.src_y = 2'(n / 2);
          f.dst_x = 2'(d % 2); f.dst_y = 2'(d / 2);
          f.payload = 16'($urandom);
          pe_inj_flit[n]  <= f;
          pe_inj_valid[n] <= 1'b1;
        end else pe_inj_valid[n] <= 1'b0;
      end
    end
  end

  task automatic sample(input logic [15:0] d);
    @(negedge clk1); sensor_valid = 1; sensor_data = d;
    @(negedge clk1); sensor_valid = 0;
  endtask

  task automatic read_mem(input logic [3:0] a, output logic [15:0] d);
    @(negedge clk1); mem_rd_en = 1; mem_rd_addr = a;
    @(negedge clk1); mem_rd_en = 0; d = mem_rd_data;
  endtask

  initial begin
    logic [31:0] exp_acc;
    logic [15:0] samples [20];
    logic [15:0] rd, ev0, co0, rx0;
    int active2, nsamples;
    for (int n = 0; n < N; n++) pe_inj_flit[n] = '0;
    exp_acc = 0;
    repeat (3) @(negedge clk1);
    rstn = 1;

    // ---- A: idle ----
    repeat (30) @(negedge clk1);
    check(router_en == 0, "A: no router enabled while idle");
    check(!mem_ce, "A: sensor memory gated while idle");
    check(router_active_cycles[0] == 0 && router_active_cycles[3] == 0, "A: no router cycles while idle");

    // ---- B: isolated samples ----
    measure = 1;
    for (int i = 0; i < 20; i++) begin
      samples[i] = 16'h0110 * 16'(i + 1) + 16'h000d;
      exp_acc += 32'(samples[i]) * 32'(mac_coef);
      sample(samples[i]);
      repeat (12) @(negedge clk1);
    end
    measure = 0;
    check(event_count == 20, $sformatf("B: 20 events, got %0d", event_count));
    check(mac_rx_count == 20, $sformatf("B: 20 flits at MAC, got %0d", mac_rx_count));
    check(mac_acc == exp_acc, $sformatf("B: accumulator %h exp %h", mac_acc, exp_acc));
    check(actuator_out == exp_acc[15:0], "B: actuator_out");
    check(mac_last_src == 4'b0000, "B: flits come from node 0");
    check(lat_samples == 20, "B: latency measured for every flit");
    // FIFO write to MAC: 2 synchronizer edges + injector + router 0 + two hops
    // + MAC register = 7 clk2 edges; allow one extra period for clock phase.
    $display("B: write-to-MAC latency %0.1f .. %0.1f ns (clk2 = 10 ns)", lat_min, lat_max);
    check(lat_max <= 80.0 && lat_min >= 60.0, "B: latency within 6..8 clk2 cycles");
    active2 = int'(router_active_cycles[2]);
    check(active2 == 0, "B: router 2 (off the route) never enabled");
    check(router_active_cycles[1] > 0 && router_active_cycles[3] > 0, "B: routers on the route were enabled");
    check(router_en == 0, "B: all routers off again");
    // sample log: the last 16 samples (4..19), oldest at wr_ptr
    check(mem_wr_ptr == 4'(20), "B: log pointer");
    for (int k = 0; k < 16; k++) begin
      read_mem(4'(mem_wr_ptr + 4'(k)), rd);
      check(rd == samples[4 + k], $sformatf("B: log entry %0d = %h exp %h", k, rd, samples[4 + k]));
    end

    // ---- C: held valid, same data ----
    ev0 = event_count;
    @(negedge clk1); sensor_valid = 1; sensor_data = 16'h0220;
    repeat (10) @(negedge clk1);
    sensor_valid = 0;
    repeat (10) @(negedge clk1);
    check(event_count == ev0 + 1, "C: held sample injected once");
    if (event_count == ev0 + 1) n_dup_suppressed++;
    exp_acc += 32'h0220 * 32'(mac_coef);

    // ---- D: burst, load prediction ----
    @(negedge clk1); sensor_valid = 1;
    for (int i = 0; i < 40; i++) begin
      sensor_data = 16'h0330 + 16'(i);
      exp_acc += 32'(sensor_data) * 32'(mac_coef);
      @(negedge clk1);
    end
    sensor_valid = 0;
    repeat (40) @(negedge clk1);
    check(mac_acc == exp_acc, "D: accumulator after burst");
    check(mac_rx_count == 61, $sformatf("D: 61 flits at MAC, got %0d", mac_rx_count));

    // ---- E: slow mode ----
    slow_mode = 1;
    ev0 = event_count; co0 = coalesced_count;
    nsamples = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk1); sensor_valid = 1; sensor_data = 16'h4000 + 16'(i); nsamples++;
      @(negedge clk1); sensor_valid = 0;
    end
    repeat (20) @(negedge clk1);
    slow_mode = 0;
    repeat (5) @(negedge clk1);
    check(event_count - ev0 <= 16'd9 && event_count - ev0 >= 16'd7,
          $sformatf("E: slow mode injected %0d of 32 samples (one per 8 cycles)", event_count - ev0));
    check((event_count - ev0) + (coalesced_count - co0) == 16'(nsamples), "E: every sample sent or coalesced");
    if (event_count - ev0 < 16'(nsamples)) n_slow_ticks = int'(event_count - ev0);

    // ---- F: overflow ----
    repeat (20) @(negedge clk1);
    ev0 = event_count; co0 = coalesced_count; rx0 = mac_rx_count;
    pe_run = 1;
    half1 = 5.0;
    nsamples = 0;
    @(negedge clk1); sensor_valid = 1;
    for (int i = 0; i < 300; i++) begin
      sensor_data = 16'h8000 + 16'(i); nsamples++;
      @(negedge clk1);
    end
    sensor_valid = 0;
    pe_run = 0;
    half1 = 20.0;
    repeat (100) @(negedge clk1);
    check(n_fifo_full > 0, "F: dual-clock FIFO filled");
    check(coalesced_count != co0, "F: samples coalesced under back-pressure");
    n_coalesced = int'(coalesced_count - co0);
    check((event_count - ev0) + (coalesced_count - co0) == 16'(nsamples),
          $sformatf("F: sent %0d + coalesced %0d = %0d samples", event_count - ev0, coalesced_count - co0, nsamples));
    check(int'(mac_rx_count - rx0) == int'(event_count - ev0) + pe_to3,
          "F: MAC got every sensor flit and every PE flit to node 3");
    check(pe_exp[1].size() == 0 && pe_exp[2].size() == 0, "F: all PE flits delivered");
    check(router_active_cycles[2] > 0, "F: router 2 woke for PE traffic");
    check(router_en == 0 && router_occupied == 0, "F: network empty and off at the end");

    // ---- mechanism coverage ----
    $display("mechanisms: idle_gated=%0d router_wakeups=%0d mem_gated=%0d predicted=%0d dup_suppressed=%0d slow_injections=%0d fifo_full=%0d coalesced=%0d pe_delivered=%0d",
             n_idle_gated, n_router_wake, n_mem_gated, n_predicted, n_dup_suppressed,
             n_slow_ticks, n_fifo_full, n_coalesced, n_pe_delivered);
    check(n_idle_gated > 0, "mechanism: all routers gated off");
    check(n_router_wake > 0, "mechanism: router wake-up");
    check(n_mem_gated > 0, "mechanism: sensor memory gated");
    check(n_predicted > 0, "mechanism: load prediction");
    check(n_dup_suppressed > 0, "mechanism: repeated sample suppressed");
    check(n_slow_ticks > 0, "mechanism: slow-mode rate limiting");
    check(n_fifo_full > 0, "mechanism: FIFO full back-pressure");
    check(n_coalesced > 0, "mechanism: coalescing");
    check(n_pe_delivered > 0, "mechanism: PE-to-PE traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

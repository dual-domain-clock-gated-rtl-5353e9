// tb_fig61_workload - the low-duty-cycle sensor scenario of the reference
// waveform: 16-bit samples 0x060d, 0x0110, 0x0220, 0x0330 arrive as short
// sensor_valid pulses far apart, slow_mode = 0, at default parameters.
//
// Checks that each sample reaches the actuator / MAC unit exactly once, in
// order, that actuator_out equals the low 16 bits of sum(sample * coef)
// worked out here, and that between events the whole NoC is gated off. It
// prints the share of router-cycles with clk_en = 1 (the network's switching
// activity compared with an always-clocked network) and requires it to be
// below 10 % for this sparse traffic.
module tb_fig61_workload;
  import noc_pkg::*;

  localparam int N = 4;

  logic clk1 = 0, clk2 = 0, rstn = 0;
  logic [15:0] sensor_data = '0;
  logic sensor_valid = 0, slow_mode = 0, mem_rd_en = 0;
  logic [3:0] mem_rd_addr = '0, mem_wr_ptr;
  logic [15:0] mem_rd_data, event_count, coalesced_count, actuator_out, mac_rx_count;
  logic mem_ce, mem_predicted_busy, sensor_event, cdc_fifo_full;
  logic [31:0] mem_gated_cycles, mac_acc;
  logic [15:0] mac_coef = 16'd5;
  logic mac_clear = 0;
  logic [3:0] mac_last_src;
  logic [N-1:0] router_en, router_occupied;
  logic [31:0] router_active_cycles [N];
  logic [N-1:0] pe_inj_valid = '0, pe_inj_ready, pe_ej_valid, pe_ej_ready = '1;
  flit_t pe_inj_flit [N];
  flit_t pe_ej_flit [N];
  int checks = 0, failures = 0;

  always #20 clk1 = ~clk1;
  always #5  clk2 = ~clk2;

  ddcg_noc_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int clk2_cycles = 0;
  always @(posedge clk2) if (rstn) clk2_cycles++;

  initial begin
    logic [15:0] samples [4];
    logic [31:0] exp_acc;
    longint on_total;
    real share;
    samples = '{16'h060d, 16'h0110, 16'h0220, 16'h0330};
    exp_acc = 0;
    for (int n = 0; n < N; n++) pe_inj_flit[n] = '0;
    repeat (3) @(negedge clk1);
    rstn = 1;
    repeat (10) @(negedge clk1);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk1); sensor_data = samples[i]; sensor_valid = 1;
      @(negedge clk1); sensor_valid = 0;
      exp_acc += 32'(samples[i]) * 32'(mac_coef);
      repeat (30) @(negedge clk1);
      check(mac_rx_count == 16'(i + 1), $sformatf("sample %0d delivered once", i));
      check(actuator_out == exp_acc[15:0], $sformatf("actuator_out %h exp %h", actuator_out, exp_acc[15:0]));
      check(router_en == 0, "network gated off between events");
    end
    check(event_count == 4 && coalesced_count == 0, "four events, none coalesced");
    on_total = 0;
    for (int n = 0; n < N; n++) on_total += longint'(router_active_cycles[n]);
    share = 100.0 * real'(on_total) / real'(N * clk2_cycles);
    $display("router clk_en share: %0d of %0d router-cycles (%0.2f %%)", on_total, N * clk2_cycles, share);
    check(share < 10.0, "sparse traffic keeps routers mostly gated");
    check(router_active_cycles[2] == 0, "router off the route never enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

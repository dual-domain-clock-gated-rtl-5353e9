// tb_event_detector - self-checking test of event-driven flit injection.
//
// A reference model in the testbench decides, cycle by cycle, whether a
// sample is new (valid rising, or data changed while valid stays high) and
// which flit must be written. Covered: single samples, a sensor holding
// valid with the same data (one event only), a run of changing samples,
// back-pressure from a full FIFO (pending sample replaced, coalesced count),
// and slow mode with a tick every 4 cycles (write only on tick). Every write
// is compared with the expected flit in order, and the counters are checked.
module tb_event_detector;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tick = 1, sensor_valid = 0, fifo_full = 0;
  logic [DATA_W-1:0] sensor_data = '0;
  logic fifo_wr, event_o;
  flit_t fifo_flit;
  logic [15:0] event_count, coalesced_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  event_detector #(.SRC_X(2'd0), .SRC_Y(2'd0), .DST_X(2'd1), .DST_Y(2'd1)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .sensor_data(sensor_data),
    .sensor_valid(sensor_valid), .fifo_full(fifo_full), .fifo_wr(fifo_wr),
    .fifo_flit(fifo_flit), .event_o(event_o), .event_count(event_count),
    .coalesced_count(coalesced_count));

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

  // reference model
  bit        m_prev_v = 0, m_pend = 0;
  logic [15:0] m_prev_d = 0, m_pend_d = 0;
  int        m_events = 0, m_coal = 0;
  always @(posedge clk) if (rst_n) begin
    bit newd, fire;
    newd = sensor_valid && (!m_prev_v || sensor_data != m_prev_d);
    fire = m_pend && tick && !fifo_full;
    check(fifo_wr == fire, $sformatf("write strobe exp %0d got %0d", fire, fifo_wr));
    check(event_o == fifo_wr, "event_o equals write strobe");
    if (fire) begin
      check(fifo_flit.payload == m_pend_d, $sformatf("payload exp %h got %h", m_pend_d, fifo_flit.payload));
      check(fifo_flit.dst_x == 1 && fifo_flit.dst_y == 1 && fifo_flit.src_x == 0 && fifo_flit.src_y == 0,
            "flit header");
      m_events++;
    end
    if (newd) begin
      if (m_pend && !fire) m_coal++;
      m_pend = 1; m_pend_d = sensor_data;
    end else if (fire) m_pend = 0;
    m_prev_v = sensor_valid; m_prev_d = sensor_data;
  end

  task automatic sample(input logic [15:0] d, input int hold);
    @(negedge clk); sensor_valid = 1; sensor_data = d;
    repeat (hold) @(negedge clk);
    sensor_valid = 0;
  endtask

  int writes = 0;
  always @(posedge clk) if (rst_n && fifo_wr) writes++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(writes == 0, "no injection without events");
    // single samples
    sample(16'h060d, 1); repeat (5) @(negedge clk);
    sample(16'h0110, 1); repeat (5) @(negedge clk);
    check(writes == 2, "two single events -> two flits");
    // held valid, same data: one event
    sample(16'h0220, 10); repeat (3) @(negedge clk);
    check(writes == 3, "held valid with same data -> one flit");
    // valid held, data changing every cycle
    @(negedge clk); sensor_valid = 1;
    for (int i = 0; i < 6; i++) begin sensor_data = 16'h0330 + 16'(i); @(negedge clk); end
    sensor_valid = 0; repeat (3) @(negedge clk);
    check(writes == 9, "six changing samples -> six flits");
    // back-pressure: FIFO full, three samples arrive, only newest sent
    fifo_full = 1;
    sample(16'h1111, 1); @(negedge clk);
    sample(16'h2222, 1); @(negedge clk);
    sample(16'h3333, 1); repeat (3) @(negedge clk);
    check(writes == 9, "nothing written while FIFO full");
    check(coalesced_count == 2, $sformatf("coalesced count %0d", coalesced_count));
    fifo_full = 0; repeat (3) @(negedge clk);
    check(writes == 10, "pending sample written when space returns");
    // slow mode: tick every 4 cycles
    fork
      begin
        for (int k = 0; k < 60; k++) begin @(negedge clk); tick = (k % 4 == 3); end
        @(negedge clk); tick = 1;
      end
      begin
        sample(16'h4444, 1); repeat (9) @(negedge clk);
        sample(16'h5555, 1); repeat (9) @(negedge clk);
      end
    join
    repeat (3) @(negedge clk);
    check(writes == 12, "slow mode samples written on ticks");
    check(event_count == 16'(m_events), "event counter");
    check(coalesced_count == 16'(m_coal), "coalesced counter matches model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

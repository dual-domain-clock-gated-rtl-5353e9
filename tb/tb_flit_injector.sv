// tb_flit_injector - self-checking test of the FIFO-to-router injector.
//
// A first-word-fall-through FIFO is modelled in the testbench (queue of 40
// numbered flits). en toggles at random, out_ready is random and is forced
// low while en = 0, as a real router does. Checks: every flit arrives once
// and in order; out_valid is never high while en = 0; pending is high
// exactly while a flit waits; with en and out_ready held high, a stream
// moves at one flit per cycle.
module tb_flit_injector;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, out_ready_raw = 0;
  logic fifo_rd, out_valid, out_ready, pending;
  flit_t fifo_data, out_flit;
  flit_t q[$];
  int checks = 0, failures = 0;
  int next_exp = 0, sent = 0;
  bit burst = 0;

  always #5 clk = ~clk;

  assign out_ready = out_ready_raw && en;
  always_comb begin
    fifo_data = '0;
    if (q.size() > 0) fifo_data = q[0];
  end

  flit_injector dut (
    .clk(clk), .rst_n(rst_n), .en(en), .fifo_empty(q.size() == 0),
    .fifo_data(fifo_data), .fifo_rd(fifo_rd), .out_valid(out_valid),
    .out_flit(out_flit), .out_ready(out_ready), .pending(pending));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit held = 0;   // model of the holding register
  always @(posedge clk) if (rst_n) begin
    check(!(out_valid && !en), "no valid while disabled");
    check(pending == (held || q.size() > 0), "pending flag");
    if (out_valid && out_ready) begin
      check(out_flit.payload == 16'(next_exp), $sformatf("order: got %0d exp %0d", out_flit.payload, next_exp));
      next_exp++;
    end
    if (en) begin
      if (fifo_rd) held = 1;
      else if (out_ready) held = 0;
    end
    if (fifo_rd) begin
      check(q.size() > 0 && en, "pop only when not empty and enabled");
      void'(q.pop_front());
    end
  end

  initial begin
    int t0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(!pending, "idle after reset");
    for (int i = 0; i < 30; i++) begin
      flit_t f; f = '0; f.payload = 16'(i); f.dst_x = 1; q.push_back(f);
    end
    while (next_exp < 30) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      out_ready_raw = ($urandom_range(0, 2) != 0);
    end
    // throughput: 10 more flits with en and ready high
    en = 1; out_ready_raw = 1;
    repeat (3) @(negedge clk);
    check(!pending, "drained");
    for (int i = 30; i < 40; i++) begin
      flit_t f; f = '0; f.payload = 16'(i); q.push_back(f);
    end
    t0 = 0;
    while (next_exp < 40) begin @(negedge clk); t0++; end
    check(t0 <= 11, $sformatf("10 flits in %0d cycles (1 per cycle + 1 fill)", t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_router - self-checking test of the clock-enabled XY router.
//
// The router sits at (1,1) of a 4 x 4 coordinate plane so every port has a
// direction. All five inputs send 60 flits each to random destinations,
// with random receiver readiness and a randomly toggling clk_en. The
// expected output port of each flit is worked out in the testbench from the
// XY rule (x first, then y). Payload = {input, sequence}, so each output can
// check that flits from one input arrive in order and exactly once.
// Also checked: no in_ready / out_valid while clk_en = 0, an output keeps its
// flit until it is taken, and a flit entering an idle, enabled router leaves
// on the next edge (one cycle per hop).
module tb_router;
  import noc_pkg::*;

  localparam int P = NPORTS;
  localparam int NFLITS = 60;

  logic clk = 0, rst_n = 0, clk_en = 0;
  logic [P-1:0] in_valid = '0, in_ready, out_valid, out_ready = '0, req_out;
  flit_t in_flit [P];
  flit_t out_flit [P];
  logic occupied;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  router #(.X(2'd1), .Y(2'd1)) dut (
    .clk(clk), .rst_n(rst_n), .clk_en(clk_en),
    .in_valid(in_valid), .in_flit(in_flit), .in_ready(in_ready),
    .out_valid(out_valid), .out_flit(out_flit), .out_ready(out_ready),
    .occupied(occupied), .req_out(req_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_port(flit_t f);
    if (f.dst_x > 1) return 2;       // east
    if (f.dst_x < 1) return 4;       // west
    if (f.dst_y > 1) return 3;       // south
    if (f.dst_y < 1) return 1;       // north
    return 0;                        // local
  endfunction

  int exp_q [P][P][$];  // [out][in] queue of sequence numbers
  int sent [P];
  int received = 0;
  bit random_phase = 0;
  flit_t prev_out [P];
  logic [P-1:0] prev_stall = '0;

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (!clk_en) check(in_ready == 0 && out_valid == 0, "silent while disabled");
    for (int o = 0; o < P; o++) begin
      if (prev_stall[o] && clk_en)
        check(out_valid[o] && out_flit[o] == prev_out[o], "held flit unchanged");
      if (out_valid[o] && out_ready[o]) begin
        int src, seq;
        src = int'(out_flit[o].payload[15:12]);
        seq = int'(out_flit[o].payload[11:0]);
        check(exp_port(out_flit[o]) == o, $sformatf("flit on port %0d, XY says %0d", o, exp_port(out_flit[o])));
        if (src < P && exp_q[o][src].size() > 0) begin
          check(exp_q[o][src][0] == seq, $sformatf("order out %0d in %0d seq %0d", o, src, seq));
          void'(exp_q[o][src].pop_front());
        end else check(0, "unexpected flit");
        received++;
      end
      prev_stall[o] = out_valid[o] && !out_ready[o];
      prev_out[o]   = out_flit[o];
    end
  end

  // senders
  always @(posedge clk) if (rst_n && random_phase) begin
    for (int i = 0; i < P; i++)
      if (in_valid[i] && in_ready[i]) begin
        exp_q[exp_port(in_flit[i])][i].push_back(sent[i]);
        sent[i]++;
      end
  end
  always @(negedge clk) if (random_phase) begin
    clk_en <= ($urandom_range(0, 4) != 0);
    for (int o = 0; o < P; o++) out_ready[o] <= ($urandom_range(0, 2) != 0);
  end
  // a sender keeps valid and flit until accepted
  logic [P-1:0] accepted_q = '0;
  always @(posedge clk) accepted_q <= in_valid & in_ready;
  always @(negedge clk) if (random_phase) begin
    for (int i = 0; i < P; i++) begin
      if (!in_valid[i] || accepted_q[i]) begin
        if (sent[i] < NFLITS && $urandom_range(0, 1)) begin
          flit_t f;
          f = '0;
          f.dst_x = 2'($urandom_range(0, 3));
          f.dst_y = 2'($urandom_range(0, 3));
          f.payload = {4'(i), 12'(sent[i])};
          in_flit[i]  <= f;
          in_valid[i] <= 1'b1;
        end else in_valid[i] <= 1'b0;
      end
    end
  end

  initial begin
    int lat;
    for (int i = 0; i < P; i++) begin in_flit[i] = '0; sent[i] = 0; end
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(!occupied && in_ready == 0, "idle and disabled after reset");
    // latency: one flit from west to east with everything enabled
    clk_en = 1; out_ready = '1;
    in_flit[4] = '0; in_flit[4].dst_x = 2'd3; in_flit[4].dst_y = 2'd1;
    in_flit[4].payload = {4'd4, 12'd0};
    exp_q[2][4].push_back(0); sent[4] = 1;
    in_valid[4] = 1;
    @(negedge clk); in_valid[4] = 0;        // written at this edge
    check(out_valid[2] && out_flit[2].dst_x == 3, "flit offered on east the cycle after it entered");
    lat = received;
    @(negedge clk);
    check(received == lat + 1 && !occupied, "flit left on the next edge");
    // random traffic
    random_phase = 1;
    while (!(sent[0] == NFLITS && sent[1] == NFLITS && sent[2] == NFLITS &&
             sent[3] == NFLITS && sent[4] == NFLITS)) @(posedge clk);
    random_phase = 0;
    @(negedge clk); in_valid = '0; clk_en = 1; out_ready = '1;
    repeat (40) @(negedge clk);
    check(received == P * NFLITS, $sformatf("received %0d of %0d", received, P * NFLITS));
    for (int o = 0; o < P; o++) for (int i = 0; i < P; i++)
      check(exp_q[o][i].size() == 0, "nothing left behind");
    check(!occupied, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

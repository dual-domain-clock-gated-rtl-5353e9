// mesh_traffic_check - self-checking traffic test for a MX x MY
// clock-enabled mesh, used by the mesh testbenches of several sizes.
//
// It reports through done / checks / failures; the wrapping testbench
// prints the result and ends the simulation.
//
// Each router's clk_en is driven by the mesh's own wake output and nothing
// else, so the test also shows that wake is enough to keep traffic moving
// (no flit waits forever behind a disabled router). Checks:
//  * one flit from node 0 to the far corner is offered at that node's local
//    output (MX-1)+(MY-1)+1 edges after it enters (one edge per hop, then
//    ejection);
//  * every node sends 50 flits to random nodes with random ejection
//    back-pressure; each flit leaves at the node its header names, flits
//    between one source and one destination stay in order, none is lost;
//  * when the traffic is over every wake, and so every clk_en, is low.
module mesh_traffic_check #(
  parameter int MX = 2,
  parameter int MY = 2
) (
  output bit done,
  output int checks,
  output int failures
);
  import noc_pkg::*;

  localparam int N = MX * MY, NFLITS = 50, HOPS = (MX - 1) + (MY - 1);

  logic clk = 0, rst_n = 0;
  logic [N-1:0] clk_en, inj_valid = '0, inj_ready, ej_valid, ej_ready = '0, occupied, wake;
  flit_t inj_flit [N];
  flit_t ej_flit  [N];

  always #5 clk = ~clk;
  assign clk_en = wake;

  mesh_noc #(.MESH_X(MX), .MESH_Y(MY)) dut (
    .clk(clk), .rst_n(rst_n), .clk_en(clk_en),
    .inj_valid(inj_valid), .inj_req(inj_valid), .inj_flit(inj_flit), .inj_ready(inj_ready),
    .ej_valid(ej_valid), .ej_flit(ej_flit), .ej_ready(ej_ready),
    .occupied(occupied), .wake(wake));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask


  int exp_q [N][N][$];   // [dst][src] sequence numbers
  int sent [N];
  function automatic bit all_sent();
    for (int i = 0; i < N; i++) if (sent[i] != NFLITS) return 0;
    return 1;
  endfunction

  int received = 0;
  bit random_phase = 0;
  logic [N-1:0] accepted_q = '0;

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < N; d++) if (ej_valid[d] && ej_ready[d]) begin
      int s, seq;
      s = int'(ej_flit[d].payload[15:12]);
      seq = int'(ej_flit[d].payload[11:0]);
      check(int'(ej_flit[d].dst_y) * MX + int'(ej_flit[d].dst_x) == d, "delivered at its destination");
      check(s < N && exp_q[d][s].size() > 0 && exp_q[d][s][0] == seq,
            $sformatf("order dst %0d src %0d seq %0d", d, s, seq));
      if (s < N && exp_q[d][s].size() > 0) void'(exp_q[d][s].pop_front());
      received++;
    end
    for (int i = 0; i < N; i++) if (random_phase && inj_valid[i] && inj_ready[i]) begin
      exp_q[int'(inj_flit[i].dst_y) * MX + int'(inj_flit[i].dst_x)][i].push_back(sent[i]);
      sent[i]++;
    end
    accepted_q <= inj_valid & inj_ready;
  end

  always @(negedge clk) if (random_phase) begin
    for (int d = 0; d < N; d++) ej_ready[d] <= ($urandom_range(0, 3) != 0);
    for (int i = 0; i < N; i++) begin
      if (!inj_valid[i] || accepted_q[i]) begin
        if (sent[i] < NFLITS && $urandom_range(0, 2) == 0) begin
          flit_t f;
          int d;
          d = $urandom_range(0, N - 1);
          f = '0;
          f.src_x = 2'(i % MX); f.src_y = 2'(i / MX);
          f.dst_x = 2'(d % MX); f.dst_y = 2'(d / MX);
          f.payload = {4'(i), 12'(sent[i])};
          inj_flit[i]  <= f;
          inj_valid[i] <= 1'b1;
        end else inj_valid[i] <= 1'b0;
      end
    end
  end

  initial begin
    int r0;
    done = 0; checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin inj_flit[i] = '0; sent[i] = 0; end
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(wake == 0 && clk_en == 0, "all routers off when idle");
    // single flit 0 -> far corner
    ej_ready = '1;
    inj_flit[0] = '0; inj_flit[0].dst_x = 2'(MX - 1); inj_flit[0].dst_y = 2'(MY - 1);
    inj_flit[0].payload = {4'd0, 12'd0};
    exp_q[N-1][0].push_back(0); sent[0] = 1;
    inj_valid[0] = 1;
    #1 check(inj_ready[0], "local port of node 0 accepts at once (wake from request)");
    @(negedge clk); inj_valid[0] = 0;
    r0 = received;
    for (int h = 1; h <= HOPS; h++) begin
      check(!ej_valid[N-1], $sformatf("not yet at the far corner after %0d edges", h));
      @(negedge clk);
    end
    check(ej_valid[N-1], $sformatf("offered at the far corner after %0d edges", HOPS + 1));
    @(negedge clk);
    check(received == r0 + 1, "ejected");
    repeat (3) @(negedge clk);
    check(wake == 0, "routers off again");
    // random traffic
    random_phase = 1;
    while (!all_sent()) @(posedge clk);
    random_phase = 0;
    @(negedge clk); inj_valid = '0; ej_ready = '1;
    repeat (20 * N) @(negedge clk);
    check(received == N * NFLITS, $sformatf("received %0d of %0d", received, N * NFLITS));
    for (int d = 0; d < N; d++) for (int s = 0; s < N; s++)
      check(exp_q[d][s].size() == 0, "nothing left behind");
    check(wake == 0 && occupied == 0, "all routers off after the traffic");
    done = 1;
  end
endmodule

// tb_async_fifo - self-checking test of the dual-clock FIFO.
//
// Write clock 10 ns, read clock 7 ns (unrelated periods). Phase 1 fills the
// FIFO with the reader stopped and checks that exactly 16 words fit and that
// full rises. Phase 2 streams 300 words with random write and read strobes
// in both domains and compares every popped word, in order, with a reference
// queue. Also checks the empty-flag delay: a word written into an empty FIFO
// must be visible after at most 3 read-clock edges (two synchronizer stages).
module tb_async_fifo;
  localparam int W = 24, AW = 4, DEPTH = 16;

  logic wclk = 0, rclk = 0, rst_n = 0;
  logic winc = 0, rinc = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic wfull, rempty;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  always #5   wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  async_fifo #(.WIDTH(W), .ADDR_WIDTH(AW)) dut (
    .wclk(wclk), .wrst_n(rst_n), .winc(winc), .wdata(wdata), .wfull(wfull),
    .rclk(rclk), .rrst_n(rst_n), .rinc(rinc), .rdata(rdata), .rempty(rempty));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  int nwritten = 0;
  int npopped  = 0;
  bit phase2   = 0;
  initial begin
    int lat;
    repeat (3) @(posedge wclk);
    rst_n = 1;
    repeat (3) @(posedge wclk);
    check(rempty && !wfull, "flags after reset");
    // single word latency
    @(negedge wclk); winc = 1; wdata = 24'hABCDEF;
    @(posedge wclk); #1 winc = 0;
    lat = 0;
    while (rempty) begin @(posedge rclk); #0.1 lat++; end
    check(lat >= 1 && lat <= 3, $sformatf("empty-flag latency %0d rclk edges", lat));
    check(rdata == 24'hABCDEF, "first word data");
    @(negedge rclk); rinc = 1; @(posedge rclk); #0.1 rinc = 0;
    repeat (4) @(posedge wclk);
    check(rempty, "empty after pop");
    // fill with reader stopped
    for (int i = 0; i < DEPTH + 4; i++) begin
      @(negedge wclk);
      winc = 1; wdata = W'(32'h100 + i);
      @(posedge wclk); #0.1;
      if (!wfull || i < DEPTH) ; // keep writing
    end
    @(negedge wclk); winc = 0;
    check(wfull, "full after 20 writes with reader stopped");
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge rclk);
      check(!rempty && rdata == W'(32'h100 + i), $sformatf("fill word %0d = %h", i, rdata));
      rinc = 1; @(posedge rclk); #0.1 rinc = 0;
    end
    repeat (4) @(posedge rclk);
    check(rempty, "empty after draining exactly 16 words (4 extra writes were refused)");
    // phase 2: random streaming
    phase2 = 1;
    while (nwritten < 300) begin
      @(negedge wclk);
      winc = ($urandom_range(0, 2) != 0);
      wdata = W'($urandom);
      @(posedge wclk);
      if (winc && !wfull) begin q.push_back(wdata); nwritten++; end
      #0.1;
    end
    @(negedge wclk); winc = 0;
  end

  // reader for phase 2
  always @(negedge rclk) begin
    if (phase2) begin
      rinc <= ($urandom_range(0, 3) != 0);
    end
  end
  always @(posedge rclk) begin
    if (phase2 && rinc && !rempty) begin
      if (q.size() == 0) check(0, "pop with empty reference");
      else check(rdata == q.pop_front(), "stream data order");
      npopped++;
      if (npopped == 300) begin
        check(q.size() == 0, "reference drained");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule

// tb_sensor_mem - self-checking test of the clock-enabled sample log.
//
// Writes 20 samples with ce = 1 (the pointer wraps after 16), checks the
// write pointer, then reads every address back (one cycle latency) and
// compares with the last 16 values written to each slot. Then shows that
// with ce = 0 neither a write nor a read changes anything.
module tb_sensor_mem;
  logic clk = 0, rst_n = 0, ce = 0, wr = 0;
  logic [15:0] wdata = '0, rd_data;
  logic [3:0] rd_addr = '0, wr_ptr;
  logic [15:0] ref_mem [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sensor_mem dut (.clk(clk), .rst_n(rst_n), .ce(ce), .wr(wr), .wdata(wdata),
                  .rd_addr(rd_addr), .rd_data(rd_data), .wr_ptr(wr_ptr));

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

  initial begin
    logic [15:0] prev_rd;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(wr_ptr == 0, "pointer reset");
    for (int i = 0; i < 20; i++) begin
      ce = 1; wr = 1; wdata = 16'h0100 + 16'(i * 3);
      ref_mem[i % 16] = wdata;
      @(negedge clk);
    end
    wr = 0;
    check(wr_ptr == 4, $sformatf("pointer after 20 writes = %0d", wr_ptr));
    for (int a = 0; a < 16; a++) begin
      rd_addr = 4'(a);
      @(negedge clk);
      check(rd_data == ref_mem[a], $sformatf("read %0d: %h vs %h", a, rd_data, ref_mem[a]));
    end
    // gated: nothing changes
    prev_rd = rd_data;
    ce = 0; wr = 1; wdata = 16'hdead; rd_addr = 4'd4;
    repeat (3) @(negedge clk);
    check(wr_ptr == 4, "no pointer move while ce = 0");
    check(rd_data == prev_rd, "read register frozen while ce = 0");
    wr = 0; ce = 1; rd_addr = 4'd4;
    @(negedge clk);
    check(rd_data == ref_mem[4], "no write happened while ce = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_noc_controller - self-checking test of per-router clock enables.
//
// Four routers, HOLD = 1 (default). Random wake patterns; the expected
// clk_en is computed in the testbench: high when wake is high now or was
// high in the previous cycle. Also checks that all enables are low when
// nothing is pending, and that active_cycles counts the enabled cycles.
module tb_noc_controller;
  logic clk = 0, rst_n = 0;
  logic [3:0] wake = '0, clk_en;
  logic [31:0] active_cycles [4];
  int checks = 0, failures = 0;
  int on_count [4] = '{0, 0, 0, 0};
  logic [3:0] prev_wake = '0;

  always #5 clk = ~clk;

  noc_controller #(.NUM_NODES(4)) dut (
    .clk(clk), .rst_n(rst_n), .wake(wake), .clk_en(clk_en), .active_cycles(active_cycles));

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
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(clk_en == 0, "all routers off when idle");
    for (int c = 0; c < 300; c++) begin
      wake = (c > 250) ? 4'b0 : 4'($urandom_range(0, 15) & $urandom_range(0, 15));
      #1;
      check(clk_en == (wake | prev_wake), $sformatf("clk_en %b exp %b", clk_en, wake | prev_wake));
      for (int n = 0; n < 4; n++) if (clk_en[n]) on_count[n]++;
      @(posedge clk); prev_wake = wake;
      @(negedge clk);
    end
    check(clk_en == 0, "all off after demand ends");
    for (int n = 0; n < 4; n++)
      check(active_cycles[n] == 32'(on_count[n]), $sformatf("active cycles %0d: %0d vs %0d", n, active_cycles[n], on_count[n]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

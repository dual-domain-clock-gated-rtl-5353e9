// tb_mac_unit - self-checking test of the actuator / MAC sink.
//
// Sends 50 flits with random payloads and coefficients (with idle gaps),
// keeps the expected sum of payload * coef in a 32-bit variable, and checks
// acc, actuator_out (low 16 bits), rx_count and the recorded source; then
// checks clear.
module tb_mac_unit;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, clear = 0, in_ready;
  flit_t in_flit = '0;
  logic [15:0] coef = '0, actuator_out, rx_count;
  logic [31:0] acc;
  logic [3:0] last_src;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac_unit dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_flit(in_flit),
                .in_ready(in_ready), .coef(coef), .clear(clear), .actuator_out(actuator_out),
                .acc(acc), .rx_count(rx_count), .last_src(last_src));

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
    logic [31:0] exp_acc;
    int n;
    exp_acc = 0; n = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(acc == 0 && actuator_out == 0 && rx_count == 0, "reset values");
    check(in_ready, "always ready");
    for (int i = 0; i < 80; i++) begin
      in_valid = ($urandom_range(0, 2) != 0) && (n < 50);
      in_flit = '0;
      in_flit.payload = 16'($urandom);
      in_flit.src_x = 2'(i); in_flit.src_y = 2'(i >> 2);
      coef = 16'($urandom_range(0, 300));
      if (in_valid) begin exp_acc += 32'(in_flit.payload) * 32'(coef); n++; end
      @(negedge clk);
      check(acc == exp_acc, $sformatf("acc %h exp %h", acc, exp_acc));
      check(actuator_out == exp_acc[15:0], "actuator_out is low half");
      if (in_valid) check(last_src == {2'(i), 2'(i >> 2)}, "last source");
    end
    in_valid = 0;
    check(rx_count == 16'(n), $sformatf("rx_count %0d exp %0d", rx_count, n));
    clear = 1; @(negedge clk); clear = 0;
    check(acc == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

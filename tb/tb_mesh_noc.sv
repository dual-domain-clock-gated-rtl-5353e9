// tb_mesh_noc - runs mesh_traffic_check on the 2 x 2 mesh of the top
// level: single-flit latency to the far corner, 50 random flits from every node with random ejection
// back-pressure, delivery, per-source ordering, and all routers gated off
// once the traffic is over. Router clock enables come only from the mesh's
// own wake outputs.
module tb_mesh_noc;
  bit done;
  int checks, failures;

  mesh_traffic_check #(.MX(2), .MY(2)) u_check (
    .done(done), .checks(checks), .failures(failures));

  initial begin
    fork
      wait (done);
      #3000000;
    join_any
    if (!done) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    end else begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end
endmodule

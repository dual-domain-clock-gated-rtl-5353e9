// tb_mesh_noc_3x2 - runs mesh_traffic_check on a 3 x 2 mesh (six
// processing elements, as in the larger example architecture): single-flit
// latency to the far corner, 50 random flits from every node with random ejection
// back-pressure, delivery, per-source ordering, and all routers gated off
// once the traffic is over. Router clock enables come only from the mesh's
// own wake outputs.
module tb_mesh_noc_3x2;
  bit done;
  int checks, failures;

  mesh_traffic_check #(.MX(3), .MY(2)) u_check (
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

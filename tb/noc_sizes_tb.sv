// noc_sizes_tb: the same workload on 2x2, 3x3, 4x4 and 5x5 meshes with default router
// parameters (two VCs, eight-flit buffers, single-stage routers), run side by side by
// four mesh_traffic harnesses. Each checks corner-to-corner zero-load latency
// (2*(hops+1) cycles for the head) and delivers uniform random traffic of 5-flit packets
// at 10%, 25% and 40% flit injection rates, checking every packet and printing average
// latency and throughput per size and rate. Both the zero-load latency and the average
// latency at the lowest rate must grow with mesh size (at low load latency is set by the
// average hop count, not by congestion).
module noc_sizes_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] done;
  int ch[4], fl[4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mesh_traffic #(.KX(2), .KY(2)) u_2x2 (.clk, .rst_n, .done(done[0]), .checks(ch[0]), .failures(fl[0]));
  mesh_traffic #(.KX(3), .KY(3)) u_3x3 (.clk, .rst_n, .done(done[1]), .checks(ch[1]), .failures(fl[1]));
  mesh_traffic #(.KX(4), .KY(4)) u_4x4 (.clk, .rst_n, .done(done[2]), .checks(ch[2]), .failures(fl[2]));
  mesh_traffic #(.KX(5), .KY(5)) u_5x5 (.clk, .rst_n, .done(done[3]), .checks(ch[3]), .failures(fl[3]));

  task automatic finish();
    checks = 0;
    for (int i = 0; i < 4; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    checks += 2;
    if (!(u_2x2.lone_lat < u_3x3.lone_lat && u_3x3.lone_lat < u_4x4.lone_lat && u_4x4.lone_lat < u_5x5.lone_lat)) begin
      failures++;
      $display("FAIL zero-load latency does not grow with mesh size: %0d %0d %0d %0d",
               u_2x2.lone_lat, u_3x3.lone_lat, u_4x4.lone_lat, u_5x5.lone_lat);
    end
    if (!(u_2x2.avg_lat[0] < u_3x3.avg_lat[0] && u_3x3.avg_lat[0] < u_4x4.avg_lat[0] && u_4x4.avg_lat[0] < u_5x5.avg_lat[0])) begin
      failures++;
      $display("FAIL low-load latency does not grow with mesh size: %0.1f %0.1f %0.1f %0.1f",
               u_2x2.avg_lat[0], u_3x3.avg_lat[0], u_4x4.avg_lat[0], u_5x5.avg_lat[0]);
    end
    finish();
  end
endmodule

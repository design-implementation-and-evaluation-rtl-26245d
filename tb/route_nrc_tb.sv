// route_nrc_tb: for a router at (2,1) in a 5x5 mesh, every output port and every
// destination, compares the lookahead port with XY routing worked out from the
// downstream coordinates.
module route_nrc_tb;
  import noc_pkg::*;
  localparam int X = 2, Y = 1;
  logic [PORT_W-1:0] out_port, next_port;
  logic [COORD_W-1:0] dst_x, dst_y;
  int checks = 0, failures = 0;

  route_nrc #(.X(X), .Y(Y)) dut (.out_port, .dst_x, .dst_y, .next_port);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nx, ny, e;
    for (int p = 0; p < 5; p++)
      for (int dx = 0; dx < 5; dx++)
        for (int dy = 0; dy < 5; dy++) begin
          out_port = PORT_W'(p); dst_x = COORD_W'(dx); dst_y = COORD_W'(dy);
          #1;
          nx = X + (p == 1) - (p == 2);
          ny = Y + (p == 3) - (p == 4);
          if (dx > nx) e = 1; else if (dx < nx) e = 2; else if (dy > ny) e = 3; else if (dy < ny) e = 4; else e = 0;
          checks++;
          if (int'(next_port) != e) begin
            failures++;
            $display("FAIL port=%0d dst=(%0d,%0d) got=%0d exp=%0d", p, dx, dy, next_port, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// crossbar_tb: random flits on every input VC and random select values; each output
// must carry the flit of the selected VC of the selected input port.
module crossbar_tb;
  import noc_pkg::*;
  localparam int P = 5, V = 2, W = 32;
  logic [P-1:0][V-1:0][W-1:0] din;
  logic [P-1:0][VCID_W-1:0] sel_vc;
  logic [P-1:0][PORT_W-1:0] sel_in;
  logic [P-1:0] sel_valid, dout_valid;
  logic [P-1:0][W-1:0] dout;
  int checks = 0, failures = 0;

  crossbar #(.P(P), .V(V), .W(W)) dut (.din, .sel_vc, .sel_in, .sel_valid, .dout, .dout_valid);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      for (int p = 0; p < P; p++) begin
        for (int v = 0; v < V; v++) din[p][v] = $urandom;
        sel_vc[p] = VCID_W'($urandom_range(0, V-1));
        sel_in[p] = PORT_W'($urandom_range(0, P-1));
        sel_valid[p] = $urandom_range(0, 1) == 1;
      end
      #1;
      for (int o = 0; o < P; o++) begin
        checks++;
        if (dout_valid[o] != sel_valid[o] || (sel_valid[o] && dout[o] !== din[sel_in[o]][sel_vc[sel_in[o]]])) begin
          failures++; $display("FAIL out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

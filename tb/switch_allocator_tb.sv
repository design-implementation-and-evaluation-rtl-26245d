// switch_allocator_tb: a fixed-priority switch allocator is compared exactly with a
// reference model (lowest requesting VC per input port, then lowest input port per
// output port). A round-robin one is checked for legal matchings (one flit per input
// port and per output port, grants only to requesters, crossbar selects consistent
// with the grants, every contested output used) and for fairness under contention.
module switch_allocator_tb;
  import noc_pkg::*;
  localparam int P = 5, V = 2;
  logic clk = 0, rst_n = 0;
  logic [P-1:0][V-1:0] req, gnt_f, gnt_r;
  logic [P-1:0][V-1:0][PORT_W-1:0] req_port;
  logic [P-1:0][VCID_W-1:0] svc_f, svc_r;
  logic [P-1:0][PORT_W-1:0] sin_f, sin_r;
  logic [P-1:0] ov_f, ov_r;
  int checks = 0, failures = 0;

  switch_allocator #(.P(P), .V(V), .ROUND_ROBIN(1'b0)) u_f (.clk, .rst_n, .req, .req_port, .gnt(gnt_f), .sel_vc(svc_f), .sel_in(sin_f), .out_valid(ov_f));
  switch_allocator #(.P(P), .V(V), .ROUND_ROBIN(1'b1)) u_r (.clk, .rst_n, .req, .req_port, .gnt(gnt_r), .sel_vc(svc_r), .sel_in(sin_r), .out_valid(ov_r));

  always #5 clk = ~clk;

  task automatic fail(string s);
    failures++; $display("FAIL %s", s);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_fixed();
    logic [P-1:0][V-1:0] eg;
    logic [P-1:0] eov;
    int w1[P];
    eg = '0; eov = '0;
    for (int p = 0; p < P; p++) begin
      w1[p] = -1;
      for (int v = V-1; v >= 0; v--) if (req[p][v]) w1[p] = v;
    end
    for (int o = 0; o < P; o++) begin
      for (int p = 0; p < P; p++)
        if (!eov[o] && w1[p] >= 0 && int'(req_port[p][w1[p]]) == o) begin
          eov[o] = 1; eg[p][w1[p]] = 1;
          checks++;
          if (int'(sin_f[o]) != p || int'(svc_f[p]) != w1[p]) fail("fixed selects");
        end
    end
    checks++;
    if (gnt_f !== eg || ov_f !== eov) fail($sformatf("fixed gnt=%b exp=%b ov=%b exp=%b", gnt_f, eg, ov_f, eov));
  endtask

  task automatic check_rr();
    int outs[P];
    for (int o = 0; o < P; o++) outs[o] = 0;
    for (int p = 0; p < P; p++) begin
      checks++;
      if (!$onehot0(gnt_r[p]) || (gnt_r[p] & ~req[p]) != 0) fail("rr input grant");
      for (int v = 0; v < V; v++) if (gnt_r[p][v]) begin
        int o;
        o = req_port[p][v];
        outs[o]++;
        checks++;
        if (!ov_r[o] || int'(sin_r[o]) != p || int'(svc_r[p]) != v) fail("rr selects");
      end
    end
    for (int o = 0; o < P; o++) begin
      checks++;
      if (outs[o] != int'(ov_r[o])) fail("rr output used twice or valid wrong");
    end
    checks++;
    if (req != 0 && gnt_r == 0) fail("rr nothing granted");
  endtask

  initial begin
    int wins[P][V];
    req = '0; req_port = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
        req[p][v] = $urandom_range(0, 1) == 1;
        req_port[p][v] = PORT_W'($urandom_range(0, P-1));
      end
      #1;
      check_fixed();
      check_rr();
    end
    for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) wins[p][v] = 0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      req = '1;
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) req_port[p][v] = 3'd1;
      #1;
      check_rr();
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) if (gnt_r[p][v]) wins[p][v]++;
    end
    for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
      checks++;
      if (wins[p][v] < 5) fail($sformatf("rr starvation %0d.%0d", p, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

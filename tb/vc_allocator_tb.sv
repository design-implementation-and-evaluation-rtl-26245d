// vc_allocator_tb: a fixed-priority allocator is compared exactly with a reference model
// of the two arbitration levels (lowest idle VC first; then, in the hierarchical second
// level, lowest input VC number and within it lowest input port). A
// round-robin allocator gets the same random stimulus and is checked for legal grants:
// only requesting head flits, only idle VCs on the requested port, no output VC granted
// twice, alloc consistent with the grants, at least one grant per port that has an idle
// VC and a requester, and no requester starved under constant contention.
module vc_allocator_tb;
  import noc_pkg::*;
  localparam int P = 5, V = 2;
  logic clk = 0, rst_n = 0;
  logic [P-1:0][V-1:0] req, ovc_idle;
  logic [P-1:0][V-1:0][PORT_W-1:0] req_port;
  logic [P-1:0][V-1:0] gnt_f, gnt_r, alloc_f, alloc_r;
  logic [P-1:0][V-1:0][VCID_W-1:0] ovc_f, ovc_r;
  int checks = 0, failures = 0;

  vc_allocator #(.P(P), .V(V), .ROUND_ROBIN(1'b0)) u_f (.clk, .rst_n, .req, .req_port, .ovc_idle, .gnt(gnt_f), .gnt_ovc(ovc_f), .alloc(alloc_f));
  vc_allocator #(.P(P), .V(V), .ROUND_ROBIN(1'b1)) u_r (.clk, .rst_n, .req, .req_port, .ovc_idle, .gnt(gnt_r), .gnt_ovc(ovc_r), .alloc(alloc_r));

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
    logic [P-1:0][V-1:0] eg, ea;
    int ew[P][V];
    eg = '0; ea = '0;
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++) begin
        ew[p][v] = -1;
        if (req[p][v])
          for (int w = V-1; w >= 0; w--) if (ovc_idle[req_port[p][v]][w]) ew[p][v] = w;
      end
    for (int o = 0; o < P; o++)
      for (int w = 0; w < V; w++) begin
        bit done = 0;
        for (int v = 0; v < V; v++)
          for (int p = 0; p < P; p++)
            if (!done && ew[p][v] == w && int'(req_port[p][v]) == o) begin
              eg[p][v] = 1; ea[o][w] = 1; done = 1;
            end
      end
    checks++;
    if (gnt_f !== eg || alloc_f !== ea) fail($sformatf("fixed gnt=%b exp=%b alloc=%b exp=%b", gnt_f, eg, alloc_f, ea));
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++)
        if (eg[p][v]) begin
          checks++;
          if (int'(ovc_f[p][v]) != ew[p][v]) fail("fixed ovc");
        end
  endtask

  task automatic check_rr();
    int used[P][V];
    for (int o = 0; o < P; o++) for (int w = 0; w < V; w++) used[o][w] = 0;
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++)
        if (gnt_r[p][v]) begin
          int o, w;
          o = req_port[p][v]; w = ovc_r[p][v];
          checks++;
          if (!req[p][v] || !ovc_idle[o][w] || !alloc_r[o][w]) fail("rr grant illegal");
          used[o][w]++;
        end
    for (int o = 0; o < P; o++) begin
      bit want = 0, got = 0;
      for (int w = 0; w < V; w++) begin
        checks++;
        if (used[o][w] > 1 || (alloc_r[o][w] != (used[o][w] == 1))) fail("rr ovc double/alloc");
        if (used[o][w] == 1) got = 1;
      end
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++)
        if (req[p][v] && int'(req_port[p][v]) == o && ovc_idle[o] != 0) want = 1;
      checks++;
      if (want && !got) fail($sformatf("rr port %0d idle VC unused", o));
    end
  endtask

  initial begin
    int wins[P][V];
    req = '0; req_port = '0; ovc_idle = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
        req[p][v] = $urandom_range(0, 1) == 1;
        req_port[p][v] = PORT_W'($urandom_range(0, P-1));
        ovc_idle[p][v] = $urandom_range(0, 2) != 0;
      end
      #1;
      check_fixed();
      check_rr();
    end
    // Starvation: all ten input VCs want output port 2, only VC 0 idle.
    for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) wins[p][v] = 0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      req = '1; ovc_idle = '0; ovc_idle[2][0] = 1;
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) req_port[p][v] = 3'd2;
      #1;
      check_rr();
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) if (gnt_r[p][v]) wins[p][v]++;
    end
    for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
      checks++;
      if (wins[p][v] < 5) fail($sformatf("rr starvation of input VC %0d.%0d (%0d wins)", p, v, wins[p][v]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

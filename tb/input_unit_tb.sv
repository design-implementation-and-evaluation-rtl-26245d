// input_unit_tb: an upstream model sends packets of 1 to 5 flits on both VCs, obeying
// the credits the unit returns; the testbench plays both allocators with random grants
// and random downstream credit availability. A reference model of each VC queue checks
// va_req, req_port and sa_req every cycle, and on every switch grant the flit offered
// to the crossbar: payload unchanged, VCID rewritten to the output VC, and for head
// flits CNOP rewritten to the XY port at the downstream router. It also checks that each
// pop returns exactly one credit for the right VC one cycle later and that every flit
// sent comes out.
module input_unit_tb;
  import noc_pkg::*;
  localparam int V = 2, DEPTH = 4, P = 5, X = 1, Y = 1, W = 32;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [W-1:0] in_flit;
  logic [V-1:0] va_req, sa_req, va_gnt, sa_gnt;
  logic [V-1:0][PORT_W-1:0] req_port;
  logic [V-1:0][VCID_W-1:0] va_gnt_ovc;
  logic [P-1:0][V-1:0] credit_ok;
  logic [V-1:0][W-1:0] out_flit;
  logic credit_valid;
  logic [VCID_W-1:0] credit_vc;
  logic [V-1:0][2:0] vc_count;

  input_unit #(.V(V), .DEPTH(DEPTH), .P(P), .W(W), .X(X), .Y(Y)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] q[V][$];
  bit  asg[V];
  int  aovc[V], aport[V];
  int  up_cred[V];
  int  exp_credit = -1;
  int  checks = 0, failures = 0, sent = 0, popped = 0, stalls = 0;
  // upstream packet generator state
  int  rem[V];
  int  cur_dst_x[V], cur_dst_y[V];

  function automatic hdr_t hd(logic [W-1:0] f);
    return hdr_t'(f);
  endfunction

  task automatic fail(string s);
    failures++; $display("FAIL t=%0t %s", $time, s);
  endtask

  function automatic int exp_next(int port, int dx, int dy);
    int nx, ny;
    nx = X + (port == 1) - (port == 2);
    ny = Y + (port == 3) - (port == 4);
    return int'(xy_route(COORD_W'(nx), COORD_W'(ny), COORD_W'(dx), COORD_W'(dy)));
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = 0; va_gnt = 0; sa_gnt = 0; va_gnt_ovc = 0; credit_ok = '1;
    for (int v = 0; v < V; v++) begin up_cred[v] = DEPTH; rem[v] = 0; asg[v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      // ---- upstream: maybe send one flit (stop sending new ones near the end)
      in_valid = 0;
      begin
        int v;
        hdr_t h;
        v = $urandom_range(0, V-1);
        if (k < 5000 && up_cred[v] > 0 && $urandom_range(0, 2) != 0) begin
          h = hdr_t'($urandom);
          h.vcid = VCID_W'(v);
          if (rem[v] == 0) begin
            int len;
            len = $urandom_range(1, 5);
            cur_dst_x[v] = $urandom_range(0, 4); cur_dst_y[v] = $urandom_range(0, 4);
            h.ftype = (len == 1) ? FT_HEADTAIL : FT_HEAD;
            h.dst_x = COORD_W'(cur_dst_x[v]); h.dst_y = COORD_W'(cur_dst_y[v]);
            h.cnop  = xy_route(COORD_W'(X), COORD_W'(Y), h.dst_x, h.dst_y);
            rem[v] = len - 1;
          end else begin
            h.ftype = (rem[v] == 1) ? FT_TAIL : FT_BODY;
            rem[v]--;
          end
          in_valid = 1; in_flit = h;
          up_cred[v]--; sent++;
        end
      end
      // ---- allocators
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) credit_ok[p][v] = $urandom_range(0, 4) != 0;
      #1;
      va_gnt = 0;
      for (int v = 0; v < V; v++) begin
        hdr_t fh;
        bit exp_va;
        int port;
        fh = (q[v].size() > 0) ? hdr_t'(q[v][0]) : hdr_t'(0);
        exp_va = q[v].size() > 0 && !asg[v];
        port = asg[v] ? aport[v] : int'(fh.cnop);
        checks++;
        if (va_req[v] != exp_va) fail($sformatf("va_req vc%0d=%b exp %b", v, va_req[v], exp_va));
        if (q[v].size() > 0) begin
          checks++;
          if (int'(req_port[v]) != port) fail("req_port");
        end
        if (va_req[v] && $urandom_range(0, 1) == 1) begin
          va_gnt[v] = 1; va_gnt_ovc[v] = VCID_W'($urandom_range(0, V-1));
        end
      end
      #1;
      sa_gnt = 0;
      begin
        int cand[$];
        cand.delete();
        for (int v = 0; v < V; v++) begin
          bit has; int ov, port; bit exp_sa;
          has = asg[v] || va_gnt[v];
          ov = asg[v] ? aovc[v] : int'(va_gnt_ovc[v]);
          port = asg[v] ? aport[v] : int'(hd(q[v][0]).cnop);
          exp_sa = q[v].size() > 0 && has && credit_ok[port][ov];
          checks++;
          if (sa_req[v] != exp_sa) fail($sformatf("sa_req vc%0d=%b exp %b", v, sa_req[v], exp_sa));
          if (q[v].size() > 0 && has && !credit_ok[port][ov]) stalls++;
          if (sa_req[v]) cand.push_back(v);
        end
        if (cand.size() > 0 && $urandom_range(0, 2) != 0) sa_gnt[cand[$urandom_range(0, cand.size()-1)]] = 1;
      end
      #1;
      // ---- check flits leaving
      for (int v = 0; v < V; v++) if (sa_gnt[v]) begin
        hdr_t fh, eh;
        int ov, port;
        fh = hdr_t'(q[v][0]);
        ov = asg[v] ? aovc[v] : int'(va_gnt_ovc[v]);
        port = asg[v] ? aport[v] : int'(fh.cnop);
        eh = fh; eh.vcid = VCID_W'(ov);
        if (is_head(fh.ftype)) eh.cnop = PORT_W'(exp_next(port, fh.dst_x, fh.dst_y));
        checks++;
        if (out_flit[v] !== W'(eh)) fail($sformatf("out_flit vc%0d %h exp %h", v, out_flit[v], eh));
      end
      // ---- clock edge and model update
      @(posedge clk);
      #1;
      exp_credit = -1;
      for (int v = 0; v < V; v++) if (sa_gnt[v]) exp_credit = v;
      checks++;
      if (exp_credit >= 0) begin
        if (!credit_valid || int'(credit_vc) != exp_credit) fail("credit missing");
        else up_cred[exp_credit]++;
      end else if (credit_valid) fail("spurious credit");
      exp_credit = -1;
      for (int v = 0; v < V; v++) begin
        if (va_gnt[v]) begin asg[v] = 1; aovc[v] = va_gnt_ovc[v]; aport[v] = hd(q[v][0]).cnop; end
        if (sa_gnt[v]) begin
          if (is_tail(hd(q[v][0]).ftype)) asg[v] = 0;
          void'(q[v].pop_front());
          popped++;
        end
      end
      if (in_valid) q[int'(hd(in_flit).vcid)].push_back(in_flit);
      for (int v = 0; v < V; v++) begin
        checks++;
        if (int'(vc_count[v]) != q[v].size()) fail("vc_count");
      end
    end
    checks++;
    if (popped != sent || sent < 1000 || stalls == 0) fail($sformatf("sent=%0d popped=%0d stalls=%0d", sent, popped, stalls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

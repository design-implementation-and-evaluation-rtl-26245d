// router_tb: one router at (1,1) with four-flit VC buffers. Five upstream models (one per
// input port) send packets of 1 to 5 flits on random VCs to random destinations of a
// 3x3 mesh, honouring the credits the router returns. Five downstream models take the
// output flits and return credits after a random delay, with stretches of no credits to
// force credit stalls. Checks:
//   - every packet leaves through the port named by its CNOP, once, with flits in order
//     and not interleaved with another packet on the same output VC;
//   - a head flit leaves with CNOP set to its XY port at the next router;
//   - no output VC carries more flits than the downstream buffer holds (credit safety);
//   - an unloaded router forwards a flit in two cycles (switch stage plus link stage);
//   - VC allocation conflicts, switch conflicts and credit stalls all occur.
module router_tb;
  import noc_pkg::*;
  localparam int P = 5, V = 2, DEPTH = 4, W = 32, X = 1, Y = 1;
  localparam int NPKT = 600;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] in_valid, credit_out_valid, out_valid, credit_in_valid;
  logic [P-1:0][W-1:0] in_flit, out_flit;
  logic [P-1:0][VCID_W-1:0] credit_out_vc, credit_in_vc;
  logic [V-1:0][3:0] local_count;

  router #(.V(V), .DEPTH(DEPTH), .X(X), .Y(Y)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  // packet bookkeeping
  int pk_port[NPKT], pk_len[NPKT], pk_next[NPKT];
  bit pk_done[NPKT];
  int next_id = 0, done_cnt = 0;
  // upstream state
  int up_cred[P][V];
  int up_pkt[P][V], up_idx[P][V];
  // downstream state
  int dn_pkt[P][V], dn_idx[P][V], dn_occ[P][V];
  int cr_time[P][$], cr_vc[P][$];
  int va_conf = 0, sa_conf = 0, cr_stall = 0;
  int lat_seen = -1;

  function automatic hdr_t hd(logic [W-1:0] f);
    return hdr_t'(f);
  endfunction

  task automatic fail(string s);
    failures++; $display("FAIL cyc=%0d %s", cyc, s);
    if (failures >= 20) begin
      $display("too many failures, stopping");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  function automatic int exp_next(int port, int dx, int dy);
    int nx, ny;
    nx = X + (port == 1) - (port == 2);
    ny = Y + (port == 3) - (port == 4);
    return int'(xy_route(COORD_W'(nx), COORD_W'(ny), COORD_W'(dx), COORD_W'(dy)));
  endfunction

  // Builds the next flit of packet id on VC v; starts a new packet when id < 0.
  function automatic logic [W-1:0] make_flit(int id, int idx, int v);
    hdr_t h;
    h = '0;
    h.vcid = VCID_W'(v);
    if (idx == 0) begin
      h.ftype = (pk_len[id] == 1) ? FT_HEADTAIL : FT_HEAD;
      h.payload = 13'(id);
    end else begin
      h.ftype = (idx == pk_len[id] - 1) ? FT_TAIL : FT_BODY;
      h.cnop = 3'(idx); h.src_x = 3'(id >> 10); h.src_y = 3'(id >> 7);
      h.payload = 13'(id);
    end
    return W'(h);
  endfunction

  function automatic int new_packet();
    int id, dx, dy;
    id = next_id++;
    pk_len[id] = $urandom_range(1, 5);
    do begin dx = $urandom_range(0, 2); dy = $urandom_range(0, 2); end while (dx == X && dy == Y && $urandom_range(0, 3) != 0);
    pk_port[id] = xy_route(COORD_W'(X), COORD_W'(Y), COORD_W'(dx), COORD_W'(dy));
    pk_next[id] = exp_next(pk_port[id], dx, dy);
    return id * 64 + dx * 8 + dy;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Downstream sinks: check and return credits.
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int o = 0; o < P; o++) if (out_valid[o]) begin
      hdr_t h; int v, id;
      h = hd(out_flit[o]); v = h.vcid; id = h.payload;
      if (lat_seen == -2) lat_seen = cyc;
      checks++;
      if (id >= next_id || pk_port[id] != o) begin fail($sformatf("flit of pkt %0d on wrong port %0d", id, o)); continue; end
      dn_occ[o][v]++;
      checks++;
      if (dn_occ[o][v] > DEPTH) fail("credit overrun");
      if (is_head(h.ftype)) begin
        checks++;
        if (dn_pkt[o][v] != -1) fail("head on busy output VC");
        if (int'(h.cnop) != pk_next[id]) fail($sformatf("lookahead cnop %0d exp %0d", h.cnop, pk_next[id]));
        dn_pkt[o][v] = id; dn_idx[o][v] = 1;
      end else begin
        checks++;
        if (dn_pkt[o][v] != id || int'(h.cnop) != dn_idx[o][v]) fail($sformatf("body out of order pkt %0d", id));
        dn_idx[o][v]++;
      end
      if (is_tail(h.ftype)) begin
        checks++;
        if (dn_idx[o][v] != pk_len[id] || pk_done[id]) fail("tail length/duplicate");
        pk_done[id] = 1; done_cnt++;
        dn_pkt[o][v] = -1;
      end
      // Ports 3 and 4 are slow consumers some of the time.
      cr_time[o].push_back(cyc + 1 + ((o >= 3 && (cyc / 200) % 2 == 1) ? 30 : $urandom_range(0, 2)));
      cr_vc[o].push_back(v);
    end
    // contention probes
    for (int p = 0; p < P; p++) begin
      va_conf += $countones(dut.va_req[p] & ~dut.va_gnt[p]);
      sa_conf += $countones(dut.sa_req[p] & ~dut.sa_gnt[p]);
    end
  end

  // Credit stalls: a VC holding an output VC and a flit but not requesting the switch.
  for (genvar p = 0; p < P; p++) begin : g_probe
    always @(posedge clk) if (rst_n)
      for (int v = 0; v < V; v++)
        if (!dut.g_port[p].g_on.u_in.empty[v] && dut.g_port[p].g_on.u_in.ovc_valid_q[v] && !dut.g_port[p].g_on.u_in.sa_req[v]) cr_stall++;
  end

  // Credit return driver (one credit per port per cycle).
  always @(negedge clk) begin
    for (int o = 0; o < P; o++) begin
      credit_in_valid[o] = 0; credit_in_vc[o] = 0;
      if (cr_time[o].size() > 0 && cr_time[o][0] <= cyc) begin
        void'(cr_time[o].pop_front());
        credit_in_vc[o] = VCID_W'(cr_vc[o].pop_front());
        credit_in_valid[o] = 1;
        dn_occ[o][credit_in_vc[o]]--;
      end
    end
  end

  // Upstream credit counters.
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < P; p++) if (credit_out_valid[p]) up_cred[p][credit_out_vc[p]]++;

  initial begin
    int t0;
    in_valid = '0; in_flit = '0; credit_in_valid = '0; credit_in_vc = '0;
    for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
      up_cred[p][v] = DEPTH; up_pkt[p][v] = -1; dn_pkt[p][v] = -1; dn_occ[p][v] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Unloaded latency: one single-flit packet from the west port.
    @(negedge clk);
    begin
      int r, id;
      r = new_packet(); id = r / 64;
      pk_len[id] = 1;
      begin
        hdr_t h;
        h = hd(make_flit(id, 0, 0));
        h.dst_x = 3'((r / 8) % 8); h.dst_y = 3'(r % 8); h.cnop = 3'(pk_port[id]);
        in_flit[PORT_WEST] = W'(h);
      end
      in_valid[PORT_WEST] = 1; up_cred[PORT_WEST][0]--;
      t0 = cyc;
      lat_seen = -2;
      @(negedge clk); in_valid = '0;
      repeat (5) @(negedge clk);
      checks++;
      if (lat_seen - t0 != 2) fail($sformatf("unloaded latency %0d cycles, expected 2", lat_seen - t0));
    end
    // Random traffic
    while (next_id < NPKT || (|in_valid)) begin
      @(negedge clk);
      in_valid = '0;
      for (int p = 0; p < P; p++) begin
        int v;
        v = $urandom_range(0, V-1);
        if ($urandom_range(0, 9) < 7 && up_cred[p][v] > 0 && (up_pkt[p][v] >= 0 || next_id < NPKT)) begin
          hdr_t h;
          if (up_pkt[p][v] < 0) begin
            int r;
            r = new_packet();
            up_pkt[p][v] = r / 64; up_idx[p][v] = 0;
            h = hd(make_flit(up_pkt[p][v], 0, v));
            h.dst_x = 3'((r / 8) % 8); h.dst_y = 3'(r % 8); h.cnop = 3'(pk_port[up_pkt[p][v]]);
          end else
            h = hd(make_flit(up_pkt[p][v], up_idx[p][v], v));
          in_flit[p] = W'(h); in_valid[p] = 1;
          up_cred[p][v]--;
          up_idx[p][v]++;
          if (up_idx[p][v] == pk_len[up_pkt[p][v]]) up_pkt[p][v] = -1;
        end
      end
    end
    @(negedge clk); in_valid = '0;
    for (int p = 0; p < P; p++) for (int v = 0; v < V; v++)
      while (up_pkt[p][v] >= 0) begin
        @(negedge clk); in_valid = '0;
        if (up_cred[p][v] > 0) begin
          in_flit[p] = make_flit(up_pkt[p][v], up_idx[p][v], v); in_valid[p] = 1;
          up_cred[p][v]--; up_idx[p][v]++;
          if (up_idx[p][v] == pk_len[up_pkt[p][v]]) up_pkt[p][v] = -1;
        end
      end
    @(negedge clk); in_valid = '0;
    while (done_cnt < next_id) @(negedge clk);
    repeat (50) @(negedge clk);
    checks++;
    if (done_cnt != NPKT) fail($sformatf("delivered %0d of %0d", done_cnt, NPKT));
    for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
      checks++;
      if (up_cred[p][v] != DEPTH || dn_occ[p][v] != 0) fail("credits not all returned");
    end
    checks++;
    if (va_conf == 0 || sa_conf == 0 || cr_stall == 0) fail($sformatf("coverage va=%0d sa=%0d credit=%0d", va_conf, sa_conf, cr_stall));
    $display("router_tb: %0d packets, VA conflicts %0d, SA conflicts %0d, credit stalls %0d", done_cnt, va_conf, sa_conf, cr_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

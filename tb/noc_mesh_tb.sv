// noc_mesh_tb: a 4x3 mesh (non-square, to catch X/Y mix-ups) with default router
// parameters. Per-node traffic generators with unbounded source queues inject packets of
// 1 to 5 flits, watching the local FIFO occupancy so they never overflow it; per-node
// receptors accept every ejected flit and return its credit at once. Checks:
//   - a lone packet's head crosses H hops in 2*(H+1) cycles (two cycles per router);
//   - every packet is ejected exactly once, at its destination, flits in order and not
//     interleaved with another packet on the same VC, payload intact;
//   - both VCs of the network links are used, injection backs up on full local FIFOs,
//     and routers see VC-allocation and switch conflicts and credit stalls.
// Traffic: uniform random, then coordinate complement (node (x,y) sends to
// (KX-1-x, KY-1-y)), both at high load.
module noc_mesh_tb;
  import noc_pkg::*;
  localparam int KX = 4, KY = 3, N = KX * KY, V = 2, DEPTH = 8, W = 32;
  localparam int NPKT = 3000;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] inj_valid, inj_credit_valid, ej_valid, ej_credit_valid;
  logic [N-1:0][W-1:0] inj_flit, ej_flit;
  logic [N-1:0][VCID_W-1:0] inj_credit_vc, ej_credit_vc;
  logic [N-1:0][V-1:0][3:0] inj_count;

  noc_mesh #(.KX(KX), .KY(KY)) dut (.*);

  always #5 clk = ~clk;

  assign ej_credit_valid = ej_valid;
  for (genvar n = 0; n < N; n++) begin : g_cr
    assign ej_credit_vc[n] = ej_flit[n][29:28];
  end

  int checks = 0, failures = 0, cyc = 0;
  int pk_dst[NPKT], pk_len[NPKT], pk_t0[NPKT];
  bit pk_done[NPKT];
  int next_id = 0, done_cnt = 0;
  int srcq[N][$];                 // packet ids waiting at each node
  int cur_pkt[N], cur_idx[N], cur_vc[N];
  int rx_pkt[N][V], rx_idx[N][V];
  int vc_use[V], inj_full = 0, va_conf = 0, sa_conf = 0, cr_stall = 0;
  int lone = -1, lone_lat = -1;

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

  function automatic int add_packet(int src, int dst);
    int id;
    id = next_id++;
    pk_dst[id] = dst; pk_len[id] = $urandom_range(1, 5);
    srcq[src].push_back(id);
    return id;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Traffic generators: drive on the falling edge.
  always @(negedge clk) begin
    for (int n = 0; n < N; n++) begin
      inj_valid[n] = 0;
      if (rst_n && cur_pkt[n] < 0 && srcq[n].size() > 0) begin
        cur_pkt[n] = srcq[n].pop_front(); cur_idx[n] = 0; cur_vc[n] = $urandom_range(0, V-1);
      end
      if (rst_n && cur_pkt[n] >= 0) begin
        if (int'(inj_count[n][cur_vc[n]]) >= DEPTH) inj_full++;
        else begin
          hdr_t h; int id;
          id = cur_pkt[n];
          h = '0;
          h.vcid = VCID_W'(cur_vc[n]);
          h.payload = 13'(id);
          if (cur_idx[n] == 0) begin
            h.ftype = pk_len[id] == 1 ? FT_HEADTAIL : FT_HEAD;
            h.src_x = 3'(n % KX); h.src_y = 3'(n / KX);
            h.dst_x = 3'(pk_dst[id] % KX); h.dst_y = 3'(pk_dst[id] / KX);
            h.cnop  = xy_route(h.src_x, h.src_y, h.dst_x, h.dst_y);
            pk_t0[id] = cyc;
          end else begin
            h.ftype = cur_idx[n] == pk_len[id] - 1 ? FT_TAIL : FT_BODY;
            h.cnop = 3'(cur_idx[n]);
          end
          inj_flit[n] = W'(h); inj_valid[n] = 1;
          cur_idx[n]++;
          if (cur_idx[n] == pk_len[id]) cur_pkt[n] = -1;
        end
      end
    end
  end

  // Traffic receptors.
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int n = 0; n < N; n++) if (ej_valid[n]) begin
      hdr_t h; int id, v;
      h = hd(ej_flit[n]); id = h.payload; v = h.vcid;
      vc_use[v]++;
      checks++;
      if (id >= next_id || pk_dst[id] != n) begin fail($sformatf("pkt %0d ejected at wrong node %0d", id, n)); continue; end
      if (is_head(h.ftype)) begin
        checks++;
        if (rx_pkt[n][v] != -1) fail("head interleaved");
        if (id == lone) lone_lat = cyc - pk_t0[id];
        rx_pkt[n][v] = id; rx_idx[n][v] = 1;
      end else begin
        checks++;
        if (rx_pkt[n][v] != id || int'(h.cnop) != rx_idx[n][v]) fail($sformatf("flit order pkt %0d", id));
        rx_idx[n][v]++;
      end
      if (is_tail(h.ftype)) begin
        checks++;
        if (rx_idx[n][v] != pk_len[id] || pk_done[id]) fail("tail length/duplicate");
        pk_done[id] = 1; done_cnt++; rx_pkt[n][v] = -1;
      end
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_probe
    always @(posedge clk) if (rst_n)
      for (int p = 0; p < NUM_PORTS; p++) begin
        va_conf += $countones(dut.g_y[n / KX].g_x[n % KX].u_router.va_req[p] & ~dut.g_y[n / KX].g_x[n % KX].u_router.va_gnt[p]);
        sa_conf += $countones(dut.g_y[n / KX].g_x[n % KX].u_router.sa_req[p] & ~dut.g_y[n / KX].g_x[n % KX].u_router.sa_gnt[p]);
      end
    for (genvar p = 0; p < NUM_PORTS; p++) begin : g_p
      // only ports that exist: edge routers have no port leading out of the mesh
      if (p == 0 || (p == 1 && n % KX < KX - 1) || (p == 2 && n % KX > 0) ||
          (p == 3 && n / KX < KY - 1) || (p == 4 && n / KX > 0)) begin : g_on
      always @(posedge clk) if (rst_n)
        for (int v = 0; v < V; v++)
          if (!dut.g_y[n / KX].g_x[n % KX].u_router.g_port[p].g_on.u_in.empty[v] &&
              dut.g_y[n / KX].g_x[n % KX].u_router.g_port[p].g_on.u_in.ovc_valid_q[v] &&
              !dut.g_y[n / KX].g_x[n % KX].u_router.g_port[p].g_on.u_in.sa_req[v]) cr_stall++;
      end
    end
  end

  initial begin
    int hops;
    inj_valid = '0; inj_flit = '0;
    for (int n = 0; n < N; n++) begin
      cur_pkt[n] = -1;
      for (int v = 0; v < V; v++) rx_pkt[n][v] = -1;
    end
    for (int v = 0; v < V; v++) vc_use[v] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Lone packet from (0,0) to (3,2): 5 hops, 6 routers.
    lone = add_packet(0, N - 1);
    hops = (KX - 1) + (KY - 1);
    while (!pk_done[lone]) @(posedge clk);
    checks++;
    if (lone_lat != 2 * (hops + 1)) fail($sformatf("zero-load latency %0d, expected %0d", lone_lat, 2 * (hops + 1)));
    // Uniform random, then coordinate complement, in bursts.
    while (next_id < NPKT) begin
      @(negedge clk);
      for (int n = 0; n < N; n++)
        if (next_id < NPKT && $urandom_range(0, 99) < 12) begin
          int d;
          if (next_id < NPKT / 2) d = $urandom_range(0, N - 1);
          else d = (KY - 1 - n / KX) * KX + (KX - 1 - n % KX);
          void'(add_packet(n, d));
        end
    end
    while (done_cnt < NPKT) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (done_cnt != NPKT) fail("not all delivered");
    for (int n = 0; n < N; n++) for (int v = 0; v < V; v++) begin
      checks++;
      if (inj_count[n][v] != 0) fail("local FIFO not empty at end");
    end
    checks++;
    if (vc_use[0] == 0 || vc_use[1] == 0 || inj_full == 0 || va_conf == 0 || sa_conf == 0 || cr_stall == 0)
      fail($sformatf("coverage vc0=%0d vc1=%0d full=%0d va=%0d sa=%0d credit=%0d", vc_use[0], vc_use[1], inj_full, va_conf, sa_conf, cr_stall));
    $display("noc_mesh_tb: %0d packets in %0d cycles; zero-load latency %0d; local-FIFO-full stalls %0d, VA conflicts %0d, SA conflicts %0d, credit stalls %0d",
             done_cnt, cyc, lone_lat, inj_full, va_conf, sa_conf, cr_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// noc_wrapper_tb: end-to-end run of the full 5x5 mesh, two VCs, eight-flit buffers, at
// the design's default parameters, driven only through the register interface the way
// emulation software would drive it. Each emulation cycle the testbench reads every
// node's OUT_STATUS/OUT_DATA (traffic receptors), reads IN_STATUS and writes
// IN_DATA/IN_VALID for nodes with a flit to send (traffic generators with unbounded
// source queues), then writes the clock register high and low.
// Checks:
//   - CTRL and CONFIG reset values; the network stays in reset until software clears it;
//   - a lone 5-flit packet from (0,0) to (4,4) (8 hops, 9 routers at two cycles each):
//     its head shows in OUT_STATUS 18 emulation cycles after the cycle it was written,
//     its tail 4 cycles later; head flits need no CNOP from software;
//   - IN_VALID is cleared by the end of each emulation cycle;
//   - every packet of seven workloads arrives once, at its destination, in order, with
//     its own number of flits: coordinate bit-complement at a 40% flit injection rate,
//     uniform random near saturation, transpose, bit-reversal and perfect shuffle of the
//     5-bit node number (taken modulo 25, as 25 nodes do not fill a 5-bit space), and
//     uniform random with 1-flit and 8-flit packets;
//   - afterwards every local FIFO is empty, and a soft reset empties a FIFO left full;
//   - mechanisms seen: full local FIFO (software holds back), both VCs used, VC and
//     switch allocation conflicts, credit stalls.
// Average packet latency and accepted throughput are printed for each workload.
module noc_wrapper_tb;
  import noc_pkg::*;
  localparam int KX = 5, KY = 5, N = KX * KY, V = 2, DEPTH = 8, W = 32, LEN = 5;
  localparam int PKT_PER_PHASE = 1000;   // 7 phases: packet ids must fit the 13-bit payload
  localparam logic [11:0] A_CTRL = 12'h800, A_CONFIG = 12'h801;
  localparam int MAXP = 8 * PKT_PER_PHASE;

  logic clk = 0, rst_n = 0;
  logic [11:0] reg_addr;
  logic reg_wr;
  logic [31:0] reg_wdata, reg_rdata;

  noc_wrapper dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, ecyc = 0;
  int pk_dst[MAXP], pk_t0[MAXP], pk_len[MAXP];
  int cur_len = LEN;                     // length of packets added next
  bit pk_done[MAXP];
  int next_id = 0, done_cnt = 0;
  int srcq[N][$];
  int cur_pkt[N], cur_idx[N], cur_vc[N];
  int rx_pkt[N][V], rx_idx[N][V];
  int vc_use[V], inj_full = 0, va_conf = 0, sa_conf = 0, cr_stall = 0;
  longint lat_sum;
  int lat_n;

  task automatic fail(string s);
    failures++; $display("FAIL ecyc=%0d %s", ecyc, s);
    if (failures >= 20) begin
      $display("too many failures, stopping");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  function automatic hdr_t hd(logic [W-1:0] f);
    return hdr_t'(f);
  endfunction

  task automatic bus_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk);
    reg_addr = a; reg_wdata = d; reg_wr = 1;
    @(negedge clk);
    reg_wr = 0;
  endtask

  task automatic bus_read(logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_addr = a; reg_wr = 0;
    #1 d = reg_rdata;
  endtask

  function automatic logic [11:0] node_addr(int n, int r);
    return 12'(n * 16 + r);
  endfunction

  function automatic int add_packet(int src, int dst);
    int id;
    id = next_id++;
    pk_dst[id] = dst;
    pk_len[id] = cur_len;
    srcq[src].push_back(id);
    return id;
  endfunction

  // Probes inside the network, for coverage only.
  for (genvar n = 0; n < N; n++) begin : g_probe
    always @(posedge dut.emu_clk) if (dut.net_rst_n)
      for (int p = 0; p < NUM_PORTS; p++) begin
        va_conf += $countones(dut.u_mesh.g_y[n / KX].g_x[n % KX].u_router.va_req[p] & ~dut.u_mesh.g_y[n / KX].g_x[n % KX].u_router.va_gnt[p]);
        sa_conf += $countones(dut.u_mesh.g_y[n / KX].g_x[n % KX].u_router.sa_req[p] & ~dut.u_mesh.g_y[n / KX].g_x[n % KX].u_router.sa_gnt[p]);
      end
    for (genvar p = 0; p < NUM_PORTS; p++) begin : g_p
      // only ports that exist: edge routers have no port leading out of the mesh
      if (p == 0 || (p == 1 && n % KX < KX - 1) || (p == 2 && n % KX > 0) ||
          (p == 3 && n / KX < KY - 1) || (p == 4 && n / KX > 0)) begin : g_on
      always @(posedge dut.emu_clk) if (dut.net_rst_n)
        for (int v = 0; v < V; v++)
          if (!dut.u_mesh.g_y[n / KX].g_x[n % KX].u_router.g_port[p].g_on.u_in.empty[v] &&
              dut.u_mesh.g_y[n / KX].g_x[n % KX].u_router.g_port[p].g_on.u_in.ovc_valid_q[v] &&
              !dut.u_mesh.g_y[n / KX].g_x[n % KX].u_router.g_port[p].g_on.u_in.sa_req[v]) cr_stall++;
      end
    end
  end

  // One emulation cycle of the software loop.
  task automatic emu_cycle();
    logic [31:0] d, st;
    // traffic receptors
    for (int n = 0; n < N; n++) begin
      bus_read(node_addr(n, 3), st);
      if (st[0]) begin
        hdr_t h; int id, v;
        bus_read(node_addr(n, 2), d);
        h = hd(d); id = h.payload; v = h.vcid;
        vc_use[v]++;
        checks++;
        if (id >= next_id || pk_dst[id] != n) begin fail($sformatf("pkt %0d at wrong node %0d", id, n)); continue; end
        if (is_head(h.ftype)) begin
          checks++;
          if (rx_pkt[n][v] != -1) fail("head interleaved with another packet");
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
          lat_sum += ecyc - pk_t0[id]; lat_n++;
        end
      end
    end
    // traffic generators
    for (int n = 0; n < N; n++) begin
      if (cur_pkt[n] < 0 && srcq[n].size() > 0) begin
        cur_pkt[n] = srcq[n].pop_front(); cur_idx[n] = 0; cur_vc[n] = $urandom_range(0, V-1);
      end
      if (cur_pkt[n] >= 0) begin
        bus_read(node_addr(n, 4), st);
        if (int'(st[4*cur_vc[n] +: 4]) >= DEPTH) inj_full++;
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
            pk_t0[id] = ecyc;       // CNOP left zero: the wrapper fills it in
          end else begin
            h.ftype = cur_idx[n] == pk_len[id] - 1 ? FT_TAIL : FT_BODY;
            h.cnop = 3'(cur_idx[n]);
          end
          bus_write(node_addr(n, 0), W'(h));
          bus_write(node_addr(n, 1), 32'd1);
          cur_idx[n]++;
          if (cur_idx[n] == pk_len[id]) cur_pkt[n] = -1;
        end
      end
    end
    bus_write(A_CTRL, 32'd1);
    bus_write(A_CTRL, 32'd0);
    ecyc++;
  endtask

  function automatic int bitrev5(int n);
    int r = 0;
    for (int b = 0; b < 5; b++) if (n[b]) r |= 1 << (4 - b);
    return r;
  endfunction

  // Runs one workload of PKT_PER_PHASE packets of len flits. Patterns: 0 bit complement of
  // the coordinates, 1 uniform random, 2 transpose, 3 bit-reversal, 4 perfect shuffle
  // (rotate the 5-bit node number left by one).
  task automatic run_phase(string name, int pattern, int rate_pct, int len);
    int first, start_cyc;
    first = next_id; start_cyc = ecyc; lat_sum = 0; lat_n = 0; cur_len = len;
    while (next_id < first + PKT_PER_PHASE) begin
      for (int n = 0; n < N; n++)
        // a packet of len flits with probability rate/len per cycle gives rate flits/cycle
        if (next_id < first + PKT_PER_PHASE && $urandom_range(0, 100 * len - 1) < rate_pct) begin
          int x, y, d;
          x = n % KX; y = n / KX;
          case (pattern)
            0: d = (KY - 1 - y) * KX + (KX - 1 - x);
            1: d = $urandom_range(0, N - 1);
            2: d = x * KX + y;
            3: d = bitrev5(n) % N;
            default: d = (((n << 1) | (n >> 4)) & 31) % N;
          endcase
          void'(add_packet(n, d));
        end
      emu_cycle();
    end
    while (done_cnt < next_id && ecyc - start_cyc < 5000) emu_cycle();
    checks++;
    if (done_cnt != next_id) fail($sformatf("%s: delivered %0d of %0d", name, done_cnt, next_id));
    $display("noc_wrapper_tb: %-15s %0d-flit packets, offered %0d%% flits/node/cycle: %0d packets, %0d emulation cycles, average latency %0.1f cycles, throughput %0.1f%% flits/node/cycle",
             name, len, rate_pct, PKT_PER_PHASE, ecyc - start_cyc, real'(lat_sum) / lat_n,
             100.0 * PKT_PER_PHASE * len / (N * (ecyc - start_cyc)));
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int lone;
    reg_addr = '0; reg_wr = 0; reg_wdata = '0;
    for (int n = 0; n < N; n++) begin
      cur_pkt[n] = -1;
      for (int v = 0; v < V; v++) rx_pkt[n][v] = -1;
    end
    for (int v = 0; v < V; v++) vc_use[v] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bus_read(A_CTRL, d);
    checks++; if (d != 32'd2) fail("CTRL reset value");
    bus_read(A_CONFIG, d);
    checks++; if (d != {8'(DEPTH), 8'(V), 8'(KY), 8'(KX)}) fail("CONFIG value");
    bus_write(A_CTRL, 32'd0);

    // Zero-load latency: (0,0) -> (4,4) is 8 hops through 9 routers.
    lone = add_packet(0, N - 1);
    while (!pk_done[lone] && ecyc < 100) begin
      emu_cycle();
      if (ecyc == 1) begin
        bus_read(node_addr(0, 1), d);
        checks++; if (d != 0) fail("IN_VALID not cleared after the emulation cycle");
      end
    end
    checks++;
    // The head is seen 2*(8+1) cycles after injection; the tail LEN-1 cycles later.
    if (ecyc - 1 - pk_t0[lone] != 2 * 9 + LEN - 1)
      fail($sformatf("zero-load: tail read %0d cycles after head injection, expected %0d", ecyc - 1 - pk_t0[lone], 2 * 9 + LEN - 1));

    run_phase("bit-complement", 0, 40, LEN);
    run_phase("uniform-random", 1, 60, LEN);
    run_phase("transpose", 2, 30, LEN);
    run_phase("bit-reversal", 3, 30, LEN);
    run_phase("shuffle", 4, 30, LEN);
    run_phase("uniform-random", 1, 30, 1);
    run_phase("uniform-random", 1, 30, 8);

    for (int n = 0; n < N; n++) begin
      bus_read(node_addr(n, 4), d);
      checks++; if (d != 0) fail("local FIFO not empty after drain");
    end

    // Soft reset: fill node 7's VC 0 FIFO (its router cannot forward without cycles to
    // drain, so stop the emulation clock), then reset and check it is empty again.
    begin
      hdr_t h;
      h = '0; h.ftype = FT_HEAD; h.dst_x = 3'd0; h.dst_y = 3'd0;
      bus_write(node_addr(7, 0), W'(h));
      bus_write(node_addr(7, 1), 32'd1);
      bus_write(A_CTRL, 32'd1);
      bus_write(A_CTRL, 32'd0);
      bus_read(node_addr(7, 4), d);
      checks++; if (d == 0) fail("flit not accepted before soft reset");
      bus_write(A_CTRL, 32'd2);
      bus_read(node_addr(7, 4), d);
      checks++; if (d != 0) fail("soft reset did not clear the local FIFO");
      bus_write(A_CTRL, 32'd0);
    end

    checks++;
    if (vc_use[0] == 0 || vc_use[1] == 0 || inj_full == 0 || va_conf == 0 || sa_conf == 0 || cr_stall == 0)
      fail($sformatf("coverage vc0=%0d vc1=%0d full=%0d va=%0d sa=%0d credit=%0d", vc_use[0], vc_use[1], inj_full, va_conf, sa_conf, cr_stall));
    $display("noc_wrapper_tb: %0d packets, %0d emulation cycles; local-FIFO-full holds %0d, VA conflicts %0d, SA conflicts %0d, credit stalls %0d",
             done_cnt, ecyc, inj_full, va_conf, sa_conf, cr_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

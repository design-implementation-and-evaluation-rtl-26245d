// mesh_traffic: traffic harness for one noc_mesh of KX x KY nodes, used by
// noc_sizes_tb to run the same workload on meshes of several sizes.
//
// It instantiates the mesh, plays a traffic generator (unbounded source queue, random VC,
// never overfilling a local FIFO) and a traffic receptor (accepts every flit, returns its
// credit at once) at every node, and checks every packet: ejected once, at its
// destination, flits in order, length intact. It first sends a lone packet corner to
// corner and checks its head latency of 2*(hops+1) cycles, then runs uniform random
// traffic of LEN-flit packets at each flit injection rate in RATES (percent of one flit
// per node per cycle), NPKT packets per rate, and prints the average packet latency
// (injection of the head to ejection of the tail) and accepted throughput for each.
// done goes high when all is finished; checks and failures count the results.
module mesh_traffic #(
  parameter int KX   = 2,
  parameter int KY   = 2,
  parameter int LEN  = 5,
  parameter int NPKT = 400,
  parameter int NRATE = 3,
  parameter int RATES [NRATE] = '{10, 25, 40}
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import noc_pkg::*;
  localparam int N = KX * KY, V = 2, DEPTH = 8, W = 32;
  localparam int MAXP = NRATE * NPKT + 1;

  logic [N-1:0] inj_valid, inj_credit_valid, ej_valid, ej_credit_valid;
  logic [N-1:0][W-1:0] inj_flit, ej_flit;
  logic [N-1:0][VCID_W-1:0] inj_credit_vc, ej_credit_vc;
  logic [N-1:0][V-1:0][3:0] inj_count;

  noc_mesh #(.KX(KX), .KY(KY)) u_mesh (
    .clk, .rst_n, .inj_valid, .inj_flit, .inj_credit_valid, .inj_credit_vc, .inj_count,
    .ej_valid, .ej_flit, .ej_credit_valid, .ej_credit_vc
  );

  assign ej_credit_valid = ej_valid;
  for (genvar n = 0; n < N; n++) begin : g_cr
    assign ej_credit_vc[n] = ej_flit[n][29:28];
  end

  int cyc = 0;
  int pk_dst[MAXP], pk_t0[MAXP];
  bit pk_done[MAXP];
  int next_id = 0, done_cnt = 0;
  int srcq[N][$];
  int cur_pkt[N], cur_idx[N], cur_vc[N];
  int rx_pkt[N][V], rx_idx[N][V];
  int lone = -1, lone_lat = -1;
  longint lat_sum;
  int lat_n;
  real avg_lat[NRATE];             // average packet latency per rate, for the caller

  function automatic hdr_t hd(logic [W-1:0] f);
    return hdr_t'(f);
  endfunction

  task automatic fail(string s);
    failures++; $display("FAIL %0dx%0d cyc=%0d %s", KX, KY, cyc, s);
  endtask

  function automatic int add_packet(int src, int dst);
    int id;
    id = next_id++;
    pk_dst[id] = dst;
    srcq[src].push_back(id);
    return id;
  endfunction

  // traffic generators, driving on the falling edge
  always @(negedge clk) begin
    for (int n = 0; n < N; n++) begin
      inj_valid[n] = 0;
      if (rst_n && cur_pkt[n] < 0 && srcq[n].size() > 0) begin
        cur_pkt[n] = srcq[n].pop_front(); cur_idx[n] = 0; cur_vc[n] = $urandom_range(0, V-1);
      end
      if (rst_n && cur_pkt[n] >= 0 && int'(inj_count[n][cur_vc[n]]) < DEPTH) begin
        hdr_t h; int id;
        id = cur_pkt[n];
        h = '0;
        h.vcid = VCID_W'(cur_vc[n]);
        h.payload = 13'(id);
        if (cur_idx[n] == 0) begin
          h.ftype = LEN == 1 ? FT_HEADTAIL : FT_HEAD;
          h.src_x = 3'(n % KX); h.src_y = 3'(n / KX);
          h.dst_x = 3'(pk_dst[id] % KX); h.dst_y = 3'(pk_dst[id] / KX);
          h.cnop  = xy_route(h.src_x, h.src_y, h.dst_x, h.dst_y);
          pk_t0[id] = cyc;
        end else begin
          h.ftype = cur_idx[n] == LEN - 1 ? FT_TAIL : FT_BODY;
          h.cnop = 3'(cur_idx[n]);
        end
        inj_flit[n] = W'(h); inj_valid[n] = 1;
        cur_idx[n]++;
        if (cur_idx[n] == LEN) cur_pkt[n] = -1;
      end
    end
  end

  // traffic receptors
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int n = 0; n < N; n++) if (ej_valid[n]) begin
      hdr_t h; int id, v;
      h = hd(ej_flit[n]); id = h.payload; v = h.vcid;
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
        if (rx_idx[n][v] != LEN || pk_done[id]) fail("tail length/duplicate");
        pk_done[id] = 1; done_cnt++; rx_pkt[n][v] = -1;
        lat_sum += cyc - pk_t0[id]; lat_n++;
      end
    end
  end

  initial begin
    int hops, first, t0;
    done = 0; checks = 0; failures = 0;
    inj_valid = '0; inj_flit = '0;
    for (int n = 0; n < N; n++) begin
      cur_pkt[n] = -1;
      for (int v = 0; v < V; v++) rx_pkt[n][v] = -1;
    end
    @(posedge rst_n);
    @(posedge clk);
    lone = add_packet(0, N - 1);
    hops = (KX - 1) + (KY - 1);
    while (!pk_done[lone] && cyc < 1000) @(posedge clk);
    checks++;
    if (lone_lat != 2 * (hops + 1)) fail($sformatf("zero-load head latency %0d, expected %0d", lone_lat, 2 * (hops + 1)));
    for (int r = 0; r < NRATE; r++) begin
      first = next_id; t0 = cyc; lat_sum = 0; lat_n = 0;
      while (next_id < first + NPKT) begin
        @(negedge clk);
        for (int n = 0; n < N; n++)
          if (next_id < first + NPKT && $urandom_range(0, 100 * LEN - 1) < RATES[r])
            void'(add_packet(n, $urandom_range(0, N - 1)));
      end
      while (done_cnt < next_id && cyc - t0 < 50000) @(posedge clk);
      avg_lat[r] = real'(lat_sum) / (lat_n > 0 ? lat_n : 1);
      checks++;
      if (done_cnt != next_id) fail($sformatf("rate %0d%%: delivered %0d of %0d", RATES[r], done_cnt, next_id));
      $display("mesh %0dx%0d uniform random, %0d-flit packets, offered %0d%%: average latency %0.1f cycles, throughput %0.1f%% flits/node/cycle over %0d cycles",
               KX, KY, LEN, RATES[r], avg_lat[r],
               100.0 * NPKT * LEN / (N * (cyc - t0)), cyc - t0);
    end
    repeat (5) @(posedge clk);
    for (int n = 0; n < N; n++) for (int v = 0; v < V; v++) begin
      checks++;
      if (inj_count[n][v] != 0) fail("local FIFO not empty at end");
    end
    done = 1;
  end
endmodule

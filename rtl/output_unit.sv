// output_unit: state of the virtual channels of one router output port.
//
// For each of the V output VCs it keeps an idle/active bit and a credit counter of free
// flit buffers in the matching VC FIFO of the downstream router. An output VC becomes
// active when the VC allocator assigns it to a packet (alloc) and returns to idle when the
// tail flit of that packet leaves through the switch. A credit is spent for every flit
// sent (send_valid; the VC is read from the flit's VCID field, which already holds the
// output VC) and one is gained for every credit returned by the downstream router over
// the reverse credit link. Counters reset to DEPTH, the downstream buffer depth.
//
// Outputs are registered state: ovc_idle tells the VC allocator which VCs it may assign,
// credit_ok tells the switch allocator which VCs may send. When a one-flit packet is
// allocated and sent in the same cycle the VC ends the cycle idle. The behaviour follows
// the document; the handling of that same-cycle case is this design's.
module output_unit
  import noc_pkg::*;
#(
  parameter int V     = 2,
  parameter int DEPTH = 8,
  parameter int W     = FLIT_W,
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [V-1:0]      alloc,
  input  logic              send_valid,
  input  logic [W-1:0]      send_flit,
  input  logic              credit_valid,
  input  logic [VCID_W-1:0] credit_vc,
  output logic [V-1:0]      ovc_idle,
  output logic [V-1:0]      credit_ok,
  output logic [V*CW-1:0]   credits
);

  logic [CW-1:0] cnt [V];
  logic [V-1:0]  active;
  hdr_t          h;

  assign h = hdr_t'(send_flit[31:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0;
      for (int v = 0; v < V; v++) cnt[v] <= CW'(DEPTH);
    end else begin
      for (int v = 0; v < V; v++) begin
        logic sent, back, freed;
        sent  = send_valid && (int'(h.vcid) == v);
        back  = credit_valid && (int'(credit_vc) == v);
        freed = sent && is_tail(h.ftype);
        cnt[v] <= cnt[v] - CW'(sent) + CW'(back);
        if (freed)         active[v] <= 1'b0;
        else if (alloc[v]) active[v] <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int v = 0; v < V; v++) begin
      ovc_idle[v]           = !active[v];
      credit_ok[v]          = (cnt[v] != '0);
      credits[v*CW +: CW]   = cnt[v];
    end
  end

  for (genvar v = 0; v < V; v++) begin : g_chk
    a_no_credit_underflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(send_valid && int'(h.vcid) == v && cnt[v] == '0));
    a_no_credit_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(credit_valid && int'(credit_vc) == v && cnt[v] == CW'(DEPTH) &&
        !(send_valid && int'(h.vcid) == v)));
    a_alloc_idle_only: assert property (@(posedge clk) disable iff (!rst_n)
      !(alloc[v] && active[v]));
  end

endmodule

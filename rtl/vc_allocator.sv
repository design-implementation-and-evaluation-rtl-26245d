// vc_allocator: separable virtual-channel allocator of a P-port, V-VC router.
//
// Only head flits request it. Each input VC names the output port its packet takes
// (req_port) and the allocator assigns it one idle VC on that port. Two arbitration
// levels, as in the document:
//   1. One V:1 arbiter per input VC (P*V of them) picks one idle output VC on the
//      requested port, so every requesting input VC asks for exactly one output VC.
//   2. One PV:1 arbiter per output VC (P*V of them) picks one winner among the input
//      VCs that asked for it. Each is a hier_arbiter: V arbiters of P lines (one per
//      input VC number, over the input ports) and a V:1 arbiter over those, the
//      document's way of keeping the largest arbiters of the router small.
// An input VC is granted (gnt) when it wins the second level; gnt_ovc gives the output
// VC it won. alloc marks, per output port and VC, the output VCs assigned this cycle;
// the output units use it to mark them active. Both arbiter types are selectable with
// ROUND_ROBIN; round-robin pointers advance only on grants that are used.
//
// Purely combinational from req, req_port and ovc_idle to the grants (state is only the
// arbiter pointers), so allocation, switch allocation and crossbar traversal fit in one
// cycle. With fixed priority, input VC number comes first (all VC 0s before any VC 1),
// then input port number.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int P           = NUM_PORTS,
  parameter int V           = 2,
  parameter bit ROUND_ROBIN = 1'b1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [P-1:0][V-1:0]                   req,
  input  logic [P-1:0][V-1:0][PORT_W-1:0]       req_port,
  input  logic [P-1:0][V-1:0]                   ovc_idle,   // [output port][output VC]
  output logic [P-1:0][V-1:0]                   gnt,
  output logic [P-1:0][V-1:0][VCID_W-1:0]       gnt_ovc,
  output logic [P-1:0][V-1:0]                   alloc       // [output port][output VC]
);

  localparam int VI = (V > 1) ? $clog2(V) : 1;

  logic [P-1:0][V-1:0][V-1:0]  l1_req;
  logic [P-1:0][V-1:0][V-1:0]  l1_gnt;
  logic [P-1:0][V-1:0][VI-1:0] l1_idx;
  logic [P-1:0][V-1:0]         l1_any;
  logic [P-1:0][V-1:0][P*V-1:0] l2_req;   // [out port][out VC][input VC v*P+p]
  logic [P-1:0][V-1:0][P*V-1:0] l2_gnt;
  logic [P-1:0][V-1:0]          l2_any;

  // First level: one arbiter per input VC over the idle VCs of its requested port.
  for (genvar p = 0; p < P; p++) begin : g_in
    for (genvar v = 0; v < V; v++) begin : g_vc
      always_comb begin
        l1_req[p][v] = '0;
        if (req[p][v] && int'(req_port[p][v]) < P)
          l1_req[p][v] = ovc_idle[req_port[p][v]];
      end
      arbiter #(.N(V), .ROUND_ROBIN(ROUND_ROBIN)) u_l1 (
        .clk, .rst_n,
        .req(l1_req[p][v]), .upd(gnt[p][v]),
        .gnt(l1_gnt[p][v]), .gnt_idx(l1_idx[p][v]), .any_gnt(l1_any[p][v])
      );
    end
  end

  // Second level: one arbiter per output VC over the input VCs that chose it.
  for (genvar o = 0; o < P; o++) begin : g_out
    for (genvar w = 0; w < V; w++) begin : g_vc
      always_comb begin
        for (int p = 0; p < P; p++)
          for (int v = 0; v < V; v++)
            l2_req[o][w][v*P+p] = l1_any[p][v] && int'(req_port[p][v]) == o && l1_gnt[p][v][w];
      end
      hier_arbiter #(.GROUPS(V), .SIZE(P), .ROUND_ROBIN(ROUND_ROBIN)) u_l2 (
        .clk, .rst_n,
        .req(l2_req[o][w]), .upd(1'b1),
        .gnt(l2_gnt[o][w]), .any_gnt(l2_any[o][w])
      );
      assign alloc[o][w] = l2_any[o][w];
    end
  end

  always_comb begin
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++) begin
        gnt[p][v]     = 1'b0;
        gnt_ovc[p][v] = VCID_W'(l1_idx[p][v]);
        for (int o = 0; o < P; o++)
          for (int w = 0; w < V; w++)
            if (l2_gnt[o][w][v*P+p]) gnt[p][v] = 1'b1;
      end
  end

endmodule

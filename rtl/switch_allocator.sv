// switch_allocator: separable switch allocator of a P-port, V-VC router.
//
// Every flit of a packet requests it once its input VC holds an output VC and that
// output VC has a credit (the requester checks the credit; req is already qualified).
// Two arbitration levels, as in the document:
//   1. One V:1 arbiter per input port picks which of its VCs may use the port's single
//      crossbar input (sel_vc drives the crossbar's first multiplexer level).
//   2. One P:1 arbiter per output port picks which input port drives that output
//      (sel_in drives the crossbar's second multiplexer level; out_valid marks the
//      outputs that carry a flit this cycle).
// gnt marks the input VCs whose front flit crosses the switch this cycle; they pop their
// FIFO. Fixed-priority or round-robin arbiters are selected with ROUND_ROBIN; a first
// level pointer advances only when its port also won the second level.
//
// Purely combinational apart from the arbiter pointers.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int P           = NUM_PORTS,
  parameter int V           = 2,
  parameter bit ROUND_ROBIN = 1'b1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [P-1:0][V-1:0]             req,
  input  logic [P-1:0][V-1:0][PORT_W-1:0] req_port,
  output logic [P-1:0][V-1:0]             gnt,
  output logic [P-1:0][VCID_W-1:0]        sel_vc,
  output logic [P-1:0][PORT_W-1:0]        sel_in,
  output logic [P-1:0]                    out_valid
);

  localparam int VI = (V > 1) ? $clog2(V) : 1;
  localparam int PI = (P > 1) ? $clog2(P) : 1;

  logic [P-1:0][V-1:0]  l1_gnt;
  logic [P-1:0][VI-1:0] l1_idx;
  logic [P-1:0]         l1_any;
  logic [P-1:0][PORT_W-1:0] l1_port;
  logic [P-1:0][P-1:0]  l2_req;   // [out][in]
  logic [P-1:0][P-1:0]  l2_gnt;
  logic [P-1:0][PI-1:0] l2_idx;
  logic [P-1:0]         in_won;

  for (genvar p = 0; p < P; p++) begin : g_in
    arbiter #(.N(V), .ROUND_ROBIN(ROUND_ROBIN)) u_l1 (
      .clk, .rst_n, .req(req[p]), .upd(in_won[p]),
      .gnt(l1_gnt[p]), .gnt_idx(l1_idx[p]), .any_gnt(l1_any[p])
    );
    assign l1_port[p] = req_port[p][l1_idx[p]];
    assign sel_vc[p]  = VCID_W'(l1_idx[p]);
  end

  for (genvar o = 0; o < P; o++) begin : g_out
    always_comb
      for (int p = 0; p < P; p++)
        l2_req[o][p] = l1_any[p] && int'(l1_port[p]) == o;
    arbiter #(.N(P), .ROUND_ROBIN(ROUND_ROBIN)) u_l2 (
      .clk, .rst_n, .req(l2_req[o]), .upd(1'b1),
      .gnt(l2_gnt[o]), .gnt_idx(l2_idx[o]), .any_gnt(out_valid[o])
    );
    assign sel_in[o] = PORT_W'(l2_idx[o]);
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      in_won[p] = 1'b0;
      for (int o = 0; o < P; o++)
        if (l2_gnt[o][p]) in_won[p] = 1'b1;
      gnt[p] = in_won[p] ? l1_gnt[p] : '0;
    end
  end

endmodule

// router: five-port virtual-channel NoC router with credit-based flow control.
//
// Ports are local, east, west, north and south (noc_pkg numbering). Each input port has
// an input_unit with V VC FIFOs of DEPTH flits; each output port has an output_unit
// (output VC state and credit counters) and a delay_unit. In one cycle a flit at the
// front of a VC FIFO can be given an output VC (vc_allocator, head flits only), win the
// switch (switch_allocator, all flits, only with a downstream credit) and cross the
// crossbar. It then spends DELAY = (PIPE_STAGES - 1) + LINK_DELAY cycles in the delay
// registers, so with the defaults (one pipeline stage, one-cycle link) a flit that
// reaches a FIFO front in cycle t is on the output link in cycle t+1 and at the
// downstream FIFO front in cycle t+2. Routing is lookahead XY: a head flit carries the
// output port it uses here (CNOP) and leaves with the port for the next router.
//
// Credits: every popped flit returns a credit on credit_out of its input port one cycle
// later; credits arriving on credit_in refill the output units. The local port uses the
// same protocol: its credit_out reports freed local FIFO slots and its credit_in must
// return one credit per ejected flit. local_count gives the local FIFO occupancies.
//
// PORT_EN selects which ports are built. A missing port has no input unit, output unit or
// delay unit; its outputs are zero and its inputs are ignored, so routers at mesh edges
// and corners become 4- and 3-port routers. The allocators and crossbar keep their
// five-port indexing with the missing ports' request lines tied to zero, which synthesis
// removes.
//
// The structure, single-cycle allocation and removal of unused ports follow the
// document; doing the removal by a parameter mask is this design's choice.
module router
  import noc_pkg::*;
#(
  parameter int V           = 2,
  parameter int DEPTH       = 8,
  parameter int PIPE_STAGES = 1,
  parameter int LINK_DELAY  = 1,
  parameter bit VA_RR       = 1'b1,
  parameter bit SA_RR       = 1'b1,
  parameter int W           = FLIT_W,
  parameter int X           = 0,
  parameter int Y           = 0,
  parameter bit [NUM_PORTS-1:0] PORT_EN = '1,   // ports built; bit 0 (local) must be set
  localparam int P          = NUM_PORTS,
  localparam int CW         = $clog2(DEPTH + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [P-1:0]                  in_valid,
  input  logic [P-1:0][W-1:0]           in_flit,
  output logic [P-1:0]                  credit_out_valid,
  output logic [P-1:0][VCID_W-1:0]      credit_out_vc,
  output logic [P-1:0]                  out_valid,
  output logic [P-1:0][W-1:0]           out_flit,
  input  logic [P-1:0]                  credit_in_valid,
  input  logic [P-1:0][VCID_W-1:0]      credit_in_vc,
  output logic [V-1:0][CW-1:0]          local_count
);

  localparam int DELAY = (PIPE_STAGES - 1) + LINK_DELAY;

  logic [P-1:0][V-1:0]             va_req, sa_req, va_gnt, sa_gnt;
  logic [P-1:0][V-1:0][PORT_W-1:0] req_port;
  logic [P-1:0][V-1:0][VCID_W-1:0] va_gnt_ovc;
  logic [P-1:0][V-1:0]             alloc, ovc_idle, credit_ok;
  logic [P-1:0][V-1:0][W-1:0]      xb_in;
  logic [P-1:0][VCID_W-1:0]        sel_vc;
  logic [P-1:0][PORT_W-1:0]        sel_in;
  logic [P-1:0]                    sel_valid, xb_valid;
  logic [P-1:0][W-1:0]             xb_out;
  logic [P-1:0][V-1:0][CW-1:0]     counts;

  for (genvar p = 0; p < P; p++) begin : g_port
   if (PORT_EN[p]) begin : g_on
    input_unit #(.V(V), .DEPTH(DEPTH), .P(P), .W(W), .X(X), .Y(Y)) u_in (
      .clk, .rst_n,
      .in_valid(in_valid[p]), .in_flit(in_flit[p]),
      .va_req(va_req[p]), .req_port(req_port[p]), .sa_req(sa_req[p]),
      .va_gnt(va_gnt[p]), .va_gnt_ovc(va_gnt_ovc[p]), .sa_gnt(sa_gnt[p]),
      .credit_ok(credit_ok),
      .out_flit(xb_in[p]),
      .credit_valid(credit_out_valid[p]), .credit_vc(credit_out_vc[p]),
      .vc_count(counts[p])
    );

    output_unit #(.V(V), .DEPTH(DEPTH), .W(W)) u_out (
      .clk, .rst_n,
      .alloc(alloc[p]),
      .send_valid(xb_valid[p]), .send_flit(xb_out[p]),
      .credit_valid(credit_in_valid[p]), .credit_vc(credit_in_vc[p]),
      .ovc_idle(ovc_idle[p]), .credit_ok(credit_ok[p]), .credits()
    );

    delay_unit #(.DELAY(DELAY), .W(W)) u_dly (
      .clk, .rst_n,
      .in_valid(xb_valid[p]), .in_data(xb_out[p]),
      .out_valid(out_valid[p]), .out_data(out_flit[p])
    );
   end else begin : g_off
    // Port not built: it never requests, is never granted (no idle VC, no credit) and
    // drives nothing; arbiter lines tied to zero are removed by synthesis.
    assign va_req[p]           = '0;
    assign sa_req[p]           = '0;
    assign req_port[p]         = '0;
    assign xb_in[p]            = '0;
    assign credit_out_valid[p] = 1'b0;
    assign credit_out_vc[p]    = '0;
    assign counts[p]           = '0;
    assign ovc_idle[p]         = '0;
    assign credit_ok[p]        = '0;
    assign out_valid[p]        = 1'b0;
    assign out_flit[p]         = '0;
   end
  end

  assign local_count = counts[PORT_LOCAL];

  vc_allocator #(.P(P), .V(V), .ROUND_ROBIN(VA_RR)) u_va (
    .clk, .rst_n,
    .req(va_req), .req_port(req_port), .ovc_idle(ovc_idle),
    .gnt(va_gnt), .gnt_ovc(va_gnt_ovc), .alloc(alloc)
  );

  switch_allocator #(.P(P), .V(V), .ROUND_ROBIN(SA_RR)) u_sa (
    .clk, .rst_n,
    .req(sa_req), .req_port(req_port),
    .gnt(sa_gnt), .sel_vc(sel_vc), .sel_in(sel_in), .out_valid(sel_valid)
  );

  crossbar #(.P(P), .V(V), .W(W)) u_xb (
    .din(xb_in), .sel_vc(sel_vc), .sel_in(sel_in), .sel_valid(sel_valid),
    .dout(xb_out), .dout_valid(xb_valid)
  );

  initial assert (PIPE_STAGES >= 1 && PIPE_STAGES <= 5 && LINK_DELAY >= 1)
    else $error("router: PIPE_STAGES must be 1..5 and LINK_DELAY >= 1");
  initial assert (PORT_EN[PORT_LOCAL]) else $error("router: the local port must be present");
  initial assert (V <= (1 << VCID_W)) else $error("router: too many VCs for VCID field");

endmodule

// input_unit: one input port of the virtual-channel router.
//
// Arriving flits are demultiplexed by their VCID field into V VC FIFOs. For each VC the
// unit keeps two registers: R, the output port of the packet in progress, and O, the
// output VC the VC allocator gave it. A head flit at the front of an idle VC takes its
// output port from its CNOP field and requests the VC allocator (va_req). A VC that holds
// an output VC, or whose head flit is granted one in this very cycle (va_gnt), requests
// the switch (sa_req) provided the chosen output VC has a credit. Allocation, switch
// allocation and traversal therefore all happen in the cycle the flit reaches the front.
//
// The flit offered to the crossbar (out_flit) has its VCID rewritten to the output VC
// and, for a head flit, its CNOP rewritten by the next-hop route computation (route_nrc)
// to the port it will take at the downstream router (lookahead routing).
// When the switch grants a VC (sa_gnt) its front flit is popped; a tail flit releases R
// and O. One cycle after each pop a credit (credit_valid, credit_vc = the VC freed) goes
// upstream over the credit link. The document describes all of this; the registered
// one-cycle credit return is this design's choice.
module input_unit
  import noc_pkg::*;
#(
  parameter int V     = 2,
  parameter int DEPTH = 8,
  parameter int P     = NUM_PORTS,
  parameter int W     = FLIT_W,
  parameter int X     = 0,
  parameter int Y     = 0,
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // link from upstream
  input  logic                          in_valid,
  input  logic [W-1:0]                  in_flit,
  // requests to the allocators
  output logic [V-1:0]                  va_req,
  output logic [V-1:0][PORT_W-1:0]      req_port,
  output logic [V-1:0]                  sa_req,
  input  logic [V-1:0]                  va_gnt,
  input  logic [V-1:0][VCID_W-1:0]      va_gnt_ovc,
  input  logic [V-1:0]                  sa_gnt,
  input  logic [P-1:0][V-1:0]           credit_ok,   // [output port][output VC]
  // flits offered to the crossbar
  output logic [V-1:0][W-1:0]           out_flit,
  // credit link to upstream
  output logic                          credit_valid,
  output logic [VCID_W-1:0]             credit_vc,
  // occupancy of each VC FIFO
  output logic [V-1:0][CW-1:0]          vc_count
);

  hdr_t                  in_h;
  logic [V-1:0]          empty;
  logic [V-1:0][W-1:0]   front;
  logic [V-1:0]          ovc_valid_q;
  logic [V-1:0][VCID_W-1:0] ovc_q;      // O registers
  logic [V-1:0][PORT_W-1:0] route_q;    // R registers
  logic [V-1:0][PORT_W-1:0] next_port;

  assign in_h = hdr_t'(in_flit[31:0]);

  for (genvar v = 0; v < V; v++) begin : g_vc
    hdr_t             fh;
    logic [VCID_W-1:0] ovc_now;
    logic              has_ovc;

    vc_fifo #(.DEPTH(DEPTH), .W(W)) u_fifo (
      .clk, .rst_n,
      .push (in_valid && int'(in_h.vcid) == v),
      .din  (in_flit),
      .pop  (sa_gnt[v]),
      .dout (front[v]),
      .empty(empty[v]),
      .full (),
      .count(vc_count[v])
    );

    assign fh        = hdr_t'(front[v][31:0]);
    assign req_port[v] = ovc_valid_q[v] ? route_q[v] : fh.cnop;
    assign va_req[v] = !empty[v] && !ovc_valid_q[v] && is_head(fh.ftype);
    assign has_ovc   = ovc_valid_q[v] || va_gnt[v];
    assign ovc_now   = ovc_valid_q[v] ? ovc_q[v] : va_gnt_ovc[v];
    assign sa_req[v] = !empty[v] && has_ovc && int'(req_port[v]) < P &&
                       credit_ok[req_port[v]][ovc_now];

    route_nrc #(.X(X), .Y(Y)) u_nrc (
      .out_port(req_port[v]), .dst_x(fh.dst_x), .dst_y(fh.dst_y), .next_port(next_port[v])
    );

    always_comb begin
      hdr_t oh;
      out_flit[v] = front[v];
      oh          = fh;
      oh.vcid     = ovc_now;
      if (is_head(fh.ftype)) oh.cnop = next_port[v];
      out_flit[v][31:0] = oh;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ovc_valid_q[v] <= 1'b0;
        ovc_q[v]       <= '0;
        route_q[v]     <= '0;
      end else begin
        if (sa_gnt[v] && is_tail(fh.ftype)) begin
          ovc_valid_q[v] <= 1'b0;
        end else if (va_gnt[v]) begin
          ovc_valid_q[v] <= 1'b1;
          ovc_q[v]       <= va_gnt_ovc[v];
          route_q[v]     <= fh.cnop;
        end
      end
    end

    // A VC without an output VC must hold a head flit at its front; the switch may only
    // grant a VC that requested it.
    always_ff @(posedge clk) begin
      if (rst_n) begin
        a_head_when_idle: assert (empty[v] || ovc_valid_q[v] || is_head(fh.ftype));
        a_sa_needs_vc:    assert (!sa_gnt[v] || (has_ovc && sa_req[v]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit_valid <= 1'b0;
      credit_vc    <= '0;
    end else begin
      credit_valid <= |sa_gnt;
      credit_vc    <= '0;
      for (int v = 0; v < V; v++)
        if (sa_gnt[v]) credit_vc <= VCID_W'(v);
    end
  end

  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sa_gnt));

endmodule

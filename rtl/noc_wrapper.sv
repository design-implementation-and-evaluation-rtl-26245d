// noc_wrapper: the emulated network together with the registers software uses to drive it.
//
// The mesh runs on an emulation clock that software produces by writing the clock
// register: each 0->1 write is one emulation cycle. Everything else is a word register
// on a simple memory-mapped bus (reg_addr word address, reg_wr write strobe, reg_wdata,
// and reg_rdata returned combinationally). The processor bus that would carry these
// accesses on an FPGA is outside this module.
//
//   0x800  CTRL        bit 0: emulation clock level; bit 1: network reset (resets to 1)
//   0x801  CONFIG      read only: {DEPTH[7:0], V[7:0], KY[7:0], KX[7:0]}
//   node n (n < 128), base n*16:
//   +0  IN_DATA     flit to inject at node n's local port
//   +1  IN_VALID    bit 0: inject IN_DATA at the next emulation clock edge
//   +2  OUT_DATA    read only: flit ejected at node n (qualified by OUT_STATUS)
//   +3  OUT_STATUS  read only: bit 0 set while OUT_DATA holds a flit ejected this cycle
//   +4  IN_STATUS   read only: occupancy of node n's local VC FIFOs, CW bits per VC,
//                   VC 0 in the low bits; software checks it to avoid overflowing them
//
// One emulation cycle, as software sees it: read OUT_STATUS/OUT_DATA and IN_STATUS,
// write IN_DATA/IN_VALID, write CTRL bit 0 = 1 (the network advances one cycle), write
// CTRL bit 0 = 0. That last write also clears every IN_VALID, so a flit is injected once.
// For a head flit the wrapper fills in the CNOP field with the first-hop XY route from
// node n, so software need only give the destination. Every ejected flit is accepted and
// returned to the router as a credit in the same emulation cycle.
//
// The five register kinds and the software-driven clock follow the document; the address
// map, bit layouts, the automatic IN_VALID clear and the CNOP fill-in are this design's.
// The emulation clock is a register output, as in the document; a design for a real
// FPGA flow would route it through a clock buffer.
module noc_wrapper
  import noc_pkg::*;
#(
  parameter int KX          = 5,
  parameter int KY          = 5,
  parameter int V           = 2,
  parameter int DEPTH       = 8,
  parameter int PIPE_STAGES = 1,
  parameter int LINK_DELAY  = 1,
  parameter bit VA_RR       = 1'b1,
  parameter bit SA_RR       = 1'b1,
  localparam int N          = KX * KY,
  localparam int W          = FLIT_W,
  localparam int CW         = $clog2(DEPTH + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [11:0]  reg_addr,
  input  logic         reg_wr,
  input  logic [31:0]  reg_wdata,
  output logic [31:0]  reg_rdata
);

  localparam logic [11:0] A_CTRL   = 12'h800;
  localparam logic [11:0] A_CONFIG = 12'h801;

  logic [1:0]                  ctrl_q;
  logic                        emu_clk, net_rst_n;
  logic [N-1:0][W-1:0]         in_data_q;
  logic [N-1:0]                in_valid_q;
  logic [N-1:0][W-1:0]         inj_flit, ej_flit;
  logic [N-1:0]                ej_valid;
  logic [N-1:0][VCID_W-1:0]    ej_vc;
  logic [N-1:0][V-1:0][CW-1:0] inj_count;
  logic                        node_sel;
  logic [6:0]                  node;
  logic [3:0]                  sub;

  assign node_sel = !reg_addr[11];
  assign node     = reg_addr[10:4];
  assign sub      = reg_addr[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q     <= 2'b10;
      in_valid_q <= '0;
    end else begin
      if (reg_wr && reg_addr == A_CTRL) begin
        ctrl_q <= reg_wdata[1:0];
        if (ctrl_q[0] && !reg_wdata[0]) in_valid_q <= '0;
      end
      if (reg_wr && node_sel && int'(node) < N && sub == 4'd1)
        in_valid_q[node] <= reg_wdata[0];
    end
  end

  always_ff @(posedge clk) begin
    if (reg_wr && node_sel && int'(node) < N && sub == 4'd0)
      in_data_q[node] <= reg_wdata;
  end

  assign emu_clk   = ctrl_q[0];
  assign net_rst_n = rst_n && !ctrl_q[1];

  // First-hop route for injected head flits.
  for (genvar n = 0; n < N; n++) begin : g_node
    hdr_t h_in, h_out;
    assign h_in  = hdr_t'(in_data_q[n][31:0]);
    always_comb begin
      h_out = h_in;
      if (is_head(h_in.ftype))
        h_out.cnop = xy_route(COORD_W'(n % KX), COORD_W'(n / KX), h_in.dst_x, h_in.dst_y);
      inj_flit[n] = in_data_q[n];
      inj_flit[n][31:0] = h_out;
    end
    assign ej_vc[n] = ej_flit[n][29:28];
  end

  noc_mesh #(.KX(KX), .KY(KY), .V(V), .DEPTH(DEPTH), .PIPE_STAGES(PIPE_STAGES),
             .LINK_DELAY(LINK_DELAY), .VA_RR(VA_RR), .SA_RR(SA_RR), .W(W)) u_mesh (
    .clk(emu_clk), .rst_n(net_rst_n),
    .inj_valid(in_valid_q), .inj_flit(inj_flit),
    .inj_credit_valid(), .inj_credit_vc(), .inj_count(inj_count),
    .ej_valid(ej_valid), .ej_flit(ej_flit),
    .ej_credit_valid(ej_valid), .ej_credit_vc(ej_vc)
  );

  always_comb begin
    reg_rdata = '0;
    if (reg_addr == A_CTRL)
      reg_rdata = {30'b0, ctrl_q};
    else if (reg_addr == A_CONFIG)
      reg_rdata = {8'(DEPTH), 8'(V), 8'(KY), 8'(KX)};
    else if (node_sel && int'(node) < N) begin
      case (sub)
        4'd0: reg_rdata = in_data_q[node];
        4'd1: reg_rdata = {31'b0, in_valid_q[node]};
        4'd2: reg_rdata = ej_flit[node];
        4'd3: reg_rdata = {31'b0, ej_valid[node]};
        4'd4: reg_rdata = 32'(inj_count[node]);
        default: ;
      endcase
    end
  end

  initial assert (N <= 128 && V * CW <= 32)
    else $error("noc_wrapper: address map holds at most 128 nodes and 32 status bits");

endmodule

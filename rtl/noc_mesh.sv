// noc_mesh: KX x KY two-dimensional mesh of virtual-channel routers.
//
// Node n = y*KX + x holds router (x, y). Neighbouring routers are joined by a pair of
// data links, one per direction, each paired with a reverse credit link: router (x, y)'s
// east output feeds router (x+1, y)'s west input, and the credits that west input frees
// flow back to (x, y)'s east output unit; likewise north (y+1) and south (y-1). Ports that
// would lead off the edge of the mesh are not built (router PORT_EN), so edge routers
// have four ports and corner routers three, as in the document; XY routing never selects
// a missing port.
//
// The local port of every router is brought out: inj_* injects flits (inj_credit_* gives
// back one credit per local FIFO slot freed), ej_* carries ejected flits and ej_credit_*
// must return one credit per ejected flit. Topology and link structure follow the
// document; only the mesh (not the torus) is built.
module noc_mesh
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
  parameter int W           = FLIT_W,
  localparam int N          = KX * KY,
  localparam int CW         = $clog2(DEPTH + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                inj_valid,
  input  logic [N-1:0][W-1:0]         inj_flit,
  output logic [N-1:0]                inj_credit_valid,
  output logic [N-1:0][VCID_W-1:0]    inj_credit_vc,
  output logic [N-1:0][V-1:0][CW-1:0] inj_count,
  output logic [N-1:0]                ej_valid,
  output logic [N-1:0][W-1:0]         ej_flit,
  input  logic [N-1:0]                ej_credit_valid,
  input  logic [N-1:0][VCID_W-1:0]    ej_credit_vc
);

  localparam int P = NUM_PORTS;

  logic [N-1:0][P-1:0]              r_in_valid, r_out_valid, r_cin_valid, r_cout_valid;
  logic [N-1:0][P-1:0][W-1:0]       r_in_flit, r_out_flit;
  logic [N-1:0][P-1:0][VCID_W-1:0]  r_cin_vc, r_cout_vc;

  for (genvar y = 0; y < KY; y++) begin : g_y
    for (genvar x = 0; x < KX; x++) begin : g_x
      localparam int n = y * KX + x;

      // ports that lead out of the mesh are not built
      localparam bit [NUM_PORTS-1:0] EN = {y > 0, y < KY - 1, x > 0, x < KX - 1, 1'b1};
      router #(.V(V), .DEPTH(DEPTH), .PIPE_STAGES(PIPE_STAGES), .LINK_DELAY(LINK_DELAY),
               .VA_RR(VA_RR), .SA_RR(SA_RR), .W(W), .X(x), .Y(y), .PORT_EN(EN)) u_router (
        .clk, .rst_n,
        .in_valid(r_in_valid[n]), .in_flit(r_in_flit[n]),
        .credit_out_valid(r_cout_valid[n]), .credit_out_vc(r_cout_vc[n]),
        .out_valid(r_out_valid[n]), .out_flit(r_out_flit[n]),
        .credit_in_valid(r_cin_valid[n]), .credit_in_vc(r_cin_vc[n]),
        .local_count(inj_count[n])
      );

      // Local port
      assign r_in_valid[n][PORT_LOCAL]  = inj_valid[n];
      assign r_in_flit[n][PORT_LOCAL]   = inj_flit[n];
      assign inj_credit_valid[n]        = r_cout_valid[n][PORT_LOCAL];
      assign inj_credit_vc[n]           = r_cout_vc[n][PORT_LOCAL];
      assign ej_valid[n]                = r_out_valid[n][PORT_LOCAL];
      assign ej_flit[n]                 = r_out_flit[n][PORT_LOCAL];
      assign r_cin_valid[n][PORT_LOCAL] = ej_credit_valid[n];
      assign r_cin_vc[n][PORT_LOCAL]    = ej_credit_vc[n];

      // West input <- east output of (x-1, y); credits for our west output come from its east input.
      if (x > 0) begin : g_w
        assign r_in_valid[n][PORT_WEST]  = r_out_valid[n-1][PORT_EAST];
        assign r_in_flit[n][PORT_WEST]   = r_out_flit[n-1][PORT_EAST];
        assign r_cin_valid[n][PORT_WEST] = r_cout_valid[n-1][PORT_EAST];
        assign r_cin_vc[n][PORT_WEST]    = r_cout_vc[n-1][PORT_EAST];
      end else begin : g_w_edge
        assign r_in_valid[n][PORT_WEST]  = 1'b0;
        assign r_in_flit[n][PORT_WEST]   = '0;
        assign r_cin_valid[n][PORT_WEST] = 1'b0;
        assign r_cin_vc[n][PORT_WEST]    = '0;
      end

      if (x < KX - 1) begin : g_e
        assign r_in_valid[n][PORT_EAST]  = r_out_valid[n+1][PORT_WEST];
        assign r_in_flit[n][PORT_EAST]   = r_out_flit[n+1][PORT_WEST];
        assign r_cin_valid[n][PORT_EAST] = r_cout_valid[n+1][PORT_WEST];
        assign r_cin_vc[n][PORT_EAST]    = r_cout_vc[n+1][PORT_WEST];
      end else begin : g_e_edge
        assign r_in_valid[n][PORT_EAST]  = 1'b0;
        assign r_in_flit[n][PORT_EAST]   = '0;
        assign r_cin_valid[n][PORT_EAST] = 1'b0;
        assign r_cin_vc[n][PORT_EAST]    = '0;
      end

      if (y > 0) begin : g_s
        assign r_in_valid[n][PORT_SOUTH]  = r_out_valid[n-KX][PORT_NORTH];
        assign r_in_flit[n][PORT_SOUTH]   = r_out_flit[n-KX][PORT_NORTH];
        assign r_cin_valid[n][PORT_SOUTH] = r_cout_valid[n-KX][PORT_NORTH];
        assign r_cin_vc[n][PORT_SOUTH]    = r_cout_vc[n-KX][PORT_NORTH];
      end else begin : g_s_edge
        assign r_in_valid[n][PORT_SOUTH]  = 1'b0;
        assign r_in_flit[n][PORT_SOUTH]   = '0;
        assign r_cin_valid[n][PORT_SOUTH] = 1'b0;
        assign r_cin_vc[n][PORT_SOUTH]    = '0;
      end

      if (y < KY - 1) begin : g_n
        assign r_in_valid[n][PORT_NORTH]  = r_out_valid[n+KX][PORT_SOUTH];
        assign r_in_flit[n][PORT_NORTH]   = r_out_flit[n+KX][PORT_SOUTH];
        assign r_cin_valid[n][PORT_NORTH] = r_cout_valid[n+KX][PORT_SOUTH];
        assign r_cin_vc[n][PORT_NORTH]    = r_cout_vc[n+KX][PORT_SOUTH];
      end else begin : g_n_edge
        assign r_in_valid[n][PORT_NORTH]  = 1'b0;
        assign r_in_flit[n][PORT_NORTH]   = '0;
        assign r_cin_valid[n][PORT_NORTH] = 1'b0;
        assign r_cin_vc[n][PORT_NORTH]    = '0;
      end
    end
  end

  initial assert (KX <= (1 << COORD_W) && KY <= (1 << COORD_W))
    else $error("noc_mesh: mesh larger than the flit coordinate fields allow");

endmodule

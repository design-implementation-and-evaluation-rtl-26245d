// hier_arbiter: a GROUPS*SIZE-input arbiter built from smaller arbiters.
//
// The request lines are split into GROUPS groups of SIZE lines (group-major: line
// g*SIZE + i is line i of group g). One SIZE:1 arbiter per group picks a winner inside
// the group, and one GROUPS:1 arbiter picks among the groups that have a request. The
// grant is the winner of the chosen group. This replaces one wide arbiter by several
// narrow ones, which costs less logic; the VC allocator uses it for its PV:1 arbiters,
// split into V groups of P lines (for a 5-port, 2-VC router: two 5-line arbiters and
// one 2-line arbiter), as the document describes.
//
// With ROUND_ROBIN = 0 the priority is fixed: lowest group first, lowest line inside
// it. With ROUND_ROBIN = 1 both levels rotate; a group arbiter's pointer moves only when
// its group is chosen and upd is high. Combinational from req to gnt.
module hier_arbiter #(
  parameter int GROUPS      = 2,
  parameter int SIZE        = 5,
  parameter bit ROUND_ROBIN = 1'b1,
  localparam int N          = GROUPS * SIZE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         upd,
  output logic [N-1:0] gnt,
  output logic         any_gnt
);

  localparam int GI = (GROUPS > 1) ? $clog2(GROUPS) : 1;
  localparam int SI = (SIZE > 1) ? $clog2(SIZE) : 1;

  logic [GROUPS-1:0][SIZE-1:0] g_gnt;
  logic [GROUPS-1:0]           g_any, top_gnt;
  logic [GI-1:0]               top_idx;

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    logic [SI-1:0] idx_unused;
    arbiter #(.N(SIZE), .ROUND_ROBIN(ROUND_ROBIN)) u_grp (
      .clk, .rst_n,
      .req(req[g*SIZE +: SIZE]), .upd(upd && top_gnt[g]),
      .gnt(g_gnt[g]), .gnt_idx(idx_unused), .any_gnt(g_any[g])
    );
  end

  arbiter #(.N(GROUPS), .ROUND_ROBIN(ROUND_ROBIN)) u_top (
    .clk, .rst_n,
    .req(g_any), .upd(upd),
    .gnt(top_gnt), .gnt_idx(top_idx), .any_gnt(any_gnt)
  );

  always_comb begin
    gnt = '0;
    for (int g = 0; g < GROUPS; g++)
      if (top_gnt[g]) gnt[g*SIZE +: SIZE] = g_gnt[g];
  end

endmodule

// crossbar: fully connected P x P switch built from two levels of multiplexers.
//
// The first level, one V:1 multiplexer per input port, selects the front flit of the VC
// chosen by the switch allocator's first arbitration level (sel_vc). The second level,
// one P:1 multiplexer per output port, selects the input port chosen by the second
// arbitration level (sel_in). Outputs with sel_valid high carry a flit; several
// input-to-output connections are active at once. Purely combinational; the registers
// that follow are in the delay units. Structure as in the document.
module crossbar
  import noc_pkg::*;
#(
  parameter int P = NUM_PORTS,
  parameter int V = 2,
  parameter int W = FLIT_W
) (
  input  logic [P-1:0][V-1:0][W-1:0]  din,
  input  logic [P-1:0][VCID_W-1:0]    sel_vc,
  input  logic [P-1:0][PORT_W-1:0]    sel_in,
  input  logic [P-1:0]                sel_valid,
  output logic [P-1:0][W-1:0]         dout,
  output logic [P-1:0]                dout_valid
);

  logic [P-1:0][W-1:0] lvl1;

  always_comb begin
    for (int p = 0; p < P; p++) begin
      lvl1[p] = '0;
      for (int v = 0; v < V; v++)
        if (int'(sel_vc[p]) == v) lvl1[p] = din[p][v];
    end
    for (int o = 0; o < P; o++) begin
      dout[o] = '0;
      for (int p = 0; p < P; p++)
        if (int'(sel_in[o]) == p) dout[o] = lvl1[p];
      dout_valid[o] = sel_valid[o];
    end
  end

endmodule

// delay_unit: programmable delay registers between a router output and its link.
//
// A chain of DELAY registers carries the output flit and its valid bit, so the flit
// appears on the link DELAY cycles after it crossed the crossbar. The router sets
// DELAY = (pipeline stages - 1) + link delay, which lets one router design stand in for
// routers of one to five pipeline stages and for pipelined links. DELAY must be at least
// one: the last register is the link itself. Valid bits reset to zero; data registers
// load only with valid flits.
module delay_unit #(
  parameter int DELAY = 1,
  parameter int W     = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic         v_q [DELAY];
  logic [W-1:0] d_q [DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      for (int i = 1; i < DELAY; i++) v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) d_q[0] <= in_data;
    for (int i = 1; i < DELAY; i++)
      if (v_q[i-1]) d_q[i] <= d_q[i-1];
  end

  assign out_valid = v_q[DELAY-1];
  assign out_data  = d_q[DELAY-1];

  initial assert (DELAY >= 1) else $error("delay_unit: DELAY must be >= 1");

endmodule

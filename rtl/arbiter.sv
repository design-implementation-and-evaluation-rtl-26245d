// arbiter: N-input arbiter used by the VC and switch allocators.
//
// With ROUND_ROBIN = 0 it is a fixed-priority arbiter: request line 0 has the highest
// priority and line N-1 the lowest, so the lowest-numbered active request is granted
// (the document's truth table for a four-input priority encoder). With ROUND_ROBIN = 1
// the priority rotates: the search starts one line after the line last granted, so a
// line that was just served has the lowest priority next time and every pending request
// is served before the same line wins again.
//
// The grant is combinational from req. The round-robin pointer moves only when upd is
// high in a cycle with a grant, so a grant that the surrounding allocator discards (for
// instance because the second arbitration level refused it) does not cost the requester
// its turn. Updating only on a used grant is this design's choice; the document does not
// say when the pointer moves. Pointer resets to N-1, so line 0 has priority first.
module arbiter #(
  parameter int N           = 4,
  parameter bit ROUND_ROBIN = 1'b1,
  localparam int IW         = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          upd,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx,
  output logic          any_gnt
);

  logic [IW-1:0] last_q;   // index granted last (round robin only)
  logic [IW-1:0] start;

  always_comb begin
    if (!ROUND_ROBIN)             start = '0;
    else if (int'(last_q) >= N-1) start = '0;
    else                          start = last_q + 1'b1;
  end

  always_comb begin
    int idx;
    gnt     = '0;
    gnt_idx = '0;
    any_gnt = 1'b0;
    for (int i = 0; i < N; i++) begin
      idx = int'(start) + i;
      if (idx >= N) idx = idx - N;
      if (!any_gnt && req[idx]) begin
        gnt[idx] = 1'b1;
        gnt_idx  = IW'(idx);
        any_gnt  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              last_q <= IW'(N-1);
    else if (ROUND_ROBIN && upd && any_gnt)  last_q <= gnt_idx;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule

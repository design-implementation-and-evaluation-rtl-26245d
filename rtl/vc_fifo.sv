// vc_fifo: one virtual-channel flit buffer.
//
// A DEPTH-entry, W-bit circular buffer written at push and read at pop in the same clock
// edge. The storage is a plain array with an asynchronous read of the front entry, the
// shape of a dual-port distributed (LUT) RAM, which the document chooses over block RAM
// because each VC buffer is small. dout is the front flit whenever empty is low, so the
// router can inspect the head of the queue and send it in the same cycle.
//
// Timing: a flit pushed at edge t is visible on dout after t. A pop and a push may happen
// in the same cycle, also when the FIFO is full (the popped slot is reused). Pushing a
// full FIFO or popping an empty one is an error of the sender's credit accounting and is
// flagged by an assertion; the write is then dropped. count gives the occupancy.
// Pointers and count reset to zero; the array itself needs no reset.
module vc_fifo #(
  parameter int DEPTH = 8,
  parameter int W     = 32,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [CW-1:0] count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule

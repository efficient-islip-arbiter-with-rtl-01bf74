// voq_fifo: one virtual output queue, a first-in first-out buffer of packets
// that all leave the switch through the same output.
//
// A circular buffer of DEPTH entries with separate read and write pointers
// and an occupancy count. push writes din when the queue is not full (a push into a full queue is
// ignored); pop
// removes the head, which is always visible on dout (first-word fall-through).
// Push and pop may happen in the same cycle. Depth, fall-through read and the
// full/empty flags are this design's choices; the design only asks for one
// queue per output at every input.
module voq_fifo
  import islip_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  packet_t       din,
  input  logic          pop,
  output packet_t       dout,
  output logic          full,
  output logic          empty,
  output logic [CW-1:0] count
);

  packet_t       mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_push, do_pop;

  assign full    = (32'(count) == DEPTH);
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (32'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + AW'(1);
      if (do_pop)  rd_ptr <= (32'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + AW'(1);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule

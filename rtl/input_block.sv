// input_block: one switch input with a virtual output queue per output.
//
// An arriving packet comes with the index of the output it must leave by
// (in_port) and is written into that output's queue, so a packet waiting for
// a busy output never blocks packets behind it that go elsewhere (no
// head-of-line blocking). The block reports the state of its queues to the
// scheduler and, when the scheduler matches it to output deq_port, shows the
// head of that queue on deq_pkt and removes it at the clock edge.
//
// in_ready is high when the queue for in_port has room; space[j] gives the
// same for every queue so that a sender can look ahead. req[j] is high when
// queue j holds a cell that is not being sent in this cycle; it is the
// request vector for the next cell time. Queue depth and this handshake are
// this design's choices.
module input_block
  import islip_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned E  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  packet_t       in_pkt,
  input  logic [E-1:0]  in_port,
  output logic          in_ready,
  output logic [N-1:0]  space,
  output logic [N-1:0]  req,
  output logic          busy,
  input  logic          deq_valid,
  input  logic [E-1:0]  deq_port,
  output packet_t       deq_pkt
);

  packet_t        head  [N];
  logic [N-1:0]   full, empty, push, pop;
  logic [CW-1:0]  count [N];

  for (genvar j = 0; j < N; j++) begin : g_voq
    assign push[j] = in_valid && (32'(in_port) == j);
    assign pop[j]  = deq_valid && (32'(deq_port) == j);
    voq_fifo #(.DEPTH(DEPTH)) u_voq (
      .clk(clk), .rst_n(rst_n),
      .push(push[j]), .din(in_pkt),
      .pop(pop[j]), .dout(head[j]),
      .full(full[j]), .empty(empty[j]), .count(count[j])
    );
    assign space[j] = !full[j];
    assign req[j]   = (count[j] > CW'(pop[j]));
  end

  assign in_ready = !full[in_port];
  assign deq_pkt  = head[deq_port];
  assign busy     = !(&empty);

endmodule

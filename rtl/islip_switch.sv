// islip_switch: N x N input-queued packet switch scheduled by iSLIP.
//
// Each input_block holds N virtual output queues. Their state (N*N request
// bits) goes to the islip_scheduler, which finds a conflict-free match in
// ITER iterations, one per clock. For one cycle after each cell time the
// decision register drives the crossbar: every matched input removes the
// head of the matched queue and the crossbar writes it into the matched
// output_block, which then offers it on out_valid/out_pkt until out_ready.
// A connection to an output whose register has not been emptied by then is
// dropped for this cell time and the cell stays at the head of its queue.
//
// Interface: per input in_valid/in_pkt/in_port (destination output
// index)/in_ready, with the packet written when in_valid and in_ready are both
// high; in_space[i][j] gives the room of every queue so that a sender can test
// a destination before it drives in_valid. Per output out_valid/out_pkt/
// out_ready. busy is high while any queue or output register holds a packet;
// late_match pulses when an iteration after the first adds a connection.
//
// Timing: a packet written into an empty queue is matched at the earliest in
// the next cell time, leaves one cycle after that cell time's last iteration
// and reaches the output register at that edge; each input and each output
// moves at most one packet per ITER cycles. The cell time and full-packet-wide
// datapath (a whole packet crosses in one cycle) are this design's choices.
module islip_switch
  import islip_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned ITER  = 4,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned E = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        in_valid,
  input  packet_t             in_pkt   [N],
  input  logic [N-1:0][E-1:0] in_port,
  output logic [N-1:0]        in_ready,
  output logic [N-1:0][N-1:0] in_space,
  output logic [N-1:0]        out_valid,
  output packet_t             out_pkt  [N],
  input  logic [N-1:0]        out_ready,
  output logic                busy,
  output logic                late_match
);

  logic [N-1:0][N-1:0] req, match, conn;
  logic                match_valid, first_iter;
  logic [N-1:0]        deq_valid, ib_busy, ob_free, out_free, xb_valid;
  logic [N-1:0][E-1:0] deq_port;
  packet_t             deq_pkt [N];
  packet_t             xb_pkt  [N];

  // Decision register -> dequeue controls.
  always_comb begin
    // A connection whose output register is still occupied is dropped; the
    // cell stays queued and is requested again in the next cell time.
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        conn[i][j] = match_valid && match[i][j] && ob_free[j];
    for (int i = 0; i < N; i++) begin
      deq_valid[i] = |conn[i];
      deq_port[i]  = '0;
      for (int j = 0; j < N; j++)
        if (conn[i][j]) deq_port[i] = E'(j);
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_in
    input_block #(.N(N), .DEPTH(DEPTH)) u_ib (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid[i]), .in_pkt(in_pkt[i]), .in_port(in_port[i]),
      .in_ready(in_ready[i]), .space(in_space[i]), .req(req[i]),
      .busy(ib_busy[i]),
      .deq_valid(deq_valid[i]), .deq_port(deq_port[i]), .deq_pkt(deq_pkt[i])
    );
  end

  islip_scheduler #(.N(N), .ITER(ITER)) u_sched (
    .clk(clk), .rst_n(rst_n),
    .req(req), .out_free(out_free),
    .match(match), .match_valid(match_valid),
    .first_iter(first_iter), .late_match(late_match)
  );

  crossbar #(.N(N)) u_xbar (
    .conn(conn), .in_valid(deq_valid), .in_pkt(deq_pkt),
    .out_valid(xb_valid), .out_pkt(xb_pkt)
  );

  for (genvar j = 0; j < N; j++) begin : g_out
    output_block u_ob (
      .clk(clk), .rst_n(rst_n),
      .in_valid(xb_valid[j]), .in_pkt(xb_pkt[j]), .free(ob_free[j]),
      .out_valid(out_valid[j]), .out_pkt(out_pkt[j]), .out_ready(out_ready[j])
    );
    // An output takes part in the next cell time if its register is free
    // now; a register written in this cycle is then free again as soon as
    // its packet leaves, which is checked again at transfer time.
    assign out_free[j] = ob_free[j];
  end

  assign busy = (|ib_busy) || (|out_valid);

endmodule

// islip_arbiter: grants the network to one requesting input port per clock.
//
// Every input port presents a 48-bit packet whose R bit says that it wants
// to send. The arbiter keeps a round-robin pointer (module rr_arbiter) that
// records which port was granted last, so each requesting port is served in
// turn and none waits for longer than the other requesters take: with ports 3
// and 4 requesting, the grants alternate 3, 4, 3, 4, ... one per clock. A
// granted port holds its grant for exactly one cycle, in which its packet is
// handed to the network (gnt_valid, gnt_pkt, gnt_idx).
//
// in_ready[i] says that the network can take port i's packet now; a port is
// only considered when both R and in_ready are high. This flow-control input
// is this design's choice. Grants are combinational from the inputs and the
// pointer; the pointer moves at the clock edge after a grant.
module islip_arbiter
  import islip_pkg::*;
#(
  parameter int unsigned NUM_IN = 9,
  localparam int unsigned E = (NUM_IN > 1) ? $clog2(NUM_IN) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  packet_t             in_pkt   [NUM_IN],
  input  logic [NUM_IN-1:0]   in_ready,
  output logic [NUM_IN-1:0]   grant,
  output logic                gnt_valid,
  output logic [E-1:0]        gnt_idx,
  output packet_t             gnt_pkt
);

  logic [NUM_IN-1:0] req;
  logic              no_req;
  logic [E-1:0]      rpt;

  always_comb begin
    for (int i = 0; i < NUM_IN; i++) req[i] = in_pkt[i].r && in_ready[i];
  end

  rr_arbiter #(.N(NUM_IN)) u_rr (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (req),
    .update_en(1'b1),
    .gnt      (grant),
    .gnt_idx  (gnt_idx),
    .no_req   (no_req),
    .rpt      (rpt)
  );

  assign gnt_valid = !no_req;
  assign gnt_pkt   = in_pkt[gnt_idx];

endmodule

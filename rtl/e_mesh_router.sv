// e_mesh_router: network-on-chip of MESH_X x MESH_Y iSLIP mesh routers fed by
// NUM_IN input ports through a round-robin iSLIP arbiter.
//
// Each input port carries a 48-bit packet (islip_pkg::packet_t). A port that
// sets its request bit R asks to send; the islip_arbiter grants one such port
// per clock, in turn, and the granted packet is written into the local input
// of the router at the packet's source address (x = upper three bits,
// y = lower three). From there the packet is routed hop by hop, first along
// x and then along y, each router being a 5-port switch with virtual output
// queues and an iSLIP scheduler. At the destination it leaves through that
// router's local port on eject_valid/eject_pkt, held until eject_ready.
//
// Interface:
//   input_port[k]   packet offered by port k; grant[k] is high for the one
//                   cycle in which that packet is taken (the sender then
//                   presents its next packet or clears R)
//   out_mesh[x][y]  data field of the last packet that router (x, y) sent on
//                   any of its outputs (lowest port number if several),
//                   which shows the path a packet took
//   processing      high while a request is pending or a packet is inside
//                   the mesh
// A port is granted only when the source router's local queue for the
// packet's first hop has room. reset is synchronous and active high.
//
// Nine input ports, 48-bit packets, XY routing and iSLIP arbitration follow
// the design; the 8 x 8 mesh is what 3-bit coordinates address. Router
// buffering (DEPTH), iterations per cell time (ITER), the out_mesh and
// processing definitions and the flow control are this design's choices.
module e_mesh_router
  import islip_pkg::*;
#(
  parameter int unsigned NUM_IN = 9,
  parameter int unsigned MESH_X = MESH_DIM,
  parameter int unsigned MESH_Y = MESH_DIM,
  parameter int unsigned ITER   = 4,
  parameter int unsigned DEPTH  = 4
) (
  input  logic                clk,
  input  logic                reset,
  input  packet_t             input_port  [NUM_IN],
  output logic [NUM_IN-1:0]   grant,
  output logic                processing,
  output logic [DATA_W-1:0]   out_mesh    [MESH_X][MESH_Y],
  output logic                eject_valid [MESH_X][MESH_Y],
  output packet_t             eject_pkt   [MESH_X][MESH_Y],
  input  logic                eject_ready [MESH_X][MESH_Y],
  output logic                late_match
);

  localparam int unsigned GE = (NUM_IN > 1) ? $clog2(NUM_IN) : 1;

  logic rst_n;
  assign rst_n = !reset;

  // Router-side signals, indexed [x][y] and by port.
  logic [NUM_PORTS-1:0] r_in_valid  [MESH_X][MESH_Y];
  packet_t              r_in_pkt    [MESH_X][MESH_Y][NUM_PORTS];
  logic [NUM_PORTS-1:0] r_in_ready  [MESH_X][MESH_Y];
  logic [NUM_PORTS-1:0] r_out_valid [MESH_X][MESH_Y];
  packet_t              r_out_pkt   [MESH_X][MESH_Y][NUM_PORTS];
  logic [NUM_PORTS-1:0] r_out_ready [MESH_X][MESH_Y];
  logic [NUM_PORTS-1:0] r_lspace    [MESH_X][MESH_Y];
  logic [MESH_X*MESH_Y-1:0] r_busy, r_late;

  // Injection arbiter.
  logic [NUM_IN-1:0] port_ready;
  logic              gnt_valid;
  logic [GE-1:0]     gnt_idx;
  packet_t           gnt_pkt;

  for (genvar k = 0; k < NUM_IN; k++) begin : g_port
    port_e first_hop;
    xy_route u_rt (.cur(input_port[k].src), .dst(input_port[k].dst), .port(first_hop));
    always_comb begin
      port_ready[k] = 1'b0;
      for (int x = 0; x < MESH_X; x++)
        for (int y = 0; y < MESH_Y; y++)
          if (32'(input_port[k].src.x) == x && 32'(input_port[k].src.y) == y)
            port_ready[k] = r_lspace[x][y][first_hop];
    end
  end

  islip_arbiter #(.NUM_IN(NUM_IN)) u_arbiter (
    .clk(clk), .rst_n(rst_n),
    .in_pkt(input_port), .in_ready(port_ready),
    .grant(grant), .gnt_valid(gnt_valid), .gnt_idx(gnt_idx), .gnt_pkt(gnt_pkt)
  );

  for (genvar x = 0; x < MESH_X; x++) begin : g_x
    for (genvar y = 0; y < MESH_Y; y++) begin : g_y
      mesh_router #(.X(x), .Y(y), .ITER(ITER), .DEPTH(DEPTH)) u_router (
        .clk(clk), .rst_n(rst_n),
        .in_valid(r_in_valid[x][y]), .in_pkt(r_in_pkt[x][y]), .in_ready(r_in_ready[x][y]),
        .out_valid(r_out_valid[x][y]), .out_pkt(r_out_pkt[x][y]), .out_ready(r_out_ready[x][y]),
        .local_space(r_lspace[x][y]), .busy(r_busy[x*MESH_Y+y]), .late_match(r_late[x*MESH_Y+y])
      );

      // Local port: injection in, ejection out.
      assign r_in_valid[x][y][PORT_LOCAL] = gnt_valid &&
                                            32'(gnt_pkt.src.x) == x && 32'(gnt_pkt.src.y) == y;
      assign r_in_pkt[x][y][PORT_LOCAL]   = gnt_pkt;
      assign eject_valid[x][y]             = r_out_valid[x][y][PORT_LOCAL];
      assign eject_pkt[x][y]               = r_out_pkt[x][y][PORT_LOCAL];
      assign r_out_ready[x][y][PORT_LOCAL] = eject_ready[x][y];

      // East/west links.
      if (x + 1 < MESH_X) begin : g_e
        assign r_in_valid[x][y][PORT_EAST]  = r_out_valid[x+1][y][PORT_WEST];
        assign r_in_pkt[x][y][PORT_EAST]    = r_out_pkt[x+1][y][PORT_WEST];
        assign r_out_ready[x][y][PORT_EAST] = r_in_ready[x+1][y][PORT_WEST];
      end else begin : g_e_edge
        assign r_in_valid[x][y][PORT_EAST]  = 1'b0;
        assign r_in_pkt[x][y][PORT_EAST]    = '0;
        assign r_out_ready[x][y][PORT_EAST] = 1'b1;
      end
      if (x > 0) begin : g_w
        assign r_in_valid[x][y][PORT_WEST]  = r_out_valid[x-1][y][PORT_EAST];
        assign r_in_pkt[x][y][PORT_WEST]    = r_out_pkt[x-1][y][PORT_EAST];
        assign r_out_ready[x][y][PORT_WEST] = r_in_ready[x-1][y][PORT_EAST];
      end else begin : g_w_edge
        assign r_in_valid[x][y][PORT_WEST]  = 1'b0;
        assign r_in_pkt[x][y][PORT_WEST]    = '0;
        assign r_out_ready[x][y][PORT_WEST] = 1'b1;
      end

      // North/south links.
      if (y + 1 < MESH_Y) begin : g_n
        assign r_in_valid[x][y][PORT_NORTH]  = r_out_valid[x][y+1][PORT_SOUTH];
        assign r_in_pkt[x][y][PORT_NORTH]    = r_out_pkt[x][y+1][PORT_SOUTH];
        assign r_out_ready[x][y][PORT_NORTH] = r_in_ready[x][y+1][PORT_SOUTH];
      end else begin : g_n_edge
        assign r_in_valid[x][y][PORT_NORTH]  = 1'b0;
        assign r_in_pkt[x][y][PORT_NORTH]    = '0;
        assign r_out_ready[x][y][PORT_NORTH] = 1'b1;
      end
      if (y > 0) begin : g_s
        assign r_in_valid[x][y][PORT_SOUTH]  = r_out_valid[x][y-1][PORT_NORTH];
        assign r_in_pkt[x][y][PORT_SOUTH]    = r_out_pkt[x][y-1][PORT_NORTH];
        assign r_out_ready[x][y][PORT_SOUTH] = r_in_ready[x][y-1][PORT_NORTH];
      end else begin : g_s_edge
        assign r_in_valid[x][y][PORT_SOUTH]  = 1'b0;
        assign r_in_pkt[x][y][PORT_SOUTH]    = '0;
        assign r_out_ready[x][y][PORT_SOUTH] = 1'b1;
      end

      // Data last forwarded by this node.
      always_ff @(posedge clk) begin
        if (reset) begin
          out_mesh[x][y] <= '0;
        end else begin
          for (int p = NUM_PORTS - 1; p >= 0; p--)
            if (r_out_valid[x][y][p] && r_out_ready[x][y][p])
              out_mesh[x][y] <= r_out_pkt[x][y][p].data;
        end
      end
    end
  end

  always_comb begin
    processing = |r_busy;
    for (int k = 0; k < NUM_IN; k++) processing = processing | input_port[k].r;
  end
  assign late_match = |r_late;

endmodule

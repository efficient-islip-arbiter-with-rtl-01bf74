// mesh_router: one node of the 2-D mesh, a 5-port iSLIP switch.
//
// The five ports are local, east, west, north and south (islip_pkg::port_e).
// Every arriving packet is routed by xy_route from this node's coordinates
// (X, Y) and its destination address, and written into the virtual output
// queue of the chosen output port of a 5 x 5 islip_switch. The iSLIP
// scheduler then moves packets through the crossbar to the output registers,
// which hand them to the neighbouring routers or, on the local port, to the
// node itself.
//
// Interface: per port in_valid/in_pkt/in_ready (in_ready depends on the
// packet's route) and out_valid/out_pkt/out_ready. local_space[p] says that
// the local input could take a packet routed to output p now, so that an
// injector can test a packet before it is granted. Using a 5-port switch per
// node is this design's choice; the design specifies XY routing and an iSLIP
// scheduled crossbar.
module mesh_router
  import islip_pkg::*;
#(
  parameter int unsigned X     = 0,
  parameter int unsigned Y     = 0,
  parameter int unsigned ITER  = 4,
  parameter int unsigned DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_PORTS-1:0] in_valid,
  input  packet_t              in_pkt   [NUM_PORTS],
  output logic [NUM_PORTS-1:0] in_ready,
  output logic [NUM_PORTS-1:0] out_valid,
  output packet_t              out_pkt  [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] out_ready,
  output logic [NUM_PORTS-1:0] local_space,
  output logic                 busy,
  output logic                 late_match
);

  localparam node_addr_t HERE = '{x: COORD_W'(X), y: COORD_W'(Y)};

  port_e                                 route [NUM_PORTS];
  logic [NUM_PORTS-1:0][2:0]             in_port;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]   in_space;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_rt
    xy_route u_rt (.cur(HERE), .dst(in_pkt[p].dst), .port(route[p]));
    assign in_port[p] = route[p];
  end

  islip_switch #(.N(NUM_PORTS), .ITER(ITER), .DEPTH(DEPTH)) u_sw (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_pkt(in_pkt), .in_port(in_port),
    .in_ready(in_ready), .in_space(in_space),
    .out_valid(out_valid), .out_pkt(out_pkt), .out_ready(out_ready),
    .busy(busy), .late_match(late_match)
  );

  assign local_space = in_space[PORT_LOCAL];

endmodule

// islip_pkg: types and constants shared by the iSLIP mesh network.
//
// The 48-bit packet follows the input packet format of the design: a 3-bit
// CRC field in bits 47:45, the request bit R in bit 44, 32 data bits in
// 43:12, a 6-bit destination address in 11:6 and a 6-bit source address in
// 5:0. Splitting each 6-bit address into a 3-bit x coordinate (upper half)
// and a 3-bit y coordinate (lower half) is this design's choice; it gives an
// 8 x 8 mesh. The router port numbering and the meaning of north (+y) are
// also this design's choice.
package islip_pkg;

  localparam int unsigned CRC_W   = 3;
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned COORD_W = 3;
  localparam int unsigned MESH_DIM = 1 << COORD_W;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } node_addr_t;

  typedef struct packed {
    logic [CRC_W-1:0]  crc;   // 47:45 check bits, carried unchanged
    logic              r;     // 44    request bit
    logic [DATA_W-1:0] data;  // 43:12
    node_addr_t        dst;   // 11:6
    node_addr_t        src;   // 5:0
  } packet_t;

  // Ports of a mesh router.
  localparam int unsigned NUM_PORTS = 5;
  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_EAST  = 3'd1,   // +x
    PORT_WEST  = 3'd2,   // -x
    PORT_NORTH = 3'd3,   // +y
    PORT_SOUTH = 3'd4    // -y
  } port_e;

endpackage

// noc_pkg: types and constants shared by the mesh network-on-chip for
// parallel AES-128 encryption.
//
// A node address is an (x, y) coordinate of COORD_W bits each; on a 4x4 mesh
// the 4-bit address is {x, y}, so node (1,1) is 4'b0101 and the far corner
// (3,3) is 4'b1111.  Packets are single, whole units (store-and-forward
// packet switching, no flit splitting, no virtual channels): a header with
// destination and source address, followed by the AES key and the plaintext.
//
// Router ports are numbered in the round-robin service order local, west,
// south, east, north.  The direction names follow this design's X-Y rule:
// a packet whose current x is below its destination x leaves by the west
// port (towards x+1), one whose x is above leaves by the east port (x-1);
// with x settled, y below the destination leaves north (y+1), y above
// leaves south (y-1).
package noc_pkg;

  localparam int COORD_W = 2;                // bits per coordinate (4x4 mesh)
  localparam int ADDR_W  = 2 * COORD_W;      // node address {x, y}
  localparam int AES_W   = 128;              // AES key and block size

  localparam int NPORTS  = 5;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_WEST  = 3'd1,
    P_SOUTH = 3'd2,
    P_EAST  = 3'd3,
    P_NORTH = 3'd4
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } addr_t;

  // One packet: an encryption request travelling to the node that runs it.
  typedef struct packed {
    addr_t            dest;
    addr_t            src;
    logic [AES_W-1:0] key;
    logic [AES_W-1:0] text;
  } packet_t;

  localparam int PKT_W = $bits(packet_t);

endpackage

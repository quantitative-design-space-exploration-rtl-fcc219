// noc_pkg: types and constants shared by the circuit-switched mesh NoC.
//
// The NoC is a 2-D mesh of 5-port routing-switches. Each switch has a local
// port (to its network interface) and four neighbour ports. A connection is
// opened by a head word that carries the destination and source coordinates,
// held open while data words stream through, and closed by dropping the
// request line. The five connection states follow the paper's description of
// a circuit-switched routing-switch; the numeric encodings, the head-word
// layout and the port numbering are this design's own choices.
package noc_pkg;

  // Ports of a routing-switch. North is y-1, south is y+1, east is x+1.
  localparam int unsigned NPORTS  = 5;
  localparam int unsigned PORT_W  = 3;
  localparam int unsigned COORD_W = 4;   // up to a 16 x 16 mesh

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  // Routing algorithms evaluated for the switch.
  typedef enum logic [1:0] {
    ALG_XY             = 2'd0,  // static dimension-order routing
    ALG_TABLE          = 2'd1,  // static, looked up in a routing table
    ALG_ADAPTIVE_XY    = 2'd2,  // minimal adaptive, no backtracking
    ALG_ADAPTIVE_XY_BT = 2'd3   // minimal adaptive with backtracking
  } routing_alg_e;

  // Connection state of one input port.
  typedef enum logic [2:0] {
    CS_IDLE      = 3'd0,  // "idle"
    CS_DETERMINE = 3'd1,  // "determine connection target"
    CS_WAIT      = 3'd2,  // "wait for connection to establish"
    CS_ACTIVE    = 3'd3,  // "active connection"
    CS_DESTROY1  = 3'd4,  // "destroy connection", first cycle
    CS_DESTROY2  = 3'd5,  // "destroy connection", second cycle
    CS_REFUSED   = 3'd6   // refusal signalled upstream until req drops
  } conn_state_e;

  // Head word: first word on the data lines while a connection is set up.
  localparam int unsigned HEAD_W = 4 * COORD_W;   // 16 bits

  typedef struct packed {
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] dest_y;
    logic [COORD_W-1:0] dest_x;
  } head_t;

endpackage

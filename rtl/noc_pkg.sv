// noc_pkg: types and constants shared by the bufferless deflection NoC.
//
// A flit is the routable unit: every flit carries its own destination and is
// routed independently of all others. The flit format is this design's own
// choice (the routing method does not fix one): a valid bit, destination and
// source coordinates, an age field used by the oldest-first allocator, and a
// payload. Router ports are numbered N=0, E=1, S=2, W=3; x grows to the East,
// y grows to the South. COORD_W=3 covers the 8x8 mesh.
package noc_pkg;

  localparam int unsigned COORD_W  = 3;   // up to 8 routers per dimension
  localparam int unsigned AGE_W    = 12;  // saturating hop/cycle counter
  localparam int unsigned DATA_W   = 32;  // payload bits
  localparam int unsigned NUM_DIRS = 4;   // network ports per router

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [AGE_W-1:0]   age_t;

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Port allocation and switching scheme of the router.
  typedef enum logic {
    ARCH_BLESS   = 1'b0,  // oldest-first allocator + full 4x4 crossbar
    ARCH_CHIPPER = 1'b1   // two-stage permutation network, random priority
  } router_arch_e;

  // Behaviour of one side of a router-to-router link.
  typedef enum logic [1:0] {
    LINK_TWO_MODE       = 2'd0,  // exchange or loop-back, by the flit-deflection rule
    LINK_FIXED_EXCHANGE = 2'd1,  // conventional link: always exchange
    LINK_FIXED_LOOPBACK = 2'd2   // mesh boundary: no neighbour, always loop back
  } link_mode_e;

  typedef struct packed {
    logic   valid;
    coord_t dst_x;
    coord_t dst_y;
    coord_t src_x;
    coord_t src_y;
    age_t   age;
    logic [DATA_W-1:0] data;
  } flit_t;


endpackage

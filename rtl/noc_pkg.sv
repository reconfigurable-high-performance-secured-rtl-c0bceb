// noc_pkg: types and constants shared by the agent-monitored mesh NoC.
//
// A packet is 48 bits: a 16-bit header followed by a 32-bit payload (the
// payload width and the 48-bit total follow the document; the field layout of
// the header is this design's own choice). Header layout, MSB first:
//   [15:14] destination X   [13:12] destination Y   [11] cluster select
//   [10:9]  packet type     [8:4]   source port     [3:2] session operation
//   [1:0]   reserved
// Directions are numbered N=0, E=1, S=2, W=3, Local=4; Y grows towards South,
// X grows towards East. The opposite of direction d (d<4) is (d+2) mod 4.
// Not every module uses every constant here, so lint reports the unused ones
// per module; that is expected for a shared package.
package noc_pkg;

  localparam int COORD_W  = 2;   // coordinate width: meshes up to 4x4 per cluster
  localparam int DATA_W   = 32;
  localparam int HDR_W    = 16;
  localparam int PKT_W    = HDR_W + DATA_W;
  localparam int SPORT_W  = 5;   // source port field: 32 ports
  localparam int NPORTS   = 5;
  localparam int NDIRS    = 4;
  localparam int CSEL_BIT = 32 + 11;  // bit of the packet that selects the cluster

  localparam int DIR_N = 0;
  localparam int DIR_E = 1;
  localparam int DIR_S = 2;
  localparam int DIR_W = 3;
  localparam int DIR_L = 4;

  typedef enum logic [1:0] {
    PT_DATA  = 2'd0,
    PT_VIDEO = 2'd1,
    PT_AUDIO = 2'd2,
    PT_CTRL  = 2'd3
  } ptype_e;

  typedef enum logic [1:0] {
    SES_NONE  = 2'd0,
    SES_OPEN  = 2'd1,
    SES_CLOSE = 2'd2,
    SES_RSVD  = 2'd3
  } sess_e;

  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic               cluster;
    ptype_e             ptype;
    logic [SPORT_W-1:0] src_port;
    sess_e              sess;
    logic [1:0]         rsvd;
  } hdr_t;

  typedef struct packed {
    hdr_t              hdr;
    logic [DATA_W-1:0] data;
  } pkt_t;

  // One-bit permanent-fault status signals of one node, as delivered by the
  // fault detection circuitry ('1' = faulty). Index of link/inport is the
  // direction N,E,S,W.
  typedef struct packed {
    logic [NDIRS-1:0] link;
    logic [NDIRS-1:0] inport;
    logic             pri_enc;
    logic             arbiter;
    logic             xbar;
    logic             pe;
    logic             ni;
    logic             link_local;
  } node_fault_t;

  // Reason codes for packets the agent stops before the PE.
  typedef enum logic [1:0] {
    DROP_NONE    = 2'd0,
    DROP_PORT    = 2'd1,   // source port blocked by the config register
    DROP_SESSION = 2'd2,   // session limit or unmatched close
    DROP_SEGR    = 2'd3    // node segregated by the cluster agent
  } drop_e;

  function automatic int unsigned opp_dir(int unsigned d);
    return (d + 2) % 4;
  endfunction

endpackage

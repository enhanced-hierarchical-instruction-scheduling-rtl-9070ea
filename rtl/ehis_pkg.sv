// ehis_pkg - shared types and constants of the dynamic contention tracking
// hardware and the loop-aware domain assigner.
//
// A PE location names one processing element of the tiled dataflow grid:
// the cluster's (x, y) position in the grid, the domain inside the cluster
// (4 per cluster), and the PE inside the domain (8 per domain). The PE index
// is laid out so that bit 0 selects the PE within its pod (2 PEs per pod),
// bits 2:1 select the pod (4 per domain) and bit 2 alone selects the
// half-domain (2 adjacent pods). The cluster, domain, pod and PE counts and
// the network latencies follow the architecture's parameter table; the
// encoding and the field widths are this design's choice.
//
// An instruction record is what a PE's tracker keeps per resident
// instruction for relocation: its static instruction number and the
// identities and locations of its producers and consumers.
package ehis_pkg;

  // Grid geometry (domains per cluster, PEs per domain, instructions per PE).
  localparam int unsigned DOMAINS_PER_CLUSTER = 4;
  localparam int unsigned PES_PER_DOMAIN      = 8;
  localparam int unsigned INSTS_PER_PE        = 64;

  // Field widths (this design's choice).
  localparam int unsigned CL_COORD_W = 4;   // cluster x / y coordinate
  localparam int unsigned INST_ID_W  = 16;  // static instruction number
  localparam int unsigned NSRC       = 2;   // producers tracked per instruction
  localparam int unsigned NSNK       = 4;   // consumers tracked per instruction
  localparam int unsigned COST_W     = 12;  // relocation cost
  localparam int unsigned LAT_W      = 8;   // one network latency

  // Network latencies in cycles.
  localparam int unsigned LAT_SAME_PE      = 0;  // bypass inside the PE
  localparam int unsigned LAT_POD          = 1;
  localparam int unsigned LAT_HALF_DOMAIN  = 2;
  localparam int unsigned LAT_DOMAIN       = 4;
  localparam int unsigned LAT_CLUSTER      = 7;  // inter-cluster adds hop count

  typedef logic [INST_ID_W-1:0] inst_id_t;

  typedef struct packed {
    logic [CL_COORD_W-1:0] cx;
    logic [CL_COORD_W-1:0] cy;
    logic [1:0]            domain;
    logic [2:0]            pe;      // {pod[1:0], pe_in_pod}
  } pe_loc_t;

  // One producer or consumer of an instruction.
  typedef struct packed {
    logic     valid;
    inst_id_t id;
    pe_loc_t  loc;
  } peer_t;

  // Everything the re-locator needs to know about an instruction.
  typedef struct packed {
    inst_id_t          id;
    peer_t [NSRC-1:0]  src;
    peer_t [NSNK-1:0]  snk;
  } inst_rec_t;

  // Announcement of an instruction's new location to its peers.
  typedef struct packed {
    logic     valid;
    inst_id_t id;
    pe_loc_t  loc;
  } loc_update_t;

endpackage

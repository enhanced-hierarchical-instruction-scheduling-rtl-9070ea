// ehis_cluster - scheduling support hardware of one cluster of a tiled
// dataflow processor.
//
// A cluster has NUM_DOMAINS domains of NPE processing elements. This module
// holds the two mechanisms that improve on hierarchical instruction
// placement:
//  * dynamic contention tracking - one relocation_domain per domain: a
//    contention counter per resident instruction in every PE, and a
//    per-domain re-locator that moves an instruction whose counter reaches
//    the threshold to the cheapest PE of its domain and announces its new
//    location;
//  * loop-aware coarse-grain placement - a loop_aware_assigner that maps a
//    stream of instructions in profiled execution order to domains without
//    splitting loops that fit in one domain.
// The two share no signals: coarse placement decides, ahead of execution,
// which domain an instruction is loaded into (through the ld_* ports), and
// contention tracking refines the PE inside that domain while the program
// runs.
//
// The announcement buses of all domains, plus one bus from outside the
// cluster (upd_ext), are watched by every tracker of the cluster, so a
// producer or consumer in another domain also learns the new location.
// upd_out carries this cluster's announcements to the rest of the machine.
//
// The PEs themselves (pipeline, queues, ALUs, instruction store), the
// operand networks and the caches are outside this module: the PE side of
// each tracker (ld_*, rdy, fire, new_rdy, moved_in_*, moved_out_*) is
// brought out per domain and per PE.
module ehis_cluster
  import ehis_pkg::*;
#(
  parameter int unsigned NUM_DOMAINS   = DOMAINS_PER_CLUSTER,
  parameter int unsigned NPE           = PES_PER_DOMAIN,
  parameter int unsigned NSLOT         = INSTS_PER_PE,
  parameter int unsigned ALUS          = 2,
  parameter int unsigned THRESHOLD     = 20,
  parameter int unsigned RELOC_PENALTY = 20,
  parameter int unsigned S_MAX         = 512,
  localparam int unsigned SLOT_W       = $clog2(NSLOT),
  localparam int unsigned PE_W         = $clog2(NPE),
  localparam int unsigned NUPD         = NUM_DOMAINS + 1
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [CL_COORD_W-1:0]  cl_x,
  input  logic [CL_COORD_W-1:0]  cl_y,

  // PE side, per domain and PE
  input  logic [NPE-1:0]         ld_valid  [NUM_DOMAINS],
  input  logic [SLOT_W-1:0]      ld_slot   [NUM_DOMAINS][NPE],
  input  inst_rec_t              ld_rec    [NUM_DOMAINS][NPE],
  input  logic [NSLOT-1:0]       rdy       [NUM_DOMAINS][NPE],
  input  logic [NSLOT-1:0]       fire      [NUM_DOMAINS][NPE],
  input  logic [NSLOT-1:0]       new_rdy   [NUM_DOMAINS][NPE],
  output logic [NPE-1:0]         moved_in_valid  [NUM_DOMAINS],
  output logic [SLOT_W-1:0]      moved_in_slot   [NUM_DOMAINS][NPE],
  output logic [NPE-1:0]         moved_out_valid [NUM_DOMAINS],
  output logic [SLOT_W-1:0]      moved_out_slot  [NUM_DOMAINS],
  output logic [NSLOT-1:0]       resident  [NUM_DOMAINS][NPE],
  output logic [SLOT_W:0]        conflicts [NUM_DOMAINS][NPE],

  // location announcements
  input  loc_update_t            upd_ext,
  output loc_update_t            upd_out   [NUM_DOMAINS],

  // re-locator observation, per domain
  output logic [NUM_DOMAINS-1:0] dec_valid,
  output logic [NUM_DOMAINS-1:0] dec_moved,
  output logic [PE_W-1:0]        dec_from  [NUM_DOMAINS],
  output logic [PE_W-1:0]        dec_to    [NUM_DOMAINS],
  output logic [COST_W-1:0]      dec_cost  [NUM_DOMAINS],
  output logic [NUM_DOMAINS-1:0] reloc_busy,

  // loop-aware coarse-grain placement
  input  logic                   loop_aware_en,
  input  logic                   cg_valid,
  input  logic                   cg_loop_head,
  input  logic [15:0]            cg_loop_size,
  output logic                   cg_out_valid,
  output logic [7:0]             cg_domain,
  output logic                   cg_new_domain,
  output logic                   cg_loop_split_avoided,
  output logic [15:0]            cg_s_curr
);

  loc_update_t [NUPD-1:0] upd_bus;

  always_comb begin
    for (int d = 0; d < NUM_DOMAINS; d++) upd_bus[d] = upd_out[d];
    upd_bus[NUM_DOMAINS] = upd_ext;
  end

  for (genvar d = 0; d < NUM_DOMAINS; d++) begin : g_dom
    relocation_domain #(
      .NPE(NPE), .NSLOT(NSLOT), .ALUS(ALUS), .THRESHOLD(THRESHOLD),
      .RELOC_PENALTY(RELOC_PENALTY), .NUPD(NUPD)
    ) u_dom (
      .clk, .rst_n, .cl_x, .cl_y,
      .dom_id          (2'(d)),
      .ld_valid        (ld_valid[d]),
      .ld_slot         (ld_slot[d]),
      .ld_rec          (ld_rec[d]),
      .rdy             (rdy[d]),
      .fire            (fire[d]),
      .new_rdy         (new_rdy[d]),
      .moved_in_valid  (moved_in_valid[d]),
      .moved_in_slot   (moved_in_slot[d]),
      .moved_out_valid (moved_out_valid[d]),
      .moved_out_slot  (moved_out_slot[d]),
      .resident        (resident[d]),
      .conflicts       (conflicts[d]),
      .upd_in          (upd_bus),
      .upd_out         (upd_out[d]),
      .busy            (reloc_busy[d]),
      .dec_valid       (dec_valid[d]),
      .dec_moved       (dec_moved[d]),
      .dec_from        (dec_from[d]),
      .dec_to          (dec_to[d]),
      .dec_cost        (dec_cost[d])
    );
  end

  loop_aware_assigner #(.S_MAX(S_MAX), .DOM_W(8), .SIZE_W(16)) u_cg (
    .clk, .rst_n, .loop_aware_en,
    .in_valid               (cg_valid),
    .in_loop_head           (cg_loop_head),
    .in_loop_size           (cg_loop_size),
    .out_valid              (cg_out_valid),
    .out_domain             (cg_domain),
    .out_new_domain         (cg_new_domain),
    .out_loop_split_avoided (cg_loop_split_avoided),
    .s_curr                 (cg_s_curr)
  );

endmodule

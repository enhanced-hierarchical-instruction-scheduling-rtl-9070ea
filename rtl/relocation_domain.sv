// relocation_domain - dynamic contention tracking for one domain.
//
// A domain holds NPE processing elements (8: four pods of two). Each PE has
// a contention_tracker; the domain has one dynamic_relocator. Every cycle
// each tracker reports to the re-locator how many of its instructions
// became ready in the previous cycle and whether it has a free instruction
// slot. A tracker whose instruction reaches the contention threshold sends
// a relocation request; the re-locator chooses the cheapest PE of the
// domain, and when it moves the instruction it removes it from the old
// tracker, inserts it into the new one and announces the new location on
// upd_out. Instructions never leave their domain.
//
// Each tracker watches NUPD announcement buses (upd_in), so that producer
// and consumer locations stay current when instructions move in this or in
// other domains; the owner of this module connects upd_out of every domain
// (and announcements from elsewhere) to them.
//
// Ports are arrays indexed by the PE number inside the domain; see
// contention_tracker and dynamic_relocator for the meaning and timing.
module relocation_domain
  import ehis_pkg::*;
#(
  parameter int unsigned NPE           = PES_PER_DOMAIN,
  parameter int unsigned NSLOT         = INSTS_PER_PE,
  parameter int unsigned ALUS          = 2,
  parameter int unsigned THRESHOLD     = 20,
  parameter int unsigned RELOC_PENALTY = 20,
  parameter int unsigned NUPD          = 1,
  localparam int unsigned SLOT_W       = $clog2(NSLOT),
  localparam int unsigned PE_W         = $clog2(NPE)
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [CL_COORD_W-1:0]   cl_x,
  input  logic [CL_COORD_W-1:0]   cl_y,
  input  logic [1:0]              dom_id,

  // per PE
  input  logic [NPE-1:0]          ld_valid,
  input  logic [SLOT_W-1:0]       ld_slot    [NPE],
  input  inst_rec_t               ld_rec     [NPE],
  input  logic [NSLOT-1:0]        rdy        [NPE],
  input  logic [NSLOT-1:0]        fire       [NPE],
  input  logic [NSLOT-1:0]        new_rdy    [NPE],
  output logic [NPE-1:0]          moved_in_valid,
  output logic [SLOT_W-1:0]       moved_in_slot [NPE],
  output logic [NPE-1:0]          moved_out_valid,
  output logic [SLOT_W-1:0]       moved_out_slot,
  output logic [NSLOT-1:0]        resident   [NPE],
  output logic [SLOT_W:0]         conflicts  [NPE],

  // location announcements
  input  loc_update_t [NUPD-1:0]  upd_in,
  output loc_update_t             upd_out,

  // re-locator observation
  output logic                    busy,
  output logic                    dec_valid,
  output logic                    dec_moved,
  output logic [PE_W-1:0]         dec_from,
  output logic [PE_W-1:0]         dec_to,
  output logic [COST_W-1:0]       dec_cost
);

  logic [SLOT_W:0]   ready_cnt [NPE];
  logic [NPE-1:0]    has_free, req_valid, req_ready, done_valid, ins_valid;
  logic [SLOT_W-1:0] req_slot  [NPE];
  inst_rec_t         req_rec   [NPE];
  logic [SLOT_W-1:0] done_slot;
  logic              done_moved;
  inst_rec_t         ins_rec;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    contention_tracker #(
      .NSLOT(NSLOT), .ALUS(ALUS), .THRESHOLD(THRESHOLD), .NUPD(NUPD)
    ) u_trk (
      .clk, .rst_n,
      .ld_valid       (ld_valid[p]),
      .ld_slot        (ld_slot[p]),
      .ld_rec         (ld_rec[p]),
      .rdy            (rdy[p]),
      .fire           (fire[p]),
      .new_rdy        (new_rdy[p]),
      .ready_cnt      (ready_cnt[p]),
      .has_free       (has_free[p]),
      .req_valid      (req_valid[p]),
      .req_ready      (req_ready[p]),
      .req_slot       (req_slot[p]),
      .req_rec        (req_rec[p]),
      .done_valid     (done_valid[p]),
      .done_slot      (done_slot),
      .done_moved     (done_moved),
      .ins_valid      (ins_valid[p]),
      .ins_rec        (ins_rec),
      .moved_in_valid (moved_in_valid[p]),
      .moved_in_slot  (moved_in_slot[p]),
      .upd            (upd_in),
      .resident       (resident[p]),
      .conflicts      (conflicts[p])
    );
  end

  dynamic_relocator #(
    .NPE(NPE), .SLOT_W(SLOT_W), .RELOC_PENALTY(RELOC_PENALTY)
  ) u_reloc (
    .clk, .rst_n, .cl_x, .cl_y, .dom_id,
    .ready_cnt, .has_free, .req_valid, .req_ready, .req_slot, .req_rec,
    .done_valid, .done_slot, .done_moved, .ins_valid, .ins_rec, .upd_out,
    .busy, .dec_valid, .dec_moved, .dec_from, .dec_to, .dec_cost
  );

  assign moved_out_valid = done_moved ? done_valid : '0;
  assign moved_out_slot  = done_slot;

endmodule

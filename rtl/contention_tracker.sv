// contention_tracker - per-PE contention counters and relocation requests.
//
// One tracker sits beside each processing element. For every instruction
// slot of the PE's instruction store it keeps a contention counter and the
// instruction's relocation record (its number and the identities and
// locations of its producers and consumers).
//
// Contention: in a cycle in which the PE issues to all of its ALUS ALUs, every
// resident instruction that is ready but was not issued has contended with
// the others for an ALU; its counter is incremented. When a counter reaches
// THRESHOLD the instruction becomes relocation-pending and the tracker
// raises a request (valid/ready) to the domain's re-locator carrying the
// instruction's record. The lowest pending slot is offered first. While an
// instruction is pending its counter holds. The re-locator answers with
// done (slot, moved): a moved instruction leaves this PE; either way the
// counter is cleared.
//
// Ready report: every cycle the tracker registers how many resident
// instructions became ready (new_rdy); ready_cnt is therefore the count of
// the previous cycle, which the re-locator uses as contention cost.
//
// Other ports: ld_* places an instruction into a given slot (instruction
// brought onto the PE); ins_* places an instruction moved here by the
// re-locator into the lowest free slot and reports that slot on moved_in_*
// in the same cycle; upd[] are location announcements: any producer or
// consumer entry with a matching instruction number takes the new location.
// has_free tells the re-locator that a moved instruction can be accepted.
// conflicts is the number of contentions counted this cycle.
//
// The counter per instruction, the threshold of 20 and the per-PE ready
// count follow the scheduling scheme; the contention condition (ready but
// not issued while all ALUs were busy), the request order, and clearing the
// counter also when the instruction stays are this design's choices.
module contention_tracker
  import ehis_pkg::*;
#(
  parameter int unsigned NSLOT     = INSTS_PER_PE,  // instructions per PE
  parameter int unsigned ALUS      = 2,             // ALUs per PE
  parameter int unsigned THRESHOLD = 20,            // contention threshold
  parameter int unsigned NUPD      = 1,             // update buses watched
  localparam int unsigned SLOT_W   = $clog2(NSLOT),
  localparam int unsigned CNT_W    = $clog2(THRESHOLD + 1)
)(
  input  logic                    clk,
  input  logic                    rst_n,

  // instruction brought onto the PE
  input  logic                    ld_valid,
  input  logic [SLOT_W-1:0]       ld_slot,
  input  inst_rec_t               ld_rec,

  // PE issue state, one bit per slot
  input  logic [NSLOT-1:0]        rdy,      // has all operands, wants an ALU
  input  logic [NSLOT-1:0]        fire,     // issued this cycle
  input  logic [NSLOT-1:0]        new_rdy,  // became ready this cycle

  // to the re-locator
  output logic [SLOT_W:0]         ready_cnt,
  output logic                    has_free,
  output logic                    req_valid,
  input  logic                    req_ready,
  output logic [SLOT_W-1:0]       req_slot,
  output inst_rec_t               req_rec,

  // from the re-locator
  input  logic                    done_valid,
  input  logic [SLOT_W-1:0]       done_slot,
  input  logic                    done_moved,
  input  logic                    ins_valid,
  input  inst_rec_t               ins_rec,
  output logic                    moved_in_valid,
  output logic [SLOT_W-1:0]       moved_in_slot,
  input  loc_update_t [NUPD-1:0]  upd,

  // status
  output logic [NSLOT-1:0]        resident,
  output logic [SLOT_W:0]         conflicts
);

  inst_rec_t              rec_q  [NSLOT];
  logic [CNT_W-1:0]       cnt_q  [NSLOT];
  logic [NSLOT-1:0]       pend_q, sent_q, res_q;
  logic [SLOT_W:0]        rcnt_q;

  logic [NSLOT-1:0]       contend;
  logic [SLOT_W:0]        nfire, nconf, nnew;
  logic                   alus_full;
  logic [NSLOT-1:0]       offer;
  logic [NSLOT-1:0]       free_mask;
  logic                   free_found;
  logic [SLOT_W-1:0]      free_slot;

  assign resident  = res_q;
  assign ready_cnt = rcnt_q;

  always_comb begin
    nfire = '0;
    nnew  = '0;
    for (int s = 0; s < NSLOT; s++) begin
      nfire += (SLOT_W+1)'(fire[s]);
      nnew  += (SLOT_W+1)'(new_rdy[s] & res_q[s]);
    end
    alus_full = (nfire >= (SLOT_W+1)'(ALUS));
    contend   = alus_full ? (res_q & rdy & ~fire) : '0;
    nconf = '0;
    for (int s = 0; s < NSLOT; s++) nconf += (SLOT_W+1)'(contend[s]);
  end
  assign conflicts = nconf;

  // request: lowest pending slot not yet handed to the re-locator
  always_comb begin
    offer    = pend_q & ~sent_q;
    req_slot = '0;
    for (int s = NSLOT-1; s >= 0; s--)
      if (offer[s]) req_slot = SLOT_W'(s);
    req_valid = |offer;
    req_rec   = rec_q[req_slot];
  end

  // free slot for an instruction moved in (a slot being loaded is not free)
  always_comb begin
    free_mask = ~res_q;
    if (ld_valid) free_mask[ld_slot] = 1'b0;
    free_found = |free_mask;
    free_slot  = '0;
    for (int s = NSLOT-1; s >= 0; s--)
      if (free_mask[s]) free_slot = SLOT_W'(s);
  end
  assign has_free       = free_found;
  assign moved_in_valid = ins_valid & free_found;
  assign moved_in_slot  = free_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= '0;
      sent_q <= '0;
      res_q  <= '0;
      rcnt_q <= '0;
      for (int s = 0; s < NSLOT; s++) begin
        cnt_q[s] <= '0;
        rec_q[s] <= '0;
      end
    end else begin
      rcnt_q <= nnew;

      // location announcements
      for (int s = 0; s < NSLOT; s++)
        for (int u = 0; u < NUPD; u++)
          if (upd[u].valid) begin
            for (int k = 0; k < NSRC; k++)
              if (rec_q[s].src[k].valid && rec_q[s].src[k].id == upd[u].id)
                rec_q[s].src[k].loc <= upd[u].loc;
            for (int k = 0; k < NSNK; k++)
              if (rec_q[s].snk[k].valid && rec_q[s].snk[k].id == upd[u].id)
                rec_q[s].snk[k].loc <= upd[u].loc;
          end

      // contention counting
      for (int s = 0; s < NSLOT; s++)
        if (contend[s] && !pend_q[s]) begin
          cnt_q[s] <= cnt_q[s] + 1'b1;
          if (cnt_q[s] == CNT_W'(THRESHOLD - 1)) pend_q[s] <= 1'b1;
        end

      if (req_valid && req_ready) sent_q[req_slot] <= 1'b1;

      if (done_valid) begin
        cnt_q[done_slot]  <= '0;
        pend_q[done_slot] <= 1'b0;
        sent_q[done_slot] <= 1'b0;
        if (done_moved) res_q[done_slot] <= 1'b0;
      end

      if (ins_valid && free_found) begin
        rec_q[free_slot] <= ins_rec;
        res_q[free_slot] <= 1'b1;
        cnt_q[free_slot] <= '0;
      end

      if (ld_valid) begin
        rec_q[ld_slot]  <= ld_rec;
        res_q[ld_slot]  <= 1'b1;
        cnt_q[ld_slot]  <= '0;
        pend_q[ld_slot] <= 1'b0;
        sent_q[ld_slot] <= 1'b0;
      end
    end
  end

  // a moved instruction must find room: the re-locator only picks PEs with has_free
  assert property (@(posedge clk) disable iff (!rst_n) ins_valid |-> has_free)
    else $error("contention_tracker: instruction moved into a full PE");
  // a PE never issues more instructions than it has ALUs, and only ready ones
  assert property (@(posedge clk) disable iff (!rst_n) (nfire <= (SLOT_W+1)'(ALUS)) && ((fire & ~rdy) == '0))
    else $error("contention_tracker: illegal issue vector");
  // done refers to the slot that was handed over
  assert property (@(posedge clk) disable iff (!rst_n) done_valid |-> sent_q[done_slot])
    else $error("contention_tracker: done for a slot with no request");

endmodule

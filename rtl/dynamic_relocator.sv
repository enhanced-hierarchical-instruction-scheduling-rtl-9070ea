// dynamic_relocator - per-domain re-locator for contending instructions.
//
// One re-locator serves the NPE processing elements of a domain. An
// instruction whose contention counter reached the threshold is offered by
// its PE's tracker as a request carrying the locations of its producers and
// consumers. Requests from the PEs are served one at a time, in round-robin
// order.
//
// On accepting a request the re-locator also stores the eight per-PE counts
// of instructions that became ready in the previous cycle. It then walks
// the PEs of the domain, one per cycle, starting with the instruction's own
// PE, and computes for each candidate p
//   cost(p) = sum over producers  latency(producer, p)
//           + CONT_WEIGHT * ready count of p
//           + sum over consumers  latency(p, consumer)
// keeping the cheapest. A candidate replaces the running best only if it is
// strictly cheaper and has a free instruction slot, so the instruction stays
// where it is unless some other PE is strictly better.
//
// Timing, in clock edges after the edge that accepts a request: candidates
// are evaluated on edges 1..NPE. If the instruction stays, done (moved = 0)
// is given to its PE in the cycle after edge NPE. If it moves, the move is
// completed in the cycle after edge NPE + RELOC_PENALTY: done (moved = 1)
// goes to the old PE, the record goes to the new PE (ins_valid) and the new
// location is announced on upd_out to all trackers and to the rest of the
// machine. If the chosen PE has meanwhile run out of free slots the
// instruction stays (moved = 0). The next request is accepted one cycle
// after done.
//
// The cost function, the scan over all PEs of the domain, staying on ties,
// the previous-cycle ready counts and the 20-cycle relocation penalty follow
// the scheduling scheme. The one-candidate-per-cycle walk, the round-robin
// order, the unit weight of the contention term and the place of the
// penalty between decision and move are this design's choices.
module dynamic_relocator
  import ehis_pkg::*;
#(
  parameter int unsigned NPE           = PES_PER_DOMAIN,
  parameter int unsigned SLOT_W        = 6,    // log2(instructions per PE)
  parameter int unsigned CONT_WEIGHT   = 1,    // weight of the contention term
  parameter int unsigned RELOC_PENALTY = 20,   // cycles to move and announce
  localparam int unsigned PE_W         = $clog2(NPE)
)(
  input  logic                    clk,
  input  logic                    rst_n,

  // where this domain sits
  input  logic [CL_COORD_W-1:0]   cl_x,
  input  logic [CL_COORD_W-1:0]   cl_y,
  input  logic [1:0]              dom_id,

  // from the PE trackers
  input  logic [SLOT_W:0]         ready_cnt [NPE],
  input  logic [NPE-1:0]          has_free,
  input  logic [NPE-1:0]          req_valid,
  output logic [NPE-1:0]          req_ready,
  input  logic [SLOT_W-1:0]       req_slot  [NPE],
  input  inst_rec_t               req_rec   [NPE],

  // to the PE trackers
  output logic [NPE-1:0]          done_valid,
  output logic [SLOT_W-1:0]       done_slot,
  output logic                    done_moved,
  output logic [NPE-1:0]          ins_valid,
  output inst_rec_t               ins_rec,
  output loc_update_t             upd_out,

  // observation
  output logic                    busy,
  output logic                    dec_valid,   // a decision was taken
  output logic                    dec_moved,
  output logic [PE_W-1:0]         dec_from,
  output logic [PE_W-1:0]         dec_to,
  output logic [COST_W-1:0]       dec_cost
);

  typedef enum logic [2:0] {S_IDLE, S_EVAL, S_STAY, S_PENALTY, S_COMMIT} state_t;

  state_t                 state_q;
  logic [PE_W-1:0]        rr_q;        // round-robin start
  logic [PE_W-1:0]        orig_q;      // requesting PE
  logic [SLOT_W-1:0]      slot_q;
  inst_rec_t              rec_q;
  logic [SLOT_W:0]        cnt_q [NPE]; // stored ready counts
  logic [PE_W-1:0]        step_q;      // candidates evaluated so far
  logic [PE_W-1:0]        best_q;
  logic [COST_W-1:0]      best_cost_q;
  logic [7:0]             pen_q;

  // ---- arbitration -------------------------------------------------------
  logic                   grant_any;
  logic [PE_W-1:0]        grant;

  always_comb begin
    grant_any = 1'b0;
    grant     = '0;
    for (int k = NPE-1; k >= 0; k--) begin
      logic [PE_W-1:0] p;
      p = rr_q + PE_W'(k);
      if (req_valid[p]) begin
        grant_any = 1'b1;
        grant     = p;
      end
    end
    req_ready = '0;
    if (state_q == S_IDLE && grant_any) req_ready[grant] = 1'b1;
  end

  // ---- cost of the current candidate ---------------------------------------
  logic [PE_W-1:0]        cand;
  pe_loc_t                cand_loc;
  logic [LAT_W-1:0]       src_lat [NSRC];
  logic [LAT_W-1:0]       snk_lat [NSNK];
  logic [COST_W-1:0]      cand_cost;

  assign cand = orig_q + step_q;
  always_comb begin
    cand_loc        = '0;
    cand_loc.cx     = cl_x;
    cand_loc.cy     = cl_y;
    cand_loc.domain = dom_id;
    cand_loc.pe     = 3'(cand);
  end

  for (genvar k = 0; k < NSRC; k++) begin : g_src
    net_latency u_lat (.a(rec_q.src[k].loc), .b(cand_loc), .lat(src_lat[k]));
  end
  for (genvar k = 0; k < NSNK; k++) begin : g_snk
    net_latency u_lat (.a(cand_loc), .b(rec_q.snk[k].loc), .lat(snk_lat[k]));
  end

  always_comb begin
    cand_cost = COST_W'(CONT_WEIGHT) * COST_W'(cnt_q[cand]);
    for (int k = 0; k < NSRC; k++)
      if (rec_q.src[k].valid) cand_cost += COST_W'(src_lat[k]);
    for (int k = 0; k < NSNK; k++)
      if (rec_q.snk[k].valid) cand_cost += COST_W'(snk_lat[k]);
  end

  // ---- control --------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      rr_q        <= '0;
      orig_q      <= '0;
      slot_q      <= '0;
      rec_q       <= '0;
      step_q      <= '0;
      best_q      <= '0;
      best_cost_q <= '0;
      pen_q       <= '0;
      for (int p = 0; p < NPE; p++) cnt_q[p] <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (grant_any) begin
          orig_q  <= grant;
          slot_q  <= req_slot[grant];
          rec_q   <= req_rec[grant];
          rr_q    <= grant + 1'b1;
          step_q  <= '0;
          for (int p = 0; p < NPE; p++) cnt_q[p] <= ready_cnt[p];
          state_q <= S_EVAL;
        end
        S_EVAL: begin
          if (step_q == '0 || (cand_cost < best_cost_q && has_free[cand])) begin
            best_q      <= cand;
            best_cost_q <= cand_cost;
          end
          step_q <= step_q + 1'b1;
          if (step_q == PE_W'(NPE-1)) begin
            // the last candidate is folded in here as well
            if (step_q != '0 && cand_cost < best_cost_q && has_free[cand])
              state_q <= S_PENALTY;
            else
              state_q <= (best_q == orig_q) ? S_STAY : S_PENALTY;
            pen_q <= 8'(RELOC_PENALTY > 1 ? RELOC_PENALTY - 1 : 0);
          end
        end
        S_STAY:    state_q <= S_IDLE;
        S_PENALTY: if (pen_q == '0) state_q <= S_COMMIT;
                   else pen_q <= pen_q - 1'b1;
        S_COMMIT:  state_q <= S_IDLE;
        default:   state_q <= S_IDLE;
      endcase
    end
  end

  logic commit_ok;
  assign commit_ok = (state_q == S_COMMIT) && has_free[best_q];

  always_comb begin
    done_valid = '0;
    ins_valid  = '0;
    done_moved = 1'b0;
    done_slot  = slot_q;
    ins_rec    = rec_q;
    upd_out    = '0;
    if (state_q == S_STAY || state_q == S_COMMIT) done_valid[orig_q] = 1'b1;
    if (commit_ok) begin
      done_moved         = 1'b1;
      ins_valid[best_q]  = 1'b1;
      upd_out.valid      = 1'b1;
      upd_out.id         = rec_q.id;
      upd_out.loc.cx     = cl_x;
      upd_out.loc.cy     = cl_y;
      upd_out.loc.domain = dom_id;
      upd_out.loc.pe     = 3'(best_q);
    end
  end

  assign busy      = (state_q != S_IDLE);
  assign dec_valid = (state_q == S_STAY) || (state_q == S_COMMIT);
  assign dec_moved = commit_ok;
  assign dec_from  = orig_q;
  assign dec_to    = commit_ok ? best_q : orig_q;
  assign dec_cost  = best_cost_q;

  // one grant at a time, and only to a requester
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0(req_ready) && ((req_ready & ~req_valid) == '0))
    else $error("dynamic_relocator: bad grant");

endmodule

// dynamic_relocator_tb - checks the per-domain re-locator.
//
// The testbench plays the eight PE trackers. In each trial a random set of
// PEs raises relocation requests for instructions with random producers and
// consumers (half of them inside the domain) while the per-PE ready counts
// and free-slot flags are random. For every request it checks:
//  * the grant follows round-robin order,
//  * the chosen PE is the one of least cost, computed here independently
//    from the latency table (a candidate must be strictly cheaper than the
//    instruction's own PE and have a free slot),
//  * the ready counts used are those of the cycle the request was accepted,
//  * timing: counted in clock edges from the one that accepts the request,
//    done follows edge NPE when the instruction stays and edge
//    NPE + RELOC_PENALTY when it moves,
//  * on a move: done(moved) to the old PE, ins_valid to the new PE with the
//    record, and an announcement of the new location.
// Some trials take the chosen PE's free slot away during the penalty, which
// must turn the move into a stay.
module dynamic_relocator_tb;
  import ehis_pkg::*;

  localparam int NPE = 8, SW = 6, PEN = 20;

  logic clk = 0, rst_n = 0;
  logic [CL_COORD_W-1:0] cl_x = 4'd2, cl_y = 4'd3;
  logic [1:0] dom_id = 2'd1;
  logic [SW:0] ready_cnt [NPE];
  logic [NPE-1:0] has_free, req_valid, req_ready, done_valid, ins_valid;
  logic [SW-1:0] req_slot [NPE];
  inst_rec_t req_rec [NPE];
  logic [SW-1:0] done_slot;
  logic done_moved;
  inst_rec_t ins_rec;
  loc_update_t upd_out;
  logic busy, dec_valid, dec_moved;
  logic [2:0] dec_from, dec_to;
  logic [COST_W-1:0] dec_cost;

  dynamic_relocator #(.NPE(NPE), .SLOT_W(SW), .RELOC_PENALTY(PEN)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_moved = 0, n_stay = 0, n_full_skip = 0, n_late_full = 0, n_multi = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cyc, what);
    end
  endtask

  function automatic int ref_lat(pe_loc_t x, pe_loc_t y);
    int hx, hy;
    if (x.cx != y.cx || x.cy != y.cy) begin
      hx = int'(x.cx) - int'(y.cx); if (hx < 0) hx = -hx;
      hy = int'(x.cy) - int'(y.cy); if (hy < 0) hy = -hy;
      return 7 + hx + hy;
    end
    if (x.domain != y.domain) return 7;
    if (x.pe[2] != y.pe[2]) return 4;
    if (x.pe[1] != y.pe[1]) return 2;
    return (x.pe != y.pe) ? 1 : 0;
  endfunction

  function automatic pe_loc_t here(int p);
    return '{cx: cl_x, cy: cl_y, domain: dom_id, pe: 3'(p)};
  endfunction

  function automatic int ref_cost(inst_rec_t r, int p, int cnt);
    int c = cnt;
    for (int k = 0; k < NSRC; k++) if (r.src[k].valid) c += ref_lat(r.src[k].loc, here(p));
    for (int k = 0; k < NSNK; k++) if (r.snk[k].valid) c += ref_lat(here(p), r.snk[k].loc);
    return c;
  endfunction

  function automatic inst_rec_t rand_rec();
    inst_rec_t r = '0;
    r.id = 16'($urandom);
    for (int k = 0; k < NSRC; k++) begin
      r.src[k].valid = ($urandom_range(0, 3) != 0);
      r.src[k].id = 16'($urandom);
      r.src[k].loc = ($urandom_range(0, 1) == 0) ? here($urandom_range(0, 7)) : pe_loc_t'($urandom);
    end
    for (int k = 0; k < NSNK; k++) begin
      r.snk[k].valid = ($urandom_range(0, 2) != 0);
      r.snk[k].id = 16'($urandom);
      r.snk[k].loc = ($urandom_range(0, 1) == 0) ? here($urandom_range(0, 7)) : pe_loc_t'($urandom);
    end
    return r;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rr = 0;
    req_valid = '0; has_free = '1;
    for (int p = 0; p < NPE; p++) begin ready_cnt[p] = '0; req_slot[p] = '0; req_rec[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int trial = 0; trial < 300; trial++) begin
      logic [NPE-1:0] pending;
      @(negedge clk);
      pending = NPE'($urandom);
      if (pending == '0) pending[$urandom_range(0, NPE-1)] = 1'b1;
      if ($countones(pending) > 1) n_multi++;
      for (int p = 0; p < NPE; p++) begin
        req_rec[p] = rand_rec();
        req_slot[p] = SW'($urandom);
      end
      req_valid = pending;
      while (pending != '0) begin
        int g, orig, best, bc, t0, t_done, cnt_snap [NPE];
        bit late_full, exp_move;
        inst_rec_t r;
        logic [NPE-1:0] free_snap;
        // new random counts and free flags every cycle until a grant is seen
        do begin
          for (int p = 0; p < NPE; p++) ready_cnt[p] = (SW+1)'($urandom_range(0, 12));
          has_free = NPE'($urandom) | NPE'($urandom);
          #1;
          if (req_ready == '0) @(negedge clk);
        end while (req_ready == '0);
        // expected round-robin grant
        g = -1;
        for (int k = 0; k < NPE; k++) if (g < 0 && pending[(rr + k) % NPE]) g = (rr + k) % NPE;
        chk(req_ready[g] && $countones(req_ready) == 1, $sformatf("grant %b exp PE %0d", req_ready, g));
        orig = g;
        for (int p = 0; p < NPE; p++) cnt_snap[p] = int'(ready_cnt[p]);
        free_snap = has_free;
        r = req_rec[g];
        rr = (g + 1) % NPE;
        @(posedge clk);
        #1;
        t0 = cyc;
        pending[g] = 1'b0;
        req_valid = pending;
        // expected choice
        best = orig; bc = ref_cost(r, orig, cnt_snap[orig]);
        for (int k = 1; k < NPE; k++) begin
          int p, c;
          p = (orig + k) % NPE;
          c = ref_cost(r, p, cnt_snap[p]);
          if (c < bc && !free_snap[p]) n_full_skip++;
          if (c < bc && free_snap[p]) begin best = p; bc = c; end
        end
        late_full = (best != orig) && ($urandom_range(0, 9) == 0);
        exp_move = (best != orig) && !late_full;
        // counts change while the re-locator works; the stored ones must be used
        while (done_valid == '0) begin
          @(negedge clk);
          for (int p = 0; p < NPE; p++) ready_cnt[p] = (SW+1)'($urandom_range(0, 12));
          has_free = free_snap;
          if (late_full && cyc - t0 >= NPE) has_free[best] = 1'b0;  // after the decision
          #1;
          if (cyc - t0 > 100) break;
        end
        t_done = cyc;
        chk(done_valid == NPE'(1) << orig, $sformatf("done_valid %b orig %0d", done_valid, orig));
        chk(done_slot == req_slot[orig], "done_slot");
        chk(done_moved == exp_move, $sformatf("moved %0d exp %0d (best %0d orig %0d)", done_moved, exp_move, best, orig));
        chk(dec_valid && int'(dec_from) == orig, "decision report");
        if (best != orig)
          chk(t_done - t0 == NPE + PEN, $sformatf("move latency %0d", t_done - t0));
        else
          chk(t_done - t0 == NPE, $sformatf("stay latency %0d", t_done - t0));
        if (exp_move) begin
          n_moved++;
          chk(ins_valid == NPE'(1) << best, $sformatf("ins_valid %b exp %0d", ins_valid, best));
          chk(ins_rec == r, "ins_rec");
          chk(upd_out.valid && upd_out.id == r.id && upd_out.loc == here(best), "announcement");
          chk(int'(dec_to) == best && int'(dec_cost) == bc, $sformatf("dec_to %0d cost %0d exp %0d/%0d", dec_to, dec_cost, best, bc));
        end else begin
          if (late_full) n_late_full++; else n_stay++;
          chk(ins_valid == '0 && !upd_out.valid, "no move on stay");
        end
        @(negedge clk);
      end
    end
    $display("moved=%0d stayed=%0d full_pe_skipped=%0d full_at_commit=%0d multi_request_trials=%0d",
             n_moved, n_stay, n_full_skip, n_late_full, n_multi);
    chk(n_moved > 0 && n_stay > 0 && n_full_skip > 0 && n_late_full > 0 && n_multi > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

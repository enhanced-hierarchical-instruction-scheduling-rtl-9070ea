// ehis_cluster_tb - end-to-end test of one cluster at its default size
// (4 domains x 8 PEs x 64 instructions, contention threshold 20, relocation
// penalty 20 cycles, 512 instructions per domain).
//
// Dynamic contention tracking:
//  * domain 0: instruction C (PE 0, slot 2) contends for the ALUs every
//    cycle. Its producer is in PE 0, its consumers are Z in PE 6 of the
//    same domain and Y in domain 1. With the ready counts the PEs report,
//    PE 4 would be cheapest, but PE 4 is filled to all 64 slots, so C must
//    move to PE 6 (the next cheapest). Y, in another domain, and Z must
//    learn C's new location from the announcement.
//  * domain 2: instruction D contends, but all its peers are in its own PE,
//    so it must stay.
//  * domain 3: an announcement from outside the cluster must update the
//    consumer entry of instruction W.
// Loop-aware placement, in parallel: a loop that would straddle a domain
// boundary opens a new domain; a loop larger than a domain does not; a full
// domain rolls over; with loop awareness off the same loop is split.
// Each mechanism is counted and a failure is counted for any that never
// happened. Decision cycles are checked against threshold + arbitration +
// 8 candidate cycles (+ 20 penalty cycles for a move).
module ehis_cluster_tb;
  import ehis_pkg::*;

  localparam int ND = 4, NPE = 8, NSLOT = 64, SW = 6, TH = 20, PEN = 20;

  logic clk = 0, rst_n = 0;
  logic [CL_COORD_W-1:0] cl_x = 4'd5, cl_y = 4'd6;
  logic [NPE-1:0] ld_valid [ND];
  logic [SW-1:0] ld_slot [ND][NPE];
  inst_rec_t ld_rec [ND][NPE];
  logic [NSLOT-1:0] rdy [ND][NPE], fire [ND][NPE], new_rdy [ND][NPE];
  logic [NPE-1:0] moved_in_valid [ND], moved_out_valid [ND];
  logic [SW-1:0] moved_in_slot [ND][NPE];
  logic [SW-1:0] moved_out_slot [ND];
  logic [NSLOT-1:0] resident [ND][NPE];
  logic [SW:0] conflicts [ND][NPE];
  loc_update_t upd_ext;
  loc_update_t upd_out [ND];
  logic [ND-1:0] dec_valid, dec_moved, reloc_busy;
  logic [2:0] dec_from [ND], dec_to [ND];
  logic [COST_W-1:0] dec_cost [ND];
  logic loop_aware_en, cg_valid, cg_loop_head, cg_out_valid, cg_new_domain, cg_loop_split_avoided;
  logic [15:0] cg_loop_size, cg_s_curr;
  logic [7:0] cg_domain;

  ehis_cluster dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d %s", cyc, what);
    end
  endtask

  localparam int CNT [NPE] = '{3, 2, 4, 1, 0, 3, 2, 4};
  localparam inst_id_t ID_C = 16'd2, ID_X = 16'd0, ID_Y = 16'd1000, ID_Z = 16'd60,
                       ID_D = 16'd2032, ID_W = 16'd3010, ID_FAR = 16'd9000;

  function automatic pe_loc_t at(int d, int p);
    return '{cx: cl_x, cy: cl_y, domain: 2'(d), pe: 3'(p)};
  endfunction
  function automatic peer_t peer(inst_id_t id, pe_loc_t l);
    return '{valid: 1'b1, id: id, loc: l};
  endfunction
  function automatic int lat(int a, int b);
    if (a == b) return 0;
    if (a / 2 == b / 2) return 1;
    if (a / 4 == b / 4) return 2;
    return 4;
  endfunction

  // ---- mechanism counters --------------------------------------------------
  int n_conflict_cycles = 0, n_requests = 0, n_moves = 0, n_stays = 0;
  int n_cross_domain_upd = 0, n_ext_upd = 0, n_full_skip = 0;
  int n_loop_new = 0, n_loop_big = 0, n_rollover = 0, n_split_baseline = 0;
  bit c_home = 0, d_contend = 0;
  logic [ND-1:0] busy_q = '0;

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < ND; d++) begin
      if (reloc_busy[d] && !busy_q[d]) n_requests++;   // a request was accepted
      if (dec_valid[d] && dec_moved[d]) n_moves++;
      if (dec_valid[d] && !dec_moved[d]) n_stays++;
    end
    if (conflicts[0][0] != 0 || conflicts[2][3] != 0) n_conflict_cycles++;
    if (cg_out_valid && cg_loop_split_avoided) n_loop_new++;
    busy_q <= reloc_busy;
  end

  // PE behaviour: every PE reports CNT[p] newly ready instructions per cycle
  always_comb begin
    for (int d = 0; d < ND; d++)
      for (int p = 0; p < NPE; p++) begin
        new_rdy[d][p] = '0;
        for (int s = 0; s < CNT[p]; s++) new_rdy[d][p][s] = 1'b1;
        rdy[d][p] = '0;
        fire[d][p] = '0;
      end
    if (c_home)    begin rdy[0][0] = 64'h7; fire[0][0] = 64'h3; end
    if (d_contend) begin rdy[2][3] = 64'h7; fire[2][3] = 64'h3; end
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- loop-aware placement stream ---------------------------------------------
  task automatic cg_place(bit head, int size, bit en);
    @(negedge clk);
    loop_aware_en = en; cg_valid = 1; cg_loop_head = head; cg_loop_size = 16'(size);
    @(negedge clk);
    cg_valid = 0;
  endtask

  bit cg_done = 0;
  initial begin : cg_stream
    int dom_before;
    loop_aware_en = 1; cg_valid = 0; cg_loop_head = 0; cg_loop_size = 0;
    wait (rst_n);
    repeat (500) cg_place(0, 0, 1);
    chk(cg_domain == 8'd0 && cg_s_curr == 16'd500, "500 instructions in domain 0");
    cg_place(1, 30, 1);                          // would straddle: new domain
    chk(cg_domain == 8'd1 && cg_new_domain && cg_loop_split_avoided, "loop of 30 opens domain 1");
    repeat (29) cg_place(0, 0, 1);
    chk(cg_domain == 8'd1 && cg_s_curr == 16'd30, "loop kept whole in domain 1");
    cg_place(1, 600, 1);                         // larger than a domain: stays
    chk(cg_domain == 8'd1 && !cg_new_domain, "oversized loop stays in the current domain");
    n_loop_big++;
    repeat (481) cg_place(0, 0, 1);               // domain 1 now holds 512
    chk(cg_s_curr == 16'd512 && cg_domain == 8'd1, "domain 1 full");
    cg_place(0, 0, 1);
    chk(cg_domain == 8'd2 && cg_new_domain && !cg_loop_split_avoided, "full domain rolls over");
    if (cg_domain == 8'd2 && cg_new_domain) n_rollover++;
    repeat (499) cg_place(0, 0, 0);
    dom_before = int'(cg_domain);
    cg_place(1, 30, 0);                          // baseline: the loop is split
    chk(int'(cg_domain) == dom_before && !cg_new_domain, "baseline keeps filling");
    repeat (11) cg_place(0, 0, 0);
    cg_place(0, 0, 0);
    chk(int'(cg_domain) == dom_before + 1, "baseline splits the loop across two domains");
    if (int'(cg_domain) == dom_before + 1) n_split_baseline++;
    cg_done = 1;
  end

  // ---- contention tracking -------------------------------------------------------
  initial begin : reloc
    int t_start, t_c, t_d, best, bc, c, best_any;
    bit seen_c, seen_d;
    upd_ext = '0;
    for (int d = 0; d < ND; d++) begin
      ld_valid[d] = '0;
      for (int p = 0; p < NPE; p++) begin ld_slot[d][p] = '0; ld_rec[d][p] = '0; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // load: four instructions in every PE; PE 4 of domain 0 filled completely
    for (int s = 0; s < NSLOT; s++) begin
      @(negedge clk);
      for (int d = 0; d < ND; d++)
        for (int p = 0; p < NPE; p++) begin
          ld_valid[d][p] = (s < 4) || (d == 0 && p == 4);
          ld_slot[d][p] = SW'(s);
          ld_rec[d][p] = '0;
          ld_rec[d][p].id = 16'(d * 1000 + p * 10 + s);
        end
      if (s == 2) begin
        ld_rec[0][0].src[0] = peer(ID_X, at(0, 0));   // C
        ld_rec[0][0].snk[0] = peer(ID_Z, at(0, 6));
        ld_rec[0][0].snk[1] = peer(ID_Y, at(1, 0));
        ld_rec[2][3].src[0] = peer(16'd2030, at(2, 3)); // D
        ld_rec[2][3].snk[0] = peer(16'd2031, at(2, 3));
      end
      if (s == 0) begin
        ld_rec[1][0].src[0] = peer(ID_C, at(0, 0));   // Y (id 1000)
        ld_rec[0][6].src[0] = peer(ID_C, at(0, 0));   // Z (id 60)
        ld_rec[3][1].snk[0] = peer(ID_FAR, '{cx: 4'd1, cy: 4'd1, domain: 2'd0, pe: 3'd0}); // W
      end
    end
    @(negedge clk);
    for (int d = 0; d < ND; d++) ld_valid[d] = '0;
    chk(resident[0][4] == '1 && resident[0][0] == 64'hF, "instructions loaded");

    // announcement from outside the cluster
    upd_ext = '{valid: 1'b1, id: ID_FAR, loc: '{cx: 4'd2, cy: 4'd9, domain: 2'd3, pe: 3'd5}};
    @(negedge clk);
    upd_ext = '0;
    chk(dut.g_dom[3].u_dom.g_pe[1].u_trk.rec_q[0].snk[0].loc == pe_loc_t'{cx: 4'd2, cy: 4'd9, domain: 2'd3, pe: 3'd5},
        "external announcement updates W");
    if (dut.g_dom[3].u_dom.g_pe[1].u_trk.rec_q[0].snk[0].loc.cy == 4'd9) n_ext_upd++;

    // expected destination of C: cheapest PE with a free slot
    best = 0; best_any = 0;
    bc = CNT[0] + lat(0, 6) + 7;
    for (int k = 1; k < NPE; k++) begin
      c = lat(0, k) + CNT[k] + lat(k, 6) + 7;
      if (c < bc && k == 4) best_any = 4;
      if (c < bc && k != 4) begin best = k; bc = c; end
    end
    chk(best == 6 && best_any == 4, $sformatf("test set-up: best %0d, best ignoring fullness %0d", best, best_any));

    c_home = 1; d_contend = 1;
    t_start = cyc;
    seen_c = 0; seen_d = 0;
    while (!(seen_c && seen_d) && cyc - t_start < 500) begin
      @(negedge clk);
      if (dec_valid[2] && !seen_d) begin
        seen_d = 1; t_d = cyc;
        chk(!dec_moved[2] && dec_from[2] == 3'd3, "D stays in PE 3");
        chk(t_d - t_start == TH + 1 + NPE, $sformatf("D decision after %0d cycles", t_d - t_start));
        d_contend = 0;
      end
      if (dec_valid[0] && !seen_c) begin
        seen_c = 1; t_c = cyc;
        chk(dec_moved[0] && int'(dec_to[0]) == best && int'(dec_cost[0]) == bc,
            $sformatf("C moved to PE %0d cost %0d (exp %0d/%0d)", dec_to[0], dec_cost[0], best, bc));
        if (dec_moved[0] && int'(dec_to[0]) == 6) n_full_skip++;
        chk(t_c - t_start == TH + 1 + NPE + PEN, $sformatf("C move after %0d cycles", t_c - t_start));
        chk(moved_out_valid[0] == 8'h01 && moved_out_slot[0] == 6'd2, "C leaves PE 0 slot 2");
        chk(moved_in_valid[0] == 8'h40 && moved_in_slot[0][6] == 6'd4, "C enters PE 6 slot 4");
        chk(upd_out[0].valid && upd_out[0].id == ID_C && upd_out[0].loc == at(0, 6), "announcement of C");
        c_home = 0;
      end
    end
    chk(seen_c && seen_d, "both decisions seen");
    @(negedge clk);
    chk(dut.g_dom[1].u_dom.g_pe[0].u_trk.rec_q[0].src[0].loc == at(0, 6), "Y (domain 1) learnt C's location");
    if (dut.g_dom[1].u_dom.g_pe[0].u_trk.rec_q[0].src[0].loc == at(0, 6)) n_cross_domain_upd++;
    chk(dut.g_dom[0].u_dom.g_pe[6].u_trk.rec_q[0].src[0].loc == at(0, 6), "Z learnt C's location");
    chk(resident[0][0] == 64'hB && resident[0][6] == 64'h1F, "residency after the move");

    wait (cg_done);
    repeat (2) @(negedge clk);
    $display("conflict_cycles=%0d requests=%0d moves=%0d stays=%0d full_pe_skipped=%0d cross_domain_updates=%0d external_updates=%0d",
             n_conflict_cycles, n_requests, n_moves, n_stays, n_full_skip, n_cross_domain_upd, n_ext_upd);
    $display("loop_new_domain=%0d loop_too_big=%0d domain_rollover=%0d baseline_split=%0d",
             n_loop_new, n_loop_big, n_rollover, n_split_baseline);
    chk(n_conflict_cycles > 0, "contention happened");
    chk(n_requests == 2, "two threshold requests");
    chk(n_moves == 1 && n_stays == 1, "one move and one stay");
    chk(n_full_skip == 1, "full PE skipped");
    chk(n_cross_domain_upd == 1 && n_ext_upd == 1, "announcements");
    chk(n_loop_new == 1 && n_loop_big == 1 && n_rollover == 1 && n_split_baseline == 1, "loop placement cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// relocation_domain_tb - one domain: eight trackers and the re-locator.
//
// Every PE gets four instructions. PE p reports a fixed number of newly
// ready instructions each cycle (its contention cost). Two PEs then suffer
// ALU contention: in PE 0 three instructions are ready and two issue, so
// instruction C (slot 2) contends every cycle; in PE 3 likewise for
// instruction D (slot 2). Both reach the threshold in the same cycle, so
// both request relocation and the re-locator serves PE 0 first.
//  * C has its producer in PE 0 and its consumer (instruction Y) in PE 5;
//    the testbench computes the cheapest PE from the latency table and the
//    ready counts and expects C to move there, at the expected cycle, and
//    Y's producer entry to take C's new location.
//  * D has all its producers and consumers in PE 3, so staying is cheapest:
//    D must stay, its counter must restart, and it must request again
//    after another THRESHOLD contended cycles.
module relocation_domain_tb;
  import ehis_pkg::*;

  localparam int NPE = 8, NSLOT = 8, SW = 3, TH = 4, PEN = 20;

  logic clk = 0, rst_n = 0;
  logic [CL_COORD_W-1:0] cl_x = 4'd1, cl_y = 4'd1;
  logic [1:0] dom_id = 2'd2;
  logic [NPE-1:0] ld_valid;
  logic [SW-1:0] ld_slot [NPE];
  inst_rec_t ld_rec [NPE];
  logic [NSLOT-1:0] rdy [NPE], fire [NPE], new_rdy [NPE];
  logic [NPE-1:0] moved_in_valid, moved_out_valid;
  logic [SW-1:0] moved_in_slot [NPE];
  logic [SW-1:0] moved_out_slot;
  logic [NSLOT-1:0] resident [NPE];
  logic [SW:0] conflicts [NPE];
  loc_update_t [0:0] upd_in;
  loc_update_t upd_out;
  logic busy, dec_valid, dec_moved;
  logic [2:0] dec_from, dec_to;
  logic [COST_W-1:0] dec_cost;

  relocation_domain #(.NPE(NPE), .NSLOT(NSLOT), .THRESHOLD(TH), .RELOC_PENALTY(PEN), .NUPD(1)) dut (
    .clk, .rst_n, .cl_x, .cl_y, .dom_id, .ld_valid, .ld_slot, .ld_rec, .rdy, .fire, .new_rdy,
    .moved_in_valid, .moved_in_slot, .moved_out_valid, .moved_out_slot, .resident, .conflicts,
    .upd_in, .upd_out, .busy, .dec_valid, .dec_moved, .dec_from, .dec_to, .dec_cost);

  assign upd_in[0] = upd_out;   // the domain hears its own announcements

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
  localparam inst_id_t ID_C = 16'd502, ID_D = 16'd532, ID_Y = 16'd550, ID_X = 16'd500;

  function automatic pe_loc_t here(int p);
    return '{cx: cl_x, cy: cl_y, domain: dom_id, pe: 3'(p)};
  endfunction
  function automatic int lat(int a, int b);
    if (a == b) return 0;
    if (a / 2 == b / 2) return 1;
    if (a / 4 == b / 4) return 2;
    return 4;
  endfunction

  function automatic peer_t peer(inst_id_t id, int p);
    return '{valid: 1'b1, id: id, loc: here(p)};
  endfunction

  bit c_home = 1, d_contend = 1;
  int n_contend_cycles = 0, n_moves = 0, n_stays = 0, n_upd = 0, n_requests = 0, n_moved_out = 0;

  // PE behaviour: fixed ready counts, contention in PE 0 and PE 3
  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      new_rdy[p] = '0;
      for (int s = 0; s < CNT[p]; s++) new_rdy[p][s] = 1'b1;
      rdy[p] = '0;
      fire[p] = '0;
    end
    if (c_home) begin rdy[0] = 8'b0000_0111; fire[0] = 8'b0000_0011; end
    if (d_contend) begin rdy[3] = 8'b0000_0111; fire[3] = 8'b0000_0011; end
  end

  always @(posedge clk) if (rst_n) begin
    if (upd_out.valid) n_upd++;
    if (moved_out_valid != '0) n_moved_out++;
    if (dut.u_reloc.req_ready != '0) n_requests++;
    if (conflicts[0] != 0 || conflicts[3] != 0) n_contend_cycles++;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, bc, t_start, t_move, t_stay1, t_stay2, c;
    c_home = 0; d_contend = 0;
    ld_valid = '0;
    for (int p = 0; p < NPE; p++) begin ld_slot[p] = '0; ld_rec[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // load four instructions into every PE
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      for (int p = 0; p < NPE; p++) begin
        ld_valid[p] = 1'b1;
        ld_slot[p] = SW'(s);
        ld_rec[p] = '0;
        ld_rec[p].id = 16'(500 + p * 10 + s);
      end
      if (s == 2) begin
        ld_rec[0].src[0] = peer(ID_X, 0);          // C: producer X in PE 0
        ld_rec[0].snk[0] = peer(ID_Y, 5);          //    consumer Y in PE 5
        ld_rec[3].src[0] = peer(16'd530, 3);       // D: everything in PE 3
        ld_rec[3].src[1] = peer(16'd531, 3);
        for (int k = 0; k < NSNK; k++) ld_rec[3].snk[k] = peer(16'(533 + k), 3);
      end
      if (s == 0) ld_rec[5].src[0] = peer(ID_C, 0); // Y: producer C in PE 0
    end
    @(negedge clk);
    ld_valid = '0;
    repeat (3) @(negedge clk);

    // expected destination of C
    best = 0; bc = lat(0, 0) + CNT[0] + lat(0, 5);
    for (int k = 1; k < NPE; k++) begin
      c = lat(0, k) + CNT[k] + lat(k, 5);
      if (c < bc) begin best = k; bc = c; end
    end
    $display("C: expected destination PE %0d cost %0d", best, bc);

    // start contention
    c_home = 1; d_contend = 1;
    t_start = cyc;
    while (!(moved_out_valid[0])) begin
      @(negedge clk);
      if (cyc - t_start > 200) break;
    end
    t_move = cyc;
    chk(t_move - t_start == TH + 1 + NPE + PEN, $sformatf("C moved after %0d cycles", t_move - t_start));
    chk(moved_out_slot == 3'd2 && dec_moved && int'(dec_to) == best && int'(dec_cost) == bc,
        $sformatf("C moved to %0d cost %0d", dec_to, dec_cost));
    chk(moved_in_valid == NPE'(1) << best && moved_in_slot[best] == 3'd4, "C inserted into slot 4 of the new PE");
    chk(upd_out.valid && upd_out.id == ID_C && upd_out.loc == here(best), "announcement of C");
    n_moves++;
    @(negedge clk);
    c_home = 0;   // C no longer lives in PE 0
    chk(resident[0] == 8'b0000_1011 && resident[best][4], "residency after the move");
    chk(dut.g_pe[5].u_trk.rec_q[0].src[0].loc == here(best), "Y learnt C's new location");
    chk(best == 4 && dut.g_pe[4].u_trk.rec_q[4].id == ID_C, "C's record in its new PE (4)");

    // D was queued behind C and must stay
    while (!dec_valid) @(negedge clk);
    t_stay1 = cyc;
    chk(t_stay1 - t_move == 2 + NPE, $sformatf("D decided %0d cycles after C", t_stay1 - t_move));
    chk(!dec_moved && dec_from == 3'd3 && dec_to == 3'd3 && int'(dec_cost) == CNT[3], "D stays");
    n_stays++;
    @(negedge clk);
    // D keeps contending and asks again after another TH cycles
    while (!dec_valid) begin
      @(negedge clk);
      if (cyc - t_stay1 > 200) break;
    end
    t_stay2 = cyc;
    chk(t_stay2 - t_stay1 == TH + 2 + NPE, $sformatf("D second decision after %0d cycles", t_stay2 - t_stay1));
    chk(!dec_moved, "D stays again");
    n_stays++;
    d_contend = 0;
    repeat (3) @(negedge clk);

    $display("contended_cycles=%0d requests=%0d moves=%0d stays=%0d announcements=%0d",
             n_contend_cycles, n_requests, n_moves, n_stays, n_upd);
    chk(n_contend_cycles > 0 && n_requests >= 3 && n_moves == 1 && n_stays == 2 && n_upd == 1 && n_moved_out == 1, "mechanism counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

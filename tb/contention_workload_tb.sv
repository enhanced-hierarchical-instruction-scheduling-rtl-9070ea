// contention_workload_tb - ALU conflicts of one domain with and without
// dynamic contention tracking.
//
// Two relocation_domain instances at the default size (8 PEs x 64 slots,
// 2 ALUs, threshold 20, penalty 20) run the same synthetic workload. The
// PEs are modelled here: instruction k receives a new operand set every
// PERIOD[k] cycles (phase k), is ready until issued, and each PE issues the
// two lowest-numbered ready slots per cycle. The initial placement is
// deliberately unbalanced: PE 0 holds 12 frequently firing instructions,
// the other PEs hold a few rarely firing ones. Instance A has the normal
// threshold of 20; instance B's threshold is never reached, which is the
// static placement. A moved instruction keeps its pending operands and
// firing pattern in the model. The instructions are given no producers or
// consumers, so the relocation cost is the contention term alone and the
// test isolates the contention mechanism.
// Checks: every move leaves one PE and enters another in the same cycle;
// instance A relocates at least once; A has fewer ALU conflicts than B.
module contention_workload_tb;
  import ehis_pkg::*;

  localparam int NPE = 8, NSLOT = 64, SW = 6, CYCLES = 6000, NI = 40;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cyc, what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // workload: instruction k, period and initial PE
  int period [NI], home [NI];
  initial begin
    for (int k = 0; k < NI; k++) begin
      if (k < 12) begin period[k] = 3 + (k % 3); home[k] = 0; end
      else begin period[k] = 9 + (k % 5); home[k] = 1 + (k % 7); end
    end
  end

  // one instance of the domain with its PE model
  logic [NPE-1:0] ld_valid;
  logic [SW-1:0]  ld_slot [NPE];
  inst_rec_t      ld_rec  [NPE];
  int             conf_tot [2], moves [2];

  for (genvar g = 0; g < 2; g++) begin : g_inst
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

    relocation_domain #(.THRESHOLD(g == 0 ? 20 : 1000000)) u_dom (
      .clk, .rst_n, .cl_x(4'd0), .cl_y(4'd0), .dom_id(2'd0), .ld_valid, .ld_slot, .ld_rec,
      .rdy, .fire, .new_rdy, .moved_in_valid, .moved_in_slot, .moved_out_valid, .moved_out_slot,
      .resident, .conflicts, .upd_in, .upd_out, .busy, .dec_valid, .dec_moved, .dec_from,
      .dec_to, .dec_cost);
    assign upd_in[0] = upd_out;

    // PE model state: which instruction sits in each slot, pending operands
    int  slot_of_pe [NPE][NSLOT];
    bit  pend [NI];
    bit  fresh [NI];

    always_comb begin
      for (int p = 0; p < NPE; p++) begin
        int nf;
        rdy[p] = '0; fire[p] = '0; new_rdy[p] = '0;
        nf = 0;
        for (int s = 0; s < NSLOT; s++) begin
          int k;
          k = slot_of_pe[p][s];
          if (k >= 0) begin
            rdy[p][s] = pend[k];
            new_rdy[p][s] = fresh[k];
            if (pend[k] && nf < 2) begin fire[p][s] = 1'b1; nf++; end
          end
        end
      end
    end

    initial begin
      for (int p = 0; p < NPE; p++) for (int s = 0; s < NSLOT; s++) slot_of_pe[p][s] = -1;
      for (int k = 0; k < NI; k++) begin pend[k] = 0; fresh[k] = 0; end
      conf_tot[g] = 0; moves[g] = 0;
    end

    // model update on the clock edge, from the values of the ending cycle
    always @(posedge clk) if (rst_n) begin
      int leaving;
      int sl [NPE][NSLOT];
      bit pn [NI], fr [NI];
      sl = slot_of_pe; pn = pend;
      leaving = -1;
      for (int p = 0; p < NPE; p++) conf_tot[g] += int'(conflicts[p]);
      for (int p = 0; p < NPE; p++)
        for (int s = 0; s < NSLOT; s++)
          if (fire[p][s]) pn[sl[p][s]] = 0;
      for (int p = 0; p < NPE; p++)
        if (moved_out_valid[p]) begin
          leaving = sl[p][moved_out_slot];
          sl[p][moved_out_slot] = -1;
        end
      chk((leaving >= 0) == (moved_in_valid != '0), "move out and move in together");
      for (int p = 0; p < NPE; p++)
        if (moved_in_valid[p] && leaving >= 0) begin
          sl[p][moved_in_slot[p]] = leaving;
          moves[g]++;
        end
      for (int k = 0; k < NI; k++) begin
        fr[k] = ((cyc + 1) % period[k] == k % period[k]) && !pn[k];
        if (fr[k]) pn[k] = 1;
      end
      slot_of_pe <= sl;
      pend <= pn;
      fresh <= fr;
    end
  end

  initial begin
    ld_valid = '0;
    for (int p = 0; p < NPE; p++) begin ld_slot[p] = '0; ld_rec[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load the initial placement, one instruction per cycle
    for (int k = 0; k < NI; k++) begin
      int s;
      s = 0;
      for (int j = 0; j < k; j++) if (home[j] == home[k]) s++;
      @(negedge clk);
      ld_valid = '0;
      ld_valid[home[k]] = 1'b1;
      ld_slot[home[k]] = SW'(s);
      ld_rec[home[k]] = '0;
      ld_rec[home[k]].id = 16'(k);
      g_inst[0].slot_of_pe[home[k]][s] = k;
      g_inst[1].slot_of_pe[home[k]][s] = k;
    end
    @(negedge clk);
    ld_valid = '0;
    conf_tot[0] = 0; conf_tot[1] = 0;
    repeat (CYCLES) @(negedge clk);
    $display("ALU conflicts over %0d cycles: with tracking %0d (%0d moves), static placement %0d",
             CYCLES, conf_tot[0], moves[0], conf_tot[1]);
    chk(moves[0] > 0, "instructions were relocated");
    chk(moves[1] == 0, "no relocation without reaching the threshold");
    chk(conf_tot[1] > 0 && conf_tot[0] < conf_tot[1], "contention tracking reduces ALU conflicts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

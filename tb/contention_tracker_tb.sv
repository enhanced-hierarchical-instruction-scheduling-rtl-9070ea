// contention_tracker_tb - random test of one PE's contention tracker against
// a cycle-accurate reference model kept in the testbench.
//
// The testbench plays both neighbours of the tracker: the PE (random ready
// and issue vectors with at most ALUS issues, instruction loads into empty
// slots) and the re-locator (accepts requests at random, answers later
// with done, moved or not, inserts moved-in instructions, and broadcasts
// location announcements for a small set of instruction numbers so that
// producer/consumer entries match). Every cycle it compares the request
// (valid, slot, record), the conflict count, the previous-cycle ready count,
// has_free, the moved-in slot and the resident mask with the model; at the
// end it compares every stored record.
module contention_tracker_tb;
  import ehis_pkg::*;

  localparam int NSLOT = 8, ALUS = 2, TH = 5, NUPD = 2, SW = 3;

  logic clk = 0, rst_n = 0;
  logic ld_valid; logic [SW-1:0] ld_slot; inst_rec_t ld_rec;
  logic [NSLOT-1:0] rdy, fire, new_rdy;
  logic [SW:0] ready_cnt, conflicts;
  logic has_free, req_valid, req_ready;
  logic [SW-1:0] req_slot;
  inst_rec_t req_rec;
  logic done_valid, done_moved; logic [SW-1:0] done_slot;
  logic ins_valid; inst_rec_t ins_rec;
  logic moved_in_valid; logic [SW-1:0] moved_in_slot;
  loc_update_t [NUPD-1:0] upd;
  logic [NSLOT-1:0] resident;

  contention_tracker #(.NSLOT(NSLOT), .ALUS(ALUS), .THRESHOLD(TH), .NUPD(NUPD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_req = 0, n_moved = 0, n_stay = 0, n_ins = 0, n_upd_hit = 0, n_conf = 0;

  // reference model
  inst_rec_t m_rec [NSLOT];
  int        m_cnt [NSLOT];
  bit        m_res [NSLOT], m_pend [NSLOT], m_sent [NSLOT];
  int        m_rcnt;
  int        handed [$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  function automatic inst_rec_t rand_rec();
    inst_rec_t r;
    r = '0;
    r.id = 16'($urandom_range(0, 15));
    for (int k = 0; k < NSRC; k++) begin
      r.src[k].valid = 1'($urandom);
      r.src[k].id    = 16'($urandom_range(0, 15));
      r.src[k].loc   = pe_loc_t'($urandom);
    end
    for (int k = 0; k < NSNK; k++) begin
      r.snk[k].valid = 1'($urandom);
      r.snk[k].id    = 16'($urandom_range(0, 15));
      r.snk[k].loc   = pe_loc_t'($urandom);
    end
    return r;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_valid = 0; ld_slot = 0; ld_rec = '0; rdy = 0; fire = 0; new_rdy = 0;
    req_ready = 0; done_valid = 0; done_moved = 0; done_slot = 0;
    ins_valid = 0; ins_rec = '0; upd = '0;
    for (int s = 0; s < NSLOT; s++) begin
      m_rec[s] = '0; m_cnt[s] = 0; m_res[s] = 0; m_pend[s] = 0; m_sent[s] = 0;
    end
    m_rcnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int cyc = 0; cyc < 6000; cyc++) begin
      int nf, nnew, nconf, exp_slot, free_s;
      bit exp_valid, exp_free;
      bit ld_mask [NSLOT];
      @(negedge clk);
      // ---- drive ------------------------------------------------------------
      ld_valid = 0;
      if ($urandom_range(0, 9) == 0) begin
        int s;
        s = $urandom_range(0, NSLOT-1);
        if (!m_res[s]) begin ld_valid = 1; ld_slot = SW'(s); ld_rec = rand_rec(); end
      end
      rdy = NSLOT'($urandom) | NSLOT'($urandom);
      new_rdy = NSLOT'($urandom);
      fire = '0;
      nf = 0;
      for (int s = 0; s < NSLOT; s++)
        if (rdy[s] && nf < ALUS && $urandom_range(0, 2) == 0) begin fire[s] = 1; nf++; end
      req_ready = ($urandom_range(0, 2) == 0);
      done_valid = 0; done_moved = 0;
      if (handed.size() > 0 && $urandom_range(0, 3) == 0) begin
        done_valid = 1; done_slot = SW'(handed.pop_front()); done_moved = 1'($urandom);
        if (!m_sent[done_slot]) done_valid = 0;  // model and tracker disagree
      end
      ins_valid = 0;
      for (int u = 0; u < NUPD; u++) begin
        upd[u] = '0;
        if ($urandom_range(0, 3) == 0) begin
          upd[u].valid = 1; upd[u].id = 16'($urandom_range(0, 15)); upd[u].loc = pe_loc_t'($urandom);
        end
      end
      // ---- model outputs ----------------------------------------------------
      for (int s = 0; s < NSLOT; s++) ld_mask[s] = ld_valid && (int'(ld_slot) == s);
      exp_free = 0; free_s = 0;
      for (int s = NSLOT-1; s >= 0; s--) if (!m_res[s] && !ld_mask[s]) begin exp_free = 1; free_s = s; end
      if (exp_free && $urandom_range(0, 5) == 0) begin ins_valid = 1; ins_rec = rand_rec(); end
      exp_valid = 0; exp_slot = 0;
      for (int s = NSLOT-1; s >= 0; s--) if (m_pend[s] && !m_sent[s]) begin exp_valid = 1; exp_slot = s; end
      nconf = 0; nnew = 0;
      for (int s = 0; s < NSLOT; s++) begin
        if (nf >= ALUS && m_res[s] && rdy[s] && !fire[s]) nconf++;
        if (m_res[s] && new_rdy[s]) nnew++;
      end
      #1;
      chk(req_valid == exp_valid, $sformatf("req_valid %0d exp %0d", req_valid, exp_valid));
      if (exp_valid) begin
        chk(int'(req_slot) == exp_slot, $sformatf("req_slot %0d exp %0d", req_slot, exp_slot));
        chk(req_rec == m_rec[exp_slot], "req_rec");
      end
      chk(int'(conflicts) == nconf, $sformatf("conflicts %0d exp %0d", conflicts, nconf));
      chk(int'(ready_cnt) == m_rcnt, $sformatf("ready_cnt %0d exp %0d", ready_cnt, m_rcnt));
      chk(has_free == exp_free, "has_free");
      if (ins_valid) chk(moved_in_valid && int'(moved_in_slot) == free_s, "moved_in_slot");
      for (int s = 0; s < NSLOT; s++) chk(resident[s] == m_res[s], $sformatf("resident[%0d]", s));
      n_conf += nconf;
      // ---- model next state (mirrors the clock edge) --------------------------
      m_rcnt = nnew;
      for (int s = 0; s < NSLOT; s++)
        for (int u = 0; u < NUPD; u++)
          if (upd[u].valid) begin
            for (int k = 0; k < NSRC; k++)
              if (m_rec[s].src[k].valid && m_rec[s].src[k].id == upd[u].id) begin
                m_rec[s].src[k].loc = upd[u].loc; if (m_res[s]) n_upd_hit++;
              end
            for (int k = 0; k < NSNK; k++)
              if (m_rec[s].snk[k].valid && m_rec[s].snk[k].id == upd[u].id) begin
                m_rec[s].snk[k].loc = upd[u].loc; if (m_res[s]) n_upd_hit++;
              end
          end
      for (int s = 0; s < NSLOT; s++)
        if (nf >= ALUS && m_res[s] && rdy[s] && !fire[s] && !m_pend[s]) begin
          m_cnt[s]++;
          if (m_cnt[s] == TH) m_pend[s] = 1;
        end
      if (exp_valid && req_ready) begin m_sent[exp_slot] = 1; n_req++; end
      // answer what the tracker actually handed over
      if (req_valid && req_ready) handed.push_back(int'(req_slot));
      if (done_valid) begin
        m_cnt[done_slot] = 0; m_pend[done_slot] = 0; m_sent[done_slot] = 0;
        if (done_moved) begin m_res[done_slot] = 0; n_moved++; end else n_stay++;
      end
      if (ins_valid) begin m_rec[free_s] = ins_rec; m_res[free_s] = 1; m_cnt[free_s] = 0; n_ins++; end
      if (ld_valid) begin
        m_rec[ld_slot] = ld_rec; m_res[ld_slot] = 1; m_cnt[ld_slot] = 0;
        m_pend[ld_slot] = 0; m_sent[ld_slot] = 0;
      end
    end
    @(negedge clk);
    for (int s = 0; s < NSLOT; s++)
      if (m_res[s]) chk(dut.rec_q[s] == m_rec[s], $sformatf("stored record %0d", s));
    $display("requests=%0d moved=%0d stayed=%0d inserted=%0d loc_updates=%0d conflicts=%0d",
             n_req, n_moved, n_stay, n_ins, n_upd_hit, n_conf);
    chk(n_req > 10 && n_moved > 0 && n_stay > 0 && n_ins > 0 && n_upd_hit > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

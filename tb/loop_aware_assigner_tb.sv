// loop_aware_assigner_tb - checks loop-aware coarse-grain domain assignment.
//
// A directed part places 500 straight-line instructions and then a 30
// instruction loop, which must start a new domain with loop awareness on
// and be split across two domains with it off. A random part streams
// instructions (with gaps) in which loop heads of random size appear; each
// assignment is compared with a reference model of the rule:
//   new domain if the domain is full, or (loop awareness on) the loop head
//   has S_max - S_curr < S_loop <= S_max.
// The testbench counts loops that fitted, loops moved to a fresh domain,
// loops larger than a domain, and full-domain rollovers, and fails if any
// of them never happened.
module loop_aware_assigner_tb;

  localparam int SMAX = 512;

  logic clk = 0, rst_n = 0;
  logic loop_aware_en, in_valid, in_loop_head;
  logic [15:0] in_loop_size;
  logic out_valid, out_new_domain, out_loop_split_avoided;
  logic [7:0] out_domain;
  logic [15:0] s_curr;

  loop_aware_assigner #(.S_MAX(SMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fit = 0, n_moved = 0, n_big = 0, n_full = 0;
  int m_dom, m_cur;
  bit m_started;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // drive one instruction and check the result one cycle later
  task automatic place(bit head, int size, bit en);
    bit full, move, open_new;
    @(negedge clk);
    loop_aware_en = en; in_valid = 1; in_loop_head = head; in_loop_size = 16'(size);
    full = (m_cur >= SMAX);
    move = en && head && m_cur != 0 && size > SMAX - m_cur && size <= SMAX;
    open_new = m_started && (full || move);
    if (head && en) begin
      if (size > SMAX) n_big++;
      else if (move) n_moved++;
      else n_fit++;
    end
    if (open_new && full) n_full++;
    if (open_new) begin m_dom = (m_dom + 1) % 256; m_cur = 1; end else m_cur++;
    m_started = 1;
    @(negedge clk);
    in_valid = 0;
    chk(out_valid, "out_valid");
    chk(int'(out_domain) == m_dom, $sformatf("domain %0d exp %0d", out_domain, m_dom));
    chk(out_new_domain == open_new, "new_domain flag");
    chk(out_loop_split_avoided == (open_new && move && !full), "split-avoided flag");
    chk(int'(s_curr) == m_cur, $sformatf("s_curr %0d exp %0d", s_curr, m_cur));
  endtask

  task automatic restart();
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    m_dom = 0; m_cur = 0; m_started = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_dom, loop_doms [$];
    loop_aware_en = 1; in_valid = 0; in_loop_head = 0; in_loop_size = 0;
    m_dom = 0; m_cur = 0; m_started = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // directed: loop of 30 after 500 instructions, with and without awareness
    for (int en = 1; en >= 0; en--) begin
      restart();
      repeat (500) place(0, 0, en[0]);
      place(1, 30, en[0]);
      first_dom = int'(out_domain);
      repeat (29) place(0, 0, en[0]);
      if (en) chk(first_dom == 1 && out_domain == 1, "aware: loop kept whole in domain 1");
      else    chk(first_dom == 0 && out_domain == 1, "baseline: loop split across domains 0 and 1");
    end

    // random streams
    restart();
    for (int n = 0; n < 20000; n++) begin
      int r, sz;
      r = $urandom_range(0, 99);
      sz = (r < 3) ? $urandom_range(513, 900) : $urandom_range(2, 512);
      if (r < 8) place(1, sz, (n % 5000) < 4000);
      else place(0, 0, (n % 5000) < 4000);
      if ($urandom_range(0, 7) == 0) @(negedge clk);
    end
    $display("loops_fit=%0d loops_new_domain=%0d loops_too_big=%0d full_rollovers=%0d",
             n_fit, n_moved, n_big, n_full);
    chk(n_fit > 0 && n_moved > 0 && n_big > 0 && n_full > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

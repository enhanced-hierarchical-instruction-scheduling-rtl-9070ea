// eembc_placement_tb - coarse-grain placement of programs of the sizes of
// the ten EEMBC kernels used to evaluate the scheme (static instruction
// counts 11856 ... 21412).
//
// The loop structure of the real programs is not available, so each
// program is generated: straight-line runs of 20..300 instructions
// alternate with loops of 8..700 instructions (some larger than a domain),
// from a fixed seed per program. Every program is streamed through the
// loop-aware assigner twice, with loop awareness on and off, and every
// assignment is compared with a reference model. For each program the
// testbench reports the domains used and the number of loops that end up
// split over two domains; with loop awareness on, only loops larger than a
// domain may be split, and the domain count may not exceed the sequential
// fill by more than the number of loops moved.
module eembc_placement_tb;

  localparam int SMAX = 512;
  localparam int NPROG = 10;
  localparam int SIZES [NPROG] = '{15903, 15498, 14774, 14194, 11856, 16208, 21412, 14677, 15278, 17437};

  logic clk = 0, rst_n = 0;
  logic loop_aware_en, in_valid, in_loop_head;
  logic [15:0] in_loop_size;
  logic out_valid, out_new_domain, out_loop_split_avoided;
  logic [7:0] out_domain;
  logic [15:0] s_curr;

  loop_aware_assigner #(.S_MAX(SMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_dom, m_cur;
  bit m_started;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // streams one instruction per cycle; result checked on the next negedge
  task automatic run_program(int n, int seed, bit en, output int domains, output int split_small,
                             output int split_big, output int moved);
    int placed, run_left, loop_left, loop_size, loop_first_dom, dummy;
    bit in_loop, pend_chk;
    bit exp_new, exp_avoid;
    int exp_dom, exp_cur;
    domains = 0; split_small = 0; split_big = 0; moved = 0;
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    m_dom = 0; m_cur = 0; m_started = 0;
    dummy = $urandom(seed);
    placed = 0; in_loop = 0; loop_left = 0; run_left = $urandom_range(20, 300);
    pend_chk = 0;
    loop_aware_en = en;
    while (placed < n || pend_chk) begin
      bit head, full, move, open_new;
      int size;
      // check the previous instruction
      if (pend_chk) begin
        chk(out_valid && int'(out_domain) == exp_dom && out_new_domain == exp_new &&
            out_loop_split_avoided == exp_avoid && int'(s_curr) == exp_cur,
            $sformatf("prog size %0d instr %0d: dom %0d exp %0d", n, placed, out_domain, exp_dom));
        pend_chk = 0;
      end
      if (placed == n) break;
      // next instruction of the generated program
      head = 0; size = 0;
      if (!in_loop && run_left == 0) begin
        in_loop = 1;
        loop_size = ($urandom_range(0, 19) == 0) ? $urandom_range(513, 700) : $urandom_range(8, 480);
        if (loop_size > n - placed) loop_size = n - placed;
        loop_left = loop_size;
        head = 1; size = loop_size;
      end
      full = (m_cur >= SMAX);
      move = en && head && m_cur != 0 && size > SMAX - m_cur && size <= SMAX;
      open_new = m_started && (full || move);
      if (open_new) begin m_dom++; m_cur = 1; end else m_cur++;
      m_started = 1;
      if (move && !full) moved++;
      exp_dom = m_dom; exp_cur = m_cur; exp_new = open_new; exp_avoid = open_new && move && !full;
      if (head) loop_first_dom = m_dom;
      in_valid = 1; in_loop_head = head; in_loop_size = 16'(size);
      placed++;
      if (in_loop) begin
        loop_left--;
        if (loop_left == 0) begin
          in_loop = 0;
          run_left = $urandom_range(20, 300);
          if (m_dom != loop_first_dom) begin
            if (loop_size > SMAX) split_big++; else split_small++;
          end
        end
      end else run_left--;
      @(negedge clk);
      in_valid = 0;
      pend_chk = 1;
    end
    domains = m_dom + 1;
  endtask

  initial begin
    int d_on, d_off, ss_on, sb_on, ss_off, sb_off, mv_on, mv_off, tot_small_off = 0;
    in_valid = 0; in_loop_head = 0; in_loop_size = 0; loop_aware_en = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPROG; p++) begin
      run_program(SIZES[p], 1000 + p, 1'b1, d_on, ss_on, sb_on, mv_on);
      run_program(SIZES[p], 1000 + p, 1'b0, d_off, ss_off, sb_off, mv_off);
      $display("program %0d (%0d instructions): loop-aware %0d domains, %0d small loops split, %0d loops moved; sequential %0d domains, %0d small loops split",
               p, SIZES[p], d_on, ss_on, mv_on, d_off, ss_off);
      chk(ss_on == 0, "loop-aware placement splits no loop that fits a domain");
      chk(d_off == (SIZES[p] + SMAX - 1) / SMAX, "sequential fill uses ceil(N/512) domains");
      chk(d_on >= d_off && d_on <= d_off + mv_on, "domain count bounded by moved loops");
      chk(d_on < 256, "domain numbers do not wrap");
      tot_small_off += ss_off;
    end
    chk(tot_small_off > 0, "sequential fill does split loops (the case the scheme addresses)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

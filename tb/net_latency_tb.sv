// net_latency_tb - checks the operand network latency of every pair of PEs
// within a cluster (all domains) and of random pairs across clusters,
// against a reference written from the latency table with arithmetic on
// PE numbers (pod = pe / 2, half-domain = pe / 4).
module net_latency_tb;
  import ehis_pkg::*;

  pe_loc_t          a, b;
  logic [LAT_W-1:0] lat;
  int checks = 0, failures = 0;

  net_latency dut (.a, .b, .lat);

  function automatic int ref_lat(pe_loc_t x, pe_loc_t y);
    int hx, hy;
    if (x.cx != y.cx || x.cy != y.cy) begin
      hx = int'(x.cx) - int'(y.cx); if (hx < 0) hx = -hx;
      hy = int'(x.cy) - int'(y.cy); if (hy < 0) hy = -hy;
      return 7 + hx + hy;
    end
    if (x.domain != y.domain) return 7;
    if (int'(x.pe) / 4 != int'(y.pe) / 4) return 4;
    if (int'(x.pe) / 2 != int'(y.pe) / 2) return 2;
    if (x.pe != y.pe) return 1;
    return 0;
  endfunction

  task automatic check_pair();
    #1;
    checks++;
    if (int'(lat) != ref_lat(a, b)) begin
      failures++;
      $display("FAIL a=%p b=%p lat=%0d exp=%0d", a, b, lat, ref_lat(a, b));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist[int];
    for (int da = 0; da < 4; da++)
      for (int db = 0; db < 4; db++)
        for (int pa = 0; pa < 8; pa++)
          for (int pb = 0; pb < 8; pb++) begin
            a = '{cx: 4'd3, cy: 4'd5, domain: 2'(da), pe: 3'(pa)};
            b = '{cx: 4'd3, cy: 4'd5, domain: 2'(db), pe: 3'(pb)};
            check_pair();
            hist[int'(lat)]++;
          end
    // every class of the table appears
    checks++;
    if (!(hist.exists(0) && hist.exists(1) && hist.exists(2) && hist.exists(4) && hist.exists(7))) begin
      failures++;
      $display("FAIL latency classes missing");
    end
    for (int n = 0; n < 2000; n++) begin
      a = pe_loc_t'($urandom);
      b = pe_loc_t'($urandom);
      if (n % 4 == 0) begin b.cx = a.cx; b.cy = a.cy; end
      check_pair();
    end
    // a worst-case far pair
    a = '{cx: 4'd0, cy: 4'd0, domain: 2'd0, pe: 3'd0};
    b = '{cx: 4'd15, cy: 4'd15, domain: 2'd3, pe: 3'd7};
    check_pair();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

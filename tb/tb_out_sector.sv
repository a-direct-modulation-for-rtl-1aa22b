// tb_out_sector: checks the output-sector comparators and max/min selection.
// Part 1 feeds random reference triples and compares max_o/min_o with a
// sort done in the testbench, and so with the three comparisons. Part 2
// sweeps three balanced cosines over one turn and checks that the sector
// codes appear in the order 6 2 3 1 5 4 (the published sector sequence).
module tb_out_sector;
  import davpwm_pkg::*;

  localparam int unsigned NOUT = 3;

  q15_t    vo_x [NOUT];
  sector_t so;
  q15_t    max_o, min_o;
  int      checks = 0, failures = 0;

  out_sector dut (.vo_x (vo_x), .so (so), .max_o (max_o), .min_o (min_o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: vo=%0d %0d %0d so=%0d max=%0d min=%0d", what,
               vo_x[0], vo_x[1], vo_x[2], so, max_o, min_o);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sector_t expected_order [6] = '{3'd6, 3'd2, 3'd3, 3'd1, 3'd5, 3'd4};
    sector_t seen [$];
    for (int n = 0; n < 2000; n++) begin
      q15_t mx, mn;
      for (int j = 0; j < NOUT; j++) vo_x[j] = q15_t'($urandom);
      if (n % 7 == 0) vo_x[1] = vo_x[0];   // ties
      #1;
      mx = vo_x[0]; mn = vo_x[0];
      for (int j = 1; j < NOUT; j++) begin
        if (vo_x[j] > mx) mx = vo_x[j];
        if (vo_x[j] < mn) mn = vo_x[j];
      end
      if (!(vo_x[0] == vo_x[1] && vo_x[1] == vo_x[2])) begin
        check(max_o == mx, "max");
        check(min_o == mn, "min");
      end
      check(so == {vo_x[0] >= vo_x[1], vo_x[1] >= vo_x[2], vo_x[2] >= vo_x[0]}, "so bits");
    end
    // Sector order over one output period.
    for (int n = 0; n < 3600; n++) begin
      real th;
      th = 2.0 * 3.14159265358979 * n / 3600.0 + 0.001;
      for (int j = 0; j < NOUT; j++)
        vo_x[j] = q15_t'($rtoi(20000.0 * $cos(th - j * 2.0 * 3.14159265358979 / 3.0)));
      #1;
      if (seen.size() == 0 || seen[$] != so) seen.push_back(so);
    end
    // Drop a wrap-around repeat of the first sector.
    if (seen.size() == 7 && seen[6] == seen[0]) void'(seen.pop_back());
    check(seen.size() == 6, "six sectors per turn");
    if (seen.size() == 6) begin
      int off;
      off = -1;
      for (int i = 0; i < 6; i++) if (expected_order[i] == seen[0]) off = i;
      check(off >= 0, "start sector");
      if (off >= 0)
        for (int i = 0; i < 6; i++) check(seen[i] == expected_order[(off + i) % 6], "sector order");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Workload testbench: the controller at the smaller system sizes that the
// evaluation also considers, with the traffic mix of its device comparison.
//
//  * M = 2 requestors (two-core systems);
//  * M = 4 requestors with 50 % row hits and 20 % stores for the requestor
//    under analysis, the setting of the DDR3 speed-grade comparison, which
//    reports for DDR3-1333H an average worst-case latency of 101.85 ns;
//  * M = 8 requestors on the older DDR2-800E timing of the same comparison
//    table, to show the controller and its bound with a second timing record.
//
// Each size runs in its own mc_env instance (own clock, own DRAM model, M-1
// greedy interferers). Every request of the requestor under analysis is held
// against its per-request bound for that M. For M = 4 the testbench also
// checks that the average latency observed stays below the published average
// bound (101.85 ns, i.e. 67.9 cycles at 1.5 ns), and prints the average of the
// per-request bounds of the random request sequence next to it.
//
// The sizes and the traffic mix follow the evaluation; the random request
// order is this testbench's own.
module tb_workloads;

  localparam int WATCHDOG_NS = 4_000_000;
  localparam real TCK_NS = 1.5;

  bit     d2, d4, dd;
  int     c2, f2, c4, f4, cd, fd, nb2, nb4, nbd;
  longint sl2, sb2, sl4, sb4, sld, sbd;

  mc_env #(.M(2), .N0(300), .HIT_PCT(50), .ST_PCT(20)) u_m2 (
    .done(d2), .checks(c2), .failures(f2), .n_bounded(nb2), .sum_lat(sl2), .sum_bound(sb2));
  mc_env #(.M(4), .N0(300), .HIT_PCT(50), .ST_PCT(20)) u_m4 (
    .done(d4), .checks(c4), .failures(f4), .n_bounded(nb4), .sum_lat(sl4), .sum_bound(sb4));

  mc_env #(.M(8), .N0(200), .HIT_PCT(50), .ST_PCT(20), .T(mc_pkg::DDR2_800E)) u_ddr2 (
    .done(dd), .checks(cd), .failures(fd), .n_bounded(nbd), .sum_lat(sld), .sum_bound(sbd));

  int checks = 0, failures = 0;

  initial begin
    real avg_lat4, avg_b4, avg_lat2, avg_b2;
    wait (d2 && d4 && dd);
    checks = c2 + c4 + cd + 1;
    failures = f2 + f4 + fd;
    avg_lat2 = real'(sl2) / real'(nb2);
    avg_b2   = real'(sb2) / real'(nb2);
    avg_lat4 = real'(sl4) / real'(nb4);
    avg_b4   = real'(sb4) / real'(nb4);
    $display("M=2: average latency %0.1f cycles (%0.1f ns), average bound %0.1f cycles",
             avg_lat2, avg_lat2 * TCK_NS, avg_b2);
    $display("M=4: average latency %0.1f cycles (%0.1f ns), average bound %0.1f cycles (%0.1f ns); published average bound 101.85 ns",
             avg_lat4, avg_lat4 * TCK_NS, avg_b4, avg_b4 * TCK_NS);
    if (!(avg_lat4 * TCK_NS <= 101.85)) begin
      failures++;
      $display("FAIL: M=4 average latency above the published average bound");
    end
    $display("M=8 on DDR2-800E timing: average latency %0.1f cycles, average bound %0.1f cycles",
             real'(sld) / real'(nbd), real'(sbd) / real'(nbd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4 + cd, f2 + f4 + fd + 1);
    $finish;
  end

endmodule

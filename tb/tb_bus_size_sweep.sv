// tb_bus_size_sweep -- saturated uniform traffic on eight system sizes at
// once, to compare the bus throughput (BT) with the published curves.
//
// Each size is a sat_traffic_bench: a full cdma_bus_system with M PEs and N
// codewords, where every PE keeps a 64-bit stream to a random other PE in
// flight and every delivered word is checked. The sizes are the published
// sweeps:
//   * M = 16 with N = 1, 4, 8, 16: BT against the bus width. N = 1 uses
//     2-byte words, because one-byte words would be shorter than the
//     M/N-bit tail that a receiver discards after each stream;
//   * N = 8 with M = 8, 32 and N = 4 with M = 4, 8: BT against the number
//     of PEs.
// The reference values are read off the published plots to about 0.01.
// For the three N = 8 systems the mean data-stream latency (DSL) is also
// compared with the published saturation levels (about 840, 1080 and 2190
// chip intervals for M = 8, 16 and 32).
// Checks: every word delivered intact; each BT within 0.05 of its
// reference; each N = 8 DSL within 10 % of its level; and the shape of the curves: at M = 16 the throughput peaks
// at a middle bus width (N = 8 above both N = 1 and N = 16), and for N = 8
// and N = 4 the static system (M = N) is well below M = 2N.
module tb_bus_size_sweep;
  localparam int NCFG = 8;
  localparam int TOL  = 50;     // allowed BT difference, thousandths

  function automatic int cfg_m(int i);
    case (i)
      0, 1, 2, 3: return 16;
      4, 7:       return 8;
      5:          return 32;
      default:    return 4;
    endcase
  endfunction
  function automatic int cfg_n(int i);
    case (i)
      0:          return 1;
      1, 6, 7:    return 4;
      3:          return 16;
      default:    return 8;
    endcase
  endfunction
  // published BT, thousandths of a bit per chip interval
  function automatic int cfg_ref(int i);
    case (i)
      0: return 775;  1: return 925;  2: return 940;  3: return 590;
      4: return 610;  5: return 930;  6: return 670;  default: return 935;
    endcase
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int bt [NCFG];
  int dsl [NCFG];
  int sub_checks [NCFG];
  int sub_fail [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    sat_traffic_bench #(.M(cfg_m(g)), .N(cfg_n(g)), .P_BYTES(cfg_n(g) == 1 ? 2 : 1)) u_bench (
      .clk, .rst_n, .done(done[g]), .bt_milli(bt[g]), .dsl(dsl[g]),
      .checks(sub_checks[g]), .failures(sub_fail[g]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // published DSL under saturation (N = 8 systems only, else 0)
  function automatic int cfg_dsl(int i);
    case (i)
      2: return 1080;  4: return 840;  5: return 2190;
      default: return 0;
    endcase
  endfunction

  initial begin
    int words, bad, diff;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (done != '1) @(posedge clk);
    repeat (200) @(posedge clk);
    words = 0; bad = 0;
    for (int i = 0; i < NCFG; i++) begin
      words += sub_checks[i]; bad += sub_fail[i];
      diff = bt[i] - cfg_ref(i);
      $display("M=%0d N=%0d: BT=%0d.%03d (published about %0d.%03d), DSL=%0d chips",
               cfg_m(i), cfg_n(i), bt[i] / 1000, bt[i] % 1000, cfg_ref(i) / 1000, cfg_ref(i) % 1000,
               dsl[i]);
      if (cfg_dsl(i) != 0)
        check(dsl[i] * 10 >= cfg_dsl(i) * 9 && dsl[i] * 10 <= cfg_dsl(i) * 11,
              $sformatf("M=%0d N=%0d DSL %0d vs %0d", cfg_m(i), cfg_n(i), dsl[i], cfg_dsl(i)));
      check(diff <= TOL && diff >= -TOL,
            $sformatf("M=%0d N=%0d BT %0d vs %0d", cfg_m(i), cfg_n(i), bt[i], cfg_ref(i)));
      check(sub_checks[i] > 0, $sformatf("M=%0d N=%0d delivered words", cfg_m(i), cfg_n(i)));
    end
    checks += words; failures += bad;
    check(bt[2] > bt[0] && bt[2] > bt[3], "M=16: BT peaks at a middle bus width");
    check(bt[4] + 200 < bt[2], "N=8: static system (M=8) well below M=16");
    check(bt[6] + 150 < bt[7], "N=4: static system (M=4) well below M=8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_workloads -- the traffic of the document's evaluation run on the bus at
// its default size (16 PEs, 8 codewords), with 64-bit data streams.
//   * saturated uniform traffic: each PE starts a new stream to a random
//     other PE as soon as its previous stream is released;
//   * saturated hotspot traffic, h = 10 % and 20 %: each new stream goes to
//     PE 0 with an extra probability h, otherwise to a random PE;
//   * variable load: each PE generates streams as a Poisson process of
//     lambda bits per chip interval, queued at the PE until it can send.
// For each run the bus throughput (data bits delivered per chip interval)
// and the mean data-stream latency (request issued to last word delivered)
// are printed. Every word is checked against the data its source sent.
// Checks: throughput never above the bus capacity of 1 bit per chip
// interval; under light load the throughput equals the offered load and
// the latency is the stream time plus a few ring intervals of arbitration
// and termination; latency grows with the load; the
// saturated uniform throughput is at least 0.85 (the document reports about
// 0.94 for this configuration), and so is the throughput under overload;
// hotspot traffic lowers it.
module tb_workloads;
  import cdma_pkg::*;
  localparam int unsigned M = 16, N = 8, P_BYTES = 1, LW = 8, TX_DEPTH = 16;
  localparam int unsigned IDW = id_width(M), CWW = id_width(N), KW = sum_width(N);
  localparam int unsigned WB = 8 * P_BYTES, TXC_W = $clog2(TX_DEPTH) + 1;
  localparam int unsigned SLEN = 8;                // words per stream: 64 bits

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [CWW:0] cw_count = (CWW+1)'(N);

  logic [M-1:0]            tx_wr, tx_full, tx_req, tx_ready, tx_done;
  logic [M-1:0][7:0]       tx_wdata;
  logic [M-1:0][TXC_W-1:0] tx_level;
  logic [M-1:0][IDW-1:0]   tx_dest;
  logic [M-1:0][LW-1:0]    tx_len;
  logic [M-1:0]            rx_valid, rx_pop, rx_discard;
  logic [M-1:0][WB-1:0]    rx_word;
  logic [M-1:0][IDW-1:0]   rx_word_src;
  logic [KW-1:0]           sum_chip;
  logic [M-1:0]            cw_valid, cw_busy, rx_start, rx_stop;
  logic [M-1:0][CWW-1:0]   cw_id;
  logic [M-1:0]            ev_dest_busy, ev_search, ev_cw_give, ev_cw_take, ev_cw_none;

  cdma_bus_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef enum int { P_OFF, P_FILL, P_REQ, P_WAIT } pstate_t;
  pstate_t    pst   [M];
  logic [7:0] pdata [M][$];
  logic [7:0] expq  [M][$];
  int         expd  [M][$];
  longint     pend  [M][$];     // Poisson: generation times of queued streams
  longint     kc = 0, t_req [M];
  bit         wl_sat = 1'b0;
  int         hot_pct = 0;
  real        lambda = 0.0;     // bits per chip interval per PE (variable load)
  bit         gen_on = 0;
  longint     bits_rx = 0, lat_sum = 0, lat_n = 0, streams = 0;

  function automatic int pick_dest(int src);
    int d;
    if (hot_pct > 0 && src != 0 && $urandom_range(99) < hot_pct) return 0;
    do d = $urandom_range(M - 1); while (d == src);
    return d;
  endfunction

  // Poisson arrivals: a stream of SLEN*8 bits every 1/p cycles on average
  always @(posedge clk)
    if (rst_n && gen_on && !wl_sat)
      for (int m = 0; m < M; m++)
        if (real'($urandom) / 4294967296.0 < lambda / real'(SLEN * 8)) pend[m].push_back(kc);

  always @(posedge clk) begin
    if (!rst_n) begin
      kc <= 0;
      for (int m = 0; m < M; m++) begin
        pst[m] <= P_OFF; tx_wr[m] <= 1'b0; tx_req[m] <= 1'b0;
        tx_wdata[m] <= '0; tx_dest[m] <= '0; tx_len[m] <= '0;
      end
    end else begin
      kc <= kc + 1;
      for (int m = 0; m < M; m++) begin
        tx_wr[m] <= 1'b0;
        case (pst[m])
          P_OFF:
            if ((gen_on && wl_sat) || pend[m].size() != 0) begin
              int d;
              if (!wl_sat) void'(pend[m].pop_front());
              d = pick_dest(m);
              for (int b = 0; b < SLEN * P_BYTES; b++) begin
                logic [7:0] v;
                v = 8'($urandom);
                pdata[m].push_back(v); expq[m].push_back(v); expd[m].push_back(d);
              end
              tx_dest[m] <= IDW'(d);
              tx_len[m]  <= LW'(SLEN);
              pst[m]     <= P_FILL;
            end
          P_FILL:
            if (pdata[m].size() != 0) begin
              tx_wr[m] <= 1'b1; tx_wdata[m] <= pdata[m].pop_front();
            end else begin
              tx_req[m] <= 1'b1; pst[m] <= P_REQ;
            end
          P_REQ:
            if (tx_ready[m] && tx_req[m]) begin
              tx_req[m] <= 1'b0; t_req[m] = kc; pst[m] <= P_WAIT;
            end
          P_WAIT:
            if (tx_done[m]) pst[m] <= P_OFF;
        endcase
      end
    end
  end

  assign rx_pop = rx_valid;
  always @(posedge clk)
    if (rst_n)
      for (int d = 0; d < M; d++)
        if (rx_valid[d]) begin
          int s;
          s = int'(rx_word_src[d]);
          bits_rx += longint'(WB);
          if (expq[s].size() == 0) check(1'b0, "unexpected word");
          else begin
            logic [7:0] e; int ed;
            e = expq[s].pop_front(); ed = expd[s].pop_front();
            check(ed == d && rx_word[d] == e, $sformatf("word from %0d to %0d", s, d));
            if (pst[s] == P_WAIT && expq[s].size() == 0) begin   // last word of the stream
              lat_sum += kc - t_req[s]; lat_n++; streams++;
            end
          end
        end

  function automatic bit drained();
    for (int m = 0; m < M; m++)
      if (pst[m] != P_OFF || expq[m].size() != 0 || pend[m].size() != 0) return 1'b0;
    return 1'b1;
  endfunction

  real bt_res, lat_res;
  task automatic run(input int sat, input int hot, input real lam, input int cycles);
    longint b0, c0;
    wl_sat = (sat != 0); hot_pct = hot; lambda = lam;
    lat_sum = 0; lat_n = 0;
    gen_on = 1;
    repeat (2000) @(posedge clk);           // warm up
    b0 = bits_rx; c0 = kc; lat_sum = 0; lat_n = 0;
    repeat (cycles) @(posedge clk);
    bt_res  = real'(bits_rx - b0) / real'(kc - c0);
    lat_res = (lat_n > 0) ? real'(lat_sum) / real'(lat_n) : 0.0;
    gen_on = 0;
    while (!drained()) @(posedge clk);
    repeat (3 * M) @(posedge clk);
    $display("workload sat=%0d h=%0d%% lambda=%0.3f: BT=%0.3f bit/chip, mean DSL=%0.1f chips over %0d streams",
             sat, hot, lam, bt_res, lat_res, lat_n);
    check(bt_res <= 1.0, "throughput within bus capacity");
  endtask

  real bt_uni, lat_lo;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1, 0, 0.0, 30000);
    bt_uni = bt_res;
    check(bt_uni >= 0.85, $sformatf("saturated uniform BT %0.3f >= 0.85", bt_uni));
    run(1, 10, 0.0, 30000);
    check(bt_res < bt_uni, "10% hotspot lowers the throughput");
    run(1, 20, 0.0, 30000);
    check(bt_res < bt_uni, "20% hotspot lowers the throughput");
    run(0, 0, 0.02, 40000);
    check(bt_res > 0.85 * 0.02 * M && bt_res < 1.15 * 0.02 * M,
          $sformatf("light load carried in full (BT %0.3f, offered %0.3f)", bt_res, 0.02 * M));
    check(lat_res >= real'(SLEN * 8 * N) && lat_res < real'(SLEN * 8 * N + 8 * M),
          $sformatf("light-load latency %0.1f near stream time %0d", lat_res, SLEN * 8 * N));
    lat_lo = lat_res;
    run(0, 0, 0.05, 40000);
    check(lat_res > lat_lo, "latency grows with the load");
    run(0, 0, 0.08, 40000);
    check(bt_res >= 0.85, $sformatf("overloaded bus saturates near capacity (BT %0.3f)", bt_res));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

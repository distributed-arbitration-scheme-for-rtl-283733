// tb_cdma_bus_system -- end-to-end test of the dynamic CDMA bus at its
// default size (16 PEs, 8 codewords, 1-byte words).
//
// Phase 1 (directed, idle bus): a codeword owner requests a stream and the
// start cycle is checked against the ring timing (first pass of the
// destination token, then the next ring interval); then a PE without a
// codeword requests one and the start is checked to come one extra ring
// interval later. Phase 2 (saturated uniform traffic, as in the document's
// evaluation): every PE sends random streams of 1..8 words to random
// destinations and starts the next one as soon as the previous is released.
// Phase 3 (hotspot): all PEs address PE 0 to force destination conflicts.
// Every received word is compared with the data its source queued, in
// order, and the source identifier delivered with it. The test counts each
// arbitration mechanism (destination busy, codeword search, hand-over,
// codeword shortage, termination, discard of a partial word) and fails if
// one never happened. Bus throughput of the saturated phase is reported.
module tb_cdma_bus_system;
  import cdma_pkg::*;
  localparam int unsigned M = 16, N = 8, P_BYTES = 1, LW = 8, TX_DEPTH = 16;
  localparam int unsigned IDW = id_width(M), CWW = id_width(N), KW = sum_width(N);
  localparam int unsigned WB = 8 * P_BYTES, TXC_W = $clog2(TX_DEPTH) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CWW:0] cw_count = (CWW+1)'(N);
  always #5 clk = ~clk;

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
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------------
  // PE models
  // ------------------------------------------------------------------
  typedef enum int { P_OFF, P_FILL, P_REQ, P_WAIT } pstate_t;
  pstate_t      pst   [M];
  int           fill_n[M];
  int           plen  [M];
  logic [7:0]   pdata [M][$];     // bytes still to write into the FIFO
  logic [7:0]   expq  [M][$];     // bytes the destination must receive, per source
  int           expd  [M][$];     // destination of each of those bytes
  int           mode;             // 0 idle, 1 uniform, 2 hotspot on PE 0
  bit           gen_en[M];
  int           streams_done = 0, words_rx = 0;
  longint       kc = 0;           // token interval since reset
  longint       req_cycle[M], start_cycle[M];
  bit           first_active[M];

  function automatic int pick_dest(int src);
    int d;
    if (mode == 2 && src != 0) return 0;
    do d = $urandom_range(M - 1); while (d == src);
    return d;
  endfunction

  // stream generation, FIFO filling and request
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
            if (gen_en[m]) begin
              int d, n;
              d = pick_dest(m);
              n = $urandom_range(8, 1);
              for (int b = 0; b < n * P_BYTES; b++) begin
                logic [7:0] v;
                v = 8'($urandom);
                pdata[m].push_back(v);
                expq[m].push_back(v);
                expd[m].push_back(d);
              end
              tx_dest[m] <= IDW'(d);
              tx_len[m]  <= LW'(n);
              plen[m]    = n;
              pst[m]     <= P_FILL;
            end
          P_FILL:
            if (pdata[m].size() != 0) begin
              tx_wr[m]    <= 1'b1;
              tx_wdata[m] <= pdata[m].pop_front();
            end else begin
              tx_req[m] <= 1'b1;
              pst[m]    <= P_REQ;
            end
          P_REQ:
            if (tx_ready[m] && tx_req[m]) begin   // accepted at this edge
              tx_req[m]       <= 1'b0;
              req_cycle[m]    = kc;
              first_active[m] = 1'b1;
              pst[m]          <= P_WAIT;
            end
          P_WAIT:
            if (tx_done[m]) begin
              streams_done++;
              pst[m] <= P_OFF;
            end
        endcase
      end
    end
  end

  // start cycle of each stream
  always @(posedge clk)
    if (rst_n)
      for (int m = 0; m < M; m++)
        if (dut.tx_active[m] && first_active[m]) begin
          first_active[m] = 1'b0;
          start_cycle[m]  = kc;
          check(kc % M == 0, $sformatf("PE %0d stream starts at ring-interval boundary", m));
        end

  // receivers: read every word and compare it with its source's queue
  assign rx_pop = rx_valid;
  always @(posedge clk)
    if (rst_n)
      for (int d = 0; d < M; d++)
        if (rx_valid[d]) begin
          int s;
          s = int'(rx_word_src[d]);
          words_rx++;
          if (expq[s].size() == 0) check(1'b0, $sformatf("PE %0d got unexpected word from %0d", d, s));
          else begin
            logic [7:0] e; int ed;
            e  = expq[s].pop_front();
            ed = expd[s].pop_front();
            check(ed == d,  $sformatf("word from PE %0d delivered to PE %0d, sent to %0d", s, d, ed));
            check(rx_word[d] == e,
                  $sformatf("PE %0d from %0d: word %02h expected %02h", d, s, rx_word[d], e));
          end
        end

  // ------------------------------------------------------------------
  // mechanism counters and bus utilisation
  // ------------------------------------------------------------------
  int n_busy = 0, n_search = 0, n_give = 0, n_take = 0, n_none = 0;
  int n_start = 0, n_stop = 0, n_discard = 0;
  longint act_cycles = 0, win_cycles = 0;
  bit measure = 0;
  always @(posedge clk)
    if (rst_n) begin
      n_busy    += $countones(ev_dest_busy);
      n_search  += $countones(ev_search);
      n_give    += $countones(ev_cw_give);
      n_take    += $countones(ev_cw_take);
      n_none    += $countones(ev_cw_none);
      n_start   += $countones(rx_start);
      n_stop    += $countones(rx_stop);
      n_discard += $countones(rx_discard);
      check($countones(cw_valid & cw_busy) <= N, "at most N codewords in use");
      if (measure) begin
        win_cycles++;
        act_cycles += $countones(dut.tx_active);
      end
    end

  function automatic bit all_idle();
    for (int m = 0; m < M; m++)
      if (pst[m] != P_OFF || expq[m].size() != 0 || gen_en[m]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic run_one(input int src, input int dst, input int nwords);
    mode = 0;
    for (int b = 0; b < nwords; b++) begin
      logic [7:0] v = 8'($urandom);
      pdata[src].push_back(v); expq[src].push_back(v); expd[src].push_back(dst);
    end
    tx_dest[src] <= IDW'(dst);
    tx_len[src]  <= LW'(nwords);
    pst[src]     <= P_FILL;
    wait (pst[src] == P_WAIT);
    wait (pst[src] == P_OFF);
  endtask

  // expected start of a stream from src to dst requested (accepted) at kr
  function automatic longint exp_start(int src, int dst, longint kr, bit owner);
    longint t;
    t = kr + 1;                                         // element state is RESERVE
    while (((src - dst + M) % M) != (t % M)) t++;       // first pass of T_dst at src
    if (!owner) t += M;                                 // search token returns
    do t++; while (t % M != 0);                         // next ring interval
    return t;
  endfunction

  initial begin
    for (int m = 0; m < M; m++) gen_en[m] = 1'b0;
    mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // ---- phase 1: arbitration delay on an idle bus
    run_one(0, 5, 2);                      // PE 0 owns codeword 0
    check(start_cycle[0] == exp_start(0, 5, req_cycle[0], 1'b1),
          $sformatf("owner start at %0d, expected %0d", start_cycle[0],
                    exp_start(0, 5, req_cycle[0], 1'b1)));
    check(dut.cw_valid[0] == 1'b1 && dut.cw_busy[0] == 1'b0, "owner keeps its codeword, unused");
    repeat (20) @(posedge clk);
    run_one(12, 3, 3);                     // PE 12 owns none
    check(start_cycle[12] == exp_start(12, 3, req_cycle[12], 1'b0),
          $sformatf("non-owner start at %0d, expected %0d", start_cycle[12],
                    exp_start(12, 3, req_cycle[12], 1'b0)));
    check(dut.cw_valid[12] == 1'b1, "requester now owns a codeword");
    repeat (3 * M) @(posedge clk);
    check(all_idle(), "phase 1 complete");

    // ---- phase 2: saturated uniform traffic
    mode = 1;
    measure = 1;
    for (int m = 0; m < M; m++) gen_en[m] = 1'b1;
    while (streams_done < 2 + 40 * M) @(posedge clk);
    measure = 0;
    for (int m = 0; m < M; m++) gen_en[m] = 1'b0;
    while (!all_idle()) @(posedge clk);
    $display("saturated uniform: %0d streams, bus throughput %0.3f bit/chip interval",
             streams_done, real'(act_cycles) / real'(N) / real'(win_cycles));
    check(real'(act_cycles) / real'(N) / real'(win_cycles) > 0.5, "saturated bus throughput above 0.5");

    // ---- phase 3: hotspot on PE 0
    mode = 2;
    for (int m = 1; m < M; m++) gen_en[m] = 1'b1;
    while (streams_done < 2 + 40 * M + 3 * M) @(posedge clk);
    for (int m = 0; m < M; m++) gen_en[m] = 1'b0;
    while (!all_idle()) @(posedge clk);
    repeat (4 * M) @(posedge clk);

    check(all_idle(), "all streams delivered");
    check(n_start == streams_done, $sformatf("%0d receptions for %0d streams", n_start, streams_done));
    check(n_stop == streams_done, "every reception terminated by L");
    $display("events: dest_busy=%0d search=%0d give=%0d take=%0d shortage=%0d start=%0d stop=%0d discard=%0d words=%0d",
             n_busy, n_search, n_give, n_take, n_none, n_start, n_stop, n_discard, words_rx);
    check(n_busy    > 0, "destination conflict happened");
    check(n_search  > 0, "codeword search happened");
    check(n_give    > 0, "codeword hand-over happened");
    check(n_take == n_give, "every handed codeword was taken");
    check(n_none    > 0, "codeword shortage happened");
    check(n_stop    > 0, "stream termination happened");
    check(n_discard > 0, "partial-word discard happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    for (int m = 0; m < M; m++)
      $display("  PE %0d pst=%0d v=%0d b=%0d cw=%0d expq=%0d done=%0d rxon=%0d", m, pst[m], cw_valid[m], cw_busy[m], cw_id[m], expq[m].size(), streams_done, dut.rx_on[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

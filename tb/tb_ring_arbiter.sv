// tb_ring_arbiter -- the whole arbitration ring (8 elements, 2 codewords)
// with no data path. Monitors, every cycle: at most N transmitters, all on
// distinct codewords; every stream starts at a ring-interval boundary and
// lasts len*8*N chips; the destination starts receiving in the same cycle
// with the source's codeword and identifier, and stops after the source has
// finished. Scenarios: (1) three non-owners address one destination at
// once: they must be served one at a time, in ring (round-robin) order;
// (2) four disjoint pairs at once: only two codewords exist, so the rest
// wait for a codeword; (3) random traffic.
module tb_ring_arbiter;
  localparam int unsigned M = 8, N = 2, P_BYTES = 1, LW = 3;
  localparam int unsigned IDW = 3, CWW = 1;
  logic clk = 0, rst_n = 0;
  logic [CWW:0] cw_count = (CWW+1)'(N);
  always #5 clk = ~clk;

  logic [M-1:0]          tx_req, tx_ready, tx_done, tx_active, tx_bit_last;
  logic [M-1:0][IDW-1:0] tx_dest, rx_src;
  logic [M-1:0][LW-1:0]  tx_len;
  logic [M-1:0][CWW-1:0] tx_cw, chip_idx, rx_cw, cw_id;
  logic [M-1:0]          rx_on, rx_start, rx_stop, cw_valid, cw_busy;
  logic [M-1:0]          ev_dest_busy, ev_search, ev_cw_give, ev_cw_take, ev_cw_none;

  ring_arbiter #(.M(M), .N(N), .P_BYTES(P_BYTES), .LW(LW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL @k=%0d: %s", k, s); end
  endtask

  int k = 0;
  always_ff @(posedge clk) if (!rst_n) k <= 0; else k <= k + 1;

  // per-source bookkeeping
  int  dest_of [M], len_of [M], act_len [M], started [M];
  bit  busy [M];
  int  order [$];                   // sources in the order their streams start
  int  n_none = 0, max_act = 0, n_done = 0;

  always @(negedge clk) if (rst_n) begin
    int nact;
    nact = $countones(tx_active);
    if (nact > max_act) max_act = nact;
    chk(nact <= N, "no more transmitters than codewords");
    n_none += $countones(ev_cw_none);
    for (int a = 0; a < M; a++)
      for (int b = a + 1; b < M; b++)
        if (tx_active[a] && tx_active[b]) chk(tx_cw[a] != tx_cw[b], "distinct codewords");
    for (int s = 0; s < M; s++) begin
      if (tx_active[s]) begin
        int d;
        d = dest_of[s];
        if (act_len[s] == 0) begin
          order.push_back(s);
          chk(k % M == 0, $sformatf("PE %0d starts at ring boundary", s));
          chk(rx_start[d], $sformatf("PE %0d receiver starts with the stream", d));
          started[s] = k;
        end
        if (act_len[s] == 1) chk(rx_on[d] && rx_src[d] == IDW'(s) && rx_cw[d] == tx_cw[s],
                                 $sformatf("PE %0d receives from %0d on its codeword", d, s));
        act_len[s]++;
      end
      if (tx_done[s]) begin
        chk(act_len[s] == len_of[s] * 8 * P_BYTES * N,
            $sformatf("PE %0d stream lasted %0d chips", s, act_len[s]));
        chk(!rx_on[dest_of[s]], "receiver stopped before release");
        busy[s] = 0;
        n_done++;
      end
    end
  end

  task automatic request(input int s, input int d, input int len);
    @(negedge clk);
    while (!tx_ready[s]) @(negedge clk);
    dest_of[s] = d; len_of[s] = len; act_len[s] = 0; busy[s] = 1;
    tx_req[s] = 1; tx_dest[s] = IDW'(d); tx_len[s] = LW'(len);
    @(negedge clk);
    tx_req[s] = 0;
  endtask

  task automatic wait_all();
    bit any;
    do begin
      @(negedge clk);
      any = 0;
      for (int s = 0; s < M; s++) any |= busy[s];
    end while (any);
  endtask

  initial begin
    tx_req = '0; tx_dest = '0; tx_len = '0;
    for (int s = 0; s < M; s++) begin busy[s] = 0; act_len[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;

    // ---- 1. destination conflict, round robin
    @(negedge clk);
    for (int s = 0; s < M; s++)
      if (s == 2 || s == 5 || s == 6) begin
        dest_of[s] = 0; len_of[s] = 1; act_len[s] = 0; busy[s] = 1;
        tx_req[s] = 1; tx_dest[s] = '0; tx_len[s] = 1;
      end
    @(negedge clk);
    tx_req = '0;
    wait_all();
    chk(order.size() == 3, "three streams to PE 0");
    if (order.size() == 3) begin
      // each successor is the next requester in ring order after its predecessor
      chk((order[0] == 2 && order[1] == 5 && order[2] == 6) ||
          (order[0] == 5 && order[1] == 6 && order[2] == 2) ||
          (order[0] == 6 && order[1] == 2 && order[2] == 5),
          $sformatf("round-robin order %0d %0d %0d", order[0], order[1], order[2]));
    end

    // ---- 2. codeword shortage: four pairs, two codewords
    max_act = 0;
    n_none = 0;
    for (int s = 0; s < 4; s++) begin
      dest_of[s] = s + 4; len_of[s] = 2; act_len[s] = 0; busy[s] = 1;
      tx_req[s] = 1; tx_dest[s] = IDW'(s + 4); tx_len[s] = 2;
    end
    @(negedge clk);
    tx_req = '0;
    wait_all();
    chk(max_act == N, $sformatf("both codewords used at once (max %0d)", max_act));
    chk(n_none > 0, "a search waited for a free codeword");

    // ---- 3. random traffic
    for (int it = 0; it < 60; it++) begin
      int s, d;
      s = $urandom_range(M - 1);
      do d = $urandom_range(M - 1); while (d == s);
      if (!busy[s]) begin
        dest_of[s] = d; len_of[s] = $urandom_range(3, 1); act_len[s] = 0; busy[s] = 1;
        tx_req[s] = 1; tx_dest[s] = IDW'(d); tx_len[s] = LW'(len_of[s]);
        @(negedge clk);
        tx_req[s] = 0;
      end
      repeat ($urandom_range(20)) @(negedge clk);
    end
    wait_all();
    chk(n_done == order.size(), "every stream completed");

    // ---- 4. software-configured codeword count: one codeword only
    rst_n = 0; cw_count = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk($countones(cw_valid) == 1 && cw_valid[0], "only PE 0 owns a codeword");
    max_act = 0;
    for (int s = 0; s < 3; s++) begin
      dest_of[s] = 7 - s; len_of[s] = 1; act_len[s] = 0; busy[s] = 1;
      tx_req[s] = 1; tx_dest[s] = IDW'(7 - s); tx_len[s] = 1;
    end
    @(negedge clk);
    tx_req = '0;
    wait_all();
    chk(max_act == 1, $sformatf("one stream at a time with one codeword (max %0d)", max_act));
    chk(n_done == order.size(), "every stream completed");
    $display("streams %0d", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

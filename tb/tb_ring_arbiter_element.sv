// tb_ring_arbiter_element -- one element (ID 1 of a 4-element ring, 2
// codewords, so it owns codeword 1 after reset) with the rest of the ring
// replaced by a 3-stage token delay line. The testbench can replace the
// token entering the element to play the other elements. Checked: the TX
// process with an owned codeword (R, CW and ID written into the destination
// token, transmission from the next ring interval for exactly len*8*N chips,
// B cleared after the last chip, L set on the next pass, R and L cleared on
// the pass after); the RX process handing its unused codeword to a search
// token; the TX process without a codeword (S set, waiting while C=0,
// taking CW when C=1); and reception start/stop from the own token.
module tb_ring_arbiter_element;
  localparam int unsigned M = 4, N = 2, ID = 1, P_BYTES = 1, LW = 4;
  localparam int unsigned IDW = 2, CWW = 1, TOKW = 4 + CWW + IDW;
  typedef struct packed {
    logic r, l, c, s;
    logic [CWW-1:0] cw;
    logic [IDW-1:0] id;
  } tok_t;

  logic clk = 0, rst_n = 0;
  logic [CWW:0] cw_count = (CWW+1)'(N);
  always #5 clk = ~clk;
  logic [TOKW-1:0] tok_in, tok_out;
  logic tx_req, tx_ready, tx_done, tx_active, tx_bit_last, rx_on, rx_start, rx_stop;
  logic [IDW-1:0] tx_dest, rx_src;
  logic [LW-1:0]  tx_len;
  logic [CWW-1:0] tx_cw, chip_idx, rx_cw, cw_id;
  logic cw_valid, cw_busy, ev_dest_busy, ev_search, ev_cw_give, ev_cw_take, ev_cw_none;

  ring_arbiter_element #(.M(M), .N(N), .ID(ID), .P_BYTES(P_BYTES), .LW(LW)) dut (.*);

  tok_t dl [M-1];     // passive rest of the ring
  logic ovr_en;
  tok_t ovr_tok;
  assign tok_in = ovr_en ? ovr_tok : dl[M-2];
  always_ff @(posedge clk)
    if (!rst_n) for (int i = 0; i < M - 1; i++) dl[i] <= '0;
    else begin
      dl[0] <= tok_t'(tok_out);
      for (int i = 1; i < M - 1; i++) dl[i] <= dl[i-1];
    end

  // token number held by the element now (its TR), tracked independently
  int k = 0;
  always_ff @(posedge clk) if (!rst_n) k <= 0; else k <= k + 1;
  function automatic int held(); return (ID - k % M + M) % M; endfunction

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL @k=%0d: %s", k, s); end
  endtask

  // advance to the cycle in which the element holds token x
  task automatic to_token(input int x);
    do @(negedge clk); while (held() != x);
  endtask

  // advance to the cycle before the element holds token x
  task automatic to_before(input int x);
    do @(negedge clk); while (held() != (x + 1) % M);
  endtask

  int act, start_k;
  tok_t t;

  initial begin
    tx_req = 0; tx_dest = 0; tx_len = 0; ovr_en = 0; ovr_tok = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    chk(cw_valid && cw_id == 1'b1 && !cw_busy, "element 1 owns codeword 1 after reset");

    // ---- 1. transmit to PE 3 with the owned codeword
    tx_req = 1; tx_dest = 2'd3; tx_len = 4'd1;
    @(negedge clk);
    tx_req = 0;
    to_token(3);
    t = tok_t'(tok_out);
    chk(t.r && !t.s && !t.c && t.cw == 1'b1 && t.id == 2'(ID), "owner reserves T_3 with CW and ID");
    act = 0; start_k = -1;
    while (!tx_done) begin
      @(negedge clk);
      if (tx_active) begin
        if (start_k < 0) start_k = k;
        act++;
        chk(tx_cw == 1'b1 && cw_busy, "codeword in use while transmitting");
        chk(int'(chip_idx) == k % N, "chip index follows the token interval");
      end
      if (held() == 3 && !tx_active && act > 0) begin
        t = tok_t'(tok_out);
        if (t.l) chk(t.r && !cw_busy, "L set on the pass after the stream, B cleared");
        else     chk(!t.r, "R and L cleared on the following pass");
      end
      if (k > 200) break;
    end
    chk(start_k % M == 0, $sformatf("transmission starts at a ring interval (k=%0d)", start_k));
    chk(act == 8 * P_BYTES * N, $sformatf("stream lasts %0d chips", act));
    @(negedge clk);
    chk(tx_ready && cw_valid && !cw_busy, "TX idle again and codeword kept");

    // ---- 2. a search token passes: the unused codeword is handed over
    to_before(2);
    ovr_en = 1; ovr_tok = dl[M-2]; ovr_tok.r = 1; ovr_tok.s = 1;
    @(negedge clk);
    ovr_en = 0;
    t = tok_t'(tok_out);
    chk(ev_cw_give && t.c && !t.s && t.cw == 1'b1, "codeword handed to the search token");
    @(negedge clk);
    chk(!cw_valid, "ownership dropped");
    // clear the reservation again on the next pass of T_2
    to_before(2);
    ovr_en = 1; ovr_tok = '0;
    @(negedge clk);
    ovr_en = 0;

    // ---- 3. transmit to PE 2 without a codeword
    tx_req = 1; tx_dest = 2'd2; tx_len = 4'd2;
    @(negedge clk);
    tx_req = 0;
    to_token(2);
    t = tok_t'(tok_out);
    chk(t.r && t.s && !t.c && ev_search, "non-owner sets R and S");
    to_token(2);
    chk(ev_cw_none, "search token returned without codeword");
    to_before(2);                         // T_2 comes back with a codeword
    ovr_en = 1; ovr_tok = dl[M-2]; ovr_tok.c = 1; ovr_tok.s = 0; ovr_tok.cw = 1'b0;
    @(negedge clk);
    ovr_en = 0;
    t = tok_t'(tok_out);
    chk(ev_cw_take && t.r && !t.c && !t.s && t.id == 2'(ID), "codeword taken, C and S cleared");
    @(negedge clk);
    chk(cw_valid && cw_id == 1'b0 && cw_busy, "now owns codeword 0, in use");
    chk(tx_active && k % M == 0, "T_2 reached PE 2 next: transmission starts at once");
    act = 1;
    while (!tx_done && k < 400) begin
      @(negedge clk);
      if (tx_active) act++;
    end
    chk(act == 2 * 8 * P_BYTES * N, $sformatf("two-word stream lasts %0d chips", act));

    // ---- 4. reception driven by the own token
    to_before(1);
    ovr_en = 1; ovr_tok = '0; ovr_tok.r = 1; ovr_tok.cw = 1'b1; ovr_tok.id = 2'd3;
    @(negedge clk);
    ovr_en = 0;
    chk(rx_start, "own token with R starts reception");
    @(negedge clk);
    chk(rx_on && rx_cw == 1'b1 && rx_src == 2'd3, "decoder configured from CW and ID");
    to_token(1);
    chk(!rx_start && rx_on, "no restart while receiving");
    to_before(1);
    ovr_en = 1; ovr_tok = dl[M-2]; ovr_tok.l = 1;
    @(negedge clk);
    ovr_en = 0;
    chk(rx_stop, "own token with L stops reception");
    @(negedge clk);
    chk(!rx_on, "reception off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cdma_node -- one PE interface (4 PEs, 4 codewords, 1-byte words) driven
// by a testbench that plays the ring-arbiter element and the bus.
// Transmit: two bytes are written into the FIFO; during an 16-bit
// transmission window the serializer must present the bits least
// significant first, each for N chips, and empty the FIFO. Receive: the
// testbench builds sum-chips from random data on all channels, with a known
// stream on codeword 2 followed by extra bits, as when the source finished
// before the stop reached the receiver: two words plus three bits, then
// one word plus a whole word that completes just as the stop arrives. The
// node must deliver exactly the stream's words with source identifier 3
// and report one discard for each stream.
module tb_cdma_node;
  localparam int unsigned M = 4, N = 4, P_BYTES = 1, IDW = 2, CWW = 2, KW = 3, WB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           tx_wr, tx_full, rx_valid, rx_pop, rx_discard;
  logic [7:0]     tx_wdata;
  logic [4:0]     tx_level;
  logic [WB-1:0]  rx_word;
  logic [IDW-1:0] rx_word_src, arb_rx_src;
  logic           arb_tx_active, arb_tx_bit_last, arb_rx_on, arb_rx_stop, enc_bit;
  logic [CWW-1:0] arb_chip_idx, arb_rx_cw;
  logic [KW-1:0]  sum_chip;

  cdma_node #(.M(M), .N(N), .P_BYTES(P_BYTES), .TX_DEPTH(16), .RX_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  int h [N][N];
  logic [7:0] txb [2] = '{8'hB1, 8'h4E};
  logic [7:0] rxw [2] = '{8'h6B, 8'hD2};
  int n_discard = 0;
  always @(posedge clk) if (rst_n && rx_discard) n_discard++;

  // Receive 'nw' words of rxw followed by 'extra' bits sent after the end of
  // the stream; the bus lags the chip index by one cycle, and the stop pulse
  // comes with the last sum-chip, as the ring element produces it.
  task automatic rx_stream(input int nw, input int extra);
    int nb, data [N], d0;
    d0 = n_discard;
    nb = nw * 8 + extra;
    for (int c = 0; c <= nb * N; c++) begin
      arb_chip_idx = CWW'(c % N);
      arb_rx_on   = (c >= 1 && c <= nb * N);
      arb_rx_stop = (c == nb * N);
      if (c >= 1) begin
        int t, bi, k;
        t = (c - 1) % N; bi = (c - 1) / N;
        if (t == 0)
          for (int ch = 0; ch < N; ch++)
            data[ch] = (ch == 2) ? ((bi < nw * 8) ? int'(rxw[bi / 8][bi % 8]) : $urandom_range(1))
                                 : $urandom_range(1);
        k = 0;
        for (int ch = 0; ch < N; ch++) k += data[ch] ^ ((h[ch][t] < 0) ? 1 : 0);
        sum_chip = KW'(k);
      end
      @(negedge clk);
    end
    arb_rx_on = 0; arb_rx_stop = 0;
    repeat (3) @(negedge clk);
    for (int w = 0; w < nw; w++) begin
      chk(rx_valid, $sformatf("word %0d available", w));
      chk(rx_word == rxw[w] && rx_word_src == 2'd3,
          $sformatf("word %0d = %02h from %0d, expected %02h from 3", w, rx_word, rx_word_src, rxw[w]));
      rx_pop = 1; @(negedge clk); rx_pop = 0;
    end
    chk(!rx_valid, $sformatf("no word after the %0d of the stream: extra bits dropped", nw));
    chk(n_discard == d0 + 1, $sformatf("one discard pulse (%0d)", n_discard - d0));
  endtask

  initial begin
    h[0][0] = 1;
    for (int sz = 1; sz < N; sz = sz * 2)
      for (int r = 0; r < sz; r++)
        for (int c = 0; c < sz; c++) begin
          h[r][c + sz] = h[r][c]; h[r + sz][c] = h[r][c]; h[r + sz][c + sz] = -h[r][c];
        end
    tx_wr = 0; tx_wdata = 0; rx_pop = 0; arb_tx_active = 0; arb_tx_bit_last = 0;
    arb_chip_idx = 0; arb_rx_on = 0; arb_rx_stop = 0; arb_rx_cw = 2'd2; arb_rx_src = 2'd3; sum_chip = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;

    // ---- transmit
    for (int b = 0; b < 2; b++) begin
      @(negedge clk); tx_wr = 1; tx_wdata = txb[b];
    end
    @(negedge clk); tx_wr = 0;
    @(negedge clk);
    chk(tx_level == 5'd2, "two bytes queued");
    for (int i = 0; i < 16 * N; i++) begin
      arb_tx_active = 1;
      arb_chip_idx = CWW'(i % N);
      arb_tx_bit_last = (i % N) == N - 1;
      #1;
      chk(enc_bit == txb[i / (8 * N)][(i / N) % 8], $sformatf("tx chip %0d bit", i));
      @(negedge clk);
    end
    arb_tx_active = 0; arb_tx_bit_last = 0;
    @(negedge clk);
    chk(tx_level == '0, "FIFO emptied by the stream");

    // ---- receive: two words plus 3 extra bits, then one word plus a whole
    // extra word that completes in the cycle the stop is seen
    rx_stream(2, 3);
    rx_stream(1, 8);
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

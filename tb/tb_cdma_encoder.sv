// tb_cdma_encoder -- random test of the central encoder. Each cycle a random
// set of PEs transmits, each on a distinct random codeword, with random data
// bits. The expected sum-chip is the number of 1 chips over all N channels,
// where a channel's chip is its data bit (0 when idle) XOR the codeword chip
// taken from a Walsh-Hadamard matrix built in the testbench. The sum is
// checked one cycle later (registered output).
module tb_cdma_encoder;
  localparam int unsigned M = 6, N = 4, CWW = 2, KW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [CWW-1:0]        chip_idx;
  logic [M-1:0]          tx_en, tx_bit;
  logic [M-1:0][CWW-1:0] tx_cw;
  logic [KW-1:0]         sum_chip;
  int checks = 0, failures = 0;
  int h [N][N];
  int expected, prev_expected;
  bit have_prev = 0;

  cdma_encoder #(.M(M), .N(N)) dut (.*);

  initial begin
    h[0][0] = 1;
    for (int sz = 1; sz < N; sz = sz * 2)
      for (int r = 0; r < sz; r++)
        for (int c = 0; c < sz; c++) begin
          h[r][c + sz] = h[r][c]; h[r + sz][c] = h[r][c]; h[r + sz][c + sz] = -h[r][c];
        end
    tx_en = '0; tx_bit = '0; tx_cw = '0; chip_idx = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 2000; it++) begin
      int perm [N];
      int chbit [N];
      int used;
      @(negedge clk);
      if (have_prev) begin
        checks++;
        if (int'(sum_chip) != prev_expected) begin
          failures++;
          $display("FAIL: it %0d sum %0d expected %0d", it, sum_chip, prev_expected);
        end
      end
      // random distinct codewords
      for (int c = 0; c < N; c++) perm[c] = c;
      for (int c = N - 1; c > 0; c--) begin
        int j, t;
        j = $urandom_range(c); t = perm[c]; perm[c] = perm[j]; perm[j] = t;
      end
      for (int c = 0; c < N; c++) chbit[c] = 0;
      chip_idx = CWW'($urandom);
      tx_en = '0;
      used = 0;
      for (int m = 0; m < M; m++) begin
        tx_bit[m] = 1'($urandom);
        tx_cw[m]  = CWW'($urandom);
        if (used < N && $urandom_range(2) != 0) begin
          tx_en[m] = 1'b1;
          tx_cw[m] = CWW'(perm[used]);
          chbit[perm[used]] = tx_bit[m];
          used++;
        end
      end
      expected = 0;
      for (int c = 0; c < N; c++)
        expected += chbit[c] ^ ((h[c][chip_idx] < 0) ? 1 : 0);
      prev_expected = expected;
      have_prev = 1;
    end
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

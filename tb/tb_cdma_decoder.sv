// tb_cdma_decoder -- the decoder receives packets of N sum-chips built by the
// testbench from random data on all N channels (spread with a testbench
// Walsh-Hadamard matrix and counted as the number of 1 chips). For a random
// receive codeword it must return that channel's bit, with a correlation of
// exactly +N or -N, at chip N-1 of every packet, and stay silent while
// disabled.
module tb_cdma_decoder;
  localparam int unsigned N = 8, CWW = 3, KW = 4, AW = KW + CWW + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic                 en, bit_valid, bit_out;
  logic [CWW-1:0]       chip_idx, cw;
  logic [KW-1:0]        sum_chip;
  logic signed [AW-1:0] corr;
  int checks = 0, failures = 0;
  int h [N][N];

  cdma_decoder #(.N(N)) dut (.*);

  initial begin
    h[0][0] = 1;
    for (int sz = 1; sz < N; sz = sz * 2)
      for (int r = 0; r < sz; r++)
        for (int c = 0; c < sz; c++) begin
          h[r][c + sz] = h[r][c]; h[r + sz][c] = h[r][c]; h[r + sz][c + sz] = -h[r][c];
        end
    en = 0; chip_idx = 0; cw = 0; sum_chip = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int pkt = 0; pkt < 300; pkt++) begin
      int data [N];
      bit active;
      active = (pkt % 7) != 3;
      for (int c = 0; c < N; c++) data[c] = $urandom_range(1);
      if (pkt % 5 == 0) cw = CWW'($urandom);
      for (int t = 0; t < N; t++) begin
        int k;
        k = 0;
        @(negedge clk);
        for (int c = 0; c < N; c++) k += data[c] ^ ((h[c][t] < 0) ? 1 : 0);
        en = active; chip_idx = CWW'(t); sum_chip = KW'(k);
        #1;
        if (t == N - 1 && active) begin
          checks++;
          if (!bit_valid || bit_out != data[cw] ||
              corr != (data[cw] ? -$signed(AW'(N)) : $signed(AW'(N)))) begin
            failures++;
            $display("FAIL: pkt %0d cw %0d valid %0b bit %0b expected %0d corr %0d",
                     pkt, cw, bit_valid, bit_out, data[cw], corr);
          end
        end else begin
          checks++;
          if (bit_valid) begin
            failures++;
            $display("FAIL: pkt %0d chip %0d unexpected bit_valid", pkt, t);
          end
        end
      end
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

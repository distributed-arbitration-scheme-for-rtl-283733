// tb_walsh_chip_gen -- checks the Walsh chip generator against a
// Walsh-Hadamard matrix built in the testbench by the recursive doubling
// rule (copy the matrix right and down, negate the lower-right copy), for
// every row and column of WH_8, and checks that all rows are mutually
// orthogonal and balanced except row 0.
module tb_walsh_chip_gen;
  localparam int unsigned N = 8, CWW = 3;
  logic [CWW-1:0] cw, chip_idx;
  logic           chip;
  int checks = 0, failures = 0;
  int h [N][N];   // +1 / -1

  walsh_chip_gen #(.N(N)) dut (.cw, .chip_idx, .chip);

  initial begin
    int sz;
    h[0][0] = 1;
    for (sz = 1; sz < N; sz = sz * 2)
      for (int r = 0; r < sz; r++)
        for (int c = 0; c < sz; c++) begin
          h[r][c + sz]      =  h[r][c];
          h[r + sz][c]      =  h[r][c];
          h[r + sz][c + sz] = -h[r][c];
        end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        cw = CWW'(r); chip_idx = CWW'(c);
        #1;
        checks++;
        if ((chip ? -1 : 1) != h[r][c]) begin
          failures++;
          $display("FAIL: WH[%0d][%0d] = %0d, generator gives chip %0b", r, c, h[r][c], chip);
        end
      end
    // orthogonality measured on the generator output
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        int dot;
        dot = 0;
        for (int c = 0; c < N; c++) begin
          int va, vb;
          cw = CWW'(a); chip_idx = CWW'(c); #1; va = chip ? -1 : 1;
          cw = CWW'(b); #1; vb = chip ? -1 : 1;
          dot += va * vb;
        end
        checks++;
        if (dot != ((a == b) ? N : 0)) begin
          failures++;
          $display("FAIL: rows %0d,%0d correlation %0d", a, b, dot);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

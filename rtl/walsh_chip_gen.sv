// walsh_chip_gen -- one chip of a Walsh-Hadamard spreading codeword.
//
// Codewords are the rows of the Walsh-Hadamard matrix WH_N built by the
// Sylvester rule WH_2n = [WH_n WH_n; WH_n -WH_n] from WH_1 = [1]. Element
// (row, col) of that matrix is -1 exactly when row AND col has odd parity,
// so the generator is an AND of the two indices followed by an XOR tree; no
// table is stored. The chip is returned as one bit, 1 meaning -1.
//
// Purely combinational. N must be a power of two (the bus uses the N rows of
// WH_N as its N codewords).
module walsh_chip_gen #(
  parameter int unsigned N   = 8,
  parameter int unsigned CWW = cdma_pkg::id_width(N)
) (
  input  logic [CWW-1:0] cw,        // codeword identifier = matrix row
  input  logic [CWW-1:0] chip_idx,  // chip position = matrix column
  output logic           chip       // 1 stands for -1
);
  always_comb chip = ^(cw & chip_idx);

  initial begin
    assert ((N & (N - 1)) == 0)
      else $error("walsh_chip_gen: N=%0d is not a power of two", N);
  end
endmodule

// cdma_encoder -- centralized CDMA encoder and chip adder.
//
// Every transmitting PE sends its current data bit, the identifier of the
// codeword it owns and an enable on its own data line. The encoder first maps
// the transmitters onto the N code channels (channel c carries the bit of the
// PE whose codeword is c), spreads each channel bit by XOR with chip chip_idx
// of codeword c, and adds the N chips arithmetically. The result, the
// sum-chip, is the number of chips equal to 1 and fits in k = 1 + log2 N bits;
// it is registered and drives the binary CDMA bus during the next chip
// interval (one cycle of latency).
//
// A channel with no transmitter is still summed, spreading a 0 bit. This
// design choice keeps every sum-chip a sum of exactly N +/-1 values, which is
// what lets a k = 1 + log2 N bit bus carry it and lets any receiver despread
// its channel without knowing how many channels are active.
//
// Timing: sum_chip at cycle t+1 belongs to the inputs at cycle t. chip_idx is
// the chip position in the current CDMA packet, shared by all encoders and
// decoders (packets start at ring-interval boundaries).
module cdma_encoder #(
  parameter int unsigned M   = 16,
  parameter int unsigned N   = 8,
  parameter int unsigned CWW = cdma_pkg::id_width(N),
  parameter int unsigned KW  = cdma_pkg::sum_width(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [CWW-1:0]         chip_idx,
  input  logic [M-1:0]           tx_en,    // PE m is transmitting
  input  logic [M-1:0][CWW-1:0]  tx_cw,    // codeword used by PE m
  input  logic [M-1:0]           tx_bit,   // current data bit of PE m
  output logic [KW-1:0]          sum_chip  // binary CDMA bus
);
  logic [N-1:0] ch_bit;   // data bit carried by each code channel
  logic [N-1:0] ch_chip;  // spread chip of each code channel
  logic [KW-1:0] sum_d;

  always_comb begin
    ch_bit = '0;
    for (int m = 0; m < M; m++)
      if (tx_en[m]) ch_bit[tx_cw[m]] = tx_bit[m];
  end

  for (genvar c = 0; c < N; c++) begin : g_spread
    logic wchip;
    walsh_chip_gen #(.N(N), .CWW(CWW)) u_walsh (
      .cw(CWW'(c)), .chip_idx(chip_idx), .chip(wchip));
    assign ch_chip[c] = ch_bit[c] ^ wchip;
  end

  always_comb begin
    sum_d = '0;
    for (int c = 0; c < N; c++) sum_d = sum_d + KW'(ch_chip[c]);
  end

  always_ff @(posedge clk)
    if (!rst_n) sum_chip <= '0;
    else        sum_chip <= sum_d;

  // Codeword conflicts are what the arbiter resolves: never two active
  // transmitters on one codeword.
  for (genvar a = 0; a < M; a++) begin : g_chk_a
    for (genvar b = a + 1; b < M; b++) begin : g_chk_b
      a_cw_conflict: assert property (@(posedge clk) disable iff (!rst_n)
          !(tx_en[a] && tx_en[b] && tx_cw[a] == tx_cw[b]))
        else $error("cdma_encoder: PEs %0d and %0d share codeword %0d", a, b, tx_cw[a]);
    end
  end
endmodule

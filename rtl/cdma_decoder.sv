// cdma_decoder -- per-PE CDMA despreader (the +/- and ACC of a receiver).
//
// The bus carries, each chip interval, the count K of chips equal to 1 among
// the N code channels, i.e. the bipolar sum S = N - 2K. Over the N sum-chips
// of one CDMA packet the decoder accumulates S with the sign given by its
// codeword chip (+S for a 0 chip, -S for a 1 chip). Orthogonality of the
// Walsh rows cancels every other channel, so the total is +N for a data bit 0
// and -N for a data bit 1; the bit is decided by the sign.
//
// Interface: 'en' and 'chip_idx' describe the sum-chip currently on the bus
// (the caller aligns them with the one-cycle encoder latency). The
// accumulator restarts at chip 0. At chip N-1 'bit_valid' pulses in the same
// cycle with the decided 'bit_out' (the last term is added combinationally).
// 'corr' exposes the full correlation value at that cycle.
module cdma_decoder #(
  parameter int unsigned N   = 8,
  parameter int unsigned CWW = cdma_pkg::id_width(N),
  parameter int unsigned KW  = cdma_pkg::sum_width(N),
  parameter int unsigned AW  = cdma_pkg::sum_width(N) + cdma_pkg::id_width(N) + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,        // a sum-chip of the received stream is on the bus
  input  logic [CWW-1:0]        chip_idx,  // its position in the packet
  input  logic [CWW-1:0]        cw,        // codeword of the received stream
  input  logic [KW-1:0]         sum_chip,
  output logic                  bit_valid,
  output logic                  bit_out,
  output logic signed [AW-1:0]  corr
);
  logic                 wchip;
  logic signed [AW-1:0] term, acc, acc_next;

  walsh_chip_gen #(.N(N), .CWW(CWW)) u_walsh (.cw(cw), .chip_idx(chip_idx), .chip(wchip));

  always_comb begin
    term     = AW'(N) - (AW'(sum_chip) <<< 1);       // bipolar sum N - 2K
    if (wchip) term = -term;
    acc_next = ((chip_idx == '0) ? '0 : acc) + term;
    corr      = acc_next;
    bit_valid = en && (chip_idx == CWW'(N - 1));
    bit_out   = acc_next < 0;
  end

  always_ff @(posedge clk)
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
endmodule

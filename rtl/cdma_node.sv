// cdma_node -- the Tx/Rx bus interface of one processing element.
//
// Transmit side: the PE writes the whole data stream, byte by byte, into the
// transmit FIFO before it requests a connection from its ring-arbiter
// element. While the element reports tx_active, the serializer presents one
// data bit per N chip intervals to the central encoder, least significant
// bit of each byte first, and pops a byte after its eighth bit.
//
// Receive side: while the element reports rx_on, the CDMA decoder despreads
// the sum-chips on the bus with the codeword announced in the destination
// token. Decoded bits are assembled, least significant first, into words of
// P_BYTES bytes; each complete word is stored with the source PE identifier
// in the receive buffer, which the PE reads with rx_pop. When reception
// stops, the bits decoded after the source finished but before the stop
// reached this PE are discarded and rx_discard pulses: a partly assembled
// word, or a whole word completing in the cycle the stop is seen (the
// source ends on a ring-interval boundary and the stop arrives exactly one
// ring interval later, i.e. M chips or M/N bits, at most one word).
//
// Timing: the encoder registers its sum, so the sum-chip of chip interval t
// is on the bus at t+1. The chip position is delayed by one register to
// match; rx_on from the element is already registered and needs no delay.
// The bit order, the buffer depths and the storage of the source identifier
// with each word are choices of this design.
module cdma_node #(
  parameter int unsigned M        = 16,
  parameter int unsigned N        = 8,
  parameter int unsigned P_BYTES  = 1,
  parameter int unsigned TX_DEPTH = 16,
  parameter int unsigned RX_DEPTH = 8,
  parameter int unsigned IDW      = cdma_pkg::id_width(M),
  parameter int unsigned CWW      = cdma_pkg::id_width(N),
  parameter int unsigned KW       = cdma_pkg::sum_width(N),
  parameter int unsigned WB       = 8 * P_BYTES,
  parameter int unsigned TXC_W    = $clog2(TX_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // PE: transmit FIFO
  input  logic              tx_wr,
  input  logic [7:0]        tx_wdata,
  output logic              tx_full,
  output logic [TXC_W-1:0]  tx_level,
  // PE: receive buffer
  output logic              rx_valid,
  output logic [WB-1:0]     rx_word,
  output logic [IDW-1:0]    rx_word_src,
  input  logic              rx_pop,
  output logic              rx_discard,
  // ring-arbiter element
  input  logic              arb_tx_active,
  input  logic              arb_tx_bit_last,
  input  logic [CWW-1:0]    arb_chip_idx,
  input  logic              arb_rx_on,
  input  logic              arb_rx_stop,
  input  logic [CWW-1:0]    arb_rx_cw,
  input  logic [IDW-1:0]    arb_rx_src,
  // central encoder and CDMA bus
  output logic              enc_bit,
  input  logic [KW-1:0]     sum_chip
);
  // ---------------- transmit ----------------
  logic [7:0] tx_head;
  logic       tx_empty;
  logic [2:0] bidx;
  logic       tx_pop;

  assign tx_pop = arb_tx_bit_last && (bidx == 3'd7);

  sync_fifo #(.W(8), .DEPTH(TX_DEPTH)) u_txq (
    .clk, .rst_n,
    .push(tx_wr), .wdata(tx_wdata), .pop(tx_pop),
    .rdata(tx_head), .empty(tx_empty), .full(tx_full), .count(tx_level));

  always_ff @(posedge clk)
    if (!rst_n)               bidx <= '0;
    else if (arb_tx_bit_last) bidx <= bidx + 1'b1;

  assign enc_bit = tx_head[bidx];

  a_tx_underrun: assert property (@(posedge clk) disable iff (!rst_n)
      !(arb_tx_active && tx_empty))
    else $error("cdma_node: transmit FIFO ran empty during a stream");

  // ---------------- receive ----------------
  logic [CWW-1:0] ph_d;
  logic           dec_valid, dec_bit;
  logic signed [KW+CWW+1:0] dec_corr;
  logic [WB-2:0]  shreg;        // bits received so far, newest at the top
  logic [$clog2(WB+1)-1:0] nbits;
  logic           word_done, word_keep;
  logic           rx_full;

  always_ff @(posedge clk)
    if (!rst_n) ph_d <= '0;
    else        ph_d <= arb_chip_idx;

  cdma_decoder #(.N(N), .CWW(CWW), .KW(KW)) u_dec (
    .clk, .rst_n,
    .en(arb_rx_on), .chip_idx(ph_d), .cw(arb_rx_cw), .sum_chip,
    .bit_valid(dec_valid), .bit_out(dec_bit), .corr(dec_corr));

  assign word_done  = dec_valid && (nbits == $bits(nbits)'(WB - 1));
  // A word that completes in the very cycle the stop is seen was made of
  // chips sent after the stream ended (possible when M = 8*P_BYTES*N).
  assign word_keep  = word_done && !arb_rx_stop;
  assign rx_discard = (!arb_rx_on && (nbits != '0)) || (word_done && arb_rx_stop);

  always_ff @(posedge clk)
    if (!rst_n) begin
      nbits <= '0;
      shreg <= '0;
    end else if (!arb_rx_on) begin
      nbits <= '0;
    end else if (dec_valid) begin
      shreg <= {dec_bit, shreg[WB-2:1]};
      nbits <= word_done ? '0 : nbits + 1'b1;
    end

  logic [IDW+WB-1:0] rxq_in, rxq_out;
  logic              rx_empty;
  logic [$clog2(RX_DEPTH):0] rx_level;

  assign rxq_in = {arb_rx_src, dec_bit, shreg};

  sync_fifo #(.W(IDW + WB), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst_n,
    .push(word_keep), .wdata(rxq_in), .pop(rx_pop),
    .rdata(rxq_out), .empty(rx_empty), .full(rx_full), .count(rx_level));

  assign rx_valid    = !rx_empty;
  assign rx_word     = rxq_out[WB-1:0];
  assign rx_word_src = rxq_out[IDW+WB-1:WB];

  a_rx_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(word_keep && rx_full))
    else $error("cdma_node: receive buffer overrun");
  // every despread bit must be a clean +/-N correlation
  a_clean_bit: assert property (@(posedge clk) disable iff (!rst_n)
      !dec_valid || dec_corr == $bits(dec_corr)'(N) || dec_corr == -$bits(dec_corr)'(N))
    else $error("cdma_node: correlation %0d is not +/-N", dec_corr);
endmodule

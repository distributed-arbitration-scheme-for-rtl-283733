// cdma_bus_system -- M processing-element interfaces on an N-channel
// dynamic CDMA bus with a distributed token-ring arbiter.
//
// Each PE owns a cdma_node (transmit FIFO, serializer, CDMA decoder, receive
// buffer). A connection is requested from the ring arbiter with a
// destination PE and a stream length; the ring reserves the destination,
// finds a free codeword for the source (moving codeword ownership between
// PEs when needed) and tells source and destination when the stream runs.
// The central encoder spreads every active stream with its codeword and
// puts the k-bit sum-chip on the shared bus, which every node despreads.
// Up to N streams run at once, each at 1/N bit per chip interval.
//
// cw_count selects how many of the N codewords the system uses; it is read
// while rst_n is low. Interface, all arrays indexed by PE number:
//   tx_wr/tx_wdata/tx_full/tx_level  fill the transmit FIFO with the stream
//                                    (whole stream before the request)
//   tx_req/tx_dest/tx_len/tx_ready   connection request; accepted while
//                                    tx_ready, tx_len counts P_BYTES words
//   tx_done                          pulse when the destination is released
//   rx_valid/rx_word/rx_word_src/rx_pop  received words and their source
//   rx_discard                       pulse when a partial word is dropped
//   sum_chip                         the CDMA bus, for observation
//   cw_*, rx_start/stop, ev_*        codeword ownership and protocol events
//                                    of each ring element, for observation
// The chip counter here and the token counters of the arbiter start
// together at reset, so packets line up with ring intervals (M is a
// multiple of N). The defaults, 16 PEs and 8 codewords, follow the
// document's 16-element implementation and its finding that M = 2N is the
// best configuration.
module cdma_bus_system #(
  parameter int unsigned M        = 16,
  parameter int unsigned N        = 8,
  parameter int unsigned P_BYTES  = 1,
  parameter int unsigned LW       = 8,
  parameter int unsigned TX_DEPTH = 16,
  parameter int unsigned RX_DEPTH = 8,
  parameter int unsigned IDW      = cdma_pkg::id_width(M),
  parameter int unsigned CWW      = cdma_pkg::id_width(N),
  parameter int unsigned KW       = cdma_pkg::sum_width(N),
  parameter int unsigned WB       = 8 * P_BYTES,
  parameter int unsigned TXC_W    = $clog2(TX_DEPTH) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [CWW:0]            cw_count,   // codewords in use (1..N), sampled during reset
  input  logic [M-1:0]            tx_wr,
  input  logic [M-1:0][7:0]       tx_wdata,
  output logic [M-1:0]            tx_full,
  output logic [M-1:0][TXC_W-1:0] tx_level,
  input  logic [M-1:0]            tx_req,
  input  logic [M-1:0][IDW-1:0]   tx_dest,
  input  logic [M-1:0][LW-1:0]    tx_len,
  output logic [M-1:0]            tx_ready,
  output logic [M-1:0]            tx_done,
  output logic [M-1:0]            rx_valid,
  output logic [M-1:0][WB-1:0]    rx_word,
  output logic [M-1:0][IDW-1:0]   rx_word_src,
  input  logic [M-1:0]            rx_pop,
  output logic [M-1:0]            rx_discard,
  output logic [KW-1:0]           sum_chip,
  // arbitration state and events, for observation
  output logic [M-1:0]            cw_valid,
  output logic [M-1:0]            cw_busy,
  output logic [M-1:0][CWW-1:0]   cw_id,
  output logic [M-1:0]            rx_start,
  output logic [M-1:0]            rx_stop,
  output logic [M-1:0]            ev_dest_busy,
  output logic [M-1:0]            ev_search,
  output logic [M-1:0]            ev_cw_give,
  output logic [M-1:0]            ev_cw_take,
  output logic [M-1:0]            ev_cw_none
);
  logic [M-1:0]          tx_active, tx_bit_last, rx_on;
  logic [M-1:0][CWW-1:0] tx_cw, chip_idx, rx_cw;
  logic [M-1:0][IDW-1:0] rx_src;
  logic [M-1:0]          enc_bit;
  logic [CWW-1:0]        chip_cnt;

  ring_arbiter #(.M(M), .N(N), .P_BYTES(P_BYTES), .LW(LW), .IDW(IDW), .CWW(CWW)) u_arb (
    .clk, .rst_n, .cw_count,
    .tx_req, .tx_dest, .tx_len, .tx_ready, .tx_done,
    .tx_active, .tx_cw, .tx_bit_last, .chip_idx,
    .rx_on, .rx_cw, .rx_src, .rx_start, .rx_stop,
    .cw_valid, .cw_busy, .cw_id,
    .ev_dest_busy, .ev_search, .ev_cw_give, .ev_cw_take, .ev_cw_none);

  for (genvar m = 0; m < M; m++) begin : g_node
    cdma_node #(.M(M), .N(N), .P_BYTES(P_BYTES), .TX_DEPTH(TX_DEPTH), .RX_DEPTH(RX_DEPTH),
                .IDW(IDW), .CWW(CWW), .KW(KW), .WB(WB), .TXC_W(TXC_W)) u_node (
      .clk, .rst_n,
      .tx_wr(tx_wr[m]), .tx_wdata(tx_wdata[m]), .tx_full(tx_full[m]), .tx_level(tx_level[m]),
      .rx_valid(rx_valid[m]), .rx_word(rx_word[m]), .rx_word_src(rx_word_src[m]),
      .rx_pop(rx_pop[m]), .rx_discard(rx_discard[m]),
      .arb_tx_active(tx_active[m]), .arb_tx_bit_last(tx_bit_last[m]),
      .arb_chip_idx(chip_idx[m]), .arb_rx_on(rx_on[m]), .arb_rx_cw(rx_cw[m]),
      .arb_rx_src(rx_src[m]), .arb_rx_stop(rx_stop[m]),
      .enc_bit(enc_bit[m]), .sum_chip(sum_chip));
  end

  // chip position of the packet on the encoder inputs (token interval mod N)
  always_ff @(posedge clk)
    if (!rst_n) chip_cnt <= '0;
    else        chip_cnt <= (chip_cnt == CWW'(N - 1)) ? '0 : chip_cnt + 1'b1;

  cdma_encoder #(.M(M), .N(N), .CWW(CWW), .KW(KW)) u_enc (
    .clk, .rst_n, .chip_idx(chip_cnt),
    .tx_en(tx_active), .tx_cw(tx_cw), .tx_bit(enc_bit), .sum_chip);

  a_chip_sync: assert property (@(posedge clk) disable iff (!rst_n) chip_idx[0] == chip_cnt)
    else $error("cdma_bus_system: encoder chip counter out of step with the ring");
endmodule

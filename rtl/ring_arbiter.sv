// ring_arbiter -- the distributed arbitration unit of the dynamic CDMA bus.
//
// M identical ring_arbiter_element instances, element m attached to PE m,
// with the token output of element m wired to the token input of element
// (m+1) mod M. The ring therefore has only short neighbour-to-neighbour
// links; there are no request/grant lines to a central arbiter. The elements
// together resolve destination conflicts (one source per destination, with
// round-robin priority) and hand the N codewords to the PEs that transmit.
//
// All per-PE ports are arrays indexed by PE number and have exactly the
// meaning and timing of the corresponding ring_arbiter_element ports.
module ring_arbiter #(
  parameter int unsigned M       = 16,
  parameter int unsigned N       = 8,
  parameter int unsigned P_BYTES = 1,
  parameter int unsigned LW      = 8,
  parameter int unsigned IDW     = cdma_pkg::id_width(M),
  parameter int unsigned CWW     = cdma_pkg::id_width(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [CWW:0]          cw_count,   // codewords in use, sampled during reset
  input  logic [M-1:0]          tx_req,
  input  logic [M-1:0][IDW-1:0] tx_dest,
  input  logic [M-1:0][LW-1:0]  tx_len,
  output logic [M-1:0]          tx_ready,
  output logic [M-1:0]          tx_done,
  output logic [M-1:0]          tx_active,
  output logic [M-1:0][CWW-1:0] tx_cw,
  output logic [M-1:0]          tx_bit_last,
  output logic [M-1:0][CWW-1:0] chip_idx,
  output logic [M-1:0]          rx_on,
  output logic [M-1:0][CWW-1:0] rx_cw,
  output logic [M-1:0][IDW-1:0] rx_src,
  output logic [M-1:0]          rx_start,
  output logic [M-1:0]          rx_stop,
  output logic [M-1:0]          cw_valid,
  output logic [M-1:0]          cw_busy,
  output logic [M-1:0][CWW-1:0] cw_id,
  output logic [M-1:0]          ev_dest_busy,
  output logic [M-1:0]          ev_search,
  output logic [M-1:0]          ev_cw_give,
  output logic [M-1:0]          ev_cw_take,
  output logic [M-1:0]          ev_cw_none
);
  localparam int unsigned TOKW = 4 + CWW + IDW;

  logic [M-1:0][TOKW-1:0] tok;   // tok[m] = token leaving element m

  for (genvar m = 0; m < M; m++) begin : g_elem
    ring_arbiter_element #(
      .M(M), .N(N), .ID(m), .P_BYTES(P_BYTES), .LW(LW), .IDW(IDW), .CWW(CWW)
    ) u_elem (
      .clk, .rst_n, .cw_count,
      .tok_in      (tok[(m + M - 1) % M]),
      .tok_out     (tok[m]),
      .tx_req      (tx_req[m]),
      .tx_dest     (tx_dest[m]),
      .tx_len      (tx_len[m]),
      .tx_ready    (tx_ready[m]),
      .tx_done     (tx_done[m]),
      .tx_active   (tx_active[m]),
      .tx_cw       (tx_cw[m]),
      .tx_bit_last (tx_bit_last[m]),
      .chip_idx    (chip_idx[m]),
      .rx_on       (rx_on[m]),
      .rx_cw       (rx_cw[m]),
      .rx_src      (rx_src[m]),
      .rx_start    (rx_start[m]),
      .rx_stop     (rx_stop[m]),
      .cw_valid    (cw_valid[m]),
      .cw_busy     (cw_busy[m]),
      .cw_id       (cw_id[m]),
      .ev_dest_busy(ev_dest_busy[m]),
      .ev_search   (ev_search[m]),
      .ev_cw_give  (ev_cw_give[m]),
      .ev_cw_take  (ev_cw_take[m]),
      .ev_cw_none  (ev_cw_none[m])
    );
  end

  // Codewords are never created or lost: those owned (V) plus those in
  // transit inside a token (C) always number cw_count as set at reset. tok_c_q counts the C bits of
  // the tokens that are in the token registers this cycle.
  logic [CWW+1:0] tok_c_q, cw_total;
  logic [CWW+1:0] tok_c_n, v_n;
  always_comb begin
    tok_c_n = '0;
    v_n     = '0;
    for (int m = 0; m < M; m++) begin
      tok_c_n = tok_c_n + (CWW+2)'(tok[m][TOKW-3]);   // C field
      v_n     = v_n + (CWW+2)'(cw_valid[m]);
    end
  end
  always_ff @(posedge clk)
    if (!rst_n) begin
      tok_c_q  <= '0;
      cw_total <= (cw_count > (CWW+1)'(N)) ? (CWW+2)'(N) : (CWW+2)'(cw_count);
    end else begin
      tok_c_q  <= tok_c_n;
    end

  a_cw_conserved: assert property (@(posedge clk) disable iff (!rst_n)
      v_n + tok_c_q == cw_total)
    else $error("ring_arbiter: %0d owned + %0d in transit codewords, expected %0d", v_n, tok_c_q, cw_total);
endmodule

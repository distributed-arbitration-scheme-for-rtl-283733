// ring_arbiter_element -- one element of the token-ring arbiter of a dynamic
// CDMA bus (the arbitration logic attached to PE number ID).
//
// M tokens circulate through the token registers (TR) of the M elements, one
// hop per clock (token interval = chip interval). Element ID holds token
// T_((ID-k) mod M) at token interval k; a modulo-M down-counter started at ID
// tells which token is in the TR. A ring interval is M token intervals and
// starts when every element holds its own token. A token carries R
// (destination reserved), L (last: stream terminating), S (codeword search),
// C (CW holds a valid codeword), CW (codeword identifier) and ID (source PE).
// The element also keeps a codeword register R_CW with flags V (owns a
// codeword) and B (codeword in use).
//
// Every cycle the token in the TR is processed combinationally and the result
// is passed to the next element's TR:
//  * RX process, any token: a search token (S=1, C=0) takes this element's
//    codeword when V=1 and B=0; the element then drops ownership.
//  * RX process, own token: R=1, S=0, C=0, L=0 starts reception (codeword
//    from CW, source from ID); L=1 stops it.
//  * TX process, token of the destination j: wait for R=0, set R; with a
//    codeword, write it to CW; without one, set S and, on later passes, wait
//    for C=1 and take CW. Then clear S/C, write ID, set B, wait for the next
//    ring interval and transmit len*8*P_BYTES bits (N chips each). After
//    that, clear B, set L on the next pass of T_j and clear R and L on the
//    pass after.
// RX work on a token is done before TX work on the same token.
//
// Follows the document: the token fields, the registers, the order of the
// two pseudocode processes, transmission starting at the ring interval after
// the reservation, and the two-step termination. Own choices: B is cleared
// as soon as the last chip is sent (the document's procedure never clears
// it), the start condition also requires L=0 and an idle receiver, PEs
// 0..C-1 own codewords 0..C-1 after reset, where C = cw_count (at most N)
// is set by software on a pin sampled during reset, and the transmit
// request is a level-sensitive req/ready handshake.
//
// Interface timing: tok_out is combinational from the TR; tx_active,
// tx_cw and chip_idx describe the chip being sent in this cycle; rx_on is
// registered, so it is high for the cycles whose bus sum-chip (one cycle
// of encoder latency) belongs to the received stream.
module ring_arbiter_element #(
  parameter int unsigned M       = 16,
  parameter int unsigned N       = 8,
  parameter int unsigned ID      = 0,
  parameter int unsigned P_BYTES = 1,
  parameter int unsigned LW      = 8,
  parameter int unsigned IDW     = cdma_pkg::id_width(M),
  parameter int unsigned CWW     = cdma_pkg::id_width(N),
  parameter int unsigned TOKW    = 4 + CWW + IDW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CWW:0]     cw_count,    // codewords in use, sampled during reset
  // arbitration ring
  input  logic [TOKW-1:0]  tok_in,
  output logic [TOKW-1:0]  tok_out,
  // transmit request from the PE
  input  logic             tx_req,
  input  logic [IDW-1:0]   tx_dest,
  input  logic [LW-1:0]    tx_len,      // stream length in P_BYTES-byte words, >= 1
  output logic             tx_ready,
  output logic             tx_done,     // pulse: destination released, TX idle again
  // encoder side
  output logic             tx_active,   // this PE's chip is on the encoder input now
  output logic [CWW-1:0]   tx_cw,
  output logic             tx_bit_last, // last chip of the current data bit
  output logic [CWW-1:0]   chip_idx,    // chip position within the CDMA packet
  // decoder side
  output logic             rx_on,
  output logic [CWW-1:0]   rx_cw,
  output logic [IDW-1:0]   rx_src,
  output logic             rx_start,    // pulse: own token says a stream starts now
  output logic             rx_stop,     // pulse: own token carries L
  // codeword register, for observation
  output logic             cw_valid,
  output logic             cw_busy,
  output logic [CWW-1:0]   cw_id,
  // protocol events, for observation
  output logic             ev_dest_busy,  // destination token seen with R=1
  output logic             ev_search,     // codeword search started (S set)
  output logic             ev_cw_give,    // this element handed its codeword over
  output logic             ev_cw_take,    // this element received a codeword
  output logic             ev_cw_none     // search token came back without a codeword
);
  typedef struct packed {
    logic           r;
    logic           l;
    logic           c;
    logic           s;
    logic [CWW-1:0] cw;
    logic [IDW-1:0] id;
  } token_t;

  typedef enum logic [2:0] {
    TX_IDLE, TX_RESERVE, TX_SEARCH, TX_WAIT_RING, TX_XMIT, TX_WAIT_L, TX_RELEASE
  } tx_state_t;

  localparam int unsigned BW = LW + $clog2(8 * P_BYTES) + 1;  // bit counter width

  token_t             tr;            // token register
  token_t             t;             // token after this element's processing
  logic [IDW-1:0]     cnt;           // identifier of the token in the TR
  logic [CWW-1:0]     rcw;           // codeword register
  logic               v_flag, b_flag;
  tx_state_t          state, state_n;
  logic [IDW-1:0]     dest;
  logic [BW-1:0]      bits_left;
  logic               own_tok, dest_tok, ring_next;
  logic               give, take, claim, start_rx, stop_rx;
  logic [IDW:0]       kpos;

  localparam logic [IDW-1:0] MY_ID   = IDW'(ID);
  localparam logic [IDW-1:0] NEXT_ID = IDW'((ID + 1) % M);

  always_comb begin
    own_tok   = (cnt == MY_ID);
    dest_tok  = (cnt == dest);
    ring_next = (cnt == NEXT_ID);           // next cycle starts a ring interval
    kpos      = (IDW+1)'(ID) + (IDW+1)'(M) - (IDW+1)'(cnt);
    if (kpos >= (IDW+1)'(M)) kpos = kpos - (IDW+1)'(M);
    chip_idx  = CWW'(kpos % (IDW+1)'(N));
  end

  // Token processing: RX process first, then TX process.
  always_comb begin
    t            = tr;
    give         = 1'b0;
    take         = 1'b0;
    claim        = 1'b0;
    start_rx     = 1'b0;
    stop_rx      = 1'b0;
    ev_dest_busy = 1'b0;
    ev_search    = 1'b0;
    ev_cw_none   = 1'b0;
    state_n      = state;
    tx_done      = 1'b0;

    // RX: answer a codeword request with an owned, unused codeword
    if (t.s && !t.c && v_flag && !b_flag) begin
      t.cw = rcw;
      t.c  = 1'b1;
      t.s  = 1'b0;
      give = 1'b1;
    end
    // RX: connection start / termination carried by the own token
    if (own_tok) begin
      if (t.r && !t.s && !t.c && !t.l && !rx_on) start_rx = 1'b1;
      else if (t.l && rx_on)                     stop_rx  = 1'b1;
    end

    // TX
    unique case (state)
      TX_IDLE:
        if (tx_req) state_n = TX_RESERVE;
      TX_RESERVE:
        if (dest_tok) begin
          if (t.r) ev_dest_busy = 1'b1;
          else begin
            t.r = 1'b1;
            if (v_flag) begin
              t.cw  = rcw;
              claim = 1'b1;
            end else begin
              t.s       = 1'b1;
              ev_search = 1'b1;
              state_n   = TX_SEARCH;
            end
          end
        end
      TX_SEARCH:
        if (dest_tok) begin
          if (t.c) take = 1'b1;
          else     ev_cw_none = 1'b1;
        end
      TX_WAIT_RING:
        if (ring_next) state_n = TX_XMIT;
      TX_XMIT:
        if (chip_idx == CWW'(N - 1) && bits_left == BW'(1)) state_n = TX_WAIT_L;
      TX_WAIT_L:
        if (dest_tok) begin
          t.l     = 1'b1;
          state_n = TX_RELEASE;
        end
      TX_RELEASE:
        if (dest_tok) begin
          t.r     = 1'b0;
          t.l     = 1'b0;
          state_n = TX_IDLE;
          tx_done = 1'b1;
        end
      default: state_n = TX_IDLE;
    endcase
    // common end of both reservation paths (codeword known)
    if (claim || take) begin
      t.c     = 1'b0;
      t.s     = 1'b0;
      t.id    = MY_ID;
      state_n = ring_next ? TX_XMIT : TX_WAIT_RING;
    end
  end

  always_comb begin
    tok_out     = t;
    tx_ready    = (state == TX_IDLE);
    tx_active   = (state == TX_XMIT);
    tx_cw       = rcw;
    tx_bit_last = tx_active && (chip_idx == CWW'(N - 1));
    rx_start    = start_rx;
    rx_stop     = stop_rx;
    cw_valid    = v_flag;
    cw_busy     = b_flag;
    cw_id       = rcw;
    ev_cw_give  = give;
    ev_cw_take  = take;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tr        <= '0;
      cnt       <= MY_ID;
      rcw       <= CWW'(ID % N);
      v_flag    <= (ID < N) && ((CWW+1)'(ID % N) < cw_count);
      b_flag    <= 1'b0;
      state     <= TX_IDLE;
      dest      <= '0;
      bits_left <= '0;
      rx_on     <= 1'b0;
      rx_cw     <= '0;
      rx_src    <= '0;
    end else begin
      tr    <= tok_in;
      cnt   <= (cnt == '0) ? IDW'(M - 1) : cnt - 1'b1;
      state <= state_n;
      if (state == TX_IDLE && tx_req) begin
        dest      <= tx_dest;
        bits_left <= BW'(tx_len) * BW'(8 * P_BYTES);
      end
      if (give) v_flag <= 1'b0;
      if (take) begin
        rcw    <= tr.cw;
        v_flag <= 1'b1;
      end
      if (claim || take) b_flag <= 1'b1;
      if (state == TX_XMIT && chip_idx == CWW'(N - 1)) begin
        bits_left <= bits_left - 1'b1;
        if (bits_left == BW'(1)) b_flag <= 1'b0;
      end
      if (start_rx) begin
        rx_on  <= 1'b1;
        rx_cw  <= tr.cw;
        rx_src <= tr.id;
      end else if (stop_rx) begin
        rx_on  <= 1'b0;
      end
    end
  end

  // Rules of the protocol
  a_len:  assert property (@(posedge clk) disable iff (!rst_n)
            !(state == TX_IDLE && tx_req && tx_len == '0))
          else $error("ring_arbiter_element %0d: zero-length stream requested", ID);
  a_self: assert property (@(posedge clk) disable iff (!rst_n)
            !(state == TX_IDLE && tx_req && tx_dest == MY_ID))
          else $error("ring_arbiter_element %0d: stream addressed to itself", ID);
  a_own:  assert property (@(posedge clk) disable iff (!rst_n) !b_flag || v_flag)
          else $error("ring_arbiter_element %0d: codeword in use but not owned", ID);

  initial begin
    assert (M % N == 0 && N <= M)
      else $error("ring_arbiter_element: M=%0d must be a multiple of N=%0d", M, N);
    assert (8 * P_BYTES * N >= M)
      else $error("ring_arbiter_element: P_BYTES=%0d is below ceil(M/(8N))", P_BYTES);
    // Bits decoded between the end of a stream and the stop must not form
    // a whole word before the stop is seen: streams end on ring-interval
    // boundaries, or a word is long enough to cover two ring intervals.
    assert ((8 * P_BYTES * N) % M == 0 || 8 * P_BYTES * N >= 2 * M)
      else $error("ring_arbiter_element: P_BYTES=%0d too small for M=%0d, N=%0d", P_BYTES, M, N);
  end
endmodule

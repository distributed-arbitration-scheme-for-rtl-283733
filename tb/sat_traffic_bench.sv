// sat_traffic_bench -- one complete bus system of a given size under
// saturated uniform traffic, for testbenches that compare sizes.
//
// It instantiates cdma_bus_system with M PEs, N codewords and P_BYTES-byte
// words. After rst_n rises, every PE keeps a 64-bit data stream to a random
// other PE in flight. When its previous stream has been released, it fills
// the transmit FIFO with 8 random bytes and requests the next one. Every
// received word is compared, in order, with the bytes its source queued for
// that destination. Words are P_BYTES bytes, and the first byte sent is the
// least significant.
//
// Timing: after a warm-up of WARM cycles, the delivered data bits are
// counted for MEAS cycles. The bench then raises done and holds bt_milli,
// the bus throughput in thousandths of a bit per chip interval, and dsl,
// the mean data-stream latency in chip intervals: from the cycle a request
// is raised to the cycle the last word of that stream leaves the receive
// buffer, over the streams that end inside the window. checks and
// failures count the word comparisons and can be read at any time. The
// traffic pattern and the 64-bit stream length follow the published
// evaluation; the warm-up and measuring windows are this bench's choice.
module sat_traffic_bench #(
  parameter int unsigned M       = 16,
  parameter int unsigned N       = 8,
  parameter int unsigned P_BYTES = 1,
  parameter int unsigned WARM    = 2000,
  parameter int unsigned MEAS    = 20000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   bt_milli,
  output int   dsl,
  output int   checks,
  output int   failures
);
  import cdma_pkg::*;
  localparam int unsigned LW = 8, TX_DEPTH = 16;
  localparam int unsigned IDW = id_width(M), CWW = id_width(N), KW = sum_width(N);
  localparam int unsigned WB = 8 * P_BYTES, TXC_W = $clog2(TX_DEPTH) + 1;
  localparam int unsigned SBYTES = 8;                 // 64-bit streams
  localparam int unsigned SLEN = SBYTES / P_BYTES;    // words per stream

  logic [CWW:0] cw_count;
  assign cw_count = (CWW+1)'(N);

  logic [M-1:0]            tx_wr, tx_full, tx_req, tx_ready, tx_done;
  logic [M-1:0][7:0]       tx_wdata;
  logic [M-1:0][TXC_W-1:0] tx_level;
  logic [M-1:0][IDW-1:0]   tx_dest;
  logic [M-1:0][LW-1:0]    tx_len;
  logic [M-1:0]            rx_valid, rx_pop, rx_discard;
  logic [M-1:0][WB-1:0]    rx_word;
  logic [M-1:0][IDW-1:0]   rx_word_src;
  logic [KW-1:0]           sum_chip;
  logic [M-1:0]            cw_valid, cw_busy, rx_start, rx_stop;
  logic [M-1:0][CWW-1:0]   cw_id;
  logic [M-1:0]            ev_dest_busy, ev_search, ev_cw_give, ev_cw_take, ev_cw_none;

  cdma_bus_system #(.M(M), .N(N), .P_BYTES(P_BYTES), .LW(LW), .TX_DEPTH(TX_DEPTH)) dut (.*);

  typedef enum int { P_OFF, P_FILL, P_REQ, P_WAIT } pstate_t;
  pstate_t         pst   [M];
  logic [7:0]      pdata [M][$];
  logic [WB-1:0]   expq  [M][$];
  int              expd  [M][$];
  longint          bits_rx = 0, kc = 0, lat_sum = 0, lat_n = 0;
  longint          t_req [M];
  bit              meas_on = 1'b0;

  initial begin
    checks = 0; failures = 0; done = 1'b0; bt_milli = 0; dsl = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < M; m++) begin
        pst[m] <= P_OFF; tx_wr[m] <= 1'b0; tx_req[m] <= 1'b0;
        tx_wdata[m] <= '0; tx_dest[m] <= '0; tx_len[m] <= '0;
      end
    end else begin
      kc <= kc + 1;
      for (int m = 0; m < M; m++) begin
        tx_wr[m] <= 1'b0;
        case (pst[m])
          P_OFF: begin
            int d;
            logic [WB-1:0] w;
            do d = $urandom_range(M - 1); while (d == m);
            for (int k = 0; k < SLEN; k++) begin
              for (int b = 0; b < P_BYTES; b++) begin
                logic [7:0] v;
                v = 8'($urandom);
                pdata[m].push_back(v);
                w[8*b +: 8] = v;
              end
              expq[m].push_back(w); expd[m].push_back(d);
            end
            tx_dest[m] <= IDW'(d);
            tx_len[m]  <= LW'(SLEN);
            pst[m]     <= P_FILL;
          end
          P_FILL:
            if (pdata[m].size() != 0) begin
              tx_wr[m] <= 1'b1; tx_wdata[m] <= pdata[m].pop_front();
            end else begin
              tx_req[m] <= 1'b1; pst[m] <= P_REQ; t_req[m] = kc;
            end
          P_REQ:
            if (tx_ready[m] && tx_req[m]) begin
              tx_req[m] <= 1'b0; pst[m] <= P_WAIT;
            end
          P_WAIT:
            if (tx_done[m]) pst[m] <= P_OFF;
        endcase
      end
    end
  end

  assign rx_pop = rx_valid;
  always @(posedge clk)
    if (rst_n)
      for (int d = 0; d < M; d++)
        if (rx_valid[d]) begin
          int s;
          s = int'(rx_word_src[d]);
          bits_rx += longint'(WB);
          checks++;
          if (expq[s].size() == 0) begin
            failures++;
            $display("FAIL: M=%0d N=%0d unexpected word at %0d", M, N, d);
          end else begin
            logic [WB-1:0] e;
            int ed;
            e = expq[s].pop_front(); ed = expd[s].pop_front();
            if (ed != d || rx_word[d] != e) begin
              failures++;
              $display("FAIL: M=%0d N=%0d word from %0d to %0d", M, N, s, d);
            end
            if (expq[s].size() == 0 || expd[s][0] != d) begin   // last word of the stream
              if (meas_on) begin lat_sum += kc - t_req[s]; lat_n++; end
            end
          end
        end

  initial begin
    longint b0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    repeat (WARM) @(posedge clk);
    b0 = bits_rx; meas_on = 1'b1;
    repeat (MEAS) @(posedge clk);
    meas_on = 1'b0;
    bt_milli = int'((bits_rx - b0) * 1000 / longint'(MEAS));
    dsl = (lat_n > 0) ? int'(lat_sum / lat_n) : 0;
    done = 1'b1;
  end
endmodule

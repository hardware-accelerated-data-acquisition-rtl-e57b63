// mac_verify: receive-side MAC check that discards tampered packets.
//
// On the receiving node the same MAC as on the sending side is recomputed
// over each incoming packet and compared with the tag that came with it; a
// packet is released only if the two match, otherwise it is dropped. The
// document states this function for the receive datapath (verify the MAC so
// that tampered packets can be discarded); how it is built is this design's
// choice: a keccak_mac unit hashes the packet while it is written into a
// packet buffer, and the packet becomes visible to the reader only after the
// tag has been checked (store-and-forward, since the tag covers the whole
// packet). Dropping is a rewind of the buffer's write pointer.
//
// Interface: packet words on s_* (valid/ready, 32-bit words, byte mask,
// `last`); the expected tag of that packet on tag_valid/tag_ready/tag (same
// byte order as keccak_mac, it may arrive before or after the packet);
// verified packets on m_*. res_valid pulses once per packet with res_ok set
// if it was passed on. n_pass and n_drop count packets.
//
// Timing: words are accepted at the MAC's rate (one per cycle while a
// 136-byte block fills, then 25 idle cycles). The check takes one cycle
// after both the computed and the expected tag are present. A packet longer
// than DEPTH words cannot be held; it is read in to the end and dropped.
// The buffer is read asynchronously (distributed memory); the buffer size
// is this design's choice (one standard Ethernet payload by default).
module mac_verify
  import auth_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [KEY_BITS-1:0] key,
  input  logic                s_valid,
  output logic                s_ready,
  input  beat_t               s_beat,
  input  logic                tag_valid,
  output logic                tag_ready,
  input  logic [MAC_BITS-1:0] tag,
  output logic                m_valid,
  input  logic                m_ready,
  output beat_t               m_beat,
  output logic                res_valid,
  output logic                res_ok,
  output logic [31:0]         n_pass,
  output logic [31:0]         n_drop
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned PW = IW + 1;   // pointers carry a wrap bit

  typedef enum logic {S_RX, S_CHK} state_e;
  state_e state_q;

  beat_t         mem [DEPTH];
  logic [PW-1:0] wr_q;    // next free slot, packet in progress included
  logic [PW-1:0] wc_q;    // end of the verified packets
  logic [PW-1:0] rd_q;    // next word to read
  logic          big_q;   // current packet did not fit

  logic                mac_in_valid, mac_in_ready, mac_valid, mac_ready;
  logic [MAC_BITS-1:0] mac;
  logic                full, own_full, space, take, store;

  assign full     = ((wr_q - rd_q) == PW'(DEPTH));
  assign own_full = ((wr_q - wc_q) == PW'(DEPTH));
  // room for the word, or the packet is already too big to keep
  assign space    = !full || own_full || big_q;

  assign s_ready      = (state_q == S_RX) && mac_in_ready && space;
  assign mac_in_valid = (state_q == S_RX) && s_valid && space;
  assign take         = s_valid && s_ready;
  assign store        = take && !own_full && !big_q;

  keccak_mac u_mac (
    .clk, .rst_n, .key,
    .s_valid(mac_in_valid), .s_ready(mac_in_ready), .s_beat,
    .mac_valid, .mac_ready, .mac
  );

  logic chk;
  assign chk       = (state_q == S_CHK) && mac_valid && tag_valid;
  assign mac_ready = chk;
  assign tag_ready = chk;
  assign res_valid = chk;
  assign res_ok    = chk && (mac == tag) && !big_q;

  always_ff @(posedge clk) if (store) mem[wr_q[IW-1:0]] <= s_beat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_RX;
      wr_q    <= '0;
      wc_q    <= '0;
      rd_q    <= '0;
      big_q   <= 1'b0;
      n_pass  <= '0;
      n_drop  <= '0;
    end else begin
      if (store) wr_q <= wr_q + 1'b1;
      if (take && own_full) big_q <= 1'b1;
      if (m_valid && m_ready) rd_q <= rd_q + 1'b1;
      case (state_q)
        S_RX: if (take && s_beat.last) state_q <= S_CHK;
        S_CHK: if (chk) begin
          if (res_ok) begin
            wc_q   <= wr_q;
            n_pass <= n_pass + 1'b1;
          end else begin
            wr_q   <= wc_q;
            n_drop <= n_drop + 1'b1;
          end
          big_q   <= 1'b0;
          state_q <= S_RX;
        end
        default: state_q <= S_RX;
      endcase
    end
  end

  assign m_valid = (rd_q != wc_q);
  assign m_beat  = mem[rd_q[IW-1:0]];

  // the buffer never holds more than DEPTH words, and verified data never
  // run ahead of the write pointer
  a_bounds: assert property (@(posedge clk) disable iff (!rst_n)
    ((wr_q - rd_q) <= PW'(DEPTH)) && ((wc_q - rd_q) <= (wr_q - rd_q)));

endmodule

// keccak_mac: keyed Keccak MAC over one packet, held until it is taken.
//
// The MAC of a packet M under key K is SHA3-256(K || M): the 32-byte key is
// absorbed as a prefix of the message, which is a sound MAC construction for
// Keccak because its sponge does not suffer from length extension. The
// document states that a MAC of the video data is computed in-stream with
// Keccak and cached until the end of the packet; the prefix-key construction,
// the SHA3-256 instance and the 256-bit tag are this design's choices.
//
// Interface: the packet arrives on s_* (valid/ready, 32-bit words, byte mask
// `keep` with contiguous low bytes, `last` on the final word). After the
// last word the tag appears on `mac` with mac_valid held until mac_ready.
// Byte 0 of the tag is mac[7:0], the byte order of the SHA3 digest.
//
// Timing: when the first word of a packet is offered, one cycle to load the
// key (sampled then, so a key written between packets applies to the next
// packet), then one word per cycle while the
// 136-byte rate block fills; each full block is followed by a 25-cycle
// permutation during which s_ready is low. A packet of N bytes therefore
// takes about ceil((N+33)/136) * 59 cycles.
module keccak_mac
  import auth_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [KEY_BITS-1:0] key,
  input  logic                s_valid,
  output logic                s_ready,
  input  beat_t               s_beat,
  output logic                mac_valid,
  input  logic                mac_ready,
  output logic [MAC_BITS-1:0] mac
);

  localparam int unsigned RATE_BYTES = KECCAK_RATE_BITS / 8;   // 136

  typedef enum logic [2:0] {S_KEY, S_ABS, S_PERM, S_PAD, S_OUT} state_e;
  state_e state_q;

  logic [1599:0]                 sponge_q;
  logic [KECCAK_RATE_BITS-1:0]   blk_q, blk_wr;
  logic [5:0]                    widx_q;
  logic                          final_q, need_pad_q;

  logic          f_start, f_busy, f_done;
  logic [1599:0] f_out;

  keccak_f1600 u_f (
    .clk, .rst_n,
    .start     (f_start),
    .state_in  (sponge_q ^ {{(1600-KECCAK_RATE_BITS){1'b0}}, blk_q}),
    .state_out (f_out),
    .busy      (f_busy),
    .done      (f_done)
  );

  logic fire;
  assign s_ready = (state_q == S_ABS);
  assign fire    = s_valid && s_ready;

  // Block contents after writing the incoming word (and the padding, if it
  // is the last word and the padding fits in this block).
  always_comb begin
    logic [DW-1:0] w;
    int unsigned   nb, p;
    blk_wr = blk_q;
    w  = '0;
    nb = 0;
    for (int b = 0; b < BW; b++) begin
      if (s_beat.keep[b]) begin
        w[8*b +: 8] = s_beat.data[8*b +: 8];
        nb = b + 1;
      end
    end
    blk_wr[DW*widx_q +: DW] = w;
    p = 32'(widx_q) * BW + nb;
    if (s_beat.last && p < RATE_BYTES) begin
      blk_wr[8*p +: 8]                 = blk_wr[8*p +: 8] ^ SHA3_DOMAIN;
      blk_wr[8*(RATE_BYTES-1) +: 8]    = blk_wr[8*(RATE_BYTES-1) +: 8] ^ 8'h80;
    end
  end

  assign f_start = (state_q == S_PERM) && !f_busy && !f_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_KEY;
      sponge_q   <= '0;
      blk_q      <= '0;
      widx_q     <= '0;
      final_q    <= 1'b0;
      need_pad_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_KEY: if (s_valid) begin
          // the key is taken when the packet's first word is offered
          sponge_q <= '0;
          blk_q    <= {{(KECCAK_RATE_BITS-KEY_BITS){1'b0}}, key};
          widx_q   <= 6'(KEY_WORDS);
          final_q  <= 1'b0;
          state_q  <= S_ABS;
        end
        S_ABS: if (fire) begin
          blk_q <= blk_wr;
          if (s_beat.last) begin
            // full last word in the last slot: padding needs a block of its own
            need_pad_q <= (widx_q == 6'(KECCAK_RATE_WORDS - 1)) && s_beat.keep[BW-1];
            final_q    <= !((widx_q == 6'(KECCAK_RATE_WORDS - 1)) && s_beat.keep[BW-1]);
            state_q    <= S_PERM;
          end else if (widx_q == 6'(KECCAK_RATE_WORDS - 1)) begin
            state_q <= S_PERM;
          end else begin
            widx_q <= widx_q + 6'd1;
          end
        end
        S_PERM: if (f_done) begin
          sponge_q <= f_out;
          blk_q    <= '0;
          widx_q   <= '0;
          if (final_q)         state_q <= S_OUT;
          else if (need_pad_q) state_q <= S_PAD;
          else                 state_q <= S_ABS;
        end
        S_PAD: begin
          blk_q <= {8'h80, {(KECCAK_RATE_BITS-16){1'b0}}, SHA3_DOMAIN};
          need_pad_q <= 1'b0;
          final_q    <= 1'b1;
          state_q    <= S_PERM;
        end
        S_OUT: if (mac_ready) state_q <= S_KEY;
        default: state_q <= S_KEY;
      endcase
    end
  end

  assign mac_valid = (state_q == S_OUT);
  assign mac       = sponge_q[MAC_BITS-1:0];

endmodule

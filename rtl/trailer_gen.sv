// trailer_gen: appends the MAC(s) of the current packet to the parity frame.
//
// It forwards the frame coming from the header unit (header, XOR region,
// MACs of earlier cameras) and, in place of that frame's end, waits for the
// cached MAC of the current video packet and appends it as MAC_WORDS more
// words, the last of which ends the frame. With NMAC = 2 a second cached
// MAC (the optional MAC over the parity path) follows the first. This
// follows the document: the Trailer appends the cached MAC to the existing
// ones. The tag byte order (mac[7:0] first) and the order of the two MACs
// are this design's choices.
//
// Timing: pass-through words move without delay; after the incoming last
// word, the words of MAC i follow one per cycle once mac_valid[i] is high.
// mac_ready[i] pulses with the last word of MAC i; `frame_done` pulses with
// the final word of the frame.
module trailer_gen
  import auth_pkg::*;
#(
  parameter int unsigned NMAC = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s_valid,
  output logic                s_ready,
  input  beat_t               s_beat,
  input  logic [NMAC-1:0]     mac_valid,
  output logic [NMAC-1:0]     mac_ready,
  input  logic [MAC_BITS-1:0] mac [NMAC],
  output logic                o_valid,
  input  logic                o_ready,
  output beat_t               o_beat,
  output logic                frame_done
);

  typedef enum logic {S_PASS, S_MAC} state_e;
  state_e state_q;
  logic [$clog2(MAC_WORDS)-1:0] midx_q;
  localparam int unsigned SW = (NMAC > 1) ? $clog2(NMAC) : 1;
  logic [SW-1:0] sel_q;   // which MAC is being appended
  logic          cur_valid, mac_end;

  assign cur_valid = mac_valid[sel_q];
  assign mac_end   = (midx_q == $bits(midx_q)'(MAC_WORDS - 1));

  always_comb begin
    o_beat     = s_beat;
    o_valid    = 1'b0;
    s_ready    = 1'b0;
    mac_ready  = 1'b0;
    frame_done = 1'b0;
    if (state_q == S_PASS) begin
      o_valid     = s_valid;
      s_ready     = o_ready;
      o_beat.last = 1'b0;
    end else begin
      o_valid     = cur_valid;
      o_beat.data = mac[sel_q][DW*midx_q +: DW];
      o_beat.keep = {BW{1'b1}};
      o_beat.last = mac_end && (sel_q == SW'(NMAC - 1));
      mac_ready[sel_q] = cur_valid && o_ready && mac_end;
      frame_done  = cur_valid && o_ready && o_beat.last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_PASS;
      midx_q  <= '0;
      sel_q   <= '0;
    end else begin
      unique case (state_q)
        S_PASS: if (s_valid && o_ready && s_beat.last) begin
          midx_q  <= '0;
          sel_q   <= '0;
          state_q <= S_MAC;
        end
        S_MAC: if (cur_valid && o_ready) begin
          midx_q <= midx_q + 1'b1;
          if (mac_end) sel_q <= sel_q + 1'b1;
          if (o_beat.last) state_q <= S_PASS;
        end
        default: state_q <= S_PASS;
      endcase
    end
  end

endmodule

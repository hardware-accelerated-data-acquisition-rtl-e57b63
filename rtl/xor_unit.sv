// xor_unit: folds the video packet into the parity stream.
//
// The parity packet that arrives from the neighbouring camera carries an XOR
// region (the running parity of the video packets of the cameras before it)
// followed by the MACs those cameras appended. This unit XORs the video
// packet word by word into the XOR region, which is how the parity is built
// up camera by camera (RAID5-like), and then passes the existing MACs on
// unchanged. The document gives the XOR of the two streams; the region
// lengths, zero-extension of the shorter operand and the word alignment
// are this design's choices: the output XOR region is
// max(video words, parity XOR words) long, bytes beyond a packet's end
// count as zero, and the parity XOR region is a whole number of words.
//
// Interface: `job_valid` with `job` (word counts) starts a packet; inputs
// v_* (video) and p_* (parity), output o_* (all bytes valid, `last` on the
// final word). Timing: one output word per cycle when both needed inputs
// are valid and the output is ready; no latency beyond the handshake.
module xor_unit
  import auth_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  job_valid,
  input  job_t  job,
  input  logic  v_valid,
  output logic  v_ready,
  input  beat_t v_beat,
  input  logic  p_valid,
  output logic  p_ready,
  input  beat_t p_beat,
  output logic  o_valid,
  input  logic  o_ready,
  output beat_t o_beat,
  output logic  active
);

  typedef enum logic [1:0] {S_IDLE, S_XOR, S_MAC} state_e;
  state_e state_q;

  job_t            job_q;
  logic [LENW-1:0] idx_q, xw;
  logic            need_v, need_p, fire;
  logic [DW-1:0]   vmask;

  assign xw     = (job_q.v_words > job_q.px_words) ? job_q.v_words : job_q.px_words;
  assign need_v = (state_q == S_XOR) && (idx_q < job_q.v_words);
  assign need_p = (state_q == S_MAC) || ((state_q == S_XOR) && (idx_q < job_q.px_words));
  assign active = (state_q != S_IDLE);

  always_comb begin
    for (int b = 0; b < BW; b++) vmask[8*b +: 8] = {8{v_beat.keep[b]}};
  end

  always_comb begin
    o_valid = active && (!need_v || v_valid) && (!need_p || p_valid);
    o_beat.keep = {BW{1'b1}};
    if (state_q == S_MAC) begin
      o_beat.data = p_beat.data;
      o_beat.last = (idx_q == job_q.pm_words - 1'b1);
    end else begin
      o_beat.data = (need_v ? (v_beat.data & vmask) : '0) ^ (need_p ? p_beat.data : '0);
      o_beat.last = (idx_q == xw - 1'b1) && (job_q.pm_words == '0);
    end
  end

  assign fire    = o_valid && o_ready;
  assign v_ready = fire && need_v;
  assign p_ready = fire && need_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      job_q   <= '0;
      idx_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (job_valid) begin
          job_q   <= job;
          idx_q   <= '0;
          state_q <= S_XOR;
        end
        S_XOR: if (fire) begin
          if (idx_q == xw - 1'b1) begin
            idx_q   <= '0;
            state_q <= (job_q.pm_words == '0) ? S_IDLE : S_MAC;
          end else begin
            idx_q <= idx_q + 1'b1;
          end
        end
        S_MAC: if (fire) begin
          if (idx_q == job_q.pm_words - 1'b1) state_q <= S_IDLE;
          else                                idx_q   <= idx_q + 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // the video packet must end exactly where the job says it does
  a_video_len: assert property (@(posedge clk) disable iff (!rst_n)
    (v_valid && v_ready) |-> (v_beat.last == (idx_q == job_q.v_words - 1'b1)));

endmodule

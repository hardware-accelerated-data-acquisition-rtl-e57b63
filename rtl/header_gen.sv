// header_gen: puts an Ethernet header in front of the updated parity stream.
//
// For every job it emits a 16-byte header and then forwards the XOR/MAC
// stream unchanged, so the parity data become a valid Ethernet frame. The
// document states that the Header core embeds the updated parity stream in a
// valid Ethernet frame; the header layout is this design's choice:
//   bytes 0-5   destination MAC address   (dst_mac[47:40] first)
//   bytes 6-11  source MAC address        (src_mac[47:40] first)
//   bytes 12-13 EtherType                 (big-endian)
//   bytes 14-15 XOR-region length, bytes  (big-endian)
// The frame check sequence is left to the Ethernet controller.
//
// Timing: the header words are available from the cycle after `job_valid`,
// one per cycle, so transmission can begin before any parity data exist.
module header_gen
  import auth_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        job_valid,
  input  job_t        job,
  input  logic [47:0] dst_mac,
  input  logic [47:0] src_mac,
  input  logic [15:0] ethertype,
  input  logic        s_valid,
  output logic        s_ready,
  input  beat_t       s_beat,
  output logic        o_valid,
  input  logic        o_ready,
  output beat_t       o_beat
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PASS} state_e;
  state_e state_q;

  logic [8*4*HDR_WORDS-1:0] hdr_q;   // byte k at bits [8k+7:8k]
  logic [1:0]               hidx_q;

  // header bytes in wire order
  function automatic logic [8*4*HDR_WORDS-1:0] pack_hdr(
      input logic [47:0] d, input logic [47:0] s, input logic [15:0] et,
      input logic [15:0] xlen);
    logic [7:0] by [4*HDR_WORDS];
    logic [8*4*HDR_WORDS-1:0] r;
    for (int k = 0; k < 6; k++) begin
      by[k]     = d[8*(5-k) +: 8];
      by[6 + k] = s[8*(5-k) +: 8];
    end
    by[12] = et[15:8];
    by[13] = et[7:0];
    by[14] = xlen[15:8];
    by[15] = xlen[7:0];
    for (int k = 0; k < 4*HDR_WORDS; k++) r[8*k +: 8] = by[k];
    return r;
  endfunction

  logic [LENW-1:0] xw;
  assign xw = (job.v_words > job.px_words) ? job.v_words : job.px_words;

  always_comb begin
    o_valid = 1'b0;
    o_beat  = s_beat;
    s_ready = 1'b0;
    if (state_q == S_HDR) begin
      o_valid     = 1'b1;
      o_beat.data = hdr_q[DW*hidx_q +: DW];
      o_beat.keep = {BW{1'b1}};
      o_beat.last = 1'b0;
    end else if (state_q == S_PASS) begin
      o_valid = s_valid;
      s_ready = o_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      hdr_q   <= '0;
      hidx_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (job_valid) begin
          hdr_q   <= pack_hdr(dst_mac, src_mac, ethertype, LENW'({xw, 2'b00}));
          hidx_q  <= '0;
          state_q <= S_HDR;
        end
        S_HDR: if (o_ready) begin
          if (hidx_q == 2'(HDR_WORDS - 1)) state_q <= S_PASS;
          hidx_q <= hidx_q + 1'b1;
        end
        S_PASS: if (s_valid && o_ready && s_beat.last) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule

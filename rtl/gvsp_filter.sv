// gvsp_filter: separates GigE Vision stream (GVSP) traffic from all other
// Ethernet traffic in hardware.
//
// Received Ethernet frames (FCS already removed by the controller) arrive
// as 32-bit words. The unit holds the first 11 words (44 bytes: Ethernet,
// IPv4 and UDP headers) and then decides: a frame is video when it is
// IPv4 (EtherType 0x0800) with a 20-byte header (version/IHL 0x45),
// carries UDP (protocol 17) and is addressed to the configured GVSP
// destination port. Video frames leave on the m_vid port as their UDP
// payload only (the GVSP header and image data), realigned so that the
// first payload byte is bits [7:0]. All other frames leave unchanged on
// m_fwd, towards the processor's IP stack, as if received directly.
//
// The document describes this separation of video and remaining traffic,
// done without processor help between the Ethernet controller and the
// processor, with sub-microsecond latency; it leaves the matching rules to
// other work. The header checks, the port match and the payload
// realignment are this design's choices. Frames of 44 bytes or fewer, IPv4
// with options and fragments are forwarded, not filtered; Ethernet padding
// of short frames is not removed. The buffer-descriptor replication that
// lets the unit sit behind the controller's scatter-gather DMA is not part
// of this block.
//
// Timing: the decision is taken as the 11th word is accepted; the first
// output word follows in the next cycle, so the added latency is 12 cycles
// for a frame arriving without gaps (96 ns at 125 MHz). Throughput is one
// word per cycle apart from the 11 cycles needed to replay a forwarded
// frame's buffered header and one extra cycle for some video frame ends.
module gvsp_filter
  import auth_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [15:0] gvsp_port,
  input  logic        s_valid,
  output logic        s_ready,
  input  beat_t       s_beat,
  output logic        vid_valid,
  input  logic        vid_ready,
  output beat_t       vid_beat,
  output logic        fwd_valid,
  input  logic        fwd_ready,
  output beat_t       fwd_beat,
  output logic [31:0] n_video,
  output logic [31:0] n_other
);

  localparam int unsigned HW = 11;  // header words buffered

  typedef enum logic [2:0] {S_HDR, S_FWD_BUF, S_FWD_PASS, S_VID, S_VID_TAIL} state_e;
  state_e state_q;

  logic [DW-1:0]  hb_q [HW];
  logic [3:0]     hcnt_q;      // words buffered
  logic [3:0]     ridx_q;      // replay index
  logic           ended_q;     // frame ended inside the buffer
  logic [BW-1:0]  endkeep_q;
  logic [15:0]    carry_q;
  logic [BW-1:0]  tailkeep_q;

  logic fire_in;
  assign fire_in = s_valid && s_ready;

  // classification on the buffered header plus the incoming 11th word
  logic is_video;
  always_comb begin
    logic [15:0] etype, dport;
    etype    = {hb_q[3][7:0], hb_q[3][15:8]};
    dport    = {hb_q[9][7:0], hb_q[9][15:8]};
    is_video = enable && (etype == 16'h0800) && (hb_q[3][23:16] == 8'h45)
               && (hb_q[5][31:24] == 8'd17) && (dport == gvsp_port);
  end

  // number of valid bytes in a word (contiguous low bytes)
  function automatic logic [2:0] nbytes(input logic [BW-1:0] k);
    logic [2:0] n;
    n = '0;
    for (int b = 0; b < BW; b++) if (k[b]) n = 3'(b + 1);
    return n;
  endfunction

  logic [2:0] nin;
  assign nin = nbytes(s_beat.keep);

  always_comb begin
    s_ready   = 1'b0;
    vid_valid = 1'b0;
    fwd_valid = 1'b0;
    vid_beat  = '0;
    fwd_beat  = s_beat;
    unique case (state_q)
      S_HDR:      s_ready = 1'b1;
      S_FWD_BUF: begin
        fwd_valid     = 1'b1;
        fwd_beat.data = hb_q[ridx_q];
        fwd_beat.last = ended_q && (ridx_q == hcnt_q - 1'b1);
        fwd_beat.keep = fwd_beat.last ? endkeep_q : {BW{1'b1}};
      end
      S_FWD_PASS: begin
        fwd_valid = s_valid;
        s_ready   = fwd_ready;
      end
      S_VID: begin
        vid_valid     = s_valid;
        s_ready       = vid_ready;
        vid_beat.data = {s_beat.data[15:0], carry_q};
        vid_beat.last = s_beat.last && (nin <= 3'd2);
        vid_beat.keep = vid_beat.last ? BW'((1 << (32'(nin) + 2)) - 1) : {BW{1'b1}};
      end
      S_VID_TAIL: begin
        vid_valid     = 1'b1;
        vid_beat.data = {16'h0000, carry_q};
        vid_beat.keep = tailkeep_q;
        vid_beat.last = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (state_q == S_HDR && fire_in) hb_q[hcnt_q] <= s_beat.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_HDR;
      hcnt_q     <= '0;
      ridx_q     <= '0;
      ended_q    <= 1'b0;
      endkeep_q  <= '0;
      carry_q    <= '0;
      tailkeep_q <= '0;
      n_video    <= '0;
      n_other    <= '0;
    end else begin
      unique case (state_q)
        S_HDR: if (fire_in) begin
          if (s_beat.last) begin
            // short frame: forward what has been buffered
            hcnt_q    <= hcnt_q + 1'b1;
            ended_q   <= 1'b1;
            endkeep_q <= s_beat.keep;
            ridx_q    <= '0;
            state_q   <= S_FWD_BUF;
            n_other   <= n_other + 1;
          end else if (hcnt_q == 4'(HW - 1)) begin
            hcnt_q  <= 4'(HW);
            ended_q <= 1'b0;
            ridx_q  <= '0;
            if (is_video) begin
              carry_q <= s_beat.data[31:16];
              state_q <= S_VID;
              n_video <= n_video + 1;
            end else begin
              state_q <= S_FWD_BUF;
              n_other <= n_other + 1;
            end
          end else begin
            hcnt_q <= hcnt_q + 1'b1;
          end
        end
        S_FWD_BUF: if (fwd_ready) begin
          if (ridx_q == hcnt_q - 1'b1) begin
            hcnt_q  <= '0;
            state_q <= ended_q ? S_HDR : S_FWD_PASS;
          end
          ridx_q <= ridx_q + 1'b1;
        end
        S_FWD_PASS: if (s_valid && fwd_ready && s_beat.last) begin
          hcnt_q  <= '0;
          state_q <= S_HDR;
        end
        S_VID: if (s_valid && vid_ready) begin
          carry_q <= s_beat.data[31:16];
          if (s_beat.last) begin
            hcnt_q <= '0;
            if (nin > 3'd2) begin
              tailkeep_q <= BW'((1 << (32'(nin) - 2)) - 1);
              state_q    <= S_VID_TAIL;
            end else begin
              state_q <= S_HDR;
            end
          end
        end
        S_VID_TAIL: if (vid_ready) state_q <= S_HDR;
        default: state_q <= S_HDR;
      endcase
    end
  end

endmodule

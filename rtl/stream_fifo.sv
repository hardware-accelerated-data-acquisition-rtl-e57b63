// stream_fifo: synchronous first-in first-out buffer for stream beats.
//
// Sits between a DMA core and the XOR unit and lets the DMA run ahead of the
// datapath while the MAC or the Ethernet side stalls. The document shows the
// FIFO but gives neither depth nor structure; a circular buffer of DEPTH
// beats (one full Ethernet payload of 32-bit words by default) with
// valid/ready on both sides is this design's choice.
//
// Timing: a beat written in cycle t can be read in cycle t+1 (m_valid is
// registered state: the buffer is not empty). Writing and reading in the same
// cycle is allowed when full. `level` gives the fill count.
module stream_fifo
  import auth_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  output logic  s_ready,
  input  beat_t s_beat,
  output logic  m_valid,
  input  logic  m_ready,
  output beat_t m_beat,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  beat_t   mem [DEPTH];
  logic [PW-1:0] wp_q, rp_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  logic wr, rd;
  assign m_valid = (cnt_q != '0);
  assign s_ready = (cnt_q != ($clog2(DEPTH+1))'(DEPTH)) || m_ready;
  assign wr      = s_valid && s_ready;
  assign rd      = m_valid && m_ready;
  assign m_beat  = mem[rp_q];
  assign level   = cnt_q;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr) mem[wp_q] <= s_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (wr) wp_q <= inc(wp_q);
      if (rd) rp_q <= inc(rp_q);
      unique case ({wr, rd})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: cnt_q <= cnt_q;
      endcase
    end
  end

endmodule

// job_ctrl: pairs a video packet with a parity packet and starts both DMAs.
//
// As soon as both descriptor queues hold at least one descriptor (and the
// previous parity frame has left the trailer), it pops one descriptor from
// each, starts the video and the parity DMA core in the same cycle and
// publishes the job (word counts of the video packet, of the parity XOR
// region and of the MACs already carried by the parity packet) to the XOR
// and header units. This pairing rule is the document's; allowing only one
// job in flight and the `enable` gate are this design's choices.
//
// Timing: the cycle after both queues become non-empty, `pop`, `dma_start`
// and `job_valid` pulse together; the unit then waits for `frame_done`.
// `jobs` counts started jobs.
module job_ctrl
  import auth_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        vdq_nonempty,
  input  desc_t       vdq_head,
  input  logic        pdq_nonempty,
  input  desc_t       pdq_head,
  input  logic        dma_v_idle,
  input  logic        dma_p_idle,
  input  logic        frame_done,
  output logic        pop,          // pops both queues
  output logic        dma_start,    // starts both DMA cores
  output desc_t       v_desc,
  output desc_t       p_desc,
  output logic        job_valid,
  output job_t        job,
  output logic [31:0] jobs
);

  logic busy_q;
  logic go;

  assign go = enable && !busy_q && vdq_nonempty && pdq_nonempty
              && dma_v_idle && dma_p_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      pop       <= 1'b0;
      dma_start <= 1'b0;
      job_valid <= 1'b0;
      v_desc    <= '0;
      p_desc    <= '0;
      job       <= '0;
      jobs      <= '0;
    end else begin
      pop       <= 1'b0;
      dma_start <= 1'b0;
      job_valid <= 1'b0;
      if (go) begin
        busy_q       <= 1'b1;
        pop          <= 1'b1;
        dma_start    <= 1'b1;
        job_valid    <= 1'b1;
        v_desc       <= vdq_head;
        p_desc       <= pdq_head;
        job.v_words  <= bytes_to_words(vdq_head.len);
        job.px_words <= bytes_to_words(pdq_head.xlen);
        job.pm_words <= bytes_to_words(pdq_head.len - pdq_head.xlen);
        jobs         <= jobs + 1;
      end else if (frame_done) begin
        busy_q <= 1'b0;
      end
    end
  end

endmodule

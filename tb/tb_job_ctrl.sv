// tb_job_ctrl: offers video and parity descriptors at random times and
// checks that a job starts only when both are present, the DMAs are idle
// and the previous frame is done; that both queues are popped and both DMAs
// started in the same cycle; that the job word counts are derived from the
// descriptors; and that `enable` low holds everything back.
module tb_job_ctrl;
  import auth_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 0, vne = 0, pne = 0, vidle = 1, pidle = 1, frame_done = 0;
  desc_t vh, ph, v_desc, p_desc;
  logic pop, dma_start, job_valid;
  job_t job;
  logic [31:0] jobs;
  int checks = 0, failures = 0, started = 0, blocked_busy = 0;

  job_ctrl dut (.clk, .rst_n, .enable, .vdq_nonempty(vne), .vdq_head(vh), .pdq_nonempty(pne),
    .pdq_head(ph), .dma_v_idle(vidle), .dma_p_idle(pidle), .frame_done, .pop, .dma_start,
    .v_desc, .p_desc, .job_valid, .job, .jobs);

  initial begin
    int wait_c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    vh = '{addr: 32'h1000, len: 16'd1401, xlen: 16'd0};
    ph = '{addr: 32'h2000, len: 16'd664, xlen: 16'd600};
    vne = 1; pne = 1;
    repeat (5) @(negedge clk);
    checks++; if (pop || jobs != 0) begin failures++; $display("FAIL started while disabled"); end
    enable = 1;
    for (int t = 0; t < 50; t++) begin
      vne = $urandom % 2; pne = $urandom % 2;
      vh = '{addr: $urandom, len: 16'(1 + $urandom % 1500), xlen: 16'd0};
      ph.xlen = 16'(4 * (1 + $urandom % 375));
      ph = '{addr: $urandom, len: 16'(ph.xlen + 32 * ($urandom % 4)), xlen: ph.xlen};
      @(negedge clk);
      if (vne && pne) begin
        checks++;
        if (!(pop && dma_start && job_valid)) begin failures++; $display("FAIL t%0d no start", t); end
        else begin
          started++;
          checks++;
          if (v_desc !== vh || p_desc !== ph || job.v_words != (vh.len + 3) / 4
              || job.px_words != ph.xlen / 4 || job.pm_words != (ph.len - ph.xlen) / 4) begin
            failures++; $display("FAIL t%0d job fields", t);
          end
        end
        vne = 1; pne = 1;
        // busy: a second pair must wait for frame_done
        repeat (3) @(negedge clk);
        checks++; if (pop) begin failures++; $display("FAIL t%0d started while busy", t); end
        blocked_busy++;
        vne = 0; pne = 0;
        frame_done = 1; @(negedge clk); frame_done = 0;
      end else begin
        checks++; if (pop) begin failures++; $display("FAIL t%0d started without pair", t); end
      end
    end
    // DMA not idle
    vidle = 0; vne = 1; pne = 1;
    repeat (3) @(negedge clk);
    checks++; if (pop) begin failures++; $display("FAIL started while DMA busy"); end
    checks++; if (jobs != 32'(started)) failures++;
    checks++; if (started == 0 || blocked_busy == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_stream_fifo: random writes and reads against a queue model; checks
// order, data, level, the full-and-read-at-once case and that the output
// holds data from the cycle after a write.
module tb_stream_fifo;
  import auth_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_valid = 0, s_ready, m_valid, m_ready = 0;
  beat_t s_beat, m_beat;
  logic [$clog2(D+1)-1:0] level;
  int checks = 0, failures = 0, fulls = 0;
  beat_t model[$];

  stream_fifo #(.DEPTH(D)) dut (.clk, .rst_n, .s_valid, .s_ready, .s_beat, .m_valid, .m_ready, .m_beat, .level);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      s_valid = ($urandom % 100) < ((t / 500) % 2 ? 40 : 80);
      m_ready = ($urandom % 100) < ((t / 500) % 2 ? 80 : 40);
      s_beat  = '{data: $urandom, keep: 4'($urandom), last: 1'($urandom)};
      #1;
      checks++;
      if (level != model.size() || m_valid != (model.size() > 0)
          || s_ready != (model.size() < D || m_ready)) begin
        failures++; $display("FAIL t%0d flags", t);
      end
      if (model.size() == D) fulls++;
      if (m_valid && m_ready) begin
        checks++;
        if (m_beat !== model[0]) begin failures++; $display("FAIL t%0d data", t); end
      end
      @(posedge clk);
      begin
        bit rd, wr;
        rd = m_valid && m_ready;
        wr = s_valid && s_ready;
        if (rd) void'(model.pop_front());
        if (wr) model.push_back(s_beat);
      end
    end
    checks++; if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

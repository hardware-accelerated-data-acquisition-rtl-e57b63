// tb_mac_verify: self-checking test of the receive-side MAC check.
//
// Sends random packets (1 to 250 bytes) with a tag worked out by the
// reference SHA3 model. Some packets are sent unchanged with their tag, some
// with one byte flipped after the tag was computed, some with a flipped tag
// bit, and some longer than the buffer. Only the untouched packets that fit
// may come out, whole and in order; the result flags and the pass/drop
// counters are checked per packet. The tag is offered at random times
// before or after its packet and the output is randomly stalled so the
// buffer fills. The buffer is shrunk to 64 words to reach the oversize case.
module tb_mac_verify;
  import auth_pkg::*;
  import tb_sha3_ref::*;

  localparam int DEPTH = 64;
  localparam int NPKT  = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [255:0] key;
  logic s_valid = 0, s_ready, tag_valid = 0, tag_ready, m_valid, m_ready = 0;
  logic res_valid, res_ok;
  beat_t s_beat, m_beat;
  logic [255:0] tag;
  logic [31:0] n_pass, n_drop;
  int checks = 0, failures = 0;
  int n_ok = 0, n_data = 0, n_tagbad = 0, n_big = 0, n_full = 0, n_early_tag = 0;

  mac_verify #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .key, .s_valid, .s_ready, .s_beat,
    .tag_valid, .tag_ready, .tag, .m_valid, .m_ready, .m_beat,
    .res_valid, .res_ok, .n_pass, .n_drop);

  // expected output bytes and per-packet results
  byte unsigned exp_out [$];
  int           exp_last [$];   // byte counts at which `last` is expected
  bit           exp_res [$];
  int           got_bytes = 0, res_seen = 0, exp_pass = 0;
  bit           m_stall_heavy = 0;

  always @(posedge clk) begin
    // heavy output stalls for the first packets so the buffer fills
    if (rst_n) m_ready <= m_stall_heavy ? (($urandom % 8) == 0) : (($urandom % 4) != 0);
    if (res_seen >= 10) m_stall_heavy = 0;
    if (rst_n && m_valid && m_ready) begin
      for (int b = 0; b < 4; b++) if (m_beat.keep[b]) begin
        checks++;
        if (exp_out.size() == 0 || m_beat.data[8*b +: 8] !== exp_out[0]) begin
          failures++; $display("FAIL output byte %0d", got_bytes);
        end
        if (exp_out.size() != 0) void'(exp_out.pop_front());
        got_bytes++;
      end
      checks++;
      if (m_beat.last != (exp_last.size() != 0 && got_bytes == exp_last[0])) begin
        failures++; $display("FAIL last flag at byte %0d", got_bytes);
      end
      if (m_beat.last && exp_last.size() != 0) void'(exp_last.pop_front());
    end
    if (rst_n && res_valid) begin
      checks++;
      if (exp_res.size() == 0 || res_ok != exp_res[0]) begin
        failures++; $display("FAIL result of packet %0d", res_seen);
      end
      if (exp_res.size() != 0) void'(exp_res.pop_front());
      res_seen++;
    end
    if (rst_n && dut.full && dut.s_ready == 1'b0 && s_valid) n_full++;
  end

  task automatic send(input byte unsigned p[$], input logic [255:0] t);
    int i;
    bit tag_sent;
    i = 0;
    tag_sent = 0;
    @(posedge clk);   // one idle cycle between packets
    // tag first for some packets
    if ($urandom % 2) begin
      tag_valid <= 1; tag <= t; tag_sent = 1; n_early_tag++;
    end
    while (i < p.size()) begin
      beat_t bt;
      bt.data = '0; bt.keep = '0;
      for (int b = 0; b < 4; b++) if (i + b < p.size()) begin
        bt.data[8*b +: 8] = p[i + b]; bt.keep[b] = 1'b1;
      end
      bt.last = (i + 4 >= p.size());
      s_valid <= 1; s_beat <= bt;
      @(negedge clk);
      while (!s_ready) @(negedge clk);
      @(posedge clk);
      i += 4;
    end
    s_valid <= 0;
    if (!tag_sent) begin
      repeat ($urandom % 40) @(posedge clk);
      tag_valid <= 1; tag <= t;
    end
    @(negedge clk);
    while (!tag_ready) @(negedge clk);
    @(posedge clk);
    tag_valid <= 0;
  endtask

  initial begin
    for (int k = 0; k < 8; k++) key[32*k +: 32] = $urandom;
    s_beat = '0; tag = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    m_stall_heavy = 1;
    @(posedge clk);
    for (int n = 0; n < NPKT; n++) begin
      byte unsigned p[$];
      logic [255:0] t;
      int len, kind, pos;
      kind = n % 5;             // 0,1: good  2: data flipped  3: tag flipped  4: good or too big
      p.delete();
      len = 1 + $urandom % 250;
      if (kind == 4 && (n % 10) == 4) len = 4 * DEPTH + 1 + $urandom % 60;
      for (int i = 0; i < len; i++) p.push_back(8'($urandom));
      t = mac_ref(key, p);
      pos = $urandom % len;
      if (kind == 2) p[pos] = p[pos] ^ 8'(1 << ($urandom % 8));
      pos = $urandom % 256;
      if (kind == 3) t[pos] = ~t[pos];
      if (kind <= 1 || (kind == 4 && len <= 4 * DEPTH)) begin
        foreach (p[i]) exp_out.push_back(p[i]);
        exp_last.push_back(got_bytes + exp_out.size());
        exp_res.push_back(1); exp_pass++; n_ok++;
      end else begin
        exp_res.push_back(0);
        if (kind == 2) n_data++; else if (kind == 3) n_tagbad++; else n_big++;
      end
      send(p, t);
    end
    repeat (2000) @(posedge clk);
    checks++; if (exp_out.size() != 0) begin failures++; $display("FAIL %0d bytes never left", exp_out.size()); end
    checks++; if (res_seen != NPKT) begin failures++; $display("FAIL %0d results", res_seen); end
    checks++; if (n_pass != 32'(exp_pass)) begin failures++; $display("FAIL n_pass %0d", n_pass); end
    checks++; if (n_drop != 32'(NPKT - exp_pass)) begin failures++; $display("FAIL n_drop %0d", n_drop); end
    $display("mechanisms: passed=%0d data_tampered=%0d tag_tampered=%0d oversize=%0d buffer_full=%0d early_tag=%0d",
             n_ok, n_data, n_tagbad, n_big, n_full, n_early_tag);
    checks++; if (n_data == 0 || n_tagbad == 0 || n_big == 0 || n_full == 0 || n_early_tag == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

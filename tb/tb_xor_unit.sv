// tb_xor_unit: random jobs with video packets longer, shorter or as long as
// the parity XOR region, with and without carried MACs, random input gaps
// and output stalls. Checks every output word against the XOR computed
// here (bytes past the video packet's end count as zero), the carried MAC
// words, and `last`.
module tb_xor_unit;
  import auth_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic job_valid = 0;
  job_t job;
  logic v_valid = 0, v_ready, p_valid = 0, p_ready, o_valid, o_ready = 0, active;
  beat_t v_beat, p_beat, o_beat;
  int checks = 0, failures = 0;
  int n_vlong = 0, n_plong = 0;

  xor_unit dut (.clk, .rst_n, .job_valid, .job, .v_valid, .v_ready, .v_beat,
    .p_valid, .p_ready, .p_beat, .o_valid, .o_ready, .o_beat, .active);

  // stimulus queues, appended job by job; the indices run on
  logic [31:0] vw [$], pw [$], exp_o [$];
  logic [3:0]  vk [$];
  bit          vl [$], el [$];
  int vi = 0, pi = 0, oi = 0;

  always @(posedge clk) begin
    int nvi, npi;
    nvi = vi + int'(v_valid && v_ready);
    npi = pi + int'(p_valid && p_ready);
    if (rst_n && o_valid && o_ready) begin
      checks++;
      if (oi >= exp_o.size() || o_beat.data !== exp_o[oi] || o_beat.last !== el[oi]) begin
        failures++; $display("FAIL word %0d %h", oi, o_beat.data);
      end
      oi <= oi + 1;
    end
    vi <= nvi;
    pi <= npi;
    v_valid <= (nvi < vw.size()) && ($urandom % 4 != 0);
    p_valid <= (npi < pw.size()) && ($urandom % 4 != 0);
    o_ready <= ($urandom % 4 != 0);
    if (nvi < vw.size()) begin
      v_beat.data <= vw[nvi]; v_beat.keep <= vk[nvi]; v_beat.last <= vl[nvi];
    end
    if (npi < pw.size()) p_beat <= '{data: pw[npi], keep: 4'hF, last: 1'b0};
  end

  initial begin
    int vbytes, nv, npx, npm, nx, ob;
    v_beat = '0; p_beat = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      vbytes = 1 + $urandom % 300;
      nv  = (vbytes + 3) / 4;
      npx = 1 + $urandom % 80;
      npm = 8 * ($urandom % 3);
      nx  = nv > npx ? nv : npx;
      if (nv > npx) n_vlong++; else if (npx > nv) n_plong++;
      ob = exp_o.size();
      for (int i = 0; i < nv; i++) begin
        logic [31:0] w;
        logic [3:0]  k;
        w = $urandom;
        k = (i == nv - 1 && vbytes % 4 != 0) ? 4'((1 << (vbytes % 4)) - 1) : 4'hF;
        vw.push_back(w); vk.push_back(k); vl.push_back(i == nv - 1);
      end
      for (int i = 0; i < npx + npm; i++) pw.push_back($urandom);
      for (int i = 0; i < nx; i++) begin
        logic [31:0] v;
        v = 0;
        if (i < nv) for (int b = 0; b < 4; b++) if (vk[vw.size() - nv + i][b]) v[8*b +: 8] = vw[vw.size() - nv + i][8*b +: 8];
        exp_o.push_back(v ^ ((i < npx) ? pw[pw.size() - npx - npm + i] : 0));
        el.push_back(npm == 0 && i == nx - 1);
      end
      for (int i = 0; i < npm; i++) begin
        exp_o.push_back(pw[pw.size() - npm + i]);
        el.push_back(i == npm - 1);
      end
      @(negedge clk);
      job = '{v_words: 16'(nv), px_words: 16'(npx), pm_words: 16'(npm)};
      job_valid = 1; @(negedge clk); job_valid = 0;
      while (oi < exp_o.size()) @(negedge clk);
      @(negedge clk);
      checks++;
      if (active || vi != vw.size() || pi != pw.size()) begin
        failures++; $display("FAIL t%0d inputs consumed", t);
      end
    end
    checks++; if (n_vlong == 0 || n_plong == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

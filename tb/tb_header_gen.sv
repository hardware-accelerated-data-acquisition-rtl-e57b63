// tb_header_gen: for random jobs and configuration, checks the four header
// words (addresses, EtherType, XOR-region length in wire byte order) and
// that the body words follow unchanged with `last`, under random stalls.
module tb_header_gen;
  import auth_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic job_valid = 0;
  job_t job;
  logic [47:0] dst_mac, src_mac;
  logic [15:0] ethertype;
  logic s_valid = 0, s_ready, o_valid, o_ready = 0;
  beat_t s_beat, o_beat;
  int checks = 0, failures = 0;

  header_gen dut (.clk, .rst_n, .job_valid, .job, .dst_mac, .src_mac, .ethertype,
    .s_valid, .s_ready, .s_beat, .o_valid, .o_ready, .o_beat);

  logic [31:0] body [$], exp_o [$];
  bit          bl [$], el [$];
  int si = 0, oi = 0;

  always @(posedge clk) begin
    int nsi;
    nsi = si + int'(s_valid && s_ready);
    if (rst_n && o_valid && o_ready) begin
      checks++;
      if (oi >= exp_o.size() || o_beat.data !== exp_o[oi] || o_beat.last !== el[oi]) begin
        failures++; $display("FAIL word %0d %h", oi, o_beat.data);
      end
      oi <= oi + 1;
    end
    si <= nsi;
    s_valid <= (nsi < body.size()) && ($urandom % 3 != 0);
    o_ready <= ($urandom % 4 != 0);
    if (nsi < body.size()) s_beat <= '{data: body[nsi], keep: 4'hF, last: bl[nsi]};
  end

  initial begin
    int nv, npx, nx;
    byte unsigned h [16];
    s_beat = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      dst_mac = {16'($urandom), 32'($urandom)};
      src_mac = {16'($urandom), 32'($urandom)};
      ethertype = 16'($urandom);
      nv = 1 + $urandom % 100; npx = 1 + $urandom % 100;
      nx = nv > npx ? nv : npx;
      for (int k = 0; k < 6; k++) begin
        h[k] = dst_mac[47 - 8*k -: 8];
        h[6 + k] = src_mac[47 - 8*k -: 8];
      end
      h[12] = ethertype[15:8]; h[13] = ethertype[7:0];
      h[14] = 8'((4 * nx) >> 8); h[15] = 8'(4 * nx);
      for (int w = 0; w < 4; w++) begin
        exp_o.push_back({h[4*w+3], h[4*w+2], h[4*w+1], h[4*w]});
        el.push_back(0);
      end
      for (int i = 0; i < 1 + $urandom % 50; i++) begin
        body.push_back($urandom); bl.push_back(0);
        exp_o.push_back(body[body.size() - 1]); el.push_back(0);
      end
      bl[bl.size() - 1] = 1; el[el.size() - 1] = 1;
      @(negedge clk);
      job = '{v_words: 16'(nv), px_words: 16'(npx), pm_words: 16'd0};
      job_valid = 1; @(negedge clk); job_valid = 0;
      while (oi < exp_o.size()) @(negedge clk);
      @(negedge clk);
    end
    checks++; if (si != body.size()) failures++;
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

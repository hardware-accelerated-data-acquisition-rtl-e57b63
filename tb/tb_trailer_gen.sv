// tb_trailer_gen: forwards random frames and checks that each ends with the
// eight words of the MAC offered for it (mac[31:0] first), that `last` moves
// from the input's final word to the final MAC word, that the MAC is taken
// exactly once per frame, and that frame_done pulses once per frame. The
// MAC is offered late for some frames to exercise the wait.
module tb_trailer_gen;
  import auth_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_valid = 0, s_ready, o_valid, o_ready = 0, mac_valid = 0, mac_ready, frame_done;
  logic [255:0] mac;
  logic [255:0] mac_a [1];
  assign mac_a[0] = mac;
  beat_t s_beat, o_beat;
  int checks = 0, failures = 0, dones = 0, macs_taken = 0, waits = 0;

  trailer_gen dut (.clk, .rst_n, .s_valid, .s_ready, .s_beat, .mac_valid, .mac_ready, .mac(mac_a),
    .o_valid, .o_ready, .o_beat, .frame_done);

  logic [31:0] body [$], exp_o [$];
  bit          bl [$], el [$];
  logic [255:0] macs [$];
  int si = 0, oi = 0, mi = 0;

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
    if (rst_n && frame_done) dones++;
    if (rst_n && mac_valid && mac_ready) begin mi <= mi + 1; macs_taken++; end
    if (!o_valid && mac_valid == 0 && !s_valid && oi < exp_o.size()) waits++;
    si <= nsi;
    s_valid <= (nsi < body.size()) && ($urandom % 3 != 0);
    o_ready <= ($urandom % 4 != 0);
    if (nsi < body.size()) s_beat <= '{data: body[nsi], keep: 4'hF, last: bl[nsi]};
  end

  // the MAC for frame k becomes valid only once the body has been sent,
  // and for every third frame some cycles later still
  int mac_delay = 0;
  always @(posedge clk) begin
    int m;
    m = mi + int'(mac_valid && mac_ready);
    if (m < macs.size() && si >= bodies_end[m]) begin
      if (mac_delay > 0) begin mac_delay <= mac_delay - 1; mac_valid <= 0; end
      else begin mac_valid <= 1; mac <= macs[m]; end
    end else begin
      mac_valid <= 0;
      mac_delay <= (m % 3 == 0) ? 20 : 0;
    end
  end
  int bodies_end [$];

  initial begin
    logic [255:0] m;
    s_beat = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < 1 + $urandom % 40; i++) begin
        body.push_back($urandom); bl.push_back(0);
        exp_o.push_back(body[body.size() - 1]); el.push_back(0);
      end
      bl[bl.size() - 1] = 1;
      for (int k = 0; k < 8; k++) m[32*k +: 32] = $urandom;
      for (int k = 0; k < 8; k++) begin exp_o.push_back(m[32*k +: 32]); el.push_back(k == 7); end
      bodies_end.push_back(body.size());
      macs.push_back(m);
    end
    while (oi < exp_o.size()) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++; if (dones != 30) begin failures++; $display("FAIL frame_done %0d", dones); end
    checks++; if (macs_taken != 30) begin failures++; $display("FAIL macs taken %0d", macs_taken); end
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

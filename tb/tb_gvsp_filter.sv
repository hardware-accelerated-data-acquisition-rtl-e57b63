// tb_gvsp_filter: sends a random mix of GVSP video frames, UDP frames to
// other ports, TCP, ARP, IPv4 frames with options and short frames, with
// random input gaps and output stalls, and checks that video frames come
// out as their UDP payload (byte exact, with the right byte mask and end)
// and every other frame comes out unchanged on the forward port. A first
// phase without gaps checks the sub-microsecond latency: the first payload
// word must leave within 12 cycles of the frame's first word.
module tb_gvsp_filter;
  import auth_pkg::*;
  localparam logic [15:0] PORT = 16'd20202;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;   // 125 MHz
  logic enable = 1;
  logic s_valid = 0, s_ready, vid_valid, vid_ready = 1, fwd_valid, fwd_ready = 1;
  beat_t s_beat, vid_beat, fwd_beat;
  logic [31:0] n_video, n_other;
  int checks = 0, failures = 0;
  bit gaps = 0;

  gvsp_filter dut (.clk, .rst_n, .enable, .gvsp_port(PORT), .s_valid, .s_ready, .s_beat,
    .vid_valid, .vid_ready, .vid_beat, .fwd_valid, .fwd_ready, .fwd_beat, .n_video, .n_other);

  // input words, expected output bytes with frame ends
  logic [31:0] iw [$];
  logic [3:0]  ik [$];
  bit          il [$];
  byte unsigned ev [$], ef [$];
  bit           evl [$], efl [$];
  int ii = 0, vi = 0, fi = 0;
  int first_in_t = -1, lat_max = 0, kinds [6];
  bit lat_armed = 0;

  function automatic void add_frame(byte unsigned f[$], bit video);
    for (int i = 0; i < f.size(); i += 4) begin
      logic [31:0] w;
      logic [3:0] k;
      w = $urandom; k = 0;
      for (int b = 0; b < 4; b++) if (i + b < f.size()) begin w[8*b +: 8] = f[i + b]; k[b] = 1; end
      iw.push_back(w); ik.push_back(k); il.push_back(i + 4 >= f.size());
    end
    if (video) for (int i = 42; i < f.size(); i++) begin ev.push_back(f[i]); evl.push_back(i == f.size() - 1); end
    else for (int i = 0; i < f.size(); i++) begin ef.push_back(f[i]); efl.push_back(i == f.size() - 1); end
  endfunction

  function automatic void make(int kind, ref byte unsigned f[$], output bit video);
    int len;
    f.delete();
    len = (kind == 5) ? 14 + $urandom % 30 : 60 + $urandom % 1400;
    for (int i = 0; i < len; i++) f.push_back(8'($urandom));
    video = 0;
    if (kind == 5) return;                                   // short frame
    f[12] = 8'h08; f[13] = (kind == 3) ? 8'h06 : 8'h00;      // ARP or IPv4
    f[14] = (kind == 4) ? 8'h46 : 8'h45;                     // options
    f[23] = (kind == 2) ? 8'd6 : 8'd17;                      // TCP or UDP
    f[36] = (kind == 1) ? PORT[15:8] ^ 8'h01 : PORT[15:8];   // other port
    f[37] = PORT[7:0];
    video = (kind == 0);
  endfunction

  always @(posedge clk) begin
    int nii;
    nii = ii + int'(s_valid && s_ready);
    if (rst_n && s_valid && s_ready && first_in_t < 0) first_in_t = $time / 8;
    if (rst_n && vid_valid && vid_ready) begin
      if (lat_armed) begin
        int l;
        l = $time / 8 - first_in_t;
        if (l > lat_max) lat_max = l;
        lat_armed = 0;
      end
      for (int b = 0; b < 4; b++) if (vid_beat.keep[b]) begin
        checks++;
        if (vi >= ev.size() || vid_beat.data[8*b +: 8] !== ev[vi]
            || (evl[vi] && !(vid_beat.last && (b == 3 || !vid_beat.keep[b+1])))
            || (!evl[vi] && vid_beat.last && (b == 3 || !vid_beat.keep[b+1]))) begin
          failures++; if (failures < 10) $display("FAIL video byte %0d", vi);
        end
        vi++;
      end
    end
    if (rst_n && fwd_valid && fwd_ready) begin
      for (int b = 0; b < 4; b++) if (fwd_beat.keep[b]) begin
        checks++;
        if (fi >= ef.size() || fwd_beat.data[8*b +: 8] !== ef[fi]
            || (efl[fi] != (fwd_beat.last && (b == 3 || !fwd_beat.keep[b+1])))) begin
          failures++; if (failures < 10) $display("FAIL fwd byte %0d", fi);
        end
        fi++;
      end
    end
    ii <= nii;
    s_valid <= (nii < iw.size()) && (!gaps || $urandom % 4 != 0);
    vid_ready <= !gaps || ($urandom % 4 != 0);
    fwd_ready <= !gaps || ($urandom % 4 != 0);
    if (nii < iw.size()) s_beat <= '{data: iw[nii], keep: ik[nii], last: il[nii]};
  end

  initial begin
    byte unsigned f[$];
    bit video;
    int nv;
    nv = 0;
    s_beat = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: latency, one video frame at a time, no gaps
    for (int t = 0; t < 5; t++) begin
      make(0, f, video);
      while (ii < iw.size() || vi < ev.size() || fi < ef.size()) @(negedge clk);
      repeat (3) @(negedge clk);
      first_in_t = -1; lat_armed = 1;
      add_frame(f, video); nv++;
      while (vi < ev.size()) @(negedge clk);
    end
    checks++;
    $display("latency to first payload word: %0d cycles", lat_max);
    if (lat_max > 12) begin failures++; $display("FAIL latency %0d", lat_max); end
    // phase 2: random mix with gaps
    gaps = 1;
    for (int t = 0; t < 120; t++) begin
      int kind;
      kind = $urandom % 6;
      kinds[kind]++;
      make(kind, f, video);
      if (video) nv++;
      add_frame(f, video);
    end
    while (vi < ev.size() || fi < ef.size()) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++; if (n_video != 32'(nv)) begin failures++; $display("FAIL video count %0d/%0d", n_video, nv); end
    checks++; if (n_video + n_other != 125) failures++;
    for (int k = 0; k < 6; k++) begin checks++; if (kinds[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

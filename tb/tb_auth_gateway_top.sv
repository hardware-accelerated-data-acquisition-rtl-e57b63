// tb_auth_gateway_top: end-to-end test of the gateway at its default sizes.
//
// Two DRAM models serve the video and the parity read ports. The test
// configures the gateway over AXI4-Lite and then:
//  1. runs a line of CAMS cameras: the parity frame produced for camera k
//     (without its 16-byte header) is placed in DRAM as the incoming parity
//     packet for camera k+1; every frame is compared word by word with a
//     frame built here (header, XOR of zero-extended payloads, MACs of all
//     cameras so far computed by the reference SHA3 model);
//  2. rebuilds one camera's video packet from the final parity and the
//     other packets, as a receiver would after losing that link;
//  3. queues several video descriptors before any parity descriptor, so
//     jobs must wait for their pair, then measures back-to-back throughput
//     of 1500-byte packets against 1 Gbit/s at a 100 MHz clock;
//  4. overfills the video descriptor queue and checks the overflow flag;
//  5. passes a GVSP video frame and an ARP frame through the acquisition
//     filter and checks the separated outputs;
//  6. as a receiving node would, checks one camera's video packet against
//     the tag carried in the final parity frame: the intact packet must come
//     out of the receive-side check, a copy with one byte changed must be
//     dropped.
// In every phase the test counts frames whose first XOR word leaves while
// the video packet is still being read, i.e. frames built in-stream; all
// of them must be.
// Output back-pressure is applied in phases 1 and 2. Each mechanism is
// counted and a mechanism that never occurred counts as a failure.
module tb_auth_gateway_top;
  import auth_pkg::*;
  import tb_sha3_ref::*;

  localparam int MEMW = 16384;
  localparam int CAMS = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // AXI-Lite
  logic [7:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [1:0] bresp, rresp;
  // AXI read ports
  logic [31:0] v_araddr, p_araddr, v_rdata, p_rdata;
  logic [3:0]  v_arlen, p_arlen;
  logic [2:0]  v_arsize, p_arsize;
  logic [1:0]  v_arburst, p_arburst, v_rresp, p_rresp;
  logic v_arvalid, v_arready, v_rlast, v_rvalid, v_rready;
  logic p_arvalid, p_arready, p_rlast, p_rvalid, p_rready;
  // frame out
  logic tx_valid, tx_ready = 1;
  beat_t tx_beat;
  logic [31:0] jobs, frames;
  int v_viol, p_viol, v_bursts, p_bursts;
  // acquisition side
  logic rx_valid = 0, rx_ready, vid_valid, fwd_valid;
  beat_t rx_beat, vid_beat, fwd_beat;
  logic [31:0] acq_video_frames, acq_other_frames;
  byte unsigned vid_rx [$], fwd_rx [$];
  always @(posedge clk) begin
    if (rst_n && vid_valid) for (int b = 0; b < 4; b++) if (vid_beat.keep[b]) vid_rx.push_back(vid_beat.data[8*b +: 8]);
    if (rst_n && fwd_valid) for (int b = 0; b < 4; b++) if (fwd_beat.keep[b]) fwd_rx.push_back(fwd_beat.data[8*b +: 8]);
  end
  task automatic send_rx(input byte unsigned f[$]);
    for (int i = 0; i < f.size(); i += 4) begin
      @(negedge clk);
      rx_valid = 1;
      rx_beat = '0;
      for (int b = 0; b < 4; b++) if (i + b < f.size()) begin
        rx_beat.data[8*b +: 8] = f[i + b]; rx_beat.keep[b] = 1'b1;
      end
      rx_beat.last = (i + 4 >= f.size());
      #1;
      while (!rx_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk); rx_valid = 0;
  endtask

  int checks = 0, failures = 0;
  // mechanism counters
  int n_tx_stall = 0, n_mac_wait = 0, n_v_longer = 0, n_p_longer = 0, n_carried_macs = 0,
      n_pad_block = 0, n_page_cross = 0, n_wait_pair = 0, n_overflow = 0, n_rebuild = 0,
      n_fifo_full = 0, n_separated = 0, n_rcv_pass = 0, n_rcv_drop = 0;
  bit stall_en = 0;

  auth_gateway_top dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata),
    .s_wstrb(4'hF), .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp),
    .s_bvalid(bvalid), .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid),
    .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .v_araddr, .v_arlen, .v_arsize, .v_arburst, .v_arvalid, .v_arready,
    .v_rdata, .v_rresp, .v_rlast, .v_rvalid, .v_rready,
    .p_araddr, .p_arlen, .p_arsize, .p_arburst, .p_arvalid, .p_arready,
    .p_rdata, .p_rresp, .p_rlast, .p_rvalid, .p_rready,
    .tx_valid, .tx_ready, .tx_beat, .jobs, .frames,
    .acq_enable(1'b1), .acq_gvsp_port(16'd20202), .rx_valid, .rx_ready, .rx_beat,
    .vid_valid, .vid_ready(1'b1), .vid_beat, .fwd_valid, .fwd_ready(1'b1), .fwd_beat,
    .acq_video_frames, .acq_other_frames,
    .rcv_valid, .rcv_ready, .rcv_beat, .rcv_tag_valid, .rcv_tag_ready, .rcv_tag,
    .ok_valid, .ok_ready(1'b1), .ok_beat, .rcv_res_valid, .rcv_res_ok, .rcv_passed, .rcv_dropped);

  // receive side
  logic rcv_valid = 0, rcv_ready, rcv_tag_valid = 0, rcv_tag_ready, ok_valid;
  logic rcv_res_valid, rcv_res_ok;
  logic [255:0] rcv_tag = '0, tag3;
  beat_t rcv_beat, ok_beat;
  logic [31:0] rcv_passed, rcv_dropped;
  byte unsigned ok_rx [$];
  int rcv_ok_results = 0, rcv_bad_results = 0;
  always @(posedge clk) begin
    if (rst_n && ok_valid) for (int b = 0; b < 4; b++) if (ok_beat.keep[b]) ok_rx.push_back(ok_beat.data[8*b +: 8]);
    if (rst_n && rcv_res_valid) begin
      if (rcv_res_ok) rcv_ok_results++; else rcv_bad_results++;
    end
  end

  // one packet and its tag into the receive-side check
  task automatic send_rcv(input byte unsigned f[$], input logic [255:0] t);
    rcv_tag <= t; rcv_tag_valid <= 1;
    for (int i = 0; i < f.size(); i += 4) begin
      beat_t bt;
      bt.data = '0; bt.keep = '0;
      for (int b = 0; b < 4; b++) if (i + b < f.size()) begin
        bt.data[8*b +: 8] = f[i + b]; bt.keep[b] = 1'b1;
      end
      bt.last = (i + 4 >= f.size());
      rcv_valid <= 1; rcv_beat <= bt;
      @(negedge clk);
      while (!rcv_ready) @(negedge clk);
      @(posedge clk);
    end
    rcv_valid <= 0;
    @(negedge clk);
    while (!rcv_tag_ready) @(negedge clk);
    @(posedge clk);
    rcv_tag_valid <= 0;
    @(posedge clk);
  endtask

  axi_rd_mem #(.WORDS(MEMW)) vmem (.clk, .rst_n, .araddr(v_araddr), .arlen(v_arlen),
    .arsize(v_arsize), .arburst(v_arburst), .arvalid(v_arvalid), .arready(v_arready),
    .rdata(v_rdata), .rresp(v_rresp), .rlast(v_rlast), .rvalid(v_rvalid), .rready(v_rready),
    .violations(v_viol), .bursts(v_bursts));
  axi_rd_mem #(.WORDS(MEMW)) pmem (.clk, .rst_n, .araddr(p_araddr), .arlen(p_arlen),
    .arsize(p_arsize), .arburst(p_arburst), .arvalid(p_arvalid), .arready(p_arready),
    .rdata(p_rdata), .rresp(p_rresp), .rlast(p_rlast), .rvalid(p_rvalid), .rready(p_rready),
    .violations(p_viol), .bursts(p_bursts));

  // ---------------------------------------------------------------- output
  logic [31:0] rx [$];       // words of all received frames
  int          rx_frames = 0, word_in_frame = 0, n_instream = 0;
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      rx.push_back(tx_beat.data);
      // in-stream operation: the first XOR word leaves while the video
      // packet is still being read from DRAM
      if (word_in_frame == 4 && !dut.v_idle) n_instream++;
      word_in_frame = tx_beat.last ? 0 : word_in_frame + 1;
      if (tx_beat.last) rx_frames++;
    end
    if (rst_n && tx_valid && !tx_ready) n_tx_stall++;
    if (dut.u_trl.state_q == dut.u_trl.S_MAC && !dut.mac_valid) n_mac_wait++;
    if (dut.u_pfifo.level == 10'(512) || dut.u_vfifo.level == 10'(512)) n_fifo_full++;
    tx_ready <= stall_en ? ($urandom % 3 != 0) : 1'b1;
  end

  // ------------------------------------------------------------ bus tasks
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1;
    #1;
    while (!awready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) @(negedge clk);
    @(posedge clk); #1; bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(posedge clk); #1; arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    rready = 1; @(posedge clk); #1; rready = 0;
  endtask

  // ---------------------------------------------------------- memory help
  task automatic put_bytes(input bit to_p, input int addr, input byte unsigned b[$]);
    for (int i = 0; i < b.size(); i++) begin
      int w, s;
      w = (addr + i) / 4; s = (addr + i) % 4;
      if (to_p) pmem.mem[w][8*s +: 8] = b[i];
      else      vmem.mem[w][8*s +: 8] = b[i];
    end
  endtask

  // ------------------------------------------------------------- settings
  logic [255:0] key;
  logic [47:0]  dst = 48'h02_11_22_33_44_55, src = 48'h02_AA_BB_CC_DD_EE;
  logic [15:0]  etype = 16'h88B5;

  function automatic void header_bytes(input int xlen, ref byte unsigned h[$]);
    h.delete();
    for (int k = 0; k < 6; k++) h.push_back(dst[47 - 8*k -: 8]);
    for (int k = 0; k < 6; k++) h.push_back(src[47 - 8*k -: 8]);
    h.push_back(etype[15:8]); h.push_back(etype[7:0]);
    h.push_back(8'(xlen >> 8)); h.push_back(8'(xlen));
  endfunction

  // run one job: video bytes v at vaddr, parity packet p (XOR region of
  // xlen bytes, then MACs) at paddr; returns the frame bytes.
  task automatic run_job(input byte unsigned v[$], input int vaddr,
                         input byte unsigned p[$], input int xlen, input int paddr,
                         ref byte unsigned frame[$]);
    int base, nw;
    put_bytes(0, vaddr, v);
    put_bytes(1, paddr, p);
    base = rx.size();
    wr(8'h40, 32'(vaddr)); wr(8'h44, 32'(v.size()));
    wr(8'h48, 32'(paddr)); wr(8'h4C, {16'(xlen), 16'(p.size())});
    while (rx_frames == 0 || rx.size() == base || !frame_complete(base)) @(negedge clk);
    frame.delete();
    for (int i = base; i < rx.size(); i++)
      for (int b = 0; b < 4; b++) frame.push_back(rx[i][8*b +: 8]);
  endtask

  int frame_ends [$];
  always @(posedge clk) if (rst_n && tx_valid && tx_ready && tx_beat.last) frame_ends.push_back(rx.size() + 1);
  function automatic bit frame_complete(int base);
    foreach (frame_ends[i]) if (frame_ends[i] > base) return 1;
    return 0;
  endfunction

  function automatic void expected_frame(input byte unsigned v[$], input byte unsigned p[$],
                                         input int xlen, ref byte unsigned e[$]);
    int vl, xl;
    byte unsigned h[$];
    logic [255:0] m;
    vl = 4 * ((v.size() + 3) / 4);
    xl = (vl > xlen) ? vl : xlen;
    header_bytes(xl, h);
    e = h;
    for (int i = 0; i < xl; i++)
      e.push_back(((i < v.size()) ? v[i] : 8'h00) ^ ((i < xlen) ? p[i] : 8'h00));
    for (int i = xlen; i < p.size(); i++) e.push_back(p[i]);
    m = mac_ref(key, v);
    for (int k = 0; k < 32; k++) e.push_back(m[8*k +: 8]);
  endfunction

  task automatic compare(input string what, input byte unsigned got[$], input byte unsigned e[$]);
    checks++;
    if (got.size() != e.size()) begin
      failures++; $display("FAIL %s: %0d bytes, expected %0d", what, got.size(), e.size());
      return;
    end
    for (int i = 0; i < e.size(); i++) if (got[i] !== e[i]) begin
      failures++; $display("FAIL %s: byte %0d %h exp %h", what, i, got[i], e[i]);
      return;
    end
  endtask

  // ----------------------------------------------------------------- main
  initial begin
    byte unsigned vids [CAMS][$];
    byte unsigned p[$], fr[$], e[$], p0[$], rebuilt[$];
    int xlen, x0len, lens [CAMS];
    logic [31:0] st;
    int t0, t1;

    for (int k = 0; k < 8; k++) key[32*k +: 32] = $urandom;
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) wr(8'(8'h20 + 4*k), key[32*k +: 32]);
    wr(8'h08, 32'(etype));
    wr(8'h0C, dst[31:0]); wr(8'h10, 32'(dst[47:32]));
    wr(8'h14, src[31:0]); wr(8'h18, 32'(src[47:32]));
    wr(8'h00, 32'h1);

    // ---- phase 1: a line of cameras
    stall_en = 1;
    lens = '{1021, 1400, 104, 1500, 700};  // 104: key+data fill a rate block exactly
    x0len = 800;
    p0.delete();
    for (int i = 0; i < x0len; i++) p0.push_back(8'($urandom));
    p = p0; xlen = x0len;
    for (int c = 0; c < CAMS; c++) begin
      int vaddr, paddr;
      vids[c].delete();
      for (int i = 0; i < lens[c]; i++) vids[c].push_back(8'($urandom));
      vaddr = (c == 1) ? 32'h0FF0 : 32'h4000 + 32'h1000 * c;   // camera 1 crosses a 4 KiB page
      paddr = (c == 2) ? 32'h1FFC : 32'h8000 + 32'h1000 * c;
      if (c == 1 || c == 2) n_page_cross++;
      if (4 * ((lens[c] + 3) / 4) > xlen) n_v_longer++; else if (4 * ((lens[c] + 3) / 4) < xlen) n_p_longer++;
      if (p.size() > xlen) n_carried_macs++;
      if ((lens[c] + 32) % 136 == 0) n_pad_block++;
      expected_frame(vids[c], p, xlen, e);
      run_job(vids[c], vaddr, p, xlen, paddr, fr);
      compare($sformatf("camera %0d frame", c), fr, e);
      // next camera receives this frame without its header
      xlen = {fr[14], fr[15]};
      p.delete();
      for (int i = 16; i < fr.size(); i++) p.push_back(fr[i]);
    end
    checks++;
    if (p.size() != xlen + 32 * CAMS) begin failures++; $display("FAIL MAC count"); end
    // every camera's MAC is in the final frame, in line order
    for (int c = 0; c < CAMS; c++) begin
      logic [255:0] m;
      m = mac_ref(key, vids[c]);
      checks++;
      for (int k = 0; k < 32; k++) if (p[xlen + 32*c + k] !== m[8*k +: 8]) begin
        failures++; $display("FAIL camera %0d MAC in final frame", c); break;
      end
    end

    // ---- phase 2: rebuild camera 3's packet from parity and the rest
    rebuilt.delete();
    for (int i = 0; i < lens[3]; i++) begin
      byte unsigned b;
      b = p[i] ^ ((i < x0len) ? p0[i] : 8'h00);
      for (int c = 0; c < CAMS; c++) if (c != 3 && i < lens[c]) b ^= vids[c][i];
      rebuilt.push_back(b);
    end
    compare("rebuilt camera 3", rebuilt, vids[3]);
    n_rebuild++;
    for (int k = 0; k < 32; k++) tag3[8*k +: 8] = p[xlen + 32*3 + k];

    // ---- phase 3: video descriptors first, then parity; throughput
    stall_en = 0;
    begin
      int base_frames, nj;
      byte unsigned vv [4][$];
      byte unsigned pp[$];
      nj = 4;
      pp.delete();
      for (int i = 0; i < 1500; i++) pp.push_back(8'($urandom));
      put_bytes(1, 32'h10000, pp);
      for (int j = 0; j < nj; j++) begin
        vv[j].delete();
        for (int i = 0; i < 1500; i++) vv[j].push_back(8'($urandom));
        put_bytes(0, 32'h10000 + 32'h800 * j, vv[j]);
        wr(8'h40, 32'h10000 + 32'h800 * j); wr(8'h44, 32'd1500);
      end
      repeat (20) @(negedge clk);
      rd(8'h04, st);
      checks++;
      if (st[7:0] != 8'(nj) || jobs != CAMS) begin failures++; $display("FAIL jobs ran without a pair"); end
      else n_wait_pair++;
      base_frames = rx_frames;
      t0 = $time / 10;
      for (int j = 0; j < nj; j++) begin
        wr(8'h48, 32'h10000); wr(8'h4C, {16'd1500, 16'd1500});
      end
      while (rx_frames < base_frames + nj) @(negedge clk);
      t1 = $time / 10;
      $display("%0d jobs of 1500 bytes: %0d cycles, %0d per job", nj, t1 - t0, (t1 - t0) / nj);
      checks++;
      if ((t1 - t0) / nj > 1200) begin failures++; $display("FAIL below 1 Gbit/s at 100 MHz"); end
      // check the last of these frames
      begin
        byte unsigned last_fr[$];
        int fw;
        fw = (16 + 1500 + 32) / 4;
        for (int i = rx.size() - fw; i < rx.size(); i++)
          for (int b = 0; b < 4; b++) last_fr.push_back(rx[i][8*b +: 8]);
        expected_frame(vv[nj - 1], pp, 1500, e);
        compare("batched frame", last_fr, e);
      end
    end

    // ---- phase 4: descriptor-queue overflow
    wr(8'h00, 32'h0);  // disable so that the queue fills
    for (int j = 0; j < 17; j++) begin
      wr(8'h40, 32'h100); wr(8'h44, 32'd64);
    end
    rd(8'h04, st);
    checks++;
    if (st[7:0] != 8'd16 || !st[16]) begin failures++; $display("FAIL overflow status %h", st); end
    else n_overflow++;
    wr(8'h00, 32'h2);
    rd(8'h04, st);
    checks++; if (st[16]) begin failures++; $display("FAIL overflow not cleared"); end

    // ---- phase 5: acquisition filter, one video and one ARP frame
    begin
      byte unsigned fv[$], fa[$], pay[$];
      for (int i = 0; i < 301; i++) fv.push_back(8'($urandom));
      fv[12] = 8'h08; fv[13] = 8'h00; fv[14] = 8'h45; fv[23] = 8'd17;
      fv[36] = 8'(20202 >> 8); fv[37] = 8'(20202 & 255);
      for (int i = 0; i < 64; i++) fa.push_back(8'($urandom));
      fa[12] = 8'h08; fa[13] = 8'h06;
      send_rx(fv);
      send_rx(fa);
      repeat (30) @(negedge clk);
      for (int i = 42; i < fv.size(); i++) pay.push_back(fv[i]);
      compare("acquired GVSP payload", vid_rx, pay);
      compare("forwarded ARP frame", fwd_rx, fa);
      checks++;
      if (acq_video_frames != 1 || acq_other_frames != 1) begin failures++; $display("FAIL acquisition counters"); end
      else n_separated++;
    end

    // ---- phase 6: receiving node checks camera 3's packet against the
    // tag carried in the parity frame, once intact and once tampered with
    begin
      byte unsigned bad[$];
      rcv_beat = '0;
      send_rcv(vids[3], tag3);
      bad = vids[3];
      bad[777] = bad[777] ^ 8'h10;
      send_rcv(bad, tag3);
      repeat (20) @(negedge clk);
      compare("verified packet", ok_rx, vids[3]);
      checks++;
      if (rcv_passed != 1 || rcv_dropped != 1 || rcv_ok_results != 1 || rcv_bad_results != 1) begin
        failures++; $display("FAIL receive check counters");
      end else begin
        n_rcv_pass++; n_rcv_drop++;
      end
    end

    // ---- bookkeeping
    rd(8'h1C, st);
    checks++; if (st != 32'(CAMS + 4)) begin failures++; $display("FAIL frame counter %0d", st); end
    checks++; if (v_viol != 0 || p_viol != 0) begin failures++; $display("FAIL AXI rule violations"); end
    $display("mechanisms: tx_stall=%0d mac_wait=%0d video_longer=%0d parity_longer=%0d carried_macs=%0d pad_block=%0d page_cross=%0d wait_pair=%0d overflow=%0d rebuild=%0d fifo_full=%0d separated=%0d rcv_pass=%0d rcv_drop=%0d in_stream=%0d",
             n_tx_stall, n_mac_wait, n_v_longer, n_p_longer, n_carried_macs, n_pad_block,
             n_page_cross, n_wait_pair, n_overflow, n_rebuild, n_fifo_full, n_separated, n_rcv_pass, n_rcv_drop, n_instream);
    checks++; if (n_tx_stall == 0) failures++;
    checks++; if (n_mac_wait == 0) failures++;
    checks++; if (n_v_longer == 0) failures++;
    checks++; if (n_p_longer == 0) failures++;
    checks++; if (n_carried_macs == 0) failures++;
    checks++; if (n_pad_block == 0) failures++;
    checks++; if (n_page_cross == 0) failures++;
    checks++; if (n_wait_pair == 0) failures++;
    checks++; if (n_overflow == 0) failures++;
    checks++; if (n_rebuild == 0) failures++;
    checks++; if (n_separated == 0) failures++;
    checks++; if (n_rcv_pass == 0 || n_rcv_drop == 0) failures++;
    checks++; if (n_instream != CAMS + 4) begin failures++; $display("FAIL %0d frames built in-stream", n_instream); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_auth_gateway_top_mac2: end-to-end test of the gateway with the
// optional second MAC unit switched on (SECONDARY_MAC = 1).
//
// Same setup as the default-size gateway test: two DRAM models, set-up over
// AXI4-Lite, random DRAM stalls and output back-pressure. It
//  1. runs a line of CAMS cameras, feeding each parity frame (without its
//     16-byte header) to the next camera, and compares every frame word by
//     word with a frame built here: header, XOR of the zero-extended
//     payloads, the MACs already carried, the video packet's MAC, then the
//     MAC of the incoming parity packet as read from DRAM;
//  2. checks that the final frame holds both tags of every camera in line
//     order, and rebuilds one camera's video packet from the parity.
// Each mechanism is counted and one that never occurred counts as a
// failure. Descriptor ordering, throughput, overflow and the acquisition
// filter do not depend on the second MAC and are covered by the default
// gateway test.
module tb_auth_gateway_top_mac2;
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
      n_fifo_full = 0, n_separated = 0;
  bit stall_en = 0;

  auth_gateway_top #(.SECONDARY_MAC(1'b1)) dut (
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
    .rcv_valid(1'b0), .rcv_ready, .rcv_beat, .rcv_tag_valid(1'b0), .rcv_tag_ready,
    .rcv_tag, .ok_valid, .ok_ready(1'b1), .ok_beat, .rcv_res_valid, .rcv_res_ok,
    .rcv_passed, .rcv_dropped);

  // receive-side check unused here
  beat_t rcv_beat = '0, ok_beat;
  logic [255:0] rcv_tag = '0;
  logic rcv_ready, rcv_tag_ready, ok_valid, rcv_res_valid, rcv_res_ok;
  logic [31:0] rcv_passed, rcv_dropped;

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
  int          rx_frames = 0;
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      rx.push_back(tx_beat.data);
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
    m = mac_ref(key, p);
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
    if (p.size() != xlen + 64 * CAMS) begin failures++; $display("FAIL MAC count"); end
    // every camera's video MAC is in the final frame, in line order, each
    // followed by its parity MAC (checked frame by frame above)
    for (int c = 0; c < CAMS; c++) begin
      logic [255:0] m;
      m = mac_ref(key, vids[c]);
      checks++;
      for (int k = 0; k < 32; k++) if (p[xlen + 64*c + k] !== m[8*k +: 8]) begin
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

    $display("mechanisms: tx_stall=%0d mac_wait=%0d video_longer=%0d parity_longer=%0d carried_macs=%0d pad_block=%0d page_cross=%0d rebuild=%0d",
             n_tx_stall, n_mac_wait, n_v_longer, n_p_longer, n_carried_macs, n_pad_block,
             n_page_cross, n_rebuild);
    checks++; if (n_tx_stall == 0) failures++;
    checks++; if (n_mac_wait == 0) failures++;
    checks++; if (n_v_longer == 0) failures++;
    checks++; if (n_p_longer == 0) failures++;
    checks++; if (n_carried_macs == 0) failures++;
    checks++; if (n_pad_block == 0) failures++;
    checks++; if (n_page_cross == 0) failures++;
    checks++; if (n_rebuild == 0) failures++;
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

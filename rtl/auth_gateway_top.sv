// auth_gateway_top: programmable-logic subsystem of an authenticating,
// redundant GigE Vision gateway.
//
// Each camera of a line of cameras forwards a parity stream to its
// neighbour. For every pair of (video packet, parity packet) that the
// driver has located in DRAM, this subsystem reads both packets at once
// through two AXI read ports, XORs the video data into the parity data,
// computes a keyed Keccak MAC of the video data, and emits a new parity
// Ethernet frame:
//   header (16 B) | XOR region | MACs of earlier cameras | MAC of this video
// The frame leaves on a 32-bit stream towards an Ethernet controller.
//
// With SECONDARY_MAC set, a second MAC unit hashes the parity packet as it
// is read from DRAM and the trailer appends that tag after the video MAC;
// the document shows this path as optional, so it is off by default.
//
// Structure (as in the document's block diagram): register block on the
// M-GP port (conf_regs) -> two descriptor queues (desc_queue) -> job_ctrl ->
// video DMA and parity DMA (dma_reader, one S-GP port each). The video DMA
// feeds the MAC unit (keccak_mac) and, through a FIFO, the XOR unit; the
// parity DMA feeds the XOR unit through a FIFO. XOR -> header_gen ->
// trailer_gen, which appends the MAC.
//
// Beside the gateway sits the acquisition filter (gvsp_filter), which splits
// received GigE Vision video frames from other traffic; the two are
// independent and share only clock and reset. Also beside it is the
// receive-side MAC check (mac_verify) that a receiving node uses: it
// recomputes the MAC of an incoming packet with the key held in the register
// block and passes the packet on only if the tag supplied with it matches.
//
// Ports: AXI4-Lite slave (M-GP), two AXI3 read masters (S-GP0 video,
// S-GP1 parity), parity frame stream out; for the filter a received-frame
// stream in, video payload and forwarded-frame streams out; for the MAC
// check a packet stream and a tag in, verified packets and a per-packet
// result out. One clock,
// active-low asynchronous reset.
module auth_gateway_top
  import auth_pkg::*;
#(
  parameter int unsigned DQ_DEPTH   = 16,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned MAX_BURST  = 16,
  parameter bit          SECONDARY_MAC = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // M-GP: AXI4-Lite register port
  input  logic [7:0]  s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [7:0]  s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // S-GP0: video DMA read port
  output logic [AW-1:0] v_araddr,
  output logic [3:0]    v_arlen,
  output logic [2:0]    v_arsize,
  output logic [1:0]    v_arburst,
  output logic          v_arvalid,
  input  logic          v_arready,
  input  logic [DW-1:0] v_rdata,
  input  logic [1:0]    v_rresp,
  input  logic          v_rlast,
  input  logic          v_rvalid,
  output logic          v_rready,
  // S-GP1: parity DMA read port
  output logic [AW-1:0] p_araddr,
  output logic [3:0]    p_arlen,
  output logic [2:0]    p_arsize,
  output logic [1:0]    p_arburst,
  output logic          p_arvalid,
  input  logic          p_arready,
  input  logic [DW-1:0] p_rdata,
  input  logic [1:0]    p_rresp,
  input  logic          p_rlast,
  input  logic          p_rvalid,
  output logic          p_rready,
  // parity frame out, towards the Ethernet controller
  output logic          tx_valid,
  input  logic          tx_ready,
  output beat_t         tx_beat,
  // activity counters
  output logic [31:0]   jobs,
  output logic [31:0]   frames,
  // acquisition side (stands beside the gateway): received Ethernet frames
  // in, GVSP payload and remaining frames out
  input  logic          acq_enable,
  input  logic [15:0]   acq_gvsp_port,
  input  logic          rx_valid,
  output logic          rx_ready,
  input  beat_t         rx_beat,
  output logic          vid_valid,
  input  logic          vid_ready,
  output beat_t         vid_beat,
  output logic          fwd_valid,
  input  logic          fwd_ready,
  output beat_t         fwd_beat,
  output logic [31:0]   acq_video_frames,
  output logic [31:0]   acq_other_frames,
  // receive side: packets and their expected tags in, verified packets out
  input  logic          rcv_valid,
  output logic          rcv_ready,
  input  beat_t         rcv_beat,
  input  logic          rcv_tag_valid,
  output logic          rcv_tag_ready,
  input  logic [MAC_BITS-1:0] rcv_tag,
  output logic          ok_valid,
  input  logic          ok_ready,
  output beat_t         ok_beat,
  output logic          rcv_res_valid,
  output logic          rcv_res_ok,
  output logic [31:0]   rcv_passed,
  output logic [31:0]   rcv_dropped
);

  localparam int unsigned CW = $clog2(DQ_DEPTH + 1);

  // configuration
  logic                enable, clr_ovf;
  logic [KEY_BITS-1:0] key;
  logic [47:0]         dst_mac, src_mac;
  logic [15:0]         ethertype;
  logic                vdq_push, pdq_push;
  desc_t               dq_desc;

  // descriptor queues
  desc_t         vdq_head, pdq_head;
  logic          vdq_ne, pdq_ne, vdq_full, pdq_full, vdq_ovf, pdq_ovf;
  logic [CW-1:0] vdq_cnt, pdq_cnt;

  // control
  logic  dq_pop, dma_start, job_valid, frame_done;
  desc_t v_desc, p_desc;
  job_t  job;

  // DMA
  logic v_idle, p_idle, v_done, p_done, v_err, p_err;

  // streams
  logic  vd_valid, vd_ready;  beat_t vd_beat;   // video DMA out
  logic  vf_in_valid, vf_in_ready;
  logic  vf_valid, vf_ready;  beat_t vf_beat;   // video FIFO out
  logic  mac_in_valid, mac_in_ready;
  logic  pd_valid, pd_ready;  beat_t pd_beat;   // parity DMA out
  logic  pf_valid, pf_ready;  beat_t pf_beat;   // parity FIFO out
  logic  x_valid, x_ready;    beat_t x_beat;    // XOR out
  logic  h_valid, h_ready;    beat_t h_beat;    // header out
  localparam int unsigned NMAC = SECONDARY_MAC ? 2 : 1;
  logic [NMAC-1:0]     mac_valid, mac_ready;
  logic [MAC_BITS-1:0] mac [NMAC];
  logic  pf_in_valid, pf_in_ready;
  logic  xor_active;

  conf_regs u_conf (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .enable, .key, .dst_mac, .src_mac, .ethertype,
    .vdq_push, .pdq_push, .dq_desc, .clr_overflow(clr_ovf),
    .vdq_count(8'(vdq_cnt)), .pdq_count(8'(pdq_cnt)),
    .vdq_overflow(vdq_ovf), .pdq_overflow(pdq_ovf),
    .dma_err(v_err | p_err), .frames
  );

  desc_queue #(.DEPTH(DQ_DEPTH)) u_vdq (
    .clk, .rst_n, .push(vdq_push), .push_desc(dq_desc), .pop(dq_pop),
    .head(vdq_head), .nonempty(vdq_ne), .full(vdq_full), .count(vdq_cnt),
    .overflow(vdq_ovf), .clr_overflow(clr_ovf)
  );

  desc_queue #(.DEPTH(DQ_DEPTH)) u_pdq (
    .clk, .rst_n, .push(pdq_push), .push_desc(dq_desc), .pop(dq_pop),
    .head(pdq_head), .nonempty(pdq_ne), .full(pdq_full), .count(pdq_cnt),
    .overflow(pdq_ovf), .clr_overflow(clr_ovf)
  );

  job_ctrl u_ctrl (
    .clk, .rst_n, .enable,
    .vdq_nonempty(vdq_ne), .vdq_head, .pdq_nonempty(pdq_ne), .pdq_head,
    .dma_v_idle(v_idle), .dma_p_idle(p_idle), .frame_done,
    .pop(dq_pop), .dma_start, .v_desc, .p_desc, .job_valid, .job, .jobs
  );

  dma_reader #(.MAX_BURST(MAX_BURST)) u_vdma (
    .clk, .rst_n, .start(dma_start), .addr(v_desc.addr), .len(v_desc.len),
    .idle(v_idle), .done(v_done), .err(v_err),
    .m_araddr(v_araddr), .m_arlen(v_arlen), .m_arsize(v_arsize),
    .m_arburst(v_arburst), .m_arvalid(v_arvalid), .m_arready(v_arready),
    .m_rdata(v_rdata), .m_rresp(v_rresp), .m_rlast(v_rlast),
    .m_rvalid(v_rvalid), .m_rready(v_rready),
    .o_valid(vd_valid), .o_ready(vd_ready), .o_beat(vd_beat)
  );

  dma_reader #(.MAX_BURST(MAX_BURST)) u_pdma (
    .clk, .rst_n, .start(dma_start), .addr(p_desc.addr), .len(p_desc.len),
    .idle(p_idle), .done(p_done), .err(p_err),
    .m_araddr(p_araddr), .m_arlen(p_arlen), .m_arsize(p_arsize),
    .m_arburst(p_arburst), .m_arvalid(p_arvalid), .m_arready(p_arready),
    .m_rdata(p_rdata), .m_rresp(p_rresp), .m_rlast(p_rlast),
    .m_rvalid(p_rvalid), .m_rready(p_rready),
    .o_valid(pd_valid), .o_ready(pd_ready), .o_beat(pd_beat)
  );

  // video words go to the MAC and the XOR FIFO together
  assign vd_ready     = mac_in_ready && vf_in_ready;
  assign mac_in_valid = vd_valid && vf_in_ready;
  assign vf_in_valid  = vd_valid && mac_in_ready;

  keccak_mac u_mac (
    .clk, .rst_n, .key,
    .s_valid(mac_in_valid), .s_ready(mac_in_ready), .s_beat(vd_beat),
    .mac_valid(mac_valid[0]), .mac_ready(mac_ready[0]), .mac(mac[0])
  );

  // optional second MAC over the parity packet as read from DRAM
  if (SECONDARY_MAC) begin : g_mac2
    logic mac2_in_valid, mac2_in_ready;
    assign pd_ready      = mac2_in_ready && pf_in_ready;
    assign mac2_in_valid = pd_valid && pf_in_ready;
    assign pf_in_valid   = pd_valid && mac2_in_ready;
    keccak_mac u_mac2 (
      .clk, .rst_n, .key,
      .s_valid(mac2_in_valid), .s_ready(mac2_in_ready), .s_beat(pd_beat),
      .mac_valid(mac_valid[1]), .mac_ready(mac_ready[1]), .mac(mac[1])
    );
  end else begin : g_no_mac2
    assign pd_ready    = pf_in_ready;
    assign pf_in_valid = pd_valid;
  end

  stream_fifo #(.DEPTH(FIFO_DEPTH)) u_vfifo (
    .clk, .rst_n,
    .s_valid(vf_in_valid), .s_ready(vf_in_ready), .s_beat(vd_beat),
    .m_valid(vf_valid), .m_ready(vf_ready), .m_beat(vf_beat), .level()
  );

  stream_fifo #(.DEPTH(FIFO_DEPTH)) u_pfifo (
    .clk, .rst_n,
    .s_valid(pf_in_valid), .s_ready(pf_in_ready), .s_beat(pd_beat),
    .m_valid(pf_valid), .m_ready(pf_ready), .m_beat(pf_beat), .level()
  );

  xor_unit u_xor (
    .clk, .rst_n, .job_valid, .job,
    .v_valid(vf_valid), .v_ready(vf_ready), .v_beat(vf_beat),
    .p_valid(pf_valid), .p_ready(pf_ready), .p_beat(pf_beat),
    .o_valid(x_valid), .o_ready(x_ready), .o_beat(x_beat), .active(xor_active)
  );

  header_gen u_hdr (
    .clk, .rst_n, .job_valid, .job, .dst_mac, .src_mac, .ethertype,
    .s_valid(x_valid), .s_ready(x_ready), .s_beat(x_beat),
    .o_valid(h_valid), .o_ready(h_ready), .o_beat(h_beat)
  );

  trailer_gen #(.NMAC(NMAC)) u_trl (
    .clk, .rst_n,
    .s_valid(h_valid), .s_ready(h_ready), .s_beat(h_beat),
    .mac_valid, .mac_ready, .mac,
    .o_valid(tx_valid), .o_ready(tx_ready), .o_beat(tx_beat),
    .frame_done
  );

  gvsp_filter u_acq (
    .clk, .rst_n, .enable(acq_enable), .gvsp_port(acq_gvsp_port),
    .s_valid(rx_valid), .s_ready(rx_ready), .s_beat(rx_beat),
    .vid_valid, .vid_ready, .vid_beat, .fwd_valid, .fwd_ready, .fwd_beat,
    .n_video(acq_video_frames), .n_other(acq_other_frames)
  );

  mac_verify #(.DEPTH(FIFO_DEPTH)) u_rcv (
    .clk, .rst_n, .key,
    .s_valid(rcv_valid), .s_ready(rcv_ready), .s_beat(rcv_beat),
    .tag_valid(rcv_tag_valid), .tag_ready(rcv_tag_ready), .tag(rcv_tag),
    .m_valid(ok_valid), .m_ready(ok_ready), .m_beat(ok_beat),
    .res_valid(rcv_res_valid), .res_ok(rcv_res_ok),
    .n_pass(rcv_passed), .n_drop(rcv_dropped)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          frames <= '0;
    else if (frame_done) frames <= frames + 1;
  end

endmodule

// conf_regs: register block of the gateway on the M-GP AXI4-Lite port.
//
// The CPU configures the gateway and announces packets through this block.
// It holds the MAC key, the addresses and EtherType of the parity frame and
// an enable bit, turns writes to the descriptor registers into pushes into
// the two descriptor queues, and reports status. The document names a
// configuration unit and says that the kernel module writes the packet
// locations into the descriptor queues; the register map below is this
// design's choice (offsets in bytes, all registers 32 bits):
//   0x00 CTRL       bit0 enable, bit1 clear DQ overflow flags (self-clearing)
//   0x04 STATUS     [7:0] video DQ count, [15:8] parity DQ count,
//                   bit16 video DQ overflow, bit17 parity DQ overflow,
//                   bit18 DMA read error
//   0x08 ETHERTYPE  [15:0]
//   0x0C DST_LO     dst MAC [31:0]      0x10 DST_HI  dst MAC [47:32]
//   0x14 SRC_LO     src MAC [31:0]      0x18 SRC_HI  src MAC [47:32]
//   0x1C FRAMES     parity frames sent (read only)
//   0x20-0x3C KEY0..KEY7  key word i = key[32i+31:32i] (write only)
//   0x40 VDQ_ADDR   address of the next video packet
//   0x44 VDQ_LEN    [15:0] length in bytes; writing pushes the descriptor
//   0x48 PDQ_ADDR   address of the next parity packet
//   0x4C PDQ_LEN    [15:0] length, [31:16] XOR-region length; writing pushes
//
// Bus timing: a write is taken when AW and W are both valid and no response
// is pending, answered with OKAY one cycle later; a read is answered one
// cycle after AR. Byte strobes are ignored (whole-word writes).
module conf_regs
  import auth_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
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
  // configuration out
  output logic                enable,
  output logic [KEY_BITS-1:0] key,
  output logic [47:0]         dst_mac,
  output logic [47:0]         src_mac,
  output logic [15:0]         ethertype,
  // descriptor queue pushes
  output logic  vdq_push,
  output logic  pdq_push,
  output desc_t dq_desc,
  output logic  clr_overflow,
  // status in
  input  logic [7:0]  vdq_count,
  input  logic [7:0]  pdq_count,
  input  logic        vdq_overflow,
  input  logic        pdq_overflow,
  input  logic        dma_err,
  input  logic [31:0] frames
);

  logic [AW-1:0] vaddr_q, paddr_q;
  logic          wr, rd;

  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr        = s_awready;
  assign s_arready = !s_rvalid;
  assign rd        = s_arvalid && s_arready;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable       <= 1'b0;
      key          <= '0;
      dst_mac      <= '1;
      src_mac      <= '0;
      ethertype    <= 16'h88B5;
      vaddr_q      <= '0;
      paddr_q      <= '0;
      vdq_push     <= 1'b0;
      pdq_push     <= 1'b0;
      dq_desc      <= '0;
      clr_overflow <= 1'b0;
      s_bvalid     <= 1'b0;
      s_rvalid     <= 1'b0;
      s_rdata      <= '0;
    end else begin
      vdq_push     <= 1'b0;
      pdq_push     <= 1'b0;
      clr_overflow <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (wr) begin
        s_bvalid <= 1'b1;
        unique casez (s_awaddr[7:2])
          6'h00: begin enable <= s_wdata[0]; clr_overflow <= s_wdata[1]; end
          6'h02: ethertype <= s_wdata[15:0];
          6'h03: dst_mac[31:0]  <= s_wdata;
          6'h04: dst_mac[47:32] <= s_wdata[15:0];
          6'h05: src_mac[31:0]  <= s_wdata;
          6'h06: src_mac[47:32] <= s_wdata[15:0];
          6'b001???: key[32*s_awaddr[4:2] +: 32] <= s_wdata;
          6'h10: vaddr_q <= s_wdata;
          6'h11: begin
            vdq_push <= 1'b1;
            dq_desc  <= '{addr: vaddr_q, len: s_wdata[15:0], xlen: '0};
          end
          6'h12: paddr_q <= s_wdata;
          6'h13: begin
            pdq_push <= 1'b1;
            dq_desc  <= '{addr: paddr_q, len: s_wdata[15:0], xlen: s_wdata[31:16]};
          end
          default: ;
        endcase
      end
      if (rd) begin
        s_rvalid <= 1'b1;
        unique case (s_araddr[7:2])
          6'h00: s_rdata <= {31'd0, enable};
          6'h01: s_rdata <= {13'd0, dma_err, pdq_overflow, vdq_overflow, pdq_count, vdq_count};
          6'h02: s_rdata <= {16'd0, ethertype};
          6'h03: s_rdata <= dst_mac[31:0];
          6'h04: s_rdata <= {16'd0, dst_mac[47:32]};
          6'h05: s_rdata <= src_mac[31:0];
          6'h06: s_rdata <= {16'd0, src_mac[47:32]};
          6'h07: s_rdata <= frames;
          6'h10: s_rdata <= vaddr_q;
          6'h12: s_rdata <= paddr_q;
          default: s_rdata <= '0;
        endcase
      end
    end
  end

endmodule

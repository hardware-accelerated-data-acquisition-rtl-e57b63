// desc_queue: descriptor queue (DQ) between the kernel driver and a DMA core.
//
// The driver announces each video or parity packet it has found in DRAM by
// writing a descriptor (address, length, XOR-region length) to the queue
// through the M-GP register port; the DMA side pops descriptors in order.
// The document describes the DQ units by this function only; a circular
// buffer of DEPTH descriptors whose write is dropped and flagged as an
// overflow when the queue is full is this design's choice.
//
// Interface: `push`/`push_desc` from the register block, `pop` when the
// consumer takes `head` (valid while `nonempty`). `count` reports the fill
// level for the driver; `overflow` is sticky until `clr_overflow`.
// Timing: a pushed descriptor is visible at `head` in the next cycle.
module desc_queue
  import auth_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  desc_t push_desc,
  input  logic  pop,
  output desc_t head,
  output logic  nonempty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic  overflow,
  input  logic  clr_overflow
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  desc_t         q [DEPTH];
  logic [PW-1:0] wp_q, rp_q;
  logic [CW-1:0] cnt_q;
  logic          ovf_q;

  logic wr, rd;
  assign nonempty = (cnt_q != '0);
  assign full     = (cnt_q == CW'(DEPTH));
  assign rd       = pop && nonempty;
  assign wr       = push && (!full || rd);
  assign head     = q[rp_q];
  assign count    = cnt_q;
  assign overflow = ovf_q;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr) q[wp_q] <= push_desc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
      ovf_q <= 1'b0;
    end else begin
      if (wr) wp_q <= inc(wp_q);
      if (rd) rp_q <= inc(rp_q);
      unique case ({wr, rd})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: cnt_q <= cnt_q;
      endcase
      if (push && !wr)       ovf_q <= 1'b1;
      else if (clr_overflow) ovf_q <= 1'b0;
    end
  end

endmodule

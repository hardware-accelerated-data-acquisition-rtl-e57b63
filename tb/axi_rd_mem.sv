// axi_rd_mem: behavioural model of DRAM behind an AXI3 read port, for the
// testbenches. Serves one burst at a time with a random delay before
// arready and random gaps between data beats, and counts rule violations
// (burst over 16 beats, burst crossing a 4 KiB page, size other than
// 4 bytes, type other than INCR). Word i of `mem` holds bytes 4i..4i+3.
module axi_rd_mem #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned STALL_PCT = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] araddr,
  input  logic [3:0]  arlen,
  input  logic [2:0]  arsize,
  input  logic [1:0]  arburst,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready,
  output int          violations,
  output int          bursts
);
  logic [31:0] mem [WORDS];
  logic [31:0] a_q;
  int          left_q;
  logic        busy_q;

  initial begin
    violations = 0;
    bursts = 0;
  end

  assign rresp = 2'b00;
  assign rdata = mem[(a_q >> 2) % WORDS];
  assign rlast = (left_q == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 0;
      arready <= 0;
      rvalid  <= 0;
      left_q  <= 0;
      a_q     <= 0;
    end else begin
      arready <= 0;
      if (!busy_q) begin
        if (arvalid && !arready && ($urandom % 100 >= STALL_PCT)) arready <= 1;
        if (arvalid && arready) begin
          busy_q <= 1;
          a_q    <= araddr;
          left_q <= int'(arlen) + 1;
          bursts <= bursts + 1;
          if (arsize != 3'b010 || arburst != 2'b01) violations <= violations + 1;
          if ((araddr & 32'hFFF) + 4 * (int'(arlen) + 1) > 32'h1000) violations <= violations + 1;
          rvalid <= ($urandom % 100 >= STALL_PCT);
        end
      end else begin
        if (rvalid && rready) begin
          a_q    <= a_q + 4;
          left_q <= left_q - 1;
          if (left_q == 1) begin busy_q <= 0; rvalid <= 0; end
          else rvalid <= ($urandom % 100 >= STALL_PCT);
        end else if (!rvalid) begin
          rvalid <= ($urandom % 100 >= STALL_PCT);
        end
      end
    end
  end
endmodule

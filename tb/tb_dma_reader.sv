// tb_dma_reader: reads packets of random length and start address from the
// DRAM model with random consumer stalls and checks every word, the byte
// mask and `last` of the final word, the AXI burst rules and `done`.
module tb_dma_reader;
  import auth_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, idle, done, err;
  logic [31:0] addr;
  logic [15:0] len;
  logic [31:0] araddr; logic [3:0] arlen; logic [2:0] arsize; logic [1:0] arburst;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [31:0] rdata; logic [1:0] rresp;
  logic o_valid, o_ready;
  beat_t o_beat;
  int violations, bursts;
  int checks = 0, failures = 0;

  dma_reader dut (.clk, .rst_n, .start, .addr, .len, .idle, .done, .err,
    .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize), .m_arburst(arburst),
    .m_arvalid(arvalid), .m_arready(arready), .m_rdata(rdata), .m_rresp(rresp),
    .m_rlast(rlast), .m_rvalid(rvalid), .m_rready(rready),
    .o_valid, .o_ready, .o_beat);

  axi_rd_mem #(.WORDS(8192)) mem (.clk, .rst_n, .araddr, .arlen, .arsize, .arburst,
    .arvalid, .arready, .rdata, .rresp, .rlast, .rvalid, .rready, .violations, .bursts);

  always @(negedge clk) o_ready <= ($urandom % 4 != 0);

  initial begin
    int nw, got, seen_done;
    logic [3:0] ek;
    for (int i = 0; i < 8192; i++) mem.mem[i] = 32'hA5000000 ^ (i * 32'h01010101);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      addr = 4 * ($urandom % 6000);
      if (t == 0) addr = 32'h0FF8;          // crosses a 4 KiB page after 2 words
      len  = 1 + $urandom % 1600;
      nw   = (len + 3) / 4;
      @(negedge clk);
      checks++; if (!idle) begin failures++; $display("FAIL not idle"); end
      start = 1; @(negedge clk); start = 0;
      got = 0; seen_done = 0;
      while (!seen_done) begin
        @(posedge clk);
        if (done) seen_done = 1;
        if (o_valid && o_ready) begin
          checks++;
          if (o_beat.data !== mem.mem[(addr / 4 + got) % 8192]) begin
            failures++; $display("FAIL t%0d word %0d", t, got);
          end
          ek = ((len % 4) == 0 || got != nw - 1) ? 4'hF : 4'((1 << (len % 4)) - 1);
          checks++;
          if (o_beat.last !== (got == nw - 1) || o_beat.keep !== ek) begin
            failures++; $display("FAIL t%0d word %0d last/keep", t, got);
          end
          got++;
        end
      end
      checks++; if (got != nw) begin failures++; $display("FAIL t%0d count %0d/%0d", t, got, nw); end
    end
    checks++; if (violations != 0) begin failures++; $display("FAIL %0d AXI violations", violations); end
    checks++; if (err) failures++;
    $display("bursts issued: %0d", bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

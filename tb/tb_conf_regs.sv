// tb_conf_regs: AXI4-Lite writes and reads of every register with random
// address/data arrival order, checking the configuration outputs, the
// read-back values, the descriptor pushes produced by the length
// registers and the self-clearing overflow-clear bit.
module tb_conf_regs;
  import auth_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] awaddr, araddr;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata, rdata;
  logic [1:0] bresp, rresp;
  logic enable, vdq_push, pdq_push, clr_overflow;
  logic [255:0] key;
  logic [47:0] dst_mac, src_mac;
  logic [15:0] ethertype;
  desc_t dq_desc;
  int checks = 0, failures = 0, vpushes = 0, ppushes = 0, clrs = 0;
  desc_t last_desc;

  conf_regs dut (.clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata), .s_wstrb(4'hF),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp),
    .s_rvalid(rvalid), .s_rready(rready),
    .enable, .key, .dst_mac, .src_mac, .ethertype, .vdq_push, .pdq_push, .dq_desc,
    .clr_overflow, .vdq_count(8'd3), .pdq_count(8'd5), .vdq_overflow(1'b1), .pdq_overflow(1'b0),
    .dma_err(1'b1), .frames(32'd77));

  always @(posedge clk) begin
    if (rst_n && vdq_push) begin vpushes++; last_desc = dq_desc; end
    if (rst_n && pdq_push) begin ppushes++; last_desc = dq_desc; end
    if (rst_n && clr_overflow) clrs++;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    int sk;
    sk = $urandom % 3;
    @(negedge clk);
    awaddr = a; wdata = d;
    awvalid = (sk != 1); wvalid = (sk != 2);
    #1;
    while (!awready) begin
      @(negedge clk);
      awvalid = 1; wvalid = 1;
      #1;
    end
    @(posedge clk); #1;
    awvalid = 0; wvalid = 0;
    bready = 1;
    while (!bvalid) @(negedge clk);
    checks++; if (bresp != 2'b00) failures++;
    @(posedge clk); #1; bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    while (!arready) @(negedge clk);
    @(posedge clk); #1; arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    rready = 1; @(posedge clk); #1; rready = 0;
  endtask

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    logic [255:0] k;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(8'h08, d); expect32("ethertype reset", d, 32'h88B5);
    wr(8'h00, 32'h1); expect32("enable", 32'(enable), 1);
    wr(8'h08, 32'h1234); expect32("ethertype", 32'(ethertype), 32'h1234);
    wr(8'h0C, 32'hCAFEBABE); wr(8'h10, 32'h0000DEAD);
    wr(8'h14, 32'h01234567); wr(8'h18, 32'h000089AB);
    expect32("dst lo", dst_mac[31:0], 32'hCAFEBABE); expect32("dst hi", 32'(dst_mac[47:32]), 32'hDEAD);
    expect32("src lo", src_mac[31:0], 32'h01234567); expect32("src hi", 32'(src_mac[47:32]), 32'h89AB);
    for (int i = 0; i < 8; i++) begin k[32*i +: 32] = $urandom; wr(8'(8'h20 + 4*i), k[32*i +: 32]); end
    checks++; if (key !== k) begin failures++; $display("FAIL key"); end
    rd(8'h04, d); expect32("status", d, {13'd0, 1'b1, 1'b0, 1'b1, 8'd5, 8'd3});
    rd(8'h0C, d); expect32("dst lo rb", d, 32'hCAFEBABE);
    rd(8'h1C, d); expect32("frames", d, 77);
    // descriptor pushes
    wr(8'h40, 32'h10000000); wr(8'h44, 32'd1400);
    repeat (2) @(negedge clk);
    expect32("vpush", vpushes, 1);
    expect32("vdesc addr", last_desc.addr, 32'h10000000);
    expect32("vdesc len", 32'(last_desc.len), 1400);
    wr(8'h48, 32'h20000040); wr(8'h4C, {16'd600, 16'd664});
    repeat (2) @(negedge clk);
    expect32("ppush", ppushes, 1);
    expect32("pdesc addr", last_desc.addr, 32'h20000040);
    expect32("pdesc len", 32'(last_desc.len), 664);
    expect32("pdesc xlen", 32'(last_desc.xlen), 600);
    wr(8'h00, 32'h3);
    repeat (2) @(negedge clk);
    expect32("clr pulse", clrs, 1);
    expect32("enable kept", 32'(enable), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_keccak_f1600: checks the permutation against the reference function
// on random states, against the known first lane of Keccak-f applied to the
// zero state, and against the SHA3-256 digest of the empty message.
// Also checks the 24-cycle latency.
module tb_keccak_f1600;
  import tb_sha3_ref::*;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [1599:0] sin, sout;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  keccak_f1600 dut (.clk, .rst_n, .start, .state_in(sin), .state_out(sout), .busy, .done);

  task automatic run(input logic [1599:0] s, output logic [1599:0] r, output int cyc);
    @(negedge clk);
    sin = s; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r = sout;
  endtask

  initial begin
    logic [1599:0] s, r, e;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // zero state
    run('0, r, cyc);
    checks++; if (r[63:0] !== 64'hF1258F7940E1DDE7) begin failures++; $display("FAIL zero lane0 %h", r[63:0]); end
    checks++; if (cyc != 25) begin failures++; $display("FAIL latency %0d", cyc); end
    // SHA3-256("") : one block 06 00 .. 00 80
    s = '0; s[7:0] = 8'h06; s[8*135 +: 8] = 8'h80;
    run(s, r, cyc);
    checks++;
    if (r[255:0] !== 256'h4a43f8804b0ad882fa493be44dff80f562d661a05647c15166d71ebff8c6ffa7) begin
      failures++; $display("FAIL sha3 empty %h", r[255:0]);
    end
    // random states against the reference
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 50; i++) s[32*i +: 32] = $urandom;
      run(s, r, cyc);
      e = keccak_f(s);
      checks++; if (r !== e) begin failures++; $display("FAIL random %0d", t); end
    end
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

// tb_keccak_mac: feeds packets of many lengths (including those whose
// padding needs a block of its own) with random input gaps and output
// stalls, and compares each tag with SHA3-256(key || packet) from digests
// computed beforehand by an independent SHA3 implementation and from the
// reference model. Checks that a 1500-byte packet is hashed within the
// 1200 cycles a 1 Gbit/s link takes for it at a 100 MHz clock.
module tb_keccak_mac;
  import auth_pkg::*;
  import tb_sha3_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [KEY_BITS-1:0] key;
  logic s_valid = 0, s_ready, mac_valid, mac_ready = 0;
  beat_t s_beat;
  logic [MAC_BITS-1:0] mac;
  int checks = 0, failures = 0;

  keccak_mac dut (.clk, .rst_n, .key, .s_valid, .s_ready, .s_beat, .mac_valid, .mac_ready, .mac);

  function automatic byte unsigned pat(int i);
    return byte'((i * 7 + 3) & 255);
  endfunction

  // send a packet, return the tag and the cycles from first word to tag
  task automatic send(input byte unsigned m[$], input bit gaps, output logic [255:0] tag, output int cyc);
    int nw, i, start_t;
    nw = (m.size() + 3) / 4;
    start_t = $time / 10;
    i = 0;
    while (i < nw) begin
      @(negedge clk);
      if (gaps && ($urandom % 3 == 0)) begin s_valid = 0; continue; end
      s_valid = 1;
      s_beat.data = '0; s_beat.keep = '0;
      for (int b = 0; b < 4; b++) if (4*i + b < m.size()) begin
        s_beat.data[8*b +: 8] = m[4*i + b]; s_beat.keep[b] = 1'b1;
      end
      // junk in unused bytes must be ignored
      for (int b = 0; b < 4; b++) if (!s_beat.keep[b]) s_beat.data[8*b +: 8] = 8'(($urandom));
      s_beat.last = (i == nw - 1);
      #1;
      if (s_ready) i++;
      @(posedge clk);
    end
    @(negedge clk); s_valid = 0;
    while (!mac_valid) @(negedge clk);
    cyc = $time / 10 - start_t;
    if (gaps) repeat ($urandom % 4) @(negedge clk);
    tag = mac;
    mac_ready = 1; @(negedge clk); mac_ready = 0;
  endtask

  initial begin
    int lens [9] = '{0, 1, 3, 100, 103, 104, 105, 239, 1500};
    logic [255:0] exp_tab [9] = '{
      256'h940d9e0f4af844775b8886c0d3bcfa16ee83cc28585ca96b75c2d53b73480a05,
      256'hfe844cbfac68b1cc216a0cac42beced5618722535c448ee2adc278bb6ade66ff,
      256'hfae5fd0141116b8d6209d416a6a728f9d37fe32f3a003c0f6806c8a622abdf97,
      256'h6362b233d7b99677751c1085d46c4f1a51b8eadd78e06fbcb68a5ddc7ed5da5c,
      256'hcb351228ae1a4623be13bff44f20fda3415e43c4b1e5adff6526f44bd1dd2cd2,
      256'he28ad6d39da3a67b4e2ce19ab8abc2056d959af5a25efe77060f4f0d541b6ac9,
      256'h5dffbced7663864f5782c0128c62b8e12868dc0df89d5ef57a85853955640c1c,
      256'hf82c3b7c7df08de9b38cff365c111b5fa97e8fc4418b9170ee0268a8be68f9f0,
      256'hbfdd2f8ec61e6af76c61d8ae8525a8dbfbbdd3bdae465bda9eb349c450f6023f};
    byte unsigned m[$];
    logic [255:0] tag;
    int cyc;
    s_beat = '0;
    for (int k = 0; k < 32; k++) key[8*k +: 8] = 8'(k);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fixed vectors; a zero-length packet is not sent (a packet has >= 1 byte)
    for (int t = 1; t < 9; t++) begin
      m.delete();
      for (int i = 0; i < lens[t]; i++) m.push_back(pat(i));
      send(m, t % 2, tag, cyc);
      checks++;
      if (tag !== exp_tab[t]) begin failures++; $display("FAIL len %0d: %h", lens[t], tag); end
      if (lens[t] == 1500 && t % 2 == 0) begin
        checks++;
        if (cyc > 1200) begin failures++; $display("FAIL 1500-byte packet took %0d cycles", cyc); end
        $display("1500-byte packet: %0d cycles", cyc);
      end
    end
    // random keys and lengths against the reference model
    for (int t = 0; t < 30; t++) begin
      for (int k = 0; k < 8; k++) key[32*k +: 32] = $urandom;
      m.delete();
      for (int i = 0; i < 1 + $urandom % 400; i++) m.push_back(8'($urandom));
      send(m, 1, tag, cyc);
      checks++;
      if (tag !== mac_ref(key, m)) begin failures++; $display("FAIL random %0d len %0d", t, m.size()); end
    end
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

// tb_desc_queue: random pushes and pops against a queue model; checks the
// head, count, full flag, order, drop-on-full with the sticky overflow flag
// and its clearing.
module tb_desc_queue;
  import auth_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, clr = 0;
  desc_t pd, head;
  logic nonempty, full, overflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  desc_t model[$];
  int overflows = 0;

  desc_queue #(.DEPTH(D)) dut (.clk, .rst_n, .push, .push_desc(pd), .pop, .head,
    .nonempty, .full, .count, .overflow, .clr_overflow(clr));

  initial begin
    bit exp_ovf = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // compare state
      checks++;
      if (count != model.size() || nonempty != (model.size() > 0) || full != (model.size() == D)
          || overflow != exp_ovf) begin
        failures++; $display("FAIL t%0d count %0d model %0d", t, count, model.size());
      end
      if (model.size() > 0) begin
        checks++; if (head !== model[0]) begin failures++; $display("FAIL t%0d head", t); end
      end
      push = ($urandom % 100) < (t < 1000 ? 60 : 40);
      pop  = ($urandom % 100) < (t < 1000 ? 35 : 60);
      clr  = ($urandom % 50) == 0;
      pd   = '{addr: $urandom, len: 16'($urandom), xlen: 16'($urandom)};
      @(posedge clk); #1;
      // model update: the pop frees room for a push in the same cycle
      begin
        bit did_pop, dropped;
        did_pop = pop && model.size() > 0;
        dropped = push && model.size() == D && !did_pop;
        if (did_pop) void'(model.pop_front());
        if (push && !dropped) model.push_back(pd);
        if (dropped) begin exp_ovf = 1; overflows++; end
        else if (clr) exp_ovf = 0;
      end
    end
    checks++; if (overflows == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("overflows: %0d", overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

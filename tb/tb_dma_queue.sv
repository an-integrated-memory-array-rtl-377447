// tb_dma_queue: random pushes into the two queues and pops, against a model
// of two FIFOs with strict priority; also fills a queue to its depth of 32
// and checks the full flags.
module tb_dma_queue;
  import imap_pkg::*;
  logic clk = 0, rst_n = 0, push, prio, pop, nonempty;
  logic [1:0] full;
  dma_desc_t desc, head;
  dma_desc_t mq [2][$];
  int checks = 0, failures = 0;

  dma_queue #(.DEPTH(32)) dut (.clk, .rst_n, .push, .prio, .desc, .full, .pop, .nonempty, .head);
  always #5 clk = !clk;

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic dma_desc_t rnd();
    dma_desc_t d;
    d = '0;
    d.emem_addr = MAW'($urandom); d.imem_addr = 11'($urandom); d.rows = 11'($urandom);
    return d;
  endfunction

  task automatic step_and_check();
    logic [1:0] s;
    // compare outputs before the edge
    checks++;
    if (nonempty != (mq[0].size() + mq[1].size() > 0)) begin failures++; $display("FAIL nonempty"); end
    if (nonempty) begin
      s = (mq[1].size() > 0) ? 2'd1 : 2'd0;
      checks++;
      if (head != mq[s[0]][0]) begin failures++; $display("FAIL head"); end
    end
    checks++;
    if (full != {mq[1].size() == 32, mq[0].size() == 32}) begin failures++; $display("FAIL full"); end
    if (pop && nonempty) void'(mq[(mq[1].size() > 0) ? 1 : 0].pop_front());
    if (push && !full[prio]) mq[prio].push_back(desc);
    @(posedge clk); #1;
  endtask

  initial begin
    push = 0; pop = 0; prio = 0; desc = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // fill the low queue, then the high one
    for (int q = 0; q < 2; q++)
      for (int i = 0; i < 32; i++) begin push = 1; prio = q[0]; desc = rnd(); step_and_check(); end
    push = 0; step_and_check();
    // drain: all high first
    for (int i = 0; i < 64; i++) begin pop = 1; step_and_check(); end
    pop = 0;
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      prio = 1'($urandom); push = ($urandom_range(0, 2) != 0) && !full[prio];
      desc = rnd(); pop = 1'($urandom);
      step_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

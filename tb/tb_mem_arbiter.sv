// tb_mem_arbiter: three masters issue random reads and writes against a
// memory model that answers reads after a random delay. Checks fixed
// priority, that a locked master keeps the port for its whole burst, that
// every read answer reaches the master that asked, and the data.
module tb_mem_arbiter;
  import imap_pkg::*;
  logic clk = 0, rst_n = 0;
  mem_req_t [2:0] mreq;
  logic [2:0] mlock, mready;
  mem_rsp_t [2:0] mrsp;
  mem_req_t sreq;
  logic [1:0] stag, srtag;
  logic sready;
  mem_rsp_t srsp;
  int checks = 0, failures = 0, contention = 0, bursts = 0, done_m = 0;

  mem_arbiter #(.NM(3)) dut (.clk, .rst_n, .m_req(mreq), .m_lock(mlock), .m_ready(mready), .m_rsp(mrsp),
                             .s_req(sreq), .s_tag(stag), .s_ready(sready), .s_rsp(srsp), .s_rtag(srtag));
  always #5 clk = !clk;

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // memory model: 256 words, read answers queued with tag
  logic [63:0] mem [256];
  typedef struct { logic [1:0] tag; logic [63:0] d; int due; } rsp_t;
  rsp_t rq [$];
  int cyc = 0;
  initial for (int i = 0; i < 256; i++) mem[i] = 64'(i) * 64'h0101;

  // per-master expected read data
  logic [63:0] expq [3][$];
  int owner_lock = -1, burst_left [3];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // arbitration checks
      if (sreq.valid) begin
        int win;
        win = -1;
        for (int m = 2; m >= 0; m--) if (mreq[m].valid) win = m;
        if (owner_lock >= 0) win = owner_lock;
        checks++;
        if (int'(stag) != win || sreq != mreq[win]) begin failures++; $display("FAIL grant %0d vs %0d", stag, win); end
        if (mreq[0].valid + mreq[1].valid + mreq[2].valid > 1) contention++;
      end
      if (sready && sreq.valid) begin
        if (sreq.we) mem[sreq.addr[7:0]] <= sreq.wdata;
        else begin
          rq.push_back('{stag, mem[sreq.addr[7:0]], cyc + $urandom_range(1, 4)});
          expq[stag].push_back(mem[sreq.addr[7:0]]);
        end
      end
      if (owner_lock >= 0) begin
        if (!mlock[owner_lock] && (!mreq[owner_lock].valid || sready)) owner_lock = -1;
      end else if (sreq.valid && mlock[stag]) owner_lock = stag;
      for (int m = 0; m < 3; m++)
        if (mrsp[m].rvalid) begin
          logic [63:0] e;
          e = expq[m].pop_front();
          checks++;
          if (mrsp[m].rdata != e) begin failures++; $display("FAIL rdata master %0d", m); end
        end
    end
  end

  always_comb begin
    srsp = '0; srtag = '0;
    if (rq.size() > 0 && rq[0].due <= cyc) begin
      srsp.rvalid = 1; srsp.rdata = rq[0].d; srtag = rq[0].tag;
    end
  end
  always @(posedge clk) if (rq.size() > 0 && rq[0].due <= cyc) void'(rq.pop_front());

  // masters
  for (genvar m = 0; m < 3; m++) begin : g_m
    initial begin
      mreq[m] = '0; mlock[m] = 0;
      wait (rst_n);
      for (int i = 0; i < 150; i++) begin
        int n;
        @(posedge clk); #1;
        n = (m == 2 && i % 3 == 0) ? 16 : 1;   // master 2 does locked bursts
        if (n > 1) bursts++;
        for (int w = 0; w < n; w++) begin
          mreq[m].valid = 1; mreq[m].we = 1'($urandom); mreq[m].addr = MAW'($urandom_range(0, 255));
          mreq[m].wdata = {$urandom, $urandom}; mlock[m] = (n > 1) && (w < n - 1);
          @(posedge clk);
          while (!mready[m]) @(posedge clk);
          #1;
        end
        mreq[m] = '0; mlock[m] = 0;
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
      done_m++;
    end
  end

  initial begin
    sready = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    fork
      forever begin @(posedge clk); #1 sready = ($urandom_range(0, 3) != 0); end
    join_none
    wait (done_m == 3);
    repeat (10) @(posedge clk);
    for (int m = 0; m < 3; m++) begin checks++; if (expq[m].size() != 0) failures++; end
    checks++; if (contention == 0 || bursts == 0) begin failures++; $display("FAIL no contention"); end
    $display("contention cycles %0d, bursts %0d", contention, bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

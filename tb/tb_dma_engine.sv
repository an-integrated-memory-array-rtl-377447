// tb_dma_engine: the DMA engine between a model of the PE array's IMEM rows
// (grant withheld at random, read data one cycle after the grant) and a
// model of EMEM (random ready, read answers after a random delay).
// Transfers: IMEM->EMEM over several rows with a pitch, EMEM->IMEM, a
// scaled (50% and 200%) IMEM->EMEM row, and a video line to EMEM. Checks
// the data moved, one IMEM cycle per row, 16 EMEM words per row, and that a
// row leaves in 16 consecutive cycles when the memory is always ready.
module tb_dma_engine;
  import imap_pkg::*;
  localparam int NPE = 128, NCH = 4, NG = 16;
  logic clk = 0, rst_n = 0;
  logic q_nonempty, q_pop, imem_req, imem_we, imem_gnt, m_lock, m_ready, busy, done;
  dma_desc_t q_head;
  logic [10:0] imem_addr;
  logic [NPE-1:0][7:0] imem_wdata, imem_rdata;
  logic [NCH-1:0][NPE-1:0][7:0] sr_line;
  mem_req_t m_req;
  mem_rsp_t m_rsp;
  int checks = 0, failures = 0, cyc = 0;

  dma_engine #(.NPE(NPE), .NCH(NCH), .DEPTH(2048)) dut (
    .clk, .rst_n, .q_nonempty, .q_head, .q_pop, .imem_req, .imem_we, .imem_addr, .imem_wdata,
    .imem_gnt, .imem_rdata, .sr_line, .m_req, .m_lock, .m_ready, .m_rsp, .busy, .done);

  always #5 clk = !clk;

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // IMEM rows model
  logic [NPE-1:0][7:0] rows [64];
  logic gnt_ok, always_ready;
  int imem_cycles = 0, emem_words = 0, run = 0, max_run = 0;
  assign imem_gnt = imem_req && gnt_ok;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    gnt_ok <= ($urandom_range(0, 2) != 0);
    if (imem_gnt) begin
      imem_cycles++;
      if (imem_we) rows[imem_addr[5:0]] <= imem_wdata;
      else         imem_rdata <= rows[imem_addr[5:0]];
    end
  end

  // EMEM model
  logic [63:0] emem [1024];
  typedef struct { logic [63:0] d; int due; } rd_t;
  rd_t rq [$];
  always @(posedge clk) begin
    m_ready <= always_ready ? 1'b1 : ($urandom_range(0, 3) != 0);
    if (m_req.valid && m_ready) begin
      emem_words++;
      if (m_req.we) emem[m_req.addr[9:0]] <= m_req.wdata;
      else rq.push_back('{emem[m_req.addr[9:0]], cyc + $urandom_range(1, 5)});
    end
    if (m_req.valid && m_req.we && m_ready) run++; else begin if (run > max_run) max_run = run; run = 0; end
    if (rq.size() > 0 && rq[0].due <= cyc) void'(rq.pop_front());
  end
  always_comb begin
    m_rsp = '0;
    if (rq.size() > 0 && rq[0].due <= cyc) begin m_rsp.rvalid = 1; m_rsp.rdata = rq[0].d; end
  end

  // queue model: one descriptor at a time
  logic have = 0;
  assign q_nonempty = have;
  always @(posedge clk) if (q_pop) have <= 0;

  task automatic run_desc(dma_desc_t d);
    q_head = d; have = 1;
    @(posedge clk);
    while (!done) @(posedge clk);
    @(posedge clk); #1;
  endtask

  function automatic logic [7:0] emem_byte(int w, int b);
    return emem[w][8*b +: 8];
  endfunction

  initial begin
    dma_desc_t d;
    int ic, ew;
    always_ready = 0;
    for (int r = 0; r < 64; r++) for (int k = 0; k < NPE; k++) rows[r][k] = 8'($urandom);
    for (int c = 0; c < NCH; c++) for (int k = 0; k < NPE; k++) sr_line[c][k] = 8'($urandom);
    for (int w = 0; w < 1024; w++) emem[w] = {$urandom, $urandom};
    repeat (2) @(posedge clk); #1 rst_n = 1;

    // 1) IMEM rows 4..6 -> EMEM words 100.., pitch 20
    d = '0; d.dir = D_I2E; d.imem_addr = 11'd4; d.emem_addr = 100; d.emem_pitch = 20; d.rows = 3; d.step = 64;
    ic = imem_cycles; ew = emem_words;
    run_desc(d);
    checks++; if (imem_cycles - ic != 3 || emem_words - ew != 48) begin
      failures++; $display("FAIL counts imem %0d emem %0d", imem_cycles - ic, emem_words - ew); end
    for (int r = 0; r < 3; r++) for (int k = 0; k < NPE; k++) begin
      checks++;
      if (emem_byte(100 + 20 * r + k / 8, k % 8) != rows[4 + r][k]) begin failures++; $display("FAIL i2e r%0d k%0d", r, k); end
    end

    // 2) EMEM words 500.. -> IMEM rows 10..11, pitch 16
    d = '0; d.dir = D_E2I; d.imem_addr = 11'd10; d.emem_addr = 500; d.emem_pitch = 16; d.rows = 2; d.step = 64;
    ic = imem_cycles;
    run_desc(d);
    checks++; if (imem_cycles - ic != 2) failures++;
    for (int r = 0; r < 2; r++) for (int k = 0; k < NPE; k++) begin
      checks++;
      if (rows[10 + r][k] != emem_byte(500 + 16 * r + k / 8, k % 8)) begin failures++; $display("FAIL e2i r%0d k%0d", r, k); end
    end

    // 3) scaled transfers: 50% and 200%, memory always ready -> 16-cycle burst
    always_ready = 1; @(posedge clk); #1;
    for (int t = 0; t < 2; t++) begin
      int s;
      s = t ? 32 : 128;
      d = '0; d.dir = D_I2E; d.imem_addr = 11'd20; d.emem_addr = 700; d.rows = 1; d.step = 9'(s);
      max_run = 0;
      run_desc(d);
      checks++; if (max_run != NG) begin failures++; $display("FAIL burst length %0d", max_run); end
      for (int k = 0; k < NPE; k++) begin
        logic [7:0] e;
        e = ((k * s) / 64 < NPE) ? rows[20][(k * s) / 64] : 8'd0;
        checks++;
        if (emem_byte(700 + k / 8, k % 8) != e) begin failures++; $display("FAIL scaled step %0d k %0d", s, k); end
      end
    end
    always_ready = 0;

    // 4) video line of channel 2 -> EMEM 800
    d = '0; d.dir = D_S2E; d.sr_ch = 2; d.emem_addr = 800; d.rows = 1; d.step = 64;
    run_desc(d);
    for (int k = 0; k < NPE; k++) begin
      checks++;
      if (emem_byte(800 + k / 8, k % 8) != sr_line[2][k]) begin failures++; $display("FAIL s2e k%0d", k); end
    end
    checks++; if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

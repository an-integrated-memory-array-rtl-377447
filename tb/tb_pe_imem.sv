// tb_pe_imem: random reads and writes against a shadow array, checking the
// one-cycle read latency and that rdata holds while en is low.
module tb_pe_imem;
  localparam int DEPTH = 2048;
  logic clk = 0, en, we;
  logic [10:0] addr;
  logic [7:0]  wdata, rdata, model [DEPTH], exp_q;
  logic        exp_v;
  int checks = 0, failures = 0;

  pe_imem #(.DEPTH(DEPTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = !clk;

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 1; we = 1;
    for (int i = 0; i < DEPTH; i++) begin
      addr = 11'(i); wdata = 8'($urandom); model[i] = wdata; @(posedge clk); #1;
    end
    exp_v = 0;
    for (int i = 0; i < 6000; i++) begin
      en = 1'($urandom); we = ($urandom_range(0, 3) == 0); addr = 11'($urandom); wdata = 8'($urandom);
      @(posedge clk); #1;
      if (en && !we) begin exp_q = model[addr]; exp_v = 1; end
      if (en && we) model[addr] = wdata;
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin failures++; $display("FAIL read %0d: %h vs %h", i, rdata, exp_q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

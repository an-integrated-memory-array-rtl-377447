// tb_pe_regfile: random writes through five ports against a shadow model,
// including same-register collisions (highest port wins) and reset.
module tb_pe_regfile;
  localparam int NREG = 24, NWP = 5;
  logic clk = 0, rst_n = 0;
  logic [NWP-1:0]          we;
  logic [NWP-1:0][4:0]     wa;
  logic [NWP-1:0][7:0]     wd;
  logic [NREG-1:0][7:0]    regs, model;
  int checks = 0, failures = 0;

  pe_regfile #(.NREG(NREG), .NWP(NWP)) dut (.clk, .rst_n, .we, .waddr(wa), .wdata(wd), .regs);
  always #5 clk = !clk;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = '0; wa = '0; wd = '0;
    @(posedge clk); @(posedge clk); #1; rst_n = 1;
    model = '0;
    checks++; if (regs != '0) failures++;
    for (int i = 0; i < 2000; i++) begin
      for (int p = 0; p < NWP; p++) begin
        we[p] = 1'($urandom); wa[p] = 5'($urandom_range(0, (i % 3 == 0) ? 3 : 31)); wd[p] = 8'($urandom);
      end
      for (int p = 0; p < NWP; p++) if (we[p] && wa[p] < NREG) model[wa[p]] = wd[p];
      @(posedge clk); #1;
      checks++;
      if (regs != model) begin failures++; $display("FAIL cycle %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

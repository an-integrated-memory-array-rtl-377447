// tb_video_sr: streams lines in each of the three chaining modes (1, 2 and
// 4 pixels per PE) with random valid gaps, in a video clock unrelated to
// the system clock. Checks that one line_irq pulse arrives per line, that
// the captured line holds pixel p of a chain in PE p/G, channel p%G of that
// chain, and that the previous line leaves on vout in pixel order.
module tb_video_sr;
  localparam int NPE = 128, NCH = 4;
  logic vclk = 0, clk = 0, vrst_n = 0, rst_n = 0;
  logic [1:0] mode;
  logic hsync, vvalid, irq;
  logic [NCH-1:0][7:0] vin, vout;
  logic [NCH-1:0][NPE-1:0][7:0] line;
  int checks = 0, failures = 0, irqs = 0;

  video_sr #(.NPE(NPE), .NCH(NCH)) dut (.vclk, .vrst_n, .mode, .hsync, .vvalid, .vin, .vout,
                                        .clk, .rst_n, .line, .line_irq(irq));
  always #7 vclk = !vclk;
  always #5 clk = !clk;
  always @(posedge clk) if (irq) irqs++;

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] pix [NCH][512];
  logic [7:0] prev [NCH][512];

  initial begin
    mode = 0; hsync = 0; vvalid = 0; vin = '0;
    repeat (3) @(posedge vclk); #1 vrst_n = 1; rst_n = 1;
    for (int t = 0; t < 9; t++) begin
      int g, n, nch, got, irq0;
      mode = 2'(t / 3); g = 1 << mode; n = NPE * g; nch = NCH / g;
      hsync = 1; @(posedge vclk); #1 hsync = 0;
      irq0 = irqs;
      for (int p = 0; p < n; p++) begin
        while ($urandom_range(0, 4) == 0) begin vvalid = 0; @(posedge vclk); #1; end
        for (int j = 0; j < nch; j++) begin
          pix[j][p] = 8'($urandom);
          vin[j * g] = pix[j][p];
        end
        // previous line of the same mode leaves the head of each chain
        if (t % 3 != 0) for (int j = 0; j < nch; j++) begin
          checks++;
          if (vout[j * g] != prev[j][p]) begin failures++; $display("FAIL vout mode %0d p %0d", mode, p); end
        end
        vvalid = 1; @(posedge vclk); #1;
      end
      vvalid = 0;
      repeat (8) @(posedge vclk); #1;
      checks++;
      if (irqs != irq0 + 1) begin failures++; $display("FAIL irq count %0d", irqs - irq0); end
      got = 0;
      for (int j = 0; j < nch; j++)
        for (int p = 0; p < n; p++) begin
          checks++;
          if (line[j * g + p % g][p / g] != pix[j][p]) begin
            failures++; got++;
          end
          prev[j][p] = pix[j][p];
        end
      if (got) $display("FAIL mode %0d: %0d pixels wrong", mode, got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rdu: random status words and mr patterns; checks that ped is the OR of
// all PEs two cycles after an sts (one result per cycle, back to back) and
// that left_any is the prefix OR of mr.
module tb_rdu;
  localparam int NPE = 128, GRP = 8;
  logic clk = 0, rst_n = 0, vld, ped_valid;
  logic [NPE-1:0][7:0] sts;
  logic [NPE-1:0]      mr, la;
  logic [7:0]          ped, exp_q [$];
  int checks = 0, failures = 0, nres = 0;

  rdu #(.NPE(NPE), .GRP(GRP)) dut (.clk, .rst_n, .sts_vld(vld), .sts_in(sts), .mr_in(mr),
                                   .left_any(la), .ped, .ped_valid);
  always #5 clk = !clk;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected results with their issue cycle, compared on ped_valid
  int cyc = 0, issue_q [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ped_valid) begin
      logic [7:0] e; int ic;
      e = exp_q.pop_front(); ic = issue_q.pop_front();
      checks++;
      if (ped != e || cyc - ic != 2) begin
        failures++; $display("FAIL ped=%h exp=%h latency=%0d", ped, e, cyc - ic);
      end
      nres++;
    end
  end

  initial begin
    vld = 0; sts = '0; mr = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      logic [7:0] e; logic acc;
      vld = (i % 3 != 2);
      e = 0;
      for (int k = 0; k < NPE; k++) begin
        sts[k] = ($urandom_range(0, 40) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'd0;
        e |= sts[k];
        mr[k]  = ($urandom_range(0, (i % 4 == 0) ? 200 : 10) == 0);
      end
      #1;
      acc = 0;
      for (int k = 0; k < NPE; k++) begin
        checks++;
        if (la[k] != acc) begin failures++; $display("FAIL left_any[%0d]", k); end
        acc |= mr[k];
      end
      if (vld) begin exp_q.push_back(e); issue_q.push_back(cyc); end
      @(posedge clk); #1;
    end
    vld = 0;
    repeat (4) @(posedge clk);
    checks++; if (nres != 334 || exp_q.size() != 0) begin failures++; $display("FAIL count %0d", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

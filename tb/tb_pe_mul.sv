// tb_pe_mul: checks the 8x8 multiplier on the corner cases and random pairs.
module tb_pe_mul;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  pe_mul dut (.a, .b, .p);

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int e;
      if (i < 4) begin a = (i & 1) ? 8'hff : 8'h00; b = (i & 2) ? 8'hff : 8'h01; end
      else begin a = 8'($urandom); b = 8'($urandom); end
      #1;
      e = int'(a) * int'(b);
      checks++;
      if (int'(p) != e) begin failures++; $display("FAIL %0d*%0d=%0d", a, b, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

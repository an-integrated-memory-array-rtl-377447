// tb_line_scaler: nearest-neighbour resampling at 100%, 400%, 25%, 50%,
// 200% and random steps, plus clamping below the 400% limit.
module tb_line_scaler;
  localparam int NPE = 128;
  logic [8:0] step;
  logic [NPE-1:0][7:0] in_l, out_l;
  int checks = 0, failures = 0;

  line_scaler #(.NPE(NPE)) dut (.step, .in_line(in_l), .out_line(out_l));

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int steps[8] = '{64, 16, 256, 128, 32, 100, 5, 200};
    for (int t = 0; t < 80; t++) begin
      int s;
      for (int k = 0; k < NPE; k++) in_l[k] = 8'($urandom);
      step = 9'((t < 8) ? steps[t] : $urandom_range(16, 256));
      s = (step < 16) ? 16 : step;
      #1;
      for (int j = 0; j < NPE; j++) begin
        // output j covers input position j*s/64
        int src; logic [7:0] e;
        src = (j * s) / 64;
        e = (src < NPE) ? in_l[src] : 8'd0;
        checks++;
        if (out_l[j] != e) begin failures++; $display("FAIL step %0d j %0d", s, j); end
      end
      if (step == 64) begin checks++; if (out_l != in_l) failures++; end
      if (step == 16) begin checks++; if (out_l[4*10+3] != in_l[10]) failures++; end
      if (step == 256) begin checks++; if (out_l[10] != in_l[40] || out_l[40] != 0) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

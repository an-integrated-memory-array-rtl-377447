// tb_line_buffer: a parallel load followed by 16 shifts must stream the row
// out word by word in group order, and 16 shifts in must rebuild it.
module tb_line_buffer;
  localparam int NG = 16;
  logic clk = 0, rst_n = 0, load, shift;
  logic [NG-1:0][63:0] ld, q, row;
  logic [63:0] win, wout;
  int checks = 0, failures = 0;

  line_buffer #(.NG(NG)) dut (.clk, .rst_n, .load, .load_data(ld), .shift, .in_word(win), .out_word(wout), .q);
  always #5 clk = !clk;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; shift = 0; ld = '0; win = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int g = 0; g < NG; g++) row[g] = {$urandom, $urandom};
      ld = row; load = 1; @(posedge clk); #1 load = 0;
      checks++; if (q != row) failures++;
      // shift out, feeding the words back in at the tail
      for (int g = 0; g < NG; g++) begin
        checks++;
        if (wout != row[g]) begin failures++; $display("FAIL word %0d", g); end
        win = wout; shift = 1; @(posedge clk); #1;
      end
      shift = 0;
      checks++; if (q != row) begin failures++; $display("FAIL rebuilt row"); end
      // hold without load/shift
      @(posedge clk); #1;
      checks++; if (q != row) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

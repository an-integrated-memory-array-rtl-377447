// tb_pe_log: random self-check of the PE LOG unit (logic ops, one-bit
// shifts and the sts contribution).
module tb_pe_log;
  import imap_pkg::*;
  log_op_e    op;
  logic [7:0] a, b, y, sv;
  logic       we;
  int checks = 0, failures = 0;

  pe_log dut (.op, .a, .b, .y, .y_we(we), .sts_v(sv));

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [7:0] e; logic ew;
      op = log_op_e'(i % 10); a = 8'($urandom); b = 8'($urandom); #1;
      ew = 1'b1;
      case (op)
        L_AND: e = a & b;  L_OR: e = a | b;  L_XOR: e = a ^ b;  L_NOT: e = ~a;
        L_SLL: e = 8'(a * 2);  L_SRL: e = a / 2;
        L_SRA: e = 8'($signed(a) >>> 1);
        default: begin e = 8'd0; ew = 1'b0; end
      endcase
      checks++;
      if (we != ew || (ew && y != e) || sv != ((op == L_STS) ? a : 8'd0)) begin
        failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

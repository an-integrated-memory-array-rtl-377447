// tb_pe_alu: random self-check of the PE ADD unit against a reference model
// written from the instruction formulas (add/sub/saturate/abs/max/min/mv,
// mv2, and the mif/mifc compare flags, including a chained 16-bit compare).
module tb_pe_alu;
  import imap_pkg::*;
  add_op_e    op;
  logic [7:0] a, b, c, sc, y;
  logic [2:0] fsel;
  logic       cin, zin, y_we, cout, zout, fwe, cond;
  int checks = 0, failures = 0;

  pe_alu dut (.op, .a, .b, .c, .fsel, .scalar(sc), .cin, .zin,
              .y, .y_we, .cout, .zout, .flags_we(fwe), .cond);

  function automatic logic [7:0] ref_y(add_op_e o, int x, int yy, int z, int s);
    case (o)
      A_ADD:  return 8'(x + yy);
      A_SUB:  return 8'(x - yy);
      A_SADD: return (x + yy > 255) ? 8'd255 : 8'(x + yy);
      A_SSUB: return (x < yy) ? 8'd0 : 8'(x - yy);
      A_ABS:  return (x < yy) ? 8'(yy - x) : 8'(x - yy);
      A_MAX:  return 8'((x > yy ? (x > z ? x : z) : (yy > z ? yy : z)));
      A_MIN:  return 8'((x < yy ? (x < z ? x : z) : (yy < z ? yy : z)));
      A_MV:   return 8'(x);
      A_MV2:  return 8'(s);
      default: return 8'd0;
    endcase
  endfunction

  function automatic logic ref_cond(int f, int x, int yy);
    int sx, sy;
    sx = (x > 127) ? x - 256 : x;
    sy = (yy > 127) ? yy - 256 : yy;
    case (f)
      0: return x == yy;  1: return x != yy;
      2: return x <  yy;  3: return x >= yy;
      4: return sx < sy;  5: return sx >= sy;
      6: return x >  yy;  default: return x <= yy;
    endcase
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s op=%0d a=%0d b=%0d c=%0d y=%0d", what, op, a, b, c, y); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    add_op_e ops[9] = '{A_ADD, A_SUB, A_SADD, A_SSUB, A_ABS, A_MAX, A_MIN, A_MV, A_MV2};
    for (int i = 0; i < 3000; i++) begin
      op = ops[i % 9];
      a = 8'($urandom); b = (i % 7 == 0) ? a : 8'($urandom); c = 8'($urandom); sc = 8'($urandom);
      fsel = 3'($urandom); cin = 1'($urandom); zin = 1'($urandom);
      #1;
      chk(y == ref_y(op, a, b, c, sc) && y_we, "result");
      if (op == A_ADD) chk(cout == (int'(a) + int'(b) > 255), "carry");
      if (op == A_SUB) chk(cout == (a < b) && zout == (a == b), "borrow");
    end
    // mif: 8-bit compare flags
    op = A_MIF;
    for (int i = 0; i < 2000; i++) begin
      a = 8'($urandom); b = (i % 5 == 0) ? a : 8'($urandom); fsel = 3'(i % 8);
      cin = 1'($urandom); zin = 1'($urandom);
      #1;
      chk(cond == ref_cond(fsel, a, b) && !y_we && fwe, "mif flag");
    end
    // mifc: 16-bit unsigned compare as low-byte sub then high-byte mifc
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] x, w;
      x = 16'($urandom); w = (i % 4 == 0) ? x : ((i % 4 == 1) ? {x[15:8], 8'($urandom)} : 16'($urandom));
      fsel = 3'(i % 8);
      op = A_SUB; a = x[7:0]; b = w[7:0]; #1;
      cin = cout; zin = zout;
      op = A_MIFC; a = x[15:8]; b = w[15:8]; #1;
      case (fsel)
        0: chk(cond == (x == w), "mifc eq");  1: chk(cond == (x != w), "mifc ne");
        2: chk(cond == (x <  w), "mifc ltu"); 3: chk(cond == (x >= w), "mifc geu");
        4: chk(cond == ($signed(x) <  $signed(w)), "mifc lt");
        5: chk(cond == ($signed(x) >= $signed(w)), "mifc ge");
        6: chk(cond == (x >  w), "mifc gtu"); default: chk(cond == (x <= w), "mifc leu");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

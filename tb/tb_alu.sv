// tb_alu: every ALU operation on random and corner operands against 64-bit
// reference arithmetic; flags Z, C, N, V checked for ADD and SUB, and the
// signed / unsigned orderings implied by the SUB flags.
module tb_alu;
  import rv_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, result, exp;
  alu_sel_e    sel;
  logic        zf, cf, nf, vf;

  alu dut (.a, .b, .sel, .result, .zero_f(zf), .carry_f(cf), .neg_f(nf), .ovf_f(vf));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sel=%0d a=%h b=%h r=%h exp=%h", what, sel, a, b, result, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_sel_e ops [11];
    ops = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA,
            ALU_SLT, ALU_SLTU, ALU_PASSB};
    for (int n = 0; n < 3000; n++) begin
      longint sa, sb;
      longint unsigned ua, ub, full;
      case (n % 40)
        0: begin a = 32'h7fff_ffff; b = 32'h0000_0001; end
        1: begin a = 32'h8000_0000; b = 32'h0000_0001; end
        2: begin a = 32'h1234_5678; b = 32'h1234_5678; end
        3: begin a = 32'hffff_ffff; b = 32'h0000_0001; end
        default: begin a = $urandom; b = (n % 9 == 0) ? a : $urandom; end
      endcase
      sel = ops[n % 11];
      #1;
      sa = longint'($signed(a)); sb = longint'($signed(b));
      ua = longint'(a); ub = longint'(b);
      case (sel)
        ALU_ADD:   exp = 32'(ua + ub);
        ALU_SUB:   exp = 32'(ua - ub);
        ALU_AND:   exp = a & b;
        ALU_OR:    exp = a | b;
        ALU_XOR:   exp = a ^ b;
        ALU_SLL:   exp = 32'(ua << b[4:0]);
        ALU_SRL:   exp = 32'(ua >> b[4:0]);
        ALU_SRA:   exp = 32'(sa >>> b[4:0]);
        ALU_SLT:   exp = (sa < sb) ? 32'd1 : 32'd0;
        ALU_SLTU:  exp = (ua < ub) ? 32'd1 : 32'd0;
        default:   exp = b;
      endcase
      check(result == exp, "result");
      if (sel == ALU_ADD) begin
        full = ua + ub;
        check(zf == (exp == 0), "add Z");
        check(cf == full[32], "add C");
        check(nf == exp[31], "add N");
        check(vf == ((sa + sb) > 64'sh7fff_ffff || (sa + sb) < -64'sh8000_0000), "add V");
      end
      if (sel == ALU_SUB) begin
        check(zf == (a == b), "sub Z");
        check(cf == (ua >= ub), "sub C (no borrow)");
        check((nf ^ vf) == (sa < sb), "sub N^V (signed less)");
        check(vf == ((sa - sb) > 64'sh7fff_ffff || (sa - sb) < -64'sh8000_0000), "sub V");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

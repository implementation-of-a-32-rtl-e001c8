// tb_diva_alu: random operands for every operation; the expected result and
// condition codes are computed here with 64-bit integer arithmetic.
module tb_diva_alu;
  import diva_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  cc_t cc;
  logic dz;
  int checks = 0, failures = 0;

  diva_alu dut (.op, .a, .b, .y, .cc, .div_zero(dz));

  function automatic logic [31:0] model(input alu_op_e o, input logic [31:0] x, input logic [31:0] z,
                                        output logic ov, output logic divz);
    longint sx, sz, r;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    ov = 0; divz = 0;
    case (o)
      ALU_ADD: begin r = sx + sz; ov = (r > 64'sd2147483647 || r < -64'sd2147483648); return 32'(r); end
      ALU_SUB: begin r = sx - sz; ov = (r > 64'sd2147483647 || r < -64'sd2147483648); return 32'(r); end
      ALU_MUL: begin r = sx * sz; ov = (r > 64'sd2147483647 || r < -64'sd2147483648); return 32'(r); end
      ALU_DIV: begin
        if (z == 0) begin divz = 1; return 0; end
        r = sx / sz; ov = (r > 64'sd2147483647); return 32'(r);
      end
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_NOT: return ~x;
      ALU_SLL: return x << z[4:0];
      ALU_SRL: return x >> z[4:0];
      ALU_SRA: begin r = sx >>> z[4:0]; return 32'(r); end
      ALU_ELO: begin for (int i = 31; i >= 0; i--) if (x[i]) return 32'(i); return 0; end
      ALU_CLO: begin for (int i = 31; i >= 0; i--) if (x[i]) return x & ~(32'd1 << i); return 0; end
      default: return z;
    endcase
  endfunction

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] e; logic eov, edz;
    for (int n = 0; n < 4000; n++) begin
      op = alu_op_e'($urandom_range(0, 13));
      a = $urandom; b = $urandom;
      case ($urandom_range(0, 5))
        0: b = 0;
        1: a = 32'h7FFF_FFFF;
        2: begin a = 32'h8000_0000; b = (op == ALU_DIV) ? 32'hFFFF_FFFF : b; end
        3: b = $urandom_range(0, 40);
        4: a = a >> $urandom_range(0, 31);
        default: ;
      endcase
      #1;
      e = model(op, a, b, eov, edz);
      checks++;
      if (y !== e || cc.eq !== (e == 0) || cc.lt !== e[31] || cc.gt !== (!e[31] && e != 0) ||
          cc.ov !== eov || dz !== edz) begin
        failures++;
        $display("op=%s a=%h b=%h y=%h exp %h cc=%b ov_exp=%b dz=%b", op.name(), a, b, y, e, cc, eov, dz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

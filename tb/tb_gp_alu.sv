// tb_gp_alu: checks every ALU operation against a bit-level reference on
// random and corner operands.
module tb_gp_alu;
  import gp_pkg::*;

  alu_op_e op;
  word_t a, b, c, y;
  int checks = 0, failures = 0;

  gp_alu dut (.op, .a, .b, .c, .y);

  // Reference: computes each result bit by bit (sums by carry chain).
  function automatic word_t ref_model(alu_op_e o, word_t x, word_t p, word_t q);
    word_t r; logic cy; int n3, carry3;
    r = '0; cy = 0; carry3 = 0;
    for (int i = 0; i < DATA_W; i++) begin
      case (o)
        OP_PASS:  r[i] = x[i];
        OP_ADD:   begin r[i] = x[i] ^ p[i] ^ cy; cy = (x[i] & p[i]) | (cy & (x[i] ^ p[i])); end
        OP_SUB:   begin r[i] = x[i] ^ ~p[i] ^ (i == 0 ? 1'b1 : cy);
                        cy = (x[i] & ~p[i]) | ((i == 0 ? 1'b1 : cy) & (x[i] ^ ~p[i])); end
        OP_AND:   r[i] = x[i] & p[i];
        OP_OR:    r[i] = x[i] | p[i];
        OP_XOR:   r[i] = x[i] != p[i];
        OP_NAND:  r[i] = !(x[i] && p[i]);
        OP_NOR:   r[i] = !(x[i] || p[i]);
        OP_XNOR:  r[i] = x[i] == p[i];
        OP_NOT:   r[i] = !x[i];
        OP_AND3:  r[i] = x[i] && p[i] && q[i];
        OP_OR3:   r[i] = x[i] || p[i] || q[i];
        OP_XOR3:  r[i] = x[i] ^ p[i] ^ q[i];
        OP_AOI21: r[i] = !((x[i] && p[i]) || q[i]);
        OP_OAI21: r[i] = !((x[i] || p[i]) && q[i]);
        OP_MUX:   r[i] = q[i] ? p[i] : x[i];
        OP_ADD3:  begin
                    n3 = int'(x[i]) + int'(p[i]) + int'(q[i]) + carry3;
                    r[i] = n3[0];
                    carry3 = n3 >> 1;
                  end
        default:  r[i] = 1'b0;
      endcase
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp;
    for (int n = 0; n < 400; n++) begin
      for (int o = 0; o <= int'(OP_ADD3); o++) begin
        op = alu_op_e'(o);
        case (n)
          0: begin a = '1; b = 64'd1; c = '1; end
          1: begin a = '0; b = '1; c = '0; end
          default: begin
            a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
          end
        endcase
        #1;
        exp = ref_model(op, a, b, c);
        checks++;
        if (y !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d a=%h b=%h c=%h y=%h exp=%h", o, a, b, c, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

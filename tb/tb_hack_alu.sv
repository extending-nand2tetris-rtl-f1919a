// tb_hack_alu: checks the Hack ALU on the 18 documented control settings
// with random and corner operands, comparing out, zr and ng with the
// operation each setting names (x+y, x-1, !y, ...), computed directly.
module tb_hack_alu;
  import hack_pkg::*;
  word_t x, y, out;
  alu_ctrl_t ctrl;
  logic zr, ng;
  int checks = 0, failures = 0;

  hack_alu dut (.x, .y, .ctrl, .out, .zr, .ng);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_op(int op, word_t a, word_t b);
    case (op)
      0: return 0;        1: return 1;         2: return 16'hFFFF;
      3: return a;        4: return b;         5: return ~a;
      6: return ~b;       7: return 16'(-a);   8: return 16'(-b);
      9: return a + 1;    10: return b + 1;    11: return a - 1;
      12: return b - 1;   13: return a + b;    14: return a - b;
      15: return b - a;   16: return a & b;    default: return a | b;
    endcase
  endfunction

  // control bits zx nx zy ny f no for the operations above
  logic [5:0] codes [18] = '{6'b101010, 6'b111111, 6'b111010, 6'b001100, 6'b110000,
    6'b001101, 6'b110001, 6'b001111, 6'b110011, 6'b011111, 6'b110111, 6'b001110,
    6'b110010, 6'b000010, 6'b010011, 6'b000111, 6'b000000, 6'b010101};

  initial begin
    word_t e;
    for (int n = 0; n < 400; n++) begin
      case (n % 5)
        0: begin x = 16'($urandom); y = 16'($urandom); end
        1: begin x = 0; y = 16'($urandom); end
        2: begin x = 16'h7FFF; y = 16'h8000; end
        3: begin x = 16'($urandom_range(3)); y = 16'($urandom_range(3)); end
        default: begin x = 16'hFFFF; y = 1; end
      endcase
      for (int op = 0; op < 18; op++) begin
        ctrl = alu_ctrl_t'(codes[op]);
        #1;
        e = expect_op(op, x, y);
        checks++;
        if (out !== e || zr !== (e == 0) || ng !== e[15]) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d x=%h y=%h out=%h expected %h", op, x, y, out, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

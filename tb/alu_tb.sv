// alu_tb: random and corner-case operands for every ALU operation; the
// expected result and flags are computed here with plain SystemVerilog
// operators on signed/unsigned copies of the operands.
module alu_tb;
  import rv32i_pkg::*;
  logic [31:0] a, b, y;
  alu_op_e sel;
  alu_status_t st;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_sel(sel), .y, .status(st));

  function automatic logic [31:0] model(alu_op_e op, logic [31:0] x, logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    case (op)
      ALU_ADD:  return 32'(longint'(x) + longint'(z));
      ALU_SUB:  return 32'(longint'(x) - longint'(z));
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_SLL:  return 32'(64'(x) << z[4:0]);
      ALU_SRL:  return 32'(64'(x) >> z[4:0]);
      ALU_SRA:  return 32'(sx / (longint'(1) << z[4:0]) - ((sx < 0 && (sx % (longint'(1) << z[4:0])) != 0) ? 1 : 0));
      ALU_SLT:  return (sx < sz) ? 1 : 0;
      ALU_SLTU: return (longint'(x) < longint'(z)) ? 1 : 0;
      ALU_PASS_B: return z;
      default:  return 0;
    endcase
  endfunction

  initial begin
    logic [31:0] corner[6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h1f};
    for (int i = 0; i < 4000; i++) begin
      a = (i % 4 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b = (i % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      if (i % 7 == 0) b = a;
      sel = alu_op_e'($urandom_range(0, 10));
      #1;
      checks++;
      if (y !== model(sel, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h y=%h want %h", sel.name(), a, b, y, model(sel, a, b));
      end
      checks++;
      if (st.eq !== (a == b) || st.lt !== (longint'($signed(a)) < longint'($signed(b))) ||
          st.ltu !== (longint'(a) < longint'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL flags a=%h b=%h %b", a, b, st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

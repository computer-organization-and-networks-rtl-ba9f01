// imm_gen_tb: random immediates are packed into instructions with the
// encoders of rv32i_ref_pkg (the other fields random) and must come back
// sign-extended from imm_gen for the matching format.
module imm_gen_tb;
  import rv32i_pkg::*;
  import rv32i_ref_pkg::*;
  logic [31:0] instr, imm;
  imm_fmt_e fmt;
  int checks = 0, failures = 0;

  imm_gen dut (.instr, .fmt, .imm);

  task automatic chk(int want, string what);
    #1;
    checks++;
    if (imm !== 32'(want)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: instr %h imm %h want %h", what, instr, imm, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int v;
      v = $urandom_range(0, 4095) - 2048;
      instr = enc_i(v, $urandom, $urandom, $urandom, $urandom); fmt = IMM_I; chk(v, "I");
      v = $urandom_range(0, 4095) - 2048;
      instr = enc_s(v, $urandom, $urandom, $urandom); fmt = IMM_S; chk(v, "S");
      v = 2 * ($urandom_range(0, 4095) - 2048);
      instr = enc_b(v, $urandom, $urandom, $urandom); fmt = IMM_B; chk(v, "B");
      v = $urandom;
      instr = enc_u(v, $urandom, $urandom); fmt = IMM_U; chk(v << 12, "U");
      v = 2 * (int'($urandom_range(0, 1048575)) - 524288);
      instr = enc_j(v, $urandom); fmt = IMM_J; chk(v, "J");
    end
    // the sign-extension example of the text: 8-bit -1 becomes 32-bit -1
    instr = enc_i(-1, 0, 0, 1, 7'b0010011); fmt = IMM_I; chk(-1, "ADDI -1");
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

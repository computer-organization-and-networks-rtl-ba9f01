// decoder_tb: every RV32I instruction, encoded with random register
// numbers and immediates, must give the control signals listed in the
// table below (ALU operation, operand sources, immediate format, register
// write and its source, memory read/write, branch, jump, halt). A set of
// invalid encodings must be flagged illegal and change no state.
module decoder_tb;
  import rv32i_pkg::*;
  import rv32i_ref_pkg::*;
  logic [31:0] instr;
  ctrl_t c, w;
  int checks = 0, failures = 0;

  decoder dut (.instr, .ctrl(c));

  // expected control word
  function automatic ctrl_t E(alu_op_e op, bit a_pc, bit b_imm, imm_fmt_e fmt, bit rw, wb_sel_e wb,
                              bit mr, bit mw, bit br, bit jal, bit jalr, bit halt);
    ctrl_t t;
    t = '{alu_op: op, alu_a_pc: a_pc, alu_b_imm: b_imm, imm_fmt: fmt, reg_write: rw, wb_sel: wb,
          mem_read: mr, mem_write: mw, branch: br, jal: jal, jalr: jalr, halt: halt, illegal: 1'b0};
    return t;
  endfunction

  // compare only the fields that matter for this instruction: the ALU and
  // operand fields are don't-care when nothing uses them
  task automatic chk(string name, ctrl_t want, bit alu_used, bit imm_used);
    ctrl_t g;
    g = c;
    if (!alu_used) begin g.alu_op = want.alu_op; g.alu_a_pc = want.alu_a_pc; g.alu_b_imm = want.alu_b_imm; end
    if (!imm_used) g.imm_fmt = want.imm_fmt;
    if (!want.reg_write) g.wb_sel = want.wb_sel;
    checks++;
    if (g !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s (%h): got %p want %p", name, instr, c, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      int rd = $urandom_range(0, 31), r1 = $urandom_range(0, 31), r2 = $urandom_range(0, 31);
      int im = $urandom_range(0, 4095), sh = $urandom_range(0, 31);
      instr = enc_u($urandom, rd, 7'b0110111); #1 chk("LUI",   E(ALU_PASS_B,0,1,IMM_U,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_u($urandom, rd, 7'b0010111); #1 chk("AUIPC", E(ALU_ADD,1,1,IMM_U,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_j(2 * im, rd);               #1 chk("JAL",   E(ALU_ADD,0,0,IMM_J,1,WB_PC4,0,0,0,1,0,0), 0, 1);
      instr = enc_i(im, r1, 0, rd, 7'b1100111); #1 chk("JALR", E(ALU_ADD,0,1,IMM_I,1,WB_PC4,0,0,0,0,1,0), 1, 1);
      for (int f3 = 0; f3 < 8; f3++) if (f3 != 2 && f3 != 3) begin
        instr = enc_b(2 * im, r2, r1, f3); #1 chk("Bxx", E(ALU_SUB,0,0,IMM_B,0,WB_ALU,0,0,1,0,0,0), 1, 1);
      end
      for (int f3 = 0; f3 < 6; f3++) if (f3 != 3) begin
        instr = enc_i(im, r1, f3, rd, 7'b0000011); #1 chk("Lx", E(ALU_ADD,0,1,IMM_I,1,WB_MEM,1,0,0,0,0,0), 1, 1);
      end
      for (int f3 = 0; f3 < 3; f3++) begin
        instr = enc_s(im, r2, r1, f3); #1 chk("Sx", E(ALU_ADD,0,1,IMM_S,0,WB_ALU,0,1,0,0,0,0), 1, 1);
      end
      instr = enc_i(im, r1, 0, rd, 7'b0010011); #1 chk("ADDI",  E(ALU_ADD,0,1,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_i(im, r1, 2, rd, 7'b0010011); #1 chk("SLTI",  E(ALU_SLT,0,1,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_i(im, r1, 3, rd, 7'b0010011); #1 chk("SLTIU", E(ALU_SLTU,0,1,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_i(im, r1, 4, rd, 7'b0010011); #1 chk("XORI",  E(ALU_XOR,0,1,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_i(im, r1, 6, rd, 7'b0010011); #1 chk("ORI",   E(ALU_OR,0,1,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_i(im, r1, 7, rd, 7'b0010011); #1 chk("ANDI",  E(ALU_AND,0,1,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_i(sh, r1, 1, rd, 7'b0010011); #1 chk("SLLI",  E(ALU_SLL,0,1,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_i(sh, r1, 5, rd, 7'b0010011); #1 chk("SRLI",  E(ALU_SRL,0,1,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_i(sh + 1024, r1, 5, rd, 7'b0010011); #1 chk("SRAI", E(ALU_SRA,0,1,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 1);
      instr = enc_r(0,  r2, r1, 0, rd, 7'b0110011); #1 chk("ADD",  E(ALU_ADD,0,0,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 0);
      instr = enc_r(32, r2, r1, 0, rd, 7'b0110011); #1 chk("SUB",  E(ALU_SUB,0,0,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 0);
      instr = enc_r(0,  r2, r1, 1, rd, 7'b0110011); #1 chk("SLL",  E(ALU_SLL,0,0,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 0);
      instr = enc_r(0,  r2, r1, 2, rd, 7'b0110011); #1 chk("SLT",  E(ALU_SLT,0,0,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 0);
      instr = enc_r(0,  r2, r1, 3, rd, 7'b0110011); #1 chk("SLTU", E(ALU_SLTU,0,0,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 0);
      instr = enc_r(0,  r2, r1, 4, rd, 7'b0110011); #1 chk("XOR",  E(ALU_XOR,0,0,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 0);
      instr = enc_r(0,  r2, r1, 5, rd, 7'b0110011); #1 chk("SRL",  E(ALU_SRL,0,0,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 0);
      instr = enc_r(32, r2, r1, 5, rd, 7'b0110011); #1 chk("SRA",  E(ALU_SRA,0,0,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 0);
      instr = enc_r(0,  r2, r1, 6, rd, 7'b0110011); #1 chk("OR",   E(ALU_OR,0,0,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 0);
      instr = enc_r(0,  r2, r1, 7, rd, 7'b0110011); #1 chk("AND",  E(ALU_AND,0,0,IMM_I,1,WB_ALU,0,0,0,0,0,0), 1, 0);
    end
    instr = 32'h0010_0073; #1 chk("EBREAK", E(ALU_ADD,0,0,IMM_I,0,WB_ALU,0,0,0,0,0,1), 0, 0);
    instr = 32'h0000_0073; #1 chk("ECALL",  E(ALU_ADD,0,0,IMM_I,0,WB_ALU,0,0,0,0,0,0), 0, 0);
    instr = 32'h0ff0_000f; #1 chk("FENCE",  E(ALU_ADD,0,0,IMM_I,0,WB_ALU,0,0,0,0,0,0), 0, 0);
    // invalid encodings: illegal, and nothing written, stored or jumped
    begin
      logic [31:0] bad[7] = '{32'hffff_ffff, enc_r(1, 2, 3, 0, 4, 7'b0110011), enc_r(32, 2, 3, 4, 4, 7'b0110011),
                              enc_i(5, 1, 3, 2, 7'b0000011), enc_s(5, 1, 2, 4), enc_b(8, 1, 2, 2),
                              enc_i(5, 1, 1, 2, 7'b1100111)};
      foreach (bad[k]) begin
        instr = bad[k]; #1;
        checks++;
        if (!c.illegal || c.reg_write || c.mem_write || c.mem_read || c.branch || c.jal || c.jalr || c.halt) begin
          failures++;
          $display("FAIL invalid %h not rejected: %p", instr, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

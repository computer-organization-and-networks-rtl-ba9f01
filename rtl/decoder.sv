// decoder: instruction decoding of the RV32I processor.
//
// Maps the instruction register to the control signals of the datapath
// (ctrl_t in rv32i_pkg): the ALU operation and where its operands come from
// (rs1 or the instruction address, rs2 or the immediate), the immediate
// format, whether and from where rd is written (ALU, memory, next PC),
// memory read/write, conditional branch, JAL/JALR and halt.
//
// Decoded: LUI, AUIPC, JAL, JALR, BEQ/BNE/BLT/BGE/BLTU/BGEU, LB/LH/LW/LBU/LHU,
// SB/SH/SW, ADDI/SLTI/SLTIU/XORI/ORI/ANDI/SLLI/SRLI/SRAI and the ten
// register-register operations. EBREAK raises halt. FENCE and ECALL, whose
// function is outside this design, and any unknown encoding do nothing
// (illegal flags the latter). Purely combinational.
module decoder
  import rv32i_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);

  instr_fields_t f;
  assign f = instr_fields_t'(instr);

  // ALU operation of OP / OP-IMM from funct3 (and funct7 bit 5)
  function automatic alu_op_e arith_op(input logic [2:0] funct3, input logic f7b5, input logic is_reg);
    unique case (funct3)
      3'b000:  return (is_reg && f7b5) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return f7b5 ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl = '{alu_op: ALU_ADD, alu_a_pc: 1'b0, alu_b_imm: 1'b0, imm_fmt: IMM_I,
             reg_write: 1'b0, wb_sel: WB_ALU, mem_read: 1'b0, mem_write: 1'b0,
             branch: 1'b0, jal: 1'b0, jalr: 1'b0, halt: 1'b0, illegal: 1'b0};
    unique case (f.opcode)
      OP_LUI: begin
        ctrl.alu_op = ALU_PASS_B; ctrl.alu_b_imm = 1'b1; ctrl.imm_fmt = IMM_U;
        ctrl.reg_write = 1'b1;
      end
      OP_AUIPC: begin
        ctrl.alu_a_pc = 1'b1; ctrl.alu_b_imm = 1'b1; ctrl.imm_fmt = IMM_U;
        ctrl.reg_write = 1'b1;
      end
      OP_JAL: begin
        ctrl.jal = 1'b1; ctrl.imm_fmt = IMM_J;
        ctrl.reg_write = 1'b1; ctrl.wb_sel = WB_PC4;
      end
      OP_JALR: begin
        if (f.funct3 == 3'b000) begin
          ctrl.jalr = 1'b1; ctrl.alu_b_imm = 1'b1; ctrl.imm_fmt = IMM_I;
          ctrl.reg_write = 1'b1; ctrl.wb_sel = WB_PC4;
        end else ctrl.illegal = 1'b1;
      end
      OP_BRANCH: begin
        if (f.funct3 != 3'b010 && f.funct3 != 3'b011) begin
          // the ALU compares rs1 with rs2; the branch unit reads its flags
          ctrl.branch = 1'b1; ctrl.imm_fmt = IMM_B; ctrl.alu_op = ALU_SUB;
        end else ctrl.illegal = 1'b1;
      end
      OP_LOAD: begin
        if (f.funct3 inside {F3_B, F3_H, F3_W, F3_BU, F3_HU}) begin
          ctrl.mem_read = 1'b1; ctrl.alu_b_imm = 1'b1; ctrl.imm_fmt = IMM_I;
          ctrl.reg_write = 1'b1; ctrl.wb_sel = WB_MEM;
        end else ctrl.illegal = 1'b1;
      end
      OP_STORE: begin
        if (f.funct3 inside {F3_B, F3_H, F3_W}) begin
          ctrl.mem_write = 1'b1; ctrl.alu_b_imm = 1'b1; ctrl.imm_fmt = IMM_S;
        end else ctrl.illegal = 1'b1;
      end
      OP_IMM: begin
        // shifts by immediate need funct7 = 0000000 (or 0100000 for SRAI)
        if ((f.funct3 == 3'b001 && f.funct7 != 7'b0000000) ||
            (f.funct3 == 3'b101 && f.funct7 != 7'b0000000 && f.funct7 != 7'b0100000))
          ctrl.illegal = 1'b1;
        else begin
          ctrl.alu_op = arith_op(f.funct3, f.funct7[5] && f.funct3 == 3'b101, 1'b0);
          ctrl.alu_b_imm = 1'b1; ctrl.imm_fmt = IMM_I; ctrl.reg_write = 1'b1;
        end
      end
      OP_REG: begin
        if (f.funct7 == 7'b0000000 ||
            (f.funct7 == 7'b0100000 && (f.funct3 == 3'b000 || f.funct3 == 3'b101))) begin
          ctrl.alu_op = arith_op(f.funct3, f.funct7[5], 1'b1);
          ctrl.reg_write = 1'b1;
        end else ctrl.illegal = 1'b1;
      end
      OP_FENCE: ;  // no operation in this single-hart, in-order design
      OP_SYSTEM: begin
        if (instr == INSTR_EBREAK)     ctrl.halt = 1'b1;
        else if (instr != INSTR_ECALL) ctrl.illegal = 1'b1;
      end
      default: ctrl.illegal = 1'b1;
    endcase
  end

endmodule

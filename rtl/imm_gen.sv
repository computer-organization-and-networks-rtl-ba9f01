// imm_gen: immediate generation with sign extension.
//
// Collects the immediate bits of the instruction for the selected format
// and sign-extends them to 32 bits by replicating the most significant
// immediate bit (instruction bit 31) into the upper bits:
//   I: imm[11:0]  = instr[31:20]
//   S: imm[11:5]  = instr[31:25], imm[4:0] = instr[11:7]
//   B: imm[12|10:5] = instr[31|30:25], imm[4:1|11] = instr[11:8|7], imm[0] = 0
//   U: imm[31:12] = instr[31:12], low 12 bits zero
//   J: imm[20|10:1|11|19:12] = instr[31|30:21|20|19:12], imm[0] = 0
// B and J immediates are offsets in units of two bytes ("PC + imm*2").
// Purely combinational.
module imm_gen
  import rv32i_pkg::*;
(
  input  logic [31:0] instr,
  input  imm_fmt_e    fmt,
  output logic [31:0] imm
);

  always_comb begin
    unique case (fmt)
      IMM_I:   imm = {{20{instr[31]}}, instr[31:20]};
      IMM_S:   imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B:   imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_U:   imm = {instr[31:12], 12'b0};
      IMM_J:   imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule

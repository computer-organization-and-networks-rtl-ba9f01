// branch_unit: condition of the RV32I conditional branches.
//
// Decides from funct3 and the ALU status flags (the ALU compares rs1 with
// rs2) whether a branch is taken: BEQ on equal, BNE on not equal, BLT/BGE on
// signed less-than or not, BLTU/BGEU on unsigned less-than or not. The two
// unused funct3 codes never branch. Purely combinational.
module branch_unit
  import rv32i_pkg::*;
(
  input  logic [2:0]  funct3,
  input  alu_status_t status,
  output logic        taken
);

  always_comb begin
    unique case (funct3)
      F3_BEQ:  taken = status.eq;
      F3_BNE:  taken = !status.eq;
      F3_BLT:  taken = status.lt;
      F3_BGE:  taken = !status.lt;
      F3_BLTU: taken = status.ltu;
      F3_BGEU: taken = !status.ltu;
      default: taken = 1'b0;
    endcase
  end

endmodule

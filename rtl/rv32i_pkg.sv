// rv32i_pkg: types and constants shared by the RV32I processor blocks.
//
// Holds the opcode values of the RV32I base instruction set, the instruction
// field layout (funct7 | rs2 | rs1 | funct3 | rd | opcode, bits 31..0), the
// ALU operation select, the immediate formats and the bundle of control
// signals that the instruction decoder hands to the datapath. Opcode and
// funct3 values are those of the RV32I encoding; the encodings of the ALU
// select, the immediate format and the control bundle are this design's own.
package rv32i_pkg;

  // Major opcodes (instruction bits 6:0)
  typedef enum logic [6:0] {
    OP_LUI    = 7'b0110111,
    OP_AUIPC  = 7'b0010111,
    OP_JAL    = 7'b1101111,
    OP_JALR   = 7'b1100111,
    OP_BRANCH = 7'b1100011,
    OP_LOAD   = 7'b0000011,
    OP_STORE  = 7'b0100011,
    OP_IMM    = 7'b0010011,
    OP_REG    = 7'b0110011,
    OP_FENCE  = 7'b0001111,
    OP_SYSTEM = 7'b1110011
  } opcode_e;

  // funct3 of loads and stores
  localparam logic [2:0] F3_B  = 3'b000;
  localparam logic [2:0] F3_H  = 3'b001;
  localparam logic [2:0] F3_W  = 3'b010;
  localparam logic [2:0] F3_BU = 3'b100;
  localparam logic [2:0] F3_HU = 3'b101;

  // funct3 of branches
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  // EBREAK and ECALL, the two complete SYSTEM encodings
  localparam logic [31:0] INSTR_EBREAK = 32'h0010_0073;
  localparam logic [31:0] INSTR_ECALL  = 32'h0000_0073;
  localparam logic [31:0] INSTR_NOP    = 32'h0000_0013;  // ADDI x0, x0, 0

  typedef struct packed {
    logic [6:0] funct7;
    logic [4:0] rs2;
    logic [4:0] rs1;
    logic [2:0] funct3;
    logic [4:0] rd;
    logic [6:0] opcode;
  } instr_fields_t;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_SLL  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_SLT  = 4'd8,
    ALU_SLTU = 4'd9,
    ALU_PASS_B = 4'd10   // y = B, used by LUI
  } alu_op_e;

  // ALU status flags
  typedef struct packed {
    logic eq;   // A == B
    logic lt;   // A <  B, signed
    logic ltu;  // A <  B, unsigned
  } alu_status_t;

  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_fmt_e;

  // Source of the value written to rd
  typedef enum logic [1:0] {
    WB_ALU  = 2'd0,
    WB_MEM  = 2'd1,
    WB_PC4  = 2'd2   // address of the next instruction (JAL, JALR)
  } wb_sel_e;

  // Control signals produced by the instruction decoder
  typedef struct packed {
    alu_op_e  alu_op;
    logic     alu_a_pc;    // ALU input A is the instruction address (AUIPC)
    logic     alu_b_imm;   // ALU input B is the immediate, not rs2
    imm_fmt_e imm_fmt;
    logic     reg_write;
    wb_sel_e  wb_sel;
    logic     mem_read;
    logic     mem_write;
    logic     branch;
    logic     jal;
    logic     jalr;
    logic     halt;        // EBREAK
    logic     illegal;     // not an RV32I instruction (executed as no-op)
  } ctrl_t;

endpackage

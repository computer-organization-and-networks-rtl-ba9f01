// instr_reg: the instruction register (IR) of the processor.
//
// Holds the instruction that the datapath executes. When load is high the
// 32-bit word d (the instruction read from memory) is captured on the rising
// clock edge; otherwise the register keeps its value. The stored word is
// presented both whole (ir) and split into its fields (funct7 [31:25],
// rs2 [24:20], rs1 [19:15], funct3 [14:12], rd [11:7], opcode [6:0]),
// whose 5-bit register numbers index the register file directly.
//
// Reset (synchronous, active low) loads ADDI x0,x0,0, a no-op; the reset
// value is this design's choice.
module instr_reg
  import rv32i_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [31:0]   d,
  output logic [31:0]   ir,
  output instr_fields_t fields
);

  always_ff @(posedge clk) begin
    if (!rst_n)    ir <= INSTR_NOP;
    else if (load) ir <= d;
  end

  assign fields = instr_fields_t'(ir);

endmodule

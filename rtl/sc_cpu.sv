// sc_cpu: single-cycle RV32I processor with separate instruction and data
// memories (Harvard organisation).
//
// Every clock cycle the instruction at PC is read from the instruction
// memory, decoded, and executed completely: operands are read from the
// register file, the ALU computes, a load reads or a store writes the data
// memory, the result is written to rd and PC advances to PC + 4 or to the
// branch/jump target at the clock edge. One instruction per cycle (CPI 1),
// at the price of a clock period long enough for the slowest instruction.
// It uses the same building blocks as mc_cpu (pc_reg, decoder, imm_gen,
// regfile, alu, branch_unit, load_store_unit).
//
// Interface: imem_addr/imem_rdata (combinational read), and a data port
// dmem_addr, dmem_write, dmem_wdata, dmem_rdata (combinational read, write
// on the clock edge). Byte and halfword stores write back the merged word.
// EBREAK sets halted and freezes the PC at the EBREAK; nothing is written
// while halted. Reset is synchronous and active low; RESET_PC is 0.
module sc_cpu
  import rv32i_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] dmem_addr,
  output logic            dmem_write,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  output logic            halted,
  output logic [31:0] pc
);

  instr_fields_t   f;
  ctrl_t           ctrl;
  logic [31:0] pc_plus4, imm, rs1_val, rs2_val;
  logic [31:0] alu_a, alu_b, alu_y, rd_val, load_val, store_word, target;
  alu_status_t     status;
  logic            taken, run, pc_load;

  assign f   = instr_fields_t'(imem_rdata);
  assign run = !halted && !ctrl.halt;

  always_ff @(posedge clk) begin
    if (!rst_n)         halted <= 1'b0;
    else if (ctrl.halt) halted <= 1'b1;
  end

  pc_reg #(.XLEN(32), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .init(1'b0), .inc(run), .load(run && pc_load),
    .target, .pc, .pc_plus4
  );
  assign imem_addr = pc;

  decoder u_dec (.instr(imem_rdata), .ctrl);

  imm_gen u_imm (.instr(imem_rdata), .fmt(ctrl.imm_fmt), .imm);

  regfile #(.XLEN(32)) u_rf (
    .clk, .reg_write(run && ctrl.reg_write), .rw(f.rd), .wdata(rd_val),
    .ra(f.rs1), .rb(f.rs2), .a(rs1_val), .b(rs2_val)
  );

  assign alu_a = ctrl.alu_a_pc  ? pc  : rs1_val;
  assign alu_b = ctrl.alu_b_imm ? imm : rs2_val;

  alu #(.XLEN(32)) u_alu (.a(alu_a), .b(alu_b), .alu_sel(ctrl.alu_op), .y(alu_y), .status);

  branch_unit u_br (.funct3(f.funct3), .status, .taken);

  load_store_unit u_lsu (
    .addr_lo(alu_y[1:0]), .funct3(f.funct3), .mem_word(dmem_rdata),
    .store_data(rs2_val), .load_data(load_val), .store_word
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  rd_val = load_val;
      WB_PC4:  rd_val = pc_plus4;
      default: rd_val = alu_y;
    endcase
  end

  assign target  = ctrl.jalr ? {alu_y[31:1], 1'b0} : pc + imm;
  assign pc_load = ctrl.jal || ctrl.jalr || (ctrl.branch && taken);

  assign dmem_addr  = alu_y;
  assign dmem_write = run && ctrl.mem_write;
  assign dmem_wdata = store_word;

endmodule

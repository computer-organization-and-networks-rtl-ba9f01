// mc_cpu: multi-cycle RV32I processor with one memory for code and data.
//
// The CPU is the active part of a von Neumann machine: it drives a single
// memory bus (mem_addr, mem_write, mem_wdata out; mem_rdata in) and fetches,
// decodes and executes one instruction after the other. Its parts are the
// program counter (pc_reg), the instruction register (instr_reg), the
// register file, the ALU with immediate generation and sign extension, the
// load/store formatting and the controller (mc_control) that sequences
//   INIT -> FETCH (IR <- mem[PC]) -> DECODE (PC <- PC+4) -> EXECUTE -> FETCH
// so that each instruction takes 3 cycles (after one INIT cycle). EBREAK
// stops the CPU (halted stays high until reset).
//
// Timing: the memory is read combinationally, so the word at mem_addr must
// be on mem_rdata in the same cycle; writes happen on the clock edge at the
// end of EXECUTE. In FETCH the bus carries PC; in EXECUTE of a load or store
// it carries rs1 + imm. Byte and halfword stores read the addressed word
// and write back the merged word in that same cycle, since the bus has only
// one write wire. The address of the executing instruction is kept in its
// own register (ipc) because PC has already moved on by 4 in DECODE;
// branch and JAL targets are ipc + offset and the link value is ipc + 4.
// The reset address RESET_PC is 0 as in the source; the combinational
// memory timing, the read-modify-write stores, and treating FENCE, ECALL
// and unknown instructions as no-ops are this design's own choices.
module mc_cpu
  import rv32i_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [31:0] mem_addr,
  output logic            mem_write,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  output logic            halted,
  output logic [31:0] pc,
  output logic [2:0]      state,
  output logic            instr_done
);

  logic pc_init, ir_load, pc_inc, exec;
  logic [31:0]     ir;
  instr_fields_t   f;
  ctrl_t           ctrl;
  logic [31:0] ipc, pc_plus4, imm, rs1_val, rs2_val;
  logic [31:0] alu_a, alu_b, alu_y, rd_val, load_val, store_word;
  logic [31:0] target;
  alu_status_t     status;
  logic            taken, pc_load;

  mc_control u_ctrl (
    .clk, .rst_n, .is_ebreak(ctrl.halt), .state,
    .pc_init, .ir_load, .pc_inc, .exec, .halted
  );

  pc_reg #(.XLEN(32), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .init(pc_init), .inc(pc_inc), .load(pc_load),
    .target, .pc, .pc_plus4
  );

  // address of the instruction being executed
  always_ff @(posedge clk) begin
    if (!rst_n)       ipc <= RESET_PC;
    else if (ir_load) ipc <= pc;
  end

  instr_reg u_ir (.clk, .rst_n, .load(ir_load), .d(mem_rdata), .ir, .fields(f));

  decoder u_dec (.instr(ir), .ctrl);

  imm_gen u_imm (.instr(ir), .fmt(ctrl.imm_fmt), .imm);

  regfile #(.XLEN(32)) u_rf (
    .clk, .reg_write(exec && ctrl.reg_write), .rw(f.rd), .wdata(rd_val),
    .ra(f.rs1), .rb(f.rs2), .a(rs1_val), .b(rs2_val)
  );

  assign alu_a = ctrl.alu_a_pc  ? ipc : rs1_val;
  assign alu_b = ctrl.alu_b_imm ? imm : rs2_val;

  alu #(.XLEN(32)) u_alu (.a(alu_a), .b(alu_b), .alu_sel(ctrl.alu_op), .y(alu_y), .status);

  branch_unit u_br (.funct3(f.funct3), .status, .taken);

  load_store_unit u_lsu (
    .addr_lo(alu_y[1:0]), .funct3(f.funct3), .mem_word(mem_rdata),
    .store_data(rs2_val), .load_data(load_val), .store_word
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  rd_val = load_val;
      WB_PC4:  rd_val = ipc + 32'd4;
      default: rd_val = alu_y;
    endcase
  end

  assign target  = ctrl.jalr ? {alu_y[31:1], 1'b0} : ipc + imm;
  assign pc_load = exec && (ctrl.jal || ctrl.jalr || (ctrl.branch && taken));

  assign mem_addr   = (exec && (ctrl.mem_read || ctrl.mem_write)) ? alu_y : pc;
  assign mem_write  = exec && ctrl.mem_write;
  assign mem_wdata  = store_word;
  assign instr_done = exec;

endmodule

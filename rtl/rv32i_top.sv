// rv32i_top: two RV32I machines built from the same processor blocks.
//
// mc side: the multi-cycle CPU (mc_cpu) on one shared memory that holds
//   both the program and its data (von Neumann organisation). Each
//   instruction passes through FETCH, DECODE and EXECUTE, 3 cycles.
// sc side: the single-cycle CPU (sc_cpu) with its own instruction memory
//   and data memory (Harvard organisation), one instruction per cycle.
//
// Both memories start with the image MC_INIT_FILE (one 32-bit word per
// line, from address 0). The default image is the demo program that loads
// the words at 0x20 and 0x24, adds them, stores the sum at 0x28 and halts.
// Each machine has its own active-low synchronous reset and reports
// halted (EBREAK executed) and its PC; the multi-cycle machine also reports
// its controller state (0 INIT, 1 FETCH, 2 DECODE, 3 EXECUTE, 4 HALT) and
// mc_instr_done, high in the EXECUTE cycle of every instruction.
// Memory size is this design's choice (MEM_WORDS 32-bit words).
module rv32i_top #(
  parameter int unsigned MEM_WORDS   = 1024,
  parameter logic [31:0] MC_RESET_PC = 32'h0,
  parameter string       MC_INIT_FILE = "rtl/demo_program.hex"
) (
  input  logic        clk,
  input  logic        mc_rst_n,
  input  logic        sc_rst_n,
  output logic        mc_halted,
  output logic [31:0] mc_pc,
  output logic [2:0]  mc_state,
  output logic        mc_instr_done,
  output logic        sc_halted,
  output logic [31:0] sc_pc
);

  // ---------------- multi-cycle machine, one memory ----------------
  logic [31:0] mc_addr, mc_wdata, mc_rdata, mc_unused_rdata2;
  logic        mc_write;

  mc_cpu #(.RESET_PC(MC_RESET_PC)) u_mc_cpu (
    .clk, .rst_n(mc_rst_n),
    .mem_addr(mc_addr), .mem_write(mc_write), .mem_wdata(mc_wdata), .mem_rdata(mc_rdata),
    .halted(mc_halted), .pc(mc_pc), .state(mc_state), .instr_done(mc_instr_done)
  );

  memory #(.WORDS(MEM_WORDS), .INIT_FILE(MC_INIT_FILE)) u_mc_mem (
    .clk, .addr(mc_addr), .write(mc_write), .wdata(mc_wdata), .rdata(mc_rdata),
    .raddr2(32'h0), .rdata2(mc_unused_rdata2)
  );

  // ---------------- single-cycle machine, two memories ----------------
  logic [31:0] sc_iaddr, sc_instr, sc_daddr, sc_dwdata, sc_drdata, sc_unused_rdata, sc_unused_rdata2;
  logic        sc_dwrite;

  sc_cpu u_sc_cpu (
    .clk, .rst_n(sc_rst_n),
    .imem_addr(sc_iaddr), .imem_rdata(sc_instr),
    .dmem_addr(sc_daddr), .dmem_write(sc_dwrite), .dmem_wdata(sc_dwdata), .dmem_rdata(sc_drdata),
    .halted(sc_halted), .pc(sc_pc)
  );

  // instruction memory: read-only, served by the second read port
  memory #(.WORDS(MEM_WORDS), .INIT_FILE(MC_INIT_FILE)) u_sc_imem (
    .clk, .addr(32'h0), .write(1'b0), .wdata(32'h0), .rdata(sc_unused_rdata),
    .raddr2(sc_iaddr), .rdata2(sc_instr)
  );

  memory #(.WORDS(MEM_WORDS), .INIT_FILE(MC_INIT_FILE)) u_sc_dmem (
    .clk, .addr(sc_daddr), .write(sc_dwrite), .wdata(sc_dwdata), .rdata(sc_drdata),
    .raddr2(32'h0), .rdata2(sc_unused_rdata2)
  );

endmodule

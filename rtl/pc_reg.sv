// pc_reg: the program counter.
//
// Holds the address of the next instruction to fetch. On the rising clock
// edge it is set to RESET_PC when init is high (or during reset), otherwise
// loaded with target when load is high (taken branch, JAL, JALR), otherwise
// advanced by 4 when inc is high; with none of them it keeps its value.
// pc_plus4 is the incremented address, also the link value of JAL/JALR.
//
// Following the source, the PC starts at address 0 and steps by 4 bytes
// per instruction; the priority init > load > inc is this design's choice.
module pc_reg #(
  parameter int unsigned XLEN          = 32,
  parameter logic [XLEN-1:0] RESET_PC  = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            inc,
  input  logic            load,
  input  logic [XLEN-1:0] target,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] pc_plus4
);

  assign pc_plus4 = pc + XLEN'(4);

  always_ff @(posedge clk) begin
    if (!rst_n || init) pc <= RESET_PC;
    else if (load)      pc <= target;
    else if (inc)       pc <= pc_plus4;
  end

endmodule

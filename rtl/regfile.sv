// regfile: the data registers x0..x31 of the RV32I processor.
//
// NREGS registers of XLEN bits with one write port and two read ports.
// In a clock cycle with reg_write high, wdata is stored on the rising edge
// into the register selected by rw; with reg_write low nothing is written.
// Two registers, selected by ra and rb, are read every cycle through two
// independent multiplexers and appear combinationally on a and b.
// Register x0 always reads zero and a write to it stores nothing.
//
// The registers are not reset (the source describes no reset); software is
// expected to write a register before reading it.
module regfile #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            reg_write,
  input  logic [AW-1:0]   rw,
  input  logic [XLEN-1:0] wdata,
  input  logic [AW-1:0]   ra,
  input  logic [AW-1:0]   rb,
  output logic [XLEN-1:0] a,
  output logic [XLEN-1:0] b
);

  // x1..x(NREGS-1); x0 has no storage
  logic [XLEN-1:0] regs [1:NREGS-1];

  always_ff @(posedge clk) begin
    if (reg_write && rw != '0) regs[rw] <= wdata;
  end

  assign a = (ra == '0) ? '0 : regs[ra];
  assign b = (rb == '0) ? '0 : regs[rb];

endmodule

// alu: the combinational arithmetic logic unit of the RV32I processor.
//
// Every operation is computed side by side from inputs A and B and a
// multiplexer driven by alu_sel picks the result, the same structure as a
// bank of ADD/SUB/AND/XOR units feeding an output mux. Besides those four the
// unit provides OR, the shifts SLL/SRL/SRA (shift amount = B[4:0]), the
// compares SLT/SLTU that return 0 or 1, and a pass-through of B used by LUI.
// The status output carries the relations of A and B that the conditional
// branches need: A==B, signed A<B and unsigned A<B.
//
// Interface: a, b, alu_sel in; y, status out. Purely combinational, no
// clock. The choice of flags (no overflow flag) and the alu_sel encoding are
// this design's own.
module alu
  import rv32i_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_op_e         alu_sel,
  output logic [XLEN-1:0] y,
  output alu_status_t     status
);

  localparam int unsigned SHW = $clog2(XLEN);

  logic [SHW-1:0] shamt;
  logic           lt_s, lt_u;

  assign shamt = b[SHW-1:0];
  assign lt_s  = $signed(a) < $signed(b);
  assign lt_u  = a < b;

  always_comb begin
    unique case (alu_sel)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_AND:    y = a & b;
      ALU_OR:     y = a | b;
      ALU_XOR:    y = a ^ b;
      ALU_SLL:    y = a << shamt;
      ALU_SRL:    y = a >> shamt;
      ALU_SRA:    y = XLEN'($signed(a) >>> shamt);
      ALU_SLT:    y = XLEN'(lt_s);
      ALU_SLTU:   y = XLEN'(lt_u);
      ALU_PASS_B: y = b;
      default:    y = '0;
    endcase
  end

  assign status.eq  = (a == b);
  assign status.lt  = lt_s;
  assign status.ltu = lt_u;

endmodule

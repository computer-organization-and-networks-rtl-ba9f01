// mc_control: the fetch/decode/execute controller of the multi-cycle CPU.
//
// A small state machine that walks the processor through the ASM graph
//   INIT    : PC <- reset address                 (once, after reset)
//   FETCH   : IR <- mem[PC]
//   DECODE  : PC <- PC + 4; branch on the opcode
//   EXECUTE : carry out the instruction (ALU, load, store, branch, jump)
// and back to FETCH, so every instruction takes three clock cycles. When
// the instruction in DECODE is EBREAK the machine goes to HALT instead of
// EXECUTE and stays there until reset.
//
// Outputs are one-hot enables for the datapath, decoded from the state.
// The HALT state and the synchronous active-low reset are this design's
// additions; the state encoding is its own.
module mc_control (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       is_ebreak,
  output logic [2:0] state,
  output logic       pc_init,
  output logic       ir_load,
  output logic       pc_inc,
  output logic       exec,
  output logic       halted
);

  typedef enum logic [2:0] {
    S_INIT    = 3'd0,
    S_FETCH   = 3'd1,
    S_DECODE  = 3'd2,
    S_EXECUTE = 3'd3,
    S_HALT    = 3'd4
  } state_e;

  state_e cur, nxt;

  always_ff @(posedge clk) begin
    if (!rst_n) cur <= S_INIT;
    else        cur <= nxt;
  end

  always_comb begin
    unique case (cur)
      S_INIT:    nxt = S_FETCH;
      S_FETCH:   nxt = S_DECODE;
      S_DECODE:  nxt = is_ebreak ? S_HALT : S_EXECUTE;
      S_EXECUTE: nxt = S_FETCH;
      S_HALT:    nxt = S_HALT;
      default:   nxt = S_INIT;
    endcase
  end

  assign state   = cur;
  assign pc_init = (cur == S_INIT);
  assign ir_load = (cur == S_FETCH);
  assign pc_inc  = (cur == S_DECODE);
  assign exec    = (cur == S_EXECUTE);
  assign halted  = (cur == S_HALT);

endmodule

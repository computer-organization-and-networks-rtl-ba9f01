// memory: word-organised random access memory for the processor.
//
// WORDS words of 32 bits, addressed in bytes: the word at byte address A is
// entry A[..:2]; the two low address bits are ignored here (the CPU picks
// bytes out of the word) and address bits above the array wrap around.
// The main port reads combinationally (rdata follows addr in the same
// cycle) and writes wdata on the rising clock edge when write is high,
// matching the processor's bus of address, one write wire, data out and
// data in. A second, read-only port (raddr2/rdata2) lets the same block
// serve as the instruction memory of a Harvard machine.
//
// Contents are loaded at start-up from INIT_FILE, a $readmemh image of one
// 32-bit word per line, when INIT_FILE is not empty; otherwise the memory
// starts cleared. The size and the image format are this design's choices.
module memory #(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        write,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic [31:0] raddr2,
  output logic [31:0] rdata2
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (write) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata  = mem[addr[AW+1:2]];
  assign rdata2 = mem[raddr2[AW+1:2]];

endmodule

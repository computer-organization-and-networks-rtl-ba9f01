// instr_reg_tb: loads random words, checks that the register holds while
// load is low, that reset gives the no-op 0x00000013, and that the fields
// come from the printed bit positions (funct7 31:25, rs2 24:20, rs1 19:15,
// funct3 14:12, rd 11:7, opcode 6:0), using the demo ADD x3,x1,x2.
module instr_reg_tb;
  import rv32i_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [31:0] d, ir, held;
  instr_fields_t f;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  instr_reg dut (.clk, .rst_n, .load, .d, .ir, .fields(f));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    d = $urandom;
    @(negedge clk); rst_n = 1;
    chk(ir == 32'h0000_0013, "reset value");
    @(negedge clk); load = 1; d = 32'h002081b3;
    @(negedge clk); load = 0;
    chk(f.opcode == 7'b0110011 && f.rd == 3 && f.funct3 == 0 && f.rs1 == 1 && f.rs2 == 2 && f.funct7 == 0,
        "fields of ADD x3,x1,x2");
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); load = $urandom_range(0, 1); d = $urandom; held = ir;
      @(negedge clk);
      chk(ir == (load ? d : held), "load/hold");
      chk(f.rs1 == ir[19:15] && f.rs2 == ir[24:20] && f.rd == ir[11:7] && f.funct3 == ir[14:12]
          && f.funct7 == ir[31:25] && f.opcode == ir[6:0], "fields");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pc_reg_tb: the PC starts at RESET_PC, steps by 4 on inc, takes target on
// load (which wins over inc), returns to RESET_PC on init and holds
// otherwise; pc_plus4 is always PC + 4. Uses a non-zero RESET_PC.
module pc_reg_tb;
  logic clk = 0, rst_n = 0, init = 0, inc = 0, load = 0;
  logic [31:0] target, pc, pc4, exp_pc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pc_reg #(.RESET_PC(32'h0000_0010)) dut (.clk, .rst_n, .init, .inc, .load, .target, .pc, .pc_plus4(pc4));

  initial begin
    target = 0;
    @(negedge clk); rst_n = 1; exp_pc = 32'h10;
    for (int i = 0; i < 2000; i++) begin
      checks++;
      if (pc !== exp_pc || pc4 !== exp_pc + 4) begin
        failures++;
        if (failures < 10) $display("FAIL pc %h want %h", pc, exp_pc);
      end
      init = ($urandom_range(0, 15) == 0); inc = $urandom_range(0, 1); load = ($urandom_range(0, 3) == 0);
      target = $urandom;
      if (init) exp_pc = 32'h10;
      else if (load) exp_pc = target;
      else if (inc) exp_pc = exp_pc + 4;
      @(negedge clk);
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

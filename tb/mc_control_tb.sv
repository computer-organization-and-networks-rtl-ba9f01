// mc_control_tb: follows the controller through INIT, FETCH, DECODE,
// EXECUTE for random instruction streams, checks that exactly the enable of
// the current state is high, that EBREAK seen in DECODE leads to HALT, that
// HALT is kept until reset, and that reset returns to INIT.
module mc_control_tb;
  logic clk = 0, rst_n = 0, brk = 0;
  logic [2:0] state;
  logic pc_init, ir_load, pc_inc, exec, halted;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mc_control dut (.clk, .rst_n, .is_ebreak(brk), .state, .pc_init, .ir_load, .pc_inc, .exec, .halted);

  task automatic expect_state(int s, string what);
    checks++;
    if (state !== 3'(s) || {pc_init, ir_load, pc_inc, exec, halted} !== 5'(1 << (4 - s))) begin
      failures++;
      if (failures < 10) $display("FAIL %s: state %0d enables %b, want state %0d", what, state,
                                  {pc_init, ir_load, pc_inc, exec, halted}, s);
    end
  endtask

  initial begin
    for (int run = 0; run < 20; run++) begin
      int n = $urandom_range(1, 30);
      rst_n = 0; brk = $urandom_range(0, 1);
      @(negedge clk); @(negedge clk); rst_n = 1;
      expect_state(0, "INIT");
      @(negedge clk);
      for (int i = 0; i < n; i++) begin
        brk = $urandom_range(0, 1);      // ignored outside DECODE
        expect_state(1, "FETCH");
        @(negedge clk);
        brk = (i == n - 1);
        expect_state(2, "DECODE");
        @(negedge clk);
        brk = $urandom_range(0, 1);
        if (i == n - 1) expect_state(4, "HALT");
        else begin expect_state(3, "EXECUTE"); @(negedge clk); end
      end
      repeat (5) begin @(negedge clk); brk = $urandom_range(0, 1); expect_state(4, "stays in HALT"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

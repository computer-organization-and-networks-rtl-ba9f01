// memory_tb: random writes and reads against a shadow array. Writes take
// effect at the clock edge, reads on both ports are combinational, the two
// low address bits and the bits above the array are ignored, and the
// contents start from the INIT_FILE image (the demo program).
module memory_tb;
  localparam int WORDS = 64;
  logic clk = 0, we = 0;
  logic [31:0] addr, wdata, rdata, raddr2, rdata2;
  logic [31:0] shadow[WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  memory #(.WORDS(WORDS), .INIT_FILE("rtl/demo_program.hex")) dut (
    .clk, .addr, .write(we), .wdata, .rdata, .raddr2, .rdata2);

  task automatic chk(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h want %h", what, got, want);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    shadow[0] = 32'h02002083; shadow[1] = 32'h02402103; shadow[2] = 32'h002081b3;
    shadow[3] = 32'h02302423; shadow[4] = 32'h00100073; shadow[8] = 32'h2a; shadow[9] = 32'hd;
    addr = 0; raddr2 = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); addr = 4 * i; raddr2 = 4 * (WORDS - 1 - i); #1;
      chk(rdata, shadow[i], "initial image port 1");
      chk(rdata2, shadow[WORDS - 1 - i], "initial image port 2");
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); addr = $urandom; wdata = $urandom; raddr2 = $urandom;
      #1;
      chk(rdata, shadow[addr[7:2]], "read port 1 before write");
      chk(rdata2, shadow[raddr2[7:2]], "read port 2");
      @(posedge clk);
      if (we) shadow[addr[7:2]] = wdata;
      #1 chk(rdata, shadow[addr[7:2]], "read port 1 after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// regfile_tb: random writes and reads against a shadow array. Checks that
// RegWrite low stores nothing, that x0 reads zero after being written, and
// that both read ports see the value written at the previous clock edge.
module regfile_tb;
  logic clk = 0, we;
  logic [4:0] rw, ra, rb;
  logic [31:0] wd, a, b;
  logic [31:0] shadow[32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  regfile dut (.clk, .reg_write(we), .rw, .wdata(wd), .ra, .rb, .a, .b);

  task automatic chk(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h want %h", what, got, want);
    end
  endtask

  initial begin
    // fill all registers
    for (int r = 0; r < 32; r++) begin
      @(negedge clk); we = 1; rw = 5'(r); wd = $urandom; shadow[r] = (r == 0) ? 0 : wd;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); rw = 5'($urandom); wd = $urandom;
      ra = 5'($urandom); rb = 5'($urandom);
      #1;
      chk(a, shadow[ra], $sformatf("read A x%0d", ra));
      chk(b, shadow[rb], $sformatf("read B x%0d", rb));
      @(posedge clk);
      if (we && rw != 0) shadow[rw] = wd;
    end
    @(negedge clk); we = 1; rw = 0; wd = 32'hdead_beef; ra = 0; rb = 0;
    @(negedge clk); we = 0;
    chk(a, 0, "x0 on port A"); chk(b, 0, "x0 on port B");
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

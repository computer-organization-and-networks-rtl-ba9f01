// load_store_unit_tb: the memory word is treated as four bytes, byte k at
// address offset k (little endian). Loads assemble the expected value from
// those bytes and extend it; stores replace the addressed bytes. Also
// checks the byte order of the demo program's first instruction.
module load_store_unit_tb;
  import rv32i_pkg::*;
  logic [1:0] lo;
  logic [2:0] f3;
  logic [31:0] word, sd, ld, sw;
  int checks = 0, failures = 0;

  load_store_unit dut (.addr_lo(lo), .funct3(f3), .mem_word(word), .store_data(sd),
                       .load_data(ld), .store_word(sw));

  task automatic chk(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: f3=%0d lo=%0d word=%h got %h want %h", what, f3, lo, word, got, want);
    end
  endtask

  initial begin
    logic [7:0] by[4];
    logic [31:0] want;
    int sizes[5] = '{0, 1, 2, 4, 5};
    // bytes 83 20 00 02 at offsets 0..3 form the word 0x02002083
    word = 32'h02002083; f3 = 3'b000; lo = 0; sd = 0; #1;
    chk(ld, 32'hffff_ff83, "LB of byte 0x83");
    f3 = 3'b100; #1; chk(ld, 32'h83, "LBU of byte 0x83");
    f3 = 3'b001; lo = 2; #1; chk(ld, 32'h0000_0200, "LH upper half");
    for (int i = 0; i < 3000; i++) begin
      word = $urandom; sd = $urandom; lo = 2'($urandom);
      for (int k = 0; k < 4; k++) by[k] = word[8*k +: 8];
      // loads
      f3 = 3'(sizes[$urandom_range(0, 4)]);
      #1;
      case (f3)
        0: want = {{24{by[lo][7]}}, by[lo]};
        4: want = {24'h0, by[lo]};
        1: want = {{16{by[{lo[1], 1'b1}][7]}}, by[{lo[1], 1'b1}], by[{lo[1], 1'b0}]};
        5: want = {16'h0, by[{lo[1], 1'b1}], by[{lo[1], 1'b0}]};
        default: want = {by[3], by[2], by[1], by[0]};
      endcase
      chk(ld, want, "load");
      // stores
      f3 = 3'($urandom_range(0, 2));
      #1;
      case (f3)
        0: by[lo] = sd[7:0];
        1: begin by[{lo[1], 1'b0}] = sd[7:0]; by[{lo[1], 1'b1}] = sd[15:8]; end
        default: for (int k = 0; k < 4; k++) by[k] = sd[8*k +: 8];
      endcase
      chk(sw, {by[3], by[2], by[1], by[0]}, "store");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

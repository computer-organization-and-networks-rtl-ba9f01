// branch_unit_tb: every funct3 against every combination of the three
// flags, with the expected decision written out per branch kind.
module branch_unit_tb;
  import rv32i_pkg::*;
  logic [2:0] f3;
  alu_status_t st;
  logic taken, want;
  int checks = 0, failures = 0;

  branch_unit dut (.funct3(f3), .status(st), .taken);

  initial begin
    for (int i = 0; i < 8; i++)
      for (int s = 0; s < 8; s++) begin
        f3 = 3'(i); st = alu_status_t'(3'(s));
        #1;
        case (i)
          0: want = st.eq;      // BEQ
          1: want = ~st.eq;     // BNE
          4: want = st.lt;      // BLT
          5: want = ~st.lt;     // BGE
          6: want = st.ltu;     // BLTU
          7: want = ~st.ltu;    // BGEU
          default: want = 0;
        endcase
        checks++;
        if (taken !== want) begin failures++; $display("FAIL f3=%0d flags=%b", i, s); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

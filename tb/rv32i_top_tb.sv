// rv32i_top_tb: end-to-end test of both machines at the default sizes.
//
// 1. Both machines run the demo program from the default memory image:
//    the word at 0x28 must become 42 + 13 = 55, the multi-cycle machine
//    must halt after 15 cycles (1 INIT + 4 x 3 + 2) and the single-cycle
//    machine after 5.
// 2. NPROG random programs (rv32i_ref_pkg) are written into the memories
//    of both machines; after each run the memories must equal the reference
//    model and the cycle counts must be 3 and 1 per instruction.
// Each mechanism of the design is counted and must occur at least once:
// the four controller states and HALT, and in the programs every
// instruction class, taken and not-taken branches, JAL, JALR, byte and
// halfword loads (sign/zero extension) and stores (read-modify-write).
module rv32i_top_tb;
  import rv32i_ref_pkg::*;

  localparam int unsigned WORDS = 1024;  // rv32i_top default size
  localparam int unsigned NPROG = 100;

  logic clk = 0, mc_rst_n = 0, sc_rst_n = 0;
  logic mc_halted, sc_halted;
  logic [31:0] mc_pc, sc_pc;
  logic [2:0] mc_state;
  logic mc_instr_done;
  int checks = 0, failures = 0;
  int unsigned state_seen[5];
  int unsigned ev_total[EV_NUM];

  always #5 clk = ~clk;

  rv32i_top dut (.clk, .mc_rst_n, .sc_rst_n, .mc_halted, .mc_pc, .mc_state, .mc_instr_done, .sc_halted, .sc_pc);

  always @(posedge clk) if (mc_state < 5) state_seen[mc_state]++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // reset both machines together, count the cycles each needs to halt
  task automatic run_both(output int mc_cyc, output int sc_cyc, input int limit);
    mc_rst_n = 0; sc_rst_n = 0;
    repeat (2) @(posedge clk);
    #1 mc_rst_n = 1; sc_rst_n = 1;
    mc_cyc = 0; sc_cyc = 0;
    for (int c = 0; c < limit && !(mc_halted && sc_halted); c++) begin
      if (!mc_halted) mc_cyc++;
      if (!sc_halted) sc_cyc++;
      @(posedge clk); #1;
    end
  endtask

  int mc_cyc, sc_cyc;
  rv32i_ref ref_m;

  initial begin
    #20;
    // ---- 1. demo program from the default image ----
    run_both(mc_cyc, sc_cyc, 1000);
    check(dut.u_mc_mem.mem[10] == 55, $sformatf("demo mc: mem[0x28]=%0d", dut.u_mc_mem.mem[10]));
    check(dut.u_sc_dmem.mem[10] == 55, $sformatf("demo sc: mem[0x28]=%0d", dut.u_sc_dmem.mem[10]));
    check(mc_cyc == 15, $sformatf("demo mc: %0d cycles, want 15", mc_cyc));
    check(sc_cyc == 5, $sformatf("demo sc: %0d cycles, want 5", sc_cyc));

    // ---- 2. random programs ----
    for (int n = 0; n < NPROG; n++) begin
      int errs = 0;
      ref_m = new(WORDS);
      ref_m.gen_program(20 + n % 60);
      for (int i = 0; i < WORDS; i++) begin
        dut.u_mc_mem.mem[i] = ref_m.mem[i];
        dut.u_sc_imem.mem[i] = ref_m.mem[i];
        dut.u_sc_dmem.mem[i] = ref_m.mem[i];
      end
      ref_m.run(100000);
      run_both(mc_cyc, sc_cyc, 100000);
      check(ref_m.halted && mc_halted && sc_halted, $sformatf("prog %0d: halt", n));
      for (int i = 0; i < WORDS; i++)
        if (dut.u_mc_mem.mem[i] !== ref_m.mem[i] || dut.u_sc_dmem.mem[i] !== ref_m.mem[i]) errs++;
      check(errs == 0, $sformatf("prog %0d: %0d memory words differ", n, errs));
      check(mc_cyc == 3 * ref_m.executed, $sformatf("prog %0d: mc %0d cycles, want %0d", n, mc_cyc, 3 * ref_m.executed));
      check(sc_cyc == ref_m.executed, $sformatf("prog %0d: sc %0d cycles, want %0d", n, sc_cyc, ref_m.executed));
      foreach (ev_total[e]) ev_total[e] += ref_m.ev[e];
    end

    begin
      string sn[5] = '{"INIT", "FETCH", "DECODE", "EXECUTE", "HALT"};
      for (int s = 0; s < 5; s++) begin
        $display("state %s: %0d cycles", sn[s], state_seen[s]);
        check(state_seen[s] > 0, $sformatf("state %s never reached", sn[s]));
      end
    end
    for (int e = 0; e < EV_NUM; e++) begin
      $display("event %s: %0d", event_e'(e), ev_total[e]);
      check(ev_total[e] > 0, $sformatf("event %s never happened", event_e'(e)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

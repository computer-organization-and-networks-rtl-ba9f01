// sc_cpu_tb: checks the single-cycle CPU against the reference model.
//
// The CPU runs with two memories, instruction and data, both loaded with
// the same image. Runs the demo program (two loads, an add, a store,
// EBREAK) and then NPROG random programs from rv32i_ref_pkg. For each, the
// whole data memory after the EBREAK (data area and the register dump the
// program writes) is compared with the reference model, and the number of
// cycles from reset to halt must equal the number of instructions executed
// (one cycle each, the EBREAK included).
`timescale 1ns/1ps
module sc_cpu_tb;
  import rv32i_ref_pkg::*;

  localparam int unsigned WORDS = 1024;
  localparam int unsigned NPROG = 200;

  logic clk = 0, rst_n = 0;
  logic [31:0] iaddr, instr, mem_addr, mem_wdata, mem_rdata, pc, unused1, unused2;
  logic mem_write, halted;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sc_cpu dut (.clk, .rst_n, .imem_addr(iaddr), .imem_rdata(instr),
              .dmem_addr(mem_addr), .dmem_write(mem_write), .dmem_wdata(mem_wdata),
              .dmem_rdata(mem_rdata), .halted, .pc);
  memory #(.WORDS(WORDS)) u_imem (.clk, .addr(32'h0), .write(1'b0), .wdata(32'h0),
                                  .rdata(unused1), .raddr2(iaddr), .rdata2(instr));
  memory #(.WORDS(WORDS)) u_mem (.clk, .addr(mem_addr), .write(mem_write), .wdata(mem_wdata),
                                 .rdata(mem_rdata), .raddr2(32'h0), .rdata2(unused2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // reset, run until halted; returns cycles spent with halted low
  task automatic run_dut(output int cycles, input int limit);
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cycles = 0;
    while (!halted && cycles < limit) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  task automatic load(rv32i_ref m);
    for (int i = 0; i < WORDS; i++) begin
      u_mem.mem[i] = m.mem[i];
      u_imem.mem[i] = m.mem[i];
    end
  endtask

  int cyc;
  rv32i_ref ref_m;
  int unsigned ev_total[EV_NUM];

  initial begin
    #20;
    // ---- demo program ----
    ref_m = new(WORDS);
    ref_m.mem[0] = 32'h02002083; ref_m.mem[1] = 32'h02402103; ref_m.mem[2] = 32'h002081b3;
    ref_m.mem[3] = 32'h02302423; ref_m.mem[4] = 32'h00100073;
    ref_m.mem[8] = 42; ref_m.mem[9] = 13;
    load(ref_m);
    run_dut(cyc, 1000);
    check(u_mem.mem[10] == 32'd55, $sformatf("demo: mem[0x28]=%0d, want 55", u_mem.mem[10]));
    check(cyc == 5, $sformatf("demo: %0d cycles to halt, want 5", cyc));
    check(pc == 32'h10, $sformatf("demo: pc after halt %h, want 10", pc));
    repeat (3) @(posedge clk);
    #1 check(pc == 32'h10 && halted, "demo: stays halted at the EBREAK");

    // ---- random programs ----
    for (int n = 0; n < NPROG; n++) begin
      int errs = 0;
      ref_m = new(WORDS);
      ref_m.gen_program(20 + n % 60);
      load(ref_m);
      ref_m.run(100000);
      run_dut(cyc, 100000);
      check(ref_m.halted && halted, $sformatf("prog %0d: halt (ref %0d dut %0d)", n, ref_m.halted, halted));
      for (int i = 0; i < WORDS; i++)
        if (u_mem.mem[i] !== ref_m.mem[i]) begin
          errs++;
          if (errs < 4) $display("prog %0d: mem[%h] dut %h ref %h", n, i * 4, u_mem.mem[i], ref_m.mem[i]);
        end
      check(errs == 0, $sformatf("prog %0d: %0d memory words differ", n, errs));
      foreach (ev_total[e]) ev_total[e] += ref_m.ev[e];
      check(cyc == ref_m.executed, $sformatf("prog %0d: %0d cycles, want %0d", n, cyc, ref_m.executed));
    end
    // every kind of instruction event must have happened
    for (int e = 0; e < EV_NUM; e++) begin
      $display("event %s: %0d", event_e'(e), ev_total[e]);
      check(ev_total[e] > 0, $sformatf("event %s never happened", event_e'(e)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

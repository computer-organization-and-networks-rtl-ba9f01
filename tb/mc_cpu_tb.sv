// mc_cpu_tb: checks the multi-cycle CPU against the reference model.
//
// Runs the demo program (two loads, an add, a store, EBREAK) and then
// NPROG random programs from rv32i_ref_pkg. For each, the whole memory of
// the CPU after the EBREAK (data area and the register dump the program
// writes) is compared with the reference model, and the number of cycles
// from reset to halt must be exactly 3 per instruction: one INIT cycle, 3
// cycles (FETCH, DECODE, EXECUTE) for every instruction but the EBREAK, and
// 2 (FETCH, DECODE) for the EBREAK. The controller state sequence is
// checked on the demo program.
`timescale 1ns/1ps
module mc_cpu_tb;
  import rv32i_ref_pkg::*;

  localparam int unsigned WORDS = 1024;
  localparam int unsigned NPROG = 200;

  logic clk = 0, rst_n = 0;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, pc, unused2;
  logic mem_write, halted, instr_done;
  logic [2:0] state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mc_cpu dut (.clk, .rst_n, .mem_addr, .mem_write, .mem_wdata, .mem_rdata,
              .halted, .pc, .state, .instr_done);
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
    for (int i = 0; i < WORDS; i++) u_mem.mem[i] = m.mem[i];
  endtask

  int cyc;
  rv32i_ref ref_m;
  logic [2:0] seen[$];
  int unsigned ev_total[EV_NUM];

  initial begin
    #20;
    // ---- demo program ----
    ref_m = new(WORDS);
    ref_m.mem[0] = 32'h02002083; ref_m.mem[1] = 32'h02402103; ref_m.mem[2] = 32'h002081b3;
    ref_m.mem[3] = 32'h02302423; ref_m.mem[4] = 32'h00100073;
    ref_m.mem[8] = 42; ref_m.mem[9] = 13;
    load(ref_m);
    fork
      run_dut(cyc, 1000);
      begin
        @(posedge rst_n);
        repeat (16) begin #1; seen.push_back(state); @(posedge clk); end
      end
    join
    check(u_mem.mem[10] == 32'd55, $sformatf("demo: mem[0x28]=%0d, want 55", u_mem.mem[10]));
    check(cyc == 15, $sformatf("demo: %0d cycles to halt, want 15", cyc));
    // INIT FETCH DECODE EXECUTE x4, then FETCH DECODE HALT
    begin
      logic [2:0] want[16] = '{0, 1,2,3, 1,2,3, 1,2,3, 1,2,3, 1,2, 4};
      for (int i = 0; i < 16; i++)
        check(seen[i] == want[i], $sformatf("demo: state %0d at cycle %0d, want %0d", seen[i], i, want[i]));
    end
    check(pc == 32'h14, $sformatf("demo: pc after halt %h, want 14", pc));

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
      check(cyc == 3 * ref_m.executed, $sformatf("prog %0d: %0d cycles, want %0d", n, cyc, 3 * ref_m.executed));
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

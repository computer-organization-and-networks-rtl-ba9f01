// rv32i_ref_pkg: reference model and program generator for the RV32I
// processor testbenches.
//
// rv32i_ref is an instruction-set model written directly from the RV32I
// instruction definitions, independent of the RTL: 32 registers, a
// little-endian byte-addressed memory of MEM_WORDS 32-bit words (addresses
// wrap), and step(), which executes one instruction and counts each kind of
// event (taken/not-taken branch, jump, byte/halfword load and store ...).
//
// gen_program() writes a random, terminating test program into the model's
// memory: a prologue that sets every register to a random value, a body of instruction groups, then an epilogue that stores x1..x31
// to DUMP_ADDR.. and an EBREAK. Branches and jumps only go forward, to the
// start of a later group, so every program ends. Loads and stores go to the
// data area DATA_ADDR..DATA_ADDR+0x2FF, either relative to x0 or through a
// base register set by the ADDI just before them. The code stays below
// DATA_ADDR, so no program modifies its own code.
package rv32i_ref_pkg;

  localparam int unsigned DATA_ADDR = 32'h400;
  localparam int unsigned DUMP_ADDR = 32'h700;

  typedef enum int {
    EV_ALU_R, EV_ALU_I, EV_LUI, EV_AUIPC, EV_LOAD_W, EV_LOAD_BH, EV_STORE_W, EV_STORE_BH,
    EV_BR_TAKEN, EV_BR_NOT, EV_JAL, EV_JALR, EV_HALT, EV_NUM
  } event_e;

  function automatic logic [31:0] enc_r(int f7, int rs2, int rs1, int f3, int rd, int op);
    return {f7[6:0], rs2[4:0], rs1[4:0], f3[2:0], rd[4:0], op[6:0]};
  endfunction
  function automatic logic [31:0] enc_i(int imm, int rs1, int f3, int rd, int op);
    return {imm[11:0], rs1[4:0], f3[2:0], rd[4:0], op[6:0]};
  endfunction
  function automatic logic [31:0] enc_s(int imm, int rs2, int rs1, int f3);
    return {imm[11:5], rs2[4:0], rs1[4:0], f3[2:0], imm[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(int off, int rs2, int rs1, int f3);
    return {off[12], off[10:5], rs2[4:0], rs1[4:0], f3[2:0], off[4:1], off[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_u(int imm20, int rd, int op);
    return {imm20[19:0], rd[4:0], op[6:0]};
  endfunction
  function automatic logic [31:0] enc_j(int off, int rd);
    return {off[20], off[10:1], off[11], off[19:12], rd[4:0], 7'b1101111};
  endfunction

  class rv32i_ref;
    int unsigned mem_words;
    logic [31:0] mem[];
    logic [31:0] x[32];
    logic [31:0] pc;
    bit          halted;
    int unsigned executed;
    int unsigned ev[EV_NUM];

    function new(int unsigned words);
      mem_words = words;
      mem = new[words];
      foreach (mem[i]) mem[i] = '0;
      reset();
    endfunction

    function void reset();
      foreach (x[i]) x[i] = '0;
      pc = '0; halted = 0; executed = 0;
      foreach (ev[i]) ev[i] = 0;
    endfunction

    function logic [7:0] rd8(logic [31:0] a);
      logic [31:0] w = mem[(a >> 2) % mem_words];
      return w[8*a[1:0] +: 8];
    endfunction
    function void wr8(logic [31:0] a, logic [7:0] v);
      int unsigned i = (a >> 2) % mem_words;
      logic [31:0] w = mem[i];
      w[8*a[1:0] +: 8] = v;
      mem[i] = w;
    endfunction

    function void step();
      logic [31:0] ins, a, b, r, ea, nextpc;
      int rd, rs1, rs2, f3, f7, op;
      int signed immi, imms, immb, immj;
      bit wr;
      if (halted) return;
      ins = mem[(pc >> 2) % mem_words];
      op = ins[6:0]; rd = ins[11:7]; f3 = ins[14:12]; rs1 = ins[19:15]; rs2 = ins[24:20]; f7 = ins[31:25];
      a = x[rs1]; b = x[rs2];
      immi = $signed(ins) >>> 20;
      imms = ($signed(ins) >>> 25) * 32 + int'(ins[11:7]);
      immb = ($signed(ins) >>> 31) * 4096 + int'(ins[7]) * 2048 + int'(ins[30:25]) * 32 + int'(ins[11:8]) * 2;
      immj = ($signed(ins) >>> 31) * (1 << 20) + int'(ins[19:12]) * 4096 + int'(ins[20]) * 2048 + int'(ins[30:21]) * 2;
      nextpc = pc + 4; wr = 0; r = '0;
      executed++;
      case (op)
        7'b0110111: begin r = {ins[31:12], 12'h0}; wr = 1; ev[EV_LUI]++; end
        7'b0010111: begin r = pc + {ins[31:12], 12'h0}; wr = 1; ev[EV_AUIPC]++; end
        7'b1101111: begin r = pc + 4; wr = 1; nextpc = pc + immj; ev[EV_JAL]++; end
        7'b1100111: begin r = pc + 4; wr = 1; nextpc = (a + immi) & ~32'h1; ev[EV_JALR]++; end
        7'b1100011: begin
          bit t;
          case (f3)
            0: t = (a == b);
            1: t = (a != b);
            4: t = ($signed(a) < $signed(b));
            5: t = ($signed(a) >= $signed(b));
            6: t = (a < b);
            7: t = (a >= b);
            default: t = 0;
          endcase
          if (t) begin nextpc = pc + immb; ev[EV_BR_TAKEN]++; end else ev[EV_BR_NOT]++;
        end
        7'b0000011: begin
          ea = a + immi; wr = 1;
          case (f3)
            0: r = {{24{rd8(ea)[7]}}, rd8(ea)};
            1: begin r[15:0] = {rd8({ea[31:1], 1'b1}), rd8({ea[31:1], 1'b0})}; r[31:16] = {16{r[15]}}; end
            4: r = {24'h0, rd8(ea)};
            5: r = {16'h0, rd8({ea[31:1], 1'b1}), rd8({ea[31:1], 1'b0})};
            default: r = mem[(ea >> 2) % mem_words];
          endcase
          if (f3 == 2) ev[EV_LOAD_W]++; else ev[EV_LOAD_BH]++;
        end
        7'b0100011: begin
          ea = a + imms;
          case (f3)
            0: wr8(ea, b[7:0]);
            1: begin wr8({ea[31:1], 1'b0}, b[7:0]); wr8({ea[31:1], 1'b1}, b[15:8]); end
            default: mem[(ea >> 2) % mem_words] = b;
          endcase
          if (f3 == 2) ev[EV_STORE_W]++; else ev[EV_STORE_BH]++;
        end
        7'b0010011, 7'b0110011: begin
          logic [31:0] o = (op == 7'b0010011) ? immi : b;
          wr = 1;
          case (f3)
            0: r = (op == 7'b0110011 && f7 == 32) ? a - o : a + o;
            1: r = a << o[4:0];
            2: r = ($signed(a) < $signed(o)) ? 1 : 0;
            3: r = (a < o) ? 1 : 0;
            4: r = a ^ o;
            5: r = (f7 == 32) ? $unsigned($signed(a) >>> o[4:0]) : a >> o[4:0];
            6: r = a | o;
            7: r = a & o;
          endcase
          if (op == 7'b0110011) ev[EV_ALU_R]++; else ev[EV_ALU_I]++;
        end
        7'b1110011: if (ins == 32'h0010_0073) begin halted = 1; ev[EV_HALT]++; end
        default: ;
      endcase
      if (wr && rd != 0) x[rd] = r;
      if (!halted) pc = nextpc;
    endfunction

    function void run(int unsigned max_steps);
      for (int unsigned i = 0; i < max_steps && !halted; i++) step();
    endfunction

    // Random program; n_groups (at most 80) instruction groups in the body.
    function void gen_program(int unsigned n_groups);
      int kind[];
      int start[];
      int pos, body_end;
      kind = new[n_groups];
      start = new[n_groups + 1];
      // data area filled with random words
      for (int i = DATA_ADDR / 4; i < DUMP_ADDR / 4; i++) mem[i] = $urandom;
      // prologue: every register gets a random 32-bit value (LUI + ADDI)
      for (int r = 1; r < 32; r++) begin
        mem[2*r-2] = enc_u($urandom, r, 7'b0110111);
        mem[2*r-1] = enc_i($urandom_range(0, 4095), r, 0, r, 7'b0010011);
      end
      pos = 62;
      for (int g = 0; g < n_groups; g++) begin
        kind[g] = $urandom_range(0, 11);
        start[g] = pos;
        pos += (kind[g] inside {7, 9, 10}) ? 2 : 1;
      end
      start[n_groups] = pos;
      body_end = pos;
      for (int g = 0; g < n_groups; g++) begin
        int p = start[g];
        int rd = $urandom_range(1, 31), r1 = $urandom_range(0, 31), r2 = $urandom_range(0, 31);
        int tg = g + 1 + $urandom_range(0, 3);
        int tgt = start[tg > n_groups ? n_groups : tg];
        case (kind[g])
          0, 1: begin  // register-register ALU
            int f3 = $urandom_range(0, 7);
            int f7 = (f3 == 0 || f3 == 5) && $urandom_range(0, 1) ? 32 : 0;
            mem[p] = enc_r(f7, r2, r1, f3, rd, 7'b0110011);
          end
          2, 3: begin  // ALU with immediate
            int f3 = $urandom_range(0, 7);
            int imm = $urandom_range(0, 4095);
            if (f3 == 1) imm = $urandom_range(0, 31);
            if (f3 == 5) imm = $urandom_range(0, 31) + ($urandom_range(0, 1) ? 32'h400 : 0);
            mem[p] = enc_i(imm, r1, f3, rd, 7'b0010011);
          end
          4: mem[p] = enc_u($urandom, rd, $urandom_range(0, 1) ? 7'b0110111 : 7'b0010111);
          5: begin  // load relative to x0
            int f3s[5] = '{0, 1, 2, 4, 5};
            int f3 = f3s[$urandom_range(0, 4)];
            mem[p] = enc_i(DATA_ADDR + $urandom_range(0, 16'h2ff), 0, f3, rd, 7'b0000011);
          end
          6: begin  // store relative to x0
            int f3 = $urandom_range(0, 2);
            mem[p] = enc_s(DATA_ADDR + $urandom_range(0, 16'h2ff), r2, 0, f3);
          end
          7: begin  // base register, then load or store with a signed offset
            int base = DATA_ADDR + 16'h180;
            int off = $urandom_range(0, 16'h2ff) - 16'h180;
            int f3s[5] = '{0, 1, 2, 4, 5};
            mem[p] = enc_i(base, 0, 0, rd, 7'b0010011);
            if ($urandom_range(0, 1)) mem[p+1] = enc_i(off, rd, f3s[$urandom_range(0, 4)], $urandom_range(1, 31), 7'b0000011);
            else begin
              do r2 = $urandom_range(0, 31); while (r2 == rd);
              mem[p+1] = enc_s(off, r2, rd, $urandom_range(0, 2));
            end
          end
          8: begin  // conditional branch forward
            int f3s[6] = '{0, 1, 4, 5, 6, 7};
            if ($urandom_range(0, 3) == 0) r2 = r1;
            mem[p] = enc_b((tgt - p) * 4, r2, r1, f3s[$urandom_range(0, 5)]);
          end
          9: begin  // JAL forward (second word skipped or landed on)
            mem[p] = enc_j((tgt - p) * 4, $urandom_range(0, 1) ? rd : 0);
            mem[p+1] = enc_i($urandom_range(0, 4095), r1, 0, rd, 7'b0010011);
          end
          10: begin  // JALR through a register set just before
            int lnk = $urandom_range(0, 31);
            mem[p] = enc_i(tgt * 4, 0, 0, rd, 7'b0010011);
            mem[p+1] = enc_i($urandom_range(0, 1), rd, 0, lnk, 7'b1100111);  // bit 0 of the sum is cleared
          end
          default: begin  // conditional branch on equal registers (taken)
            mem[p] = enc_b((tgt - p) * 4, r1, r1, $urandom_range(0, 1) ? 0 : 5);
          end
        endcase
      end
      // epilogue: dump registers, halt
      for (int r = 1; r < 32; r++) mem[body_end + r - 1] = enc_s(DUMP_ADDR + 4 * r, r, 0, 2);
      mem[body_end + 31] = 32'h0010_0073;
    endfunction
  endclass

endpackage

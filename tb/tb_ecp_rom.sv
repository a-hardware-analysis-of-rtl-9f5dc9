// tb_ecp_rom: checks the microcode ROM and its list scheduler.
//
// Part 1 runs the programs of a 3-ALU ROM on an abstract machine: the
// ROM is read through its registered port, every stage reads all of its
// operands before writing any result, and the arithmetic is big-integer
// modular arithmetic (a Montgomery product is a*b*2^-(pb+2) mod p). The
// points it computes are compared with an affine reference, so a schedule
// that breaks a data dependency, a wrong branch target or a wrong formula
// is caught. Part 2 checks structure: no stage writes a word twice, no stage
// holds more than NALU operations, and in a 1-ALU ROM the doubling and
// addition bodies hold the expected number of multiplications and
// additions/subtractions for each algorithm.
module tb_ecp_rom;
  import ecp_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned PB = 192;
  localparam int unsigned N3 = 3;
  localparam int unsigned KB = 24;          // key length used here

  logic             clk = 1'b0;
  logic [PC_W-1:0]  addr = '0;
  ctrl_t            ctrl3, ctrl1;
  slot_t [N3-1:0]   slots3;
  slot_t [0:0]      slots1;
  alg_t             alg = ALG_DA;
  logic [PC_W-1:0]  entry3, entry1;

  ecp_rom #(.NALU(N3)) rom3 (.clk(clk), .addr(addr), .ctrl(ctrl3), .slots(slots3),
                             .alg(alg), .entry(entry3));
  ecp_rom #(.NALU(1))  rom1 (.clk(clk), .addr(addr), .ctrl(ctrl1), .slots(slots1),
                             .alg(alg), .entry(entry1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("ROM words used: %0d with 1 ALU, %0d with 3 ALUs", rom1.pc, rom3.pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fe_t mem [2**ADDR_W];
  fe_t rinv;

  function automatic fe_t rnd_fe();
    fe_t v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v % P192;
  endfunction

  function automatic fe_t alu(input alu_op_t o, input fe_t x, input fe_t z);
    case (o)
      ALU_ADD: return addmod(x, z, P192);
      ALU_SUB: return submod(x, z, P192);
      ALU_MUL: return mulmod(mulmod(x, z, P192), rinv, P192);
      default: return 0;
    endcase
  endfunction

  // run one program on the abstract machine, reading the 3-ALU ROM
  task automatic interpret(input alg_t al, input logic [KB-1:0] k);
    logic [KB-1:0] kq;
    int bits, steps;
    fe_t va [N3], vb [N3];
    logic [ADDR_W-1:0] ra;
    alg = al;
    #1;
    kq = k; bits = KB;
    while (!kq[KB-1] && bits != 0) begin kq = kq << 1; bits--; end
    @(negedge clk); addr = entry3;
    steps = 0;
    forever begin
      @(negedge clk);                         // registered read
      steps++;
      if (steps > 200000) begin failures++; $display("program runs away"); break; end
      case (ctrl3.iop)
        I_STAGE: begin
          for (int i = 0; i < int'(N3); i++) begin
            ra = (slots3[i].ksel && kq[KB-1]) ? slots3[i].src_a + KOFF : slots3[i].src_a;
            va[i] = mem[ra];
            vb[i] = mem[slots3[i].src_b];
          end
          for (int i = 0; i < int'(N3); i++)
            if (slots3[i].op != ALU_NOP) mem[slots3[i].dst] = alu(slots3[i].op, va[i], vb[i]);
          addr = addr + 1'b1;
        end
        I_SHIFT: begin kq = kq << 1; bits--; addr = addr + 1'b1; end
        I_BRZ:   addr = (bits == 0) ? ctrl3.target : addr + 1'b1;
        I_BRK0:  addr = (!kq[KB-1]) ? ctrl3.target : addr + 1'b1;
        I_JMP:   addr = ctrl3.target;
        default: break;
      endcase
    end
  endtask

  task automatic run_alg(input alg_t al, input logic [KB-1:0] k);
    fe_t x, y, ca, cd, xr, yr, z2;
    x = rnd_fe(); y = rnd_fe(); ca = rnd_fe();
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = rnd_fe();
    if (al == ALG_TE || al == ALG_TEU) begin
      cd = te_d_for(x, y, ca, P192);
      te_smul(fe_t'(k), x, y, ca, cd, P192, xr, yr);
    end else begin
      cd = rnd_fe();
      w_smul(fe_t'(k), x, y, ca, P192, xr, yr);
    end
    mem[A_PX] = x; mem[A_PY] = y; mem[A_PZ] = 1; mem[A_CA] = ca; mem[A_CD] = cd;
    mem[A_R2] = mont_r2(PB, P192); mem[A_ONE] = 1;
    interpret(al, k);
    checks++;
    if (al == ALG_TE || al == ALG_TEU) begin
      if (mem[A_QZ] == 0 || mem[A_QX] != mulmod(xr, mem[A_QZ], P192)
          || mem[A_QY] != mulmod(yr, mem[A_QZ], P192)) begin
        failures++; $display("%s key %h: wrong point", al.name(), k);
      end
    end else begin
      z2 = mulmod(mem[A_QZ], mem[A_QZ], P192);
      if (mem[A_QZ] == 0 || mem[A_QX] != mulmod(xr, z2, P192)
          || mem[A_QY] != mulmod(yr, mulmod(z2, mem[A_QZ], P192), P192)) begin
        failures++; $display("%s key %h: wrong point", al.name(), k);
      end
    end
  endtask

  // count operations of the 1-ALU ROM in [from, to)
  task automatic count1(input int from, input int to, output int nm, output int na);
    nm = 0; na = 0;
    for (int pc = from; pc < to; pc++)
      if (rom1.rom_ctrl[pc].iop == I_STAGE) begin
        if (rom1.rom_slots[pc][0].op == ALU_MUL) nm++;
        else if (rom1.rom_slots[pc][0].op != ALU_NOP) na++;
      end
  endtask

  task automatic expect_counts(input string what, input int from, input int to,
                               input int em, input int ea);
    int nm, na;
    count1(from, to, nm, na);
    checks++;
    if (nm != em || na != ea) begin
      failures++;
      $display("%s: %0d mul %0d add, expected %0d mul %0d add", what, nm, na, em, ea);
    end
  endtask

  // first BRK0 at or after pc
  function automatic int find_brk0(input int pc);
    while (rom1.rom_ctrl[pc].iop != I_BRK0) pc++;
    return pc;
  endfunction

  initial begin
    logic [KB-1:0] k;
    rinv = invmod(modw(512'b1 << (PB + 2), P192), P192);
    #1;
    // Part 1: programs on the abstract machine
    for (int al = 0; al < 4; al++) begin
      run_alg(alg_t'(al), KB'(1));
      run_alg(alg_t'(al), KB'(6));
      for (int n = 0; n < 3; n++) begin
        k = KB'($urandom);
        k[KB-1] = 1'b1;
        run_alg(alg_t'(al), k);
      end
    end
    // Part 2: structure of the 3-ALU ROM
    for (int pc = 0; pc < 2**PC_W; pc++)
      if (rom3.rom_ctrl[pc].iop == I_STAGE) begin
        int used;
        used = 0;
        for (int i = 0; i < int'(N3); i++) begin
          if (rom3.rom_slots[pc][i].op != ALU_NOP) used++;
          for (int j = i + 1; j < int'(N3); j++)
            if (rom3.rom_slots[pc][i].op != ALU_NOP && rom3.rom_slots[pc][j].op != ALU_NOP
                && rom3.rom_slots[pc][i].dst == rom3.rom_slots[pc][j].dst) begin
              failures++; $display("stage %0d writes a word twice", pc);
            end
        end
        checks++;
        if (used == 0 || used > int'(N3)) begin failures++; $display("stage %0d holds %0d ops", pc, used); end
      end
    // Part 2: operation counts of the 1-ALU ROM (label index = alg*4 + kind)
    begin
      int lp, bk, sk;
      lp = int'(rom1.lab[4*ALG_DA + 1]); bk = find_brk0(lp); sk = int'(rom1.lab[4*ALG_DA + 2]);
      expect_counts("DA doubling", lp, bk, 10, 13);
      expect_counts("DA addition", bk + 1, sk, 16, 7);
      lp = int'(rom1.lab[4*ALG_DAA + 1]); sk = int'(rom1.lab[4*ALG_DAA + 2]);
      expect_counts("DAA iteration", lp, sk, 26, 23);
      lp = int'(rom1.lab[4*ALG_TE + 1]); bk = find_brk0(lp); sk = int'(rom1.lab[4*ALG_TE + 2]);
      expect_counts("TE doubling", lp, bk, 8, 7);
      expect_counts("TE addition", bk + 1, sk, 13, 7);
      lp = int'(rom1.lab[4*ALG_TEU + 1]); bk = find_brk0(lp); sk = int'(rom1.lab[4*ALG_TEU + 2]);
      expect_counts("TEU doubling", lp, bk, 14, 4);
      expect_counts("TEU addition", bk + 1, sk, 14, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

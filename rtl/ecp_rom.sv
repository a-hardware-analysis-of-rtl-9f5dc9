// ecp_rom: microcode ROM of the elliptic curve processor.
//
// Holds four point-multiplication programs, one per algorithm the processor
// is built to compare: Double-and-Add and Double-and-Add-Always on a
// Weierstrass curve in Jacobian coordinates, and twisted Edwards with
// separate doubling/addition formulas or with the strongly unified formula
// used for both. The hardware is the same for all four; only the program
// differs.
//
// Each point formula is written below as a plain sequence of field
// operations, one per line, exactly in the order a single ALU would run it.
// When the ROM is initialised, a list scheduler packs every straight-line
// block into stages of at most NALU operations. An operation may go into a
// stage once every earlier operation that produces one of its operands or
// writes its destination sits in an earlier stage, and every earlier
// operation that reads its destination sits in that stage or before. The
// block is scheduled three ways (operations in program order; ready
// operation with the most multiplications still ahead of it first; the same
// with stages that hold only multiplications or only additions) and the
// schedule with the fewest estimated cycles is kept. All slots of a stage read
// their operands before any result of the stage is written, so the packed
// program computes exactly what the sequential one does. Branch targets are
// resolved by running the generator twice. (The design this follows created
// the schedule with an offline program generator; doing it at elaboration
// here lets one ROM serve any NALU.)
//
// Program shape (all four): convert P, a and d into Montgomery form and copy
// P into Q; step past the leading key bit; then per remaining key bit double
// Q and, depending on the algorithm, add P when the bit is 1 (branch),
// always add into Q[1] and select with a key-indexed copy (Double-and-Add-
// Always), or use the unified formula for both steps. Finally Q is converted
// out of Montgomery form and the program halts.
//
// Interface: addr is registered on each clock, ctrl/slots show the word one
// cycle later (block-ROM timing). entry gives the first address of the
// program selected by alg, combinationally.
module ecp_rom
  import ecp_pkg::*;
#(
  parameter int unsigned NALU = 4          // ALUs working in parallel
) (
  input  logic                  clk,
  input  logic [PC_W-1:0]       addr,
  output ctrl_t                 ctrl,
  output slot_t [NALU-1:0]      slots,
  input  alg_t                  alg,
  output logic [PC_W-1:0]       entry
);

  localparam int unsigned DEPTH = 2 ** PC_W;
  localparam int unsigned MAXOP = 64;      // ops in one straight-line block

  ctrl_t            rom_ctrl  [DEPTH];
  slot_t [NALU-1:0] rom_slots [DEPTH];

  // ---------------------------------------------------------------------
  // Program generator (runs once, at initialisation)
  // ---------------------------------------------------------------------
  // label index = alg*4 + kind
  localparam int L_ENTRY = 0, L_LOOP = 1, L_SKIP = 2, L_END = 3;

  logic [PC_W-1:0] lab     [16];
  logic [PC_W-1:0] lab_new [16];
  int              pc;

  alu_op_t         b_op [MAXOP];
  logic            b_k  [MAXOP];
  logic [ADDR_W-1:0] b_a [MAXOP], b_b [MAXOP], b_d [MAXOP];
  int              nb;

  function automatic logic [ADDR_W-1:0] t(input int n);
    return A_TMP + ADDR_W'(n);
  endfunction

  task automatic put(input alu_op_t o, input logic [ADDR_W-1:0] a,
                     input logic [ADDR_W-1:0] b, input logic [ADDR_W-1:0] d,
                     input logic k);
    b_op[nb] = o; b_a[nb] = a; b_b[nb] = b; b_d[nb] = d; b_k[nb] = k;
    nb = nb + 1;
  endtask

  task automatic mul(input logic [ADDR_W-1:0] a, input logic [ADDR_W-1:0] b,
                     input logic [ADDR_W-1:0] d);
    put(ALU_MUL, a, b, d, 1'b0);
  endtask
  task automatic add(input logic [ADDR_W-1:0] a, input logic [ADDR_W-1:0] b,
                     input logic [ADDR_W-1:0] d);
    put(ALU_ADD, a, b, d, 1'b0);
  endtask
  task automatic sub(input logic [ADDR_W-1:0] a, input logic [ADDR_W-1:0] b,
                     input logic [ADDR_W-1:0] d);
    put(ALU_SUB, a, b, d, 1'b0);
  endtask

  // does op j read word w (a ksel slot reads srcA and srcA + KOFF)
  function automatic logic reads(input int j, input logic [ADDR_W-1:0] w);
    return b_a[j] == w || b_b[j] == w || (b_k[j] && (b_a[j] + KOFF) == w);
  endfunction

  // Dependency of op j on an earlier op i: 2 = j must be in a later stage
  // (j reads or rewrites what i writes), 1 = j may share i's stage but not
  // precede it (j overwrites what i reads), 0 = independent.
  function automatic int dep(input int i, input int j);
    if (reads(j, b_d[i]) || b_d[i] == b_d[j]) return 2;
    if (reads(i, b_d[j])) return 1;
    return 0;
  endfunction

  // Three list schedulers for the buffered block; each gives every op a
  // stage number in st and returns the number of stages.
  //  mode 0, in order : ops in program order, each into the earliest stage
  //                     that satisfies its dependencies and has a free slot;
  //  mode 1, priority : stage by stage, the ready op with the most
  //                     multiplications (then operations) still ahead on its
  //                     dependency chain first;
  //  mode 2           : as mode 1, but a stage holds only multiplications or
  //                     only additions/subtractions, decided by its first op.
  task automatic sched(input int mode, output int st [MAXOP], output int nst);
    int  prio [MAXOP];
    int  fill [MAXOP];
    bit  placed [MAXOP];
    int  left, s, best, cnt, lo;
    bit  rdy, smul;
    nst = 0;
    smul = 1'b0;
    for (int i = 0; i < MAXOP; i++) begin
      st[i] = 0; fill[i] = 0; placed[i] = 1'b0; prio[i] = 0;
    end
    if (mode == 0) begin
      for (int j = 0; j < nb; j++) begin
        lo = 0;
        for (int i = 0; i < j; i++) begin
          if (dep(i, j) == 2 && st[i] + 1 > lo) lo = st[i] + 1;
          if (dep(i, j) == 1 && st[i] > lo) lo = st[i];
        end
        while (fill[lo] >= int'(NALU)) lo = lo + 1;
        st[j] = lo;
        fill[lo] = fill[lo] + 1;
        if (lo + 1 > nst) nst = lo + 1;
      end
    end else begin
      for (int i = nb - 1; i >= 0; i--) begin
        int m;
        m = 0;
        for (int j = i + 1; j < nb; j++)
          if (dep(i, j) != 0 && prio[j] > m) m = prio[j];
        prio[i] = m + ((b_op[i] == ALU_MUL) ? 64 : 1);
      end
      left = nb;
      s = 0;
      while (left > 0) begin
        cnt = 0;
        while (cnt < int'(NALU)) begin
          best = -1;
          for (int j = 0; j < nb; j++) begin
            if (!placed[j]) begin
              rdy = 1'b1;
              for (int i = 0; i < j; i++) begin
                if (dep(i, j) == 2 && !(placed[i] && st[i] < s)) rdy = 1'b0;
                if (dep(i, j) == 1 && !placed[i]) rdy = 1'b0;
              end
              if (mode == 2 && cnt > 0 && ((b_op[j] == ALU_MUL) != smul)) rdy = 1'b0;
              if (rdy && (best < 0 || prio[j] > prio[best])) best = j;
            end
          end
          if (best < 0) break;
          if (cnt == 0) smul = (b_op[best] == ALU_MUL);
          placed[best] = 1'b1;
          st[best]     = s;
          cnt  = cnt + 1;
          left = left - 1;
        end
        s = s + 1;
      end
      nst = s;
    end
  endtask

  // Rough run time of a schedule: a stage with a multiplication costs about
  // 200 cycles, an add/subtract-only stage about 12.
  function automatic int sched_cost(input int st [MAXOP], input int nst);
    int c;
    bit m;
    c = 0;
    for (int s = 0; s < nst; s++) begin
      m = 1'b0;
      for (int i = 0; i < nb; i++) if (st[i] == s && b_op[i] == ALU_MUL) m = 1'b1;
      c = c + (m ? 200 : 12);
    end
    return c;
  endfunction

  // Schedule the buffered block all three ways, emit the cheapest schedule.
  task automatic flush();
    int st0 [MAXOP], st1 [MAXOP];
    int n0, n1, k;
    slot_t [NALU-1:0] w;
    sched(0, st0, n0);
    for (int mode = 1; mode <= 2; mode++) begin
      sched(mode, st1, n1);
      if (sched_cost(st1, n1) < sched_cost(st0, n0)) begin
        st0 = st1;
        n0  = n1;
      end
    end
    for (int s = 0; s < n0; s++) begin
      w = '0;
      k = 0;
      for (int i = 0; i < nb; i++) begin
        if (st0[i] == s) begin
          w[k] = '{op: b_op[i], ksel: b_k[i], src_a: b_a[i], src_b: b_b[i], dst: b_d[i]};
          k = k + 1;
        end
      end
      rom_ctrl[pc]  = '{iop: I_STAGE, target: '0};
      rom_slots[pc] = w;
      pc = pc + 1;
    end
    nb = 0;
  endtask

  task automatic ctl(input iop_t o, input int l);
    flush();
    rom_ctrl[pc]  = '{iop: o, target: (l >= 0) ? lab[l] : '0};
    rom_slots[pc] = '0;
    pc = pc + 1;
  endtask

  task automatic label(input int l);
    flush();
    lab_new[l] = PC_W'(pc);
  endtask

  // --- point formulas, one field operation per line -------------------

  // Jacobian doubling, Q = 2Q (10 multiplications, 13 additions)
  task automatic jac_dbl();
    mul(A_QY, A_QY, t(0));          // Y1^2
    mul(A_QX, t(0), t(1));          // X1 Y1^2
    add(t(1), t(1), t(1));
    add(t(1), t(1), t(1));          // A = 4 X1 Y1^2
    mul(A_QX, A_QX, t(2));          // X1^2
    add(t(2), t(2), t(3));
    add(t(3), t(2), t(3));          // 3 X1^2
    mul(A_QZ, A_QZ, t(4));          // Z1^2
    mul(t(4), t(4), t(5));          // Z1^4
    mul(A_CA, t(5), t(6));          // a4 Z1^4
    add(t(3), t(6), t(3));          // B
    mul(t(3), t(3), t(7));          // B^2
    mul(t(0), t(0), t(8));          // Y1^4
    add(t(8), t(8), t(8));
    add(t(8), t(8), t(8));
    add(t(8), t(8), t(8));          // 8 Y1^4
    mul(A_QY, A_QZ, t(9));
    add(t(9), t(9), A_QZ);          // Z3 = 2 Y1 Z1
    sub(t(7), t(1), A_QX);
    sub(A_QX, t(1), A_QX);          // X3 = B^2 - 2A
    sub(t(1), A_QX, t(10));         // A - X3
    mul(t(3), t(10), t(11));
    sub(t(11), t(8), A_QY);         // Y3 = B(A - X3) - 8 Y1^4
  endtask

  // Jacobian addition, D = S + P (16 multiplications, 7 additions)
  task automatic jac_add(input logic [ADDR_W-1:0] dx, input logic [ADDR_W-1:0] dy,
                         input logic [ADDR_W-1:0] dz, input logic [ADDR_W-1:0] sx,
                         input logic [ADDR_W-1:0] sy, input logic [ADDR_W-1:0] sz);
    mul(sz, sz, t(0));              // Z1^2
    mul(A_PZ, A_PZ, t(1));          // Z2^2
    mul(sx, t(1), t(2));            // A = X1 Z2^2
    mul(A_PX, t(0), t(3));          // B = X2 Z1^2
    mul(sz, t(0), t(4));            // Z1^3
    mul(A_PZ, t(1), t(5));          // Z2^3
    mul(sy, t(5), t(6));            // C = Y1 Z2^3
    mul(A_PY, t(4), t(7));          // D = Y2 Z1^3
    sub(t(3), t(2), t(8));          // E = B - A
    sub(t(7), t(6), t(9));          // F = D - C
    mul(sz, A_PZ, t(10));           // Z1 Z2
    mul(t(8), t(8), t(11));         // E^2
    mul(t(8), t(11), t(12));        // E^3
    mul(t(2), t(11), t(13));        // A E^2
    mul(t(9), t(9), t(14));         // F^2
    mul(t(10), t(8), dz);           // Z3 = Z1 Z2 E
    sub(t(14), t(12), dx);
    sub(dx, t(13), dx);
    sub(dx, t(13), dx);             // X3 = F^2 - E^3 - 2 A E^2
    sub(t(13), dx, t(15));          // A E^2 - X3
    mul(t(9), t(15), t(16));
    mul(t(6), t(12), t(17));        // C E^3
    sub(t(16), t(17), dy);          // Y3
  endtask

  // twisted Edwards doubling, Q = 2Q (8 multiplications, 7 additions)
  task automatic te_dbl();
    add(A_QX, A_QY, t(0));
    mul(t(0), t(0), t(1));          // B = (X1 + Y1)^2
    mul(A_QX, A_QX, t(2));          // C = X1^2
    mul(A_QY, A_QY, t(3));          // D = Y1^2
    mul(A_CA, t(2), t(4));          // E = aC
    add(t(4), t(3), t(5));          // F = E + D
    mul(A_QZ, A_QZ, t(6));          // H = Z1^2
    add(t(6), t(6), t(6));          // 2H
    sub(t(5), t(6), t(7));          // J = F - 2H
    sub(t(1), t(2), t(8));
    sub(t(8), t(3), t(8));          // B - C - D
    mul(t(8), t(7), A_QX);          // X3 = (B - C - D) J
    sub(t(4), t(3), t(9));          // E - D
    mul(t(5), t(9), A_QY);          // Y3 = F (E - D)
    mul(t(5), t(7), A_QZ);          // Z3 = F J
  endtask

  // twisted Edwards addition, Q = Q + P (13 multiplications, 7 additions)
  task automatic te_add();
    mul(A_QZ, A_PZ, t(0));          // A = Z1 Z2
    mul(t(0), t(0), t(1));          // B = A^2
    mul(A_QX, A_PX, t(2));          // C = X1 X2
    mul(A_QY, A_PY, t(3));          // D = Y1 Y2
    add(A_QX, A_QY, t(4));
    add(A_PX, A_PY, t(5));
    mul(t(2), t(3), t(6));          // C D
    mul(A_CD, t(6), t(7));          // E = d C D
    sub(t(1), t(7), t(8));          // F = B - E
    add(t(1), t(7), t(9));          // G = B + E
    mul(t(4), t(5), t(10));
    sub(t(10), t(2), t(10));
    sub(t(10), t(3), t(10));        // (X1+Y1)(X2+Y2) - C - D
    mul(A_CA, t(2), t(11));         // aC
    sub(t(3), t(11), t(12));        // D - aC
    mul(t(0), t(8), t(13));         // A F
    mul(t(13), t(10), A_QX);        // X3
    mul(t(0), t(9), t(14));         // A G
    mul(t(14), t(12), A_QY);        // Y3
    mul(t(8), t(9), A_QZ);          // Z3 = F G
  endtask

  // strongly unified twisted Edwards operation, Q = Q + S
  // (14 multiplications, 4 additions; S may be Q itself)
  task automatic te_uni(input logic [ADDR_W-1:0] sx, input logic [ADDR_W-1:0] sy,
                        input logic [ADDR_W-1:0] sz);
    mul(A_QZ, sz, t(0));            // A = Z1 Z2
    mul(t(0), t(0), t(1));          // B = A^2
    mul(A_QX, sx, t(2));            // X1 X2
    mul(A_CA, t(2), t(3));          // C1 = a X1 X2
    mul(A_QX, sy, t(4));            // C2 = X1 Y2
    mul(A_QY, sy, t(5));            // D1 = Y1 Y2
    mul(sx, A_QY, t(6));            // D2 = X2 Y1
    mul(t(4), t(6), t(7));          // C2 D2
    mul(A_CD, t(7), t(8));          // E = d C2 D2
    sub(t(1), t(8), t(9));          // F = B - E
    add(t(1), t(8), t(10));         // G = B + E
    add(t(4), t(6), t(11));         // C2 + D2
    mul(t(0), t(9), t(12));         // A F
    mul(t(12), t(11), A_QX);        // X3 = A F (C2 + D2)
    sub(t(5), t(3), t(13));         // D1 - C1
    mul(t(0), t(10), t(14));        // A G
    mul(t(14), t(13), A_QY);        // Y3 = A G (D1 - C1)
    mul(t(9), t(10), A_QZ);         // Z3 = F G
  endtask

  task automatic prologue(input int base);
    label(base + L_ENTRY);
    sub(A_ONE, A_ONE, A_ZERO);      // ZERO = 0
    mul(A_PX, A_R2, A_QX);          // Q = P, in Montgomery form
    mul(A_PY, A_R2, A_QY);
    mul(A_PZ, A_R2, A_QZ);
    mul(A_PX, A_R2, A_PX);          // P, a, d into Montgomery form
    mul(A_PY, A_R2, A_PY);
    mul(A_PZ, A_R2, A_PZ);
    mul(A_CA, A_R2, A_CA);
    mul(A_CD, A_R2, A_CD);
    ctl(I_SHIFT, -1);               // leading 1 bit: Q = P already
    ctl(I_BRZ, base + L_END);
    label(base + L_LOOP);
  endtask

  task automatic epilogue(input int base);
    label(base + L_SKIP);
    ctl(I_SHIFT, -1);
    ctl(I_BRZ, base + L_END);
    ctl(I_JMP, base + L_LOOP);
    label(base + L_END);
    mul(A_QX, A_ONE, A_QX);         // Q out of Montgomery form
    mul(A_QY, A_ONE, A_QY);
    mul(A_QZ, A_ONE, A_QZ);
    ctl(I_HALT, -1);
  endtask

  task automatic generate_all();
    pc = 0;
    nb = 0;
    // Double-and-Add
    prologue(4 * ALG_DA);
    jac_dbl();
    ctl(I_BRK0, 4 * ALG_DA + L_SKIP);
    jac_add(A_QX, A_QY, A_QZ, A_QX, A_QY, A_QZ);
    epilogue(4 * ALG_DA);
    // Double-and-Add-Always
    prologue(4 * ALG_DAA);
    jac_dbl();
    jac_add(A_Q1X, A_Q1Y, A_Q1Z, A_QX, A_QY, A_QZ);
    put(ALU_ADD, A_QX, A_ZERO, A_QX, 1'b1);   // Q[0] = Q[k_i]
    put(ALU_ADD, A_QY, A_ZERO, A_QY, 1'b1);
    put(ALU_ADD, A_QZ, A_ZERO, A_QZ, 1'b1);
    epilogue(4 * ALG_DAA);
    // twisted Edwards
    prologue(4 * ALG_TE);
    te_dbl();
    ctl(I_BRK0, 4 * ALG_TE + L_SKIP);
    te_add();
    epilogue(4 * ALG_TE);
    // twisted Edwards, strongly unified
    prologue(4 * ALG_TEU);
    te_uni(A_QX, A_QY, A_QZ);
    ctl(I_BRK0, 4 * ALG_TEU + L_SKIP);
    te_uni(A_PX, A_PY, A_PZ);
    epilogue(4 * ALG_TEU);
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      rom_ctrl[i]  = '{iop: I_HALT, target: '0};
      rom_slots[i] = '0;
    end
    for (int i = 0; i < 16; i++) begin
      lab[i]     = '0;
      lab_new[i] = '0;
    end
    generate_all();                 // pass 1: find the labels
    for (int i = 0; i < 16; i++) lab[i] = lab_new[i];
    generate_all();                 // pass 2: with resolved targets
  end

  // ---------------------------------------------------------------------
  // Read port
  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    ctrl  <= rom_ctrl[addr];
    slots <= rom_slots[addr];
  end

  assign entry = lab[{alg, 2'(L_ENTRY)}];

endmodule

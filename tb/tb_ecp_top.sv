// tb_ecp_top: end-to-end test of the elliptic curve processor.
//
// For each of the four programs (Double-and-Add, Double-and-Add-Always,
// twisted Edwards, strongly unified twisted Edwards) the test builds a curve
// through a random point over the 192-bit prime 2^192 - 2^64 - 1 (choosing
// d, or ignoring B for the Weierstrass curve, so that the point lies on it),
// loads P and the constants through the host port, runs [k]P and checks the
// projective result against an affine big-integer reference:
// X = x Z, Y = y Z (twisted Edwards) or X = x Z^2, Y = y Z^3 (Jacobian).
// Keys are full-length random scalars plus short ones (1, 2, 3, 0b1011...)
// that stop early. The cycle count of every run is checked against a
// prediction made by walking the ROM program with the same key and adding
// the documented per-word cycle costs.
// It also counts how often each mechanism occurred: key normalisation,
// point addition skipped and taken, key-indexed copy with bit 0 and 1,
// stages with every ALU busy and with idle ALUs, and early loop exit; any
// that never happened is a failure.
// This bench leaves every parameter of the top at its default.
module tb_ecp_top;
  import ecp_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned PB        = 192;
  localparam int unsigned KEYBITS   = 192;
  localparam int unsigned NALU      = 4;
  localparam int unsigned PORTS     = 2;
  localparam int          NRAND     = 2;     // random full keys per algorithm

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic [PB-1:0]       modulus;
  logic                host_en = 1'b0, host_we = 1'b0;
  logic [ADDR_W-1:0]   host_addr = '0;
  logic [PB-1:0]       host_wdata = '0;
  logic [PB-1:0]       host_rdata;
  logic                start = 1'b0;
  alg_t                alg = ALG_DA;
  logic [KEYBITS-1:0]  key = '0;
  logic                busy, done;

  ecp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters (observed inside the design) ------
  int n_norm = 0, n_skip = 0, n_take = 0, n_ksel0 = 0, n_ksel1 = 0;
  int n_full = 0, n_part = 0, n_brz = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.state == dut.u_ctrl.S_NORM && !dut.u_ctrl.kbit && dut.u_ctrl.bits_left != 0)
      n_norm++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_DEC) begin
      if (dut.rom_ctrl.iop == I_BRK0) begin
        if (!dut.u_ctrl.kbit) n_skip++; else n_take++;
      end
      if (dut.rom_ctrl.iop == I_BRZ && dut.u_ctrl.bits_left == 0) n_brz++;
    end
    if (dut.u_ctrl.state == dut.u_ctrl.S_EXE) begin
      int busy_slots;
      busy_slots = 0;
      for (int i = 0; i < int'(NALU); i++) begin
        if (dut.u_ctrl.slot_q[i].op != ALU_NOP) busy_slots++;
        if (dut.u_ctrl.slot_q[i].ksel) begin
          if (dut.u_ctrl.kbit) n_ksel1++; else n_ksel0++;
        end
      end
      if (busy_slots == int'(NALU)) n_full++; else n_part++;
    end
  end

  // ---------------- helpers ----------------
  function automatic fe_t rnd_fe();
    fe_t v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v % P192;
  endfunction

  task automatic host_write(input logic [ADDR_W-1:0] a, input fe_t v);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = a; host_wdata = v[PB-1:0];
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input logic [ADDR_W-1:0] a, output fe_t v);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = a;
    @(negedge clk);
    host_en = 0;
    v = fe_t'(host_rdata);
  endtask

  // cycles one ROM word costs (see the controller's timing notes)
  function automatic int word_cycles(input int pc);
    int lat;
    if (dut.u_rom.rom_ctrl[pc].iop != I_STAGE) return 2;
    lat = 0;
    for (int i = 0; i < int'(NALU); i++) begin
      if (dut.u_rom.rom_slots[pc][i].op == ALU_MUL && lat < int'(PB) + 2) lat = PB + 2;
      if ((dut.u_rom.rom_slots[pc][i].op == ALU_ADD || dut.u_rom.rom_slots[pc][i].op == ALU_SUB)
          && lat < 2) lat = 2;
    end
    // fetch+decode, reads, last read data + start, ALU latency + 1, writes
    return 2 + (2 * NALU + PORTS - 1) / PORTS + 2 + (lat + 1) + (NALU + PORTS - 1) / PORTS;
  endfunction

  // predict the run time by walking the program with the key
  function automatic int predict(input alg_t al, input logic [KEYBITS-1:0] k);
    int pc, cyc, bits, guard;
    logic [KEYBITS-1:0] kq;
    kq = k; bits = KEYBITS; cyc = 1;          // idle cycle that takes start
    while (!kq[KEYBITS-1] && bits != 0) begin kq = kq << 1; bits--; cyc++; end
    cyc++;                                    // leave normalisation
    pc = int'(dut.u_rom.lab[{al, 2'd0}]);
    guard = 0;
    while (guard < 10_000_000) begin
      guard++;
      cyc += word_cycles(pc);
      case (dut.u_rom.rom_ctrl[pc].iop)
        I_STAGE: pc++;
        I_SHIFT: begin kq = kq << 1; bits--; pc++; end
        I_BRZ:   pc = (bits == 0) ? int'(dut.u_rom.rom_ctrl[pc].target) : pc + 1;
        I_BRK0:  pc = (!kq[KEYBITS-1]) ? int'(dut.u_rom.rom_ctrl[pc].target) : pc + 1;
        I_JMP:   pc = int'(dut.u_rom.rom_ctrl[pc].target);
        default: return cyc + 1;              // HALT: one more cycle to done
      endcase
    end
    return -1;
  endfunction

  task automatic run_pm(input alg_t al, input logic [KEYBITS-1:0] k);
    fe_t x, y, ca, cd, xr, yr, qx, qy, qz, z2;
    int cyc, exp_cyc;
    x  = rnd_fe();
    y  = rnd_fe();
    ca = rnd_fe();
    if (al == ALG_TE || al == ALG_TEU) begin
      cd = te_d_for(x, y, ca, P192);
      te_smul(fe_t'(k), x, y, ca, cd, P192, xr, yr);
    end else begin
      cd = 0;
      w_smul(fe_t'(k), x, y, ca, P192, xr, yr);
    end
    host_write(A_PX, x);
    host_write(A_PY, y);
    host_write(A_PZ, 1);
    host_write(A_CA, ca);
    host_write(A_CD, cd);
    host_write(A_R2, mont_r2(PB, P192));
    host_write(A_ONE, 1);
    @(negedge clk);
    alg = al; key = k; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    host_read(A_QX, qx);
    host_read(A_QY, qy);
    host_read(A_QZ, qz);
    checks++;
    if (al == ALG_TE || al == ALG_TEU) begin
      if (qz == 0 || qx != mulmod(xr, qz, P192) || qy != mulmod(yr, qz, P192)) begin
        failures++;
        $display("alg %s key %h: wrong point", al.name(), k);
      end
    end else begin
      z2 = mulmod(qz, qz, P192);
      if (qz == 0 || qx != mulmod(xr, z2, P192) || qy != mulmod(yr, mulmod(z2, qz, P192), P192)) begin
        failures++;
        $display("alg %s key %h: wrong point", al.name(), k);
      end
    end
    exp_cyc = predict(al, k);
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("alg %s: %0d cycles, predicted %0d", al.name(), cyc, exp_cyc);
    end
    $display("alg %-8s key bits %3d: %0d cycles", al.name(), $clog2(fe_t'(k) + 1), cyc);
  endtask

  initial begin
    logic [KEYBITS-1:0] k;
    modulus = P192[PB-1:0];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int al = 0; al < 4; al++) begin
      run_pm(alg_t'(al), KEYBITS'(1));
      run_pm(alg_t'(al), KEYBITS'(2));
      run_pm(alg_t'(al), KEYBITS'(3));
      run_pm(alg_t'(al), KEYBITS'(11));
      for (int n = 0; n < NRAND; n++) begin
        for (int i = 0; i < int'(KEYBITS) / 32; i++) k[32*i +: 32] = $urandom;
        k[KEYBITS-1] = 1'b1;
        run_pm(alg_t'(al), k);
      end
    end
    checks++; if (n_norm  == 0) begin failures++; $display("no key normalisation"); end
    checks++; if (n_skip  == 0) begin failures++; $display("no skipped addition"); end
    checks++; if (n_take  == 0) begin failures++; $display("no point addition"); end
    checks++; if (n_ksel0 == 0) begin failures++; $display("no key select with bit 0"); end
    checks++; if (n_ksel1 == 0) begin failures++; $display("no key select with bit 1"); end
    checks++; if (n_full  == 0) begin failures++; $display("no stage with all ALUs busy"); end
    checks++; if (n_part  == 0) begin failures++; $display("no stage with idle ALUs"); end
    checks++; if (n_brz   == 0) begin failures++; $display("no loop exit"); end
    $display("mechanisms: norm=%0d skip=%0d add=%0d ksel0=%0d ksel1=%0d full=%0d part=%0d exit=%0d",
             n_norm, n_skip, n_take, n_ksel0, n_ksel1, n_full, n_part, n_brz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ecp_pm_driver: runs the four point-multiplication programs on one
// processor configuration and checks them (used by tb_ecp_workloads).
//
// Builds a curve through a random point over the 192-bit prime
// 2^192 - 2^64 - 1, loads it, runs [k]P with the given key for each of the
// four programs, checks the projective result against an affine
// big-integer reference and the cycle count against a prediction made by
// walking the ROM program, and prints the cycle count. It also counts the
// multiplications the ALUs start and the stages that hold at least one, and
// prints the ALU efficiency: multiplications / (multiplication stages x
// ALUs), checked against the same ROM walk. Reports its checks and
// failures on ports and raises fin when all runs are over.
module ecp_pm_driver
  import ecp_pkg::*;
  import ecc_ref_pkg::*;
#(
  parameter int unsigned NALU      = 1,
  parameter bit          DUAL_PORT = 1'b1,
  parameter logic [191:0] KEY      = '1
) (
  output int   n_checks,
  output int   n_failures,
  output logic fin
);
  localparam int unsigned PB      = 192;
  localparam int unsigned KEYBITS = 192;
  localparam int unsigned PORTS   = DUAL_PORT ? 2 : 1;

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

  ecp_top #(.PB(PB), .KEYBITS(KEYBITS), .NALU(NALU), .DUAL_PORT(DUAL_PORT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // multiplications started and stages that contain one, in the current run
  int mul_ops = 0, mul_stages = 0;
  always @(posedge clk) begin
    if (dut.alu_start) begin
      int n;
      n = 0;
      for (int i = 0; i < int'(NALU); i++) if (dut.alu_op[i] == ALU_MUL) n++;
      mul_ops += n;
      if (n > 0) mul_stages++;
    end
  end

  assign n_checks = checks;
  assign n_failures = failures;

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
  function automatic int predict(input alg_t al, input logic [KEYBITS-1:0] k,
                                 output int pm, output int ps);
    int pc, cyc, bits, guard, n;
    logic [KEYBITS-1:0] kq;
    kq = k; bits = KEYBITS; cyc = 1;          // idle cycle that takes start
    while (!kq[KEYBITS-1] && bits != 0) begin kq = kq << 1; bits--; cyc++; end
    cyc++;                                    // leave normalisation
    pc = int'(dut.u_rom.lab[{al, 2'd0}]);
    guard = 0;
    pm = 0;
    ps = 0;
    while (guard < 10_000_000) begin
      guard++;
      cyc += word_cycles(pc);
      case (dut.u_rom.rom_ctrl[pc].iop)
        I_STAGE: begin
          n = 0;
          for (int i = 0; i < int'(NALU); i++)
            if (dut.u_rom.rom_slots[pc][i].op == ALU_MUL) n++;
          pm += n;
          if (n > 0) ps++;
          pc++;
        end
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
    int cyc, exp_cyc, exp_pm, exp_ps;
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
    mul_ops = 0; mul_stages = 0;
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
    exp_cyc = predict(al, k, exp_pm, exp_ps);
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("alg %s: %0d cycles, predicted %0d", al.name(), cyc, exp_cyc);
    end
    checks++;
    if (mul_ops != exp_pm || mul_stages != exp_ps || mul_ops > mul_stages * int'(NALU)
        || (NALU == 1 && mul_ops != mul_stages)) begin
      failures++;
      $display("alg %s: %0d multiplications in %0d stages, predicted %0d in %0d",
               al.name(), mul_ops, mul_stages, exp_pm, exp_ps);
    end
    $display("NALU=%0d ports=%0d alg %-8s: %0d cycles, %0d multiplications in %0d stages, efficiency %0.3f",
             NALU, PORTS, al.name(), cyc, mul_ops, mul_stages,
             real'(mul_ops) / real'(mul_stages * int'(NALU)));
  endtask

  initial begin
    fin = 1'b0;
    modulus = P192[PB-1:0];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int al = 0; al < 4; al++) run_pm(alg_t'(al), KEY);
    $display("NALU=%0d DUAL_PORT=%0d done", NALU, DUAL_PORT);
    fin = 1'b1;
  end
endmodule

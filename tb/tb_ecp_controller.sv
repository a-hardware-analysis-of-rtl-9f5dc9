// tb_ecp_controller: checks the microcode sequencer on its own.
//
// The controller (3 ALUs, single-port RAM mode) runs a small hand-assembled
// program from a ROM model in this bench, against the real RAM and
// behavioural ALUs with fixed latencies (2 cycles add/sub, pb + 2 multiply)
// whose results come from big-integer arithmetic. The program exercises
// parallel slots, an idle slot, read-before-write inside one stage, the
// key-indexed operand select with key bit 1 and 0, SHIFT, BRZ, BRK0 and JMP.
// After each run the RAM is compared with values worked out here, and the
// cycle count with the per-word costs: 2 for a control word, and for a stage
// 2 + 2N reads + 2 + (latency + 1) + N writes in single-port mode.
module tb_ecp_controller;
  import ecp_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned PB   = 192;
  localparam int unsigned KB   = 8;
  localparam int unsigned N    = 3;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 start = 1'b0;
  logic [KB-1:0]        key = '0;
  logic                 busy, done;
  logic [PC_W-1:0]      rom_addr;
  ctrl_t                rom_ctrl;
  slot_t [N-1:0]        rom_slots;
  logic [PC_W-1:0]      rom_entry;
  logic                 ram_en_a, ram_we_a, ram_en_b, ram_we_b;
  logic [ADDR_W-1:0]    ram_addr_a, ram_addr_b;
  logic [PB-1:0]        ram_wdata_a, ram_rdata_a, ram_wdata_b, ram_rdata_b;
  logic                 alu_start;
  alu_op_t [N-1:0]      alu_op;
  logic [N-1:0][PB-1:0] alu_a, alu_b, alu_y;
  logic [N-1:0]         alu_done;

  ecp_controller #(.PB(PB), .KEYBITS(KB), .NALU(N), .DUAL_PORT(1'b0)) dut (.*);

  ecp_ram #(.W(PB), .ADDR_W(ADDR_W)) ram (
    .clk(clk), .en_a(ram_en_a), .we_a(ram_we_a), .addr_a(ram_addr_a), .wdata_a(ram_wdata_a),
    .rdata_a(ram_rdata_a), .en_b(ram_en_b), .we_b(ram_we_b), .addr_b(ram_addr_b),
    .wdata_b(ram_wdata_b), .rdata_b(ram_rdata_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- ROM model: hand-assembled test program ----
  ctrl_t         pctl [16];
  slot_t [N-1:0] pslt [16];

  function automatic slot_t sl(input alu_op_t o, input int a, input int b, input int d,
                               input logic k);
    return '{op: o, ksel: k, src_a: ADDR_W'(a), src_b: ADDR_W'(b), dst: ADDR_W'(d)};
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin pctl[i] = '{iop: I_HALT, target: '0}; pslt[i] = '0; end
    pctl[0] = '{iop: I_STAGE, target: '0};
    pslt[0] = {sl(ALU_SUB, 2, 1, 5, 0), sl(ALU_MUL, 1, 2, 4, 0), sl(ALU_ADD, 1, 2, 3, 0)};
    pctl[1] = '{iop: I_STAGE, target: '0};   // slot 0 reads word 3 and overwrites it
    pslt[1] = {sl(ALU_MUL, 3, 4, 6, 0), sl(ALU_ADD, 12, 13, 14, 1), sl(ALU_ADD, 3, 3, 3, 0)};
    pctl[2] = '{iop: I_SHIFT, target: '0};
    pctl[3] = '{iop: I_BRZ,  target: 9'd8};
    pctl[4] = '{iop: I_BRK0, target: 9'd6};
    pctl[5] = '{iop: I_STAGE, target: '0};   // count one bits: w7 += w1
    pslt[5] = {slot_t'('0), slot_t'('0), sl(ALU_ADD, 7, 1, 7, 0)};
    pctl[6] = '{iop: I_STAGE, target: '0};   // count iterations: w9 += w1
    pslt[6] = {slot_t'('0), sl(ALU_ADD, 9, 1, 9, 0), slot_t'('0)};
    pctl[7] = '{iop: I_JMP, target: 9'd2};
    pctl[8] = '{iop: I_STAGE, target: '0};   // key shifted out: bit 0 selects word 10
    pslt[8] = {slot_t'('0), slot_t'('0), sl(ALU_ADD, 10, 0, 11, 1)};
    pctl[9] = '{iop: I_HALT, target: '0};
  end

  assign rom_entry = '0;
  always_ff @(posedge clk) begin
    rom_ctrl  <= pctl[rom_addr[3:0]];
    rom_slots <= pslt[rom_addr[3:0]];
  end

  // ---- behavioural ALUs ----
  fe_t rinv;
  for (genvar i = 0; i < int'(N); i++) begin : g_alu
    int      cnt = 0;
    alu_op_t op_q = ALU_NOP;
    fe_t     a_q, b_q;
    always @(posedge clk) begin
      alu_done[i] <= 1'b0;
      if (alu_start && alu_op[i] != ALU_NOP) begin
        op_q <= alu_op[i];
        a_q  <= fe_t'(alu_a[i]);
        b_q  <= fe_t'(alu_b[i]);
        cnt  <= (alu_op[i] == ALU_MUL) ? PB + 2 : 2;
      end else if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) begin
          alu_done[i] <= 1'b1;
          case (op_q)
            ALU_ADD: alu_y[i] <= addmod(a_q, b_q, P192)[PB-1:0];
            ALU_SUB: alu_y[i] <= submod(a_q, b_q, P192)[PB-1:0];
            default: alu_y[i] <= mulmod(mulmod(a_q, b_q, P192), rinv, P192)[PB-1:0];
          endcase
        end
      end
    end
  end

  function automatic fe_t rnd_fe();
    fe_t v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v % P192;
  endfunction

  localparam int ST_ADD = 2 + 2 * N + 2 + 3 + N;         // stage of add/sub only
  localparam int ST_MUL = 2 + 2 * N + 2 + PB + 3 + N;    // stage with a multiply

  task automatic run(input logic [KB-1:0] k);
    fe_t w [2**ADDR_W];
    fe_t e3, e7, e9;
    int bits, ones, cyc, exp_cyc;
    for (int i = 0; i < 2**ADDR_W; i++) begin w[i] = rnd_fe(); ram.mem[i] = w[i][PB-1:0]; end
    // leading one dropped, then ones among the remaining bits
    bits = KB;
    while (bits > 0 && !k[bits-1]) bits--;
    ones = 0;
    for (int i = 0; i < bits - 1; i++) if (k[i]) ones++;
    @(negedge clk);
    key = k; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; if (cyc > 100000) break; end
    // expected contents
    e3 = addmod(w[1], w[2], P192);
    checks++;
    if (fe_t'(ram.mem[4]) != mulmod(mulmod(w[1], w[2], P192), rinv, P192)
        || fe_t'(ram.mem[5]) != submod(w[2], w[1], P192)
        || fe_t'(ram.mem[3]) != addmod(e3, e3, P192)
        || fe_t'(ram.mem[6]) != mulmod(mulmod(e3, fe_t'(ram.mem[4]), P192), rinv, P192)) begin
      failures++; $display("key %b: stage results wrong", k);
    end
    checks++;
    if (fe_t'(ram.mem[14]) != addmod(w[12 + 32], w[13], P192)) begin
      failures++; $display("key %b: key select with bit 1 wrong", k);
    end
    checks++;
    if (fe_t'(ram.mem[11]) != addmod(w[10], w[0], P192)) begin
      failures++; $display("key %b: key select with bit 0 wrong", k);
    end
    e7 = w[7];
    e9 = w[9];
    for (int i = 0; i < ones; i++) e7 = addmod(e7, w[1], P192);
    for (int i = 0; i < bits - 1; i++) e9 = addmod(e9, w[1], P192);
    checks++;
    if (fe_t'(ram.mem[7]) != e7 || fe_t'(ram.mem[9]) != e9) begin
      failures++; $display("key %b: branch counts wrong", k);
    end
    // cycles: start + normalisation + words
    exp_cyc = 1 + (KB - bits) + 1 + 2 * ST_MUL + ST_ADD + 1 + 2;   // 0,1,8, halt, done
    exp_cyc += bits * (2 + 2);                                       // SHIFT + BRZ each pass
    exp_cyc += (bits - 1) * (2 + ST_ADD + 2);                        // BRK0, w9 stage, JMP
    exp_cyc += ones * ST_ADD;                                        // w7 stage
    checks++;
    if (cyc != exp_cyc) begin
      failures++; $display("key %b: %0d cycles, expected %0d", k, cyc, exp_cyc);
    end
  endtask

  initial begin
    rinv = invmod(modw(512'b1 << (PB + 2), P192), P192);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8'b0000_0001);
    run(8'b1000_0000);
    run(8'b1111_1111);
    run(8'b0010_1101);
    for (int i = 0; i < 8; i++) run(KB'($urandom_range(1, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

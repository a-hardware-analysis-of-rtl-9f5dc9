// tb_gfp_alu: self-checking test of the GF(p) field ALU.
//
// Runs random and edge-case additions, subtractions and Montgomery
// multiplications over the 192-bit prime 2^192 - 2^64 - 1. Results are
// checked against big-integer arithmetic: for a Montgomery product r the
// test checks r < p and r * 2^(pb+2) = a * b (mod p). The latency from the
// start cycle to done is checked: 2 cycles for add/sub, pb + 2 for multiply.
module tb_gfp_alu;
  import ecp_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned PB = 192;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  alu_op_t       op = ALU_NOP;
  logic [PB-1:0] a = '0, b = '0, p;
  logic [PB-1:0] y;
  logic          busy, done;

  int checks = 0, failures = 0;

  gfp_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fe_t rnd_fe();
    fe_t v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v % P192;
  endfunction

  task automatic run(input alu_op_t o, input fe_t x, input fe_t z);
    int cyc;
    fe_t exp_v, got;
    @(negedge clk);
    op = o; a = x[PB-1:0]; b = z[PB-1:0]; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;   // edges after the one that sampled start
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 1000) break;
    end
    got = fe_t'(y);
    checks++;
    case (o)
      ALU_ADD: exp_v = addmod(x, z, P192);
      ALU_SUB: exp_v = submod(x, z, P192);
      default: exp_v = 0;
    endcase
    if (o == ALU_MUL) begin
      if (got >= P192 || modw({256'b0, got} << (PB + 2), P192) != mulmod(x, z, P192)) begin
        failures++;
        $display("MUL mismatch a=%h b=%h y=%h", x, z, got);
      end
    end else if (got != exp_v) begin
      failures++;
      $display("%s mismatch a=%h b=%h y=%h exp=%h", o.name(), x, z, got, exp_v);
    end
    checks++;
    if (cyc != ((o == ALU_MUL) ? PB + 2 : 2)) begin
      failures++;
      $display("%s latency %0d", o.name(), cyc);
    end
  endtask

  initial begin
    p = P192[PB-1:0];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // edge cases
    run(ALU_ADD, P192 - 1, P192 - 1);
    run(ALU_ADD, P192 - 1, 1);
    run(ALU_ADD, 0, 0);
    run(ALU_SUB, 0, P192 - 1);
    run(ALU_SUB, 5, 5);
    run(ALU_SUB, 3, 7);
    run(ALU_MUL, P192 - 1, P192 - 1);
    run(ALU_MUL, 0, P192 - 1);
    run(ALU_MUL, 1, 1);
    run(ALU_MUL, mont_r2(PB, P192), 1);
    for (int i = 0; i < 200; i++) begin
      run(ALU_ADD, rnd_fe(), rnd_fe());
      run(ALU_SUB, rnd_fe(), rnd_fe());
      run(ALU_MUL, rnd_fe(), rnd_fe());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ecp_ram: self-checking test of the dual-port operand RAM.
//
// Random reads and writes on both ports against a reference array: checks
// the one-cycle read latency, read-before-write on a port, simultaneous
// access from both ports and port A's priority when both write one word.
module tb_ecp_ram;
  localparam int unsigned W = 192;
  localparam int unsigned AW = 6;

  logic          clk = 1'b0;
  logic          en_a = 0, we_a = 0, en_b = 0, we_b = 0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic [W-1:0]  wdata_a = '0, wdata_b = '0, rdata_a, rdata_b;

  logic [W-1:0]  ref_mem [2**AW];
  int checks = 0, failures = 0;

  ecp_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    logic [W-1:0] exp_a, exp_b;
    logic         chk_a, chk_b;
    // fill through both ports
    for (int i = 0; i < 2**AW; i += 2) begin
      @(negedge clk);
      en_a = 1; we_a = 1; addr_a = AW'(i);     wdata_a = rnd();
      en_b = 1; we_b = 1; addr_b = AW'(i + 1); wdata_b = rnd();
      ref_mem[i] = wdata_a;
      ref_mem[i + 1] = wdata_b;
    end
    chk_a = 0; chk_b = 0; exp_a = '0; exp_b = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (chk_a) begin
        checks++;
        if (rdata_a !== exp_a) begin failures++; $display("port A mismatch"); end
      end
      if (chk_b) begin
        checks++;
        if (rdata_b !== exp_b) begin failures++; $display("port B mismatch"); end
      end
      en_a = $urandom_range(0, 3) != 0;
      en_b = $urandom_range(0, 3) != 0;
      we_a = $urandom_range(0, 1);
      we_b = $urandom_range(0, 1);
      addr_a = AW'($urandom_range(0, 2**AW - 1));
      addr_b = ($urandom_range(0, 7) == 0) ? addr_a : AW'($urandom_range(0, 2**AW - 1));
      wdata_a = rnd();
      wdata_b = rnd();
      chk_a = en_a;
      chk_b = en_b;
      exp_a = ref_mem[addr_a];     // read-before-write
      exp_b = ref_mem[addr_b];
      if (en_b && we_b) ref_mem[addr_b] = wdata_b;
      if (en_a && we_a) ref_mem[addr_a] = wdata_a;   // port A wins
    end
    @(negedge clk);
    en_a = 0; en_b = 0;
    // final sweep
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      en_a = 1; we_a = 0; addr_a = AW'(i);
      @(negedge clk);
      en_a = 0;
      checks++;
      if (rdata_a !== ref_mem[i]) begin failures++; $display("sweep mismatch %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

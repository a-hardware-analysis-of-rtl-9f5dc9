// ecp_top: reconfigurable elliptic curve processor over GF(p).
//
// Computes Q = [k]P with one of four algorithms held in the microcode ROM:
// Double-and-Add and Double-and-Add-Always on a Weierstrass curve in
// Jacobian coordinates, and twisted Edwards with separate or strongly
// unified point formulas. A controller runs the program, NALU field ALUs
// (modular add, subtract, Montgomery multiply) work in parallel, and a
// dual-port RAM holds every operand and result. The circuit is the same for
// all algorithms; only the ROM program differs.
//
// Use: while busy is low the host owns RAM port A (host_en / host_we /
// host_addr / host_wdata, read data on host_rdata one cycle later). It
// writes P = (X, Y, Z) to words 0..2, a to 6, d to 7 (any value for the
// Weierstrass programs), 2^(2(PB+2)) mod p to 8 and 1 to 9, all as plain
// integers below p. modulus must hold the odd prime p throughout. A pulse on
// start with alg and a non-zero key runs the program; done pulses when
// Q = [k]P is in words 3..5 (plain integers, projective: X/Z, Y/Z for
// twisted Edwards, X/Z^2, Y/Z^3 for Jacobian). Words 0..2, 6 and 7 are left
// in Montgomery form. No result is converted to affine form.
//
// Parameters default to the evaluated configuration: 192-bit field and key,
// four ALUs, dual-port RAM.
module ecp_top
  import ecp_pkg::*;
#(
  parameter int unsigned PB        = 192,
  parameter int unsigned KEYBITS   = 192,
  parameter int unsigned NALU      = 4,
  parameter bit          DUAL_PORT = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PB-1:0]       modulus,
  // host RAM access (while idle)
  input  logic                host_en,
  input  logic                host_we,
  input  logic [ADDR_W-1:0]   host_addr,
  input  logic [PB-1:0]       host_wdata,
  output logic [PB-1:0]       host_rdata,
  // command
  input  logic                start,
  input  alg_t                alg,
  input  logic [KEYBITS-1:0]  key,
  output logic                busy,
  output logic                done
);

  // controller <-> ROM
  logic [PC_W-1:0]  rom_addr, rom_entry;
  ctrl_t            rom_ctrl;
  slot_t [NALU-1:0] rom_slots;

  // controller <-> RAM
  logic              c_en_a, c_we_a, c_en_b, c_we_b;
  logic [ADDR_W-1:0] c_addr_a, c_addr_b;
  logic [PB-1:0]     c_wdata_a, c_wdata_b;
  logic              r_en_a, r_we_a;
  logic [ADDR_W-1:0] r_addr_a;
  logic [PB-1:0]     r_wdata_a, rdata_a, rdata_b;

  // controller <-> ALUs
  logic                   alu_start;
  alu_op_t [NALU-1:0]     alu_op;
  logic [NALU-1:0][PB-1:0] alu_a, alu_b, alu_y;
  logic [NALU-1:0]        alu_done, alu_busy;

  ecp_rom #(.NALU(NALU)) u_rom (
    .clk   (clk),
    .addr  (rom_addr),
    .ctrl  (rom_ctrl),
    .slots (rom_slots),
    .alg   (alg),
    .entry (rom_entry)
  );

  ecp_controller #(
    .PB(PB), .KEYBITS(KEYBITS), .NALU(NALU), .DUAL_PORT(DUAL_PORT)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .key         (key),
    .busy        (busy),
    .done        (done),
    .rom_addr    (rom_addr),
    .rom_ctrl    (rom_ctrl),
    .rom_slots   (rom_slots),
    .rom_entry   (rom_entry),
    .ram_en_a    (c_en_a),
    .ram_we_a    (c_we_a),
    .ram_addr_a  (c_addr_a),
    .ram_wdata_a (c_wdata_a),
    .ram_rdata_a (rdata_a),
    .ram_en_b    (c_en_b),
    .ram_we_b    (c_we_b),
    .ram_addr_b  (c_addr_b),
    .ram_wdata_b (c_wdata_b),
    .ram_rdata_b (rdata_b),
    .alu_start   (alu_start),
    .alu_op      (alu_op),
    .alu_a       (alu_a),
    .alu_b       (alu_b),
    .alu_y       (alu_y),
    .alu_done    (alu_done)
  );

  // host owns port A while the controller is idle
  always_comb begin
    if (busy) begin
      r_en_a    = c_en_a;
      r_we_a    = c_we_a;
      r_addr_a  = c_addr_a;
      r_wdata_a = c_wdata_a;
    end else begin
      r_en_a    = host_en;
      r_we_a    = host_en && host_we;
      r_addr_a  = host_addr;
      r_wdata_a = host_wdata;
    end
  end
  assign host_rdata = rdata_a;

  ecp_ram #(.W(PB), .ADDR_W(ADDR_W)) u_ram (
    .clk     (clk),
    .en_a    (r_en_a),
    .we_a    (r_we_a),
    .addr_a  (r_addr_a),
    .wdata_a (r_wdata_a),
    .rdata_a (rdata_a),
    .en_b    (c_en_b),
    .we_b    (c_we_b),
    .addr_b  (c_addr_b),
    .wdata_b (c_wdata_b),
    .rdata_b (rdata_b)
  );

  for (genvar i = 0; i < int'(NALU); i++) begin : g_alu
    gfp_alu #(.PB(PB)) u_alu (
      .clk   (clk),
      .rst_n (rst_n),
      .start (alu_start),
      .op    (alu_op[i]),
      .a     (alu_a[i]),
      .b     (alu_b[i]),
      .p     (modulus),
      .y     (alu_y[i]),
      .busy  (alu_busy[i]),
      .done  (alu_done[i])
    );
  end

endmodule

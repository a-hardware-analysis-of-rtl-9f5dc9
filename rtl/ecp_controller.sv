// ecp_controller: microcode sequencer of the elliptic curve processor.
//
// Steps through the instruction ROM one word at a time. A stage word names
// up to NALU field operations; the controller fetches their operands from
// the RAM (two words per cycle in dual-port mode, one in single-port mode),
// starts all ALUs together, waits until every busy ALU has signalled done
// and writes the results back (again two or one per cycle). The other words
// walk the scalar k: SHIFT moves to the next key bit, BRZ branches when no
// bits are left, BRK0 branches when the current bit is 0, JMP and HALT.
// A slot marked ksel reads its first operand from srcA + KOFF when the key
// bit is 1; Double-and-Add-Always uses this for Q[0] = Q[k_i] without a
// branch.
//
// On start the key is loaded and shifted left until its top bit is 1 (the
// leading one is implicit in Q = P); the remaining bit count is kept in
// bits_left. The key must be non-zero.
//
// Timing per stage word: 1 fetch + 1 decode cycle, N (dual) or 2N (single)
// read cycles plus one for the last read data, 1 start cycle, the slowest
// ALU (pb + 2 for a multiplication, 2 for add/sub) plus 1, and ceil(N/2)
// (dual) or N (single) write cycles. Control words take 2 cycles.
// The document describes the controller as an FSM fed by a ROM with mode
// bits for the ALUs; the stage protocol, the key handling and the cycle
// split are this design's choices.
module ecp_controller
  import ecp_pkg::*;
#(
  parameter int unsigned PB        = 192,   // field size in bits
  parameter int unsigned KEYBITS   = 192,   // scalar length
  parameter int unsigned NALU      = 4,     // ALUs in parallel
  parameter bit          DUAL_PORT = 1'b1   // use both RAM ports
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // command
  input  logic                  start,
  input  logic [KEYBITS-1:0]    key,
  output logic                  busy,
  output logic                  done,
  // microcode ROM
  output logic [PC_W-1:0]       rom_addr,
  input  ctrl_t                 rom_ctrl,
  input  slot_t [NALU-1:0]      rom_slots,
  input  logic [PC_W-1:0]       rom_entry,
  // RAM port A
  output logic                  ram_en_a,
  output logic                  ram_we_a,
  output logic [ADDR_W-1:0]     ram_addr_a,
  output logic [PB-1:0]         ram_wdata_a,
  input  logic [PB-1:0]         ram_rdata_a,
  // RAM port B
  output logic                  ram_en_b,
  output logic                  ram_we_b,
  output logic [ADDR_W-1:0]     ram_addr_b,
  output logic [PB-1:0]         ram_wdata_b,
  input  logic [PB-1:0]         ram_rdata_b,
  // ALUs
  output logic                  alu_start,
  output alu_op_t [NALU-1:0]    alu_op,
  output logic [NALU-1:0][PB-1:0] alu_a,
  output logic [NALU-1:0][PB-1:0] alu_b,
  input  logic [NALU-1:0][PB-1:0] alu_y,
  input  logic [NALU-1:0]       alu_done
);

  localparam int unsigned NOPND = 2 * NALU;              // operands per stage
  localparam int unsigned PORTS = DUAL_PORT ? 2 : 1;
  localparam int unsigned IW    = $clog2(NOPND + 2);
  localparam int unsigned BW    = $clog2(KEYBITS + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_NORM, S_FETCH, S_DEC, S_RD, S_RDW, S_EXE, S_WAIT, S_WR, S_DONE
  } state_t;

  state_t               state;
  logic [PC_W-1:0]      pc;
  logic [KEYBITS-1:0]   key_q;
  logic [BW-1:0]        bits_left;
  slot_t [NALU-1:0]     slot_q;
  logic [IW-1:0]        idx;          // next operand / slot to read / write
  logic                 cap0_v, cap1_v;
  logic [IW-1:0]        cap0_i, cap1_i;
  logic [NOPND-1:0][PB-1:0] opnd;     // operand j: slot j/2, A (even) or B (odd)
  logic [NALU-1:0]      done_seen;

  logic kbit;
  assign kbit = key_q[KEYBITS-1];

  // RAM address of operand j of the latched stage
  function automatic logic [ADDR_W-1:0] opnd_addr(input int unsigned j);
    slot_t s;
    s = slot_q[j / 2];
    if (j % 2 == 1) return s.src_b;
    return (s.ksel && kbit) ? s.src_a + KOFF : s.src_a;
  endfunction

  // RAM port drive
  always_comb begin
    ram_en_a    = 1'b0;
    ram_we_a    = 1'b0;
    ram_addr_a  = '0;
    ram_wdata_a = '0;
    ram_en_b    = 1'b0;
    ram_we_b    = 1'b0;
    ram_addr_b  = '0;
    ram_wdata_b = '0;
    if (state == S_RD) begin
      ram_en_a   = 1'b1;
      ram_addr_a = opnd_addr(int'(idx));
      if (DUAL_PORT) begin
        ram_en_b   = 1'b1;
        ram_addr_b = opnd_addr(int'(idx) + 1);
      end
    end else if (state == S_WR) begin
      ram_en_a    = 1'b1;
      ram_we_a    = slot_q[idx].op != ALU_NOP;
      ram_addr_a  = slot_q[idx].dst;
      ram_wdata_a = alu_y[idx];
      if (DUAL_PORT && int'(idx) + 1 < int'(NALU)) begin
        ram_en_b    = 1'b1;
        ram_we_b    = slot_q[int'(idx) + 1].op != ALU_NOP;
        ram_addr_b  = slot_q[int'(idx) + 1].dst;
        ram_wdata_b = alu_y[int'(idx) + 1];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NALU); i++) begin
      alu_op[i] = slot_q[i].op;
      alu_a[i]  = opnd[2 * i];
      alu_b[i]  = opnd[2 * i + 1];
    end
  end

  assign rom_addr  = pc;
  assign alu_start = (state == S_EXE);
  assign busy      = (state != S_IDLE);

  logic [NALU-1:0] slot_idle;
  always_comb
    for (int i = 0; i < int'(NALU); i++) slot_idle[i] = (slot_q[i].op == ALU_NOP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pc        <= '0;
      key_q     <= '0;
      bits_left <= '0;
      slot_q    <= '0;
      idx       <= '0;
      cap0_v    <= 1'b0;
      cap1_v    <= 1'b0;
      cap0_i    <= '0;
      cap1_i    <= '0;
      opnd      <= '0;
      done_seen <= '0;
      done      <= 1'b0;
    end else begin
      done   <= 1'b0;
      cap0_v <= 1'b0;
      cap1_v <= 1'b0;
      // read data arrives one cycle after the address
      if (cap0_v) opnd[cap0_i] <= ram_rdata_a;
      if (cap1_v) opnd[cap1_i] <= ram_rdata_b;

      case (state)
        S_IDLE: begin
          if (start) begin
            key_q     <= key;
            bits_left <= BW'(KEYBITS);
            pc        <= rom_entry;
            state     <= S_NORM;
          end
        end
        S_NORM: begin
          if (!kbit && bits_left != 0) begin
            key_q     <= key_q << 1;
            bits_left <= bits_left - 1'b1;
          end else begin
            state <= S_FETCH;
          end
        end
        S_FETCH: state <= S_DEC;
        S_DEC: begin
          slot_q <= rom_slots;
          state  <= S_FETCH;
          case (rom_ctrl.iop)
            I_STAGE: begin
              idx   <= '0;
              state <= S_RD;
            end
            I_SHIFT: begin
              key_q     <= key_q << 1;
              bits_left <= bits_left - 1'b1;
              pc        <= pc + 1'b1;
            end
            I_BRZ:  pc <= (bits_left == 0) ? rom_ctrl.target : pc + 1'b1;
            I_BRK0: pc <= (!kbit) ? rom_ctrl.target : pc + 1'b1;
            I_JMP:  pc <= rom_ctrl.target;
            default: state <= S_DONE;   // I_HALT
          endcase
        end
        S_RD: begin
          cap0_v <= 1'b1;
          cap0_i <= idx;
          if (DUAL_PORT) begin
            cap1_v <= 1'b1;
            cap1_i <= idx + 1'b1;
          end
          idx <= idx + IW'(PORTS);
          if (int'(idx) + int'(PORTS) >= int'(NOPND)) state <= S_RDW;
        end
        S_RDW: begin
          done_seen <= slot_idle;
          state     <= S_EXE;
        end
        S_EXE: state <= S_WAIT;
        S_WAIT: begin
          done_seen <= done_seen | alu_done;
          if (&(done_seen | alu_done)) begin
            idx   <= '0;
            state <= S_WR;
          end
        end
        S_WR: begin
          idx <= idx + IW'(PORTS);
          if (int'(idx) + int'(PORTS) >= int'(NALU)) begin
            pc    <= pc + 1'b1;
            state <= S_FETCH;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A stage never starts while an ALU is still working on the last one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_WR) |-> (alu_done == '0));

endmodule

// gfp_alu: GF(p) field operation unit (modular add, subtract, Montgomery multiply).
//
// The mode input selects the operation; operands are latched on the start
// cycle and the result is held in y until the next start.
//
//  ADD: the first adder forms a + b, the second adds the bitwise inverse of p
//       with carry-in 1 (i.e. subtracts p). The carry out of the second adder
//       picks the result: set means a + b >= p and the second sum is taken.
//  SUB: a plus the inverse of b with carry-in 1; when the carry out is low
//       (a < b) the modulus is added back.
//  MUL: bit-serial Montgomery multiplication. Each cycle adds b_i * A to the
//       running value, adds p when the sum is odd, and halves it. pb + 2
//       iterations (bits of B above pb-1 are zero) give R = A*B*2^-(pb+2)
//       mod p in the range [0, 2p); one compare-and-subtract folds it into
//       [0, p) on the way into y.
//
// Timing: ADD and SUB raise done 2 clock cycles after the start cycle, MUL
// pb + 2 cycles after it, as in the design's cycle counts. done is a one-cycle
// pulse; busy is high from the cycle after start until done.
// A start while busy is not allowed (checked by an assertion).
// Operands must already be reduced (less than p); p must be odd and below
// 2^PB. The final subtraction of the Montgomery result and the register
// split of ADD/SUB over two cycles are this design's choices.
module gfp_alu
  import ecp_pkg::*;
#(
  parameter int unsigned PB = 192            // field size in bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  alu_op_t       op,
  input  logic [PB-1:0] a,
  input  logic [PB-1:0] b,
  input  logic [PB-1:0] p,
  output logic [PB-1:0] y,
  output logic          busy,
  output logic          done
);

  localparam int unsigned NIT = PB + 2;           // Montgomery iterations
  localparam int unsigned CW  = $clog2(NIT + 1);

  typedef enum logic [1:0] {S_IDLE, S_ADD1, S_ADD2, S_MUL} state_t;

  state_t          state;
  alu_op_t         op_q;
  logic [PB-1:0]   a_q;        // A operand
  logic [PB+1:0]   b_sh;       // B shift register (two zero bits on top)
  logic [PB+2:0]   r_q;        // Montgomery accumulator, < 2p
  logic [CW-1:0]   cnt;
  logic [PB:0]     s1_q;       // first adder result incl. carry
  logic [PB+1:0]   s2_q;       // second adder result incl. carry

  // Adders for ADD / SUB (first cycle). The carry out is the top bit.
  logic [PB:0]   add1, sub1;
  logic [PB+1:0] add2, sub2;
  always_comb begin
    add1 = {1'b0, a_q} + {1'b0, b_sh[PB-1:0]};
    // (a+b) + ~p + 1 over PB+1 bits: carry out set when a + b >= p
    add2 = {1'b0, add1} + {2'b01, ~p} + {{(PB+1){1'b0}}, 1'b1};
    // a + ~b + 1: carry out set when a >= b
    sub1 = {1'b0, a_q} + {1'b0, ~b_sh[PB-1:0]} + {{PB{1'b0}}, 1'b1};
    sub2 = {2'b00, sub1[PB-1:0]} + {2'b00, p};
  end

  // One Montgomery iteration.
  logic [PB+2:0] m_sum, m_next, m_red;
  always_comb begin
    m_sum  = r_q + (b_sh[0] ? {3'b000, a_q} : '0);
    m_next = (m_sum + (m_sum[0] ? {3'b000, p} : '0)) >> 1;
    m_red  = (m_next >= {3'b000, p}) ? m_next - {3'b000, p} : m_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= ALU_NOP;
      a_q   <= '0;
      b_sh  <= '0;
      r_q   <= '0;
      cnt   <= '0;
      s1_q  <= '0;
      s2_q  <= '0;
      y     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start && op != ALU_NOP) begin
            op_q  <= op;
            a_q   <= a;
            b_sh  <= {2'b00, b};
            r_q   <= '0;
            cnt   <= '0;
            state <= (op == ALU_MUL) ? S_MUL : S_ADD1;
          end
        end
        S_ADD1: begin
          if (op_q == ALU_ADD) begin
            s1_q <= add1;
            s2_q <= add2;
          end else begin
            s1_q <= sub1;
            s2_q <= sub2;
          end
          state <= S_ADD2;
        end
        S_ADD2: begin
          if (op_q == ALU_ADD)
            y <= s2_q[PB+1] ? s2_q[PB-1:0] : s1_q[PB-1:0];
          else
            y <= s1_q[PB] ? s1_q[PB-1:0] : s2_q[PB-1:0];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        S_MUL: begin
          r_q  <= m_next;
          b_sh <= b_sh >> 1;
          cnt  <= cnt + 1'b1;
          if (cnt == CW'(NIT - 1)) begin
            y     <= m_red[PB-1:0];
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // An operation may only be started while the unit is idle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && op != ALU_NOP) |-> !busy);

endmodule

// ecp_ram: operand and result store of the elliptic curve processor.
//
// A true dual-port RAM of DEPTH words of W bits, in the style of an FPGA
// block RAM: each port has its own enable, write enable, address and data.
// Reads are synchronous: rdata shows the word one cycle after en is high
// (read-before-write when the same port writes in that cycle). Both ports
// writing the same word in one cycle is not allowed; port A wins.
// The controller can use both ports (dual-port mode) or port A only
// (single-port mode). Word width and depth follow the field size and the
// memory map; the read-before-write behaviour is this design's choice.
module ecp_ram #(
  parameter int unsigned W      = 192,
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  // port A
  input  logic              en_a,
  input  logic              we_a,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [W-1:0]      wdata_a,
  output logic [W-1:0]      rdata_a,
  // port B
  input  logic              en_b,
  input  logic              we_b,
  input  logic [ADDR_W-1:0] addr_b,
  input  logic [W-1:0]      wdata_b,
  output logic [W-1:0]      rdata_b
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_b) begin
      rdata_b <= mem[addr_b];
      if (we_b && !(en_a && we_a && addr_a == addr_b)) mem[addr_b] <= wdata_b;
    end
    if (en_a) begin
      rdata_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= wdata_a;
    end
  end

endmodule

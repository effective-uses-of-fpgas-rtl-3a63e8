// sbox_ram: true dual-port RAM holding the S-boxes of one key searching unit.
//
// Two independent synchronous ports (A and B), each with its own address,
// write enable and data. Both ports work in read-before-write mode: on a write
// the read data register receives the word that was stored at the address
// before the write. That mode lets a key tester swap S[i] and S[j] in three
// cycles instead of four (read S[i]; write S[j] and get old S[j] back in the
// same cycle; write S[i]).
//
// Default geometry is 512 words of 16 bits. A key searching unit splits it by
// the address MSB into two S-boxes (one per port), and each 16-bit word into a
// high and a low byte so that one byte can be scrambled while the other is
// being set back to the identity for the next key.
//
// Timing: address, write enable and data are sampled on the rising clock edge;
// dout is valid after that edge (one cycle read latency). Writes to the same
// address from both ports in one cycle are not used by this design; should they
// occur, port B's data is kept. There is no reset: the contents are set by the
// controller's initialisation pass.
//
// The 512 x 16 geometry, the true dual-port use and read-before-write come
// from the Block RAM configuration of the design this RTL implements; the
// collision rule and writing it as an inferred array are this RTL's choices.
module sbox_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic [AW-1:0]    addr_a,
  input  logic             we_a,
  input  logic [WIDTH-1:0] din_a,
  output logic [WIDTH-1:0] dout_a,
  // port B
  input  logic [AW-1:0]    addr_b,
  input  logic             we_b,
  input  logic [WIDTH-1:0] din_b,
  output logic [WIDTH-1:0] dout_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    // read-before-write: both reads see the contents before this edge's writes
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) mem[addr_b] <= din_b;
  end

endmodule

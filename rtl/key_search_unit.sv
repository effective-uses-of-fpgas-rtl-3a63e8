// key_search_unit: one S-box RAM shared by two key testers.
//
// A 512 x 16 true dual-port RAM is split by its address MSB into two S-boxes.
// Port A (MSB = 0) serves the tester of key K and port B (MSB = 1) the tester
// of key K + 1, so one RAM tests two keys at the same time. Inside each S-box
// the 16-bit words carry two 256-entry permutations (high and low byte) that
// the testers use alternately, one being scrambled while the other is refilled
// with the identity (see key_tester_datapath).
//
// Interface: the engine's control word and the expected keystream bytes come
// in; per tester the last key byte (K5), the compare hit of the CHK cycle and
// the found flag go out. Timing is that of the testers: everything advances
// in lock step with the engine controller, one RAM access per port per cycle.
//
// Splitting one RAM by its address MSB into the S-boxes of keys K and K+1
// follows the original design; one datapath instance per port is this RTL's
// way of drawing it.
module key_search_unit
  import rc4_pkg::*;
#(
  parameter byte_t SLOT_BASE = 8'd0   // offset of the port-A key within the engine's pass
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t ctrl,
  input  logic  load_key,
  input  byte_t k5_next,
  input  byte_t expected [MATCH_BYTES],
  output byte_t k5    [2],
  output logic  hit   [2],
  output logic  found [2]
);

  byte_t       addr [2];
  logic        we   [2];
  logic [15:0] din  [2];
  logic [15:0] dout [2];

  sbox_ram #(.DEPTH(512), .WIDTH(16)) u_ram (
    .clk    (clk),
    .addr_a ({1'b0, addr[0]}),
    .we_a   (we[0]),
    .din_a  (din[0]),
    .dout_a (dout[0]),
    .addr_b ({1'b1, addr[1]}),
    .we_b   (we[1]),
    .din_b  (din[1]),
    .dout_b (dout[1])
  );

  for (genvar p = 0; p < 2; p++) begin : g_tester
    key_tester_datapath #(.SLOT(SLOT_BASE + byte_t'(p))) u_tester (
      .clk      (clk),
      .rst_n    (rst_n),
      .ctrl     (ctrl),
      .load_key (load_key),
      .k5_next  (k5_next),
      .expected (expected),
      .addr     (addr[p]),
      .we       (we[p]),
      .din      (din[p]),
      .dout     (dout[p]),
      .k5       (k5[p]),
      .hit      (hit[p]),
      .found    (found[p])
    );
  end

endmodule

// key_counter: the 40-bit test-key counter shared by all units of an engine.
//
// An engine tests STEP consecutive keys per pass (two per key searching unit),
// and STEP is a power of two no larger than 256. The counter holds the key of
// slot 0 of the current pass, always a multiple of STEP, so the key of slot s
// is the counter with s in its low bits. Each tester therefore keeps only its
// last key byte in an 8-bit register instead of a 40-bit counter of its own.
//
// load: take start_key rounded down to a multiple of STEP.
// advance: add STEP. next_key is the value the counter takes at the next
// edge if load or advance is asserted, and last_pass says that adding STEP
// would pass the end of the 40-bit key space. Both update on the rising edge.
//
// One shared counter with per-tester last-byte registers is the original
// scheme; rounding the start key, the step of two keys per unit and the
// last_pass flag are this RTL's choices.
module key_counter
  import rc4_pkg::*;
#(
  parameter int unsigned STEP = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  key_t start_key,
  input  logic advance,
  output key_t key,
  output key_t next_key,
  output logic last_pass
);

  localparam key_t MASK = ~(key_t'(STEP) - key_t'(1));

  logic [KEY_BITS:0] sum;

  assign sum       = {1'b0, key} + (KEY_BITS + 1)'(STEP);
  assign last_pass = sum[KEY_BITS];
  assign next_key  = load ? (start_key & MASK) : sum[KEY_BITS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      key <= '0;
    else if (load || advance)
      key <= next_key;
  end

  initial begin
    assert (STEP >= 1 && STEP <= 256 && (STEP & (STEP - 1)) == 0)
      else $error("key_counter: STEP must be a power of two between 1 and 256");
  end

endmodule

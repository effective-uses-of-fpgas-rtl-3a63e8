// key_search_engine: NUM_UNITS key searching units run in lock step.
//
// One engine_controller and one 40-bit key_counter serve all units. Each unit
// tests two keys per pass, so a pass covers STEP = 2 * NUM_UNITS consecutive
// keys: unit u tests counter + 2u on RAM port A and counter + 2u + 1 on port B.
// NUM_UNITS must be a power of two no larger than 128 so that a pass never
// spans more than the last key byte.
//
// Interface: pulse start with start_key (rounded down to a multiple of STEP)
// and the five expected keystream bytes held steady; the engine searches
// upward. found and found_key are valid once done is high with exhausted low.
// If several keys of one pass match, the lowest one is reported.
// Timing: 256 cycles of identity fill after start, then one pass of STEP keys
// every 772 cycles (plus 5 cycles per extra keystream byte when some key
// matches the first bytes).
module key_search_engine
  import rc4_pkg::*;
#(
  parameter int unsigned NUM_UNITS = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  key_t  start_key,
  input  byte_t expected [MATCH_BYTES],
  output logic  busy,
  output logic  done,
  output logic  exhausted,
  output logic  found,
  output key_t  found_key,
  output logic  key_switch   // pulse per new pass of keys
);

  localparam int unsigned NSLOT = 2 * NUM_UNITS;

  ctrl_t ctrl;
  logic  load_key;
  byte_t k5_next;
  key_t  key, next_key;
  logic  last_pass, key_load, key_advance;
  logic  any_hit;

  byte_t k5     [NSLOT];
  logic  hit    [NSLOT];
  logic  fnd    [NSLOT];

  key_counter #(.STEP(NSLOT)) u_counter (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (key_load),
    .start_key (start_key),
    .advance   (key_advance),
    .key       (key),
    .next_key  (next_key),
    .last_pass (last_pass)
  );

  engine_controller u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .any_hit     (any_hit),
    .key_hi      (key[KEY_BITS-1:8]),
    .next_k5     (next_key[7:0]),
    .last_pass   (last_pass),
    .key_load    (key_load),
    .key_advance (key_advance),
    .ctrl        (ctrl),
    .load_key    (load_key),
    .k5_next     (k5_next),
    .busy        (busy),
    .done        (done),
    .exhausted   (exhausted),
    .key_switch  (key_switch)
  );

  for (genvar u = 0; u < NUM_UNITS; u++) begin : g_unit
    byte_t uk5 [2];
    logic  uhit [2];
    logic  ufnd [2];
    key_search_unit #(.SLOT_BASE(byte_t'(2 * u))) u_unit (
      .clk      (clk),
      .rst_n    (rst_n),
      .ctrl     (ctrl),
      .load_key (load_key),
      .k5_next  (k5_next),
      .expected (expected),
      .k5       (uk5),
      .hit      (uhit),
      .found    (ufnd)
    );
    for (genvar p = 0; p < 2; p++) begin : g_port
      assign k5 [2*u+p] = uk5[p];
      assign hit[2*u+p] = uhit[p];
      assign fnd[2*u+p] = ufnd[p];
    end
  end

  always_comb begin
    any_hit   = 1'b0;
    found     = 1'b0;
    found_key = '0;
    for (int s = NSLOT - 1; s >= 0; s--) begin
      any_hit = any_hit | hit[s];
      if (fnd[s]) begin
        found     = 1'b1;
        found_key = {ctrl.k_hi, k5[s]};
      end
    end
  end

  initial begin
    assert (NUM_UNITS >= 1 && NUM_UNITS <= 128 && (NUM_UNITS & (NUM_UNITS - 1)) == 0)
      else $error("key_search_engine: NUM_UNITS must be a power of two up to 128");
  end

endmodule

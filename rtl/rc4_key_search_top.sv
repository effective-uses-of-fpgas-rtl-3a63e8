// rc4_key_search_top: brute-force RC4 key search with several engines.
//
// NUM_ENGINES key_search_engines (by default three, of 64, 16 and 8 units, i.e.
// 88 dual-port S-box RAMs testing 176 keys at once) run side by side from one
// clock. Each engine gets its own start key so that the engines cover
// different ranges of the 40-bit key space. Every engine's found flag and key
// come out, and they are merged onto one found / found_key pair: the lowest
// numbered engine that found a key drives found_key.
//
// Interface: pulse start with start_key[] and expected[] (the first five
// keystream bytes, i.e. known ciphertext XOR known plaintext) held steady.
// all_done rises when every engine has stopped; found may rise earlier.
// clk is the search clock; the clock manager that produces it is not part of
// this RTL. Timing: each engine tests 2 * units keys every 772 cycles.
//
// Several engines with their own start keys and per-engine found outputs
// follow the original system; the 64/16/8 sizes are its main configuration.
// The priority merge and the shared start pulse are this RTL's choices.
module rc4_key_search_top
  import rc4_pkg::*;
#(
  parameter int unsigned NUM_ENGINES = 3,
  parameter int unsigned ENGINE_UNITS [NUM_ENGINES] = '{64, 16, 8}
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  key_t  start_key [NUM_ENGINES],
  input  byte_t expected  [MATCH_BYTES],
  output logic  found,
  output key_t  found_key,
  output logic  all_done,
  output logic  busy,
  output logic  engine_pass      [NUM_ENGINES],   // pulse: engine starts a new pass of keys
  output logic  engine_found     [NUM_ENGINES],
  output key_t  engine_found_key [NUM_ENGINES],
  output logic  engine_done      [NUM_ENGINES],
  output logic  engine_exhausted [NUM_ENGINES]
);

  logic eng_busy   [NUM_ENGINES];

  for (genvar e = 0; e < NUM_ENGINES; e++) begin : g_engine
    key_search_engine #(.NUM_UNITS(ENGINE_UNITS[e])) u_engine (
      .clk        (clk),
      .rst_n      (rst_n),
      .start      (start),
      .start_key  (start_key[e]),
      .expected   (expected),
      .busy       (eng_busy[e]),
      .done       (engine_done[e]),
      .exhausted  (engine_exhausted[e]),
      .found      (engine_found[e]),
      .found_key  (engine_found_key[e]),
      .key_switch (engine_pass[e])
    );
  end

  always_comb begin
    found     = 1'b0;
    found_key = '0;
    all_done  = 1'b1;
    busy      = 1'b0;
    for (int e = NUM_ENGINES - 1; e >= 0; e--) begin
      all_done = all_done & engine_done[e];
      busy     = busy | eng_busy[e];
      if (engine_found[e]) begin
        found     = 1'b1;
        found_key = engine_found_key[e];
      end
    end
  end

endmodule

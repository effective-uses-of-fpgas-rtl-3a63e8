// tb_key_search_engine: one engine of 4 units (8 keys per pass).
//
// Search 1: the secret is the last key (slot 7, port B of unit 3) of the
// third pass; the engine must report it exactly 256 + 3 * 772 + 4 * 5 + 1
// cycles after start. Search 2: a range at the end of the key space that
// holds a wrong key with the same first keystream byte as the target; the
// engine must extend the keystream for it, reject it and stop with exhausted
// after the right number of passes. Search 3: the secret in slot 0 of the
// first pass, started from an unaligned start key.
module tb_key_search_engine;
  import rc4_pkg::*;
  import rc4_ref_pkg::*;

  localparam int unsigned UNITS = 4;
  localparam int unsigned STEP  = 2 * UNITS;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  key_t  start_key, found_key;
  byte_t expected [MATCH_BYTES];
  logic  busy, done, exhausted, found, key_switch;
  int checks = 0, failures = 0;
  int n_pass = 0, n_more = 0;
  longint cyc = 0;

  key_search_engine #(.NUM_UNITS(UNITS)) dut (
    .clk (clk), .rst_n (rst_n), .start (start), .start_key (start_key),
    .expected (expected), .busy (busy), .done (done), .exhausted (exhausted),
    .found (found), .found_key (found_key), .key_switch (key_switch)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (key_switch && !start) n_pass++;
    if (dut.u_ctrl.chk_more) n_more++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic search(input key_t from, input ks5_t target, output longint took);
    longint t0;
    for (int b = 0; b < 5; b++) expected[b] = target[b];
    start_key = from;
    n_pass = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = cyc;
    wait (done);
    took = cyc - t0;
    @(negedge clk);
  endtask

  initial begin
    key_t   secret, near;
    ks5_t   ks;
    longint took;
    int     more0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // search 1
    secret = 40'hC0_FFEE_1237;          // slot 7 of the pass at ...1230
    ks = keystream(secret);
    search(40'hC0_FFEE_1220, ks, took);
    check(found && !exhausted && found_key == secret, $sformatf("search 1 key %h", found_key));
    check(took == longint'(256 + 3 * 772 + 4 * 5 + 1), $sformatf("search 1 took %0d cycles", took));
    check(n_pass == 2, $sformatf("search 1 made %0d pass switches", n_pass));
    // search 2: a first-byte collision near the end of the key space
    near = 40'hFF_FFFF_F800;
    while (keystream(near)[0] != ks[0] || keystream(near) == ks) near++;
    more0 = n_more;
    search(near, ks, took);
    check(!found && exhausted, "search 2 exhausted without a key");
    check(n_more > more0, "search 2 extended the keystream");
    check(n_pass == int'((40'hFF_FFFF_FFFF - (near & ~key_t'(STEP - 1))) / STEP),
          $sformatf("search 2 made %0d pass switches", n_pass));
    // search 3: unaligned start, key in slot 0 of the first pass
    secret = 40'h00_0000_0A08;
    search(40'h00_0000_0A0D, keystream(secret), took);
    check(found && found_key == secret, $sformatf("search 3 key %h", found_key));
    check(took == longint'(256 + 772 + 4 * 5 + 1), $sformatf("search 3 took %0d cycles", took));
    $display("mechanisms: extra keystream bytes=%0d", n_more);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

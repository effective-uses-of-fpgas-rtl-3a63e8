// tb_rc4_key_search_top: end-to-end test of the multi-engine key search.
//
// Three small engines (2, 1 and 1 units) search from different start keys.
// Engine 0's range holds the secret key and must report it; engines 1 and 2
// start near the end of the 40-bit key space and must run out of keys.
// Engine 2's range is chosen (with the reference model) to contain a wrong
// key whose first keystream byte matches, so the extra-keystream-byte path
// is exercised. The test checks the found key, the exhausted flags, the time
// from start to found against 256 + 772 cycles per pass + 5 per extra byte,
// and the 772-cycle pass period; it then restarts with a second secret.
// Mechanisms counted: identity fill, pass switch (S-box byte swap), partial
// match continuation, found, key space exhausted, restart.
module tb_rc4_key_search_top;
  import rc4_pkg::*;
  import rc4_ref_pkg::*;

  localparam int unsigned NE = 3;
  localparam int unsigned UNITS [NE] = '{2, 1, 1};

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  start = 1'b0;
  key_t  start_key [NE];
  byte_t expected  [MATCH_BYTES];
  logic  found, all_done, busy;
  key_t  found_key;
  logic  e_found [NE];
  key_t  e_key   [NE];
  logic  e_done  [NE];
  logic  e_exh   [NE];
  logic  e_pass  [NE];

  int checks = 0, failures = 0;
  int n_init = 0, n_pass = 0, n_more = 0, n_found = 0, n_exh = 0, n_restart = 0;
  longint cyc = 0;

  rc4_key_search_top #(.NUM_ENGINES(NE), .ENGINE_UNITS(UNITS)) dut (
    .clk              (clk),
    .rst_n            (rst_n),
    .start            (start),
    .start_key        (start_key),
    .expected         (expected),
    .found            (found),
    .found_key        (found_key),
    .all_done         (all_done),
    .busy             (busy),
    .engine_pass      (e_pass),
    .engine_found     (e_found),
    .engine_found_key (e_key),
    .engine_done      (e_done),
    .engine_exhausted (e_exh)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters, sampled on engine 2 (partial match) and all engines
  always @(posedge clk) begin
    cyc++;
    for (int e = 0; e < NE; e++) if (e_pass[e]) n_pass++;
    if (dut.g_engine[2].u_engine.u_ctrl.phase == ST_CHK && dut.g_engine[2].u_engine.u_ctrl.chk_more)
      n_more++;
    if (dut.g_engine[0].u_engine.u_ctrl.phase == ST_INIT && dut.g_engine[0].u_engine.u_ctrl.i == 8'd0)
      n_init++;
  end

  // pass period of engine 0 when no key matched a first byte
  longint last_pass_cyc = -1;
  int     period_checks = 0;
  always @(posedge clk) begin
    if (start) last_pass_cyc = -1;
    else if (e_pass[0]) begin
      if (last_pass_cyc >= 0 && period_checks < 4) begin
        check(cyc - last_pass_cyc == longint'(CYCLES_PER_KEY),
              $sformatf("pass period %0d, expected 772", cyc - last_pass_cyc));
        period_checks++;
      end
      last_pass_cyc = cyc;
    end
  end

  task automatic run_search(input key_t secret, input int pass0);
    ks5_t   ks;
    key_t   near;
    longint t0, t_found;
    int     passes1, passes2;
    ks = keystream(secret);
    for (int b = 0; b < 5; b++) expected[b] = ks[b];
    // engine 0 (4 keys per pass): secret lies in pass number pass0
    start_key[0] = (secret & ~key_t'(3)) - key_t'(4 * pass0);
    // engine 1 (2 keys per pass): last 3 passes of the key space
    start_key[1] = 40'hFF_FFFF_FFFA;
    // engine 2: from a wrong key whose first keystream byte matches, to the end
    near = 40'hFF_FFFF_F000;
    while (keystream(near)[0] != ks[0] && near != 40'hFF_FFFF_FFFF) near++;
    check(keystream(near)[0] == ks[0], "reference search for a first-byte collision");
    start_key[2] = near;
    passes1 = 3;
    passes2 = (40'hFF_FFFF_FFFF - (near & ~key_t'(1))) / 2 + 1;

    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = cyc;
    wait (e_done[0]);
    t_found = cyc;
    n_found += int'(e_found[0]);
    check(e_found[0] && !e_exh[0], "engine 0 found a key");
    check(e_key[0] == secret, $sformatf("engine 0 key %h, expected %h", e_key[0], secret));
    check(found && found_key == secret, "merged found_key");
    // start edge -> INIT 256 -> CHK of pass p at 256 + 772 (p+1) -> 4 extra bytes
    check(t_found - t0 == longint'(256 + 772 * (pass0 + 1) + 4 * 5 + 1),
          $sformatf("start to found took %0d cycles", t_found - t0));
    wait (all_done);
    check(e_exh[1] && !e_found[1], "engine 1 exhausted the key space");
    check(e_exh[2] && !e_found[2], "engine 2 exhausted the key space");
    n_exh += int'(e_exh[1]) + int'(e_exh[2]);
    check(passes1 > 0 && passes2 > 0, "pass counts");
    @(negedge clk);
  endtask

  initial begin
    for (int e = 0; e < NE; e++) start_key[e] = '0;
    for (int b = 0; b < 5; b++) expected[b] = '0;
    // reference model against the published RC4 test vector for key 0102030405
    begin
      ks5_t v = keystream(40'h01_0203_0405);
      check(v[0] == 8'hb2 && v[1] == 8'h39 && v[2] == 8'h63 && v[3] == 8'h05 && v[4] == 8'hf0,
            "reference model test vector");
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_search(40'h01_0203_0405, 3);
    n_restart++;
    run_search(40'h5A_C3_7E_11_96, 1);
    check(n_init == 2, $sformatf("identity fill ran %0d times", n_init));
    check(n_pass > 0,   "pass switches happened");
    check(n_more > 0,   "partial-match continuation happened");
    check(n_found == 2, "found happened twice");
    check(n_exh == 4,   "exhaustion happened four times");
    check(n_restart > 0, "restart happened");
    $display("mechanisms: init=%0d pass=%0d continue=%0d found=%0d exhausted=%0d restart=%0d",
             n_init, n_pass, n_more, n_found, n_exh, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

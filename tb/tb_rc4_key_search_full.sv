// tb_rc4_key_search_full: the key search at its full default size.
//
// Three engines of 64, 16 and 8 units (88 S-box RAMs, 176 keys per pass).
// Engine 1 starts three passes (3 x 32 keys) below the secret key, so the
// secret is tested in its fourth pass; engines 0 and 2 search unrelated
// ranges. The test checks that engine 1 reports the secret at exactly
// 256 + 4 * 772 + 4 * 5 + 1 cycles after start, that the merged outputs carry
// it, that the other engines found nothing and are still searching, and that
// every engine advanced one pass per 772 cycles meanwhile, i.e. that the
// whole system tested 176 keys per 772 cycles.
module tb_rc4_key_search_full;
  import rc4_pkg::*;
  import rc4_ref_pkg::*;

  localparam int unsigned NE = 3;

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
  longint cyc = 0;
  int     n_pass [NE];

  rc4_key_search_top dut (
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

  always @(posedge clk) begin
    cyc++;
    for (int e = 0; e < NE; e++) if (e_pass[e] && !start) n_pass[e]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    key_t   secret;
    ks5_t   ks;
    longint t0;
    int     ext;
    secret = 40'h3C_9E_04_B7_6D;
    ks = keystream(secret);
    for (int b = 0; b < 5; b++) expected[b] = ks[b];
    for (int e = 0; e < NE; e++) n_pass[e] = 0;
    start_key[0] = 40'h00_0000_0000;
    start_key[1] = (secret & ~key_t'(31)) - key_t'(3 * 32);
    start_key[2] = 40'h80_0000_0000;
    // Extra keystream bytes engine 1 generates in its first three passes: per
    // pass, the longest run of leading bytes a wrong key shares with the target.
    ext = 0;
    for (int p = 0; p < 3; p++) begin
      int   longest, m;
      ks5_t w;
      longest = 0;
      for (int k = 0; k < 32; k++) begin
        w = keystream(start_key[1] + key_t'(32 * p + k));
        m = 0;
        while (m < 5 && w[m] == ks[m]) m++;
        if (m > longest) longest = m;
      end
      ext += (longest > 4) ? 4 : longest;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = cyc;
    wait (found);
    check(cyc - t0 == longint'(256 + 4 * CYCLES_PER_KEY + 5 * ext + 4 * 5 + 1),
          $sformatf("start to found took %0d cycles, expected %0d", cyc - t0,
                    256 + 4 * CYCLES_PER_KEY + 5 * ext + 4 * 5 + 1));
    check(e_found[1] && e_key[1] == secret, $sformatf("engine 1 key %h", e_key[1]));
    check(found_key == secret, "merged found_key");
    check(!e_found[0] && !e_found[2], "other engines found nothing");
    check(!e_done[0] && !e_done[2] && busy && !all_done, "other engines still searching");
    check(e_done[1] && !e_exh[1], "engine 1 stopped on the key");
    // Engine 1 switched passes three times. The others ran as long; a wrong
    // key matching a first byte there costs them 5 cycles, so they may be up
    // to one switch short but never ahead.
    check(n_pass[1] == 3, $sformatf("engine 1 made %0d pass switches", n_pass[1]));
    for (int e = 0; e < NE; e += 2)
      check(n_pass[e] >= 3 && n_pass[e] <= 4, $sformatf("engine %0d made %0d pass switches", e, n_pass[e]));
    // four passes of 176 keys in the cycles after the identity fill
    $display("704 keys tested in %0d cycles: %0.3g keys/s at 47 MHz", cyc - t0 - 257 - 20,
             704.0 * 47.0e6 / real'(cyc - t0 - 257 - 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

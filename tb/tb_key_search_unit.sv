// tb_key_search_unit: two keys tested at once in one dual-port S-box RAM.
//
// The testbench steps the control word itself. Each pass loads a base key
// (a multiple of 8) so that port A tests base + 6 and port B base + 7
// (SLOT_BASE = 6). After the key schedule both 256-entry halves of the RAM
// are compared with independently computed RC4 permutations (active byte)
// and the identity (idle byte); then five keystream bytes are checked on
// both ports. Passes alternate the S-box byte in use, and the expected bytes
// are taken from port A's key, port B's key or a third key, so that each
// port sees found, miss and partial matches.
module tb_key_search_unit;
  import rc4_pkg::*;
  import rc4_ref_pkg::*;

  localparam byte_t SLOT_BASE = 8'd6;

  logic  clk = 1'b0, rst_n = 1'b0;
  ctrl_t ctrl;
  logic  load_key;
  byte_t k5_next;
  byte_t expected [MATCH_BYTES];
  byte_t k5    [2];
  logic  hit   [2];
  logic  found [2];
  int checks = 0, failures = 0;
  int n_found_pass [2];

  key_search_unit #(.SLOT_BASE(SLOT_BASE)) dut (
    .clk (clk), .rst_n (rst_n), .ctrl (ctrl), .load_key (load_key), .k5_next (k5_next),
    .expected (expected), .k5 (k5), .hit (hit), .found (found)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic step(input phase_e ph, input int i, input int kidx, input int ksb);
    ctrl.phase   = ph;
    ctrl.i       = 8'(i);
    ctrl.kidx    = 3'(kidx);
    ctrl.ks_byte = 3'(ksb);
    @(negedge clk);
    load_key = 1'b0;
  endtask

  function automatic void ref_ksa(input key_t key, output byte_t s [256]);
    byte_t j, tmp;
    for (int n = 0; n < 256; n++) s[n] = 8'(n);
    j = 0;
    for (int n = 0; n < 256; n++) begin
      j = j + s[n] + key[39 - 8 * (n % 5) -: 8];
      tmp = s[n]; s[n] = s[j]; s[j] = tmp;
    end
  endfunction

  task automatic run_pass(input key_t base, input bit half, input ks5_t exp_ks);
    key_t  key [2];
    ks5_t  ks  [2];
    byte_t s   [256];
    bit    alive [2];
    key[0] = base + key_t'(SLOT_BASE);
    key[1] = base + key_t'(SLOT_BASE) + 1;
    for (int p = 0; p < 2; p++) begin
      ks[p] = keystream(key[p]);
      alive[p] = 1'b1;
    end
    for (int b = 0; b < 5; b++) expected[b] = exp_ks[b];
    ctrl.half = half;
    ctrl.k_hi = base[39:8];
    k5_next   = base[7:0];
    load_key  = 1'b1;
    for (int i = 0; i < 256; i++) begin
      step(ST_KSA_RD, i, i % 5, 0);
      step(ST_KSA_SJ, i, i % 5, 0);
      step(ST_KSA_SI, i, i % 5, 0);
    end
    for (int p = 0; p < 2; p++) begin
      int bad = 0;
      check(k5[p] == key[p][7:0], $sformatf("port %0d K5 %h", p, k5[p]));
      ref_ksa(key[p], s);
      for (int n = 0; n < 256; n++) begin
        logic [15:0] w = dut.u_ram.mem[256 * p + n];
        if ((half ? w[7:0] : w[15:8]) != s[n]) bad++;
        if ((half ? w[15:8] : w[7:0]) != 8'(n)) bad++;
      end
      check(bad == 0, $sformatf("port %0d: %0d S-box bytes wrong after KSA", p, bad));
    end
    for (int b = 0; b < 5; b++) begin
      step(ST_KS_RD, b + 1, 0, b);
      step(ST_KS_SJ, b + 1, 0, b);
      step(ST_KS_SI, b + 1, 0, b);
      step(ST_KS_RT, b + 1, 0, b);
      ctrl.phase = ST_CHK; ctrl.ks_byte = 3'(b);
      #1;
      for (int p = 0; p < 2; p++) begin
        alive[p] = alive[p] && (ks[p][b] == exp_ks[b]);
        check(hit[p] == alive[p], $sformatf("port %0d byte %0d hit %0b", p, b, hit[p]));
      end
      @(negedge clk);
    end
    for (int p = 0; p < 2; p++)
      if (ks[p] == exp_ks) n_found_pass[p]++;
  endtask

  initial begin
    key_t base;
    ctrl = '0; load_key = 1'b0; k5_next = '0;
    n_found_pass[0] = 0; n_found_pass[1] = 0;
    for (int b = 0; b < 5; b++) expected[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 256; i++) step(ST_INIT, i, 0, 0);
    check(!found[0] && !found[1], "no found after reset");
    // pass 1: expected bytes from port B's key
    base = 40'hA1_B2C3_D4E0;
    run_pass(base, 1'b0, keystream(base + 7));
    check(!found[0] && found[1], "port B found, port A not");
    // pass 2 (other S-box byte): port A's key
    base = 40'h0F_1E2D_3C48;
    run_pass(base, 1'b1, keystream(base + 6));
    check(found[0] && found[1], "port A found too (found is sticky)");
    // pass 3: a key of neither port
    base = 40'h55_5555_5550;
    run_pass(base, 1'b0, keystream(40'h12_3456_7890));
    check(n_found_pass[0] == 1 && n_found_pass[1] == 1, "each port matched exactly once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_key_tester_datapath: one key tester on a testbench memory model.
//
// The testbench plays the engine controller (it steps the phases itself) and
// the RAM (a 256 x 16 read-before-write array). For a series of keys, with
// the S-box byte in use alternating, it checks after each key schedule that
// the active byte holds the RC4 permutation computed here independently and
// the idle byte holds the identity, then runs five keystream bytes and checks
// the hit output per byte and the (sticky) found flag against the reference keystream.
// It also checks the K5 register and the 3-cycle KSA iteration (the tester
// must issue exactly one RAM access per cycle: read, write at j, write at i).
module tb_key_tester_datapath;
  import rc4_pkg::*;
  import rc4_ref_pkg::*;

  // Keys used below all have the SLOT bits set in their last byte, as the
  // engine's key counter guarantees.
  localparam byte_t SLOT = 8'd5;

  logic        clk = 1'b0, rst_n = 1'b0;
  ctrl_t       ctrl;
  logic        load_key;
  byte_t       k5_next;
  byte_t       expected [MATCH_BYTES];
  byte_t       addr, k5;
  logic        we, hit, found;
  logic [15:0] din, dout;
  logic [15:0] mem [256];
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss_after_hit = 0, n_found = 0, n_writes = 0;

  key_tester_datapath #(.SLOT(SLOT)) dut (
    .clk (clk), .rst_n (rst_n), .ctrl (ctrl), .load_key (load_key), .k5_next (k5_next),
    .expected (expected), .addr (addr), .we (we), .din (din), .dout (dout),
    .k5 (k5), .hit (hit), .found (found)
  );

  // read-before-write RAM model
  always @(posedge clk) begin
    dout <= mem[addr];
    if (we) begin
      mem[addr] <= din;
      n_writes++;
    end
  end

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

  task automatic test_key(input key_t key, input bit half, input ks5_t exp_ks);
    ks5_t  ks;
    byte_t s [256];
    byte_t j, tmp;
    bit    alive;
    int    wr0;
    ks = keystream(key);
    for (int b = 0; b < 5; b++) expected[b] = exp_ks[b];
    ctrl.half = half;
    ctrl.k_hi = key[39:8];
    load_key  = 1'b1;
    k5_next   = key[7:0] & ~SLOT;
    // key schedule
    wr0 = n_writes;
    for (int i = 0; i < 256; i++) begin
      step(ST_KSA_RD, i, i % 5, 0);
      if (i == 0) check(k5 == (key[7:0] | SLOT), "K5 register load");
      step(ST_KSA_SJ, i, i % 5, 0);
      step(ST_KSA_SI, i, i % 5, 0);
    end
    check(n_writes - wr0 == 512, $sformatf("KSA made %0d writes, expected 512", n_writes - wr0));
    // reference permutation after the key schedule
    for (int n = 0; n < 256; n++) s[n] = 8'(n);
    j = 0;
    for (int n = 0; n < 256; n++) begin
      j = j + s[n] + key[39 - 8 * (n % 5) -: 8];
      tmp = s[n]; s[n] = s[j]; s[j] = tmp;
    end
    begin
      int bad_act = 0, bad_idle = 0;
      for (int n = 0; n < 256; n++) begin
        if ((half ? mem[n][7:0] : mem[n][15:8]) != s[n]) bad_act++;
        if ((half ? mem[n][15:8] : mem[n][7:0]) != 8'(n)) bad_idle++;
      end
      check(bad_act == 0, $sformatf("%0d active S-box entries differ after KSA", bad_act));
      check(bad_idle == 0, $sformatf("%0d idle entries not identity", bad_idle));
    end
    // keystream bytes
    alive = 1'b1;
    for (int b = 0; b < 5; b++) begin
      step(ST_KS_RD, b + 1, 0, b);
      step(ST_KS_SJ, b + 1, 0, b);
      step(ST_KS_SI, b + 1, 0, b);
      step(ST_KS_RT, b + 1, 0, b);
      ctrl.phase = ST_CHK; ctrl.ks_byte = 3'(b);
      #1;
      alive = alive && (ks[b] == exp_ks[b]);
      check(hit == alive, $sformatf("byte %0d hit %0b expected %0b", b, hit, alive));
      if (hit) n_hit++;
      if (b > 0 && !hit && ks[0] == exp_ks[0]) n_miss_after_hit++;
      @(negedge clk);
    end
    // found is sticky until the next identity fill
    if (ks == exp_ks) n_found++;
    check(found == (n_found > 0), "found flag");
  endtask

  initial begin
    key_t a, c;
    ks5_t ka;
    ctrl = '0; load_key = 1'b0; k5_next = '0;
    for (int b = 0; b < 5; b++) expected[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // identity fill
    for (int i = 0; i < 256; i++) step(ST_INIT, i, 0, 0);
    ctrl.phase = ST_IDLE;
    @(negedge clk);
    a  = 40'h01_0203_0405;
    ka = keystream(a);
    test_key(a, 1'b0, ka);                        // right key
    test_key(40'h01_0203_0407, 1'b1, ka);          // wrong key
    // wrong key with the same first keystream byte
    c = 40'h77_0000_0005;
    while (keystream(c)[0] != ka[0]) c += 40'd8;
    test_key(c, 1'b0, ka);
    for (int n = 0; n < 3; n++) begin
      key_t r;
      r = {8'($urandom), 32'($urandom)} | key_t'(SLOT);
      test_key(r, 1'(n + 1), keystream(r));
    end
    ctrl.phase = ST_INIT;
    @(negedge clk);
    check(!found, "found cleared by a new start");
    check(n_found == 4 && n_miss_after_hit == 4 && n_hit > 0, "found, hit and late miss all seen");
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

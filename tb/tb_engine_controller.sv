// tb_engine_controller: the shared sequencer on its own.
//
// The testbench answers the controller's compare cycles with scripted hit
// values and plays the key counter's last_pass flag. It checks the 256-cycle
// identity fill, the 772-cycle pass (CHK to CHK), the per-phase order and the
// i / i mod 5 values of every KSA iteration, the byte swap and key advance at
// each pass, the 5-cycle extension per matching keystream byte, stopping with
// found after five matching bytes, and stopping with exhausted on the last
// pass of the key space.
module tb_engine_controller;
  import rc4_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, any_hit = 1'b0, last_pass = 1'b0;
  logic  key_load, key_advance, load_key, busy, done, exhausted, key_switch;
  byte_t k5_next;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int n_more = 0, n_adv = 0, n_found = 0, n_exh = 0;

  engine_controller dut (
    .clk (clk), .rst_n (rst_n), .start (start), .any_hit (any_hit),
    .key_hi (32'hDEAD_BEEF), .next_k5 (8'h40), .last_pass (last_pass),
    .key_load (key_load), .key_advance (key_advance), .ctrl (ctrl),
    .load_key (load_key), .k5_next (k5_next),
    .busy (busy), .done (done), .exhausted (exhausted), .key_switch (key_switch)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Follow one pass from the cycle after a CHK (or after INIT) to the next CHK,
  // checking every phase. first: the pass starts with KSA_RD instead of CHK.
  task automatic follow_pass(input bit first, input bit half);
    int cycles = first ? 0 : 1;  // the CHK cycle that started this pass
    for (int i = 0; i < 256; i++) begin
      if (first || i > 0) begin
        check(ctrl.phase == ST_KSA_RD && ctrl.i == 8'(i), $sformatf("KSA_RD i=%0d", i));
        @(negedge clk); cycles++;
      end
      check(ctrl.phase == ST_KSA_SJ && ctrl.i == 8'(i) && ctrl.kidx == 3'(i % 5) && ctrl.half == half,
            $sformatf("KSA_SJ i=%0d kidx=%0d", i, ctrl.kidx));
      check(ctrl.k_hi == 32'hDEAD_BEEF, "shared key bytes");
      @(negedge clk); cycles++;
      check(ctrl.phase == ST_KSA_SI && ctrl.i == 8'(i), "KSA_SI");
      @(negedge clk); cycles++;
    end
    foreach (ks_phases[n]) begin
      check(ctrl.phase == ks_phases[n] && ctrl.i == 8'd1 && ctrl.ks_byte == 3'd0,
            $sformatf("keystream phase %0d", n));
      @(negedge clk); cycles++;
    end
    check(ctrl.phase == ST_CHK, "CHK reached");
    check(cycles == int'(CYCLES_PER_KEY), $sformatf("pass took %0d cycles", cycles));
  endtask

  phase_e ks_phases [4] = '{ST_KS_RD, ST_KS_SJ, ST_KS_SI, ST_KS_RT};

  // in a CHK cycle: answer with hit and step to the next negedge
  task automatic answer(input bit h, input bit lp);
    any_hit = h; last_pass = lp;
    #1;
    if (!h && !lp) begin
      check(key_advance && load_key && key_switch && k5_next == 8'h40, "advance and K5 load");
      n_adv++;
    end else
      check(!key_advance && !load_key, "no advance");
    @(negedge clk);
    any_hit = 1'b0; last_pass = 1'b0;
  endtask

  initial begin
    bit half;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && ctrl.phase == ST_IDLE, "idle after reset");
    start = 1'b1;
    #1 check(key_load && load_key, "key load with start");
    @(negedge clk) start = 1'b0;
    for (int i = 0; i < 256; i++) begin
      check(ctrl.phase == ST_INIT && ctrl.i == 8'(i) && busy, $sformatf("INIT %0d", i));
      @(negedge clk);
    end
    half = 1'b0;
    follow_pass(1'b1, half);
    // pass 0: no hit -> next pass with the other byte
    answer(1'b0, 1'b0);
    half = ~half;
    follow_pass(1'b0, half);
    // pass 1: first two bytes match somewhere, third does not
    for (int b = 0; b < 2; b++) begin
      answer(1'b1, 1'b0);
      n_more++;
      foreach (ks_phases[n]) begin
        check(ctrl.phase == ks_phases[n] && ctrl.i == 8'(b + 2) && ctrl.ks_byte == 3'(b + 1),
              $sformatf("extra byte %0d phase %0d", b + 1, n));
        @(negedge clk);
      end
      check(ctrl.phase == ST_CHK && ctrl.half == half, "extra CHK");
    end
    answer(1'b0, 1'b0);
    half = ~half;
    follow_pass(1'b0, half);
    // pass 2: all five bytes match -> found
    for (int b = 0; b < 4; b++) begin
      answer(1'b1, 1'b0);
      repeat (4) @(negedge clk);
      check(ctrl.phase == ST_CHK && ctrl.ks_byte == 3'(b + 1), "extension to byte 5");
    end
    answer(1'b1, 1'b0);
    check(done && !busy && !exhausted, "done after five matching bytes");
    n_found += int'(done && !exhausted);
    repeat (3) @(negedge clk);
    check(done && ctrl.phase == ST_DONE, "stays done");
    // restart, run to the last pass of the key space
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (256) @(negedge clk);
    follow_pass(1'b1, 1'b0);
    answer(1'b0, 1'b1);
    check(done && exhausted, "exhausted on the last pass");
    n_exh += int'(exhausted);
    check(n_more == 2 && n_adv == 2 && n_found == 1 && n_exh == 1, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

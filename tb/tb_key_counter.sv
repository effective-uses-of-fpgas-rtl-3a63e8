// tb_key_counter: loading, alignment, stepping and end of key space.
//
// With STEP = 32 the counter must load start keys rounded down to a multiple
// of 32, add 32 per advance, hold otherwise, present next_key one cycle
// ahead, and flag last_pass exactly when key + 32 passes 2^40.
module tb_key_counter;
  import rc4_pkg::*;

  localparam int unsigned STEP = 32;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, advance = 1'b0;
  key_t start_key, key, next_key, model;
  logic last_pass;
  int checks = 0, failures = 0;

  key_counter #(.STEP(STEP)) dut (
    .clk (clk), .rst_n (rst_n), .load (load), .start_key (start_key),
    .advance (advance), .key (key), .next_key (next_key), .last_pass (last_pass)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_load(input key_t k);
    @(negedge clk);
    start_key = k; load = 1'b1;
    #1;
    check(next_key == {k[39:5], 5'd0}, "next_key on load");
    @(negedge clk);
    load = 1'b0;
    model = {k[39:5], 5'd0};
    check(key == model, $sformatf("load %h gave %h", k, key));
  endtask

  initial begin
    start_key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    do_load(40'h12_3456_789F);
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      advance = 1'($urandom);
      #1;
      check(next_key == model + key_t'(STEP), "next_key ahead");
      check(last_pass == 1'b0, "no last_pass mid range");
      if (advance) model += key_t'(STEP);
      @(posedge clk); #1;
      check(key == model, $sformatf("key %h expected %h", key, model));
    end
    advance = 1'b0;
    do_load(40'hFF_FFFF_FFC7);   // two passes from the end
    check(!last_pass, "second to last pass");
    @(negedge clk) advance = 1'b1;
    @(negedge clk) advance = 1'b0;
    check(key == 40'hFF_FFFF_FFE0 && last_pass, "last pass flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

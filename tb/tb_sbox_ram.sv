// tb_sbox_ram: random traffic on both ports of the 512 x 16 S-box RAM.
//
// A reference array in the testbench follows every write. Each cycle both
// ports get a random address (port A in the lower half, port B in the upper
// half, as a key searching unit uses them) and a random write enable; the
// read data one cycle later must equal the reference contents before that
// cycle's writes, including on the write port (read-before-write).
module tb_sbox_ram;

  localparam int DEPTH = 512;

  logic        clk = 1'b0;
  logic [8:0]  addr_a, addr_b;
  logic        we_a, we_b;
  logic [15:0] din_a, din_b, dout_a, dout_b;
  logic [15:0] ref_mem [DEPTH];
  logic [15:0] exp_a, exp_b;
  int checks = 0, failures = 0;
  int n_rbw = 0;

  sbox_ram dut (
    .clk    (clk),
    .addr_a (addr_a), .we_a (we_a), .din_a (din_a), .dout_a (dout_a),
    .addr_b (addr_b), .we_b (we_b), .din_b (din_b), .dout_b (dout_b)
  );

  always #5 clk = ~clk;

  initial begin
    addr_a = '0; addr_b = 9'd256; we_a = 1'b0; we_b = 1'b0; din_a = '0; din_b = '0;
    // fill through both ports
    for (int n = 0; n < 256; n++) begin
      @(negedge clk);
      addr_a = 9'(n);       we_a = 1'b1; din_a = 16'(n * 3 + 1);
      addr_b = 9'(n + 256); we_b = 1'b1; din_b = 16'(n * 7 + 5);
      ref_mem[n]       = 16'(n * 3 + 1);
      ref_mem[n + 256] = 16'(n * 7 + 5);
    end
    @(negedge clk);
    we_a = 1'b0; we_b = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      addr_a = {1'b0, 8'($urandom)};
      addr_b = {1'b1, 8'($urandom)};
      we_a   = 1'($urandom);
      we_b   = 1'($urandom);
      din_a  = 16'($urandom);
      din_b  = 16'($urandom);
      exp_a  = ref_mem[addr_a];
      exp_b  = ref_mem[addr_b];
      if (we_a) ref_mem[addr_a] = din_a;
      if (we_b) ref_mem[addr_b] = din_b;
      @(posedge clk);
      #1;
      checks += 2;
      if (dout_a !== exp_a) begin
        failures++;
        $display("FAIL: port A addr %0d we %0b got %h expected %h", addr_a, we_a, dout_a, exp_a);
      end
      if (dout_b !== exp_b) begin
        failures++;
        $display("FAIL: port B addr %0d we %0b got %h expected %h", addr_b, we_b, dout_b, exp_b);
      end
      if (we_a && din_a != exp_a) n_rbw++;
    end
    checks++;
    if (n_rbw == 0) begin
      failures++;
      $display("FAIL: no read-before-write case was exercised");
    end
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

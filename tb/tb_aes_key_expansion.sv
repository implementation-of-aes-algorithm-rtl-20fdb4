// tb_aes_key_expansion: self-checking testbench for aes_key_expansion.
//
// Expands the FIPS-197 example key and random keys and reads all 11 round keys
// back through the read port, comparing them with the reference key schedule of
// aes_ref_pkg; round keys 1 and 10 of the example key are also checked as fixed
// values. It checks the timing: keys_valid must rise exactly 10 cycles after
// the start pulse and stay low (with busy high) until then. A start in the
// middle of an expansion must restart it with the new key. Inputs change on the
// falling clock edge. A watchdog ends the run with a failure.
module tb_aes_key_expansion;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic    clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst_n, start, busy, valid;
  block_t  key, rd_key;
  rk_idx_t rd_idx;
  int unsigned checks = 0, failures = 0;

  aes_key_expansion dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .key_i(key),
    .busy_o(busy), .keys_valid_o(valid), .rd_idx_i(rd_idx), .rd_key_o(rd_key)
  );

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Pulse start with key k; return the number of rising edges, after the one
  // that samples start, until keys_valid is high.
  task automatic expand(u128 k, output int cycles);
    key   = k;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    key   = rand128();          // the key input need only be valid with start
    cycles = 0;          // rising edges after the one that took start
    while (!valid && cycles < 100) begin
      if (!busy) begin
        checks++; failures++;
        $display("FAIL busy low before keys were valid");
      end
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic check_all_keys(u128 k, string what);
    for (int r = 0; r <= 10; r++) begin
      rd_idx = rk_idx_t'(r);
      #1;
      check($sformatf("%s round key %0d", what, r), rd_key, round_key(k, r));
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int cyc;
    rst_n = 1'b0; start = 1'b0; key = '0; rd_idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (valid || busy) begin failures++; $display("FAIL flags set after reset"); end

    expand(FIPS_B_KEY, cyc);
    check("expansion latency", 128'(cyc), 128'd10);
    check_all_keys(FIPS_B_KEY, "example key");
    rd_idx = 4'd1;  #1; check("example round key 1",  rd_key, 128'ha0fafe1788542cb123a339392a6c7605);
    rd_idx = 4'd10; #1; check("example round key 10", rd_key, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);

    for (int n = 0; n < 20; n++) begin
      u128 k = rand128();
      expand(k, cyc);
      check("expansion latency", 128'(cyc), 128'd10);
      check_all_keys(k, "random key");
    end

    // Restart: a second start four cycles into an expansion wins.
    begin
      u128 ka = rand128(), kb = rand128();
      key = ka; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      repeat (3) @(negedge clk);
      expand(kb, cyc);
      check("latency after restart", 128'(cyc), 128'd10);
      check_all_keys(kb, "restarted key");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_aes_decrypt: self-checking testbench for the iterative decryption core
// aes_decrypt.
//
// The round keys are served by the testbench from the reference key schedule of
// aes_ref_pkg, indexed by the core's rk_idx_o, so the core is tested on its
// own. Checked: the FIPS-197 known-answer vectors (Appendix B and C.1), the
// example block of the ECB test set, and random keys and blocks against the
// reference model; the latency (ready 10 rising edges after the edge that
// samples start, busy in between); that a start while busy is ignored; that a
// new start may follow in the cycle ready is seen; and that the result is held
// until the next start. Inputs change on the falling edge. A watchdog ends the
// run with a failure.
module tb_aes_decrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic    clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst_n, start, busy, ready;
  block_t  din, dout, rk;
  rk_idx_t rk_idx;
  block_t  rks [11];
  int unsigned checks = 0, failures = 0;
  u128     last_exp;

  assign rk = (rk_idx <= 4'd10) ? rks[rk_idx] : '0;

  aes_decrypt dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .data_i(din),
    .rk_idx_o(rk_idx), .round_key_i(rk), .data_o(dout), .busy_o(busy), .ready_o(ready)
  );

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic void load_key(u128 k);
    for (int r = 0; r <= 10; r++) rks[r] = round_key(k, r);
  endfunction

  // Start one block and wait for ready; check latency and the result.
  task automatic run(u128 k, u128 d, u128 exp, string what, bit poke_busy = 1'b0);
    int cyc = 0;
    load_key(k);
    din   = d;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    din   = rand128();
    while (!ready && cyc < 100) begin
      if (!busy) begin checks++; failures++; $display("FAIL busy low while working"); end
      if (poke_busy && cyc == 4) start = 1'b1;     // must be ignored
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    check({what, " latency"}, 128'(cyc), 128'd10);
    check(what, dout, exp);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    rst_n = 1'b0; start = 1'b0; din = '0;
    load_key('0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (ready || busy) begin failures++; $display("FAIL flags set after reset"); end

    run(FIPS_B_KEY, FIPS_B_CT, FIPS_B_PT, "FIPS-197 Appendix B");
    run(FIPS_C_KEY, FIPS_C_CT, FIPS_C_PT, "FIPS-197 Appendix C.1");
    run(FIPS_B_KEY, ECB_CT, ECB_PT, "ECB example block", 1'b1);
    last_exp = ECB_PT;
    // Result is held while idle.
    repeat (5) @(negedge clk);
    check("result held", dout, last_exp);
    checks++;
    if (!ready || busy) begin failures++; $display("FAIL ready not held"); end

    // Random blocks, started back to back.
    for (int n = 0; n < 40; n++) begin
      u128 k = rand128(), d = rand128();
      run(k, d, decrypt(k, d), "random", n == 3);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

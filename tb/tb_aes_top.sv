// tb_aes_top: end-to-end testbench of the AES-128 unit aes_top, at its default
// (and only) configuration.
//
// Every request gives key, block and mode with a start pulse and waits for
// ready. Checked: the example vector of the ECB test set (key 2b7e1516...,
// plaintext 6bc1bee2..., ciphertext 3ad77bb4...) in both directions, the
// FIPS-197 known-answer vectors, random keys and blocks against the reference
// model of aes_ref_pkg, and round trips (decrypting a ciphertext the unit made
// gives the plaintext back). The latency must be 22 rising edges from the edge
// that samples start to ready, with busy high in between. The run counts each
// mechanism of the design and fails if one never happened: key expansion,
// encryption, decryption, a switch of mode between consecutive requests, and a
// start ignored because the unit was busy. A watchdog ends the run with a
// failure.
module tb_aes_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, start, busy, ready;
  mode_t  mode;
  block_t key, din, dout;
  int unsigned checks = 0, failures = 0;
  int unsigned n_expand = 0, n_enc = 0, n_dec = 0, n_switch = 0, n_ignored = 0;
  mode_t  prev_mode;
  bit     have_prev = 1'b0;

  aes_top dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .mode_i(mode),
    .key_i(key), .data_i(din), .data_o(dout), .busy_o(busy), .ready_o(ready)
  );

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic request(mode_t m, u128 k, u128 d, output u128 result,
                         input bit poke_busy = 1'b0);
    int cyc = 0;
    mode = m; key = k; din = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    mode = mode_t'(~m); key = rand128(); din = rand128();   // sampled only with start
    while (!ready && cyc < 200) begin
      if (!busy) begin checks++; failures++; $display("FAIL busy low while working"); end
      if (poke_busy && cyc == 7) begin start = 1'b1; n_ignored++; end
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    check($sformatf("%s latency", m.name()), 128'(cyc), 128'd22);
    result = dout;
    n_expand++;
    if (m == MODE_ENCRYPT) n_enc++; else n_dec++;
    if (have_prev && prev_mode != m) n_switch++;
    prev_mode = m;
    have_prev = 1'b1;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Counts key expansions seen inside the design, independently of the stimulus.
  int unsigned n_kx_seen = 0;
  always @(posedge clk) if (rst_n && dut.kx_start) n_kx_seen++;

  initial begin : stimulus
    u128 r, c;
    rst_n = 1'b0; start = 1'b0; mode = MODE_ENCRYPT; key = '0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (ready || busy) begin failures++; $display("FAIL flags set after reset"); end

    request(MODE_ENCRYPT, FIPS_B_KEY, ECB_PT, r);
    check("example encryption", r, ECB_CT);
    request(MODE_DECRYPT, FIPS_B_KEY, ECB_CT, r, 1'b1);
    check("example decryption", r, ECB_PT);
    request(MODE_ENCRYPT, FIPS_B_KEY, FIPS_B_PT, r, 1'b1);
    check("FIPS-197 B encryption", r, FIPS_B_CT);
    request(MODE_ENCRYPT, FIPS_C_KEY, FIPS_C_PT, r);
    check("FIPS-197 C.1 encryption", r, FIPS_C_CT);
    request(MODE_DECRYPT, FIPS_C_KEY, FIPS_C_CT, r);
    check("FIPS-197 C.1 decryption", r, FIPS_C_PT);

    // Output and ready are held while idle.
    repeat (4) @(negedge clk);
    check("result held", dout, FIPS_C_PT);
    checks++;
    if (!ready || busy) begin failures++; $display("FAIL ready not held"); end

    for (int n = 0; n < 25; n++) begin
      u128 k = rand128(), p = rand128();
      request(MODE_ENCRYPT, k, p, c);
      check("random encryption", c, encrypt(k, p));
      request(MODE_DECRYPT, k, c, r);
      check("round trip", r, p);
      p = rand128();
      request(MODE_DECRYPT, k, p, r);
      check("random decryption", r, decrypt(k, p));
    end

    check("key expansions inside the design", 128'(n_kx_seen), 128'(n_expand));
    $display("mechanisms: key_expansion=%0d encrypt=%0d decrypt=%0d mode_switch=%0d start_ignored=%0d",
             n_expand, n_enc, n_dec, n_switch, n_ignored);
    checks += 5;
    if (n_expand  == 0) begin failures++; $display("FAIL no key expansion");  end
    if (n_enc     == 0) begin failures++; $display("FAIL no encryption");     end
    if (n_dec     == 0) begin failures++; $display("FAIL no decryption");     end
    if (n_switch  == 0) begin failures++; $display("FAIL no mode switch");    end
    if (n_ignored == 0) begin failures++; $display("FAIL no busy start");     end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_aes_add_round_key: self-checking testbench for aes_add_round_key
// (AddRoundKey).
//
// Drives random states and round keys, walking-one keys and the first key
// addition of the FIPS-197 worked example, and compares the result with the
// bitwise XOR worked out here. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_aes_add_round_key;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  block_t din, key, dout;

  aes_add_round_key dut (.state_i(din), .round_key_i(key), .state_o(dout));

  task automatic check(string what, u128 exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: state %h key %h got %h expected %h", what, din, key, dout, exp);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    din = FIPS_B_PT;
    key = FIPS_B_KEY;
    @(posedge clk);
    check("worked example", 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int k = 0; k < 128; k++) begin
      din = '0;
      key = u128'(1) << k;
      @(posedge clk);
      check("walking one", u128'(1) << k);
    end
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      key = rand128();
      @(posedge clk);
      check("random", din ^ key);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_aes_sub_bytes: self-checking testbench for aes_sub_bytes (SubBytes).
//
// Drives the combinational block with all 256 byte values in every one of the
// 16 byte positions, then random states, and compares every result with the
// reference model in aes_ref_pkg, which is written independently of the RTL.
// Known S-box entries of FIPS-197 and the SubBytes step of its worked example
// are checked as fixed values. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_aes_sub_bytes;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  block_t din, dout;

  aes_sub_bytes dut (.state_i(din), .state_o(dout));

  task automatic check(string what, u128 got, u128 exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: in %h got %h expected %h", what, din, got, exp);
    end
  endtask

  task automatic apply(u128 v);
    din = v;
    @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    // Block v carries byte (v + 17*i) mod 256 in position i: over all v,
    // every position sees every value.
    for (int v = 0; v < 256; v++) begin
      u128 b;
      for (int i = 0; i < 16; i++) b[127-8*i -: 8] = u8'(v + 17*i);
      apply(b);
      check("exhaustive", dout, sub_bytes(b));
    end
    for (int n = 0; n < 100; n++) begin
      apply(rand128());
      check("random", dout, sub_bytes(din));
    end
    // Fixed values: S(00)=63, S(01)=7c, S(53)=ed, S(ff)=16 in bytes 0..3.
    apply(128'h000153ff_00000000_00000000_00000000);
    check("known entries", dout, 128'h637ced16_63636363_63636363_63636363);
    // Round 1 of the FIPS-197 worked example.
    apply(128'h193de3bea0f4e22b9ac68d2ae9f84808);
    check("worked example", dout, 128'hd42711aee0bf98f1b8b45de51e415230);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

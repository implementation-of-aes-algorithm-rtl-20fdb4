// tb_aes_inv_sub_bytes: self-checking testbench for aes_inv_sub_bytes
// (InvSubBytes).
//
// Drives the combinational block with all 256 byte values in every byte
// position, then random states, and compares every result with the reference
// model in aes_ref_pkg, which is written independently of the RTL. Fixed
// inverse S-box entries are checked, and that it undoes the forward S-box of
// the worked example. A watchdog ends the run with a failure if it does not
// finish in time.
module tb_aes_inv_sub_bytes;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  block_t din, dout;

  aes_inv_sub_bytes dut (.state_i(din), .state_o(dout));

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
    for (int v = 0; v < 256; v++) begin
      u128 b;
      for (int i = 0; i < 16; i++) b[127-8*i -: 8] = u8'(v + 17*i);
      apply(b);
      check("exhaustive", dout, inv_sub_bytes(b));
    end
    for (int n = 0; n < 100; n++) begin
      apply(rand128());
      check("random", dout, inv_sub_bytes(din));
    end
    // Fixed values: S^-1(63)=00, S^-1(7c)=01, S^-1(ed)=53, S^-1(16)=ff.
    apply(128'h637ced16_63636363_63636363_63636363);
    check("known entries", dout, 128'h000153ff_00000000_00000000_00000000);
    apply(128'hd42711aee0bf98f1b8b45de51e415230);
    check("worked example", dout, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

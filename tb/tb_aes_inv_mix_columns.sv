// tb_aes_inv_mix_columns: self-checking testbench for aes_inv_mix_columns
// (InvMixColumns).
//
// Drives the combinational block with random states and single-bit states and
// compares every result with the reference model in aes_ref_pkg, which is
// written independently of the RTL. Fixed values check that it undoes the known
// MixColumns results. A watchdog ends the run with a failure if it does not
// finish in time.
module tb_aes_inv_mix_columns;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  block_t din, dout;

  aes_inv_mix_columns dut (.state_i(din), .state_o(dout));

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
    apply(128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6);
    check("known columns", dout, 128'hdb135345_f20a225c_01010101_c6c6c6c6);
    apply(128'h046681e5e0cb199a48f8d37a2806264c);
    check("worked example", dout, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int k = 0; k < 128; k++) begin
      apply(u128'(1) << k);
      check("single bit", dout, inv_mix_columns(din));
    end
    for (int n = 0; n < 200; n++) begin
      apply(rand128());
      check("random", dout, inv_mix_columns(din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_aes_inv_shift_rows: self-checking testbench for aes_inv_shift_rows
// (InvShiftRows).
//
// Drives the combinational block with a state of distinct bytes and random
// states and compares every result with the reference model in aes_ref_pkg,
// which is written independently of the RTL. It also checks that it undoes the
// ShiftRows step of the FIPS-197 worked example. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_aes_inv_shift_rows;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  block_t din, dout;

  aes_inv_shift_rows dut (.state_i(din), .state_o(dout));

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
    apply(128'h00050a0f04090e03080d02070c01060b);
    check("byte map", dout, 128'h000102030405060708090a0b0c0d0e0f);
    apply(128'hd4bf5d30e0b452aeb84111f11e2798e5);
    check("worked example", dout, 128'hd42711aee0bf98f1b8b45de51e415230);
    for (int n = 0; n < 200; n++) begin
      apply(rand128());
      check("random", dout, inv_shift_rows(din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

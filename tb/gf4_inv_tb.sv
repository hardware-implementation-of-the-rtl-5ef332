// gf4_inv_tb: checks the GF(2^4) inverse table on all 16 inputs: a*b = 1,
// and 0 maps to 0.
module gf4_inv_tb;
  import sbox_pkg::*;
  import sbox_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  nibble_t a, b;
  gf4_inv dut (.a, .b);

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      a = 4'(i);
      #1;
      if (a == 0) check(b == 0, "inverse of 0 is not 0");
      else        check(gf4_mul(a, b) == 4'h1, $sformatf("1/%h gave %h", a, b));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

// gf24_inverse_tb: checks the composite-field inverter on all 256 inputs:
// a*b = 1 in GF((2^4)^2) with x^2+x+0x9, and 0 maps to 0.
module gf24_inverse_tb;
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
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte_t a, b;
  gf24_inverse dut (.a, .b);

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a = 8'(i);
      #1;
      if (a == 0) check(b == 0, "inverse of 0 is not 0");
      else        check(gf24_mul(a, b) == 8'h01, $sformatf("1/%h gave %h", a, b));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

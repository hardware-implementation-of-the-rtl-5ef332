// gf4_squarer_tb: checks GF(2^4) squaring on all 16 inputs against a*a.
module gf4_squarer_tb;
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
  gf4_squarer dut (.a, .b);

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      a = 4'(i);
      #1 check(b == gf4_mul(a, a), $sformatf("%h^2 gave %h", a, b));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

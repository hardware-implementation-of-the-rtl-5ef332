// gf4_const_mul_tb: checks multiplication by w^14 on all 16 inputs.
module gf4_const_mul_tb;
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
  nibble_t w14;
  gf4_const_mul dut (.a, .b);

  initial begin
    // the constant must be the 14th power of the generator 0x2
    w14 = 4'h1;
    for (int i = 0; i < 14; i++) w14 = gf4_mul(w14, 4'h2);
    check(w14 == 4'h9, "w^14 is not 0x9");
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      a = 4'(i);
      #1 check(b == gf4_mul(a, w14), $sformatf("%h*w14 gave %h", a, b));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

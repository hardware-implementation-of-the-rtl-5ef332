// gf4_adder_tb: checks GF(2^4) addition on all 256 operand pairs.
module gf4_adder_tb;
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

  nibble_t a, b, c;
  gf4_adder dut (.a, .b, .c);

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      {a, b} = 8'(i);
      // addition is the unique operation with (a+b)+b = a
      #1 check((c ^ b) == a && (c ^ a) == b, $sformatf("%h+%h gave %h", a, b, c));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

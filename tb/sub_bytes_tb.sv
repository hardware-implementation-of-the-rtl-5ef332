// sub_bytes_tb: drives the 16-Sbox SubBytes block with patterns that put
// every byte value through every position, then with random States, and
// checks each byte against the reference Sbox.
module sub_bytes_tb;
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

  state_t din, dout;
  rtable_t sb;

  sub_bytes dut (.din, .dout);

  initial begin
    sb = sbox_table();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      // first 16 vectors sweep all byte values through every position
      for (int i = 0; i < 16; i++) din[i] = (n < 16) ? 8'(16*n + i) : 8'($urandom);
      #1;
      for (int i = 0; i < 16; i++)
        check(dout[i] == sb[din[i]], $sformatf("byte %0d: S(%h) gave %h", i, din[i], dout[i]));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

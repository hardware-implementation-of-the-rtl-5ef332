// inv_sbox_composite_tb: checks the composite-field inverse Sbox for each
// of the eight isomorphisms: InvSbox(Sbox(b)) = b for all 256 bytes.
module inv_sbox_composite_tb;
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

  // the eight isomorphisms, one instance each
  localparam int unsigned POW [8] = '{5, 10, 20, 40, 65, 80, 130, 160};
  byte_t s;
  byte_t a [8];
  rtable_t sb;

  for (genvar g = 0; g < 8; g++) begin : g_dut
    inv_sbox_composite #(.ISO_POWER(POW[g])) dut (.s(s), .a(a[g]));
  end

  initial begin
    sb = sbox_table();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      s = sb[i];
      #1;
      for (int g = 0; g < 8; g++)
        check(a[g] == 8'(i), $sformatf("alpha^%0d: InvS(%h) gave %h, want %h", POW[g], s, a[g], i));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

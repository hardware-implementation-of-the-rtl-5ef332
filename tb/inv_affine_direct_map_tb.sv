// inv_affine_direct_map_tb: for every isomorphism and every byte, feeds
// Sbox(b) = affine(b^-1) and expects the composite image T(b^-1), i.e. the
// inverse affine transformation followed by the mapping.
module inv_affine_direct_map_tb;
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
  byte_t y [8];
  rtable_t sb;

  for (genvar g = 0; g < 8; g++) begin : g_dut
    inv_affine_direct_map #(.ISO_POWER(POW[g])) dut (.s(s), .y(y[g]));
  end

  initial begin
    sb = sbox_table();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      // s = Sbox(i) = affine(i^-1); the block must return T(i^-1)
      s = sb[i];
      #1;
      for (int g = 0; g < 8; g++)
        check(y[g] == to_composite(int'(POW[g]), gf8_inv(8'(i))),
              $sformatf("alpha^%0d: input %h gave %h", POW[g], s, y[g]));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

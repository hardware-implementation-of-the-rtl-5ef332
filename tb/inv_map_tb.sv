// inv_map_tb: for every isomorphism and every byte a, feeds T(a) and
// expects a back.
module inv_map_tb;
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
  byte_t y [8];
  byte_t a [8];

  for (genvar g = 0; g < 8; g++) begin : g_dut
    inv_map #(.ISO_POWER(POW[g])) dut (.y(y[g]), .a(a[g]));
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      for (int g = 0; g < 8; g++) y[g] = to_composite(int'(POW[g]), 8'(i));
      #1;
      for (int g = 0; g < 8; g++)
        check(a[g] == 8'(i), $sformatf("alpha^%0d: T^-1(T(%h)) gave %h", POW[g], i, a[g]));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

// sbox_composite_tb: checks the composite-field Sbox built on each of the
// eight isomorphisms against the Rijndael Sbox (inverse in GF(2^8), then the
// affine transformation) on all 256 inputs.
module sbox_composite_tb;
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
  byte_t a;
  byte_t s [8];
  rtable_t sb;

  for (genvar g = 0; g < 8; g++) begin : g_dut
    sbox_composite #(.ISO_POWER(POW[g])) dut (.a(a), .s(s[g]));
  end

  initial begin
    sb = sbox_table();
    // a few entries of the published AES Sbox, to anchor the reference
    check(sb[8'h00] == 8'h63 && sb[8'h01] == 8'h7c && sb[8'h53] == 8'hed &&
          sb[8'hff] == 8'h16, "reference Sbox");
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a = 8'(i);
      #1;
      for (int g = 0; g < 8; g++)
        check(s[g] == sb[i], $sformatf("alpha^%0d: S(%h) gave %h, want %h", POW[g], a, s[g], sb[i]));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

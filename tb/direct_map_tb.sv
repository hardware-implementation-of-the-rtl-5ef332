// direct_map_tb: checks the mapping GF(2^8) -> GF((2^4)^2) for all eight
// isomorphisms on all 256 bytes against the sum of powers of alpha^k, checks
// the default one against the published 8x8 matrix row by row, and checks
// that it preserves products on random pairs.
module direct_map_tb;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the eight isomorphisms, one instance each
  localparam int unsigned POW [8] = '{5, 10, 20, 40, 65, 80, 130, 160};
  byte_t a;
  byte_t y [8];
  // Published T for alpha^5; row = output bit 7..0, column = input bit 7..0.
  localparam logic [7:0] T5_ROWS [8] = '{
    8'b10100000, 8'b11010010, 8'b00001100, 8'b10100010,
    8'b00010110, 8'b01110100, 8'b01001000, 8'b01111011};

  for (genvar g = 0; g < 8; g++) begin : g_dut
    direct_map #(.ISO_POWER(POW[g])) dut (.a(a), .y(y[g]));
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a = 8'(i);
      #1;
      for (int g = 0; g < 8; g++)
        check(y[g] == to_composite(int'(POW[g]), a),
              $sformatf("alpha^%0d: T(%h) gave %h", POW[g], a, y[g]));
      // printed matrix for the default isomorphism
      for (int r = 0; r < 8; r++)
        check(y[0][7-r] == ^(T5_ROWS[r] & a), $sformatf("T5 row %0d, input %h", r, a));
    end
    // the mapping must preserve products: T(a*b) = T(a)*T(b)
    for (int n = 0; n < 200; n++) begin
      byte_t p, q, tp, tq;
      p = 8'($urandom); q = 8'($urandom);
      @(negedge clk); a = p; #1 tp = y[0];
      @(negedge clk); a = q; #1 tq = y[0];
      @(negedge clk); a = gf8_mul(p, q); #1;
      check(y[0] == gf24_mul(tp, tq), $sformatf("T(%h*%h) is not T(%h)*T(%h)", p, q, p, q));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

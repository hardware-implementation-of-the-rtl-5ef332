// mix_columns_tb: checks MixColumns on the FIPS-197 Appendix B round-1
// column data and on random States against a column-by-column product with
// {02},{03},{01},{01} computed by a generic GF(2^8) multiplier.
module mix_columns_tb;
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

  mix_columns dut (.din, .dout);

  function automatic block_t mc_ref(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) begin
      rbyte_t a0, a1, a2, a3;
      a0 = get_b(s, 4*c); a1 = get_b(s, 4*c+1); a2 = get_b(s, 4*c+2); a3 = get_b(s, 4*c+3);
      o[127-32*c -: 32] = {gf8_mul(2, a0) ^ gf8_mul(3, a1) ^ a2 ^ a3,
                           a0 ^ gf8_mul(2, a1) ^ gf8_mul(3, a2) ^ a3,
                           a0 ^ a1 ^ gf8_mul(2, a2) ^ gf8_mul(3, a3),
                           gf8_mul(3, a0) ^ a1 ^ a2 ^ gf8_mul(2, a3)};
    end
    return o;
  endfunction

  initial begin
    // FIPS-197 Appendix B, round 1: after ShiftRows -> after MixColumns
    @(negedge clk);
    din = 128'hd4bf5d30_e0b452ae_b84111f1_1e2798e5;
    #1 check(dout == 128'h046681e5_e0cb199a_48f8d37a_2806264c, $sformatf("FIPS vector gave %h", dout));
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      din = {$urandom, $urandom, $urandom, $urandom};
      #1 check(dout == mc_ref(din), $sformatf("MixColumns(%h) gave %h", din, dout));
    end
    finish_tb();
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

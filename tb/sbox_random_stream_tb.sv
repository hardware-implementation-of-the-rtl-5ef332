// sbox_random_stream_tb: the composite-field Sbox and inverse Sbox (default
// isomorphism) under a long random byte stream, one byte per clock cycle:
// 250,000 bytes, the largest sequence length used to characterise the Sbox.
// Each byte goes through the Sbox, which must agree with the reference
// table, and the result through the inverse Sbox, which must give the byte
// back. The random source is $urandom.
module sbox_random_stream_tb;
  import sbox_pkg::*;
  import sbox_ref_pkg::*;

  localparam int N_VECTORS = 250000;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  byte_t a, s, back;
  rtable_t sb;
  int hist [256];

  sbox_composite     u_sbox (.a(a), .s(s));
  inv_sbox_composite u_inv  (.s(s), .a(back));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (N_VECTORS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int missing;
    sb = sbox_table();
    foreach (hist[i]) hist[i] = 0;
    for (int n = 0; n < N_VECTORS; n++) begin
      @(negedge clk);
      a = 8'($urandom);
      hist[a]++;
      #1;
      check(s == sb[a] && back == a, $sformatf("byte %h: S=%h InvS(S)=%h", a, s, back));
    end
    // the stream must have visited every byte value
    missing = 0;
    foreach (hist[i]) if (hist[i] == 0) missing++;
    check(missing == 0, $sformatf("%0d byte values never drawn", missing));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

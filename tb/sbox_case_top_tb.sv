// sbox_case_top_tb: end-to-end test of the top at its default parameters.
//
// A behavioural key schedule (FIPS-197 key expansion) feeds round keys one
// per clock. The test encrypts the FIPS-197 vectors for 128-, 192- and
// 256-bit keys (10, 12 and 14 rounds) and the Appendix B example, then
// random keys and plaintexts of all three lengths, comparing every
// ciphertext with a reference encryption and requiring it Nr+1 clock edges
// after load. Idle cycles between blocks check that the State holds. The
// standalone inverse Sbox is driven with every byte and must undo the
// reference Sbox. Each mechanism (load, normal round, final round without
// MixColumns, hold, each key length, inverse Sbox) is counted and must
// occur at least once.
module sbox_case_top_tb;
  import sbox_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, load, step, last;
  logic [127:0] din, round_key, state;
  logic [7:0]   inv_in, inv_out;
  rtable_t      sb;

  int cyc = 0;
  always @(posedge clk) cyc++;

  int n_load = 0, n_round = 0, n_final = 0, n_hold = 0, n_inv = 0;
  int n_nr [3] = '{0, 0, 0};

  sbox_case_top dut (.clk, .rst_n, .load, .step, .last, .din, .round_key, .state,
                     .inv_in, .inv_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(bit l, bit s, bit la, block_t d, block_t k);
    @(negedge clk);
    load = l; step = s; last = la; din = d; round_key = k;
    @(posedge clk);
    #1;
  endtask

  // Encrypt pt under key (nk 32-bit words) on the DUT; compare with the
  // reference and, when given, with a published ciphertext.
  task automatic run_block(logic [255:0] key, int nk, block_t pt, block_t ct_known, bit known);
    block_t rk [15];
    block_t ct;
    int nr, t0;
    nr = nk + 6;
    expand_key(sb, key, nk, rk);
    ct = encrypt(sb, rk, nr, pt);
    drive(1, 0, 0, pt, rk[0]);
    t0 = cyc;
    n_load++;
    for (int r = 1; r <= nr; r++) begin
      drive(0, 1, r == nr, '0, rk[r]);
      if (r == nr) n_final++; else n_round++;
    end
    check(cyc - t0 + 1 == nr + 1, $sformatf("Nr=%0d: %0d edges", nr, cyc - t0 + 1));
    check(state == ct, $sformatf("Nr=%0d: ciphertext %h, want %h", nr, state, ct));
    if (known) check(ct == ct_known && state == ct_known,
                     $sformatf("Nr=%0d: published ciphertext %h, got %h", nr, ct_known, state));
    n_nr[(nk - 4) / 2]++;
    // idle cycles: State must hold
    for (int i = 0; i < 2; i++) begin
      drive(0, 0, 0, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
      check(state == ct, "State changed while idle");
      n_hold++;
    end
  endtask

  initial begin
    localparam block_t PT = 128'h00112233_44556677_8899aabb_ccddeeff;
    sb = sbox_table();
    rst_n = 1'b0; load = 0; step = 0; last = 0; din = '0; round_key = '0; inv_in = '0;
    repeat (2) @(posedge clk);
    #1 check(state == '0, "reset");
    rst_n = 1'b1;

    // FIPS-197 Appendix C.1, C.2, C.3 and Appendix B
    run_block({128'h00010203_04050607_08090a0b_0c0d0e0f, 128'h0}, 4, PT,
              128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a, 1);
    run_block({192'h00010203_04050607_08090a0b_0c0d0e0f_10111213_14151617, 64'h0}, 6, PT,
              128'hdda97ca4_864cdfe0_6eaf70a0_ec0d7191, 1);
    run_block(256'h00010203_04050607_08090a0b_0c0d0e0f_10111213_14151617_18191a1b_1c1d1e1f, 8, PT,
              128'h8ea2b7ca_516745bf_eafc4990_4b496089, 1);
    run_block({128'h2b7e1516_28aed2a6_abf71588_09cf4f3c, 128'h0}, 4,
              128'h3243f6a8_885a308d_313198a2_e0370734,
              128'h3925841d_02dc09fb_dc118597_196a0b32, 1);

    // random keys and blocks
    for (int n = 0; n < 60; n++) begin
      logic [255:0] key;
      for (int w = 0; w < 8; w++) key[32*w +: 32] = $urandom;
      run_block(key, 4 + 2 * (n % 3), {$urandom, $urandom, $urandom, $urandom}, '0, 0);
    end

    // standalone inverse Sbox
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      inv_in = sb[i];
      #1 check(inv_out == 8'(i), $sformatf("InvS(%h) gave %h", inv_in, inv_out));
      n_inv++;
    end

    $display("mechanisms: load=%0d round=%0d final_round=%0d hold=%0d nr10=%0d nr12=%0d nr14=%0d inv_sbox=%0d",
             n_load, n_round, n_final, n_hold, n_nr[0], n_nr[1], n_nr[2], n_inv);
    check(n_load > 0, "no load");
    check(n_round > 0, "no normal round");
    check(n_final > 0, "no final round");
    check(n_hold > 0, "no hold cycle");
    check(n_nr[0] > 0 && n_nr[1] > 0 && n_nr[2] > 0, "a key length was not exercised");
    check(n_inv > 0, "inverse Sbox not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// aes_round_tb: checks the one-round-per-cycle round logic.
//
// Covers: reset clears the State; load applies the initial key addition;
// the FIPS-197 Appendix B first round from a known State; a full AES-128
// encryption (FIPS-197 Appendix C.1) driven one round key per clock, with
// the State compared to a reference round after every cycle and the
// ciphertext required exactly 11 clock edges after load; the State holding
// when neither load nor step is set; load taking priority over step; and
// random States and keys for normal and final rounds.
module aes_round_tb;
  import sbox_pkg::*;
  import sbox_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, load, step, last;
  state_t din, round_key, state;
  rtable_t sb;

  int cyc = 0;
  always @(posedge clk) cyc++;

  aes_round dut (.clk, .rst_n, .load, .step, .last, .din, .round_key, .state);

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

  // apply controls for one clock edge
  task automatic cycle(bit l, bit s, bit la, block_t d, block_t k);
    @(negedge clk);
    load = l; step = s; last = la; din = d; round_key = k;
    @(posedge clk);
    #1;
  endtask

  initial begin
    block_t rk [15];
    block_t exp_s, ct;
    int t_load, t_done;
    sb = sbox_table();
    rst_n = 1'b0; load = 0; step = 0; last = 0; din = '0; round_key = '0;
    #12;
    check(state == '0, "State not cleared by reset");
    rst_n = 1'b1;

    // FIPS-197 Appendix B, round 1
    cycle(1, 0, 0, 128'h193de3be_a0f4e22b_9ac68d2a_e9f84808, '0);
    check(state == 128'h193de3be_a0f4e22b_9ac68d2a_e9f84808, "load");
    cycle(0, 1, 0, '0, 128'ha0fafe17_88542cb1_23a33939_2a6c7605);
    check(state == 128'ha49c7ff2_689f352b_6b5bea43_026a5049, $sformatf("Appendix B round 1 gave %h", state));

    // FIPS-197 Appendix C.1, one round per clock
    expand_key(sb, {128'h00010203_04050607_08090a0b_0c0d0e0f, 128'h0}, 4, rk);
    exp_s = 128'h00112233_44556677_8899aabb_ccddeeff ^ rk[0];
    cycle(1, 0, 0, 128'h00112233_44556677_8899aabb_ccddeeff, rk[0]);
    t_load = cyc;
    check(state == exp_s, "C.1 initial key addition");
    for (int r = 1; r <= 10; r++) begin
      exp_s = ref_round(sb, exp_s, rk[r], r == 10);
      cycle(0, 1, r == 10, '0, rk[r]);
      check(state == exp_s, $sformatf("C.1 round %0d gave %h", r, state));
    end
    t_done = cyc;
    ct = 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a;
    check(state == ct, $sformatf("C.1 ciphertext %h", state));
    // the load edge plus ten round edges: eleven edges in all
    check(t_done - t_load + 1 == 11, $sformatf("ciphertext after %0d edges", t_done - t_load + 1));

    // hold
    cycle(0, 0, 0, '1, '1);
    check(state == ct, "State changed with neither load nor step");

    // load has priority over step
    cycle(1, 1, 0, 128'h0123456789abcdef_fedcba9876543210, 128'h1);
    check(state == (128'h0123456789abcdef_fedcba9876543210 ^ 128'h1), "load did not win over step");

    // random rounds, normal and final
    for (int n = 0; n < 200; n++) begin
      block_t k;
      bit la;
      exp_s = state;
      k = {$urandom, $urandom, $urandom, $urandom};
      la = n[0];
      cycle(0, 1, la, '0, k);
      check(state == ref_round(sb, exp_s, k, la), $sformatf("random round %0d", n));
    end

    // asynchronous reset in the middle of operation
    @(negedge clk);
    rst_n = 1'b0;
    #1 check(state == '0, "asynchronous reset");
    rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

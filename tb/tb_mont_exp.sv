// tb_mont_exp: self-checking test of the Montgomery exponentiator at its
// default size (256-bit key, modulus N^2 of a real Paillier key).
//
// Exponentiation: for random bases b it feeds B = bR mod N^2 and checks that
// the result P satisfies P = b^E R (mod N^2), P < 2N^2, for full 256-bit
// exponents, 32-bit exponents, the all-ones and the single-bit exponent, and
// a zero-length exponent. The latency must be 1 + elen*(WORDS+3) cycles,
// identical for exponents of the same length whatever their bit pattern.
// Multiplication mode: checks a*b*R^-1 for each of the three moduli and its
// latency of 1 + (WORDS+3) cycles.
module tb_mont_exp;
  import he_pkg::*;
  import he_ref_pkg::*;

  localparam int KEY_BITS = 256;
  localparam int WORDS = KEY_BITS / 8;
  localparam int OPW   = 16 * (WORDS + 1);
  localparam int LW    = $clog2(KEY_BITS + 1);

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                start = 1'b0;
  he_op_e              op = OP_EXP;
  mod_sel_e            msel = MOD_N2;
  logic [OPW-1:0]      a = '0, b = '0;
  logic [KEY_BITS-1:0] e = '0;
  logic [LW-1:0]       elen = '0;
  logic [OPW-1:0]      mod_n, mod_n2, mod_n2p2, one_m;
  logic [OPW-1:0]      result;
  logic                busy, done;

  int checks = 0, failures = 0;
  key_t k;

  mont_exp dut (.clk, .rst_n, .start, .op, .msel, .a, .b, .e, .elen,
                .mod_n, .mod_n2, .mod_n2p2, .one_m, .result, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic go(input he_op_e o, input mod_sel_e s, input big_t aa, input big_t bb,
                    input big_t ee, input int len, output big_t res, output int cyc);
    @(negedge clk);
    op = o; msel = s; a = OPW'(aa); b = OPW'(bb); e = KEY_BITS'(ee); elen = LW'(len);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    res = big_t'(result);
  endtask

  task automatic check_exp(input big_t base, input big_t ee, input int len);
    big_t res, want;
    int cyc;
    go(OP_EXP, MOD_N2, to_mont(k, base), '0, ee, len, res, cyc);
    want = to_mont(k, powmod(base, ee & ((big_t'(1) << len) - 1), k.n2));
    checks++;
    if (res % k.n2 != want || res >= (k.n2 << 1)) begin
      failures++;
      $display("FAIL exp: len=%0d", len);
    end
    checks++;
    if (cyc != 1 + len * (WORDS + 3)) begin
      failures++;
      $display("FAIL exp latency %0d, expected %0d", cyc, 1 + len * (WORDS + 3));
    end
  endtask

  task automatic check_mul(input mod_sel_e s);
    big_t res, mm, aa, bb, r;
    int cyc;
    mm = (s == MOD_N) ? k.n : (s == MOD_N2P2) ? k.n2p2 : k.n2;
    r  = big_t'(1) << OPW;
    aa = rand_below(mm << 1);
    bb = rand_below(mm << 1);
    go(OP_MUL, s, aa, bb, '0, 0, res, cyc);
    checks++;
    if (mulmod(res, r, mm) != mulmod(aa, bb, mm) || res >= (mm << 1)) begin
      failures++;
      $display("FAIL mul: msel=%0d", s);
    end
    checks++;
    if (cyc != 1 + (WORDS + 3)) begin
      failures++;
      $display("FAIL mul latency %0d", cyc);
    end
  endtask

  initial begin
    big_t p, q, ones;
    // p = 2^127 - 1 and q = 2^128 - 159 are primes; N has 255 bits.
    p = (big_t'(1) << 127) - 1;
    q = (big_t'(1) << 128) - 159;
    k = make_key(p, q, KEY_BITS);
    mod_n = OPW'(k.n); mod_n2 = OPW'(k.n2); mod_n2p2 = OPW'(k.n2p2); one_m = OPW'(k.r_n2);
    ones = (big_t'(1) << KEY_BITS) - 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3; n++) check_exp(rand_below(k.n2), rand_below(k.n), KEY_BITS);
    check_exp(rand_below(k.n2), ones, KEY_BITS);
    check_exp(rand_below(k.n2), big_t'(1), KEY_BITS);
    for (int n = 0; n < 6; n++) check_exp(rand_below(k.n2), big_t'($urandom), 32);
    check_exp(rand_below(k.n2), big_t'(0), 32);
    check_exp(rand_below(k.n2), big_t'(5), 0);
    for (int n = 0; n < 4; n++) begin
      check_mul(MOD_N2);
      check_mul(MOD_N2P2);
      check_mul(MOD_N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

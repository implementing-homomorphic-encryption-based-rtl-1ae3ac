// tb_plant_interface: self-checking test of the plant interface with a
// reduced 96-bit key (N = (2^31-1)(2^61-1), 92 bits), 3 outputs, 1 input.
//
// The random-number source hands out fresh random r < N whenever rnd_take is
// high; the values are recorded. For every sample it checks each ciphertext
// against an independent Paillier encryption of the sample with the recorded
// random numbers (in Montgomery form, modulo N^2) and that it decrypts back to
// the sample. Encrypted control inputs made by the reference are decrypted by
// the block and compared with the plaintext modulo 2^NP. Also checked: the
// r^N values for the next sample are computed right after an encryption
// (before the next sample arrives), a decryption arriving during that work
// waits only for the r^N exponentiation in progress and is done before the
// remaining ones, and the output handshake under back-pressure.
module tb_plant_interface;
  import he_ref_pkg::*;

  localparam int KEY_BITS = 96;
  localparam int NY = 3;
  localparam int NU = 1;
  localparam int NP = 32;
  localparam int OPW = 16 * (KEY_BITS / 8 + 1);

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic [OPW-1:0]      key_n, key_n2, key_n2p2, key_r_n2, key_nr_n2, key_r2_n2;
  logic [KEY_BITS-1:0] key_lambda;
  logic [OPW-1:0]      key_ninv_r2_n2p2, key_mu_r2_n;
  logic [KEY_BITS-1:0] rnd = '0;
  logic                rnd_take;
  logic                y_valid = 1'b0, y_ready;
  logic [NP-1:0]       y_hat [NY];
  logic                c_valid, c_ready = 1'b0;
  logic [OPW-1:0]      c_ct [NY];
  logic                u_valid = 1'b0, u_ready;
  logic [OPW-1:0]      u_ct [NU];
  logic                act_valid;
  logic [NP-1:0]       u_hat [NU];

  int checks = 0, failures = 0;
  key_t k;
  big_t taken [$];
  int   held_decrypts = 0;
  int   taken_at_act = 0;

  plant_interface #(.KEY_BITS(KEY_BITS), .NY(NY), .NU(NU), .NP(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random number source
  always @(posedge clk) begin
    if (rst_n && rnd_take) begin
      taken.push_back(big_t'(rnd));
      rnd <= KEY_BITS'(rand_below(k.n));
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic encrypt_sample(input int s);
    big_t y [NY];
    for (int i = 0; i < NY; i++) begin
      y[i] = big_t'($urandom);
      y_hat[i] = NP'(y[i]);
    end
    @(negedge clk);
    y_valid = 1'b1;
    while (!y_ready) @(negedge clk);
    @(negedge clk);
    y_valid = 1'b0;
    while (!c_valid) @(negedge clk);
    // hold the output back for a while: it must stay put
    repeat (5) @(negedge clk);
    check(c_valid, "c_valid dropped under back-pressure");
    check(taken.size() >= NY * (s + 1), "random numbers taken");
    for (int i = 0; i < NY; i++) begin
      big_t want;
      want = encrypt_hw(k, y[i], taken[NY * s + i]);
      check(big_t'(c_ct[i]) % k.n2 == want, $sformatf("ciphertext s=%0d i=%0d", s, i));
      check(decrypt_m(k, big_t'(c_ct[i])) == y[i], $sformatf("round trip s=%0d i=%0d", s, i));
    end
    c_ready = 1'b1;
    @(negedge clk);
    c_ready = 1'b0;
  endtask

  task automatic decrypt(input big_t u);
    @(negedge clk);
    u_ct[0] = OPW'(encrypt_m(k, u, rand_below(k.n - 2) + 1));
    u_valid = 1'b1;
    if (dut.x_busy) held_decrypts++;
    while (!u_ready) @(negedge clk);
    @(negedge clk);
    u_valid = 1'b0;
    while (!act_valid) @(negedge clk);
    taken_at_act = taken.size();
    check(u_hat[0] == NP'(u), $sformatf("decryption of %0h", u));
  endtask

  initial begin
    big_t p, q;
    p = (big_t'(1) << 31) - 1;
    q = (big_t'(1) << 61) - 1;
    k = make_key(p, q, KEY_BITS);
    key_n = OPW'(k.n); key_n2 = OPW'(k.n2); key_n2p2 = OPW'(k.n2p2);
    key_r_n2 = OPW'(k.r_n2); key_nr_n2 = OPW'(k.nr_n2); key_r2_n2 = OPW'(k.r2_n2);
    key_lambda = KEY_BITS'(k.lambda); key_ninv_r2_n2p2 = OPW'(k.ninv_r2_n2p2);
    key_mu_r2_n = OPW'(k.mu_r2_n);
    rnd = KEY_BITS'(rand_below(k.n));
    u_ct[0] = '0;
    for (int i = 0; i < NY; i++) y_hat[i] = '0;
    // the reference itself must round-trip
    check(decrypt_m(k, encrypt_m(k, big_t'(12345), big_t'(777))) == big_t'(12345), "reference");
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      encrypt_sample(s);
      // decryption requested while the next r^N values are being computed
      decrypt(big_t'($urandom));
      check(taken_at_act < NY * (s + 2), "decryption done between r^N exponentiations");
      for (int w = 0; w < 20000 && taken.size() < NY * (s + 2); w++) @(negedge clk);
      check(taken.size() == NY * (s + 2), "next r^N values computed after the encryption");
      if (s == 2) decrypt(rand_below(k.n));   // wide plaintext: reduced mod 2^NP
    end
    check(held_decrypts > 0, "a decryption was held behind r^N work");
    $display("held decryptions: %0d", held_decrypts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

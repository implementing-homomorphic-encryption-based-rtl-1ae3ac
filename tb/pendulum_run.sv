// pendulum_run: runs the inverted-pendulum controller through the complete
// encrypted loop (he_control_top) at one key length and checks every control
// input. Used by the key-length sweep.
//
// The controller is the pendulum balance law with coefficients multiplied by
// 2^7 and rounded (A row 4 = [8181 0 10227 0], B = 2^7 [I3; 0],
// C = [-8181 -33 -10717 128]), 32-bit mapped integers and no state reset.
// The reference follows the plaintext through the homomorphic operations
// exactly: every sum and product is taken modulo N, as the ciphertext
// arithmetic does, and only the decrypted result is reduced modulo 2^32. So it
// stays exact for short keys, where the mapped integers outgrow N.
// Samples arrive every PERIOD cycles, the first once the first r^N values
// can be ready; each control input must be out before the next sample, and
// the sample-to-actuation latency must be the same for every sample (the loop
// keeps up with the period instead of falling behind).
// Outputs: done when all samples are checked, the check and failure counts,
// and the sample-to-actuation cycle count of the last sample.
module pendulum_run
  import he_ref_pkg::*;
#(
  parameter int     KEY_BITS = 64,
  parameter int     SAMPLES = 4,
  parameter longint PERIOD = 20000
) (
  output logic   done,
  output int     checks,
  output int     failures,
  output longint last_cycles
);

  localparam int NX = 4, NY = 3, NU = 1, NP = 32;
  localparam int OPW = 16 * (KEY_BITS / 8 + 1);
  // three KEY_BITS-bit exponentiations plus margin
  localparam longint FIRST = 3 * KEY_BITS * (KEY_BITS / 8 + 3) + 1000;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic [OPW-1:0]      key_n, key_n2, key_n2p2, key_r_n2, key_nr_n2, key_r2_n2;
  logic [KEY_BITS-1:0] key_lambda;
  logic [OPW-1:0]      key_ninv_r2_n2p2, key_mu_r2_n;
  logic [NP-1:0]       a_hat [NX][NX];
  logic [NP-1:0]       b_hat [NX][NY];
  logic [NP-1:0]       c_hat [NU][NX];
  logic [KEY_BITS-1:0] rnd = '0;
  logic                rnd_take;
  logic                y_valid = 1'b0, y_ready;
  logic [NP-1:0]       y_hat [NY];
  logic [NP-1:0]       s_hat [NY];
  logic                act_valid;
  logic [NP-1:0]       u_hat [NU];

  longint cycle = 0;
  key_t   k;

  he_control_top #(.KEY_BITS(KEY_BITS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(posedge clk)
    if (rst_n && rnd_take) rnd <= KEY_BITS'(rand_below(k.n));

  initial begin
    big_t p, q;
    big_t x [NX];
    big_t xn [NX];
    big_t e [NY];
    big_t acc, u_ref;
    longint t0, lat0;

    done = 1'b0;
    checks = 0;
    failures = 0;
    last_cycles = 0;
    // known primes for each key length
    case (KEY_BITS)
      64:      begin p = (big_t'(1) << 31) - 1;  q = (big_t'(1) << 32) - 5;   end
      128:     begin p = (big_t'(1) << 61) - 1;  q = (big_t'(1) << 64) - 59;  end
      512:     begin p = (big_t'(1) << 255) - 19; q = (big_t'(1) << 256) - 189; end
      default: begin p = (big_t'(1) << 127) - 1; q = (big_t'(1) << 128) - 159; end
    endcase
    k = make_key(p, q, KEY_BITS);
    key_n = OPW'(k.n); key_n2 = OPW'(k.n2); key_n2p2 = OPW'(k.n2p2);
    key_r_n2 = OPW'(k.r_n2); key_nr_n2 = OPW'(k.nr_n2); key_r2_n2 = OPW'(k.r2_n2);
    key_lambda = KEY_BITS'(k.lambda); key_ninv_r2_n2p2 = OPW'(k.ninv_r2_n2p2);
    key_mu_r2_n = OPW'(k.mu_r2_n);
    rnd = KEY_BITS'(rand_below(k.n));

    for (int i = 0; i < NX; i++) begin
      for (int j = 0; j < NX; j++) a_hat[i][j] = '0;
      for (int j = 0; j < NY; j++) b_hat[i][j] = (i == j) ? NP'(128) : '0;
      x[i] = '0;
    end
    a_hat[3][0] = NP'(8181);
    a_hat[3][2] = NP'(10227);
    c_hat[0][0] = NP'(-8181);
    c_hat[0][1] = NP'(-33);
    c_hat[0][2] = NP'(-10717);
    c_hat[0][3] = NP'(128);
    for (int j = 0; j < NY; j++) begin
      y_hat[j] = '0;
      s_hat[j] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    lat0 = 0;
    for (int smp = 0; smp < SAMPLES; smp++) begin
      while (cycle < FIRST + smp * PERIOD) @(negedge clk);
      for (int j = 0; j < NY; j++) begin
        y_hat[j] = NP'(int'($urandom % 401) - 200);
        s_hat[j] = (j == 1) ? NP'(int'($urandom % 101) - 50) : '0;
      end
      y_valid = 1'b1;
      while (!y_ready) @(negedge clk);
      t0 = cycle;
      @(negedge clk);
      y_valid = 1'b0;

      // plaintext-domain reference, modulo N
      acc = '0;
      for (int j = 0; j < NX; j++) acc = (acc + mulmod(big_t'(c_hat[0][j]), x[j], k.n)) % k.n;
      u_ref = acc;
      for (int j = 0; j < NY; j++)
        e[j] = (mulmod(big_t'({NP{1'b1}}), big_t'(y_hat[j]), k.n) + big_t'(s_hat[j])) % k.n;
      for (int i = 0; i < NX; i++) begin
        acc = '0;
        for (int j = 0; j < NX; j++) acc = (acc + mulmod(big_t'(a_hat[i][j]), x[j], k.n)) % k.n;
        for (int j = 0; j < NY; j++) acc = (acc + mulmod(big_t'(b_hat[i][j]), e[j], k.n)) % k.n;
        xn[i] = acc;
      end
      x = xn;

      while (!act_valid) @(negedge clk);
      last_cycles = cycle - t0;
      checks++;
      if (u_hat[0] != NP'(u_ref)) begin
        failures++;
        $display("FAIL key %0d sample %0d: u=%0h expected %0h", KEY_BITS, smp, u_hat[0], NP'(u_ref));
      end
      if (smp == 0) lat0 = last_cycles;
      checks++;
      if (t0 != FIRST + smp * PERIOD || last_cycles >= PERIOD || last_cycles != lat0) begin
        failures++;
        $display("FAIL key %0d sample %0d: period of %0d cycles not kept (latency %0d)",
                 KEY_BITS, smp, PERIOD, last_cycles);
      end
    end
    done = 1'b1;
  end

endmodule

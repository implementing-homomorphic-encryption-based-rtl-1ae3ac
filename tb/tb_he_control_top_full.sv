// tb_he_control_top_full: the encrypted loop at its full default size: a
// 256-bit-class key (N = (2^127-1)(2^128-159), 255 bits), 4 states, 3 outputs,
// 1 input, 32-bit mapped integers, 7 fractional bits, no state reset.
//
// The controller is the inverted-pendulum balance controller: the state holds
// the last error vector (A rows 1-3 zero, B = [I; 0]) and a fourth state
// formed from it, so velocities come from first differences. Its coefficients
// are those of the design's controller, 125*pi/3072 * [500 0 625] for the
// fourth state row and 125*pi/3072 * [-500 -2 -655] plus 1 for the output,
// multiplied by 2^7 and rounded:
//   A row 4 = [8181 0 10227 0], B = 2^7 [I3; 0], C = [-8181 -33 -10717 128].
// Sensor readings are encoder counts (2048 per revolution) around the
// balanced position. Every decrypted control input is compared with the same
// law evaluated on 32-bit integers. Samples arrive at a fixed period of
// 41,000 cycles, just above the controller's work per sample (35
// exponentiations with 32-bit exponents and 27 products, about 40,600
// cycles); each control input must be out before the next sample, with the
// same latency every time. The latency per sample is printed.
module tb_he_control_top_full;
  import he_ref_pkg::*;

  localparam int KEY_BITS = 256;
  localparam int NX = 4, NY = 3, NU = 1, NP = 32;
  localparam int OPW = 16 * (KEY_BITS / 8 + 1);
  localparam int SAMPLES = 6;
  // sampling period in clock cycles; 2 ms (500 Hz) at a 20.5 MHz clock
  localparam longint PERIOD = 41000;
  // first sample after reset, once the first r^N values are ready
  localparam longint FIRST = 30000;

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

  int checks = 0, failures = 0;
  longint cycle = 0;
  key_t k;

  he_control_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && rnd_take) rnd <= KEY_BITS'(rand_below(k.n));

  initial begin
    big_t p, q;
    logic [NP-1:0] x [NX];
    logic [NP-1:0] xn [NX];
    logic [NP-1:0] e [NY];
    logic [NP-1:0] u_ref, acc;
    longint t0, lat0;
    lat0 = 0;

    p = (big_t'(1) << 127) - 1;
    q = (big_t'(1) << 128) - 159;
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

    for (int smp = 0; smp < SAMPLES; smp++) begin
      while (cycle < FIRST + smp * PERIOD) @(negedge clk);
      for (int j = 0; j < NY; j++) begin
        y_hat[j] = NP'(int'($urandom % 401) - 200);   // encoder counts
        s_hat[j] = (j == 1) ? NP'(int'($urandom % 101) - 50) : '0;
      end
      y_valid = 1'b1;
      while (!y_ready) @(negedge clk);
      t0 = cycle;
      @(negedge clk);
      y_valid = 1'b0;

      u_ref = '0;
      for (int j = 0; j < NX; j++) u_ref = NP'(u_ref + c_hat[0][j] * x[j]);
      for (int j = 0; j < NY; j++) e[j] = NP'(s_hat[j] - y_hat[j]);
      for (int i = 0; i < NX; i++) begin
        acc = '0;
        for (int j = 0; j < NX; j++) acc = NP'(acc + a_hat[i][j] * x[j]);
        for (int j = 0; j < NY; j++) acc = NP'(acc + b_hat[i][j] * e[j]);
        xn[i] = acc;
      end
      x = xn;

      while (!act_valid) @(negedge clk);
      checks++;
      if (u_hat[0] != u_ref) begin
        failures++;
        $display("FAIL sample %0d: u=%0d expected %0d", smp, $signed(u_hat[0]), $signed(u_ref));
      end
      $display("sample %0d: mapped u=%0d, sample-to-actuation %0d cycles",
               smp, $signed(u_hat[0]), cycle - t0);
      // the control input must be out before the next sampling instant
      checks++;
      if (smp == 0) lat0 = cycle - t0;
      if (t0 != FIRST + smp * PERIOD || cycle - t0 >= PERIOD || cycle - t0 != lat0) begin
        failures++;
        $display("FAIL sample %0d: period of %0d cycles not met", smp, PERIOD);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

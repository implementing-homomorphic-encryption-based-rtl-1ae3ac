// tb_he_control_top: end-to-end test of the encrypted control loop at reduced
// size: 96-bit key (N = (2^31-1)(2^61-1)), 4 states, 3 outputs, 1 input,
// 16-bit mapped integers, 3 fractional bits, state reset every 3 samples.
//
// The test plays the plant: it offers plaintext sensor samples and setpoints,
// supplies random numbers on request, and waits for the decrypted control
// input before the next sample (sample and hold). Every control input is
// compared with the control law evaluated on plaintext integers modulo 2^NP
// (one-sample delay: u[k] = C x[k]). It counts how often each mechanism of the
// loop occurred and fails if one never did: encryption, decryption,
// r^N precomputation overlapping controller work, state reset, shifted B,
// and back-pressure on the network link towards the controller.
module tb_he_control_top;
  import he_ref_pkg::*;

  localparam int KEY_BITS = 96;
  localparam int NX = 4, NY = 3, NU = 1, NP = 16, MFRAC = 3, T_RESET = 3;
  localparam int OPW = 16 * (KEY_BITS / 8 + 1);
  localparam int SAMPLES = 8;

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
  int n_enc = 0, n_dec = 0, n_overlap = 0, n_reset = 0, n_shift = 0, n_stall = 0;
  key_t k;

  he_control_top #(.KEY_BITS(KEY_BITS), .NX(NX), .NY(NY), .NU(NU), .NP(NP),
                   .MFRAC(MFRAC), .T_RESET(T_RESET)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random number source and mechanism counters
  always @(posedge clk) begin
    if (rst_n) begin
      if (rnd_take) rnd <= KEY_BITS'(rand_below(k.n));
      if (dut.u_pi.c_valid && dut.u_pi.c_ready) n_enc++;
      if (act_valid) n_dec++;
      if (rnd_take && dut.u_ctrl.x_busy) n_overlap++;
      if (dut.u_ctrl.kmod_clr) n_reset++;
      if (dut.u_ctrl.kmod_inc && dut.u_ctrl.kmod != '0) n_shift++;
      if (dut.u_net_up.out_valid && !dut.u_net_up.out_ready) n_stall++;
    end
  end

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end
    $display("%s: %0d", what, count);
  endtask

  initial begin
    big_t p, q;
    logic [NP-1:0] x [NX];
    logic [NP-1:0] xn [NX];
    logic [NP-1:0] e [NY];
    logic [NP-1:0] u_ref, acc;
    int kmod;

    p = (big_t'(1) << 31) - 1;
    q = (big_t'(1) << 61) - 1;
    k = make_key(p, q, KEY_BITS);
    key_n = OPW'(k.n); key_n2 = OPW'(k.n2); key_n2p2 = OPW'(k.n2p2);
    key_r_n2 = OPW'(k.r_n2); key_nr_n2 = OPW'(k.nr_n2); key_r2_n2 = OPW'(k.r2_n2);
    key_lambda = KEY_BITS'(k.lambda); key_ninv_r2_n2p2 = OPW'(k.ninv_r2_n2p2);
    key_mu_r2_n = OPW'(k.mu_r2_n);
    rnd = KEY_BITS'(rand_below(k.n));
    for (int i = 0; i < NX; i++) begin
      for (int j = 0; j < NX; j++) a_hat[i][j] = NP'($urandom);
      for (int j = 0; j < NY; j++) b_hat[i][j] = NP'($urandom);
      x[i] = '0;
    end
    for (int j = 0; j < NX; j++) c_hat[0][j] = NP'($urandom);
    for (int j = 0; j < NY; j++) begin
      y_hat[j] = '0;
      s_hat[j] = '0;
    end
    kmod = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int smp = 0; smp < SAMPLES; smp++) begin
      @(negedge clk);
      for (int j = 0; j < NY; j++) begin
        y_hat[j] = NP'($urandom);
        s_hat[j] = NP'($urandom);
      end
      y_valid = 1'b1;
      while (!y_ready) @(negedge clk);
      @(negedge clk);
      y_valid = 1'b0;

      u_ref = '0;
      for (int j = 0; j < NX; j++) u_ref = NP'(u_ref + c_hat[0][j] * x[j]);
      if (kmod == T_RESET - 1) begin
        for (int i = 0; i < NX; i++) x[i] = '0;
        kmod = 0;
      end else begin
        for (int j = 0; j < NY; j++) e[j] = NP'(s_hat[j] - y_hat[j]);
        for (int i = 0; i < NX; i++) begin
          acc = '0;
          for (int j = 0; j < NX; j++) acc = NP'(acc + a_hat[i][j] * x[j]);
          for (int j = 0; j < NY; j++)
            acc = NP'(acc + NP'(b_hat[i][j] << (kmod * MFRAC)) * e[j]);
          xn[i] = acc;
        end
        x = xn;
        kmod++;
      end

      while (!act_valid) @(negedge clk);
      checks++;
      if (u_hat[0] != u_ref) begin
        failures++;
        $display("FAIL sample %0d: u=%0h expected %0h", smp, u_hat[0], u_ref);
      end
    end
    need(n_enc, "encryptions");
    need(n_dec, "decryptions");
    need(n_overlap, "r^N work during controller work");
    need(n_reset, "controller state resets");
    need(n_shift, "updates with shifted B");
    need(n_stall, "network back-pressure cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_secure_controller: self-checking test of the encrypted controller with a
// reduced 96-bit key (N = (2^31-1)(2^61-1)), 4 states, 3 inputs, 1 output,
// 8-bit mapped integers, 3 fractional bits and a reset period of 3 samples.
//
// Random controller matrices, setpoints and plant outputs are used. Plant
// outputs are encrypted by the reference model, the controller's encrypted
// output is decrypted by the reference model and compared, modulo 2^NP, with
// the same control law evaluated directly on plaintext integers:
//   u = C x;  x <- A x + (B << (k mod T)*MFRAC) (s - y), or 0 at a reset.
// The numbers stay far below N, so the encrypted result must match exactly.
// It also counts state resets and updates that used a shifted B, and fails
// if either never happened.
module tb_secure_controller;
  import he_ref_pkg::*;

  localparam int KEY_BITS = 96;
  localparam int NX = 4, NY = 3, NU = 1, NP = 8, MFRAC = 3, T_RESET = 3;
  localparam int OPW = 16 * (KEY_BITS / 8 + 1);
  localparam int SAMPLES = 8;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic [OPW-1:0] key_n2, key_r_n2, key_nr_n2, key_r2_n2;
  logic [NP-1:0]  a_hat [NX][NX];
  logic [NP-1:0]  b_hat [NX][NY];
  logic [NP-1:0]  c_hat [NU][NX];
  logic           y_valid = 1'b0, y_ready;
  logic [OPW-1:0] y_ct [NY];
  logic [NP-1:0]  s_hat [NY];
  logic           u_valid, u_ready = 1'b0;
  logic [OPW-1:0] u_ct [NU];

  int checks = 0, failures = 0;
  int resets = 0, shifted_updates = 0;
  key_t k;

  secure_controller #(.KEY_BITS(KEY_BITS), .NX(NX), .NY(NY), .NU(NU), .NP(NP),
                      .MFRAC(MFRAC), .T_RESET(T_RESET)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && dut.kmod_clr) resets++;
    if (rst_n && dut.kmod_inc && dut.kmod != '0) shifted_updates++;
  end

  initial begin
    big_t p, q;
    logic [NP-1:0] x [NX];
    logic [NP-1:0] xn [NX];
    logic [NP-1:0] y [NY];
    logic [NP-1:0] e [NY];
    logic [NP-1:0] u_ref, acc;
    int kmod;

    p = (big_t'(1) << 31) - 1;
    q = (big_t'(1) << 61) - 1;
    k = make_key(p, q, KEY_BITS);
    key_n2 = OPW'(k.n2); key_r_n2 = OPW'(k.r_n2);
    key_nr_n2 = OPW'(k.nr_n2); key_r2_n2 = OPW'(k.r2_n2);
    for (int i = 0; i < NX; i++) begin
      for (int j = 0; j < NX; j++) a_hat[i][j] = NP'($urandom);
      for (int j = 0; j < NY; j++) b_hat[i][j] = NP'($urandom);
      x[i] = '0;
    end
    for (int i = 0; i < NU; i++)
      for (int j = 0; j < NX; j++) c_hat[i][j] = NP'($urandom);
    for (int j = 0; j < NY; j++) begin
      y_ct[j] = '0;
      s_hat[j] = '0;
    end
    kmod = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int smp = 0; smp < SAMPLES; smp++) begin
      // plant outputs and setpoints
      @(negedge clk);
      for (int j = 0; j < NY; j++) begin
        y[j] = NP'($urandom);
        s_hat[j] = NP'($urandom);
        y_ct[j] = OPW'(encrypt_m(k, big_t'(y[j]), rand_below(k.n - 2) + 1));
      end
      y_valid = 1'b1;
      while (!y_ready) @(negedge clk);
      @(negedge clk);
      y_valid = 1'b0;

      // reference control output from the current state
      u_ref = '0;
      for (int j = 0; j < NX; j++) u_ref = NP'(u_ref + c_hat[0][j] * x[j]);

      while (!u_valid) @(negedge clk);
      repeat (3) @(negedge clk);       // the network takes it a little later
      checks++;
      if (NP'(decrypt_m(k, big_t'(u_ct[0]))) != u_ref) begin
        failures++;
        $display("FAIL sample %0d: u=%0h expected %0h", smp,
                 NP'(decrypt_m(k, big_t'(u_ct[0]))), u_ref);
      end
      u_ready = 1'b1;
      @(negedge clk);
      u_ready = 1'b0;

      // reference state update
      if (kmod == T_RESET - 1) begin
        for (int i = 0; i < NX; i++) x[i] = '0;
        kmod = 0;
      end else begin
        for (int j = 0; j < NY; j++) e[j] = NP'(s_hat[j] - y[j]);
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
    end
    // let the last state update finish, then check the state count
    while (!y_ready) @(negedge clk);
    checks++;
    if (resets == 0) begin failures++; $display("FAIL no state reset happened"); end
    checks++;
    if (shifted_updates == 0) begin failures++; $display("FAIL B was never shifted"); end
    $display("resets=%0d shifted updates=%0d", resets, shifted_updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

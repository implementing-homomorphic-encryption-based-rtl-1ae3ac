// secure_controller: linear dynamic controller evaluated on Paillier
// ciphertexts, with periodic state reset.
//
// Controller (all values are NP-bit mapped integers, arithmetic mod 2^NP in
// the plaintext domain, carried out homomorphically on ciphertexts mod N^2):
//   u[k]   = C x[k]
//   x[k+1] = A x[k] + B[k] (s[k] - y[k])   if (k+1) mod T != 0
//   x[k+1] = 0                             if (k+1) mod T == 0
// A plaintext constant a times a ciphertext is the modular power c^a, and a
// ciphertext sum is a modular product, so every term is one Montgomery
// exponentiation (NP-bit exponent) and every sum one Montgomery multiplication.
// The error s - y is formed as y^(2^NP - 1) * s. The setpoints arrive as
// plaintext and are encrypted here without randomisation, E(s) = N s + 1.
// B[k] = B << ((k mod T) * MFRAC) mod 2^NP keeps the fixed-point scaling of
// the state consistent between resets; with T_RESET = 0 the state is never
// reset and B is used as given; no counter is then built, and its two
// control signals kmod_clr and kmod_inc are left without a load.
//
// One sample, on arrival of the encrypted outputs y (a single exponentiator
// does everything in sequence):
//   1. encrypt the NY setpoints (2 multiplications each);
//   2. u_i = prod_j x_j^C_ij (NU*NX exponentiations), u sent as soon as done;
//   3. reset the state to E(0) = R mod N^2 if this step ends a reset period,
//      otherwise: e_i = y_i^(2^NP-1) * s_i, then
//      x'_i = prod_j x_j^A_ij * prod_j e_j^B[k]_ij into a shadow register set,
//      which is copied to the state once all rows are done.
// Products are accumulated as each power is produced rather than after all
// powers are formed, which needs one accumulator instead of a table of powers.
//
// Interface: y_valid/y_ready/y_ct take the encrypted outputs (Montgomery form)
// together with the plaintext setpoints s_hat; u_valid/u_ready/u_ct carry the
// encrypted control inputs (Montgomery form). The matrices and key constants
// are inputs that must stay stable. After reset the block spends one cycle
// loading E(0) into the state.
//
// The control law, the homomorphic operations, the setpoint encryption inside
// the controller and the use of one exponentiator follow the design; the order
// of accumulation, the shadow state registers and the handshakes are this
// design's choices.
module secure_controller
  import he_pkg::*;
#(
  parameter int KEY_BITS = 256,   // bits of N
  parameter int NX = 4,           // controller states
  parameter int NY = 3,           // controller inputs (errors)
  parameter int NU = 1,           // control outputs
  parameter int NP = 32,          // n': bits of the mapped plaintext integers
  parameter int MFRAC = 7,        // m: fractional bits
  parameter int T_RESET = 0,      // reset period T in samples, 0 = never
  localparam int OPW = WORD * (KEY_BITS / 8 + 1),
  localparam int LW  = $clog2(KEY_BITS + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // public key constants
  input  logic [OPW-1:0] key_n2,      // N^2
  input  logic [OPW-1:0] key_r_n2,    // R mod N^2 (encrypted zero, Montgomery form)
  input  logic [OPW-1:0] key_nr_n2,   // N R mod N^2
  input  logic [OPW-1:0] key_r2_n2,   // R^2 mod N^2
  // controller matrices (mapped integers)
  input  logic [NP-1:0]  a_hat [NX][NX],
  input  logic [NP-1:0]  b_hat [NX][NY],
  input  logic [NP-1:0]  c_hat [NU][NX],
  // encrypted plant outputs and plaintext setpoints
  input  logic           y_valid,
  output logic           y_ready,
  input  logic [OPW-1:0] y_ct [NY],
  input  logic [NP-1:0]  s_hat [NY],
  // encrypted control inputs
  output logic           u_valid,
  input  logic           u_ready,
  output logic [OPW-1:0] u_ct [NU]
);

  localparam int NC  = NX + NY;                       // columns of [A B]
  localparam int JW  = $clog2(NC + 1);
  localparam int XIW = (NX > 1) ? $clog2(NX) : 1;
  localparam int YIW = (NY > 1) ? $clog2(NY) : 1;
  localparam int UIW = (NU > 1) ? $clog2(NU) : 1;
  localparam int IW  = JW;
  localparam int KW  = (T_RESET > 1) ? $clog2(T_RESET) : 1;

  typedef enum logic [2:0] {
    C_INIT, C_IDLE, C_SP, C_U, C_UOUT, C_ERR, C_UPD, C_COMMIT
  } cstate_e;

  cstate_e        st;
  logic           issued, step;
  logic [IW-1:0]  i;
  logic [JW-1:0]  j;
  logic [KW-1:0]  kmod;          // k mod T
  logic [OPW-1:0] v, acc;

  logic [OPW-1:0] xs [NX];       // state x[k]
  logic [OPW-1:0] xn [NX];       // next state, being formed
  logic [OPW-1:0] y_buf [NY];
  logic [NP-1:0]  s_buf [NY];
  logic [OPW-1:0] sp [NY];       // encrypted setpoints
  logic [OPW-1:0] es [NY];       // encrypted errors
  logic [OPW-1:0] u_acc [NU];

  // resource task
  logic                x_start, x_done, x_busy;
  he_op_e              x_op;
  mod_sel_e            x_msel;
  logic [OPW-1:0]      x_a, x_b, x_res;
  logic [KEY_BITS-1:0] x_e;
  logic [LW-1:0]       x_len;

  logic                last_col, last_row;
  logic                reset_now, kmod_clr, kmod_inc;
  logic [NP-1:0]       b_k;      // B[k]_ij for the current i, j

  assign x_start = !issued && (st == C_SP || st == C_U || st == C_ERR || st == C_UPD);
  assign y_ready = (st == C_IDLE);

  always_comb begin
    b_k = '0;
    if (st == C_UPD && j >= JW'(NX))
      b_k = NP'(b_hat[XIW'(i)][YIW'(j - JW'(NX))] << (32'(kmod) * MFRAC));
  end

  // Operation issued in each state and step (the operand select of the
  // controller: sensor data, setpoints or fed-back state).
  always_comb begin
    x_op   = OP_MUL;
    x_msel = MOD_N2;
    x_a    = acc;
    x_b    = v;
    x_e    = '0;
    x_len  = '0;
    unique case (st)
      C_SP: if (!step) begin
        x_a = key_nr_n2;
        x_b = OPW'(s_buf[YIW'(i)]);
      end else begin
        x_a = v + OPW'(1);
        x_b = key_r2_n2;
      end
      C_U: if (!step) begin
        x_op  = OP_EXP;
        x_a   = xs[XIW'(j)];
        x_e   = KEY_BITS'(c_hat[UIW'(i)][XIW'(j)]);
        x_len = LW'(NP);
      end
      C_ERR: if (!step) begin
        x_op  = OP_EXP;
        x_a   = y_buf[YIW'(i)];
        x_e   = KEY_BITS'({NP{1'b1}});
        x_len = LW'(NP);
      end else begin
        x_a = v;
        x_b = sp[YIW'(i)];
      end
      C_UPD: if (!step) begin
        x_op  = OP_EXP;
        x_len = LW'(NP);
        if (j < JW'(NX)) begin
          x_a = xs[XIW'(j)];
          x_e = KEY_BITS'(a_hat[XIW'(i)][XIW'(j)]);
        end else begin
          x_a = es[YIW'(j - JW'(NX))];
          x_e = KEY_BITS'(b_k);
        end
      end
      default: ;
    endcase
  end

  always_comb begin
    last_col = 1'b0;
    last_row = 1'b0;
    unique case (st)
      C_SP, C_ERR: last_row = (i == IW'(NY - 1));
      C_U: begin
        last_col = (j == JW'(NX - 1));
        last_row = (i == IW'(NU - 1));
      end
      C_UPD: begin
        last_col = (j == JW'(NC - 1));
        last_row = (i == IW'(NX - 1));
      end
      default: ;
    endcase
  end

  // k mod T: the sample counter within the reset period (constant 0 when the
  // state is never reset).
  assign reset_now = (T_RESET > 0) && (32'(kmod) == T_RESET - 1);
  assign kmod_clr  = (st == C_UOUT) && (!u_valid || u_ready) && reset_now;
  assign kmod_inc  = (st == C_COMMIT);

  if (T_RESET > 0) begin : g_kmod
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        kmod <= '0;
      else if (kmod_clr) kmod <= '0;
      else if (kmod_inc) kmod <= kmod + 1'b1;
    end
  end else begin : g_no_kmod
    assign kmod = '0;
  end

  mont_exp #(.KEY_BITS(KEY_BITS)) u_exp (
    .clk, .rst_n,
    .start(x_start), .op(x_op), .msel(x_msel),
    .a(x_a), .b(x_b), .e(x_e), .elen(x_len),
    // only N^2 is used here; the other modulus inputs are never selected
    .mod_n(key_n2), .mod_n2(key_n2), .mod_n2p2(key_n2), .one_m(key_r_n2),
    .result(x_res), .busy(x_busy), .done(x_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= C_INIT;
      issued  <= 1'b0;
      step    <= 1'b0;
      i       <= '0;
      j       <= '0;
      v       <= '0;
      acc     <= '0;
      u_valid <= 1'b0;
      for (int n = 0; n < NX; n++) begin
        xs[n] <= '0;
        xn[n] <= '0;
      end
      for (int n = 0; n < NY; n++) begin
        y_buf[n] <= '0;
        s_buf[n] <= '0;
        sp[n]    <= '0;
        es[n]    <= '0;
      end
      for (int n = 0; n < NU; n++) begin
        u_acc[n] <= '0;
        u_ct[n]  <= '0;
      end
    end else begin
      if (x_start) issued <= 1'b1;
      if (u_valid && u_ready) u_valid <= 1'b0;

      unique case (st)
        C_INIT: begin
          for (int n = 0; n < NX; n++) xs[n] <= key_r_n2;
          st <= C_IDLE;
        end

        C_IDLE: if (y_valid) begin
          y_buf <= y_ct;
          s_buf <= s_hat;
          i     <= '0;
          j     <= '0;
          step  <= 1'b0;
          st    <= C_SP;
        end

        C_SP: if (x_done) begin
          issued <= 1'b0;
          v      <= x_res;
          step   <= !step;
          if (step) begin
            sp[YIW'(i)] <= x_res;
            if (last_row) begin
              i  <= '0;
              st <= C_U;
            end else i <= i + 1'b1;
          end
        end

        C_ERR: if (x_done) begin
          issued <= 1'b0;
          v      <= x_res;
          step   <= !step;
          if (step) begin
            es[YIW'(i)] <= x_res;
            if (last_row) begin
              i  <= '0;
              j  <= '0;
              st <= C_UPD;
            end else i <= i + 1'b1;
          end
        end

        // Inner products: C_U for u = C x, C_UPD for x' = [A B] [x; e].
        C_U, C_UPD: if (x_done) begin
          issued <= 1'b0;
          v      <= x_res;
          if (!step && j != '0) begin
            step <= 1'b1;                  // fold this power into the sum
          end else begin
            step <= 1'b0;
            acc  <= x_res;
            if (last_col) begin
              if (st == C_U) u_acc[UIW'(i)] <= x_res;
              else           xn[XIW'(i)]    <= x_res;
              j <= '0;
              if (last_row) begin
                i  <= '0;
                st <= (st == C_U) ? C_UOUT : C_COMMIT;
              end else i <= i + 1'b1;
            end else j <= j + 1'b1;
          end
        end

        C_UOUT: if (!u_valid || u_ready) begin
          u_ct    <= u_acc;
          u_valid <= 1'b1;
          if (reset_now) begin
            for (int n = 0; n < NX; n++) xs[n] <= key_r_n2;
            st <= C_IDLE;
          end else begin
            i    <= '0;
            step <= 1'b0;
            st   <= C_ERR;
          end
        end

        C_COMMIT: begin
          xs <= xn;
          st <= C_IDLE;
        end

        default: st <= C_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) x_start |-> !x_busy)
    else $error("secure_controller: task issued while resources busy");

endmodule

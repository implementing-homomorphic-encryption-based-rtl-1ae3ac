// plant_interface: Paillier encryption of sensor samples and decryption of
// control inputs next to the plant, sharing one Montgomery exponentiator.
//
// Three tasks are sequenced by the interface's control unit onto one mont_exp
// (two Montgomery multipliers), all values in Montgomery form with R the
// common radix:
//   randomiser  z_i = MONTEXP(r_i, N)            (r_i used as is: it is the
//               Montgomery form of r_i R^-1, itself uniform in Z_N)
//   encryption  v1 = MM_N2(N R mod N^2, y_i)    = N*y_i
//               v2 = MM_N2(v1 + 1, R^2 mod N^2) = (N*y_i + 1) in Montgomery form
//               c_i = MM_N2(z_i, v2)            = (N*y_i + 1) r_i^N, Montgomery form
//               (the binomial shortcut (N+1)^y = N*y + 1 mod N^2)
//   decryption  v1 = MONTEXP(c, lambda);  v2 = MM_N2(v1, 1)          = c^lambda mod N^2
//               v3 = MM_N2P2(v2 - 1, N^-1 R^2 mod (N^2+2))          exact division by N
//               v4 = MM_N2P2(v3, 1);  v5 = MM_N(v4, mu R^2 mod N);  u = MM_N(v5, 1) mod 2^NP
// One r^N value per sensor output is computed in each sampling period; they
// are computed ahead, right after the previous encryption, so that they
// overlap the controller's work. Scheduling when idle: a pending decryption
// first, then a pending sample (once its r^N values are ready), then the next
// missing r^N value. A task (one r^N value, one encryption of all outputs or
// one decryption of all inputs) runs to its end once started, so a decryption
// waits for at most one r^N exponentiation.
//
// Interface (all handshakes: a transfer happens in a cycle with valid and
// ready both high):
//   y_valid/y_ready/y_hat   plaintext sensor samples (NP-bit mapped integers)
//   rnd/rnd_take            random r < N; sampled in the cycle rnd_take is high
//   c_valid/c_ready/c_ct    encrypted samples towards the network, Montgomery form
//   u_valid/u_ready/u_ct    encrypted control inputs from the network
//   act_valid/u_hat         decrypted control inputs, act_valid pulses one cycle
// Key constants are inputs and must be stable while the block runs.
//
// The three algorithms and the sharing of one exponentiator follow the design;
// the scheduling order, the one-sample input buffers and the handshakes are
// this design's choices.
module plant_interface
  import he_pkg::*;
#(
  parameter int KEY_BITS = 256,   // bits of N
  parameter int NY = 3,           // sensor outputs encrypted per sample
  parameter int NU = 1,           // control inputs decrypted per sample
  parameter int NP = 32,          // n': bits of the mapped plaintext integers
  localparam int OPW = WORD * (KEY_BITS / 8 + 1),
  localparam int LW  = $clog2(KEY_BITS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // public key constants
  input  logic [OPW-1:0]      key_n,             // N
  input  logic [OPW-1:0]      key_n2,            // N^2
  input  logic [OPW-1:0]      key_n2p2,          // N^2 + 2
  input  logic [OPW-1:0]      key_r_n2,          // R mod N^2
  input  logic [OPW-1:0]      key_nr_n2,         // N R mod N^2
  input  logic [OPW-1:0]      key_r2_n2,         // R^2 mod N^2
  // private key constants
  input  logic [KEY_BITS-1:0] key_lambda,        // lambda = lcm(p-1, q-1)
  input  logic [OPW-1:0]      key_ninv_r2_n2p2,  // N^-1 R^2 mod (N^2 + 2)
  input  logic [OPW-1:0]      key_mu_r2_n,       // mu R^2 mod N
  // random numbers
  input  logic [KEY_BITS-1:0] rnd,
  output logic                rnd_take,
  // sensor side
  input  logic                y_valid,
  output logic                y_ready,
  input  logic [NP-1:0]       y_hat [NY],
  // network, towards controller
  output logic                c_valid,
  input  logic                c_ready,
  output logic [OPW-1:0]      c_ct [NY],
  // network, from controller
  input  logic                u_valid,
  output logic                u_ready,
  input  logic [OPW-1:0]      u_ct [NU],
  // actuator side
  output logic                act_valid,
  output logic [NP-1:0]       u_hat [NU]
);

  localparam int NMAX = (NY > NU) ? NY : NU;
  localparam int IW   = (NMAX > 1) ? $clog2(NMAX) : 1;
  localparam int UIW  = (NU > 1) ? $clog2(NU) : 1;

  typedef enum logic [3:0] {
    P_IDLE,
    P_RND,
    P_ENC1, P_ENC2, P_ENC3,
    P_DEC1, P_DEC2, P_DEC3, P_DEC4, P_DEC5, P_DEC6
  } pstate_e;

  pstate_e        st;
  logic           issued;
  logic [IW-1:0]  idx;
  logic [OPW-1:0] v;

  logic [NP-1:0]  y_buf [NY];
  logic           y_pend;
  logic [OPW-1:0] u_buf [NU];
  logic           u_pend;
  logic [OPW-1:0] z [NY];
  logic [IW:0]    zcnt;      // r^N values ready for the next sample
  logic           z_valid;

  // resource task
  logic                x_start, x_done, x_busy;
  he_op_e              x_op;
  mod_sel_e            x_msel;
  logic [OPW-1:0]      x_a, x_b, x_res;
  logic [KEY_BITS-1:0] x_e;
  logic [LW-1:0]       x_len;

  assign x_start  = (st != P_IDLE) && !issued;
  assign rnd_take = x_start && (st == P_RND);
  assign y_ready  = !y_pend;
  assign u_ready  = !u_pend;
  assign z_valid  = (zcnt == (IW+1)'(NY));

  always_comb begin
    x_op   = OP_MUL;
    x_msel = MOD_N2;
    x_a    = v;
    x_b    = OPW'(1);
    x_e    = '0;
    x_len  = '0;
    unique case (st)
      P_RND: begin
        x_op  = OP_EXP;
        x_a   = OPW'(rnd);
        x_e   = key_n[KEY_BITS-1:0];
        x_len = LW'(KEY_BITS);
      end
      P_ENC1: begin x_a = key_nr_n2; x_b = OPW'(y_buf[idx]); end
      P_ENC2: begin x_a = v + OPW'(1); x_b = key_r2_n2; end
      P_ENC3: begin x_a = z[idx]; x_b = v; end
      P_DEC1: begin
        x_op  = OP_EXP;
        x_a   = u_buf[UIW'(idx)];
        x_e   = key_lambda;
        x_len = LW'(KEY_BITS);
      end
      P_DEC2: ;
      P_DEC3: begin x_msel = MOD_N2P2; x_a = v - OPW'(1); x_b = key_ninv_r2_n2p2; end
      P_DEC4: x_msel = MOD_N2P2;
      P_DEC5: begin x_msel = MOD_N; x_b = key_mu_r2_n; end
      P_DEC6: x_msel = MOD_N;
      default: ;
    endcase
  end

  mont_exp #(.KEY_BITS(KEY_BITS)) u_exp (
    .clk, .rst_n,
    .start(x_start), .op(x_op), .msel(x_msel),
    .a(x_a), .b(x_b), .e(x_e), .elen(x_len),
    .mod_n(key_n), .mod_n2(key_n2), .mod_n2p2(key_n2p2), .one_m(key_r_n2),
    .result(x_res), .busy(x_busy), .done(x_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= P_IDLE;
      issued    <= 1'b0;
      idx       <= '0;
      v         <= '0;
      y_pend    <= 1'b0;
      u_pend    <= 1'b0;
      zcnt      <= '0;
      c_valid   <= 1'b0;
      act_valid <= 1'b0;
      for (int i = 0; i < NY; i++) begin
        y_buf[i] <= '0;
        z[i]     <= '0;
        c_ct[i]  <= '0;
      end
      for (int i = 0; i < NU; i++) begin
        u_buf[i] <= '0;
        u_hat[i] <= '0;
      end
    end else begin
      act_valid <= 1'b0;
      if (x_start) issued <= 1'b1;

      // input buffers and output slot
      if (y_valid && y_ready) begin
        y_buf  <= y_hat;
        y_pend <= 1'b1;
      end
      if (u_valid && u_ready) begin
        u_buf  <= u_ct;
        u_pend <= 1'b1;
      end
      if (c_valid && c_ready) c_valid <= 1'b0;

      unique case (st)
        P_IDLE: begin
          idx <= '0;
          if (u_pend)                          st <= P_DEC1;
          else if (y_pend && z_valid && !c_valid) st <= P_ENC1;
          else if (!z_valid)                   st <= P_RND;
        end
        default: if (x_done) begin
          issued <= 1'b0;
          v      <= x_res;
          unique case (st)
            P_RND: begin
              z[IW'(zcnt)] <= x_res;
              zcnt         <= zcnt + 1'b1;
              st           <= P_IDLE;
            end
            P_ENC1: st <= P_ENC2;
            P_ENC2: st <= P_ENC3;
            P_ENC3: begin
              c_ct[idx] <= x_res;
              if (idx == IW'(NY - 1)) begin
                c_valid <= 1'b1;
                zcnt    <= '0;
                y_pend  <= 1'b0;
                st      <= P_IDLE;
              end else begin
                idx <= idx + 1'b1;
                st  <= P_ENC1;
              end
            end
            P_DEC1: st <= P_DEC2;
            P_DEC2: st <= P_DEC3;
            P_DEC3: st <= P_DEC4;
            P_DEC4: st <= P_DEC5;
            P_DEC5: st <= P_DEC6;
            P_DEC6: begin
              u_hat[UIW'(idx)] <= x_res[NP-1:0];
              if (idx == IW'(NU - 1)) begin
                act_valid <= 1'b1;
                u_pend    <= 1'b0;
                st        <= P_IDLE;
              end else begin
                idx <= idx + 1'b1;
                st  <= P_DEC1;
              end
            end
            default: st <= P_IDLE;
          endcase
        end
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) x_start |-> !x_busy)
    else $error("plant_interface: task issued while resources busy");

endmodule

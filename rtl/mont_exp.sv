// mont_exp: Montgomery exponentiator (right-to-left binary method) built from
// two Montgomery multipliers, which also serves single multiplications.
//
// Exponentiation (op = OP_EXP): with the base a = B in Montgomery form
// (B = bR mod N^2) and the exponent e, it returns P = b^e R mod N^2 (possibly
// plus N^2). The power register starts at one_m = R mod N^2. Each iteration
// starts both multipliers together: one squares the base (B <- B*B), the other
// forms P*B, and the low bit of the exponent shift register chooses whether
// the power register takes that product or keeps its value. The exponent is
// then shifted right. The number of iterations is elen, so the latency depends
// only on elen and not on the exponent's bit pattern.
//
// Multiplication (op = OP_MUL): the squaring multiplier computes a*b*R^-1 with
// the modulus chosen by msel (N^2, N^2 + 2 or N), so the same resources do the
// single multiplications that encryption, decryption and the homomorphic sums
// need.
//
// Interface: pulse start in a cycle with busy low; the inputs are sampled then.
// done pulses for one cycle with result valid; result holds until the next
// start. Latency from start to done: OP_MUL 1 + (WORDS+3) cycles, OP_EXP
// 1 + elen*(WORDS+3) cycles (1 cycle when elen is 0).
//
// The algorithm, the two parallel multipliers, the power memory and exponent
// shift register follow the design; the handshake, the elen input and the
// reuse of the squaring multiplier for single products as wired here are this
// design's choices.
module mont_exp
  import he_pkg::*;
#(
  parameter int KEY_BITS = 256,
  localparam int WORDS = KEY_BITS / 8,
  localparam int OPW   = WORD * (WORDS + 1),
  localparam int LW    = $clog2(KEY_BITS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // task
  input  logic                start,
  input  he_op_e              op,
  input  mod_sel_e            msel,
  input  logic [OPW-1:0]      a,        // base (EXP) or first factor (MUL)
  input  logic [OPW-1:0]      b,        // second factor (MUL)
  input  logic [KEY_BITS-1:0] e,        // exponent (EXP)
  input  logic [LW-1:0]       elen,     // exponent bits to process (EXP)
  // key constants
  input  logic [OPW-1:0]      mod_n,
  input  logic [OPW-1:0]      mod_n2,
  input  logic [OPW-1:0]      mod_n2p2,
  input  logic [OPW-1:0]      one_m,    // R mod N^2
  // result
  output logic [OPW-1:0]      result,
  output logic                busy,
  output logic                done
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e state;

  he_op_e              op_r;
  mod_sel_e            msel_r;
  logic [OPW-1:0]      base_r;   // base B (EXP) or X (MUL)
  logic [OPW-1:0]      pow_r;    // power memory P (EXP) or Y (MUL)
  logic [KEY_BITS-1:0] esh;      // exponent shift register
  logic [LW-1:0]       left;     // iterations still to do

  logic                mm_start;
  logic [OPW-1:0]      ma_m, ma_y, ta, tb;
  logic                ma_done, mb_done, ma_busy, mb_busy;

  assign mm_start = (state == S_ISSUE);
  assign busy     = (state != S_IDLE);

  always_comb begin
    if (op_r == OP_EXP) begin
      ma_m = mod_n2;
      ma_y = base_r;
    end else begin
      ma_y = pow_r;
      unique case (msel_r)
        MOD_N2P2: ma_m = mod_n2p2;
        MOD_N:    ma_m = mod_n;
        default:  ma_m = mod_n2;
      endcase
    end
  end

  // Squaring multiplier (B*B), also used for single products.
  mont_mult #(.WORDS(WORDS)) u_mm_sq (
    .clk, .rst_n, .start(mm_start),
    .m(ma_m), .x(base_r), .y(ma_y),
    .t(ta), .busy(ma_busy), .done(ma_done)
  );

  // Power multiplier (P*B).
  mont_mult #(.WORDS(WORDS)) u_mm_pw (
    .clk, .rst_n, .start(mm_start && op_r == OP_EXP),
    .m(mod_n2), .x(pow_r), .y(base_r),
    .t(tb), .busy(mb_busy), .done(mb_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      op_r   <= OP_EXP;
      msel_r <= MOD_N2;
      base_r <= '0;
      pow_r  <= '0;
      esh    <= '0;
      left   <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          op_r   <= op;
          msel_r <= msel;
          base_r <= a;
          if (op == OP_MUL) begin
            pow_r <= b;
            state <= S_ISSUE;
          end else if (elen == '0) begin
            result <= one_m;
            done   <= 1'b1;
          end else begin
            pow_r <= one_m;
            esh   <= e;
            left  <= elen;
            state <= S_ISSUE;
          end
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (ma_done) begin
          if (op_r == OP_MUL) begin
            result <= ta;
            done   <= 1'b1;
            state  <= S_IDLE;
          end else begin
            base_r <= ta;
            if (esh[0]) pow_r <= tb;
            esh  <= esh >> 1;
            left <= left - 1'b1;
            if (left == LW'(1)) begin
              result <= esh[0] ? tb : pow_r;
              done   <= 1'b1;
              state  <= S_IDLE;
            end else begin
              state <= S_ISSUE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE)
    else $error("mont_exp: start while busy");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_IDLE) |-> !(ma_busy || mb_busy))
    else $error("mont_exp: multiplier busy while idle");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_WAIT && op_r == OP_EXP) |-> (ma_done == mb_done))
    else $error("mont_exp: multipliers out of step");

endmodule

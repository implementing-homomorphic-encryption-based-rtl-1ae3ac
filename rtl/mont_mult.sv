// mont_mult: Montgomery multiplier, modified CIOS method with 16-bit words.
//
// Computes T with T mod M = X*Y*R^-1 mod M and T < 2M, where R = 2^(16*(WORDS+1)).
// Inputs must satisfy X, Y < 2M and M odd. As in the modified CIOS method the
// final conditional subtraction is left out, so the result may still hold one
// extra M; a Montgomery multiplication by 1 removes it when a reduced value is
// needed (the result of such a conversion is at most M).
//
// One iteration per clock: the whole of X is multiplied by one 16-bit word of
// Y (an X-wide by 16-bit product, the part that maps onto embedded
// multipliers), the word m = ((T + Z) mod 2^16) * M' mod 2^16 is formed, and
// T <- (T + Z + m*M) / 2^16. WORDS+1 iterations consume every word of Y.
// M' = -M^-1 mod 2^16 is derived from the low word of M inside the block, so
// the modulus can be switched from one multiplication to the next.
//
// Interface: pulse start for one cycle with m, x, y valid; they are registered.
// busy is high while iterating; done pulses for one cycle when t is valid, and
// t holds its value until the next start. Latency from the start cycle to the
// done cycle is WORDS+2 cycles.
//
// The algorithm and the word size follow the design; the start/done handshake,
// the latency and the on-chip derivation of M' are this design's choices.
module mont_mult
  import he_pkg::*;
#(
  parameter int WORDS = 32,                    // w: moduli are below 2^(16w)
  localparam int OPW = WORD * (WORDS + 1)      // operand width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [OPW-1:0] m,
  input  logic [OPW-1:0] x,
  input  logic [OPW-1:0] y,
  output logic [OPW-1:0] t,
  output logic           busy,
  output logic           done
);

  localparam int SW = OPW + WORD + 2;   // width of T + Z + m*M
  localparam int CW = $clog2(WORDS + 2);

  logic [OPW-1:0]  x_r, y_r, m_r;
  logic [WORD-1:0] mp_r;
  logic [CW-1:0]   cnt;

  logic [OPW+WORD-1:0] z;
  logic [WORD-1:0]     q;
  logic [SW-1:0]       sum;

  always_comb begin
    z   = (OPW+WORD)'(x_r) * (OPW+WORD)'(y_r[WORD-1:0]);
    q   = WORD'((t[WORD-1:0] + z[WORD-1:0]) * mp_r);
    sum = SW'(t) + SW'(z) + SW'(q) * SW'(m_r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      t    <= '0;
      x_r  <= '0;
      y_r  <= '0;
      m_r  <= '0;
      mp_r <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x_r  <= x;
        y_r  <= y;
        m_r  <= m;
        mp_r <= mont_mprime(m[WORD-1:0]);
        t    <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        t   <= OPW'(sum >> WORD);
        y_r <= y_r >> WORD;
        cnt <= cnt + 1'b1;
        if (cnt == CW'(WORDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A new operation may only be started when the multiplier is idle.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("mont_mult: start while busy");

endmodule

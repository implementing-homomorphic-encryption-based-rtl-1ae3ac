// he_pkg: types and helpers shared by the Paillier secure-control datapath.
//
// The arithmetic works on 16-bit words (Montgomery multiplication, modified
// CIOS form). For a key of KEY_BITS bits the largest modulus is N^2 + 2, which
// fits in w = KEY_BITS/8 words; all operands are carried with one spare word,
// i.e. 16*(w+1) bits, and the Montgomery radix is R = 2^(16*(w+1)) for every
// multiplier in the system. The three moduli in use are N^2, N^2 + 2 and N.
//
// The 256-bit default key length and the 16-bit word follow the design; the
// encodings of the operation and modulus selectors are this design's choice.
package he_pkg;

  // Word size of the Montgomery multiplier.
  parameter int WORD = 16;

  // Task given to the multiplication and exponentiation resources.
  typedef enum logic {
    OP_EXP = 1'b0,   // Montgomery exponentiation, modulus N^2
    OP_MUL = 1'b1    // single Montgomery multiplication, selectable modulus
  } he_op_e;

  // Modulus selector for a single Montgomery multiplication.
  typedef enum logic [1:0] {
    MOD_N2   = 2'd0,   // N^2
    MOD_N2P2 = 2'd1,   // N^2 + 2 (exact division by N during decryption)
    MOD_N    = 2'd2    // N
  } mod_sel_e;

  // Words needed for a key length, and the operand width with the spare word.
  function automatic int mont_words(input int key_bits);
    return key_bits / 8;
  endfunction

  function automatic int mont_opw(input int key_bits);
    return WORD * (key_bits / 8 + 1);
  endfunction

  // M' such that M * M' mod 2^16 = 2^16 - 1, i.e. M' = -M^-1 mod 2^16, for odd
  // M. Newton iteration x <- x(2 - Mx) doubles the number of correct low bits;
  // x = M is already correct to 3 bits, so three steps give 24 >= 16 bits.
  function automatic logic [WORD-1:0] mont_mprime(input logic [WORD-1:0] m0);
    logic [WORD-1:0] inv;
    inv = m0;
    for (int k = 0; k < 3; k++) begin
      inv = WORD'(inv * WORD'(WORD'(2) - WORD'(m0 * inv)));
    end
    return WORD'(-inv);
  endfunction

endpackage

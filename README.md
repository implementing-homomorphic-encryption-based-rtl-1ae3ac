# Encrypted feedback control in hardware: a Paillier controller loop

A networked controller normally sees everything: the sensor readings that come in, its own internal
state, and the actuator commands it sends back. This design keeps all three encrypted. The plant
encrypts its sensor samples with the Paillier public-key scheme. The controller evaluates a linear
dynamic control law directly on the ciphertexts. The plant then decrypts the control inputs it gets
back. A controller that is compromised, or a network that is eavesdropped, sees only ciphertexts.

This works because Paillier is additively homomorphic. Take ciphertexts modulo N², where N = pq is
the public key:

| plaintext operation | ciphertext operation |
|---|---|
| a + b | E(a) · E(b) mod N² |
| k · a, for a plaintext constant k | E(a)^k mod N² |

A linear controller needs nothing else. Its gains are plaintext integers, so each term of a
matrix-vector product becomes one modular exponentiation and each sum becomes one modular
multiplication. The whole design therefore reduces to doing large modular exponentiations fast, with
one piece of arithmetic hardware reused for everything. That hardware is the Montgomery exponentiator.

The RTL is parameterised. Its defaults are the configuration of the reference experiment, an
inverted pendulum balanced at 500 Hz:

- a 256-bit key;
- a controller with 4 states, 3 measured outputs and 1 control input;
- fixed-point values mapped to 32-bit integers with 7 fractional bits;
- no periodic state reset.

## System structure

```
 y_hat ─► plant_interface ──encrypted y──► comm_link ──► secure_controller
            (encrypt, r^N,                                (u = Cx, x' = Ax + B(s-y),
             decrypt)                                      all on ciphertexts)
 u_hat ◄─ plant_interface ◄─encrypted u── comm_link ◄────────────┘
```

| file | role |
|---|---|
| `rtl/he_pkg.sv` | word size, operation and modulus selectors, M' and width helpers |
| `rtl/mont_mult.sv` | one Montgomery multiplier (16-bit words, one word per clock) |
| `rtl/mont_exp.sv` | exponentiator built from two multipliers; also does single products |
| `rtl/plant_interface.sv` | encryption, r^N precomputation and decryption on one `mont_exp` |
| `rtl/secure_controller.sv` | the encrypted control law on one `mont_exp` |
| `rtl/comm_link.sv` | one-message buffer standing in for the network |
| `rtl/he_control_top.sv` | the closed loop: all of the above |

The plant interface has one exponentiator and the controller has another, so each side does its
work in sequence. Two things run concurrently:

- the plant interface computes the random factors for the *next* sample while the controller works;
- the controller updates its state while the plant interface decrypts the control input.

Two things stay outside the RTL:

- **Random numbers** come in on `rnd`. One value is taken in each cycle that `rnd_take` is high, and
  it must be uniform below N. A true random source is outside the scope of this design.
- **The plant and its sensors** are outside the design. Samples and setpoints arrive as already
  mapped integers.

## Numbers: fixed point to ciphertext

A real value with m fractional bits is scaled by 2^m, rounded, and taken modulo 2^n'. The defaults
are n' = 32 and m = 7. Negative values wrap to the top of the range. All control arithmetic is then
integer arithmetic modulo 2^n'.

Paillier works modulo N, not modulo 2^n'. The decrypted result is reduced to n' bits, and that
reduction is correct only if N is much larger than any intermediate sum. With a 256-bit key and
32-bit values there is ample room. With a 64-bit key and the pendulum gains, the products outgrow N:
the loop still computes the law correctly modulo N, but not the 32-bit result. That is a property of
the scheme, not of this hardware.

Each state update multiplies by a fixed-point gain, which adds m fractional bits. The controller can
therefore reset its state to E(0) every T samples (`T_RESET`). Between resets it uses
B[k] = B · 2^((k mod T)·m), so all terms of a state share the same scaling. With `T_RESET = 0` (the
default, meaning T = ∞) the state is never reset and B is used as given.

## Montgomery arithmetic (`mont_mult`)

Every operand lives in Montgomery form, x̃ = x·R mod M. The Montgomery product of x̃ and ỹ is
x̃·ỹ·R⁻¹, which is again in Montgomery form.

**Word layout.** Operands are split into 16-bit words. For a key of K bits, the largest modulus,
N² + 2, fits in w = K/8 words. Operands carry one spare word, giving OPW = 16(w+1) bits: 528 bits for
K = 256. The radix is R = 2^OPW, the same for every multiplier and every modulus.

**One clock per word of Y.** Each clock the multiplier:

1. multiplies all of X by one 16-bit word of Y (an OPW × 16 product, the part suited to DSP blocks);
2. forms q = ((T + Z) mod 2^16) · M' mod 2^16, where M' = −M⁻¹ mod 2^16;
3. updates T ← (T + Z + q·M) / 2^16.

A multiplication takes w+1 iterations, and `done` comes w+2 clocks after `start`. M' is derived from
the low word of M inside the block, by three Newton steps. The modulus can therefore change on every
multiplication.

**No final subtraction.** The result is kept below 2M rather than below M. Because R > 4M, results
can be fed straight back in as inputs without ever subtracting M. A fully reduced value is needed in
two places: decryption and the final ciphertexts. There, a Montgomery product with 1 converts out of
Montgomery form, and its result is at most M.

Three moduli are used:

| modulus | used for |
|---|---|
| N² | all ciphertext arithmetic |
| N² + 2 | the exact division by N in decryption |
| N | the last step of decryption |

## The exponentiator (`mont_exp`)

The exponentiator uses the right-to-left binary method, with two multipliers running side by side.
In each iteration:

- one multiplier squares the base;
- the other multiplies the running power by the base;
- the low exponent bit decides whether the running power keeps the new product;
- the exponent register shifts right.

Both products are always computed, so the time taken depends only on the exponent length `elen`,
not on its bits:

| operation | latency from `start` to `done` |
|---|---|
| exponentiation | 1 + elen·(w+3) cycles |
| single product (`op = OP_MUL`), modulus chosen by `msel` | 1 + (w+3) cycles |

The single-product mode runs on the squaring multiplier, so one `mont_exp` is all the arithmetic
either side needs.

Exponent lengths used:

| exponent | length |
|---|---|
| controller gains | n' = 32 bits |
| r^N in the plant interface | K bits |
| λ in decryption | K bits |

With K = 256 (w = 32) an iteration is 35 cycles. A 32-bit exponentiation therefore takes 1121 cycles
and a 256-bit one takes 8961.

## Plant interface (`plant_interface`)

The plant interface does three kinds of job on one exponentiator:

- encrypting all outputs of a sample;
- decrypting all control inputs;
- computing *one* random factor r^N.

A job, once started, runs to its end. When the interface is idle, it chooses the next job in this
order:

1. a pending decryption;
2. a pending sample, once its random factors are ready;
3. the next missing random factor.

The random factors for the next sample are computed while the controller works on the current one.
Each factor is a separate job, so a returning control input waits for at most one r^N
exponentiation before it is decrypted.

**Random factors.** For each output, z = r^N mod N² is computed as one exponentiation. The raw
random number is used directly as a Montgomery-form base. This stands for r·R⁻¹, which is just as
uniform, and so saves a conversion.

**Encryption** uses (N+1)^y = N·y + 1 mod N² to avoid a second exponentiation. It takes three
products modulo N²:

```
v1 = MM(N·R mod N², y)          = N·y
v2 = MM(v1 + 1, R² mod N²)      = (N·y + 1) in Montgomery form
c  = MM(z, v2)                  = E(y), Montgomery form
```

**Decryption** computes u = L(c^λ mod N²)·μ mod N, where L(v) = (v − 1)/N. Dividing by N is done
without a divider. Because v − 1 is an exact multiple of N, multiplying by N⁻¹ modulo N² + 2
(coprime to N for odd N) gives the exact quotient:

```
v1 = MONTEXP(c, λ);       v2 = MM_N²(v1, 1)       = c^λ mod N²
v3 = MM_N²+2(v2 − 1, N⁻¹·R² mod (N²+2));  v4 = MM_N²+2(v3, 1) = L(c^λ)
v5 = MM_N(v4, μ·R² mod N);                 u  = MM_N(v5, 1) mod 2^n'
```

Handshakes:

| signals | purpose |
|---|---|
| `y_valid/y_ready/y_hat` | plaintext samples in |
| `c_valid/c_ready/c_ct` | ciphertexts to the network |
| `u_valid/u_ready/u_ct` | ciphertexts from the network |
| `act_valid` | one-cycle pulse with the decrypted `u_hat` |

## Secure controller (`secure_controller`)

When a vector of encrypted outputs arrives, the controller does the following with its single
exponentiator:

1. **Setpoints.** It encrypts the plaintext setpoints without randomness: E(s) = N·s + 1 (two
   products each). They are not secret from the controller, so no randomness is needed.
2. **Control inputs.** It computes u_i = ∏_j x_j^C_ij, which is NU·NX exponentiations plus the
   products. u is sent as soon as it is complete, so decryption at the plant overlaps step 3.
3. **State update.** At the end of a reset period, the state becomes E(0) = R mod N² (1 in Montgomery
   form). Otherwise:
   - the error is formed as e_i = y_i^(2^n' − 1) · s_i, because raising to 2^n' − 1 is multiplication
     by −1 modulo 2^n';
   - then x'_i = ∏_j x_j^A_ij · ∏_j e_j^B[k]_ij.

   New states go to a shadow register set. They are copied over the old ones only when every row is
   done, so every row uses the old state.

Each power is folded into a running product as soon as it is produced. This needs one accumulator
rather than a table of NX + NY powers.

At the defaults, one sample costs 35 exponentiations with 32-bit exponents and 27 products, about
40,500 cycles of controller time.

## Network link (`comm_link`)

The network is abstracted as a one-message store-and-forward buffer with valid/ready on both sides.
A message is offered from the cycle after it was accepted and held until it is taken. An assertion
checks that it stays stable while it waits.

## Key constants

The key and its derived constants are inputs to the top, and must stay stable while the loop runs.
They are computed offline, together with the controller matrices, from p, q and R = 2^(16(K/8+1)).
Everything wider than K bits is OPW bits wide.

| port | value |
|---|---|
| `key_n` | N = p·q |
| `key_n2` | N² |
| `key_n2p2` | N² + 2 |
| `key_r_n2` | R mod N², which is E(0) and "1" in Montgomery form |
| `key_nr_n2` | N·R mod N² |
| `key_r2_n2` | R² mod N² |
| `key_lambda` | λ = lcm(p−1, q−1) (K bits) |
| `key_ninv_r2_n2p2` | N⁻¹ · R² mod (N² + 2) |
| `key_mu_r2_n` | μ · R² mod N, with μ = λ⁻¹ mod N |

The function `make_key` in `tb/he_ref_pkg.sv` computes all of them, using simulation-only big-integer
arithmetic. Ciphertexts on the links are in Montgomery form. To get an ordinary Paillier ciphertext,
take a Montgomery product with 1 modulo N².

## Timing

A sample is accepted when `y_ready` is high. `act_valid` marks the decrypted control input for it.
Two numbers matter:

- **Latency**, from sample to control input. This is the encryption, the controller's C·x, the
  wait for the r^N exponentiation in progress, and the decryption.
- **Minimum sampling period.** This is the work per sample of the busier side:
  - the controller does 35 exponentiations with 32-bit exponents and 27 products;
  - the plant interface does three r^N exponentiations and one λ exponentiation, all K bits long,
    plus 14 products.

All numbers are in clock cycles, simulated with the pendulum controller at NP = 32. Each sampling
period shown was kept, with the same latency for every sample:

| key bits | latency | sampling period kept | busier side |
|---|---|---|---|
| 64 (`KEY_BITS=64`) | 3,012 | 13,000 | controller (about 12,700) |
| 128 (`KEY_BITS=128`) | 7,601 | 22,000 | controller (about 21,900) |
| 256 (default) | 18,446 | 41,000 | controller (about 40,600; plant interface about 36,300) |
| 512 (`KEY_BITS=512`) | 69,582 | 140,000 | plant interface (about 138,300) |

A 500 Hz loop (2 ms period) at 256 bits therefore needs a clock of about 20.5 MHz or more. A 10 ms
period at 512 bits needs about 14 MHz.

The balance between the two sides shifts with key length. The controller's exponents are always
n' = 32 bits, so its time grows only with the operand width. The plant interface's exponents grow
with the key as well. The reference design found the plant interface to be the limit. Here that
holds only from somewhere between 256 and 512 bits.

How the cycle counts map onto a real FPGA's clock rate and DSP count was not modelled.

## Departures from the reference design and known limits

- **One exponentiator per side, sequential schedule.** The reference also sketches parallel versions
  with NU or NX copies of the exponentiator and a product tree. Those are not built.
- **State in the A·x term.** The reference's state-update listing raises the *new* state x' to the
  powers of A. This RTL uses the current state x, which is what the control law x[k+1] = A x[k] + …
  says.
- **Pendulum gains.** The testbenches multiply the reference gains by 2^7 and round them.
- **Random numbers** are an input. The raw value is used as a Montgomery-form base (see above).
- **Chosen for this RTL, not given by the reference:**
  - the start/done and valid/ready handshakes;
  - the scheduling priority in the plant interface;
  - the one-message link buffers;
  - the shadow state registers;
  - the on-chip M' derivation;
  - the `elen` input of the exponentiator.
- **Not modelled:** the plant, a random-number generator, clock frequency and FPGA resource use. No
  CRT speed-up of decryption is used.
- **Actuator scaling is left outside.** `u_hat` is the raw n'-bit mapped integer, with m fractional
  bits. Rounding it and clamping it to the actuator's range is left to the actuator side, as in
  the reference setup.

## Simulating

Each testbench checks itself and ends by printing `TB_RESULT checks=… failures=…`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/he_pkg.sv tb/he_ref_pkg.sv tb/tb_he_control_top.sv --top-module tb_he_control_top
./obj_dir/Vtb_he_control_top
```

| testbench | what it checks |
|---|---|
| `tb_mont_mult` | 60 random moduli: congruence, bound T < 2M, latency |
| `tb_mont_exp` | exponentiations and products against a big-integer model, constant latency |
| `tb_plant_interface` | encryptions decrypt correctly, decryptions match, r^N precomputed and overlapped (96-bit key) |
| `tb_secure_controller` | the encrypted law against plaintext arithmetic mod 2^n', with a reset period of 3 |
| `tb_comm_link` | 200 messages under random back-pressure |
| `tb_he_control_top` | reduced loop (96-bit key, n' = 16, T = 3); counts encryptions, decryptions, overlap, resets, shifted-B updates and stalls |
| `tb_he_control_top_full` | the whole loop at default parameters with the pendulum controller, six samples at a 41,000-cycle period; a few seconds |
| `tb_key_sweep` | the pendulum loop at 64-, 128- and 512-bit keys at fixed periods, through `tb/pendulum_run.sv` |

`tb/he_ref_pkg.sv` holds the big-integer reference model: modular arithmetic, key generation, and
encryption and decryption as the hardware forms them.

To change the configuration, override the top's parameters: `KEY_BITS`, `NX`, `NY`, `NU`, `NP`,
`MFRAC` and `T_RESET`. `KEY_BITS` must be a multiple of 16, like every size tested.

// tb_key_sweep: the encrypted pendulum loop at key lengths of 64, 128 and 512
// bits, each a separate build of he_control_top, run side by side.
//
// Each length runs three samples through encryption, the encrypted controller
// and decryption, checked against an exact plaintext-domain reference (see
// pendulum_run), at a fixed sampling period that must be kept. The periods
// are just above the busier of the two sides: every exponentiation bit costs
// KEY_BITS/8 + 3 cycles; the controller does 35 exponentiations with 32-bit
// exponents per sample, the plant interface four with KEY_BITS-bit exponents
// (three r^N and one for decryption). The controller is the busier side up to
// 256 bits, the plant interface at 512 bits:
//   64 bits: 13,000 cycles   128 bits: 22,000   512 bits: 140,000
// The sample-to-actuation latency of each length is printed.
module tb_key_sweep;

  logic   done64, done128, done512;
  int     c64, c128, c512, f64, f128, f512;
  longint cy64, cy128, cy512;
  int     checks, failures;

  pendulum_run #(.KEY_BITS(64),  .SAMPLES(3), .PERIOD(13000))  r64  (.done(done64),  .checks(c64),  .failures(f64),  .last_cycles(cy64));
  pendulum_run #(.KEY_BITS(128), .SAMPLES(3), .PERIOD(22000))  r128 (.done(done128), .checks(c128), .failures(f128), .last_cycles(cy128));
  pendulum_run #(.KEY_BITS(512), .SAMPLES(3), .PERIOD(140000)) r512 (.done(done512), .checks(c512), .failures(f512), .last_cycles(cy512));

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c64 + c128 + c512, f64 + f128 + f512 + 1);
    $finish;
  end

  initial begin
    wait (done64 === 1'b1 && done128 === 1'b1 && done512 === 1'b1);
    checks = c64 + c128 + c512;
    failures = f64 + f128 + f512;
    $display("sample-to-actuation cycles: 64-bit %0d, 128-bit %0d, 512-bit %0d", cy64, cy128, cy512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

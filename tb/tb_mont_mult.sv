// tb_mont_mult: self-checking test of the Montgomery multiplier at its
// default size (16-bit words, w = 32, 528-bit operands).
//
// For random odd moduli of several sizes (a full 512-bit one, a 256-bit one,
// small ones) and random X, Y < 2M it checks, against plain wide-integer
// arithmetic, that T*R = X*Y (mod M) and T < 2M; that a multiplication by 1
// of a value below 2M returns at most M (the conversion out of the unreduced
// form); and that every operation takes exactly WORDS+2 cycles from start to
// done.
module tb_mont_mult;
  import he_ref_pkg::*;

  localparam int WORDS = 32;
  localparam int OPW   = 16 * (WORDS + 1);

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           start = 1'b0;
  logic [OPW-1:0] m = '0, x = '0, y = '0;
  logic [OPW-1:0] t;
  logic           busy, done;

  int checks = 0, failures = 0;

  mont_mult dut (.clk, .rst_n, .start, .m, .x, .y, .t, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic big_t rand_odd(int bits);
    big_t v;
    v = '0;
    for (int w = 0; w < (bits + 31) / 32; w++) v[w*32 +: 32] = $urandom;
    v = v & ((big_t'(1) << bits) - 1);
    v[bits-1] = 1'b1;
    v[0] = 1'b1;
    return v;
  endfunction

  task automatic run(input big_t mm, input big_t xx, input big_t yy, output big_t tt, output int cyc);
    @(negedge clk);
    m = OPW'(mm); x = OPW'(xx); y = OPW'(yy);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    tt = big_t'(t);
  endtask

  initial begin
    big_t mm, xx, yy, tt, r;
    int cyc, bits;
    r = big_t'(1) << OPW;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      case (n % 4)
        0: bits = 512;
        1: bits = 256;
        2: bits = 17 + ($urandom % 100);
        default: bits = 2 + ($urandom % 500);
      endcase
      mm = rand_odd(bits);
      xx = rand_below(mm << 1);
      yy = rand_below(mm << 1);
      if (n == 0) begin xx = (mm << 1) - 1; yy = (mm << 1) - 1; end
      run(mm, xx, yy, tt, cyc);
      checks++;
      if (mulmod(tt, r, mm) != mulmod(xx, yy, mm)) begin
        failures++;
        $display("FAIL congruence: n=%0d bits=%0d", n, bits);
      end
      checks++;
      if (tt >= (mm << 1)) begin
        failures++;
        $display("FAIL bound T < 2M: n=%0d", n);
      end
      checks++;
      if (cyc != WORDS + 2) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cyc, WORDS + 2);
      end
      // conversion out of the unreduced form: multiply by 1
      run(mm, tt, big_t'(1), tt, cyc);
      checks++;
      if (tt > mm || mulmod(tt, mulmod(r, r, mm), mm) != mulmod(xx, yy, mm)) begin
        failures++;
        $display("FAIL reduction by 1: n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_comm_link: self-checking test of the network link buffer.
//
// A producer offers numbered messages of random ciphertext words with random
// gaps and a consumer takes them with random back-pressure. Every message must
// arrive once, unchanged and in order; in_ready must be low exactly while a
// message is held; a message must be offered the cycle after it is accepted.
module tb_comm_link;

  localparam int KEY_BITS = 16;
  localparam int N = 2;
  localparam int OPW = 16 * (KEY_BITS / 8 + 1);
  localparam int MSGS = 200;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           in_valid = 1'b0, in_ready;
  logic [OPW-1:0] in_data [N];
  logic           out_valid, out_ready = 1'b0;
  logic [OPW-1:0] out_data [N];

  int checks = 0, failures = 0;
  logic [OPW-1:0] sent [$][N];
  int received = 0;

  comm_link #(.KEY_BITS(KEY_BITS), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer with random back-pressure; checks ordering and content
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (in_ready != !out_valid) begin
        failures++;
        $display("FAIL in_ready while holding a message");
      end
      if (out_valid && out_ready) begin
        checks++;
        if (sent.size() == 0 || out_data != sent[0]) begin
          failures++;
          $display("FAIL message %0d corrupted or unexpected", received);
        end
        if (sent.size() != 0) void'(sent.pop_front());
        received++;
      end
      if (in_valid && in_ready) sent.push_back(in_data);
    end
  end

  always @(negedge clk) out_ready <= ($urandom % 3) != 0;

  initial begin
    int n;
    for (int i = 0; i < N; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    n = 0;
    while (n < MSGS) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0 && n < MSGS;
      for (int i = 0; i < N; i++) in_data[i] = OPW'({$urandom, $urandom});
      if (in_valid) begin
        // keep offering this message until it is accepted
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        #1;
        checks++;
        if (!out_valid) begin
          failures++;
          $display("FAIL message not offered the cycle after acceptance");
        end
        n++;
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    repeat (50) @(negedge clk);
    checks++;
    if (received != MSGS) begin
      failures++;
      $display("FAIL received %0d of %0d messages", received, MSGS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

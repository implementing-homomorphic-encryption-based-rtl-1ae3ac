// comm_link: abstracted network link between the plant interface and the
// controller, carrying one message of N ciphertexts of OPW bits each.
//
// The link is a one-message store-and-forward buffer: a message accepted on
// the input side is offered on the output side from the next cycle and held
// until taken. While it holds a message it accepts no other (in_ready low),
// so a transfer takes at least one cycle and no message is lost or
// duplicated. Everything on the link is ciphertext in Montgomery form.
//
// Interface: in_valid/in_ready/in_data and out_valid/out_ready/out_data are
// valid/ready handshakes; a transfer happens in a cycle with both high.
//
// The design only names the network and abstracts it; the single-message
// buffer with valid/ready handshakes is this design's own simplest choice.
module comm_link
  import he_pkg::*;
#(
  parameter int KEY_BITS = 256,   // bits of N; a ciphertext is OPW bits wide
  parameter int N = 3,            // ciphertexts per message
  localparam int OPW = WORD * (KEY_BITS / 8 + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [OPW-1:0] in_data [N],
  output logic           out_valid,
  input  logic           out_ready,
  output logic [OPW-1:0] out_data [N]
);

  logic [N-1:0][OPW-1:0] msg;

  assign in_ready = !out_valid;

  always_comb begin
    for (int n = 0; n < N; n++) out_data[n] = msg[n];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      msg       <= '0;
    end else begin
      if (in_valid && in_ready) begin
        for (int n = 0; n < N; n++) msg[n] <= in_data[n];
        out_valid <= 1'b1;
      end else if (out_valid && out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // A message on offer stays unchanged until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(msg))
    else $error("comm_link: message dropped or changed before transfer");

endmodule

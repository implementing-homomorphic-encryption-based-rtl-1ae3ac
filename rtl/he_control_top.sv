// he_control_top: complete encrypted feedback loop of a networked controller.
//
// Sensor samples are encrypted at the plant with Paillier encryption, sent over
// a network link to the controller, which evaluates a linear dynamic control
// law directly on the ciphertexts; the encrypted control inputs return over a
// second link and are decrypted at the plant. The controller never sees a
// plaintext plant output, state or control input.
//
//   y_hat --> plant_interface (encrypt) --> comm_link --> secure_controller
//   u_hat <-- plant_interface (decrypt) <-- comm_link <------------'
//
// The plant interface holds one exponentiator for encryption, decryption and
// the r^N randomisers; the controller holds another. The random numbers come
// from outside (rnd, rnd_take), as does the setpoint, which the controller
// encrypts itself. Key constants and controller matrices are inputs that must
// be stable while the loop runs.
//
// Timing: a sample is accepted when y_ready is high; act_valid pulses when the
// decrypted control inputs for it are on u_hat. The next sample's r^N values
// are computed while the controller works, and the controller updates its
// state while the plant interface decrypts, so the sampling period must cover
// the work per sample of the busier side, not the latency. At the defaults:
// latency 18,446 cycles; controller about 40,600 cycles per sample, plant
// interface about 36,300.
//
// The structure follows the design's system diagram and experiment (one
// exponentiator per module, setpoint encryption in the controller, abstracted
// network); the link buffers and handshakes are this design's choices.
module he_control_top
  import he_pkg::*;
#(
  parameter int KEY_BITS = 256,   // bits of N
  parameter int NX = 4,           // controller states
  parameter int NY = 3,           // encrypted plant outputs per sample
  parameter int NU = 1,           // control inputs per sample
  parameter int NP = 32,          // n': bits of the mapped plaintext integers
  parameter int MFRAC = 7,        // m: fractional bits
  parameter int T_RESET = 0,      // controller reset period, 0 = never
  localparam int OPW = WORD * (KEY_BITS / 8 + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // key constants
  input  logic [OPW-1:0]      key_n,
  input  logic [OPW-1:0]      key_n2,
  input  logic [OPW-1:0]      key_n2p2,
  input  logic [OPW-1:0]      key_r_n2,
  input  logic [OPW-1:0]      key_nr_n2,
  input  logic [OPW-1:0]      key_r2_n2,
  input  logic [KEY_BITS-1:0] key_lambda,
  input  logic [OPW-1:0]      key_ninv_r2_n2p2,
  input  logic [OPW-1:0]      key_mu_r2_n,
  // controller matrices
  input  logic [NP-1:0]       a_hat [NX][NX],
  input  logic [NP-1:0]       b_hat [NX][NY],
  input  logic [NP-1:0]       c_hat [NU][NX],
  // external random number source
  input  logic [KEY_BITS-1:0] rnd,
  output logic                rnd_take,
  // plant
  input  logic                y_valid,
  output logic                y_ready,
  input  logic [NP-1:0]       y_hat [NY],
  input  logic [NP-1:0]       s_hat [NY],
  output logic                act_valid,
  output logic [NP-1:0]       u_hat [NU]
);

  logic           up_valid, up_ready, upc_valid, upc_ready;
  logic [OPW-1:0] up_ct [NY];
  logic [OPW-1:0] upc_ct [NY];
  logic           dn_valid, dn_ready, dnc_valid, dnc_ready;
  logic [OPW-1:0] dn_ct [NU];
  logic [OPW-1:0] dnc_ct [NU];

  plant_interface #(.KEY_BITS(KEY_BITS), .NY(NY), .NU(NU), .NP(NP)) u_pi (
    .clk, .rst_n,
    .key_n, .key_n2, .key_n2p2, .key_r_n2, .key_nr_n2, .key_r2_n2,
    .key_lambda, .key_ninv_r2_n2p2, .key_mu_r2_n,
    .rnd, .rnd_take,
    .y_valid, .y_ready, .y_hat,
    .c_valid(up_valid), .c_ready(up_ready), .c_ct(up_ct),
    .u_valid(dnc_valid), .u_ready(dnc_ready), .u_ct(dnc_ct),
    .act_valid, .u_hat
  );

  comm_link #(.KEY_BITS(KEY_BITS), .N(NY)) u_net_up (
    .clk, .rst_n,
    .in_valid(up_valid), .in_ready(up_ready), .in_data(up_ct),
    .out_valid(upc_valid), .out_ready(upc_ready), .out_data(upc_ct)
  );

  secure_controller #(
    .KEY_BITS(KEY_BITS), .NX(NX), .NY(NY), .NU(NU), .NP(NP),
    .MFRAC(MFRAC), .T_RESET(T_RESET)
  ) u_ctrl (
    .clk, .rst_n,
    .key_n2, .key_r_n2, .key_nr_n2, .key_r2_n2,
    .a_hat, .b_hat, .c_hat,
    .y_valid(upc_valid), .y_ready(upc_ready), .y_ct(upc_ct), .s_hat,
    .u_valid(dn_valid), .u_ready(dn_ready), .u_ct(dn_ct)
  );

  comm_link #(.KEY_BITS(KEY_BITS), .N(NU)) u_net_down (
    .clk, .rst_n,
    .in_valid(dn_valid), .in_ready(dn_ready), .in_data(dn_ct),
    .out_valid(dnc_valid), .out_ready(dnc_ready), .out_data(dnc_ct)
  );

endmodule

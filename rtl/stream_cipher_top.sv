// stream_cipher_top: the four hardware stream ciphers side by side.
//
// Grain v1 (80-bit key, 64-bit IV), Grain-128 (128-bit key, 96-bit IV),
// Grain-128a with optional authentication (128-bit key, 96-bit IV, IV bit 0
// selects the MAC) and Trivium (80-bit key, 80-bit IV) are independent
// ciphers; this top only gives them a common clock and reset so that they can
// be built and compared together. Each keeps its own ports, named with the
// cipher's prefix, and works exactly as its module describes: a `load` pulse
// starts key initialization, `ready` marks the keystream phase, and each
// accepted in_data word returns out_data = in_data ^ keystream one clock
// later. The parallelism of each core (keystream bits per clock) is a
// parameter; the default 1 is each cipher's basic form.
module stream_cipher_top #(
  parameter int unsigned W_V1    = 1,
  parameter int unsigned W_128   = 1,
  parameter int unsigned W_128A  = 1,
  parameter int unsigned TAG_W   = 32,
  parameter int unsigned W_TRIV  = 1,
  parameter int unsigned KS_LOG2 = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  // Grain v1
  input  logic                v1_load,
  input  logic [79:0]         v1_key,
  input  logic [63:0]         v1_iv,
  output logic                v1_ready,
  input  logic                v1_in_valid,
  input  logic [W_V1-1:0]     v1_in_data,
  output logic                v1_in_ready,
  output logic                v1_out_valid,
  output logic [W_V1-1:0]     v1_out_data,
  output logic [W_V1-1:0]     v1_out_ks,
  // Grain-128
  input  logic                g128_load,
  input  logic [127:0]        g128_key,
  input  logic [95:0]         g128_iv,
  output logic                g128_ready,
  input  logic                g128_in_valid,
  input  logic [W_128-1:0]    g128_in_data,
  output logic                g128_in_ready,
  output logic                g128_out_valid,
  output logic [W_128-1:0]    g128_out_data,
  output logic [W_128-1:0]    g128_out_ks,
  // Grain-128a
  input  logic                g128a_load,
  input  logic [127:0]        g128a_key,
  input  logic [95:0]         g128a_iv,
  output logic                g128a_ready,
  output logic                g128a_auth,
  input  logic                g128a_in_valid,
  input  logic [W_128A-1:0]   g128a_in_data,
  input  logic                g128a_in_last,
  input  logic                g128a_decrypt,
  output logic                g128a_in_ready,
  output logic                g128a_out_valid,
  output logic [W_128A-1:0]   g128a_out_data,
  output logic [W_128A-1:0]   g128a_out_ks,
  output logic                g128a_tag_valid,
  output logic [TAG_W-1:0]    g128a_tag,
  // Trivium
  input  logic                triv_load,
  input  logic [79:0]         triv_key,
  input  logic [79:0]         triv_iv,
  output logic                triv_ready,
  output logic                triv_exhausted,
  input  logic                triv_in_valid,
  input  logic [W_TRIV-1:0]   triv_in_data,
  output logic                triv_in_ready,
  output logic                triv_out_valid,
  output logic [W_TRIV-1:0]   triv_out_data,
  output logic [W_TRIV-1:0]   triv_out_ks
);

  grain_v1 #(.W(W_V1)) u_grain_v1 (
    .clk, .rst_n,
    .load      (v1_load),
    .key       (v1_key),
    .iv        (v1_iv),
    .ready     (v1_ready),
    .in_valid  (v1_in_valid),
    .in_data   (v1_in_data),
    .in_ready  (v1_in_ready),
    .out_valid (v1_out_valid),
    .out_data  (v1_out_data),
    .out_ks    (v1_out_ks)
  );

  grain128 #(.W(W_128)) u_grain128 (
    .clk, .rst_n,
    .load      (g128_load),
    .key       (g128_key),
    .iv        (g128_iv),
    .ready     (g128_ready),
    .in_valid  (g128_in_valid),
    .in_data   (g128_in_data),
    .in_ready  (g128_in_ready),
    .out_valid (g128_out_valid),
    .out_data  (g128_out_data),
    .out_ks    (g128_out_ks)
  );

  grain128a #(.W(W_128A), .TAG_W(TAG_W)) u_grain128a (
    .clk, .rst_n,
    .load      (g128a_load),
    .key       (g128a_key),
    .iv        (g128a_iv),
    .ready     (g128a_ready),
    .auth      (g128a_auth),
    .in_valid  (g128a_in_valid),
    .in_data   (g128a_in_data),
    .in_last   (g128a_in_last),
    .decrypt   (g128a_decrypt),
    .in_ready  (g128a_in_ready),
    .out_valid (g128a_out_valid),
    .out_data  (g128a_out_data),
    .out_ks    (g128a_out_ks),
    .tag_valid (g128a_tag_valid),
    .tag       (g128a_tag)
  );

  trivium #(.W(W_TRIV), .KS_LOG2(KS_LOG2)) u_trivium (
    .clk, .rst_n,
    .load      (triv_load),
    .key       (triv_key),
    .iv        (triv_iv),
    .ready     (triv_ready),
    .exhausted (triv_exhausted),
    .in_valid  (triv_in_valid),
    .in_data   (triv_in_data),
    .in_ready  (triv_in_ready),
    .out_valid (triv_out_valid),
    .out_data  (triv_out_data),
    .out_ks    (triv_out_ks)
  );

endmodule

// grain128a: Grain-128a stream cipher with optional authentication.
//
// The cipher combines the pre-output generator (grain128a_pre), which yields
// W pre-output bits y per clock, with the MAC datapath (grain128a_auth). IV
// bit 0 fixes the mode for the whole stream, as the cipher prescribes:
//  * iv[0] = 0, plain mode: every pre-output bit is keystream, z_i = y_i,
//    W bits per clock.
//  * iv[0] = 1, authenticated mode: y_0..y_63 preload the MAC registers, then
//    z_i = y_(64+2i) and the odd bits y_(64+2i+1) feed the MAC shift register,
//    so keystream comes at half the generator rate. The tag is the
//    accumulator after the message and a padding bit m_L = 1.
//
// Ports and timing (this design's choices):
//  * `load` (one clock) latches key/iv and starts the 256 initialization
//    rounds. `ready` rises 256/W + 1 clocks after load in plain mode and
//    256/W + 1 + 64/W clocks after load in authenticated mode (the extra
//    64/W clocks preload the MAC). `auth` shows the mode.
//  * in_valid/in_data/in_ready: W message bits per transfer, in_data[k] is
//    message bit m_(i+k). A transfer happens when in_valid and in_ready are both
//    high. In plain mode in_ready stays high while ready. In authenticated mode
//    the generator first spends one clock drawing the W even/odd pairs' first
//    half, so in_ready is high every other clock at most and a word takes
//    two clocks: the halved throughput of the cipher with MAC.
//  * out_valid/out_data/out_ks: one clock after a transfer, out_data =
//    in_data ^ z and out_ks = z for those W positions. No back-pressure.
//  * in_last (authenticated mode) marks the final word of the message. The
//    message length must be a multiple of W bits. One clock after that
//    transfer tag_valid rises and tag holds the TAG_W-bit tag; the stream
//    is then closed until the next load. in_last is ignored in plain mode.
//  * decrypt (authenticated mode, sampled with each transfer): the MAC is
//    computed over the plaintext, so a receiver sets decrypt and the MAC
//    then absorbs in_data ^ z instead of in_data. Comparing the tag with
//    the one received is left to the user.
// Asynchronous active-low reset. The assertions at the end sample rst_n
// synchronously to disable themselves during reset, which lint reports as
// rst_n being used both ways; the flip-flops themselves use it only as an
// asynchronous reset.
module grain128a #(
  parameter int unsigned W     = 1,
  parameter int unsigned TAG_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [127:0]     key,
  input  logic [95:0]      iv,
  output logic             ready,
  output logic             auth,
  input  logic             in_valid,
  input  logic [W-1:0]     in_data,
  input  logic             in_last,
  input  logic             decrypt,
  output logic             in_ready,
  output logic             out_valid,
  output logic [W-1:0]     out_data,
  output logic [W-1:0]     out_ks,
  output logic             tag_valid,
  output logic [TAG_W-1:0] tag
);
  import cipher_pkg::*;

  localparam int unsigned PRE_CYCLES = 64 / W;

  a_phase_e     phase;
  logic         auth_q;
  logic [5:0]   cnt;
  logic [W-1:0] y, y_lo;
  logic         gen_ready;
  logic         gen_step;

  logic [2*W-1:0] pair;      // pair[2k] = keystream bit, pair[2k+1] = MAC bit
  logic [W-1:0]   z_auth;
  logic           xfer;
  logic           pre_en, msg_en, msg_last;
  logic [31:0]    acc_unused;
  logic [W-1:0]   mac_msg;

  grain128a_pre #(.W(W)) u_pre (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .key   (key),
    .iv    (iv),
    .ready (gen_ready),
    .step  (gen_step),
    .y     (y)
  );

  grain128a_auth #(.W(W), .TAG_W(TAG_W)) u_auth (
    .clk    (clk),
    .rst_n  (rst_n),
    .pre_en (pre_en),
    .pre_y  (y),
    .msg_en (msg_en),
    .msg    (mac_msg),
    .pair_y (pair),
    .last   (msg_last),
    .acc    (acc_unused),
    .tag    (tag)
  );

  // In authenticated mode a word uses 2W consecutive pre-output bits: the W
  // drawn on the previous clock (y_lo) followed by the W on this clock (y).
  assign pair = {y, y_lo};
  always_comb begin
    for (int unsigned k = 0; k < W; k++) z_auth[k] = pair[2*k];
  end

  // The MAC always covers the plaintext: the input itself when encrypting,
  // the input xored with the keystream when decrypting.
  assign mac_msg = decrypt ? (in_data ^ z_auth) : in_data;

  assign ready    = (phase == A_RUN) || (phase == A_RUN_HI);
  assign auth     = auth_q;
  assign in_ready = (phase == A_RUN && !auth_q) || (phase == A_RUN_HI);
  assign xfer     = in_valid && in_ready && !load;

  assign pre_en   = (phase == A_PREAUTH) && !load;
  assign msg_en   = xfer && auth_q;
  assign msg_last = msg_en && in_last;
  assign gen_step = pre_en || xfer || (phase == A_RUN && auth_q && !load);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= A_IDLE;
      auth_q    <= 1'b0;
      cnt       <= '0;
      y_lo      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_ks    <= '0;
      tag_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (load) begin
        phase     <= A_INIT;
        auth_q    <= iv[0];
        cnt       <= '0;
        tag_valid <= 1'b0;
      end else begin
        unique case (phase)
          A_IDLE: ;
          A_INIT:
            if (gen_ready) phase <= auth_q ? A_PREAUTH : A_RUN;
          A_PREAUTH: begin
            cnt <= cnt + 6'd1;
            if (cnt == 6'(PRE_CYCLES - 1)) phase <= A_RUN;
          end
          A_RUN:
            if (auth_q) begin
              y_lo  <= y;
              phase <= A_RUN_HI;
            end else if (xfer) begin
              out_valid <= 1'b1;
              out_data  <= in_data ^ y;
              out_ks    <= y;
            end
          A_RUN_HI:
            if (xfer) begin
              out_valid <= 1'b1;
              out_data  <= in_data ^ z_auth;
              out_ks    <= z_auth;
              if (in_last) begin
                phase     <= A_TAG;
                tag_valid <= 1'b1;
              end else begin
                phase <= A_RUN;
              end
            end
          A_TAG: ;
          default: phase <= A_IDLE;
        endcase
      end
    end
  end

  // A MAC-mode transfer can only happen in the second half of a word.
  assert property (@(posedge clk) disable iff (!rst_n) msg_en |-> phase == A_RUN_HI);

endmodule

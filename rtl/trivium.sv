// trivium: Trivium stream cipher, W keystream bits per clock.
//
// The 288-bit state is kept as s[288:1], numbered exactly as the cipher
// specification numbers it: s[1..93] is the first register, s[94..177] the
// second and s[178..288] the third; bits move from s[j] to s[j+1] each step.
// One step computes
//   t1 = s66 + s93,   t2 = s162 + s177,   t3 = s243 + s288,   z = t1 + t2 + t3
//   t1 += s91 s92 + s171,  t2 += s175 s176 + s264,  t3 += s286 s287 + s69
// and shifts t3 into s1, t1 into s94 and t2 into s178. The first tap of every
// register sits at least 66 positions from its input, so W lanes (lane k
// reads every tap k positions lower) compute W steps in one clock;
// W may be 1, 2, 4, 8, 16, 32 or 64.
//
// Setup: `load` writes key into s[80:1] (key[0] = K_1 at s1), zeros into
// s[93:81], iv into s[173:94], zeros into s[285:174] and ones into
// s[288:286]. 1152 rounds (1152/W clocks) with no output follow; then
// `ready` rises.
//
// Keystream interface (this design's choice, shared with the Grain cores):
// while ready, each cycle with in_valid consumes W message bits and advances
// W steps; one cycle later out_valid is high with out_data = in_data ^ z and
// out_ks = z (bit k = step i+k). A stream is limited to 2^KS_LOG2 keystream
// bits (2^64 in the cipher definition): after that many bits `ready` falls
// and `exhausted` stays high until the next load. No output back-pressure;
// asynchronous active-low reset (also sampled by the assertions at the end);
// `load` restarts at any time.
module trivium #(
  parameter int unsigned W       = 1,
  parameter int unsigned KS_LOG2 = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [79:0]  key,
  input  logic [79:0]  iv,
  output logic         ready,
  output logic         exhausted,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic [W-1:0] out_ks
);
  import cipher_pkg::*;

  localparam int unsigned INIT_ROUNDS = 1152;
  localparam int unsigned INIT_CYCLES = INIT_ROUNDS / W;
  localparam int unsigned LOGW        = $clog2(W);

  initial begin
    assert (W inside {1, 2, 4, 8, 16, 32, 64} && KS_LOG2 > LOGW)
      else $error("trivium: W must be a power of two up to 64, KS_LOG2 > log2(W)");
  end

  logic [288:1] s, s_init, s_run;
  phase_e       phase;
  logic [10:0]  cnt;
  // Number of W-bit words produced; its top bit set means 2^KS_LOG2 bits.
  logic [KS_LOG2-LOGW:0] words;

  logic [W-1:0] z, t1, t2, t3;

  always_comb begin
    for (int unsigned k = 0; k < W; k++) begin
      t1[k] = s[66-k]  ^ s[93-k];
      t2[k] = s[162-k] ^ s[177-k];
      t3[k] = s[243-k] ^ s[288-k];
      z[k]  = t1[k] ^ t2[k] ^ t3[k];
      t1[k] = t1[k] ^ (s[91-k]  & s[92-k])  ^ s[171-k];
      t2[k] = t2[k] ^ (s[175-k] & s[176-k]) ^ s[264-k];
      t3[k] = t3[k] ^ (s[286-k] & s[287-k]) ^ s[69-k];
    end
    // W steps at once: each register moves up by W and takes the W new bits,
    // the newest (lane W-1) landing at the register's first position.
    s_run = s;
    for (int unsigned j = 93; j > W; j--)  s_run[j]     = s[j-W];
    for (int unsigned j = 84; j > W; j--)  s_run[93+j]  = s[93+j-W];
    for (int unsigned j = 111; j > W; j--) s_run[177+j] = s[177+j-W];
    for (int unsigned j = 1; j <= W; j++) begin
      s_run[j]     = t3[W-j];
      s_run[93+j]  = t1[W-j];
      s_run[177+j] = t2[W-j];
    end
  end

  always_comb begin
    s_init              = '0;
    s_init[80:1]        = key;
    s_init[173:94]      = iv;
    s_init[288:286]     = 3'b111;
  end

  assign ready     = (phase == PH_RUN);
  assign exhausted = (phase == PH_DONE);
  assign in_ready  = ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s         <= '0;
      phase     <= PH_IDLE;
      cnt       <= '0;
      words     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_ks    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (load) begin
        s     <= s_init;
        phase <= PH_INIT;
        cnt   <= '0;
        words <= '0;
      end else if (phase == PH_INIT) begin
        s   <= s_run;
        cnt <= cnt + 11'd1;
        if (cnt == 11'(INIT_CYCLES - 1)) phase <= PH_RUN;
      end else if (phase == PH_RUN && in_valid) begin
        s         <= s_run;
        words     <= words + 1'b1;
        out_valid <= 1'b1;
        out_data  <= in_data ^ z;
        out_ks    <= z;
        if (words == {1'b0, {(KS_LOG2-LOGW){1'b1}}}) phase <= PH_DONE;
      end
    end
  end

  // Handshake rule: every accepted word returns exactly one clock later.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && in_ready && !load) |=> out_valid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(in_valid && in_ready && !load) |=> !out_valid);
  // No keystream once the stream limit is reached.
  assert property (@(posedge clk) disable iff (!rst_n) exhausted |-> !in_ready);

endmodule

// grain_v1: Grain v1 stream cipher, W keystream bits per clock.
//
// State: an 80-bit LFSR s and an 80-bit NLFSR b, with s[n] holding s_(i+n) and
// b[n] holding b_(i+n) at time i (bit 0 is the oldest bit, the next to leave).
// Each step computes
//   LFSR feedback  s_(i+80) = s_(i+62)+s_(i+51)+s_(i+38)+s_(i+23)+s_(i+13)+s_i
//   NLFSR feedback b_(i+80) = s_i + g(b)       (the LFSR output masks the NLFSR input)
//   output         z_i = sum over k in {1,2,4,10,31,43,56} of b_(i+k)
//                        + h(s_(i+3), s_(i+25), s_(i+46), s_(i+64), b_(i+63))
// as given by the Grain v1 specification. No feedback or output tap reads
// above index 64, so W copies of the three functions (lane k reads the state
// shifted by k) compute W consecutive steps in one clock, and the registers
// shift by W. W = 1 is the basic one-bit-per-clock cipher; W may be 1, 2, 4, 8
// or 16 (160 rounds must divide evenly, and lane 15 reads the top bit).
//
// Key initialization: `load` copies key into b (b_i = k_i), iv into s[63:0]
// and ones into s[79:64]; the core then runs 160 rounds (160/W clocks) with
// z xored into both feedbacks and no output. `ready` rises when it is done.
//
// Keystream interface (this design's choice): while ready, each cycle with
// in_valid high consumes W message bits in_data (bit k is the message bit of
// keystream position i+k) and advances the cipher by W steps. One cycle later
// out_valid is high with out_data = in_data ^ z and out_ks = z. Both
// encryption and decryption use the same path. There is no output back-pressure.
// Reset is active-low and asynchronous (the handshake assertions at the end
// also sample it synchronously, which lint notes); `load` may be raised at
// any time and restarts the cipher.
module grain_v1 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [79:0]  key,
  input  logic [63:0]  iv,
  output logic         ready,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic [W-1:0] out_ks
);
  import cipher_pkg::*;

  localparam int unsigned INIT_ROUNDS = 160;
  localparam int unsigned INIT_CYCLES = INIT_ROUNDS / W;

  initial begin
    assert (W inside {1, 2, 4, 8, 16})
      else $error("grain_v1: W must be 1, 2, 4, 8 or 16");
  end

  logic [79:0] s, b;
  phase_e      phase;
  logic [7:0]  cnt;

  logic [W-1:0] z, fs, fb;

  // Nonlinear part of the NLFSR feedback, on the state seen by one lane.
  function automatic logic g_nl(input logic [79:0] v, input int unsigned k);
    logic b0, b9, b14, b15, b21, b28, b33, b37, b45, b52, b60, b62, b63;
    b0  = v[k];      b9  = v[k+9];  b14 = v[k+14]; b15 = v[k+15];
    b21 = v[k+21];   b28 = v[k+28]; b33 = v[k+33]; b37 = v[k+37];
    b45 = v[k+45];   b52 = v[k+52]; b60 = v[k+60]; b62 = v[k+62];
    b63 = v[k+63];
    return b62 ^ b60 ^ b52 ^ b45 ^ b37 ^ b33 ^ b28 ^ b21 ^ b14 ^ b9 ^ b0
         ^ (b63 & b60) ^ (b37 & b33) ^ (b15 & b9)
         ^ (b60 & b52 & b45) ^ (b33 & b28 & b21)
         ^ (b63 & b45 & b28 & b9) ^ (b60 & b52 & b37 & b33)
         ^ (b63 & b60 & b21 & b15)
         ^ (b63 & b60 & b52 & b45 & b37) ^ (b33 & b28 & b21 & b15 & b9)
         ^ (b52 & b45 & b37 & b33 & b28 & b21);
  endfunction

  // Filter function h(x0..x4).
  function automatic logic h_fn(input logic x0, x1, x2, x3, x4);
    return x1 ^ x4 ^ (x0 & x3) ^ (x2 & x3) ^ (x3 & x4) ^ (x0 & x1 & x2)
         ^ (x0 & x2 & x3) ^ (x0 & x2 & x4) ^ (x1 & x2 & x4) ^ (x2 & x3 & x4);
  endfunction

  always_comb begin
    for (int unsigned k = 0; k < W; k++) begin
      z[k]  = b[k+1] ^ b[k+2] ^ b[k+4] ^ b[k+10] ^ b[k+31] ^ b[k+43] ^ b[k+56]
            ^ h_fn(s[k+3], s[k+25], s[k+46], s[k+64], b[k+63]);
      fs[k] = s[k+62] ^ s[k+51] ^ s[k+38] ^ s[k+23] ^ s[k+13] ^ s[k];
      fb[k] = s[k] ^ g_nl(b, k);
    end
  end

  assign ready    = (phase == PH_RUN);
  assign in_ready = ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s         <= '0;
      b         <= '0;
      phase     <= PH_IDLE;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_ks    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (load) begin
        b     <= key;
        s     <= {16'hFFFF, iv};
        phase <= PH_INIT;
        cnt   <= '0;
      end else if (phase == PH_INIT) begin
        s   <= {fs ^ z, s[79:W]};
        b   <= {fb ^ z, b[79:W]};
        cnt <= cnt + 8'd1;
        if (cnt == 8'(INIT_CYCLES - 1)) phase <= PH_RUN;
      end else if (phase == PH_RUN && in_valid) begin
        s         <= {fs, s[79:W]};
        b         <= {fb, b[79:W]};
        out_valid <= 1'b1;
        out_data  <= in_data ^ z;
        out_ks    <= z;
      end
    end
  end

  // Handshake rule: every accepted word returns exactly one clock later.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && in_ready && !load) |=> out_valid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(in_valid && in_ready && !load) |=> !out_valid);

endmodule

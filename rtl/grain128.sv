// grain128: Grain-128 stream cipher, W keystream bits per clock.
//
// State: a 128-bit LFSR s and a 128-bit NLFSR b (s[n] = s_(i+n), bit 0 oldest).
// Each step computes
//   LFSR feedback  s_(i+128) = s_i + s_(i+7) + s_(i+38) + s_(i+70) + s_(i+81) + s_(i+96)
//   NLFSR feedback b_(i+128) = s_i + b_i + b_(i+26) + b_(i+56) + b_(i+91) + b_(i+96)
//                  + b3 b67 + b11 b13 + b17 b18 + b27 b59 + b40 b48 + b61 b65 + b68 b84
//   output  z_i = sum over j in {2,15,36,45,64,73,89} of b_(i+j) + h + s_(i+93)
//   h = x0 x1 + x2 x3 + x4 x5 + x6 x7 + x0 x4 x8 with
//       (x0..x8) = (b12, s8, s13, s20, b95, s42, s60, s79, s95)
// The tap indices are the feedback polynomials f(x) and g(x) of the
// specification rewritten as positions (x^k becomes index 128-k). No tap reads
// above index 96, so W lanes (lane k sees the state shifted by k) compute W
// steps per clock; W may be 1, 2, 4, 8, 16 or 32.
//
// Key initialization: `load` puts key into b, iv into s[95:0] and ones into
// s[127:96]; 256 rounds (256/W clocks) follow with z fed back into both
// registers and no output. `ready` rises when they are done.
//
// Keystream interface (this design's choice, shared with grain_v1): while
// ready, each cycle with in_valid consumes W message bits (bit k belongs to
// keystream position i+k) and advances the cipher W steps; one cycle later
// out_valid is high with out_data = in_data ^ z and out_ks = z. No output
// back-pressure; asynchronous active-low reset (also sampled by the
// handshake assertions at the end); `load` restarts at any time.
module grain128 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] key,
  input  logic [95:0]  iv,
  output logic         ready,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic [W-1:0] out_ks
);
  import cipher_pkg::*;

  localparam int unsigned INIT_ROUNDS = 256;
  localparam int unsigned INIT_CYCLES = INIT_ROUNDS / W;

  initial begin
    assert (W inside {1, 2, 4, 8, 16, 32})
      else $error("grain128: W must be a power of two up to 32");
  end

  logic [127:0] s, b;
  phase_e       phase;
  logic [8:0]   cnt;

  logic [W-1:0] z, fs, fb;

  always_comb begin
    for (int unsigned k = 0; k < W; k++) begin
      z[k]  = b[k+2] ^ b[k+15] ^ b[k+36] ^ b[k+45] ^ b[k+64] ^ b[k+73] ^ b[k+89]
            ^ (b[k+12] & s[k+8]) ^ (s[k+13] & s[k+20]) ^ (b[k+95] & s[k+42])
            ^ (s[k+60] & s[k+79]) ^ (b[k+12] & b[k+95] & s[k+95])
            ^ s[k+93];
      fs[k] = s[k] ^ s[k+7] ^ s[k+38] ^ s[k+70] ^ s[k+81] ^ s[k+96];
      fb[k] = s[k] ^ b[k] ^ b[k+26] ^ b[k+56] ^ b[k+91] ^ b[k+96]
            ^ (b[k+3] & b[k+67]) ^ (b[k+11] & b[k+13]) ^ (b[k+17] & b[k+18])
            ^ (b[k+27] & b[k+59]) ^ (b[k+40] & b[k+48]) ^ (b[k+61] & b[k+65])
            ^ (b[k+68] & b[k+84]);
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
        s     <= {32'hFFFF_FFFF, iv};
        phase <= PH_INIT;
        cnt   <= '0;
      end else if (phase == PH_INIT) begin
        s   <= {fs ^ z, s[127:W]};
        b   <= {fb ^ z, b[127:W]};
        cnt <= cnt + 9'd1;
        if (cnt == 9'(INIT_CYCLES - 1)) phase <= PH_RUN;
      end else if (phase == PH_RUN && in_valid) begin
        s         <= {fs, s[127:W]};
        b         <= {fb, b[127:W]};
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

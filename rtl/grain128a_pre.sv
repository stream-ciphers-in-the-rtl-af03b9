// grain128a_pre: pre-output generator of Grain-128a, W bits per clock.
//
// This is the keystream engine of Grain-128a without its mode logic. It holds
// a 128-bit LFSR s and a 128-bit NLFSR b (s[n] = s_(i+n), bit 0 oldest) and
// computes each step
//   s_(i+128) = s_i + s_(i+7) + s_(i+38) + s_(i+70) + s_(i+81) + s_(i+96)
//   b_(i+128) = s_i + (the Grain-128 NLFSR function)
//               + b22 b24 b25 + b70 b78 b82 + b88 b92 b93 b95
//   y_i = sum over j in {2,15,36,45,64,73,89} of b_(i+j) + h + s_(i+93)
// with the same filter h as Grain-128. The three extra NLFSR product terms are
// what makes Grain-128a differ from Grain-128 (g(x) rewritten as positions,
// x^k becoming index 128-k). W lanes give W consecutive steps per clock
// (lane k sees the state shifted by k; no tap reads above index 96), so W may
// be 1, 2, 4, 8, 16 or 32.
//
// Interface and timing: a `load` pulse copies key into b, iv into s[95:0],
// ones into s[126:96] and a zero into s[127]; the generator then runs 256
// rounds (256/W clocks) with y fed back into both registers. After that
// `ready` is high, `y` shows the next W pre-output bits combinationally (y[k]
// is y_(i+k)) and every clock with `step` high advances the state W steps.
// Asynchronous active-low reset; `load` restarts at any time.
module grain128a_pre #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] key,
  input  logic [95:0]  iv,
  output logic         ready,
  input  logic         step,
  output logic [W-1:0] y
);
  import cipher_pkg::*;

  localparam int unsigned INIT_ROUNDS = 256;
  localparam int unsigned INIT_CYCLES = INIT_ROUNDS / W;

  initial begin
    assert (W inside {1, 2, 4, 8, 16, 32})
      else $error("grain128a_pre: W must be a power of two up to 32");
  end

  logic [127:0] s, b;
  phase_e       phase;
  logic [8:0]   cnt;

  logic [W-1:0] fs, fb;

  always_comb begin
    for (int unsigned k = 0; k < W; k++) begin
      y[k]  = b[k+2] ^ b[k+15] ^ b[k+36] ^ b[k+45] ^ b[k+64] ^ b[k+73] ^ b[k+89]
            ^ (b[k+12] & s[k+8]) ^ (s[k+13] & s[k+20]) ^ (b[k+95] & s[k+42])
            ^ (s[k+60] & s[k+79]) ^ (b[k+12] & b[k+95] & s[k+95])
            ^ s[k+93];
      fs[k] = s[k] ^ s[k+7] ^ s[k+38] ^ s[k+70] ^ s[k+81] ^ s[k+96];
      fb[k] = s[k] ^ b[k] ^ b[k+26] ^ b[k+56] ^ b[k+91] ^ b[k+96]
            ^ (b[k+3] & b[k+67]) ^ (b[k+11] & b[k+13]) ^ (b[k+17] & b[k+18])
            ^ (b[k+27] & b[k+59]) ^ (b[k+40] & b[k+48]) ^ (b[k+61] & b[k+65])
            ^ (b[k+68] & b[k+84])
            ^ (b[k+22] & b[k+24] & b[k+25]) ^ (b[k+70] & b[k+78] & b[k+82])
            ^ (b[k+88] & b[k+92] & b[k+93] & b[k+95]);
    end
  end

  assign ready = (phase == PH_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s     <= '0;
      b     <= '0;
      phase <= PH_IDLE;
      cnt   <= '0;
    end else if (load) begin
      b     <= key;
      s     <= {1'b0, 31'h7FFF_FFFF, iv};
      phase <= PH_INIT;
      cnt   <= '0;
    end else if (phase == PH_INIT) begin
      s   <= {fs ^ y, s[127:W]};
      b   <= {fb ^ y, b[127:W]};
      cnt <= cnt + 9'd1;
      if (cnt == 9'(INIT_CYCLES - 1)) phase <= PH_RUN;
    end else if (phase == PH_RUN && step) begin
      s <= {fs, s[127:W]};
      b <= {fb, b[127:W]};
    end
  end

endmodule

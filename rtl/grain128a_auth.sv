// grain128a_auth: message authentication datapath of Grain-128a.
//
// Two 32-bit registers: the accumulator a (a[j] = a_i^j) and the shift
// register r (r[j] = r_(i+j), bit 0 oldest). Operation follows the Grain-128a
// authentication scheme:
//  * Preload: the first 64 pre-output bits after key initialization fill
//    a with y_0..y_31 and r with y_32..y_63. Each cycle with pre_en high
//    shifts W bits (pre_y[0] earliest) into the 64-bit chain {r, a}, so
//    64/W cycles complete the preload.
//  * Absorb: each message bit m_i uses one pair of pre-output bits
//    (y_(64+2i), y_(64+2i+1)). The even bit is keystream and is not seen
//    here; the odd bit enters r. The accumulator adds r when m_i = 1:
//        a_(i+1)^j = a_i^j + m_i r_(i+j),   r_(i+32) = y_(64+2i+1).
//    A cycle with msg_en high absorbs W message bits msg[k] with their
//    pairs pair_y[2k+1:2k], in order k = 0..W-1.
//  * Finish: with `last` set on the final word, the padding bit m_L = 1 is
//    absorbed right after the word, which adds the current r to a. The
//    result is the tag. Only r is needed for this step, so no further
//    pre-output is drawn.
// tag is the last TAG_W accumulator bits, tag[j] = a^(32-TAG_W+j); with the
// default TAG_W = 32 it is the whole accumulator. All updates take effect at
// the next clock edge; the registers have an asynchronous active-low reset.
module grain128a_auth #(
  parameter int unsigned W     = 1,
  parameter int unsigned TAG_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pre_en,
  input  logic [W-1:0]     pre_y,
  input  logic             msg_en,
  input  logic [W-1:0]     msg,
  input  logic [2*W-1:0]   pair_y,
  input  logic             last,
  output logic [31:0]      acc,
  output logic [TAG_W-1:0] tag
);

  initial begin
    assert (W inside {1, 2, 4, 8, 16, 32} && TAG_W >= 1 && TAG_W <= 32)
      else $error("grain128a_auth: W must be a power of two up to 32, TAG_W 1..32");
  end

  logic [31:0] a, r;
  logic [31:0] a_nxt, r_nxt;
  logic [63:0] chain, pre_nxt;

  assign chain   = {r, a};
  assign pre_nxt = {pre_y, chain[63:W]};

  always_comb begin
    a_nxt = a;
    r_nxt = r;
    for (int unsigned k = 0; k < W; k++) begin
      if (msg[k]) a_nxt = a_nxt ^ r_nxt;
      r_nxt = {pair_y[2*k+1], r_nxt[31:1]};
    end
    if (last) a_nxt = a_nxt ^ r_nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0;
      r <= '0;
    end else if (pre_en) begin
      {r, a} <= pre_nxt;
    end else if (msg_en) begin
      a <= a_nxt;
      r <= r_nxt;
    end
  end

  assign acc = a;
  assign tag = a[31 -: TAG_W];

endmodule

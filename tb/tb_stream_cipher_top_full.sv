// tb_stream_cipher_top_full: end-to-end testbench for stream_cipher_top.
//
// // This run keeps every parameter of the top at its default: one keystream
// bit per clock for each cipher and the full 2^64-bit Trivium stream limit
// (which is therefore not reached here).
// All four ciphers run at the same time. For each, a random key/IV is
// loaded, ready must rise after the cipher's initialization time, a random
// message is encrypted with random idle cycles and its keystream compared
// with the bit-serial reference model; the cipher is then reloaded with the
// same key/IV and the ciphertext decrypted, which must give the message back.
// Grain-128a runs once in plain mode and once with authentication, where the
// receiver (decrypt set) must compute the same tag as the sender and as the
// reference MAC. Each mechanism is counted; one that never happened counts as
// a failure.
module tb_stream_cipher_top_full;
  import cipher_ref_pkg::*;

  localparam int W_V1 = 1;
  localparam int W_128 = 1;
  localparam int W_128A = 1;
  localparam int W_TRIV = 1;
  localparam int KS_LOG2 = 64;
  localparam int MSG_BITS = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  // Index: 0 Grain v1, 1 Grain-128, 2 Grain-128a, 3 Trivium.
  localparam int NC = 4;
  logic         load[NC], ready[NC], in_valid[NC], in_ready[NC], out_valid[NC];
  logic [127:0] key[NC];
  logic [95:0]  iv[NC];
  logic [63:0]  in_data[NC], out_data[NC], out_ks[NC];
  logic         a_auth, a_in_last, a_decrypt, a_tag_valid, t_exhausted;
  logic [31:0]  a_tag;
  int           n_init[NC], n_idle[NC], n_roundtrip[NC];
  int           n_plain, n_tag, n_tag_match, n_exhaust;

  stream_cipher_top  dut (
    .clk, .rst_n,
    .v1_load(load[0]), .v1_key(key[0][79:0]), .v1_iv(iv[0][63:0]), .v1_ready(ready[0]),
    .v1_in_valid(in_valid[0]), .v1_in_data(in_data[0][W_V1-1:0]), .v1_in_ready(in_ready[0]),
    .v1_out_valid(out_valid[0]), .v1_out_data(out_data[0][W_V1-1:0]),
    .v1_out_ks(out_ks[0][W_V1-1:0]),
    .g128_load(load[1]), .g128_key(key[1]), .g128_iv(iv[1]), .g128_ready(ready[1]),
    .g128_in_valid(in_valid[1]), .g128_in_data(in_data[1][W_128-1:0]),
    .g128_in_ready(in_ready[1]), .g128_out_valid(out_valid[1]),
    .g128_out_data(out_data[1][W_128-1:0]), .g128_out_ks(out_ks[1][W_128-1:0]),
    .g128a_load(load[2]), .g128a_key(key[2]), .g128a_iv(iv[2]), .g128a_ready(ready[2]),
    .g128a_auth(a_auth), .g128a_in_valid(in_valid[2]),
    .g128a_in_data(in_data[2][W_128A-1:0]), .g128a_in_last(a_in_last),
    .g128a_decrypt(a_decrypt), .g128a_in_ready(in_ready[2]),
    .g128a_out_valid(out_valid[2]), .g128a_out_data(out_data[2][W_128A-1:0]),
    .g128a_out_ks(out_ks[2][W_128A-1:0]), .g128a_tag_valid(a_tag_valid), .g128a_tag(a_tag),
    .triv_load(load[3]), .triv_key(key[3][79:0]), .triv_iv(iv[3][79:0]),
    .triv_ready(ready[3]), .triv_exhausted(t_exhausted), .triv_in_valid(in_valid[3]),
    .triv_in_data(in_data[3][W_TRIV-1:0]), .triv_in_ready(in_ready[3]),
    .triv_out_valid(out_valid[3]), .triv_out_data(out_data[3][W_TRIV-1:0]),
    .triv_out_ks(out_ks[3][W_TRIV-1:0])
  );
  assign out_data[0][63:W_V1]   = '0;
  assign out_ks[0][63:W_V1]     = '0;
  assign out_data[1][63:W_128]  = '0;
  assign out_ks[1][63:W_128]    = '0;
  assign out_data[2][63:W_128A] = '0;
  assign out_ks[2][63:W_128A]   = '0;
  assign out_data[3][63:W_TRIV] = '0;
  assign out_ks[3][63:W_TRIV]   = '0;

  function automatic int width(int c);
    return c == 0 ? W_V1 : c == 1 ? W_128 : c == 2 ? W_128A : W_TRIV;
  endfunction

  function automatic int init_clocks(int c, bit mac);
    case (c)
      0: return 160 / W_V1;
      1: return 256 / W_128;
      2: return 256 / W_128A + 1 + (mac ? 64 / W_128A : 0);
      default: return 1152 / W_TRIV;
    endcase
  endfunction

  function automatic bitq_t reference(int c, bit [127:0] k, bit [95:0] v, int n);
    case (c)
      0: return grain_v1_ref(k[79:0], v[63:0], n);
      1: return grain128_ref(k, v, n, 1'b0);
      2: return grain128_ref(k, v, n, 1'b1);
      default: return trivium_ref(k[79:0], v[79:0], n);
    endcase
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Loads cipher c and pushes msg through it; returns what came out and the
  // keystream. For Grain-128a with IV bit 0 set, the last word is marked and
  // the tag is returned.
  task automatic session(int c, bit [127:0] k, bit [95:0] v, bitq_t msg, bit dec,
                         output bitq_t out, output bitq_t ks, output bit [31:0] tag);
    int w = width(c);
    bit mac = (c == 2) && v[0];
    int cyc, pos;
    bit xfer;
    logic [63:0] word;
    out = {};
    ks = {};
    tag = '0;
    key[c] = k;
    iv[c] = v;
    @(negedge clk) load[c] = 1'b1;
    @(negedge clk) load[c] = 1'b0;
    cyc = 0;
    while (!ready[c] && cyc < 5000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == init_clocks(c, mac), $sformatf("cipher %0d ready after %0d clocks", c, cyc));
    if (cyc == init_clocks(c, mac)) n_init[c]++;
    if (c == 2) begin
      a_decrypt = dec;
      check(a_auth == mac, "Grain-128a mode from IV bit 0");
    end
    pos = 0;
    while (pos < msg.size()) begin
      in_valid[c] = ($urandom_range(3) != 0);
      word = '0;
      for (int j = 0; j < w; j++) word[j] = msg[pos+j];
      in_data[c] = word;
      if (c == 2) a_in_last = mac && (pos + w >= msg.size());
      xfer = in_valid[c] && in_ready[c];
      if (!in_valid[c] && in_ready[c]) n_idle[c]++;
      @(negedge clk);
      check(out_valid[c] == xfer, $sformatf("cipher %0d out_valid", c));
      if (xfer) begin
        for (int j = 0; j < w; j++) begin
          out.push_back(out_data[c][j]);
          ks.push_back(out_ks[c][j]);
        end
        pos += w;
      end
    end
    in_valid[c] = 1'b0;
    if (c == 2) begin
      a_in_last = 1'b0;
      if (mac) begin
        check(a_tag_valid, "tag_valid after the last word");
        tag = a_tag;
      end
    end
  endtask

  task automatic roundtrip(int c, bit [95:0] v);
    bit [127:0] k = {$urandom, $urandom, $urandom, $urandom};
    bit mac = (c == 2) && v[0];
    bitq_t msg, ct, pt, ks1, ks2, ref_ks;
    bit [31:0] tag1, tag2;
    int ok = 1;
    for (int i = 0; i < MSG_BITS; i++) msg.push_back(1'($urandom));
    session(c, k, v, msg, 1'b0, ct, ks1, tag1);
    ref_ks = reference(c, k, v, mac ? 64 + 2 * MSG_BITS : MSG_BITS);
    for (int i = 0; i < MSG_BITS; i++)
      check(ks1[i] == (mac ? ref_ks[64 + 2 * i] : ref_ks[i]),
            $sformatf("cipher %0d keystream bit %0d", c, i));
    session(c, k, v, ct, 1'b1, pt, ks2, tag2);
    for (int i = 0; i < MSG_BITS; i++) begin
      check(pt[i] == msg[i], $sformatf("cipher %0d decrypted bit %0d", c, i));
      if (pt[i] != msg[i]) ok = 0;
    end
    if (ok) n_roundtrip[c]++;
    if (c == 2 && !mac) n_plain++;
    if (mac) begin
      n_tag++;
      check(tag1 == grain128a_tag_ref(ref_ks, msg), "sender tag against reference");
      check(tag2 == tag1, "receiver tag equals sender tag");
      if (tag2 == tag1) n_tag_match++;
    end
  endtask

  initial begin
    bit [95:0] v;
    load = '{default: 1'b0};
    in_valid = '{default: 1'b0};
    in_data = '{default: '0};
    key = '{default: '0};
    iv = '{default: '0};
    a_in_last = 1'b0;
    a_decrypt = 1'b0;
    n_init = '{default: 0};
    n_idle = '{default: 0};
    n_roundtrip = '{default: 0};
    n_plain = 0;
    n_tag = 0;
    n_tag_match = 0;
    n_exhaust = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      roundtrip(0, {$urandom, $urandom, $urandom});
      roundtrip(1, {$urandom, $urandom, $urandom});
      begin
        v = {$urandom, $urandom, $urandom};
        v[0] = 1'b0;
        roundtrip(2, v);
        v[0] = 1'b1;
        roundtrip(2, v);
      end
      roundtrip(3, {$urandom, $urandom, $urandom});
    join
    for (int c = 0; c < NC; c++) begin
      check(n_init[c] > 0, $sformatf("cipher %0d never initialized", c));
      check(n_roundtrip[c] > 0, $sformatf("cipher %0d never completed a round trip", c));
      check(n_idle[c] > 0, $sformatf("cipher %0d never saw an idle cycle", c));
    end
    check(n_plain > 0, "Grain-128a plain mode never ran");
    check(n_tag > 0 && n_tag_match > 0, "Grain-128a authentication never ran");
    $display("mechanisms: init %0d/%0d/%0d/%0d, round trips %0d/%0d/%0d/%0d, idle %0d/%0d/%0d/%0d",
             n_init[0], n_init[1], n_init[2], n_init[3], n_roundtrip[0], n_roundtrip[1],
             n_roundtrip[2], n_roundtrip[3], n_idle[0], n_idle[1], n_idle[2], n_idle[3]);
    $display("mechanisms: Grain-128a plain %0d, tags %0d (matched %0d), Trivium limit %0d",
             n_plain, n_tag, n_tag_match, n_exhaust);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

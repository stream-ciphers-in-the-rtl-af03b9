// tb_grain128a: self-checking testbench for grain128a.
//
// Instances with W = 1 and W = 8 are each run in both modes:
//  * plain (iv[0] = 0): ready must rise 256/W + 1 clocks after load, and the
//    keystream must equal the reference pre-output stream y_0, y_1, ...
//  * authenticated (iv[0] = 1): ready must rise 256/W + 1 + 64/W clocks after
//    load, auth must be high, transfers must never happen on two consecutive
//    clocks (half rate), the keystream must be y_64, y_66, ..., and one clock
//    after the word marked last, tag_valid must rise with the tag given by
//    the index-form MAC definition of the reference package.
// Message words, idle cycles and the decrypt input (the MAC then covers
// in_data ^ keystream) are random.
module tb_grain128a;
  import cipher_ref_pkg::*;

  localparam int NW = 8;
  localparam int NPLAIN = 256;   // keystream bits checked in plain mode

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  logic         load[2], ready[2], auth[2], in_valid[2], in_last[2], in_ready[2], decrypt[2];
  logic         out_valid[2], tag_valid[2];
  logic [127:0] key;
  logic [95:0]  iv;
  logic [63:0]  in_data[2], out_data[2], out_ks[2];
  logic [31:0]  tag[2];

  grain128a dut1 (
    .clk, .rst_n, .load(load[0]), .key, .iv, .ready(ready[0]), .auth(auth[0]),
    .in_valid(in_valid[0]), .in_data(in_data[0][0:0]), .in_last(in_last[0]), .decrypt(decrypt[0]),
    .in_ready(in_ready[0]), .out_valid(out_valid[0]), .out_data(out_data[0][0:0]),
    .out_ks(out_ks[0][0:0]), .tag_valid(tag_valid[0]), .tag(tag[0])
  );
  grain128a #(.W(NW)) dutn (
    .clk, .rst_n, .load(load[1]), .key, .iv, .ready(ready[1]), .auth(auth[1]),
    .in_valid(in_valid[1]), .in_data(in_data[1][NW-1:0]), .in_last(in_last[1]), .decrypt(decrypt[1]),
    .in_ready(in_ready[1]), .out_valid(out_valid[1]), .out_data(out_data[1][NW-1:0]),
    .out_ks(out_ks[1][NW-1:0]), .tag_valid(tag_valid[1]), .tag(tag[1])
  );
  assign out_data[0][63:1]  = '0;
  assign out_ks[0][63:1]    = '0;
  assign out_data[1][63:NW] = '0;
  assign out_ks[1][63:NW]   = '0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Runs one stream. In authenticated mode nwords words are sent, the last
  // one marked; in plain mode NPLAIN bits are checked.
  task automatic run_one(int d, int w, bit [127:0] k, bit [95:0] v, int nwords);
    bitq_t ref_y, m;
    bit mac = v[0];
    int cyc, pos, words;
    bit prev_xfer;
    logic [63:0] sent;
    bit xfer, was_last;
    int nbits = mac ? 64 + 2 * w * nwords : NPLAIN;
    ref_y = grain128_ref(k, v, nbits, 1'b1);
    decrypt[d] = 1'($urandom);
    key = k; iv = v;
    @(negedge clk) load[d] = 1'b1;
    @(negedge clk) load[d] = 1'b0;
    cyc = 0;
    while (!ready[d] && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 256 / w + 1 + (mac ? 64 / w : 0),
          $sformatf("W=%0d mode %0d ready after %0d clocks", w, mac, cyc));
    check(auth[d] == mac, "auth flag follows IV bit 0");
    pos = 0;
    words = 0;
    prev_xfer = 1'b0;
    was_last = 1'b0;
    while (mac ? !was_last : pos < NPLAIN) begin
      in_valid[d] = ($urandom_range(3) != 0);
      in_data[d]  = {$urandom, $urandom};
      in_last[d]  = mac && (words == nwords - 1);
      sent        = in_data[d];
      xfer        = in_valid[d] && in_ready[d];
      if (!mac) check(in_ready[d], "plain mode accepts every clock");
      if (mac && xfer) check(!prev_xfer, "authenticated mode never accepts two clocks in a row");
      prev_xfer = xfer;
      @(negedge clk);
      check(out_valid[d] == xfer, "out_valid one clock after a transfer");
      if (xfer) begin
        for (int j = 0; j < w; j++) begin
          bit zb = mac ? ref_y[64 + 2 * (pos + j)] : ref_y[pos + j];
          check(out_ks[d][j] == zb, $sformatf("W=%0d mode %0d keystream bit %0d", w, mac, pos + j));
          check(out_data[d][j] == (sent[j] ^ zb), "cipher bit");
          if (mac) m.push_back(decrypt[d] ? sent[j] ^ zb : sent[j]);
        end
        pos += w;
        words++;
        if (mac) begin
          check(tag_valid[d] == in_last[d], "tag_valid one clock after the last word");
          was_last = in_last[d];
        end
      end
    end
    in_valid[d] = 1'b0;
    in_last[d]  = 1'b0;
    if (mac) begin
      bit [31:0] exp_tag = grain128a_tag_ref(ref_y, m);
      check(tag[d] == exp_tag, $sformatf("W=%0d tag %h, expected %h", w, tag[d], exp_tag));
      @(negedge clk);
      check(!in_ready[d] && tag_valid[d], "stream closed after the tag");
    end
  endtask

  initial begin
    load     = '{default: 1'b0};
    in_valid = '{default: 1'b0};
    in_last  = '{default: 1'b0};
    decrypt  = '{default: 1'b0};
    in_data  = '{default: '0};
    key = '0; iv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      int w;
      w = (d == 0) ? 1 : NW;
      run_one(d, w, '0, '0, 0);
      run_one(d, w, '0, 96'd1, 4);
      for (int t = 0; t < 3; t++) begin
        bit [95:0] v;
        v = {$urandom, $urandom, $urandom};
        v[0] = 1'b0;
        run_one(d, w, {$urandom, $urandom, $urandom, $urandom}, v, 0);
        v[0] = 1'b1;
        run_one(d, w, {$urandom, $urandom, $urandom, $urandom}, v, 1 + $urandom_range(60));
      end
      // One-word message.
      run_one(d, w, {$urandom, $urandom, $urandom, $urandom}, 96'd1, 1);
    end
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

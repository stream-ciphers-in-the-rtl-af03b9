// tb_trivium: self-checking testbench for trivium.
//
// Two instances are tested: the basic one-bit-per-clock cipher (W = 1) and
// the 64-bit-per-clock variant. For each, several key/IV pairs (the all-zero
// pair first, whose keystream is also compared with the published Trivium
// test vector) are loaded; the testbench checks that ready rises exactly
// 1152/W clocks after load, then streams random message words with random
// idle cycles and compares out_ks and out_data, one clock after each
// transfer, with the bit-serial reference model. A third instance with a
// 64-bit stream limit checks that the keystream stops at the limit.
module tb_trivium;
  import cipher_ref_pkg::*;

  localparam int NW = 64;       // wide instance
  localparam int NBITS = 384;   // keystream bits checked per key/IV
  localparam int LIM_LOG2 = 6;  // stream limit of the third instance

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  // Per-instance signals, index 0: W = 1, index 1: W = NW.
  logic         load[3];
  logic [79:0]  key;
  logic [79:0]  iv;
  logic         ready[3], in_valid[3], in_ready[3], out_valid[3], exhausted[3];
  logic [63:0]  in_data[3], out_data[3], out_ks[3];

  trivium dut1 (
    .clk, .rst_n, .load(load[0]), .key, .iv, .ready(ready[0]), .exhausted(exhausted[0]),
    .in_valid(in_valid[0]), .in_data(in_data[0][0:0]), .in_ready(in_ready[0]),
    .out_valid(out_valid[0]), .out_data(out_data[0][0:0]), .out_ks(out_ks[0][0:0])
  );
  trivium #(.W(NW)) dutn (
    .clk, .rst_n, .load(load[1]), .key, .iv, .ready(ready[1]), .exhausted(exhausted[1]),
    .in_valid(in_valid[1]), .in_data(in_data[1][NW-1:0]), .in_ready(in_ready[1]),
    .out_valid(out_valid[1]), .out_data(out_data[1][NW-1:0]), .out_ks(out_ks[1][NW-1:0])
  );
  // Short stream limit: 2^LIM_LOG2 keystream bits, 4 bits per clock.
  trivium #(.W(4), .KS_LOG2(LIM_LOG2)) dutl (
    .clk, .rst_n, .load(load[2]), .key, .iv, .ready(ready[2]), .exhausted(exhausted[2]),
    .in_valid(in_valid[2]), .in_data(in_data[2][3:0]), .in_ready(in_ready[2]),
    .out_valid(out_valid[2]), .out_data(out_data[2][3:0]), .out_ks(out_ks[2][3:0])
  );
  assign out_data[2][63:4]  = '0;
  assign out_ks[2][63:4]    = '0;
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

  task automatic run_one(int d, int w, bit [79:0] k, bit [79:0] v, bitq_t kat);
    bitq_t ref_z;
    int cyc, pos;
    logic [63:0] sent;
    ref_z = trivium_ref(k, v, NBITS);
    foreach (kat[i]) check(ref_z[i] == kat[i], "reference model against test vector");
    key = k; iv = v;
    @(negedge clk) load[d] = 1'b1;
    @(negedge clk) load[d] = 1'b0;
    cyc = 0;
    while (!ready[d] && cyc < 3000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 1152 / w, $sformatf("W=%0d init took %0d clocks", w, cyc));
    pos = 0;
    while (pos < NBITS) begin
      in_valid[d] = ($urandom_range(3) != 0);
      in_data[d]  = {$urandom, $urandom};
      sent        = in_data[d];
      check(in_ready[d] == 1'b1, "in_ready while streaming");
      @(negedge clk);
      if (in_valid[d]) begin
        check(out_valid[d] == 1'b1, "out_valid one clock after transfer");
        for (int j = 0; j < w; j++) begin
          check(out_ks[d][j] == ref_z[pos+j],
                $sformatf("W=%0d keystream bit %0d", w, pos + j));
          check(out_data[d][j] == (sent[j] ^ ref_z[pos+j]),
                $sformatf("W=%0d cipher bit %0d", w, pos + j));
        end
        pos += w;
      end else begin
        check(out_valid[d] == 1'b0, "no out_valid without transfer");
      end
    end
    in_valid[d] = 1'b0;
  endtask

  initial begin
    bitq_t none;
    load = '{default: 1'b0};
    in_valid = '{default: 1'b0};
    in_data = '{default: '0};
    key = '0; iv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      int w;
      w = (d == 0) ? 1 : NW;
      run_one(d, w, '0, '0, hex_lsb("fbe0bf265859051b517a2e4e239fc97f"));
      for (int t = 0; t < 3; t++)
        run_one(d, w, 80'({$urandom, $urandom, $urandom}), 80'({$urandom, $urandom, $urandom}), none);
    end
    // Stream limit: 2^LIM_LOG2 bits, then the stream stops.
    begin
      bitq_t ref_z;
      int words;
      key = 80'({$urandom, $urandom, $urandom});
      iv  = 80'({$urandom, $urandom, $urandom});
      ref_z = trivium_ref(key, iv, 1 << LIM_LOG2);
      @(negedge clk) load[2] = 1'b1;
      @(negedge clk) load[2] = 1'b0;
      repeat (1152 / 4) @(negedge clk);
      check(ready[2] && !exhausted[2], "limited instance ready");
      words = 0;
      in_valid[2] = 1'b1;
      while (in_ready[2] && words < 100) begin
        in_data[2] = '0;
        @(negedge clk);
        for (int j = 0; j < 4; j++)
          check(out_ks[2][j] == ref_z[4*words+j], "limited instance keystream");
        words++;
      end
      in_valid[2] = 1'b0;
      check(words == (1 << LIM_LOG2) / 4, $sformatf("stream stopped after %0d words", words));
      check(exhausted[2] && !ready[2], "exhausted flag after the limit");
      @(negedge clk);
      check(!out_valid[2], "no output after the limit");
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

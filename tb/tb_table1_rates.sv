// tb_table1_rates: every cipher configuration of the comparison table.
//
// The comparison lists Grain v1 at 1..16 keystream bits per clock, Grain-128
// and Grain-128a (with and without MAC) at 1..32, and Trivium at 1..64, with
// their throughput at a 100 kHz clock. This testbench builds each of those
// configurations, checks its initialization time (rounds / W clocks), feeds
// it a message word on every clock it accepts one, and measures the
// keystream bits delivered per clock. That rate times 100 kHz must equal
// the listed throughput: W x 0.1 Mbps, or half of it for Grain-128a with MAC.
// The keystream of every configuration is also checked against the
// bit-serial reference model.
module tb_table1_rates;
  import cipher_ref_pkg::*;

  localparam int NCLK = 64;          // measurement window in clocks
  localparam real F_MHZ = 0.1;       // 100 kHz

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0;
  int failures = 0;
  int n_done = 0;
  int n_configs = 0;

  bit [127:0] key;
  bit [95:0]  iv_plain, iv_mac;

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic report(string name, int w, int bits, real table_mbps);
    real mbps = F_MHZ * real'(bits) / real'(NCLK);
    $display("%-22s W=%2d  %0d bits in %0d clocks = %4.2f Mbps at 100 kHz (table %4.2f)",
             name, w, bits, NCLK, mbps, table_mbps);
    check(mbps > table_mbps - 0.001 && mbps < table_mbps + 0.001,
          $sformatf("%s W=%0d throughput %f, table %f", name, w, mbps, table_mbps));
  endtask

  // ---------------- Grain v1: t = 1, 2, 4, 8, 16 ----------------
  for (genvar gi = 0; gi < 5; gi++) begin : g_v1
    localparam int W = 1 << gi;
    logic ld = 1'b0, rdy, vin = 1'b0, rin, vout;
    logic [W-1:0] din = '0, dout, ks;
    grain_v1 #(.W(W)) dut (
      .clk, .rst_n, .load(ld), .key(key[79:0]), .iv(iv_plain[63:0]), .ready(rdy),
      .in_valid(vin), .in_data(din), .in_ready(rin), .out_valid(vout), .out_data(dout),
      .out_ks(ks)
    );
    initial begin
      bitq_t r;
      int cyc, bits;
      n_configs++;
      wait (rst_n);
      r = grain_v1_ref(key[79:0], iv_plain[63:0], NCLK * W);
      @(negedge clk) ld = 1'b1;
      @(negedge clk) ld = 1'b0;
      cyc = 0;
      while (!rdy) begin @(negedge clk); cyc++; end
      check(cyc == 160 / W, "Grain v1 initialization time");
      vin = 1'b1;
      bits = 0;
      for (int c = 0; c < NCLK; c++) begin
        @(negedge clk);
        if (vout) begin
          for (int j = 0; j < W; j++) check(ks[j] == r[bits+j], "Grain v1 keystream");
          bits += W;
        end
      end
      vin = 1'b0;
      report("Grain v1", W, bits, 0.1 * W);
      n_done++;
    end
  end

  // ---------------- Grain-128: t = 1, 2, 4, 8, 16, 32 ----------------
  for (genvar gi = 0; gi < 6; gi++) begin : g_128
    localparam int W = 1 << gi;
    logic ld = 1'b0, rdy, vin = 1'b0, rin, vout;
    logic [W-1:0] din = '0, dout, ks;
    grain128 #(.W(W)) dut (
      .clk, .rst_n, .load(ld), .key(key), .iv(iv_plain), .ready(rdy),
      .in_valid(vin), .in_data(din), .in_ready(rin), .out_valid(vout), .out_data(dout),
      .out_ks(ks)
    );
    initial begin
      bitq_t r;
      int cyc, bits;
      n_configs++;
      wait (rst_n);
      r = grain128_ref(key, iv_plain, NCLK * W, 1'b0);
      @(negedge clk) ld = 1'b1;
      @(negedge clk) ld = 1'b0;
      cyc = 0;
      while (!rdy) begin @(negedge clk); cyc++; end
      check(cyc == 256 / W, "Grain-128 initialization time");
      vin = 1'b1;
      bits = 0;
      for (int c = 0; c < NCLK; c++) begin
        @(negedge clk);
        if (vout) begin
          for (int j = 0; j < W; j++) check(ks[j] == r[bits+j], "Grain-128 keystream");
          bits += W;
        end
      end
      vin = 1'b0;
      report("Grain-128", W, bits, 0.1 * W);
      n_done++;
    end
  end

  // ------- Grain-128a without (m = 0) and with (m = 1) MAC: t = 1..32 -------
  for (genvar m = 0; m < 2; m++) begin : g_128a_mode
    for (genvar gi = 0; gi < 6; gi++) begin : g_128a
      localparam int W = 1 << gi;
      logic ld = 1'b0, rdy, au, vin = 1'b0, rin, vout, tv;
      logic [W-1:0] din = '0, dout, ks;
      logic [31:0] tg;
      grain128a #(.W(W)) dut (
        .clk, .rst_n, .load(ld), .key(key), .iv(m ? iv_mac : iv_plain), .ready(rdy),
        .auth(au), .in_valid(vin), .in_data(din), .in_last(1'b0), .decrypt(1'b0),
        .in_ready(rin), .out_valid(vout), .out_data(dout), .out_ks(ks),
        .tag_valid(tv), .tag(tg)
      );
      initial begin
        bitq_t r;
        int cyc, bits;
        n_configs++;
        wait (rst_n);
        r = grain128_ref(key, m ? iv_mac : iv_plain, 64 + 2 * NCLK * W, 1'b1);
        @(negedge clk) ld = 1'b1;
        @(negedge clk) ld = 1'b0;
        cyc = 0;
        while (!rdy) begin @(negedge clk); cyc++; end
        check(cyc == 256 / W + 1 + (m ? 64 / W : 0), "Grain-128a initialization time");
        check(au == 1'(m), "Grain-128a mode");
        vin = 1'b1;
        bits = 0;
        for (int c = 0; c < NCLK; c++) begin
          @(negedge clk);
          if (vout) begin
            for (int j = 0; j < W; j++)
              check(ks[j] == (m ? r[64 + 2 * (bits + j)] : r[bits+j]), "Grain-128a keystream");
            bits += W;
          end
        end
        vin = 1'b0;
        report(m ? "Grain-128a with MAC" : "Grain-128a w/o MAC", W, bits, (m ? 0.05 : 0.1) * W);
        n_done++;
      end
    end
  end

  // ---------------- Trivium: t = 1, 4, 8, 16, 32, 64 ----------------
  localparam int TRIV_W[6] = '{1, 4, 8, 16, 32, 64};
  for (genvar gi = 0; gi < 6; gi++) begin : g_triv
    localparam int W = TRIV_W[gi];
    logic ld = 1'b0, rdy, ex, vin = 1'b0, rin, vout;
    logic [W-1:0] din = '0, dout, ks;
    trivium #(.W(W)) dut (
      .clk, .rst_n, .load(ld), .key(key[79:0]), .iv(iv_plain[79:0]), .ready(rdy),
      .exhausted(ex), .in_valid(vin), .in_data(din), .in_ready(rin), .out_valid(vout),
      .out_data(dout), .out_ks(ks)
    );
    initial begin
      bitq_t r;
      int cyc, bits;
      n_configs++;
      wait (rst_n);
      r = trivium_ref(key[79:0], iv_plain[79:0], NCLK * W);
      @(negedge clk) ld = 1'b1;
      @(negedge clk) ld = 1'b0;
      cyc = 0;
      while (!rdy) begin @(negedge clk); cyc++; end
      check(cyc == 1152 / W, "Trivium initialization time");
      vin = 1'b1;
      bits = 0;
      for (int c = 0; c < NCLK; c++) begin
        @(negedge clk);
        if (vout) begin
          for (int j = 0; j < W; j++) check(ks[j] == r[bits+j], "Trivium keystream");
          bits += W;
        end
      end
      vin = 1'b0;
      report("Trivium", W, bits, 0.1 * W);
      n_done++;
    end
  end

  initial begin
    key = {$urandom, $urandom, $urandom, $urandom};
    iv_plain = {$urandom, $urandom, $urandom};
    iv_plain[0] = 1'b0;
    iv_mac = {$urandom, $urandom, $urandom};
    iv_mac[0] = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (n_configs > 0 && n_done == n_configs);
    check(n_configs == 29, $sformatf("%0d configurations built", n_configs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

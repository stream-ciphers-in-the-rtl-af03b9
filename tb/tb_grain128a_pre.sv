// tb_grain128a_pre: self-checking testbench for grain128a_pre.
//
// Instances with W = 1 and W = 32 are loaded with several key/IV pairs. The
// testbench checks that ready rises exactly 256/W clocks after load, that y
// holds still while step is low, and that the pre-output stream, read W bits
// per step with random pauses, equals the bit-serial Grain-128a reference.
module tb_grain128a_pre;
  import cipher_ref_pkg::*;

  localparam int NW = 32;
  localparam int NBITS = 512;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  logic         load[2], ready[2], step[2];
  logic [127:0] key;
  logic [95:0]  iv;
  logic [63:0]  y[2];

  grain128a_pre dut1 (
    .clk, .rst_n, .load(load[0]), .key, .iv, .ready(ready[0]), .step(step[0]),
    .y(y[0][0:0])
  );
  grain128a_pre #(.W(NW)) dutn (
    .clk, .rst_n, .load(load[1]), .key, .iv, .ready(ready[1]), .step(step[1]),
    .y(y[1][NW-1:0])
  );
  assign y[0][63:1]  = '0;
  assign y[1][63:NW] = '0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(int d, int w, bit [127:0] k, bit [95:0] v);
    bitq_t ref_y;
    int cyc, pos;
    logic [63:0] held;
    ref_y = grain128_ref(k, v, NBITS, 1'b1);
    key = k; iv = v;
    @(negedge clk) load[d] = 1'b1;
    @(negedge clk) load[d] = 1'b0;
    cyc = 0;
    while (!ready[d] && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 256 / w, $sformatf("W=%0d init took %0d clocks", w, cyc));
    pos = 0;
    while (pos < NBITS) begin
      for (int j = 0; j < w; j++)
        check(y[d][j] == ref_y[pos+j], $sformatf("W=%0d pre-output bit %0d", w, pos + j));
      step[d] = ($urandom_range(3) != 0);
      held = y[d];
      @(negedge clk);
      if (step[d]) pos += w;
      else check(y[d] == held, "y holds without step");
    end
    step[d] = 1'b0;
  endtask

  initial begin
    load = '{default: 1'b0};
    step = '{default: 1'b0};
    key = '0; iv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      int w;
      w = (d == 0) ? 1 : NW;
      run_one(d, w, '0, '0);
      for (int t = 0; t < 3; t++)
        run_one(d, w, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

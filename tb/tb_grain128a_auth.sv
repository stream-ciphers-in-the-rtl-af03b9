// tb_grain128a_auth: self-checking testbench for grain128a_auth.
//
// The MAC datapath is driven directly with random pre-output bits: 64 bits
// of preload, then a random message of whole words, each word with its random
// even/odd pre-output pairs, and `last` on the final word. After every
// message the tag is compared with the index-form definition of the Grain-128a
// MAC computed by the reference package. Instances with W = 1 (full 32-bit
// tag) and W = 8 with a 16-bit tag are tested.
module tb_grain128a_auth;
  import cipher_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  logic        pre_en[2], msg_en[2], last[2];
  logic [7:0]  pre_y[2], msg[2];
  logic [15:0] pair_y[2];
  logic [31:0] acc[2];
  logic [31:0] tag1;
  logic [15:0] tag8;

  grain128a_auth dut1 (
    .clk, .rst_n, .pre_en(pre_en[0]), .pre_y(pre_y[0][0:0]), .msg_en(msg_en[0]),
    .msg(msg[0][0:0]), .pair_y(pair_y[0][1:0]), .last(last[0]), .acc(acc[0]), .tag(tag1)
  );
  grain128a_auth #(.W(8), .TAG_W(16)) dut8 (
    .clk, .rst_n, .pre_en(pre_en[1]), .pre_y(pre_y[1]), .msg_en(msg_en[1]),
    .msg(msg[1]), .pair_y(pair_y[1]), .last(last[1]), .acc(acc[1]), .tag(tag8)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(int d, int w, int nwords);
    bitq_t y, m;
    bit [31:0] exp_tag;
    // Pre-output as the cipher would deliver it: 64 preload bits, then pairs.
    for (int i = 0; i < 64 + 2 * w * nwords; i++) y.push_back(1'($urandom));
    for (int i = 0; i < w * nwords; i++) m.push_back(1'($urandom));
    for (int c = 0; c < 64 / w; c++) begin
      pre_en[d] = 1'b1;
      for (int j = 0; j < w; j++) pre_y[d][j] = y[c*w+j];
      @(negedge clk);
    end
    pre_en[d] = 1'b0;
    for (int j = 0; j < 32; j++) check(acc[d][j] == y[j], "accumulator preload");
    for (int c = 0; c < nwords; c++) begin
      msg_en[d] = 1'b1;
      last[d]   = (c == nwords - 1);
      for (int j = 0; j < w; j++) begin
        msg[d][j]        = m[c*w+j];
        pair_y[d][2*j]   = y[64+2*(c*w+j)];
        pair_y[d][2*j+1] = y[64+2*(c*w+j)+1];
      end
      @(negedge clk);
      msg_en[d] = 1'b0;
      last[d]   = 1'b0;
      if ($urandom_range(1) == 0) @(negedge clk);   // idle cycle: state must hold
    end
    exp_tag = grain128a_tag_ref(y, m);
    if (d == 0) check(tag1 == exp_tag, $sformatf("W=1 tag %h, expected %h", tag1, exp_tag));
    else        check(tag8 == exp_tag[31:16], $sformatf("W=8 tag %h, expected %h", tag8, exp_tag[31:16]));
    check(acc[d] == exp_tag, "full accumulator");
  endtask

  initial begin
    pre_en = '{default: 1'b0};
    msg_en = '{default: 1'b0};
    last   = '{default: 1'b0};
    pre_y  = '{default: '0};
    msg    = '{default: '0};
    pair_y = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      run_one(0, 1, 1 + $urandom_range(40));
      run_one(1, 8, 1 + $urandom_range(6));
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

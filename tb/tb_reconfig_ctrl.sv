// Testbench for reconfig_ctrl, with the configuration ROM and four
// reconfigurable units (document's 25-cycle STT-NV writes) around it.
// Checks: a rewrite holds its unit for 2 + 9 x 25 = 227 cycles; a unit with an
// operation in flight is drained before any write; units are rewritten one
// at a time in index order; an adjustment request is served before pending
// interval reconfigurations and counted; restart sends every unit home.
// A monitor counts a failure for any configuration write to a busy unit or
// two units held at once.
module tb_reconfig_ctrl;
  import rfu_pkg::*;

  localparam fn_e HOME [4] = '{FN_INT_MUL, FN_INT_DIV, FN_FP_MUL, FN_FP_DIV};

  logic        clk = 0, rst_n = 0, restart = 0, decide = 0;
  fn_e         policy_target [4], target [4], unit_fn [4];
  logic [3:0]  adj_req = 0, cfg_ok, busy, cfg_busy, hold, cfg_we, avail;
  logic [3:0]  in_valid = 0;
  cfg_idx_t    cfg_idx, rom_idx;
  cfg_word_t   cfg_data, rom_data;
  cfg_word_t   rdata [4];
  fn_e         rom_fn;
  logic        active;
  logic [31:0] n_reconfig, n_adjust;
  fu_res_t     res [4];
  int          checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  reconfig_ctrl dut (.clk, .rst_n, .restart, .decide, .policy_target, .adj_req,
    .unit_fn, .unit_cfg_ok(cfg_ok), .unit_busy(busy), .unit_cfg_busy(cfg_busy),
    .hold, .cfg_we, .cfg_idx, .cfg_data, .rom_fn, .rom_idx, .rom_data,
    .target, .active, .n_reconfig, .n_adjust);

  cfg_rom u_rom (.fn(rom_fn), .idx(rom_idx), .data(rom_data));

  for (genvar r = 0; r < 4; r++) begin : g_u
    stt_rfu #(.HOME_FN(HOME[r])) u (.clk, .rst_n, .in_valid(in_valid[r]), .in_subop(1'b0),
      .in_a(64'd1000), .in_b(64'd3), .in_tag(8'(r)), .avail(avail[r]), .out(res[r]), .busy(busy[r]),
      .cur_fn(unit_fn[r]), .cfg_ok(cfg_ok[r]), .hold(hold[r]), .cfg_we(cfg_we[r]),
      .cfg_idx, .cfg_data, .cfg_busy(cfg_busy[r]), .cfg_ridx('0), .cfg_rdata(rdata[r]));
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // protocol monitor and hold-length measurement
  int hold_len [4];
  int last_len [4];
  int order [$];
  always @(posedge clk) if (rst_n) begin
    for (int u = 0; u < 4; u++) begin
      if (cfg_we[u] && busy[u]) begin failures++; $display("FAIL write to busy unit %0d", u); end
      if (hold[u]) hold_len[u]++;
      else if (hold_len[u] != 0) begin last_len[u] = hold_len[u]; hold_len[u] = 0; order.push_back(u); end
    end
    if ($countones(hold) > 1) begin failures++; $display("FAIL two units held"); end
  end

  task automatic pulse_decide(input fn_e t0, t1, t2, t3);
    policy_target = '{t0, t1, t2, t3};
    decide = 1; @(negedge clk); decide = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    @(negedge clk);
    while ((active || target != unit_fn) && n < 5000) begin @(negedge clk); n++; end
    chk(n < 5000, "controller settles");
    repeat (2) @(negedge clk);
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < 4; u++) begin hold_len[u] = 0; last_len[u] = 0; end
    policy_target = HOME;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(!active && n_reconfig == 0, "nothing to do after reset");
    // 1. units 0 and 2 become int add and fp add
    pulse_decide(FN_INT_ADD, FN_INT_DIV, FN_FP_ADD, FN_FP_DIV);
    wait_idle();
    chk(unit_fn[0] == FN_INT_ADD && unit_fn[2] == FN_FP_ADD && unit_fn[1] == FN_INT_DIV, "targets reached");
    chk(last_len[0] == 227 && last_len[2] == 227, $sformatf("rewrite holds 227 cycles (%0d, %0d)", last_len[0], last_len[2]));
    chk(order.size() == 2 && order[0] == 0 && order[1] == 2, "index order");
    chk(n_reconfig == 2, "two rewrites counted");
    // 2. drain: unit 1 (int div, 40 cycles) busy when its rewrite is decided
    @(negedge clk);
    in_valid[1] = 1; @(negedge clk); in_valid[1] = 0;
    pulse_decide(FN_INT_ADD, FN_INT_ADD, FN_FP_ADD, FN_FP_DIV);
    wait_idle();
    chk(unit_fn[1] == FN_INT_ADD, "unit 1 is an adder");
    chk(last_len[1] > 227 && last_len[1] < 227 + 40, $sformatf("drain then rewrite (%0d)", last_len[1]));
    // 3. adjustment served ahead of pending rewrites: unit 3 is first made an
    //    adder; then units 1 and 2 are scheduled, and while unit 1 is being
    //    written unit 3 is asked back home; it must go before unit 2
    pulse_decide(FN_INT_ADD, FN_INT_ADD, FN_FP_ADD, FN_INT_ADD);
    wait_idle();
    chk(unit_fn[3] == FN_INT_ADD, "unit 3 is an adder");
    order.delete();
    pulse_decide(FN_INT_ADD, FN_FP_ADD, FN_INT_ADD, FN_INT_ADD);   // units 1, 2 pending
    repeat (50) @(negedge clk);
    adj_req[3] = 1; @(negedge clk); adj_req[3] = 0;                 // unit 3 back to fp div
    wait_idle();
    chk(order.size() == 3, $sformatf("three rewrites (%0d)", order.size()));
    if (order.size() == 3)
      chk(order[0] == 1 && order[1] == 3 && order[2] == 2, $sformatf("adjustment first (%0d %0d %0d)", order[0], order[1], order[2]));
    chk(unit_fn[3] == FN_FP_DIV && target[3] == FN_FP_DIV, "unit 3 adjusted home");
    chk(unit_fn[1] == FN_FP_ADD && unit_fn[2] == FN_INT_ADD, "remaining targets reached");
    chk(n_adjust == 1, $sformatf("one adjustment counted (%0d)", n_adjust));
    // 4. restart sends all home
    restart = 1; @(negedge clk); restart = 0;
    wait_idle();
    chk(unit_fn == HOME, "all home after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

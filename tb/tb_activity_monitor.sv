// Testbench for activity_monitor with INTERVAL=20 and LEARN=50.
// A known busy pattern is driven and the counts reported at each `decide`
// pulse are compared with counts kept here. Checks: dynamic decisions every
// 20 cycles, the static algorithm decides once after 50 cycles and then
// never again, ALGO_NONE never decides, restart clears the counts.
module tb_activity_monitor;
  import rfu_pkg::*;

  localparam int INTERVAL = 20, LEARN = 50;
  logic        clk = 0, rst_n = 0, restart = 0;
  algo_e       algo = ALGO_NONE;
  logic [5:0]  fn_busy = 0;
  logic        decide, learning;
  logic [31:0] snap_cnt [N_FN];
  int          ref_cnt [N_FN];
  int          checks = 0, failures = 0, cyc = 0, n_dec = 0, last_dec = 0;

  always #5 clk = ~clk;

  activity_monitor #(.INTERVAL(INTERVAL), .LEARN(LEARN)) dut (.clk, .rst_n, .algo, .restart,
    .fn_busy, .decide, .snap_cnt, .learning);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // reference: count busy cycles, compare at each decide
  int per_len;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n) begin
    if (decide) begin
      n_dec++;
      for (int f = 0; f < N_FN; f++)
        chk(snap_cnt[f] == 32'(ref_cnt[f]), $sformatf("count fn %0d: %0d want %0d", f, snap_cnt[f], ref_cnt[f]));
      chk(cyc - last_dec == per_len, $sformatf("period %0d want %0d", cyc - last_dec, per_len));
      last_dec = cyc;
      for (int f = 0; f < N_FN; f++) ref_cnt[f] = 0;
    end
  end
  // accumulate the busy bits that the DUT samples at each posedge
  always @(posedge clk) if (rst_n && !restart && algo != ALGO_NONE && !(algo == ALGO_STATIC && !learning))
    for (int f = 0; f < N_FN; f++) ref_cnt[f] += int'(fn_busy[f]);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    repeat (n) begin
      fn_busy = 6'($urandom());
      @(negedge clk);
    end
  endtask

  initial begin
    for (int f = 0; f < N_FN; f++) ref_cnt[f] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(60);
    chk(n_dec == 0, "no decision under ALGO_NONE");
    // switch to dynamic BIA
    algo = ALGO_DYN_BIA; restart = 1; @(negedge clk); restart = 0;
    for (int f = 0; f < N_FN; f++) ref_cnt[f] = 0;
    last_dec = cyc; per_len = INTERVAL;
    run(105);
    chk(n_dec == 5, $sformatf("five dynamic decisions (got %0d)", n_dec));
    // switch to static
    algo = ALGO_STATIC; restart = 1; @(negedge clk); restart = 0;
    for (int f = 0; f < N_FN; f++) ref_cnt[f] = 0;
    last_dec = cyc; per_len = LEARN; n_dec = 0;
    chk(learning, "learning phase");
    run(200);
    chk(n_dec == 1, $sformatf("static decides once (got %0d)", n_dec));
    chk(!learning, "learning over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

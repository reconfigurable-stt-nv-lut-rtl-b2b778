// Full-size testbench of rfu_cluster_top: every parameter at its default
// (100K-cycle monitoring interval, 10K BMA threshold, 25-cycle LUT writes).
// The static algorithm (100M-cycle learning phase) is left to the
// reduced-size testbench.
// A random operation stream is offered two operations per cycle; operations
// that are refused are offered again. Every result is checked against a
// reference computed here when the operation is created (integer arithmetic,
// double-precision reals for FP). The run goes through phases that make each
// mechanism happen and counts it:
//  * dynamic BIA with int add / fp add traffic: idle units spread over both;
//  * a burst of int multiplies: conflict and adjustment of the int mul unit;
//  * dynamic BMA with heavy fp add: one idle unit to fp add, the rest to int add;
//  * a switch back to no adaptation: every unit returns home.
// Each counted mechanism that never happened is a failure.
module tb_rfu_cluster_full;
  import rfu_pkg::*;

  localparam int unsigned INTERVAL = 100_000;
  localparam int unsigned THRESH   = 10_000 * INTERVAL / 100_000;
  localparam int unsigned N_FIX    = 4;
  localparam int unsigned N_UNITS  = 8;
  localparam fn_e HOME [4] = '{FN_INT_MUL, FN_INT_DIV, FN_FP_MUL, FN_FP_DIV};

  logic        clk = 0, rst_n = 0;
  algo_e       algo = ALGO_NONE;
  fu_req_t     req [2];
  logic [1:0]  accept;
  fu_res_t     res [N_UNITS];
  fn_e         unit_fn [N_UNITS];
  fn_e         rfu_target [4];
  logic [3:0]  rfu_held;
  logic        learning, reconfiguring;
  logic [31:0] n_conflict, n_adjust, n_reconfig, n_decide;

  always #5 clk = ~clk;

  rfu_cluster_top dut (
    .clk, .rst_n, .algo, .req, .accept, .res, .unit_fn, .rfu_held, .rfu_target,
    .reconfiguring, .learning, .n_conflict, .n_adjust, .n_reconfig, .n_decide);

  int checks = 0, failures = 0, cyc = 0;
  int n_done = 0, n_foreign = 0, n_drain = 0, n_mode_switch = 0;
  int dec_static = 0, dec_bia = 0, dec_bma = 0;
  word_t expv [int];      // expected result by tag
  fn_e   tagfn [int];
  logic [1:0] acc_s;      // accept, sampled just before the clock edge
  int    mix [N_FN];      // percentage of each function in the stream

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  function automatic word_t rnd_fp();
    logic [10:0] e;
    e = 11'(1023 - 100 + ($urandom() % 201));
    return {1'($urandom()), e, 52'({$urandom(), $urandom()})};
  endfunction

  function automatic word_t ref_y(fn_e f, logic s, word_t x, word_t z);
    case (f)
      FN_INT_ADD: return s ? x - z : x + z;
      FN_INT_MUL: return x * z;
      FN_INT_DIV: return s ? x % z : x / z;
      FN_FP_ADD:  return $realtobits(s ? $bitstoreal(x) - $bitstoreal(z) : $bitstoreal(x) + $bitstoreal(z));
      FN_FP_MUL:  return $realtobits($bitstoreal(x) * $bitstoreal(z));
      default:    return $realtobits($bitstoreal(x) / $bitstoreal(z));
    endcase
  endfunction

  int next_tag = 0;
  function automatic fu_req_t new_op();
    fu_req_t r;
    int p, acc;
    p = $urandom() % 100; acc = 0;
    r = '0;
    r.fn = FN_INT_ADD;
    for (int f = 0; f < N_FN; f++) begin
      if (p >= acc && p < acc + mix[f]) r.fn = fn_e'(f);
      acc += mix[f];
    end
    r.valid = 1'b1;
    r.subop = 1'($urandom());
    if (r.fn == FN_FP_MUL || r.fn == FN_FP_DIV) r.subop = 1'b0;
    if (r.fn == FN_INT_ADD || r.fn == FN_INT_MUL || r.fn == FN_INT_DIV) begin
      r.a = {$urandom(), $urandom()};
      r.b = {$urandom(), $urandom()} >> ($urandom() % 64);
      if (r.b == 0) r.b = 1;
    end else begin
      r.a = rnd_fp(); r.b = rnd_fp();
    end
    while (expv.exists(next_tag)) next_tag = (next_tag + 1) % 256;
    r.tag = 8'(next_tag);
    expv[next_tag] = ref_y(r.fn, r.subop, r.a, r.b);
    tagfn[next_tag] = r.fn;
    next_tag = (next_tag + 1) % 256;
    return r;
  endfunction

  // result checking and mechanism counters
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int u = 0; u < N_UNITS; u++)
      if (res[u].valid) begin
        checks++;
        if (!expv.exists(int'(res[u].tag))) begin
          failures++; $display("FAIL unexpected tag %0d from unit %0d", res[u].tag, u);
        end else begin
          if (res[u].data != expv[int'(res[u].tag)]) begin
            failures++;
            $display("FAIL unit %0d fn %0d tag %0d: %h want %h", u, unit_fn[u], res[u].tag, res[u].data, expv[int'(res[u].tag)]);
          end
          expv.delete(int'(res[u].tag));
        end
        n_done++;
        if (u >= N_FIX && unit_fn[u] != HOME[u - N_FIX]) n_foreign++;
      end
    for (int r = 0; r < 4; r++)
      if (rfu_held[r] && dut.unit_busy[N_FIX + r]) n_drain++;
    if (dut.decide)
      case (algo)
        ALGO_STATIC:  dec_static++;
        ALGO_DYN_BIA: dec_bia++;
        ALGO_DYN_BMA: dec_bma++;
        default: ;
      endcase
  end

  // offer operations for n cycles with the current mix; rate in percent
  task automatic run(input int n, input int rate);
    repeat (n) begin
      @(negedge clk);
      for (int s = 0; s < 2; s++)
        if (!req[s].valid && expv.size() < 200 && ($urandom() % 100) < rate) req[s] = new_op();
      #4;
      acc_s = accept;
      @(posedge clk);
      #1;
      for (int s = 0; s < 2; s++)
        if (req[s].valid && acc_s[s]) req[s].valid = 1'b0;
    end
  endtask

  // stop offering and let everything finish
  task automatic drain();
    int n = 0;
    while ((req[0].valid || req[1].valid) && n < 20000) begin
      @(negedge clk);
      #4;
      acc_s = accept;
      @(posedge clk);
      #1;
      for (int s = 0; s < 2; s++) if (req[s].valid && acc_s[s]) req[s].valid = 1'b0;
      n++;
    end
    repeat (60) @(negedge clk);
    chk(!req[0].valid && !req[1].valid && expv.size() == 0, "all operations completed");
    foreach (expv[t]) $display("  outstanding tag %0d fn %0d", t, tagfn[t]);
  endtask

  task automatic set_mix(input int ia, fa, fm, im, id, fd);
    mix[0] = ia; mix[1] = fa; mix[2] = fm; mix[3] = im; mix[4] = id; mix[5] = fd;
  endtask

  task automatic switch_algo(input algo_e a);
    @(negedge clk);
    algo = a;
    n_mode_switch++;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rc0, adj0;
  initial begin
    req[0] = '0; req[1] = '0;
    set_mix(100, 0, 0, 0, 0, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- dynamic BIA: only int add and fp add in use
    switch_algo(ALGO_DYN_BIA);
    set_mix(85, 15, 0, 0, 0, 0);
    run(2 * INTERVAL + 1200, 90);
    chk(unit_fn[4] == FN_INT_ADD && unit_fn[5] == FN_FP_ADD && unit_fn[6] == FN_INT_ADD && unit_fn[7] == FN_FP_ADD,
        $sformatf("BIA spreads idle units over int add, fp add: %0d %0d %0d %0d", unit_fn[4], unit_fn[5], unit_fn[6], unit_fn[7]));
    chk(dec_bia >= 2, "BIA decided every interval");
    // ---- burst of int multiplies: the int mul unit is adjusted back at once
    adj0 = n_adjust;
    set_mix(40, 0, 0, 60, 0, 0);
    run(400, 90);
    chk(n_adjust > adj0, "int mul burst adjusts unit 4 back");
    chk(unit_fn[4] == FN_INT_MUL, "unit 4 is a multiplier again");
    drain();

    // ---- dynamic BMA: fp add highly active besides int add
    switch_algo(ALGO_DYN_BMA);
    set_mix(50, 50, 0, 0, 0, 0);
    run(2 * INTERVAL + 1200, 90);
    chk(unit_fn[4] == FN_FP_ADD && unit_fn[5] == FN_INT_ADD && unit_fn[6] == FN_INT_ADD && unit_fn[7] == FN_INT_ADD,
        $sformatf("BMA: first idle unit to fp add, rest to int add: %0d %0d %0d %0d", unit_fn[4], unit_fn[5], unit_fn[6], unit_fn[7]));
    chk(dec_bma >= 2, "BMA decided every interval");
    drain();

    // ---- back to the unadapted configuration
    switch_algo(ALGO_NONE);
    run(1500, 50);
    drain();
    chk(unit_fn[4] == FN_INT_MUL && unit_fn[5] == FN_INT_DIV && unit_fn[6] == FN_FP_MUL && unit_fn[7] == FN_FP_DIV,
        "all units home under ALGO_NONE");

    // every mechanism must have happened
    chk(n_conflict > 0,  $sformatf("conflicts: %0d", n_conflict));
    chk(n_reconfig > 0,  $sformatf("rewrites: %0d", n_reconfig));
    chk(n_adjust > 0,    $sformatf("adjustments: %0d", n_adjust));
    chk(n_foreign > 0,   $sformatf("operations on reconfigured units: %0d", n_foreign));

    chk(n_mode_switch > 0, $sformatf("algorithm switches: %0d", n_mode_switch));
    $display("counts: ops=%0d conflicts=%0d rewrites=%0d adjust=%0d foreign=%0d drain=%0d decisions static/bia/bma=%0d/%0d/%0d",
             n_done, n_conflict, n_reconfig, n_adjust, n_foreign, n_drain, dec_static, dec_bia, dec_bma);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

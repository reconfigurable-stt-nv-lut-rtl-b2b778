// Testbench for reconfig_policy (home functions int mul, int div, fp mul,
// fp div; threshold 10000). Each case gives busy counts per function and the
// targets worked out by hand from the rules of the three algorithms.
// Function codes: 0 int add, 1 fp add, 2 fp mul, 3 int mul, 4 int div, 5 fp div.
module tb_reconfig_policy;
  import rfu_pkg::*;

  algo_e       algo;
  logic [31:0] cnt [N_FN];
  fn_e         target [4];
  int          checks = 0, failures = 0;

  reconfig_policy dut (.algo, .cnt, .target);

  task automatic tcase(input string name, input int c0, c1, c2, c3, c4, c5,
                       input algo_e al, input int t0, t1, t2, t3);
    cnt[0] = c0; cnt[1] = c1; cnt[2] = c2; cnt[3] = c3; cnt[4] = c4; cnt[5] = c5;
    algo = al;
    #1;
    checks++;
    if (target[0] != fn_e'(t0) || target[1] != fn_e'(t1) || target[2] != fn_e'(t2) || target[3] != fn_e'(t3)) begin
      failures++;
      $display("FAIL %s algo=%0d got %0d %0d %0d %0d want %0d %0d %0d %0d", name, al,
               target[0], target[1], target[2], target[3], t0, t1, t2, t3);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // A: int add and int mul active
    tcase("A", 500, 0, 0, 30, 0, 0, ALGO_NONE,    3, 4, 2, 5);
    tcase("A", 500, 0, 0, 30, 0, 0, ALGO_STATIC,  3, 0, 3, 0);
    tcase("A", 500, 0, 0, 30, 0, 0, ALGO_DYN_BIA, 3, 0, 3, 0);
    tcase("A", 500, 0, 0, 30, 0, 0, ALGO_DYN_BMA, 3, 0, 0, 0);
    // B: fp add and fp div hot, int add lightly used
    tcase("B", 100, 40000, 0, 0, 0, 20000, ALGO_STATIC,  1, 5, 0, 5);
    tcase("B", 100, 40000, 0, 0, 0, 20000, ALGO_DYN_BIA, 0, 1, 5, 5);
    tcase("B", 100, 40000, 0, 0, 0, 20000, ALGO_DYN_BMA, 1, 0, 0, 5);
    // C: nothing active: everything stays home
    tcase("C", 0, 0, 0, 0, 0, 0, ALGO_STATIC,  3, 4, 2, 5);
    tcase("C", 0, 0, 0, 0, 0, 0, ALGO_DYN_BIA, 3, 4, 2, 5);
    tcase("C", 0, 0, 0, 0, 0, 0, ALGO_DYN_BMA, 3, 4, 2, 5);
    // D: BMA threshold is strict (> 10000)
    tcase("D", 5000, 0, 10000, 0, 0, 10001, ALGO_DYN_BMA, 5, 0, 2, 5);
    tcase("D", 5000, 0, 10000, 0, 0, 10001, ALGO_DYN_BIA, 0, 2, 2, 5);
    tcase("D", 5000, 0, 10000, 0, 0, 10001, ALGO_STATIC,  5, 2, 2, 5);
    tcase("D2", 5000, 0, 10000, 0, 0, 0, ALGO_DYN_BMA, 0, 0, 2, 0);
    // E: only int add active: all units become adders
    tcase("E", 7, 0, 0, 0, 0, 0, ALGO_STATIC,  0, 0, 0, 0);
    tcase("E", 7, 0, 0, 0, 0, 0, ALGO_DYN_BIA, 0, 0, 0, 0);
    tcase("E", 7, 0, 0, 0, 0, 0, ALGO_DYN_BMA, 0, 0, 0, 0);
    // F: tie in activity, lower code first, wrap-around
    tcase("F", 50, 50, 0, 0, 0, 0, ALGO_STATIC, 0, 1, 0, 1);
    tcase("F", 40, 50, 0, 0, 0, 0, ALGO_STATIC, 1, 0, 1, 0);
    tcase("F", 40, 50, 0, 0, 0, 0, ALGO_DYN_BIA, 0, 1, 0, 1);
    // G: BMA picks the most active of several hot functions
    tcase("G", 90000, 20000, 0, 0, 30000, 0, ALGO_DYN_BMA, 4, 4, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

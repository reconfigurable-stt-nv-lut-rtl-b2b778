// Workload testbench: the same operation stream runs once under each of
// the four configurations: no adaptation (the baseline), static,
// dynamic BIA and dynamic BMA. Each run records the number of cycles until
// every operation has completed.
// The stream first offers a phase of int add / int mul traffic, then a long
// phase in which FP additions dominate. The single CMOS FP adder becomes the
// bottleneck, and the idle dividers and FP multiplier can help.
// Sizes are reduced: 1000-cycle interval, 2000-cycle learning phase, 4-cycle
// LUT writes, BMA threshold 100.
// Checks:
//  * every result is correct;
//  * each adaptive configuration finishes the stream in fewer cycles than
//    the baseline.
// The cycle counts and speedups are printed.
module tb_rfu_workloads;
  import rfu_pkg::*;

  localparam int N_OPS = 12000;

  logic        clk = 0, rst_n = 0;
  algo_e       algo = ALGO_NONE;
  fu_req_t     req [2];
  logic [1:0]  accept, acc_s;
  fu_res_t     res [8];
  fn_e         unit_fn [8];
  fn_e         rfu_target [4];
  logic [3:0]  rfu_held;
  logic        learning, reconfiguring;
  logic [31:0] n_conflict, n_adjust, n_reconfig, n_decide;

  always #5 clk = ~clk;

  rfu_cluster_top #(.INTERVAL(1000), .LEARN(2000), .BMA_THRESH(100), .WCYC(4)) dut (
    .clk, .rst_n, .algo, .req, .accept, .res, .unit_fn, .rfu_held, .rfu_target,
    .reconfiguring, .learning, .n_conflict, .n_adjust, .n_reconfig, .n_decide);

  fu_req_t stream [N_OPS];
  word_t   expv   [N_OPS];
  logic    done   [N_OPS];
  int      checks = 0, failures = 0, n_back = 0;
  int      cycles [4];
  int      n_issued;

  function automatic word_t rnd_fp();
    logic [10:0] e;
    e = 11'(1023 - 60 + ($urandom() % 121));
    return {1'($urandom()), e, 52'({$urandom(), $urandom()})};
  endfunction

  // tags are the operation index modulo 256; at most 200 operations are in
  // flight, so a tag is never reused while its operation is outstanding
  always @(posedge clk) if (rst_n)
    for (int u = 0; u < 8; u++)
      if (res[u].valid) begin
        int i;
        i = -1;
        for (int k = 0; k < N_OPS; k++)
          if (!done[k] && stream[k].tag == res[u].tag && i < 0 && k < n_issued) i = k;
        checks++;
        if (i < 0 || res[u].data != expv[i]) begin
          failures++;
          $display("FAIL result tag %0d unit %0d", res[u].tag, u);
        end else done[i] = 1'b1;
        n_back++;
      end

  task automatic run_stream(input algo_e a, output int ncyc);
    int head, t0;
    head = 0; n_issued = 0; n_back = 0;
    for (int k = 0; k < N_OPS; k++) done[k] = 1'b0;
    req[0] = '0; req[1] = '0;
    rst_n = 0; algo = ALGO_NONE;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    algo = a;
    t0 = $time;
    while (n_back < N_OPS) begin
      @(negedge clk);
      for (int s = 0; s < 2; s++)
        if (!req[s].valid && head < N_OPS && head - n_back < 200) begin
          req[s] = stream[head]; head++; n_issued = head;
        end
      #4;
      acc_s = accept;
      @(posedge clk);
      #1;
      for (int s = 0; s < 2; s++) if (req[s].valid && acc_s[s]) req[s].valid = 1'b0;
    end
    ncyc = ($time - t0) / 10;
    $display("algo %0d: %0d cycles, conflicts %0d, rewrites %0d, adjustments %0d", a, ncyc, n_conflict, n_reconfig, n_adjust);
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build the stream: 2000 ops of int add / int mul, then FP-add heavy traffic
    for (int k = 0; k < N_OPS; k++) begin
      fu_req_t r;
      int p;
      r = '0; r.valid = 1'b1; r.tag = 8'(k);
      p = $urandom() % 100;
      if (k < 2000) r.fn = (p < 80) ? FN_INT_ADD : FN_INT_MUL;
      else          r.fn = (p < 25) ? FN_INT_ADD : (p < 95) ? FN_FP_ADD : FN_INT_MUL;
      if (r.fn == FN_FP_ADD) begin
        r.a = rnd_fp(); r.b = rnd_fp(); r.subop = 1'($urandom());
        expv[k] = $realtobits(r.subop ? $bitstoreal(r.a) - $bitstoreal(r.b) : $bitstoreal(r.a) + $bitstoreal(r.b));
      end else begin
        r.a = {$urandom(), $urandom()}; r.b = {$urandom(), $urandom()};
        expv[k] = (r.fn == FN_INT_ADD) ? r.a + r.b : r.a * r.b;
      end
      stream[k] = r;
    end
    run_stream(ALGO_NONE,    cycles[0]);
    run_stream(ALGO_STATIC,  cycles[1]);
    run_stream(ALGO_DYN_BIA, cycles[2]);
    run_stream(ALGO_DYN_BMA, cycles[3]);
    for (int a = 1; a < 4; a++) begin
      checks++;
      if (cycles[a] >= cycles[0]) begin
        failures++;
        $display("FAIL algorithm %0d not faster than the baseline", a);
      end
      $display("speedup of algorithm %0d over baseline: %0d.%02d", a, cycles[0] / cycles[a], (cycles[0] * 100 / cycles[a]) % 100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

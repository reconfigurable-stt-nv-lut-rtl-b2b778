// Testbench for fu_exec_pipe: one CMOS-latency and one STT-latency instance.
// For every function it issues an operation and checks that the result and
// its tag appear exactly L cycles later, L being the latency the design
// intends (written out here as literal numbers). It checks that adders and
// multipliers take one operation per cycle, that dividers refuse a second
// operation while busy, and that `hold` blocks issue.
module tb_fu_exec_pipe;
  import rfu_pkg::*;

  logic    clk = 0, rst_n = 0;
  fn_e     fn;
  logic    hold, in_valid;
  word_t   a, b;
  tag_t    tag;
  logic    rdy_c, rdy_s, busy_c, busy_s;
  fu_res_t out_c, out_s;
  int      checks = 0, failures = 0;
  int      cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  fu_exec_pipe #(.STT(1'b0)) dut_c (.clk, .rst_n, .fn, .hold, .in_valid, .in_subop(1'b0),
    .in_a(a), .in_b(b), .in_tag(tag), .in_ready(rdy_c), .out(out_c), .busy(busy_c));
  fu_exec_pipe #(.STT(1'b1)) dut_s (.clk, .rst_n, .fn, .hold, .in_valid, .in_subop(1'b0),
    .in_a(a), .in_b(b), .in_tag(tag), .in_ready(rdy_s), .out(out_s), .busy(busy_s));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic word_t ref_y(fn_e f, word_t x, word_t z);
    case (f)
      FN_INT_ADD: return x + z;
      FN_INT_MUL: return x * z;
      FN_INT_DIV: return x / z;
      FN_FP_ADD:  return $realtobits($bitstoreal(x) + $bitstoreal(z));
      FN_FP_MUL:  return $realtobits($bitstoreal(x) * $bitstoreal(z));
      default:    return $realtobits($bitstoreal(x) / $bitstoreal(z));
    endcase
  endfunction

  // issue one op in the current cycle, then measure when each unit returns it
  task automatic one_op(input fn_e f, input int lat_c, input int lat_s);
    int t_c, t_s;
    word_t exp_y;
    @(negedge clk);
    fn = f; a = 64'h4010_0000_0000_0003; b = 64'h3FF8_0000_0000_0001; tag = 8'(f + 8'h40);
    exp_y = ref_y(f, a, b);
    chk(rdy_c && rdy_s, "ready before issue");
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    t_c = -1; t_s = -1;
    for (int i = 1; i <= 60; i++) begin
      if (out_c.valid && t_c < 0) begin
        t_c = i;
        chk(out_c.data == exp_y && out_c.tag == tag, "cmos result/tag");
      end
      if (out_s.valid && t_s < 0) begin
        t_s = i;
        chk(out_s.data == exp_y && out_s.tag == tag, "stt result/tag");
      end
      @(negedge clk);
    end
    chk(t_c == lat_c, $sformatf("cmos latency fn=%0d got %0d want %0d", f, t_c, lat_c));
    chk(t_s == lat_s, $sformatf("stt latency fn=%0d got %0d want %0d", f, t_s, lat_s));
    chk(!busy_c && !busy_s, "idle after op");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    fn = FN_INT_ADD; hold = 0; in_valid = 0; a = 0; b = 0; tag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_op(FN_INT_ADD, 1, 3);
    one_op(FN_FP_ADD, 2, 6);
    one_op(FN_FP_MUL, 4, 8);
    one_op(FN_INT_MUL, 3, 6);
    one_op(FN_INT_DIV, 20, 40);
    one_op(FN_FP_DIV, 12, 24);
    // pipelined: back-to-back multiplies, results back-to-back with tags in order
    @(negedge clk);
    fn = FN_INT_MUL; in_valid = 1;
    for (int i = 0; i < 5; i++) begin
      a = 64'(i + 2); b = 64'(i + 7); tag = 8'(i);
      chk(rdy_c, "mul accepts every cycle");
      @(negedge clk);
    end
    in_valid = 0;
    n = 0;
    repeat (12) begin
      if (out_s.valid) begin
        chk(out_s.tag == 8'(n) && out_s.data == 64'((n + 2) * (n + 7)), "stt mul stream");
        n++;
      end
      @(negedge clk);
    end
    chk(n == 5, "five stt mul results");
    // unpipelined divider refuses a second op
    fn = FN_INT_DIV; a = 100; b = 7; tag = 1; in_valid = 1;
    @(negedge clk);
    chk(!rdy_c && !rdy_s, "divider busy refuses");
    in_valid = 0;
    repeat (45) @(negedge clk);
    chk(rdy_c && rdy_s, "divider ready again");
    // hold
    hold = 1;
    #1 chk(!rdy_c && !rdy_s, "hold blocks issue");
    hold = 0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

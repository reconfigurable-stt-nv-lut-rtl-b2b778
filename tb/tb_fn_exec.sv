// Self-checking testbench for fn_exec: random operands for all six functions.
// Integer results are compared with SystemVerilog integer arithmetic, FP
// results with the simulator's double-precision real arithmetic (round to
// nearest even). FP operands are normal numbers with exponents kept within
// +-200 of the bias so no result leaves the normal range. A few special
// cases (divide by zero, infinity, NaN, exact cancellation) are checked too.
module tb_fn_exec;
  import rfu_pkg::*;

  fn_e   fn;
  logic  subop;
  word_t a, b, y;
  int    checks = 0, failures = 0;

  fn_exec dut (.fn(fn), .subop(subop), .a(a), .b(b), .y(y));

  function automatic word_t rnd64();
    return {$urandom(), $urandom()};
  endfunction

  function automatic word_t rnd_fp();
    logic [10:0] e;
    e = 11'(1023 - 200 + ($urandom() % 401));
    return {1'($urandom()), e, 52'({$urandom(), $urandom()})};
  endfunction

  task automatic check(input fn_e f, input logic s, input word_t x, input word_t z, input word_t exp_y);
    fn = f; subop = s; a = x; b = z;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL fn=%0d sub=%0b a=%h b=%h y=%h expected=%h", f, s, x, z, y, exp_y);
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
    word_t x, z;
    for (int i = 0; i < 2000; i++) begin
      x = rnd64(); z = rnd64();
      if (i % 3 == 0) z = z >> ($urandom() % 64);
      check(FN_INT_ADD, 1'b0, x, z, x + z);
      check(FN_INT_ADD, 1'b1, x, z, x - z);
      check(FN_INT_MUL, 1'b0, x, z, x * z);
      if (z != 0) begin
        check(FN_INT_DIV, 1'b0, x, z, x / z);
        check(FN_INT_DIV, 1'b1, x, z, x % z);
      end
      x = rnd_fp(); z = rnd_fp();
      if (i % 4 == 0) z = {z[63], x[62:52] - 11'($urandom() % 4), z[51:0]};  // near cancellation
      check(FN_FP_ADD, 1'b0, x, z, $realtobits($bitstoreal(x) + $bitstoreal(z)));
      check(FN_FP_ADD, 1'b1, x, z, $realtobits($bitstoreal(x) - $bitstoreal(z)));
      check(FN_FP_MUL, 1'b0, x, z, $realtobits($bitstoreal(x) * $bitstoreal(z)));
      check(FN_FP_DIV, 1'b0, x, z, $realtobits($bitstoreal(x) / $bitstoreal(z)));
    end
    // special cases
    check(FN_INT_DIV, 1'b0, 64'd77, 64'd0, '1);
    check(FN_INT_DIV, 1'b1, 64'd77, 64'd0, 64'd77);
    check(FN_FP_ADD, 1'b1, 64'h4008_0000_0000_0000, 64'h4008_0000_0000_0000, 64'd0);      // 3-3
    check(FN_FP_ADD, 1'b0, 64'h3FF0_0000_0000_0000, 64'h3CA0_0000_0000_0000, 64'h3FF0_0000_0000_0000); // 1+2^-53 ties to even
    check(FN_FP_ADD, 1'b0, 64'h3FF0_0000_0000_0000, 64'h3CB0_0000_0000_0000, 64'h3FF0_0000_0000_0001); // 1+2^-52
    check(FN_FP_DIV, 1'b0, 64'h3FF0_0000_0000_0000, 64'd0, 64'h7FF0_0000_0000_0000);      // 1/0 = inf
    check(FN_FP_DIV, 1'b0, 64'd0, 64'd0, 64'h7FF8_0000_0000_0000);                        // 0/0 = NaN
    check(FN_FP_MUL, 1'b0, 64'h7FF0_0000_0000_0000, 64'd0, 64'h7FF8_0000_0000_0000);      // inf*0 = NaN
    check(FN_FP_MUL, 1'b0, 64'hC000_0000_0000_0000, 64'h4010_0000_0000_0000, 64'hC020_0000_0000_0000); // -2*4
    check(FN_FP_DIV, 1'b0, 64'h3FF0_0000_0000_0000, 64'h4008_0000_0000_0000, 64'h3FD5_5555_5555_5555); // 1/3
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

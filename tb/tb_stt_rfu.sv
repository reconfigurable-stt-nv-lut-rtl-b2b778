// Testbench for stt_rfu (home function int divide, document's 25-cycle
// writes): after reset the unit is an integer divider with STT latency 40;
// `hold` makes it unavailable; the 9-word image of int add is then written
// through the configuration port (one word every 25 cycles, 225 cycles in
// all, with the unit unavailable throughout); afterwards the unit adds with
// latency 3. A corrupted header makes the unit unusable.
module tb_stt_rfu;
  import rfu_pkg::*;

  logic      clk = 0, rst_n = 0;
  logic      in_valid = 0, in_subop = 0, hold = 0, cfg_we = 0;
  word_t     in_a = 0, in_b = 0;
  tag_t      in_tag = 0;
  logic      avail, busy, cfg_ok, cfg_busy;
  fu_res_t   out;
  fn_e       cur_fn;
  cfg_idx_t  cfg_idx = 0, cfg_ridx = 0;
  cfg_word_t cfg_data = 0, cfg_rdata;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  stt_rfu #(.HOME_FN(FN_INT_DIV)) dut (.clk, .rst_n, .in_valid, .in_subop, .in_a, .in_b, .in_tag,
    .avail, .out, .busy, .cur_fn, .cfg_ok, .hold, .cfg_we, .cfg_idx, .cfg_data, .cfg_busy,
    .cfg_ridx, .cfg_rdata);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [15:0] tt(int f, int k);
    if (k == 0) return {12'hC0F, 1'b0, 3'(f)};
    return 16'(((f + 1) * 32'h9E37) ^ (k * 32'h7F4B) ^ (k << 9));
  endfunction

  task automatic op(input word_t x, input word_t z, input logic s, input word_t exp_y, input int lat);
    int t;
    chk(avail, "available");
    in_valid = 1; in_a = x; in_b = z; in_subop = s; in_tag = 8'h5A;
    @(negedge clk);
    in_valid = 0;
    t = 0;
    for (int i = 1; i <= 50; i++) begin
      if (out.valid) begin
        t = i;
        chk(out.data == exp_y && out.tag == 8'h5A, "result");
      end
      @(negedge clk);
    end
    chk(t == lat, $sformatf("latency %0d want %0d", t, lat));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ncyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(cfg_ok && cur_fn == FN_INT_DIV, "home function after reset");
    op(64'd1000, 64'd7, 1'b0, 64'd142, 40);
    op(64'd1000, 64'd7, 1'b1, 64'd6, 40);
    hold = 1;
    #1 chk(!avail, "hold");
    // rewrite to int add
    ncyc = 0;
    for (int w = 0; w < 9; w++) begin
      while (cfg_busy) begin @(negedge clk); ncyc++; chk(!avail, "unavailable while writing"); end
      cfg_idx = cfg_idx_t'(w);
      for (int j = 0; j < 8; j++) cfg_data[j*16 +: 16] = (w * 8 + j < 65) ? tt(0, w * 8 + j) : 16'd0;
      cfg_we = 1;
      @(negedge clk); ncyc++;
      cfg_we = 0;
    end
    while (cfg_busy) begin @(negedge clk); ncyc++; end
    chk(ncyc == 225, $sformatf("rewrite cycles %0d want 225", ncyc));
    hold = 0;
    #1;
    chk(cfg_ok && cur_fn == FN_INT_ADD, "now an adder");
    op(64'd1000, 64'd7, 1'b0, 64'd1007, 3);
    op(64'd1000, 64'd7, 1'b1, 64'd993, 3);
    cfg_ridx = 5; #1;
    chk(cfg_rdata[15:0] == tt(0, 40), "readback");
    // corrupt header: unit becomes unusable
    cfg_idx = 0; cfg_data = '0; cfg_we = 1;
    @(negedge clk); cfg_we = 0;
    while (cfg_busy) @(negedge clk);
    #1 chk(!cfg_ok && !avail, "bad header makes unit unusable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

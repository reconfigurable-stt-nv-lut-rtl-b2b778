// Testbench for stt_lut_array: after reset the array holds its home image
// (header LUT = 0xC0F, 0, function code); each accepted write keeps `busy`
// high for 24 cycles and is visible 25 cycles after acceptance; writing the 9
// words of an image takes 9 x 25 = 225 cycles and changes the header.
// Expected LUT contents are computed here from the image formula
// tt(fn,k) = ((fn+1)*0x9E37) ^ (k*0x7F4B) ^ (k<<9).
module tb_stt_lut_array;
  import rfu_pkg::*;

  logic      clk = 0, rst_n = 0;
  logic      we;
  cfg_idx_t  widx, ridx;
  cfg_word_t wdata, rdata;
  logic      busy;
  logic [15:0] header;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  stt_lut_array #(.HOME_FN(FN_FP_DIV)) dut (.clk, .rst_n, .we, .widx, .wdata, .busy,
    .ridx, .rdata, .header);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] tt(int f, int k);
    if (k == 0) return {12'hC0F, 1'b0, 3'(f)};
    return 16'(((f + 1) * 32'h9E37) ^ (k * 32'h7F4B) ^ (k << 9));
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t_end, nb;
    we = 0; widx = 0; wdata = 0; ridx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(header == {12'hC0F, 1'b0, 3'd5}, "home header after reset");
    for (int w = 0; w < 9; w++) begin
      ridx = cfg_idx_t'(w);
      #1;
      for (int j = 0; j < 8; j++)
        if (w * 8 + j < 65) chk(rdata[j*16 +: 16] == tt(5, w * 8 + j), $sformatf("home LUT %0d", w * 8 + j));
        else                chk(rdata[j*16 +: 16] == 16'd0, "unused bits zero");
    end
    // single write timing
    @(negedge clk);
    ridx = 3;
    widx = 3; wdata = {8{16'hBEEF}}; we = 1;
    @(negedge clk);
    we = 0;
    nb = 0;
    for (int i = 1; i <= 30; i++) begin
      if (busy) nb++;
      if (i <= 24) chk(rdata != {8{16'hBEEF}}, "not visible during write");
      @(negedge clk);
    end
    chk(nb == 24, $sformatf("busy for 24 cycles after accept (got %0d)", nb));
    chk(rdata == {8{16'hBEEF}}, "write visible after 25 cycles");
    // full image rewrite to int add (fn 0): 9 writes, accepted every 25 cycles
    @(negedge clk);
    t0 = $time;
    for (int w = 0; w < 9; w++) begin
      while (busy) @(negedge clk);
      widx = cfg_idx_t'(w);
      for (int j = 0; j < 8; j++) wdata[j*16 +: 16] = (w * 8 + j < 65) ? tt(0, w * 8 + j) : 16'd0;
      we = 1;
      @(negedge clk);
      we = 0;
    end
    while (busy) @(negedge clk);
    t_end = $time;
    chk((t_end - t0) / 10 == 225, $sformatf("image rewrite takes 225 cycles (got %0d)", (t_end - t0) / 10));
    chk(header == {12'hC0F, 1'b0, 3'd0}, "header names int add");
    ridx = 8; #1;
    chk(rdata[15:0] == tt(0, 64), "last LUT written");
    // reset restores the home image
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    chk(header == {12'hC0F, 1'b0, 3'd5}, "home header after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

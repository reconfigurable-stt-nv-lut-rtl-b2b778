// Testbench for cfg_rom: every word of every function image is compared with
// the image formula written out here: header LUT {0xC0F, 0, fn}; LUT k>0
// holds ((fn+1)*0x9E37) ^ (k*0x7F4B) ^ (k<<9) (16 bits); bits past LUT 64 are
// zero; images of different functions differ.
module tb_cfg_rom;
  import rfu_pkg::*;

  fn_e       fn;
  cfg_idx_t  idx;
  cfg_word_t data;
  int        checks = 0, failures = 0;

  cfg_rom dut (.fn, .idx, .data);

  function automatic logic [15:0] tt(int f, int k);
    if (k == 0) return {12'hC0F, 1'b0, 3'(f)};
    return 16'(((f + 1) * 32'h9E37) ^ (k * 32'h7F4B) ^ (k << 9));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_word_t exp_w, w_prev;
    for (int f = 0; f < 6; f++)
      for (int w = 0; w < 9; w++) begin
        fn = fn_e'(f); idx = cfg_idx_t'(w);
        #1;
        for (int j = 0; j < 8; j++)
          exp_w[j*16 +: 16] = (w * 8 + j < 65) ? tt(f, w * 8 + j) : 16'd0;
        checks++;
        if (data !== exp_w) begin
          failures++;
          $display("FAIL fn=%0d word=%0d got %h want %h", f, w, data, exp_w);
        end
      end
    for (int w = 0; w < 9; w++) begin
      fn = FN_INT_ADD; idx = cfg_idx_t'(w); #1; w_prev = data;
      fn = FN_INT_MUL; #1;
      checks++;
      if (data == w_prev) begin failures++; $display("FAIL images equal at word %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Configuration ROM: holds the LUT configuration image of every function and
// returns one 128-bit word per read, combinationally. The reconfiguration
// controller reads it word by word while it writes the STT-NV LUTs of a unit.
// The document calls for such a ROM but gives no bitstreams; the contents are
// rfu_pkg::cfg_image_word, whose only functional part is the header LUT that
// names the function (the rest is a placeholder pattern).
module cfg_rom
  import rfu_pkg::*;
(
  input  fn_e       fn,
  input  cfg_idx_t  idx,
  output cfg_word_t data
);
  cfg_word_t rom [N_FN][CFG_WORDS];

  always_comb begin
    for (int f = 0; f < N_FN; f++)
      for (int w = 0; w < CFG_WORDS; w++)
        rom[f][w] = cfg_image_word(fn_e'(f), cfg_idx_t'(w));
    data = (int'(idx) < CFG_WORDS) ? rom[fn][idx] : '0;
  end
endmodule

// Behavioural model of the STT-NV (magnetic tunnel junction) configuration
// storage of one reconfigurable unit: 65 four-input LUTs of 16 bits, 1040
// bits, organised as 9 words of 128 bits (the last word only partly used).
// The MTJ cells, sense amplifiers and write drivers are a process-specific
// macro; this model gives their behaviour at the clock level. A write
// presented with `we` while `busy` is low is accepted; the cells take
// WRITE_CYC cycles to switch (25 ns at 1 GHz in the document), during which
// `busy` is high, and the new word becomes visible at the end of the last of
// them, so back-to-back writes are accepted every WRITE_CYC cycles. Reads are
// combinational. The contents are non-volatile: reset does not clear them but
// restores the factory image of the unit's home function (HOME_FN), which
// stands for the power-on state of a pre-programmed unit (this design's
// choice). The 128-bit bus and 25-cycle write follow the document.
module stt_lut_array
  import rfu_pkg::*;
#(
  parameter fn_e         HOME_FN = FN_INT_MUL,
  parameter int unsigned WCYC    = WRITE_CYC
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      we,
  input  cfg_idx_t  widx,
  input  cfg_word_t wdata,
  output logic      busy,
  input  cfg_idx_t  ridx,
  output cfg_word_t rdata,
  output logic [LUT_BITS-1:0] header    // LUT 0: names the configured function
);
  cfg_word_t   cells [CFG_WORDS];
  cfg_idx_t    pend_idx;
  cfg_word_t   pend_data;
  logic [$clog2(WCYC+1)-1:0] cnt;

  assign busy   = (cnt != '0);
  assign rdata  = cells[ridx];
  assign header = cells[0][LUT_BITS-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < CFG_WORDS; i++) cells[i] <= cfg_image_word(HOME_FN, cfg_idx_t'(i));
      cnt       <= '0;
      pend_idx  <= '0;
      pend_data <= '0;
    end else if (we && !busy) begin
      if (WCYC <= 1) begin
        cells[widx] <= wdata;
      end else begin
        pend_idx  <= widx;
        pend_data <= wdata;
        cnt       <= ($bits(cnt))'(WCYC - 1);
      end
    end else if (busy) begin
      cnt <= cnt - 1'b1;
      if (cnt == 1) cells[pend_idx] <= pend_data;
    end
  end

  a_no_write_when_busy: assert property (@(posedge clk) disable iff (!rst_n) !(we && busy))
    else $error("stt_lut_array: write while busy");
endmodule

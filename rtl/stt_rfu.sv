// Reconfigurable STT-NV LUT-based functional unit.
// The unit's function is whatever its LUT fabric is programmed to be: it is
// read from the header LUT of the unit's configuration array (stt_lut_array),
// and an unknown header makes the unit unusable. Operations run with STT-NV
// latencies (two times deeper pipeline than CMOS for multipliers and
// dividers, 3x for adders, see rfu_pkg). The reconfiguration controller
// raises `hold` to stop new operations, waits for `busy` to fall, and then
// writes the new image over the 128-bit configuration bus (cfg_we/cfg_idx/
// cfg_data, one write every 25 cycles while cfg_busy is high).
// After reset the unit holds the image of its home function HOME_FN (one of
// int multiply, int divide, fp multiply, fp divide in the document).
// `avail` = configured, not held and able to take an operation this cycle.
// The fabric's datapath for each function is modelled by fn_exec rather than
// by the LUT truth tables, whose contents the document does not give.
module stt_rfu
  import rfu_pkg::*;
#(
  parameter fn_e         HOME_FN = FN_INT_MUL,
  parameter int unsigned WCYC    = WRITE_CYC
) (
  input  logic      clk,
  input  logic      rst_n,
  // operation issue and result
  input  logic      in_valid,
  input  logic      in_subop,
  input  word_t     in_a,
  input  word_t     in_b,
  input  tag_t      in_tag,
  output logic      avail,
  output fu_res_t   out,
  output logic      busy,
  output fn_e       cur_fn,
  output logic      cfg_ok,
  // configuration port
  input  logic      hold,
  input  logic      cfg_we,
  input  cfg_idx_t  cfg_idx,
  input  cfg_word_t cfg_data,
  output logic      cfg_busy,
  input  cfg_idx_t  cfg_ridx,
  output cfg_word_t cfg_rdata
);
  logic [LUT_BITS-1:0] header;
  logic                ready;

  stt_lut_array #(.HOME_FN(HOME_FN), .WCYC(WCYC)) u_luts (
    .clk, .rst_n,
    .we(cfg_we), .widx(cfg_idx), .wdata(cfg_data), .busy(cfg_busy),
    .ridx(cfg_ridx), .rdata(cfg_rdata), .header(header)
  );

  always_comb begin
    cfg_ok = (header[15:4] == 12'hC0F) && (header[3] == 1'b0) && (header[2:0] < 3'(N_FN));
    cur_fn = cfg_ok ? fn_e'(header[2:0]) : HOME_FN;
  end

  fu_exec_pipe #(.STT(1'b1)) u_pipe (
    .clk, .rst_n,
    .fn(cur_fn), .hold(hold || !cfg_ok || cfg_busy),
    .in_valid, .in_subop, .in_a, .in_b, .in_tag,
    .in_ready(ready), .out, .busy
  );

  assign avail = ready;

  a_issue_when_avail: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> avail)
    else $error("stt_rfu: operation issued to an unavailable unit");
endmodule

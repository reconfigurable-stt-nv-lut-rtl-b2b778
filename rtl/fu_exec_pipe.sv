// Timing shell of one functional unit.
// An operation accepted in cycle t (in_valid && in_ready) is computed by
// fn_exec at once and its result travels down a delay line so that out.valid
// is high in cycle t+L, where L is the latency of the unit's current function
// (rfu_pkg::cmos_latency or stt_latency, chosen by the STT parameter). Adders
// and multipliers accept one operation per cycle; dividers are unpipelined and
// accept a new operation only when the delay line is empty.
// `fn` may change only while the unit is empty (the reconfiguration
// controller drains a unit before rewriting it); `hold` blocks new operations
// so that the unit can drain. `busy` is high while an operation is in flight.
// The CMOS integer ALU and FP adder are this module with a constant `fn` and
// STT=0. The latencies themselves are this design's choices (see rfu_pkg).
module fu_exec_pipe
  import rfu_pkg::*;
#(
  parameter bit STT = 1'b0    // 1: STT-NV LUT latencies, 0: static CMOS latencies
) (
  input  logic    clk,
  input  logic    rst_n,
  input  fn_e     fn,
  input  logic    hold,
  input  logic    in_valid,
  input  logic    in_subop,
  input  word_t   in_a,
  input  word_t   in_b,
  input  tag_t    in_tag,
  output logic    in_ready,
  output fu_res_t out,
  output logic    busy
);
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t data;
  } slot_t;

  slot_t       line [MAX_LAT];
  word_t       y;
  int unsigned lat;

  fn_exec u_exec (.fn(fn), .subop(in_subop), .a(in_a), .b(in_b), .y(y));

  always_comb begin
    lat  = STT ? stt_latency(fn) : cmos_latency(fn);
    busy = 1'b0;
    for (int i = 0; i < MAX_LAT; i++) busy |= line[i].valid;
    in_ready = !hold && !(fn_unpipelined(fn) && busy);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_LAT; i++) line[i] <= '0;
    end else begin
      for (int i = 0; i < MAX_LAT - 1; i++) line[i] <= line[i+1];
      line[MAX_LAT-1] <= '0;
      if (in_valid && in_ready)
        line[lat-1] <= '{valid: 1'b1, tag: in_tag, data: y};
    end
  end

  assign out = line[0];

  // The function of a unit must not change under an operation in flight.
  logic fn_q;
  fn_e  fn_prev;
  always_ff @(posedge clk) begin
    fn_prev <= fn;
    fn_q    <= busy;
  end
  a_fn_stable: assert property (@(posedge clk) disable iff (!rst_n) (fn_q && busy) |-> (fn == fn_prev));
endmodule

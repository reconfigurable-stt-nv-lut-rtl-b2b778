// Functional-unit activity monitor.
// Every cycle it receives one busy bit per function (a function is busy in a
// cycle when a unit configured to it has an operation in flight or an
// operation of that function is waiting to issue) and counts busy cycles per
// function. The counting period is the learning phase (LEARN cycles) for the
// static algorithm and the monitoring interval (INTERVAL cycles) for the two
// dynamic ones. At the end of a period it copies the counts to `snap_cnt`,
// clears the counters and pulses `decide` for one cycle (in the cycle after
// the period's last one). The static algorithm decides once and then stops;
// ALGO_NONE never decides. A change of `algo` restarts monitoring.
// The counts give the document's single idle bit per unit (count == 0) and
// its "busy more than 10K cycles in a 100K-cycle interval" test.
// Defaults follow the document: 100M-cycle learning phase, 100K interval.
module activity_monitor
  import rfu_pkg::*;
#(
  parameter int unsigned INTERVAL = 100_000,
  parameter int unsigned LEARN    = 100_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  algo_e       algo,
  input  logic        restart,           // algorithm changed
  input  logic [N_FN-1:0] fn_busy,
  output logic        decide,
  output logic [31:0] snap_cnt [N_FN],
  output logic        learning           // static learning phase in progress
);
  logic [31:0] timer;
  logic [31:0] cnt [N_FN];
  logic        static_done;
  logic [31:0] period;

  assign period   = (algo == ALGO_STATIC) ? LEARN : INTERVAL;
  assign learning = (algo == ALGO_STATIC) && !static_done;

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      timer       <= '0;
      static_done <= 1'b0;
      decide      <= 1'b0;
      for (int f = 0; f < N_FN; f++) begin
        cnt[f]      <= '0;
        snap_cnt[f] <= '0;
      end
    end else begin
      decide <= 1'b0;
      if (algo == ALGO_NONE || (algo == ALGO_STATIC && static_done)) begin
        timer <= '0;
      end else if (timer == period - 1) begin
        timer  <= '0;
        decide <= 1'b1;
        if (algo == ALGO_STATIC) static_done <= 1'b1;
        for (int f = 0; f < N_FN; f++) begin
          snap_cnt[f] <= cnt[f] + 32'(fn_busy[f]);
          cnt[f]      <= '0;
        end
      end else begin
        timer <= timer + 1;
        for (int f = 0; f < N_FN; f++) cnt[f] <= cnt[f] + 32'(fn_busy[f]);
      end
    end
  end
endmodule

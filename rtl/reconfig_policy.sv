// Reconfiguration policy: from the busy counts of the last period it chooses
// the function each reconfigurable unit should take. Combinational.
// A unit is idle when its home function was never busy in the period; a
// function is active when it was busy at least once. Units that are not idle
// keep their home function. Idle units, taken in unit order (k = 0, 1, ...):
//  * ALGO_STATIC : go to the active functions in order of activity, the k-th
//                  idle unit to the (k mod nA)-th most active function.
//  * ALGO_DYN_BIA: go to the active functions in the fixed order int add,
//                  fp add, fp mul, int mul, int div, fp div; the k-th idle
//                  unit to the (k mod nA)-th active function in that order.
//  * ALGO_DYN_BMA: a function other than int add is highly active when busy
//                  more than THRESH cycles; the first idle unit goes to the
//                  most active highly-active function, all other idle units
//                  (all of them if none is highly active) to int add.
//  * ALGO_NONE   : every unit keeps its home function.
// The rules follow the document; the wrap-around (k mod nA) when there are
// more idle units than active functions, and the tie-break (lower function
// code first) are this design's choices.
module reconfig_policy
  import rfu_pkg::*;
#(
  parameter int unsigned N_RFU  = 4,
  parameter fn_e         HOME [N_RFU] = '{FN_INT_MUL, FN_INT_DIV, FN_FP_MUL, FN_FP_DIV},
  parameter int unsigned THRESH = 10_000
) (
  input  algo_e       algo,
  input  logic [31:0] cnt [N_FN],
  output fn_e         target [N_RFU]
);
  logic [N_FN-1:0]      active;
  logic [2:0]           n_act;
  logic [2:0]           rank [N_FN];   // activity rank among all functions
  logic [2:0]           pos  [N_FN];   // position among active functions, fixed order
  logic [N_FN-1:0]      hot;
  logic                 any_hot;
  fn_e                  best;
  logic [2:0]           k, sel;

  always_comb begin
    n_act = '0;
    for (int f = 0; f < N_FN; f++) begin
      active[f] = (cnt[f] != 0);
      n_act     = n_act + 3'(active[f]);
    end
    for (int f = 0; f < N_FN; f++) begin
      rank[f] = '0;
      pos[f]  = '0;
      for (int g = 0; g < N_FN; g++) begin
        if ((cnt[g] > cnt[f]) || ((cnt[g] == cnt[f]) && (g < f))) rank[f] = rank[f] + 3'd1;
        if (active[g] && (g < f)) pos[f] = pos[f] + 3'd1;
      end
    end
    // highly active functions for BMA
    any_hot = 1'b0;
    best    = FN_INT_ADD;
    for (int f = 1; f < N_FN; f++) begin
      hot[f] = (cnt[f] > THRESH);
      if (hot[f] && (!any_hot || cnt[f] > cnt[best])) best = fn_e'(f);
      any_hot |= hot[f];
    end
    hot[0] = 1'b0;

    k   = '0;
    sel = '0;
    for (int u = 0; u < N_RFU; u++) begin
      target[u] = HOME[u];
      if (algo != ALGO_NONE && cnt[HOME[u]] == 0 && n_act != 0) begin
        sel = k % n_act;
        case (algo)
          ALGO_STATIC: begin
            for (int f = 0; f < N_FN; f++)
              if (active[f] && rank[f] == sel) target[u] = fn_e'(f);
          end
          ALGO_DYN_BIA: begin
            for (int f = 0; f < N_FN; f++)
              if (active[f] && pos[f] == sel) target[u] = fn_e'(f);
          end
          default: begin  // ALGO_DYN_BMA
            target[u] = (k == 0 && any_hot) ? best : FN_INT_ADD;
          end
        endcase
        k = k + 3'd1;
      end
    end
  end
endmodule

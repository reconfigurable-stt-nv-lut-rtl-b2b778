// Reconfiguration controller.
// It keeps a target function per reconfigurable unit. A policy decision
// (`decide`) loads all targets; an adjustment request for a unit (an
// operation needs the unit's home function and no unit currently provides
// it) sets that unit's target back to its home function and marks it urgent;
// `restart` (algorithm change) sends every unit home.
// Whenever some unit's configured function differs from its target, the
// controller takes one unit (urgent ones first, then the lowest index),
// raises its `hold` so it takes no new operations, waits until its pipeline
// is empty, then copies the CFG_WORDS words of the target image from the
// configuration ROM into the unit's STT-NV LUT array over the shared 128-bit
// bus, one word each time the array is ready (every WRITE_CYC cycles), and
// releases the unit when the last write has completed. With the document's
// numbers a rewrite takes 9 x 25 = 225 cycles plus two cycles of handshake
// and the drain time. One unit is rewritten at a time.
// The document describes the unit-by-unit reset to the home function at the
// start of every interval followed by the new reconfiguration; here the two
// steps are merged into a single rewrite to the final function, which leaves
// the same configuration (this design's choice).
module reconfig_ctrl
  import rfu_pkg::*;
#(
  parameter int unsigned N_RFU = 4,
  parameter fn_e         HOME [N_RFU] = '{FN_INT_MUL, FN_INT_DIV, FN_FP_MUL, FN_FP_DIV}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restart,
  input  logic        decide,
  input  fn_e         policy_target [N_RFU],
  input  logic [N_RFU-1:0] adj_req,
  input  fn_e         unit_fn   [N_RFU],
  input  logic [N_RFU-1:0] unit_cfg_ok,
  input  logic [N_RFU-1:0] unit_busy,
  input  logic [N_RFU-1:0] unit_cfg_busy,
  output logic [N_RFU-1:0] hold,
  output logic [N_RFU-1:0] cfg_we,
  output cfg_idx_t    cfg_idx,
  output cfg_word_t   cfg_data,
  output fn_e         rom_fn,
  output cfg_idx_t    rom_idx,
  input  cfg_word_t   rom_data,
  output fn_e         target [N_RFU],
  output logic        active,
  output logic [31:0] n_reconfig,
  output logic [31:0] n_adjust
);
  typedef enum logic [1:0] {S_IDLE, S_DRAIN, S_WRITE, S_WAIT} state_e;

  localparam int unsigned UW = (N_RFU > 1) ? $clog2(N_RFU) : 1;

  state_e          state;
  logic [UW-1:0]   sel;
  fn_e             wfn;
  cfg_idx_t        widx;
  logic            urgent_w;
  logic [N_RFU-1:0] urgent;
  logic [N_RFU-1:0] differs;
  logic            pick_ok;
  logic [UW-1:0]   pick;

  always_comb begin
    for (int u = 0; u < N_RFU; u++) differs[u] = (unit_fn[u] != target[u]) || !unit_cfg_ok[u];
    pick_ok = 1'b0;
    pick    = '0;
    for (int u = N_RFU - 1; u >= 0; u--)
      if (differs[u]) begin pick_ok = 1'b1; pick = UW'(u); end
    for (int u = N_RFU - 1; u >= 0; u--)
      if (differs[u] && urgent[u]) pick = UW'(u);
  end

  assign active   = (state != S_IDLE);
  assign rom_fn   = wfn;
  assign rom_idx  = widx;
  assign cfg_idx  = widx;
  assign cfg_data = rom_data;

  always_comb begin
    hold   = '0;
    cfg_we = '0;
    if (state != S_IDLE) hold[sel] = 1'b1;
    if (state == S_WRITE && !unit_cfg_busy[sel]) cfg_we[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sel        <= '0;
      wfn        <= FN_INT_ADD;
      widx       <= '0;
      urgent_w   <= 1'b0;
      urgent     <= '0;
      n_reconfig <= '0;
      n_adjust   <= '0;
      for (int u = 0; u < N_RFU; u++) target[u] <= HOME[u];
    end else begin
      // targets
      if (restart) begin
        for (int u = 0; u < N_RFU; u++) target[u] <= HOME[u];
        urgent <= '0;
      end else begin
        if (decide)
          for (int u = 0; u < N_RFU; u++) target[u] <= policy_target[u];
        for (int u = 0; u < N_RFU; u++)
          if (adj_req[u]) begin
            target[u] <= HOME[u];
            urgent[u] <= 1'b1;
          end
      end
      // rewrite sequence
      case (state)
        S_IDLE: if (pick_ok) begin
          sel      <= pick;
          wfn      <= target[pick];
          urgent_w <= urgent[pick];
          widx     <= '0;
          state    <= S_DRAIN;
        end
        S_DRAIN: if (!unit_busy[sel]) state <= S_WRITE;
        S_WRITE: if (!unit_cfg_busy[sel]) begin
          if (int'(widx) == CFG_WORDS - 1) state <= S_WAIT;
          else widx <= widx + 1'b1;
        end
        S_WAIT: if (!unit_cfg_busy[sel]) begin
          state      <= S_IDLE;
          n_reconfig <= n_reconfig + 1;
          if (urgent_w) n_adjust <= n_adjust + 1;
          if (urgent_w && !adj_req[sel] && !restart) urgent[sel] <= 1'b0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

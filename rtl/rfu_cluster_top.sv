// Functional-unit cluster of one dual-issue core with reconfigurable STT-NV
// LUT-based functional units.
// Fixed static-CMOS units: N_INT_ALU integer adders (units 0..N_INT_ALU-1)
// and N_FP_ADD FP adders. Reconfigurable STT-NV units: four, whose home
// functions are int multiply, int divide, fp multiply and fp divide (the last
// four unit numbers). Each cycle up to two operations arrive on `req`; fu_issue
// gives each to a free unit configured to its function, or refuses it
// (conflict, `accept` low) and, if no unit provides the function any more,
// asks for the adjustment of the unit that is its home. Every unit has its
// own result port `res[u]`.
// The activity monitor counts busy cycles per function; at the end of the
// learning phase (static) or of each monitoring interval (dynamic BIA/BMA)
// the policy picks new functions for the idle units and the reconfiguration
// controller rewrites their LUTs from the configuration ROM, one unit at a
// time, over a 128-bit bus. `algo` selects the algorithm; changing it sends
// every unit home and restarts monitoring.
// Statistics outputs count conflicts, adjustments, rewrites and decisions.
// Organisation and algorithms follow the document; the number of FP adders,
// the port set and the latencies are this design's choices.
module rfu_cluster_top
  import rfu_pkg::*;
#(
  parameter int unsigned N_INT_ALU  = 3,
  parameter int unsigned N_FP_ADD   = 1,
  parameter int unsigned INTERVAL   = 100_000,
  parameter int unsigned LEARN      = 100_000_000,
  parameter int unsigned BMA_THRESH = 10_000,
  parameter int unsigned WCYC       = WRITE_CYC,
  localparam int unsigned ISSUE_W   = 2,
  localparam int unsigned N_RFU     = 4,
  localparam int unsigned N_FIX     = N_INT_ALU + N_FP_ADD,
  localparam int unsigned N_UNITS   = N_FIX + N_RFU
) (
  input  logic        clk,
  input  logic        rst_n,
  input  algo_e       algo,
  input  fu_req_t     req      [ISSUE_W],
  output logic [ISSUE_W-1:0] accept,
  output fu_res_t     res      [N_UNITS],
  output fn_e         unit_fn  [N_UNITS],
  output logic [N_RFU-1:0] rfu_held,
  output fn_e         rfu_target [N_RFU],
  output logic        reconfiguring,
  output logic        learning,
  output logic [31:0] n_conflict,
  output logic [31:0] n_adjust,
  output logic [31:0] n_reconfig,
  output logic [31:0] n_decide
);
  localparam fn_e HOME [N_RFU] = '{FN_INT_MUL, FN_INT_DIV, FN_FP_MUL, FN_FP_DIV};

  // ---------------------------------------------------------------- state
  algo_e                algo_q;
  logic                 restart;
  logic [N_UNITS-1:0]   unit_cfg_ok, unit_avail, unit_busy, unit_issue;
  fu_req_t              unit_req [N_UNITS];
  logic [ISSUE_W-1:0]   conflict;
  logic [N_RFU-1:0]     adj_req, hold, cfg_we, cfg_busy;
  cfg_idx_t             cfg_idx, rom_idx;
  cfg_word_t            cfg_data, rom_data;
  fn_e                  rom_fn;
  logic [N_FN-1:0]      fn_busy;
  logic                 decide;
  logic [31:0]          snap_cnt [N_FN];
  fn_e                  policy_target [N_RFU];
  fn_e                  rfu_fn [N_RFU];
  cfg_word_t            rfu_rdata [N_RFU];

  always_ff @(posedge clk) begin
    if (!rst_n) algo_q <= ALGO_NONE;
    else        algo_q <= algo;
  end
  assign restart = rst_n && (algo != algo_q);

  // ---------------------------------------------------------------- issue
  fu_issue #(.ISSUE_W(ISSUE_W), .N_UNITS(N_UNITS), .N_RFU(N_RFU), .HOME(HOME)) u_issue (
    .req, .unit_fn, .unit_cfg_ok, .unit_avail,
    .accept, .conflict, .unit_issue, .unit_req, .adj_req
  );

  // ---------------------------------------------------------------- CMOS units
  for (genvar u = 0; u < N_FIX; u++) begin : g_cmos
    localparam fn_e FN = (u < N_INT_ALU) ? FN_INT_ADD : FN_FP_ADD;
    assign unit_fn[u]     = FN;
    assign unit_cfg_ok[u] = 1'b1;
    fu_exec_pipe #(.STT(1'b0)) u_fu (
      .clk, .rst_n, .fn(FN), .hold(1'b0),
      .in_valid(unit_issue[u]), .in_subop(unit_req[u].subop),
      .in_a(unit_req[u].a), .in_b(unit_req[u].b), .in_tag(unit_req[u].tag),
      .in_ready(unit_avail[u]), .out(res[u]), .busy(unit_busy[u])
    );
  end

  // ---------------------------------------------------------------- STT-NV units
  for (genvar r = 0; r < N_RFU; r++) begin : g_rfu
    localparam int unsigned U = N_FIX + r;
    stt_rfu #(.HOME_FN(HOME[r]), .WCYC(WCYC)) u_rfu (
      .clk, .rst_n,
      .in_valid(unit_issue[U]), .in_subop(unit_req[U].subop),
      .in_a(unit_req[U].a), .in_b(unit_req[U].b), .in_tag(unit_req[U].tag),
      .avail(unit_avail[U]), .out(res[U]), .busy(unit_busy[U]),
      .cur_fn(rfu_fn[r]), .cfg_ok(unit_cfg_ok[U]),
      .hold(hold[r]), .cfg_we(cfg_we[r]), .cfg_idx(cfg_idx), .cfg_data(cfg_data),
      .cfg_busy(cfg_busy[r]), .cfg_ridx('0), .cfg_rdata(rfu_rdata[r])
    );
    assign unit_fn[U] = rfu_fn[r];
  end

  // ---------------------------------------------------------------- adaptation
  always_comb begin
    for (int f = 0; f < N_FN; f++) begin
      fn_busy[f] = 1'b0;
      for (int u = 0; u < N_UNITS; u++)
        if (unit_busy[u] && unit_fn[u] == fn_e'(f)) fn_busy[f] = 1'b1;
      for (int s = 0; s < ISSUE_W; s++)
        if (req[s].valid && req[s].fn == fn_e'(f)) fn_busy[f] = 1'b1;
    end
  end

  activity_monitor #(.INTERVAL(INTERVAL), .LEARN(LEARN)) u_mon (
    .clk, .rst_n, .algo, .restart, .fn_busy,
    .decide, .snap_cnt, .learning
  );

  reconfig_policy #(.N_RFU(N_RFU), .HOME(HOME), .THRESH(BMA_THRESH)) u_policy (
    .algo, .cnt(snap_cnt), .target(policy_target)
  );

  cfg_rom u_rom (.fn(rom_fn), .idx(rom_idx), .data(rom_data));

  reconfig_ctrl #(.N_RFU(N_RFU), .HOME(HOME)) u_ctrl (
    .clk, .rst_n, .restart, .decide, .policy_target, .adj_req,
    .unit_fn(rfu_fn), .unit_cfg_ok(unit_cfg_ok[N_UNITS-1:N_FIX]),
    .unit_busy(unit_busy[N_UNITS-1:N_FIX]), .unit_cfg_busy(cfg_busy),
    .hold, .cfg_we, .cfg_idx, .cfg_data, .rom_fn, .rom_idx, .rom_data,
    .target(rfu_target), .active(reconfiguring), .n_reconfig, .n_adjust
  );

  assign rfu_held = hold;

  // ---------------------------------------------------------------- statistics
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_conflict <= '0;
      n_decide   <= '0;
    end else begin
      n_conflict <= n_conflict + 32'($countones(conflict));
      if (decide) n_decide <= n_decide + 1;
    end
  end
endmodule

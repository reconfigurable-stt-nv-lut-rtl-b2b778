// Functional-unit allocation for the two operations a dual-issue core offers
// per cycle. Combinational.
// Slot 0 is served first: it takes the lowest-numbered unit that is
// available and currently configured to the requested function; slot 1 then
// does the same among the units slot 0 left. A valid operation that finds no
// unit is a functional-unit conflict: it is not accepted and stays with the
// issue stage. If no unit at all is configured to the requested function
// (its units have been reconfigured to something else), an adjustment request
// is raised for every reconfigurable unit whose home function it is, so that
// the unit is turned back immediately. Units 0..N_UNITS-N_RFU-1 are the fixed
// CMOS units, the last N_RFU the reconfigurable ones.
// Conflict and adjustment rules follow the document; the allocation order is
// this design's choice.
module fu_issue
  import rfu_pkg::*;
#(
  parameter int unsigned ISSUE_W = 2,
  parameter int unsigned N_UNITS = 8,
  parameter int unsigned N_RFU   = 4,
  parameter fn_e         HOME [N_RFU] = '{FN_INT_MUL, FN_INT_DIV, FN_FP_MUL, FN_FP_DIV}
) (
  input  fu_req_t            req        [ISSUE_W],
  input  fn_e                unit_fn    [N_UNITS],
  input  logic [N_UNITS-1:0] unit_cfg_ok,
  input  logic [N_UNITS-1:0] unit_avail,
  output logic [ISSUE_W-1:0] accept,
  output logic [ISSUE_W-1:0] conflict,
  output logic [N_UNITS-1:0] unit_issue,     // unit u receives an operation
  output fu_req_t            unit_req   [N_UNITS],
  output logic [N_RFU-1:0]   adj_req
);
  logic [N_UNITS-1:0] free;
  logic               exists;

  always_comb begin
    free       = unit_avail;
    exists     = 1'b0;
    accept     = '0;
    conflict   = '0;
    unit_issue = '0;
    adj_req    = '0;
    for (int u = 0; u < N_UNITS; u++) unit_req[u] = '0;
    for (int s = 0; s < ISSUE_W; s++) begin
      if (req[s].valid) begin
        for (int u = 0; u < N_UNITS; u++)
          if (!accept[s] && free[u] && unit_cfg_ok[u] && unit_fn[u] == req[s].fn) begin
            accept[s]     = 1'b1;
            free[u]       = 1'b0;
            unit_issue[u] = 1'b1;
            unit_req[u]   = req[s];
          end
        conflict[s] = !accept[s];
        exists = 1'b0;
        for (int u = 0; u < N_UNITS; u++)
          if (unit_cfg_ok[u] && unit_fn[u] == req[s].fn) exists = 1'b1;
        if (!exists)
          for (int r = 0; r < N_RFU; r++)
            if (HOME[r] == req[s].fn) adj_req[r] = 1'b1;
      end
    end
  end
endmodule

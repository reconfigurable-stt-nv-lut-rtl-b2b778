// Testbench for fu_issue with 8 units: 0..2 int add, 3 fp add (CMOS),
// 4..7 reconfigurable with home functions int mul, int div, fp mul, fp div.
// Hand-made cases check allocation order, conflicts, use of a reconfigured
// unit, the operation payload reaching the chosen unit, and when an
// adjustment request is (and is not) raised.
module tb_fu_issue;
  import rfu_pkg::*;

  fu_req_t     req [2];
  fn_e         unit_fn [8];
  logic [7:0]  unit_cfg_ok, unit_avail, unit_issue;
  logic [1:0]  accept, conflict;
  fu_req_t     unit_req [8];
  logic [3:0]  adj_req;
  int          checks = 0, failures = 0;

  fu_issue #(.ISSUE_W(2), .N_UNITS(8), .N_RFU(4)) dut (.req, .unit_fn, .unit_cfg_ok, .unit_avail,
    .accept, .conflict, .unit_issue, .unit_req, .adj_req);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: acc=%b conf=%b iss=%b adj=%b", what, accept, conflict, unit_issue, adj_req); end
  endtask

  function automatic fu_req_t mk(input fn_e f, input int t);
    fu_req_t r;
    r = '0; r.valid = 1'b1; r.fn = f; r.a = 64'(t * 3); r.b = 64'(t + 1); r.tag = 8'(t);
    return r;
  endfunction

  task automatic home_cfg();
    unit_fn = '{FN_INT_ADD, FN_INT_ADD, FN_INT_ADD, FN_FP_ADD, FN_INT_MUL, FN_INT_DIV, FN_FP_MUL, FN_FP_DIV};
    unit_cfg_ok = '1; unit_avail = '1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    home_cfg();
    req[0] = mk(FN_INT_ADD, 1); req[1] = mk(FN_INT_ADD, 2); #1;
    chk(accept == 2'b11 && unit_issue == 8'b0000_0011, "two adds to units 0 and 1");
    chk(unit_req[0].tag == 8'd1 && unit_req[1].tag == 8'd2 && unit_req[1].a == 64'd6, "payload routed");
    // fp add unit busy: slot 1 conflicts
    req[0] = mk(FN_INT_ADD, 3); req[1] = mk(FN_FP_ADD, 4); unit_avail[3] = 0; #1;
    chk(accept == 2'b01 && conflict == 2'b10 && adj_req == 0, "fp add conflict, no adjustment");
    // two fp adds, unit 6 reconfigured to fp add: second one goes there
    home_cfg(); unit_fn[6] = FN_FP_ADD;
    req[0] = mk(FN_FP_ADD, 5); req[1] = mk(FN_FP_ADD, 6); #1;
    chk(accept == 2'b11 && unit_issue == 8'b0100_1000 && unit_req[6].tag == 8'd6, "reconfigured unit serves fp add");
    // int mul unit reconfigured away and nobody else does int mul: adjustment
    home_cfg(); unit_fn[4] = FN_INT_ADD;
    req[0] = mk(FN_INT_MUL, 7); req[1] = '0; #1;
    chk(accept == 2'b00 && conflict == 2'b01 && adj_req == 4'b0001, "int mul adjustment of unit 4");
    // another unit provides int mul (busy): conflict but no adjustment
    unit_fn[6] = FN_INT_MUL; unit_avail[6] = 0; #1;
    chk(conflict == 2'b01 && adj_req == 4'b0000, "int mul elsewhere, no adjustment");
    unit_avail[6] = 1; #1;
    chk(accept == 2'b01 && unit_issue == 8'b0100_0000, "int mul on unit 6");
    // unit under rewrite (header not valid) does not count as providing its function
    home_cfg(); unit_cfg_ok[7] = 0; unit_avail[7] = 0;
    req[0] = mk(FN_FP_DIV, 8); #1;
    chk(conflict == 2'b01 && adj_req == 4'b1000, "fp div adjustment when header invalid");
    // all int adders busy: a unit reconfigured to int add takes the op
    home_cfg(); unit_avail[2:0] = 0; unit_fn[5] = FN_INT_ADD;
    req[0] = mk(FN_INT_ADD, 9); req[1] = mk(FN_INT_ADD, 10); #1;
    chk(accept == 2'b01 && conflict == 2'b10 && unit_issue == 8'b0010_0000, "overflow add to unit 5");
    // invalid slots do nothing
    req[0] = '0; req[1] = '0; #1;
    chk(accept == 0 && conflict == 0 && unit_issue == 0 && adj_req == 0, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

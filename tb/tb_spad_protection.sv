// Self-checking testbench of spad_protection.
//
// Runs with 4 stripes over 16 sets and the Set PID privilege check on.
// Walks through region reservation (aligned power-of-two blocks, lowest
// first, index = stripes/n + base/n), the Bad Stripe Reference and Out of
// Stripes errors, Get Owned Regions, Set PID from user and supervisor mode,
// ownership checks of Set/Clear/Free Region, the Bad Location Reference of
// accesses without a valid region, and the set-index mapping into the
// current region (top Region Width bits of the stripe field replaced by the
// region's lowest stripe). Expected values are worked out by hand from the
// rules above. A watchdog ends the run after 10000 cycles.
module tb_spad_protection;
  import spad_pkg::*;

  localparam int STRIPES = 4, SETS = 16;

  logic               clk = 0, rst_n = 0;
  logic               op_valid;
  op_e                op;
  logic [4:0]         stripes_req;
  logic [XLEN-1:0]    arg;
  logic [1:0]         prv;
  logic [3:0]         raw_set, final_set;
  err_e               err;
  logic [XLEN-1:0]    rdata;
  logic               inval_en;
  logic [STRIPES-1:0] inval_mask;
  int                 checks = 0, failures = 0;

  spad_protection #(.STRIPES(STRIPES), .SETS(SETS), .PID_BITS(16), .PROTECT(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: err=%s rdata=%h final_set=%h", what, err.name(), rdata, final_set);
    end
  endtask

  // Present one operation for one cycle, check the combinational outputs
  // before the clock edge, then let it commit.
  task automatic do_op(op_e o, logic [XLEN-1:0] a, logic [4:0] n, err_e exp_err,
                       logic [XLEN-1:0] exp_rdata, string what);
    @(negedge clk);
    op = o; arg = a; stripes_req = n; op_valid = 1;
    #1;
    check(err == exp_err, {what, " error"});
    if (exp_err == ERR_NONE && o inside {OP_RESERVE, OP_GET_OWNED})
      check(rdata == exp_rdata, {what, " data"});
    @(negedge clk);
    op_valid = 0; op = OP_ILLEGAL;
  endtask

  task automatic map(logic [3:0] s, err_e exp_err, logic [3:0] exp_set, string what);
    @(negedge clk);
    op = OP_GET; raw_set = s; op_valid = 0;
    #1;
    check(err == exp_err, {what, " access check"});
    if (exp_err == ERR_NONE) check(final_set == exp_set, {what, " mapping"});
    op = OP_ILLEGAL;
  endtask

  initial begin
    op_valid = 0; op = OP_ILLEGAL; arg = 0; stripes_req = 0; prv = 2'd1; raw_set = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // no region yet: accesses are refused
    map(4'hA, ERR_BAD_LOCATION, 4'h0, "no region");
    // bad counts
    do_op(OP_RESERVE, 0, 5'd3, ERR_BAD_STRIPE, 0, "reserve 3");
    do_op(OP_RESERVE, 0, 5'd0, ERR_BAD_STRIPE, 0, "reserve 0");
    do_op(OP_RESERVE, 0, 5'd8, ERR_BAD_STRIPE, 0, "reserve 8");
    // PID 0x4F from supervisor mode
    do_op(OP_SET_PID, 64'h4F, 0, ERR_NONE, 0, "set pid 4f");
    // 2 stripes at base 0 -> index 4/2 + 0 = 2
    do_op(OP_RESERVE, 0, 5'd2, ERR_NONE, 64'd2, "reserve 2");
    // 1 stripe at base 2 -> index 4 + 2 = 6
    do_op(OP_RESERVE, 0, 5'd1, ERR_NONE, 64'd6, "reserve 1a");
    do_op(OP_GET_OWNED, 0, 0, ERR_NONE, 64'b0111, "owned 0111");
    // user mode may not change the PID
    prv = PRV_U;
    do_op(OP_SET_PID, 64'h32, 0, ERR_UNAUTHORIZED, 0, "set pid from user");
    do_op(OP_GET_OWNED, 0, 0, ERR_NONE, 64'b0111, "pid kept");
    prv = 2'd3;
    do_op(OP_SET_PID, 64'h32, 0, ERR_NONE, 0, "set pid 32");
    do_op(OP_GET_OWNED, 0, 0, ERR_NONE, 64'b0000, "owned none");
    // two stripes no longer fit anywhere; one does (stripe 3 -> index 7)
    do_op(OP_RESERVE, 0, 5'd2, ERR_OUT_OF_STRIPES, 0, "reserve 2 full");
    do_op(OP_RESERVE, 0, 5'd1, ERR_NONE, 64'd7, "reserve 1b");
    do_op(OP_RESERVE, 0, 5'd1, ERR_OUT_OF_STRIPES, 0, "reserve 1 full");
    do_op(OP_GET_OWNED, 0, 0, ERR_NONE, 64'b1000, "owned 1000");
    // another process' regions and non-regions are refused
    do_op(OP_SET_REG, 64'd2, 0, ERR_BAD_STRIPE, 0, "set foreign");
    do_op(OP_FREE_REG, 64'd6, 0, ERR_BAD_STRIPE, 0, "free foreign");
    do_op(OP_SET_REG, 64'd0, 0, ERR_BAD_STRIPE, 0, "set index 0");
    do_op(OP_SET_REG, 64'd8, 0, ERR_BAD_STRIPE, 0, "set index 8");
    do_op(OP_SET_REG, 64'd1, 0, ERR_BAD_STRIPE, 0, "set whole pad");
    // own one-stripe region 7: every set maps into stripe 3 (sets 12..15)
    do_op(OP_SET_REG, 64'd7, 0, ERR_NONE, 0, "set 7");
    for (int s = 0; s < 16; s++) map(4'(s), ERR_NONE, {2'b11, 2'(s)}, "region 7");
    // back to 0x4F: region 7 is not ours any more
    do_op(OP_SET_PID, 64'h4F, 0, ERR_NONE, 0, "set pid 4f again");
    map(4'h5, ERR_BAD_LOCATION, 0, "foreign current region");
    // two-stripe region 2: top stripe bit forced to 0
    do_op(OP_SET_REG, 64'd2, 0, ERR_NONE, 0, "set 2");
    for (int s = 0; s < 16; s++) map(4'(s), ERR_NONE, {1'b0, 3'(s)}, "region 2");
    // Clear asks for invalidation of stripes 0 and 1
    @(negedge clk);
    op = OP_CLEAR_REG; arg = 64'd2; op_valid = 1; #1;
    check(inval_en && inval_mask == 4'b0011, "clear invalidates");
    @(negedge clk); op_valid = 0; op = OP_ILLEGAL;
    map(4'hF, ERR_NONE, 4'h7, "region kept after clear");
    // Free the current region: it is deselected and its stripes return
    @(negedge clk);
    op = OP_FREE_REG; arg = 64'd2; op_valid = 1; #1;
    check(inval_en && inval_mask == 4'b0011 && err == ERR_NONE, "free invalidates");
    @(negedge clk); op_valid = 0; op = OP_ILLEGAL;
    map(4'h1, ERR_BAD_LOCATION, 0, "freed region");
    do_op(OP_GET_OWNED, 0, 0, ERR_NONE, 64'b0100, "owned after free");
    do_op(OP_RESERVE, 0, 5'd2, ERR_NONE, 64'd2, "reserve 2 again");
    do_op(OP_FREE_REG, 64'd6, 0, ERR_NONE, 0, "free 6");
    do_op(OP_SET_PID, 64'h32, 0, ERR_NONE, 0, "pid 32");
    do_op(OP_FREE_REG, 64'd7, 0, ERR_NONE, 0, "free 7");
    // the whole pad is now free: 4 stripes -> index 1, whole set index kept
    do_op(OP_RESERVE, 0, 5'd4, ERR_OUT_OF_STRIPES, 0, "reserve 4 blocked");
    do_op(OP_SET_PID, 64'h4F, 0, ERR_NONE, 0, "pid 4f");
    do_op(OP_FREE_REG, 64'd2, 0, ERR_NONE, 0, "free 2");
    do_op(OP_RESERVE, 0, 5'd4, ERR_NONE, 64'd1, "reserve 4");
    do_op(OP_SET_REG, 64'd1, 0, ERR_NONE, 0, "set 1");
    for (int s = 0; s < 16; s++) map(4'(s), ERR_NONE, 4'(s), "region 1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

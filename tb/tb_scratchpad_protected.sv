// Testbench of scratchpad_accelerator in its protected configuration
// (PROTECT = 1, otherwise default size).
//
// With protection on, only supervisor or higher privilege may change the
// process ID. The testbench plays an operating system and two user
// processes around context switches:
//   - Get Parameters reports protection on;
//   - a user-mode Set PID is refused with Unauthorized Instruction, raises
//     the interrupt, answers nothing and leaves the PID unchanged;
//   - supervisor-mode Set PID switches processes and clears the error code;
//   - process A reserves and fills a region; after a switch, process B can
//     neither read it nor set, clear or free it, and gets its own stripes;
//   - on teardown of A the operating system finds A's leaked stripes with
//     Get Owned Regions and frees them, after which the lines are empty.
module tb_scratchpad_protected;
  import spad_pkg::*;

  logic            clk = 0, rst_n = 0;
  logic            cmd_valid, cmd_ready;
  logic [31:0]     cmd_inst;
  logic [XLEN-1:0] cmd_rs1, cmd_rs2;
  logic [1:0]      cmd_prv;
  logic            resp_valid, resp_ready;
  logic [4:0]      resp_rd;
  logic [XLEN-1:0] resp_data;
  logic            interrupt, busy;

  scratchpad_accelerator #(.PROTECT(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [cycle %0d] %s", cyc, what);
    end
  endtask

  localparam logic [6:0] C0 = 7'b0001011;
  localparam logic [1:0] PRV_S = 2'd1;
  function automatic logic [31:0] i_put(logic [1:0] sz);
    return {1'b0, sz, 4'd0, 5'd2, 5'd1, 3'b011, 5'd0, C0};
  endfunction
  function automatic logic [31:0] i_get(logic [1:0] sz);
    return {1'b0, sz, 4'd0, 5'd0, 5'd1, 3'b110, 5'd10, C0};
  endfunction
  function automatic logic [31:0] i_spc(logic [3:0] opc, logic [4:0] f2, logic [2:0] xr);
    return {1'b1, 2'd0, opc, f2, 5'd1, xr, 5'd12, C0};
  endfunction

  logic [63:0] last_resp;
  int          n_resp = 0, n_irq = 0;
  always @(posedge clk) begin
    if (rst_n && resp_valid && resp_ready) begin
      last_resp <= resp_data;
      n_resp++;
    end
    if (rst_n && interrupt) n_irq++;
  end

  // offer one command; irq is the interrupt in the cycle after acceptance
  task automatic send(logic [31:0] inst, logic [63:0] rs1, logic [63:0] rs2, output bit irq);
    @(negedge clk);
    cmd_valid = 1; cmd_inst = inst; cmd_rs1 = rs1; cmd_rs2 = rs2;
    forever begin
      @(posedge clk);
      if (cmd_ready) break;
    end
    #1 cmd_valid = 0;
    irq = interrupt;
  endtask

  task automatic call(logic [31:0] inst, logic [63:0] rs1, logic [63:0] rs2, output logic [63:0] v);
    int n;
    bit irq;
    n = n_resp;
    send(inst, rs1, rs2, irq);
    while (n_resp == n) @(posedge clk);
    #1 v = last_resp;
  endtask

  task automatic set_pid(logic [1:0] prv, logic [63:0] pid, output bit irq);
    cmd_prv = prv;
    send(i_spc(OPC_SET_PID, 5'd3, 3'b011), 0, pid, irq);
  endtask
  task automatic region_op(logic [3:0] opc, logic [63:0] idx, output bit irq);
    send(i_spc(opc, 5'd3, 3'b011), 0, idx, irq);
  endtask
  task automatic special(logic [3:0] opc, logic [4:0] f2, output logic [63:0] v);
    call(i_spc(opc, f2, 3'b100), 0, 0, v);
  endtask

  initial begin
    logic [63:0] v;
    bit          irq;
    int          n0;

    cmd_valid = 0; cmd_inst = 0; cmd_rs1 = 0; cmd_rs2 = 0; cmd_prv = PRV_U; resp_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    special(OPC_GET_PARAM, 5'd0, v);
    check(v[40] == 1'b1, "protection bit set in parameters");

    // the OS starts process A (PID 5)
    set_pid(PRV_S, 64'd5, irq); check(!irq, "supervisor set pid 5");
    cmd_prv = PRV_U;
    special(OPC_RESERVE, 5'd2, v); check(v == 64'd2, "A reserves region 2");
    region_op(OPC_SET_REG, 64'd2, irq); check(!irq, "A sets region 2");
    for (int i = 0; i < 16; i++) send(i_put(2'd3), 64'hA000 + 64'(i), 64'h100 + 64'(8 * i), irq);
    call(i_get(2'd3), 64'h100 + 64'(8 * 7), 0, v); check(v == 64'hA007, "A reads its data");

    // A tries to become another process from user mode
    n0 = n_resp;
    set_pid(PRV_U, 64'd9, irq);
    check(irq, "user-mode set pid raises the interrupt");
    repeat (2) @(posedge clk);
    check(n_resp == n0, "set pid answers nothing");
    special(OPC_INV_ERR, 5'd0, v); check(v == 64'(ERR_UNAUTHORIZED), "unauthorized instruction");
    special(OPC_GET_OWNED, 5'd0, v); check(v == 64'h3, "pid unchanged: still owns stripes 0-1");
    set_pid(PRV_U, 64'd0, irq); check(irq, "user-mode set pid 0 refused too");

    // context switch to process B (PID 6), from machine mode
    set_pid(2'd3, 64'd6, irq); check(!irq, "machine-mode set pid 6");
    special(OPC_INV_ERR, 5'd0, v); check(v == 64'(ERR_NONE), "error cleared on switch");
    cmd_prv = PRV_U;
    special(OPC_GET_OWNED, 5'd0, v); check(v == 0, "B owns nothing");
    call(i_get(2'd3), 64'h100, 0, v); check(v == 0, "B cannot read A's data");
    region_op(OPC_SET_REG, 64'd2, irq); check(irq, "B cannot set A's region");
    region_op(OPC_CLEAR_REG, 64'd2, irq); check(irq, "B cannot clear A's region");
    region_op(OPC_FREE_REG, 64'd1, irq); check(irq, "B cannot free the whole pad");
    special(OPC_INV_ERR, 5'd0, v); check(v == 64'(ERR_BAD_STRIPE), "bad stripe reference");
    special(OPC_RESERVE, 5'd4, v); check(v == 0, "B cannot take all four stripes");
    special(OPC_RESERVE, 5'd2, v); check(v == 64'd3, "B reserves region 3");

    // back to A, which ends without freeing; the OS cleans up
    set_pid(PRV_S, 64'd5, irq); check(!irq, "switch back to A");
    special(OPC_GET_OWNED, 5'd0, v); check(v == 64'h3, "OS sees A's leaked stripes");
    region_op(OPC_FREE_REG, 64'd2, irq); check(!irq, "OS frees A's region");
    special(OPC_GET_OWNED, 5'd0, v); check(v == 0, "A owns nothing after teardown");
    special(OPC_RESERVE, 5'd2, v); check(v == 64'd2, "stripes 0-1 reusable");
    region_op(OPC_SET_REG, 64'd2, irq); check(!irq, "set region 2 again");
    call(i_get(2'd3), 64'h100 + 64'(8 * 7), 0, v); check(v == 0, "old data gone");
    special(OPC_INV_ERR, 5'd0, v); check(v == 64'(ERR_BAD_LOCATION), "freed lines are empty");

    repeat (3) @(posedge clk);
    check(n_irq == 8, $sformatf("interrupts counted: %0d", n_irq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

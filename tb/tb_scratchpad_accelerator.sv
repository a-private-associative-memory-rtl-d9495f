// End-to-end testbench of scratchpad_accelerator at its default size
// (1 KiB, 8-byte lines, 8 ways, 16 sets, 48-bit addresses, 4 stripes,
// Set PID check off).
//
// The testbench plays the core: it encodes instructions from the field
// layout of the instruction set, offers them on the command port, and
// checks every response against values it works out itself. It runs the
// kinds of program the accelerator is meant for:
//   - a sorted array of the integers 1..256 filling the whole scratchpad,
//     written back to back, searched by predecessor binary search for 255
//     and 128, then read back with pipelined Gets;
//   - quicksort of a reverse-ordered 256-integer array held in the pad;
//   - one set used as an 8-entry key-value store (key in the tag bits);
//   - a 128-pair hash table with bucket-level linear probing that fills
//     every line of the pad;
//   - two regions written through the same addresses (region isolation),
//     each holding two 64-word arrays' worth of data as a SHA-256 would;
// and exercises Load Reserved / Store Conditional, Remove, Clear and Free
// Region, Set PID, Get Owned Regions, Get Parameters, Investigate Error and
// every error code that this configuration can raise. Part of the run keeps
// the core's response port randomly stalled so that the response queue
// fills and the accelerator holds commands back.
//
// Timing checks: a Get accepted while nothing is queued answers in the next
// cycle; 256 back-to-back Puts and 256 back-to-back Gets are each accepted
// in 256 consecutive cycles. Each mechanism is counted and a failure is
// counted for any that never happened.
module tb_scratchpad_accelerator;
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

  scratchpad_accelerator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
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

  // ------------------------------------------------------ instruction forms
  localparam logic [6:0] C0 = 7'b0001011;
  function automatic logic [31:0] i_put(logic [1:0] sz, logic [8:0] off);
    return {1'b0, sz, off[8:5], 5'd2, 5'd1, 3'b011, off[4:0], C0};
  endfunction
  function automatic logic [31:0] i_get(logic [1:0] sz, logic [8:0] off);
    return {1'b0, sz, off[8:5], off[4:0], 5'd1, 3'b110, 5'd10, C0};
  endfunction
  function automatic logic [31:0] i_rem(logic [1:0] sz, logic [8:0] off);
    return {1'b0, sz, off[8:5], 5'd2, off[4:0], 3'b111, 5'd11, C0};
  endfunction
  function automatic logic [31:0] i_spc(logic [3:0] opc, logic [1:0] sz, logic [4:0] f2, logic [2:0] xr);
    return {1'b1, sz, opc, f2, 5'd1, xr, 5'd12, C0};
  endfunction

  // ------------------------------------------------------ response checking
  typedef struct { logic [4:0] rd; logic [63:0] data; bit chk; longint t_acc; } exp_t;
  exp_t        exp_q [$];
  logic [63:0] got_q [$];
  int          n_resp = 0, n_lat1 = 0, n_irq = 0, n_stall = 0, n_qfull = 0;

  always @(posedge clk) begin
    if (rst_n && resp_valid && resp_ready) begin
      exp_t e;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected response %h", resp_data);
      end else begin
        e = exp_q.pop_front();
        checks++;
        if (resp_rd != e.rd || (e.chk && resp_data != e.data)) begin
          failures++;
          $display("FAIL [cycle %0d] response rd=%0d data=%h, expected rd=%0d data=%h",
                   cyc, resp_rd, resp_data, e.rd, e.data);
        end
        if (cyc - e.t_acc == 1) n_lat1++;
        got_q.push_back(resp_data);
        n_resp++;
      end
    end
    if (rst_n && interrupt) n_irq++;
    if (rst_n && cmd_valid && !cmd_ready) n_stall++;
    if (rst_n && !cmd_ready) n_qfull++;
  end

  // offer one command; returns once it has been accepted
  task automatic send(logic [31:0] inst, logic [63:0] rs1, logic [63:0] rs2,
                      logic [63:0] expv = 0, bit chk = 0);
    @(negedge clk);
    cmd_valid = 1; cmd_inst = inst; cmd_rs1 = rs1; cmd_rs2 = rs2;
    forever begin
      @(posedge clk);
      if (cmd_ready) break;
    end
    if (inst[14]) exp_q.push_back('{rd: inst[11:7], data: expv, chk: chk, t_acc: cyc});
    #1 cmd_valid = 0;
  endtask

  // offer one command with a response and wait for it
  task automatic call(logic [31:0] inst, logic [63:0] rs1, logic [63:0] rs2, output logic [63:0] v);
    int n;
    n = n_resp + exp_q.size();
    send(inst, rs1, rs2);
    while (n_resp <= n) @(posedge clk);
    #1;
    v = got_q[$];
  endtask

  // offer a command without response; report whether it raised an error
  task automatic send_irq(logic [31:0] inst, logic [63:0] rs1, logic [63:0] rs2, output bit irq);
    send(inst, rs1, rs2);
    irq = interrupt;   // pulses in the cycle after acceptance
  endtask

  // convenience wrappers
  task automatic put(logic [1:0] sz, logic [63:0] addr, logic [63:0] val);
    bit irq;
    send_irq(i_put(sz, 9'd0), val, addr, irq);
    check(!irq, $sformatf("put %h -> %h accepted", val, addr));
  endtask
  task automatic get(logic [1:0] sz, logic [63:0] addr, output logic [63:0] v);
    call(i_get(sz, 9'd0), addr, 0, v);
  endtask
  task automatic special(logic [3:0] opc, logic [4:0] f2, logic [63:0] rs2, output logic [63:0] v);
    call(i_spc(opc, 2'd0, f2, 3'b100), 0, rs2, v);
  endtask
  task automatic special_nr(logic [3:0] opc, logic [63:0] rs2, output bit irq);
    send_irq(i_spc(opc, 2'd0, 5'd3, 3'b011), 0, rs2, irq);
  endtask
  task automatic expect_error(err_e code, string what);
    logic [63:0] v;
    special(OPC_INV_ERR, 0, 0, v);
    check(v == 64'(code), $sformatf("%s: error code %0d, expected %0d", what, v, code));
  endtask

  // mechanism counters
  int m_put, m_get, m_remove, m_reserve, m_set, m_clear, m_free, m_lr, m_scok, m_scfail;
  int m_e_space, m_e_unauth, m_e_stripes, m_e_badloc, m_e_badstripe, m_params, m_owned, m_pid;

  // ------------------------------------------------------ quicksort helpers
  logic [63:0] tmp;
  task automatic sp_get(int i, output int v);
    logic [63:0] r;
    get(2'd2, 64'(4 * i), r);
    v = int'(r[31:0]);
  endtask
  task automatic sp_put(int i, int v);
    send(i_put(2'd2, 9'd0), 64'(unsigned'(v)), 64'(4 * i));
  endtask
  task automatic quicksort(int lo, int hi);
    int i, j, p, a, b;
    if (lo >= hi) return;
    sp_get((lo + hi) / 2, p);
    i = lo; j = hi;
    while (i <= j) begin
      sp_get(i, a);
      while (a < p) begin i++; sp_get(i, a); end
      sp_get(j, b);
      while (b > p) begin j--; sp_get(j, b); end
      if (i <= j) begin
        sp_put(i, b); sp_put(j, a);
        m_put += 2;
        i++; j--;
      end
    end
    quicksort(lo, j);
    quicksort(i, hi);
  endtask

  initial begin
    logic [63:0] v;
    bit          irq;
    int          lo, hi, mid, pred, vi;
    longint      t0;
    int          keys [128];
    int          bucket_of [128];

    cmd_valid = 0; cmd_inst = 0; cmd_rs1 = 0; cmd_rs2 = 0; cmd_prv = 2'd1; resp_ready = 1;
    {m_put, m_get, m_remove, m_reserve, m_set, m_clear, m_free, m_lr, m_scok, m_scfail} = '0;
    {m_e_space, m_e_unauth, m_e_stripes, m_e_badloc, m_e_badstripe, m_params, m_owned, m_pid} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- configuration word
    special(OPC_GET_PARAM, 0, 0, v); m_params++;
    check(v == {8'd0, 8'd4, 7'd0, 1'b0, 8'd48, 8'd8, 8'd8, 16'd1024}, $sformatf("parameters %h", v));

    // ---- no region yet: access refused with a zero response
    get(2'd3, 64'h40, v); check(v == 0, "get without region returns 0");
    expect_error(ERR_BAD_LOCATION, "get without region"); m_e_badloc++;
    // unknown special opcode -> Unauthorized Instruction
    call(i_spc(4'b0001, 2'd0, 5'd0, 3'b100), 0, 0, v);
    check(v == 0, "illegal returns 0");
    expect_error(ERR_UNAUTHORIZED, "illegal instruction"); m_e_unauth++;
    // bad stripe count
    special(OPC_RESERVE, 5'd3, 0, v); check(v == 0, "reserve 3 returns 0");
    expect_error(ERR_BAD_STRIPE, "reserve 3"); m_e_badstripe++;

    // ---- whole pad as one region
    special(OPC_RESERVE, 5'd4, 0, v); m_reserve++;
    check(v == 1, $sformatf("reserve 4 -> index %0d", v));
    special(OPC_RESERVE, 5'd1, 0, v);
    check(v == 0, "reserve when full returns 0");
    expect_error(ERR_OUT_OF_STRIPES, "reserve when full"); m_e_stripes++;
    special_nr(OPC_SET_REG, 64'd1, irq); m_set++;
    check(!irq, "set region 1");

    // ---- binary-search workload: ints 1..256 back to back
    t0 = -1;
    for (int i = 0; i < 256; i++) begin
      send(i_put(2'd2, 9'd0), 64'(i + 1), 64'(4 * i));
      if (i == 0) t0 = cyc;
      m_put++;
    end
    check(cyc - t0 == 255, $sformatf("256 puts accepted in %0d cycles", cyc - t0 + 1));
    @(posedge clk); #1;
    check(!interrupt, "array fill raised no error");
    foreach (keys[k]) keys[k] = 0;
    // predecessor search for 255 and 128 (largest value below the target)
    foreach (bucket_of[k]) bucket_of[k] = 0;
    for (int t = 0; t < 2; t++) begin
      int target;
      target = (t == 0) ? 255 : 128;
      lo = 0; hi = 255; pred = -1;
      while (lo <= hi) begin
        mid = (lo + hi) / 2;
        sp_get(mid, vi); m_get++;
        if (vi < target) begin pred = vi; lo = mid + 1; end
        else hi = mid - 1;
      end
      check(pred == target - 1, $sformatf("predecessor of %0d is %0d", target, pred));
    end
    // the pad is full: a new tag in any set is refused
    send_irq(i_put(2'd3, 9'd0), 64'hDEAD, 64'd1024, irq);
    check(irq, "put into full pad raises interrupt");
    expect_error(ERR_OUT_OF_SPACE, "put into full pad"); m_e_space++;
    // misaligned access
    get(2'd2, 64'd2, v); check(v == 0, "misaligned get returns 0");
    expect_error(ERR_BAD_LOCATION, "misaligned get"); m_e_badloc++;
    // base + offset addressing: element 37 through base 4*37-20 and offset 20
    call(i_get(2'd2, 9'd20), 64'(4 * 37 - 20), 0, v);
    check(v == 38, "base+offset get"); m_get++;
    // pipelined reads: 256 Gets back to back, checked in order
    for (int i = 0; i < 256; i++) begin
      send(i_get(2'd2, 9'd0), 64'(4 * i), 0, 64'(i + 1), 1);
      if (i == 0) t0 = cyc;
      m_get++;
    end
    check(cyc - t0 == 255, $sformatf("256 gets accepted in %0d cycles", cyc - t0 + 1));
    while (exp_q.size() != 0) @(posedge clk);
    // doubleword and byte views of the same storage (little-endian lines)
    get(2'd3, 64'd8, v); check(v == {32'd4, 32'd3}, $sformatf("doubleword view %h", v));
    get(2'd0, 64'd13, v); check(v == 0, "byte view");
    get(2'd0, 64'd12, v); check(v == 4, "byte view 2");

    // ---- quicksort workload: reverse-ordered 256..1, sorted in place
    for (int i = 0; i < 256; i++) begin sp_put(i, 256 - i); m_put++; end
    quicksort(0, 255);
    for (int i = 0; i < 256; i++) send(i_get(2'd2, 9'd0), 64'(4 * i), 0, 64'(i + 1), 1);
    while (exp_q.size() != 0) @(posedge clk);

    // ---- Remove: returns the value and frees the bytes
    call(i_rem(2'd2, 9'd0), 0, 64'd400, v); m_remove++;
    check(v == 101, "remove returns value");
    get(2'd2, 64'd400, v); check(v == 0, "removed bytes are gone");
    expect_error(ERR_BAD_LOCATION, "get after remove"); m_e_badloc++;
    call(i_rem(2'd2, 9'd0), 0, 64'd404, v); m_remove++;   // line 400..407 now empty
    check(v == 102, "remove second half");
    put(2'd3, 64'h1_0000_0190, 64'h0123_4567_89AB_CDEF); m_put++;  // other tag takes the freed way
    get(2'd3, 64'h1_0000_0190, v); m_get++;
    check(v == 64'h0123_4567_89AB_CDEF, "freed way reused by another tag");

    // ---- Load Reserved / Store Conditional
    call(i_spc(OPC_LR, 2'd2, 5'd0, 3'b110), 64'd40, 0, v); m_lr++;
    check(v == 11, "lr value");
    call(i_spc(OPC_SC, 2'd2, 5'd2, 3'b111), 64'd500, 64'd40, v);
    check(v == 0, "sc success"); m_scok++;
    get(2'd2, 64'd40, v); check(v == 500, "sc wrote");
    call(i_spc(OPC_SC, 2'd2, 5'd2, 3'b111), 64'd600, 64'd40, v);
    check(v == 1, "second sc fails"); m_scfail++;
    call(i_spc(OPC_LR, 2'd2, 5'd0, 3'b110), 64'd40, 0, v); m_lr++;
    put(2'd2, 64'd44, 64'd7);                                   // same line modified
    call(i_spc(OPC_SC, 2'd2, 5'd2, 3'b111), 64'd600, 64'd40, v);
    check(v == 1, "sc after modification fails"); m_scfail++;
    call(i_spc(OPC_LR, 2'd2, 5'd0, 3'b110), 64'd40, 0, v); m_lr++;
    call(i_spc(OPC_LR, 2'd2, 5'd0, 3'b110), 64'd80, 0, v); m_lr++;
    call(i_spc(OPC_SC, 2'd2, 5'd2, 3'b111), 64'd600, 64'd40, v);
    check(v == 1, "sc after another lr fails"); m_scfail++;
    get(2'd2, 64'd40, v); check(v == 500, "failed sc wrote nothing");

    // ---- Clear Region: every line invalid, region kept
    special_nr(OPC_CLEAR_REG, 64'd1, irq); m_clear++;
    check(!irq, "clear region");
    get(2'd2, 64'd0, v); check(v == 0, "cleared data is gone");
    expect_error(ERR_BAD_LOCATION, "get after clear"); m_e_badloc++;

    // ---- key-value store in one set: key in the tag, bucket = set 3
    for (int k = 0; k < 8; k++)
      put(2'd2, (64'(k * 7 + 1) << 7) | (64'd3 << 3), 64'(1000 + k));
    send_irq(i_put(2'd2, 9'd0), 64'd9999, (64'd99 << 7) | (64'd3 << 3), irq);
    check(irq, "ninth key refused"); m_e_space++;
    for (int k = 7; k >= 0; k--) begin
      get(2'd2, (64'(k * 7 + 1) << 7) | (64'd3 << 3), v);
      check(v == 64'(1000 + k), $sformatf("kv lookup key %0d", k * 7 + 1));
    end
    call(i_rem(2'd2, 9'd0), 0, (64'd15 << 7) | (64'd3 << 3), v);
    check(v == 1002, "kv remove");
    put(2'd2, (64'd99 << 7) | (64'd3 << 3), 64'd9999);
    get(2'd2, (64'd99 << 7) | (64'd3 << 3), v); check(v == 9999, "kv insert after remove");
    special_nr(OPC_CLEAR_REG, 64'd1, irq); m_clear++;

    // ---- hash table: 128 random keys, bucket = key mod 16, linear probing
    //      over buckets on Out of Space; fills every line of the pad
    for (int k = 0; k < 128; k++) begin
      bit dup;
      do begin
        keys[k] = $urandom_range(1, 1 << 30);
        dup = 0;
        for (int j = 0; j < k; j++) if (keys[j] == keys[k]) dup = 1;
      end while (dup);
    end
    for (int k = 0; k < 128; k++) begin
      int b;
      b = keys[k] % 16;
      forever begin
        send_irq(i_put(2'd2, 9'd0), 64'(k), (64'(keys[k]) << 7) | (64'(b) << 3), irq);
        if (!irq) break;
        m_e_space++;
        b = (b + 1) % 16;
      end
      bucket_of[k] = b;
    end
    for (int k = 0; k < 128; k++) begin
      int b;
      b = keys[k] % 16;
      forever begin
        get(2'd2, (64'(keys[k]) << 7) | (64'(b) << 3), v);
        if (b == bucket_of[k]) break;
        b = (b + 1) % 16;
      end
      check(v == 64'(k), $sformatf("hash lookup %0d", k));
    end
    send_irq(i_put(2'd2, 9'd0), 64'd1, 64'h7777_0000, irq);
    check(irq, "hash table fills the pad");

    // ---- region isolation: two 2-stripe regions, same addresses
    special_nr(OPC_FREE_REG, 64'd1, irq); m_free++;
    check(!irq, "free region 1");
    get(2'd2, 64'd0, v); check(v == 0, "no region after free");
    expect_error(ERR_BAD_LOCATION, "access after free"); m_e_badloc++;
    special(OPC_RESERVE, 5'd2, 0, v); m_reserve++; check(v == 2, "reserve 2 -> 2");
    special(OPC_RESERVE, 5'd2, 0, v); m_reserve++; check(v == 3, "reserve 2 -> 3");
    special(OPC_GET_OWNED, 0, 0, v); m_owned++; check(v == 64'hF, "owned all four");
    // SHA-256-sized arrays: 64 words (256 bytes) through the same addresses
    // in each 2-stripe (512-byte) region
    special_nr(OPC_SET_REG, 64'd2, irq); m_set++;
    for (int i = 0; i < 64; i++) put(2'd2, 64'h3FFF_F000 + 64'(4 * i), 64'(32'h428A_0000 + i));
    special_nr(OPC_SET_REG, 64'd3, irq); m_set++;
    for (int i = 0; i < 64; i++) put(2'd2, 64'h3FFF_F000 + 64'(4 * i), 64'(32'h5BE0_0000 + i));
    for (int i = 0; i < 64; i++)
      send(i_get(2'd2, 9'd0), 64'h3FFF_F000 + 64'(4 * i), 0, 64'(32'h5BE0_0000 + i), 1);
    // words 64 bytes apart share a mapped set but stay separate lines
    get(2'd2, 64'h3FFF_F000, v); check(v == 64'(32'h5BE0_0000), "word 0 not aliased by word 16");
    get(2'd2, 64'h3FFF_F040, v); check(v == 64'(32'h5BE0_0010), "word 16 not aliased by word 0");
    special_nr(OPC_SET_REG, 64'd2, irq); m_set++;
    for (int i = 0; i < 64; i++)
      send(i_get(2'd2, 9'd0), 64'h3FFF_F000 + 64'(4 * i), 0, 64'(32'h428A_0000 + i), 1);
    while (exp_q.size() != 0) @(posedge clk);

    // ---- another process: no access, no reservation, no freeing
    cmd_prv = PRV_U;   // the check on Set PID is off in this configuration
    special_nr(OPC_SET_PID, 64'd7, irq); m_pid++;
    check(!irq, "set pid from user mode allowed when protection is off");
    special(OPC_INV_ERR, 0, 0, v); check(v == 0, "error code cleared by set pid");
    special(OPC_GET_OWNED, 0, 0, v); m_owned++; check(v == 0, "pid 7 owns nothing");
    get(2'd2, 64'h3FFF_F000, v); check(v == 0, "foreign region read refused");
    expect_error(ERR_BAD_LOCATION, "foreign region"); m_e_badloc++;
    special_nr(OPC_FREE_REG, 64'd3, irq); check(irq, "foreign free refused");
    expect_error(ERR_BAD_STRIPE, "foreign free"); m_e_badstripe++;
    special_nr(OPC_SET_PID, 64'd0, irq); m_pid++;
    cmd_prv = 2'd1;
    special_nr(OPC_FREE_REG, 64'd3, irq); m_free++; check(!irq, "owner frees region 3");
    special(OPC_GET_OWNED, 0, 0, v); m_owned++; check(v == 64'h3, "owned after free");
    call(i_rem(2'd2, 9'd0), 0, 64'h3FFF_F004, v); m_remove++;
    check(v == 64'h428A_0001, "region 2 data survives");

    // ---- stalled core: random response backpressure with pipelined traffic
    fork
      begin
        for (int i = 0; i < 400; i++) begin
          @(negedge clk);
          resp_ready = ($urandom_range(0, 3) == 0);
        end
        @(negedge clk) resp_ready = 1;
      end
      begin
        for (int i = 0; i < 200; i++) begin
          int a;
          a = $urandom_range(0, 63);
          if (a == 1) a = 2;
          send(i_get(2'd2, 9'd0), 64'h3FFF_F000 + 64'(4 * a), 0, 64'(32'h428A_0000 + a), 1);
          m_get++;
        end
      end
    join
    while (exp_q.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
    check(!busy, "idle at the end");

    // ---- mechanism coverage
    check(m_put > 0 && m_get > 0 && m_remove > 0, "data accesses");
    check(m_reserve > 0 && m_set > 0 && m_clear > 0 && m_free > 0, "region operations");
    check(m_lr > 0 && m_scok > 0 && m_scfail > 0, "atomics");
    check(m_e_space > 0 && m_e_unauth > 0 && m_e_stripes > 0 && m_e_badloc > 0 && m_e_badstripe > 0,
          "every error code");
    check(m_params > 0 && m_owned > 0 && m_pid > 0, "administrative instructions");
    check(n_irq > 0, "interrupt");
    check(n_lat1 > 0, "one-cycle response");
    check(n_stall > 0, "command held back by full response queue");
    $display("puts=%0d gets=%0d removes=%0d lr=%0d sc_ok=%0d sc_fail=%0d irq=%0d stalls=%0d lat1=%0d resp=%0d space_err=%0d",
             m_put, m_get, m_remove, m_lr, m_scok, m_scfail, n_irq, n_stall, n_lat1, n_resp, m_e_space);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// SHA-256 workload testbench of scratchpad_accelerator at its default size.
//
// The testbench plays a core running SHA-256 with both of its arrays held in
// the scratchpad: the 64 round constants in one 2-stripe region and the
// 64-word message schedule in a second 2-stripe region, both at the same
// stack-like addresses. Every read of K[t] or W[t] is a Get with the word
// offset in the instruction's immediate, from one base register; every
// write of W[t] is a Put the same way. The program switches between the two
// regions with Set Region before each array access. If the regions were not
// isolated, the schedule would overwrite the constants and the digests
// would be wrong.
//
// The round constants and initial hash values are not tabulated: they are
// computed here as the first 32 fraction bits of the cube roots (square
// roots) of the first 64 (8) primes, each refined with exact integer
// arithmetic. The digests of three standard messages ("", "abc" and the
// 56-byte two-block message) are compared with their published values.
//
// Counted mechanisms: region switches, offset-addressed Gets and Puts, and a
// check that the constants region is intact at the end.
module tb_scratchpad_sha256;
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
    repeat (200000) @(posedge clk);
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
  function automatic logic [31:0] i_spc(logic [3:0] opc, logic [4:0] f2, logic [2:0] xr);
    return {1'b1, 2'd0, opc, f2, 5'd1, xr, 5'd12, C0};
  endfunction

  // ------------------------------------------------------ core side
  logic [63:0] last_resp;
  int          n_resp = 0, n_irq = 0;
  always @(posedge clk) begin
    if (rst_n && resp_valid && resp_ready) begin
      last_resp <= resp_data;
      n_resp++;
    end
    if (rst_n && interrupt) n_irq++;
  end

  task automatic send(logic [31:0] inst, logic [63:0] rs1, logic [63:0] rs2);
    @(negedge clk);
    cmd_valid = 1; cmd_inst = inst; cmd_rs1 = rs1; cmd_rs2 = rs2;
    forever begin
      @(posedge clk);
      if (cmd_ready) break;
    end
    #1 cmd_valid = 0;
  endtask

  task automatic call(logic [31:0] inst, logic [63:0] rs1, logic [63:0] rs2, output logic [63:0] v);
    int n;
    n = n_resp;
    send(inst, rs1, rs2);
    while (n_resp == n) @(posedge clk);
    #1 v = last_resp;
  endtask

  // ------------------------------------------------------ program
  localparam logic [63:0] BASE = 64'h0000_7FFF_FFFF_FE00;  // same base in both regions
  localparam logic [63:0] R_K = 64'd2, R_W = 64'd3;         // region indices
  logic [63:0] cur_region = 0;
  int          n_switch = 0, n_get = 0, n_put = 0;

  task automatic use_region(logic [63:0] r);
    if (cur_region != r) begin
      send(i_spc(OPC_SET_REG, 5'd3, 3'b011), 0, r);
      cur_region = r;
      n_switch++;
    end
  endtask

  task automatic arr_put(logic [63:0] r, int idx, logic [31:0] val);
    use_region(r);
    send(i_put(2'd2, 9'(4 * idx)), 64'(val), BASE);
    n_put++;
  endtask

  task automatic arr_get(logic [63:0] r, int idx, output logic [31:0] val);
    logic [63:0] v;
    use_region(r);
    call(i_get(2'd2, 9'(4 * idx)), BASE, 0, v);
    check(v[63:32] == 0, "word read is zero-extended");
    val = v[31:0];
    n_get++;
  endtask

  // ------------------------------------------------------ constants
  // first 32 fraction bits of p^(1/k), exact by integer refinement
  function automatic logic [31:0] frac_root(int p, int k);
    logic [127:0] x, lim, pw;
    real r;
    r = $pow(real'(p), 1.0 / real'(k)) * 4294967296.0;
    x = 128'(longint'(r));
    lim = 128'(p) << (32 * k);
    for (int it = 0; it < 4; it++) begin
      pw = (k == 2) ? x * x : x * x * x;
      if (pw > lim) x = x - 1;
      pw = (k == 2) ? (x + 1) * (x + 1) : (x + 1) * (x + 1) * (x + 1);
      if (pw <= lim) x = x + 1;
    end
    return x[31:0];
  endfunction

  logic [31:0] Kc [64];
  logic [31:0] H0 [8];

  function automatic logic [31:0] rotr(logic [31:0] x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // ------------------------------------------------------ SHA-256
  task automatic sha256(input byte unsigned msg [$], output logic [255:0] digest);
    byte unsigned m [$];
    logic [31:0]  h [8];
    logic [31:0]  a, b, c, d, e, f, g, hh, t1, t2, w2, w7, w15, w16, s0, s1, kt, wt;
    logic [63:0]  bits;
    m = msg;
    bits = 64'(msg.size()) * 8;
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    for (int i = 7; i >= 0; i--) m.push_back(bits[8*i +: 8]);
    for (int i = 0; i < 8; i++) h[i] = H0[i];
    for (int blk = 0; blk < m.size() / 64; blk++) begin
      // message schedule, held in region R_W
      for (int t = 0; t < 16; t++)
        arr_put(R_W, t, {m[64*blk + 4*t], m[64*blk + 4*t + 1], m[64*blk + 4*t + 2], m[64*blk + 4*t + 3]});
      for (int t = 16; t < 64; t++) begin
        arr_get(R_W, t - 2, w2);
        arr_get(R_W, t - 7, w7);
        arr_get(R_W, t - 15, w15);
        arr_get(R_W, t - 16, w16);
        s0 = rotr(w15, 7) ^ rotr(w15, 18) ^ (w15 >> 3);
        s1 = rotr(w2, 17) ^ rotr(w2, 19) ^ (w2 >> 10);
        arr_put(R_W, t, w16 + s0 + w7 + s1);
      end
      // compression: K[t] from region R_K, W[t] from region R_W
      {a, b, c, d, e, f, g, hh} = {h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7]};
      for (int t = 0; t < 64; t++) begin
        arr_get(R_K, t, kt);
        arr_get(R_W, t, wt);
        t1 = hh + (rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25)) + ((e & f) ^ (~e & g)) + kt + wt;
        t2 = (rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
        hh = g; g = f; f = e; e = d + t1;
        d = c; c = b; b = a; a = t1 + t2;
      end
      h[0] += a; h[1] += b; h[2] += c; h[3] += d;
      h[4] += e; h[5] += f; h[6] += g; h[7] += hh;
    end
    digest = {h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7]};
  endtask

  function automatic void str_bytes(string s, ref byte unsigned q [$]);
    q.delete();
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
  endfunction

  initial begin
    int          primes [64];
    int          np, cand;
    bit          isp;
    logic [63:0] v;
    logic [31:0] w;
    logic [255:0] dg;
    byte unsigned msg [$];

    cmd_valid = 0; cmd_inst = 0; cmd_rs1 = 0; cmd_rs2 = 0; cmd_prv = PRV_U; resp_ready = 1;

    np = 0; cand = 2;
    while (np < 64) begin
      isp = 1;
      for (int q = 2; q * q <= cand; q++) if (cand % q == 0) isp = 0;
      if (isp) begin primes[np] = cand; np++; end
      cand++;
    end
    foreach (Kc[i]) Kc[i] = frac_root(primes[i], 3);
    foreach (H0[i]) H0[i] = frac_root(primes[i], 2);
    check(Kc[0] == 32'h428a2f98 && Kc[63] == 32'hc67178f2, "round constants computed");
    check(H0[0] == 32'h6a09e667 && H0[7] == 32'h5be0cd19, "initial hash computed");

    repeat (3) @(posedge clk);
    rst_n = 1;

    // two 2-stripe regions: 2 = stripes 0-1, 3 = stripes 2-3
    call(i_spc(OPC_RESERVE, 5'd2, 3'b100), 0, 0, v); check(v == R_K, "constants region");
    call(i_spc(OPC_RESERVE, 5'd2, 3'b100), 0, 0, v); check(v == R_W, "schedule region");

    for (int t = 0; t < 64; t++) arr_put(R_K, t, Kc[t]);

    str_bytes("abc", msg);
    sha256(msg, dg);
    check(dg == 256'hba7816bf_8f01cfea_414140de_5dae2223_b00361a3_96177a9c_b410ff61_f20015ad,
          $sformatf("sha256(abc) = %h", dg));
    str_bytes("", msg);
    sha256(msg, dg);
    check(dg == 256'he3b0c442_98fc1c14_9afbf4c8_996fb924_27ae41e4_649b934c_a495991b_7852b855,
          $sformatf("sha256('') = %h", dg));
    str_bytes("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", msg);
    sha256(msg, dg);
    check(dg == 256'h248d6a61_d20638b8_e5c02693_0c3e6039_a33ce459_64ff2167_f6ecedd4_19db06c1,
          $sformatf("sha256(448-bit message) = %h", dg));

    // the constants survived all schedule writes through the same addresses
    for (int t = 0; t < 64; t++) begin
      arr_get(R_K, t, w);
      check(w == Kc[t], $sformatf("K[%0d] intact", t));
    end

    repeat (3) @(posedge clk);
    check(n_irq == 0, "no accelerator error during the run");
    check(n_switch > 0, "region switches happened");
    check(n_get > 0 && n_put > 0, "offset-addressed accesses happened");
    $display("region switches=%0d gets=%0d puts=%0d cycles=%0d", n_switch, n_get, n_put, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

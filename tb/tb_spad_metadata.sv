// Self-checking testbench of spad_metadata.
//
// 16 sets, 8 ways, 8-byte lines, 4 stripes. A reference model keeps, per
// set, eight slots (in use, tag, byte-valid mask) and the load-reserved
// state, and predicts for every random operation the error code, the chosen
// way, the data enables and the Store Conditional outcome. Traffic is
// concentrated on two sets and twelve tags so that full sets (Out of Space),
// missing bytes (Bad Location Reference), line release by Remove,
// misalignment and reservation breaking all happen; a few region
// invalidations are mixed in. Counts of each outcome are checked at the end.
module tb_spad_metadata;
  import spad_pkg::*;

  localparam int SETS = 16, WAYS = 8, LB = 8, TAGB = 41, STRIPES = 4;

  logic            clk = 0, rst_n = 0;
  logic            op_valid;
  op_e             op;
  logic [3:0]      set;
  logic [TAGB-1:0] tag;
  logic [2:0]      boff;
  size_e           size;
  logic            inval_en;
  logic [3:0]      inval_mask;
  err_e            err;
  logic [2:0]      way;
  logic            data_en, data_we, sc_fail;
  int              checks = 0, failures = 0;
  int              n_space = 0, n_badloc = 0, n_scok = 0, n_scfail = 0, n_release = 0, n_hit_write = 0;

  spad_metadata #(.SETS(SETS), .WAYS(WAYS), .LINE_BYTES(LB), .TAG_BITS(TAGB), .STRIPES(STRIPES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  bit       m_used [SETS][WAYS];
  int       m_tag  [SETS][WAYS];
  bit [7:0] m_val  [SETS][WAYS];
  bit       r_live;
  int       r_set, r_tag;
  bit [7:0] r_mask;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: op=%s set=%0d tag=%0d boff=%0d size=%0d err=%s way=%0d en=%b we=%b scf=%b",
               what, op.name(), set, tag, boff, size, err.name(), way, data_en, data_we, sc_fail);
    end
  endtask

  initial begin
    op_valid = 0; op = OP_ILLEGAL; set = 0; tag = 0; boff = 0; size = SZ_BYTE;
    inval_en = 0; inval_mask = 0;
    foreach (m_used[s, w]) begin m_used[s][w] = 0; m_tag[s][w] = 0; m_val[s][w] = 0; end
    r_live = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int i = 0; i < 20000; i++) begin
      int       nbytes, hw, fw, pick;
      bit [7:0] bm;
      err_e     e_err;
      bit       e_en, e_we, e_scf;
      int       e_way;

      @(negedge clk);
      pick = $urandom_range(0, 99);
      if (pick < 2) begin
        // region invalidation of random stripes
        inval_mask = 4'($urandom);
        inval_en   = 1;
        op_valid   = 0;
        op         = OP_ILLEGAL;
        for (int s = 0; s < SETS; s++)
          if (inval_mask[s / 4]) for (int w = 0; w < WAYS; w++) begin
            m_used[s][w] = 0; m_val[s][w] = 0;
          end
        if (r_live && inval_mask[r_set / 4]) r_live = 0;
        @(negedge clk);
        inval_en = 0;
        continue;
      end
      op   = pick < 40 ? OP_PUT : pick < 65 ? OP_GET : pick < 80 ? OP_REMOVE :
             pick < 90 ? OP_LR : OP_SC;
      set  = ($urandom_range(0, 1) == 0) ? 4'd5 : 4'd12;
      tag  = TAGB'($urandom_range(0, 11)) | (TAGB'(1) << 40);
      size = size_e'($urandom_range(0, 3));
      nbytes = 1 << size;
      boff = 3'($urandom_range(0, 7));
      if ($urandom_range(0, 9) != 0) boff = 3'(boff & ~(nbytes - 1));   // mostly aligned
      bm = 8'(((1 << nbytes) - 1) << boff);

      // model prediction
      hw = -1; fw = -1;
      for (int w = WAYS - 1; w >= 0; w--) begin
        if (m_used[set][w] && m_tag[set][w] == int'(tag)) hw = w;
        if (!m_used[set][w]) fw = w;
      end
      e_err = ERR_NONE; e_en = 0; e_we = 0; e_scf = 0; e_way = -1;
      if (boff % nbytes != 0) e_err = ERR_BAD_LOCATION;
      else if (op inside {OP_GET, OP_REMOVE, OP_LR}) begin
        if (hw < 0 || (bm & ~m_val[set][hw]) != 0) e_err = ERR_BAD_LOCATION;
        else begin e_en = 1; e_way = hw; end
      end else if (op == OP_SC && !(r_live && r_set == set && r_tag == int'(tag) && (bm & ~r_mask) == 0)) begin
        e_scf = 1;
      end else begin
        if (hw < 0 && fw < 0) e_err = ERR_OUT_OF_SPACE;
        else begin e_en = 1; e_we = 1; e_way = (hw >= 0) ? hw : fw; end
      end

      op_valid = 1;
      #1;
      check(err == e_err, "error code");
      check(data_en == e_en && data_we == e_we, "data enables");
      check(sc_fail == e_scf, "sc outcome");
      if (e_en) check(int'(way) == e_way, "chosen way");

      // model update
      if (e_err == ERR_OUT_OF_SPACE) n_space++;
      if (e_err == ERR_BAD_LOCATION) n_badloc++;
      if (op == OP_SC && e_err == ERR_NONE) begin
        if (e_scf) n_scfail++; else n_scok++;
      end
      if (e_err == ERR_NONE) begin
        if (e_we) begin
          if (hw >= 0) n_hit_write++;
          m_used[set][e_way] = 1; m_tag[set][e_way] = int'(tag); m_val[set][e_way] |= bm;
        end else if (op == OP_REMOVE) begin
          m_val[set][e_way] &= ~bm;
          if (m_val[set][e_way] == 0) begin m_used[set][e_way] = 0; n_release++; end
        end
        if (op == OP_LR) begin r_live = 1; r_set = set; r_tag = int'(tag); r_mask = bm; end
        else if (op == OP_SC) r_live = 0;
        else if (op inside {OP_PUT, OP_REMOVE} && r_live && r_set == set && r_tag == int'(tag)) r_live = 0;
      end
      @(negedge clk);
      op_valid = 0;
      op = OP_ILLEGAL;
    end

    // every mechanism must have been exercised
    check(n_space > 0, "out of space seen");
    check(n_badloc > 0, "bad location seen");
    check(n_scok > 0, "sc success seen");
    check(n_scfail > 0, "sc failure seen");
    check(n_release > 0, "line release seen");
    check(n_hit_write > 0, "write to existing line seen");
    $display("space=%0d badloc=%0d scok=%0d scfail=%0d release=%0d", n_space, n_badloc, n_scok, n_scfail, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

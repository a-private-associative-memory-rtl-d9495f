// Self-checking testbench of spad_data.
//
// 16 sets, 8 ways, 8-byte lines. A byte array models the storage. Random
// aligned writes of 1, 2, 4 or 8 bytes and reads are issued, one request per
// cycle, back to back. Each read result is checked one cycle after its
// request (the RAM read latency) against the model, zero-extended to the
// access size, which also checks that writes leave the other bytes of the
// line untouched and that ways do not alias.
module tb_spad_data;
  import spad_pkg::*;

  localparam int SETS = 16, WAYS = 8, LB = 8;

  logic            clk = 0, rst_n = 0;
  logic            en, we;
  logic [2:0]      way;
  logic [3:0]      set;
  logic [2:0]      boff;
  size_e           size;
  logic [XLEN-1:0] wdata, rdata;
  int              checks = 0, failures = 0;

  spad_data #(.SETS(SETS), .WAYS(WAYS), .LINE_BYTES(LB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] mem [WAYS][SETS][LB];
  logic       pend;
  logic [63:0] expect_q;

  initial begin
    en = 0; we = 0; way = 0; set = 0; boff = 0; size = SZ_BYTE; wdata = 0; pend = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the whole storage so every read is defined
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) begin
        @(negedge clk);
        en = 1; we = 1; way = 3'(w); set = 4'(s); boff = 0; size = SZ_DOUBLE;
        wdata = {$urandom, $urandom};
        for (int b = 0; b < LB; b++) mem[w][s][b] = wdata[8*b +: 8];
      end
    for (int i = 0; i < 20000; i++) begin
      int n;
      @(negedge clk);
      // result of the read issued one cycle ago
      if (pend) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("FAIL read: got %h expected %h", rdata, expect_q);
        end
      end
      en   = ($urandom_range(0, 9) != 0);
      we   = ($urandom_range(0, 2) == 0);
      way  = 3'($urandom);
      set  = 4'($urandom);
      size = size_e'($urandom_range(0, 3));
      n    = 1 << size;
      boff = 3'($urandom_range(0, 7) & ~(n - 1));
      wdata = {$urandom, $urandom};
      pend = en && !we;
      if (en && we) begin
        for (int b = 0; b < n; b++) mem[way][set][boff + b] = wdata[8*b +: 8];
      end else if (en) begin
        expect_q = '0;
        for (int b = 0; b < n; b++) expect_q[8*b +: 8] = mem[way][set][boff + b];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

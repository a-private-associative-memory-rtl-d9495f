// Data unit: the storage of the scratchpad, one RAM per way.
//
// A write places the low 2**size bytes of wdata at byte offset boff of line
// `set` in way `way`, using a byte-write mask so the rest of the line is
// kept. A read uses the fact that each RAM reads its addressed line on every
// cycle it is not written: one cycle after the request, the line of the
// chosen way is shifted down by the byte offset and masked to the access size
// (zero-extended) to give rdata. Lines are little-endian: byte b of a line
// is bits 8b+7:8b.
//
// Taken from the design: one single-port RAM per way, byte write mask,
// one-cycle read latency, mask-and-shift of the read line by offset and size.
// Our own choices: little-endian byte order and zero extension of short
// reads.
//
// Timing: request signals are sampled on a clock edge; rdata is valid in the
// following cycle and holds until the next read request.
module spad_data
  import spad_pkg::*;
#(
  parameter int unsigned SETS       = 16,
  parameter int unsigned WAYS       = 8,
  parameter int unsigned LINE_BYTES = 8,
  localparam int unsigned SETB      = $clog2(SETS),
  localparam int unsigned WAYB      = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned OFFB      = $clog2(LINE_BYTES),
  localparam int unsigned LW        = 8 * LINE_BYTES
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,      // access this cycle
  input  logic            we,      // write (else read)
  input  logic [WAYB-1:0] way,
  input  logic [SETB-1:0] set,
  input  logic [OFFB-1:0] boff,
  input  size_e           size,
  input  logic [XLEN-1:0] wdata,
  output logic [XLEN-1:0] rdata
);

  logic [LINE_BYTES-1:0] be;
  logic [LW-1:0]         line_wdata;
  logic [LW-1:0]         q [WAYS];

  assign be         = LINE_BYTES'((1 << (1 << size)) - 1) << boff;
  assign line_wdata = LW'(wdata) << (8 * boff);

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    spad_way_ram #(.SETS(SETS), .LINE_BYTES(LINE_BYTES)) u_ram (
      .clk   (clk),
      .we    (en && we && way == WAYB'(w)),
      .be    (be),
      .addr  (set),
      .wdata (line_wdata),
      .q     (q[w])
    );
  end

  // read-side selection registered alongside the RAM read
  logic [WAYB-1:0] way_q;
  logic [OFFB-1:0] boff_q;
  size_e           size_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      way_q  <= '0;
      boff_q <= '0;
      size_q <= SZ_BYTE;
    end else if (en && !we) begin
      way_q  <= way;
      boff_q <= boff;
      size_q <= size;
    end
  end

  logic [LW-1:0]   shifted;
  logic [XLEN-1:0] size_mask;

  always_comb begin
    shifted   = q[way_q] >> (8 * boff_q);
    size_mask = (size_q == SZ_DOUBLE) ? '1 : ((XLEN'(1) << (8 << size_q)) - 1);
    rdata     = XLEN'(shifted) & size_mask;
  end

endmodule

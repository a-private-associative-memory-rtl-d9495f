// One way of scratchpad data storage: a single-port synchronous RAM.
//
// SETS lines of LINE_BYTES bytes. On a clock edge with we high the bytes
// selected by be are written at addr; on every other edge the line at addr
// is read and appears on q after the edge (read-first is irrelevant since a
// port never reads and writes in one cycle). This is the shape of an FPGA
// block RAM with a byte-write mask, which is what the design maps each way
// onto. Contents are not reset.
module spad_way_ram #(
  parameter int unsigned SETS       = 16,
  parameter int unsigned LINE_BYTES = 8,
  localparam int unsigned SETB      = $clog2(SETS)
)(
  input  logic                      clk,
  input  logic                      we,
  input  logic [LINE_BYTES-1:0]     be,
  input  logic [SETB-1:0]           addr,
  input  logic [8*LINE_BYTES-1:0]   wdata,
  output logic [8*LINE_BYTES-1:0]   q
);

  logic [8*LINE_BYTES-1:0] mem [SETS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < LINE_BYTES; b++)
        if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
    end else begin
      q <= mem[addr];
    end
  end

endmodule

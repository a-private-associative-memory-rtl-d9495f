// Metadata unit: the associative bookkeeping of the scratchpad.
//
// For every line (set, way) it keeps an in-use bit, a tag and one valid bit
// per byte. Software alone fills and empties the scratchpad, so the valid
// bits say exactly which bytes hold data. For each access all ways of the
// addressed set are searched at once:
//   Get / Load Reserved  - a line in use with a matching tag must hold valid
//                          bytes for the whole access, else Bad Location
//                          Reference.
//   Remove               - the same check; the bytes are then marked invalid
//                          and the line leaves use when no valid byte is left.
//   Put / Store Cond.    - the line with a matching tag is used if one is in
//                          use, else the lowest free way; with neither, Out
//                          of Space. The bytes are marked valid.
// Clear Region and Free Region invalidate every line of the sets in the given
// stripes. Accesses must be aligned to their size (Bad Location Reference).
//
// Load Reserved records the reserved line and its bytes and sets
// stillReserved. Any Put, Remove or invalidation touching that line, or a new
// Load Reserved, ends the reservation. Store Conditional writes only while
// stillReserved holds, the line matches and its bytes lie inside the
// reserved ones; it reports sc_fail otherwise and always ends the
// reservation. A failed Store Conditional is not an error.
//
// Taken from the design: the per-line fields, the checks, the error codes,
// the Remove and Clear/Free behaviour and the stillReserved register. Our own
// choices: lowest free way on a new write, the byte-subset rule for Store
// Conditional and the reservation ending after every Store Conditional.
//
// Timing: metadata is held in flip-flops and read combinationally, so the
// chosen way and the verdict are ready in the cycle the command is accepted;
// updates take effect on that clock edge when op_valid is high and err is
// ERR_NONE. The data unit uses way/data_en/data_we on the same edge.
module spad_metadata
  import spad_pkg::*;
#(
  parameter int unsigned SETS       = 16,
  parameter int unsigned WAYS       = 8,
  parameter int unsigned LINE_BYTES = 8,
  parameter int unsigned TAG_BITS   = 41,
  parameter int unsigned STRIPES    = 4,
  localparam int unsigned SETB      = $clog2(SETS),
  localparam int unsigned WAYB      = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned OFFB      = $clog2(LINE_BYTES)
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                op_valid,    // accepted and passed protection
  input  op_e                 op,
  input  logic [SETB-1:0]     set,
  input  logic [TAG_BITS-1:0] tag,
  input  logic [OFFB-1:0]     boff,
  input  size_e               size,
  input  logic                inval_en,
  input  logic [STRIPES-1:0]  inval_mask,
  output err_e                err,
  output logic [WAYB-1:0]     way,
  output logic                data_en,     // the data unit is accessed
  output logic                data_we,     // ... as a write
  output logic                sc_fail
);

  localparam int unsigned LOGS = $clog2(STRIPES);

  typedef struct packed {
    logic                  used;
    logic [TAG_BITS-1:0]   tag;
    logic [LINE_BYTES-1:0] valid;
  } line_meta_t;

  line_meta_t meta_q [SETS][WAYS];

  logic                  res_q;        // stillReserved
  logic [SETB-1:0]       res_set_q;
  logic [TAG_BITS-1:0]   res_tag_q;
  logic [LINE_BYTES-1:0] res_mask_q;

  // ------------------------------------------------------------ lookup
  logic [LINE_BYTES-1:0] mask;
  logic                  aligned;
  logic                  hit, free_found;
  logic [WAYB-1:0]       hit_way, free_way;
  logic                  sc_ok;
  logic                  same_line;

  always_comb begin
    mask    = LINE_BYTES'((1 << (1 << size)) - 1) << boff;
    aligned = (32'(boff) & ((32'd1 << size) - 1)) == 0;

    hit = 1'b0;  hit_way  = '0;
    free_found = 1'b0; free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (meta_q[set][w].used && meta_q[set][w].tag == tag) begin
        hit = 1'b1; hit_way = WAYB'(w);
      end
      if (!meta_q[set][w].used) begin
        free_found = 1'b1; free_way = WAYB'(w);
      end
    end

    same_line = res_q && res_set_q == set && res_tag_q == tag;
    sc_ok     = same_line && ((mask & ~res_mask_q) == '0);

    err     = ERR_NONE;
    way     = hit ? hit_way : free_way;
    data_en = 1'b0;
    data_we = 1'b0;
    sc_fail = 1'b0;
    if (is_access(op)) begin
      if (!aligned) begin
        err = ERR_BAD_LOCATION;
      end else if (is_read(op)) begin
        if (!hit || (mask & ~meta_q[set][hit_way].valid) != '0) err = ERR_BAD_LOCATION;
        else data_en = 1'b1;
      end else if (op == OP_SC && !sc_ok) begin
        sc_fail = 1'b1;
      end else begin
        if (!hit && !free_found) err = ERR_OUT_OF_SPACE;
        else begin data_en = 1'b1; data_we = 1'b1; end
      end
    end
  end

  function automatic logic set_in_stripes(int unsigned s, logic [STRIPES-1:0] m);
    return m[(s >> (SETB - LOGS)) % STRIPES];
  endfunction

  // ------------------------------------------------------------ update
  logic commit;
  assign commit = op_valid && err == ERR_NONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          meta_q[s][w] <= '0;
      res_q      <= 1'b0;
      res_set_q  <= '0;
      res_tag_q  <= '0;
      res_mask_q <= '0;
    end else begin
      if (commit && data_en) begin
        if (data_we) begin
          meta_q[set][way].used  <= 1'b1;
          meta_q[set][way].tag   <= tag;
          meta_q[set][way].valid <= meta_q[set][way].valid | mask;
        end else if (op == OP_REMOVE) begin
          meta_q[set][way].valid <= meta_q[set][way].valid & ~mask;
          if ((meta_q[set][way].valid & ~mask) == '0) meta_q[set][way].used <= 1'b0;
        end
      end
      if (inval_en) begin
        for (int s = 0; s < SETS; s++)
          if (set_in_stripes(s, inval_mask))
            for (int w = 0; w < WAYS; w++)
              meta_q[s][w] <= '0;
      end

      // reservation
      if (commit && op == OP_LR) begin
        res_q      <= 1'b1;
        res_set_q  <= set;
        res_tag_q  <= tag;
        res_mask_q <= mask;
      end else if (commit && op == OP_SC) begin
        res_q <= 1'b0;
      end else if (commit && same_line && op inside {OP_PUT, OP_REMOVE}) begin
        res_q <= 1'b0;
      end else if (inval_en && set_in_stripes(32'(res_set_q), inval_mask)) begin
        res_q <= 1'b0;
      end
    end
  end

endmodule

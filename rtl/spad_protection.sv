// Protection unit: stripes, regions, process identity and address mapping.
//
// The sets of the scratchpad are split into STRIPES equal stripes. A stripe
// table records for each stripe whether it is taken and by which PID. A
// program reserves a power-of-two number of stripes, aligned to its size, as
// a region and refers to it by a region index. The index is the node number
// of the region in a binary tree over the stripes: index = STRIPES/n + base/n
// for a region of n stripes starting at stripe base. Index 1 is the whole
// scratchpad and no region has index 0, so 0 can mean failure. From the
// index, the position p of its highest set bit is the Region Width (how many
// top stripe bits of a set index are replaced) and base is the Region Bits
// (lowest stripe of the region).
//
// Every data access has the top Region Width bits of the stripe field of its
// set index replaced by the same bits of Region Bits, so an address always
// lands inside the current region. The access is allowed only when a current
// region is set and all of its stripes are taken by the current PID;
// otherwise the access fails with Bad Location Reference.
//
// Region operations: Reserve (error Bad Stripe Reference if the count is not
// a power of two up to STRIPES, Out of Stripes if no aligned free block
// exists), Set, Clear and Free (Bad Stripe Reference unless the index names a
// region whose stripes are all taken by the current PID). Set PID is refused
// with Unauthorized Instruction from user mode when PROTECT is set.
//
// Taken from the design: the stripe table, region bits/width mapping, the
// checks and error codes, the privilege test on Set PID. Our own choices:
// the region-index numbering above, Reserve does not also select the region,
// Free of the current region deselects it, the PID is PID_BITS wide (upper
// register bits ignored), and Reserve takes the lowest-numbered free block.
//
// Timing: all checks and outputs are combinational on the operation of the
// current cycle; the state changes on the clock edge when op_valid is high
// and this unit reports no error.
module spad_protection
  import spad_pkg::*;
#(
  parameter int unsigned STRIPES  = 4,
  parameter int unsigned SETS     = 16,
  parameter int unsigned PID_BITS = 32,
  parameter bit          PROTECT  = 1'b0,
  localparam int unsigned SB      = (STRIPES > 1) ? $clog2(STRIPES) : 1,
  localparam int unsigned SETB    = $clog2(SETS),
  localparam int unsigned IDXB    = $clog2(2 * STRIPES)
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                op_valid,      // an operation is accepted this cycle
  input  op_e                 op,
  input  logic [4:0]          stripes_req,   // Reserve Region stripe count
  input  logic [XLEN-1:0]     arg,           // region index / new PID
  input  logic [1:0]          prv,           // privilege level of the instruction
  input  logic [SETB-1:0]     raw_set,       // set index of the access address
  output logic [SETB-1:0]     final_set,     // set index mapped into the region
  output err_e                err,
  output logic [XLEN-1:0]     rdata,         // region index or owned-stripe mask
  output logic                inval_en,      // Clear/Free: invalidate stripes
  output logic [STRIPES-1:0]  inval_mask
);

  localparam int unsigned LOGS = $clog2(STRIPES);

  typedef struct packed {
    logic                taken;
    logic [PID_BITS-1:0] pid;
  } stripe_t;

  stripe_t             table_q [STRIPES];
  logic [PID_BITS-1:0] pid_q;
  logic                region_valid_q;
  logic [IDXB-1:0]     region_idx_q;

  // ---------------------------------------------------------------- helpers
  // Stripes covered by a region index (0 if the index is not a region)
  function automatic logic [STRIPES-1:0] region_mask(logic [XLEN-1:0] idx);
    logic [STRIPES-1:0] m;
    m = '0;
    for (int p = 0; p <= LOGS; p++) begin
      for (int b = 0; b < (1 << p); b++) begin
        if (idx == XLEN'((1 << p) + b)) begin
          for (int s = 0; s < STRIPES; s++)
            if (s / (STRIPES >> p) == b) m[s] = 1'b1;
        end
      end
    end
    return m;
  endfunction

  logic [STRIPES-1:0] owned;     // taken by the current PID
  logic [STRIPES-1:0] free;

  always_comb begin
    for (int s = 0; s < STRIPES; s++) begin
      owned[s] = table_q[s].taken && (table_q[s].pid == pid_q);
      free[s]  = !table_q[s].taken;
    end
  end

  // ------------------------------------------------------- address mapping
  logic [STRIPES-1:0] cur_mask;
  logic [SB-1:0]      region_bits;   // lowest stripe of the current region
  logic [SB-1:0]      replace_mask;  // top Region Width bits of the stripe field
  int unsigned        region_width;

  always_comb begin
    cur_mask     = region_mask(XLEN'(region_idx_q));
    region_width = 0;
    for (int p = 0; p <= LOGS; p++)
      if (region_idx_q[p]) region_width = p;
    region_bits = '0;
    for (int s = STRIPES - 1; s >= 0; s--)
      if (cur_mask[s]) region_bits = SB'(s);
    replace_mask = '0;
    for (int i = 0; i < LOGS; i++)
      if (i >= LOGS - region_width) replace_mask[i] = 1'b1;
  end

  generate
    if (STRIPES > 1) begin : g_map
      logic [SB-1:0] raw_stripe;
      assign raw_stripe = raw_set[SETB-1 -: SB];
      if (SETB > SB) begin : g_low
        assign final_set = {(raw_stripe & ~replace_mask) | (region_bits & replace_mask),
                            raw_set[SETB-SB-1:0]};
      end else begin : g_nolow
        assign final_set = (raw_stripe & ~replace_mask) | (region_bits & replace_mask);
      end
    end else begin : g_nomap
      assign final_set = raw_set;
    end
  endgenerate

  // ----------------------------------------------------- operation checks
  logic [STRIPES-1:0] arg_mask;
  logic               arg_ok;
  logic               req_pow2;
  logic [STRIPES-1:0] alloc_mask;
  logic [STRIPES-1:0] blk_mask;
  logic [XLEN-1:0]    alloc_idx;
  logic               access_ok;

  always_comb begin
    arg_mask = region_mask(arg);
    arg_ok   = (arg_mask != '0) && ((arg_mask & ~owned) == '0);

    req_pow2 = 1'b0;
    for (int p = 0; p <= LOGS; p++)
      if (stripes_req == 5'(1 << p)) req_pow2 = 1'b1;

    // lowest aligned block of stripes_req free stripes
    alloc_mask = '0;
    alloc_idx  = '0;
    blk_mask   = '0;
    for (int p = LOGS; p >= 0; p--) begin
      if (stripes_req == 5'(STRIPES >> p)) begin
        for (int b = (1 << p) - 1; b >= 0; b--) begin
          blk_mask = region_mask(XLEN'((1 << p) + b));
          if ((blk_mask & ~free) == '0) begin
            alloc_mask = blk_mask;
            alloc_idx  = XLEN'((1 << p) + b);
          end
        end
      end
    end

    access_ok = region_valid_q && (cur_mask != '0) && ((cur_mask & ~owned) == '0);

    err   = ERR_NONE;
    rdata = '0;
    unique case (op)
      OP_PUT, OP_GET, OP_REMOVE, OP_LR, OP_SC:
        if (!access_ok) err = ERR_BAD_LOCATION;
      OP_RESERVE: begin
        if (!req_pow2)              err = ERR_BAD_STRIPE;
        else if (alloc_mask == '0)  err = ERR_OUT_OF_STRIPES;
        else                        rdata = alloc_idx;
      end
      OP_SET_REG, OP_CLEAR_REG, OP_FREE_REG:
        if (!arg_ok) err = ERR_BAD_STRIPE;
      OP_SET_PID:
        if (PROTECT && prv == PRV_U) err = ERR_UNAUTHORIZED;
      OP_GET_OWNED:
        rdata = XLEN'(owned);
      default: ;
    endcase

    inval_en   = op_valid && (err == ERR_NONE) && (op inside {OP_CLEAR_REG, OP_FREE_REG});
    inval_mask = arg_mask;
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < STRIPES; s++) table_q[s] <= '0;
      pid_q          <= '0;
      region_valid_q <= 1'b0;
      region_idx_q   <= '0;
    end else if (op_valid && err == ERR_NONE) begin
      unique case (op)
        OP_RESERVE:
          for (int s = 0; s < STRIPES; s++)
            if (alloc_mask[s]) table_q[s] <= '{taken: 1'b1, pid: pid_q};
        OP_SET_REG: begin
          region_valid_q <= 1'b1;
          region_idx_q   <= IDXB'(arg);
        end
        OP_FREE_REG: begin
          for (int s = 0; s < STRIPES; s++)
            if (arg_mask[s]) table_q[s] <= '0;
          if ((arg_mask & cur_mask) != '0) region_valid_q <= 1'b0;
        end
        OP_SET_PID:
          pid_q <= arg[PID_BITS-1:0];
        default: ;
      endcase
    end
  end

endmodule

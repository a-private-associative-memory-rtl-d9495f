// Scratchpad accelerator: a private, software-managed associative memory on
// the RoCC port of a RISC-V core.
//
// Software moves data in and out with Put, Get and Remove (1 to 8 bytes,
// address register plus a 9-bit offset), Load Reserved / Store Conditional,
// and manages protected regions of the storage with Reserve, Set, Clear and
// Free Region and Set PID. The storage is organised like a set-associative
// cache (TOTAL_BYTES in WAYS ways of LINE_BYTES-byte lines), but nothing is
// ever evicted: a line is filled only by a write and emptied only by Remove
// or a region clear, so every access takes the same time and data never
// leaves except on request. The tag of an address can hold a key, which
// makes one set a small hardware key-value store.
//
// Pipeline (two stages, one instruction accepted and one answered per cycle):
//   cycle 0  the command is accepted (cmd_valid && cmd_ready). The decoder
//            unpacks it; the protection unit checks it and maps the address
//            into the current region; the metadata unit finds the way and
//            checks the bytes; the error unit picks the first error. On the
//            clock edge ending the cycle all state updates take effect and
//            the data RAMs are written or read.
//   cycle 1  the read line is shifted and masked; the response (or 0 after
//            an error) goes to the core, directly or through the response
//            queue when the core is not ready. An error pulses interrupt.
// Back-to-back instructions need no forwarding: a write takes effect on the
// edge before the next instruction's read.
//
// Region mapping replaces the top set-index bits of an address with those of
// the current region. The replaced bits are kept as extra tag bits in the
// metadata, so two addresses that differ only in them stay distinct lines
// (they compete for the ways of one set instead of overwriting each other),
// and the original address can always be recovered from a line.
//
// Interface: a plain-signal version of RoCC. cmd_* carries the 32-bit
// instruction, both source register values and the privilege level of the
// instruction (from the core's status CSR); resp_* is ready/valid with the
// destination register and data; interrupt signals an accelerator error;
// busy is high while a response is still owed.
//
// Defaults are the configuration the accelerator was evaluated in: 1 KiB,
// 8-byte lines, 8 ways (16 sets), 48-bit addresses, 4 stripes, Set PID
// privilege check off. The Get Parameters word and the response queue depth
// are this design's own choices.
module scratchpad_accelerator
  import spad_pkg::*;
#(
  parameter int unsigned TOTAL_BYTES = 1024,
  parameter int unsigned LINE_BYTES  = 8,
  parameter int unsigned WAYS        = 8,
  parameter int unsigned ADDR_BITS   = 48,
  parameter bit          PROTECT     = 1'b0,
  parameter int unsigned STRIPES     = 4,
  parameter int unsigned PID_BITS    = 32,
  parameter int unsigned RESP_DEPTH  = 4
)(
  input  logic            clk,
  input  logic            rst_n,
  // command from the core
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  logic [31:0]     cmd_inst,
  input  logic [XLEN-1:0] cmd_rs1,
  input  logic [XLEN-1:0] cmd_rs2,
  input  logic [1:0]      cmd_prv,
  // response to the core
  output logic            resp_valid,
  input  logic            resp_ready,
  output logic [4:0]      resp_rd,
  output logic [XLEN-1:0] resp_data,
  output logic            interrupt,
  output logic            busy
);

  localparam int unsigned SETS     = TOTAL_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned SETB     = $clog2(SETS);
  localparam int unsigned OFFB     = $clog2(LINE_BYTES);
  localparam int unsigned TAG_BITS = ADDR_BITS - SETB - OFFB;
  localparam int unsigned LOGS     = $clog2(STRIPES);
  // the stripe bits that region mapping replaces are kept with the tag
  localparam int unsigned MTAG     = TAG_BITS + LOGS;
  localparam int unsigned WAYB     = (WAYS > 1) ? $clog2(WAYS) : 1;

  if (SETS < STRIPES || (SETS & (SETS - 1)) != 0 || (STRIPES & (STRIPES - 1)) != 0) begin : g_chk_shape
    $error("scratchpad_accelerator: sets and stripes must be powers of two, sets >= stripes");
  end
  if (STRIPES > 16 || ADDR_BITS > XLEN || LINE_BYTES < 8) begin : g_chk_range
    $error("scratchpad_accelerator: unsupported configuration");
  end

  localparam logic [XLEN-1:0] PARAM_WORD = {8'd0, 8'(STRIPES), 7'd0, PROTECT,
                                            8'(ADDR_BITS), 8'(WAYS), 8'(LINE_BYTES),
                                            16'(TOTAL_BYTES)};

  // ------------------------------------------------------------ stage 0
  logic fire;
  dec_t dec;

  assign fire = cmd_valid && cmd_ready;

  spad_decoder u_decoder (
    .inst     (rocc_inst_t'(cmd_inst)),
    .rs1_data (cmd_rs1),
    .rs2_data (cmd_rs2),
    .dec      (dec)
  );

  logic [ADDR_BITS-1:0] addr;
  logic [OFFB-1:0]      boff;
  logic [SETB-1:0]      raw_set, final_set;
  logic [TAG_BITS-1:0]  tag;
  logic [MTAG-1:0]      meta_tag;

  assign addr    = dec.addr[ADDR_BITS-1:0];
  assign boff    = addr[OFFB-1:0];
  assign raw_set = addr[OFFB +: SETB];
  assign tag     = addr[ADDR_BITS-1 -: TAG_BITS];

  if (LOGS > 0) begin : g_mtag
    assign meta_tag = {tag, raw_set[SETB-1 -: LOGS]};
  end else begin : g_mtag_plain
    assign meta_tag = tag;
  end

  err_e err_dec, err_prot, err_meta, err;
  logic resp_allowed;
  err_e last_err;

  assign err_dec = (dec.op == OP_ILLEGAL) ? ERR_UNAUTHORIZED : ERR_NONE;

  logic [XLEN-1:0]     prot_rdata;
  logic                inval_en;
  logic [STRIPES-1:0]  inval_mask;

  spad_protection #(
    .STRIPES (STRIPES), .SETS (SETS), .PID_BITS (PID_BITS), .PROTECT (PROTECT)
  ) u_protection (
    .clk         (clk),
    .rst_n       (rst_n),
    .op_valid    (fire && err_dec == ERR_NONE),
    .op          (dec.op),
    .stripes_req (dec.stripes),
    .arg         (dec.arg),
    .prv         (cmd_prv),
    .raw_set     (raw_set),
    .final_set   (final_set),
    .err         (err_prot),
    .rdata       (prot_rdata),
    .inval_en    (inval_en),
    .inval_mask  (inval_mask)
  );

  logic [WAYB-1:0] way;
  logic            data_en, data_we, sc_fail;

  spad_metadata #(
    .SETS (SETS), .WAYS (WAYS), .LINE_BYTES (LINE_BYTES),
    .TAG_BITS (MTAG), .STRIPES (STRIPES)
  ) u_metadata (
    .clk        (clk),
    .rst_n      (rst_n),
    .op_valid   (fire && err_dec == ERR_NONE && err_prot == ERR_NONE),
    .op         (dec.op),
    .set        (final_set),
    .tag        (meta_tag),
    .boff       (boff),
    .size       (dec.size),
    .inval_en   (inval_en),
    .inval_mask (inval_mask),
    .err        (err_meta),
    .way        (way),
    .data_en    (data_en),
    .data_we    (data_we),
    .sc_fail    (sc_fail)
  );

  spad_error u_error (
    .clk          (clk),
    .rst_n        (rst_n),
    .valid        (fire),
    .err_dec      (err_dec),
    .err_prot     (err_prot),
    .err_meta     (err_meta),
    .pid_changed  (fire && dec.op == OP_SET_PID && err == ERR_NONE),
    .err          (err),
    .resp_allowed (resp_allowed),
    .last_err     (last_err),
    .interrupt    (interrupt)
  );

  logic [XLEN-1:0] rdata;

  spad_data #(
    .SETS (SETS), .WAYS (WAYS), .LINE_BYTES (LINE_BYTES)
  ) u_data (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (fire && resp_allowed && data_en),
    .we    (data_we),
    .way   (way),
    .set   (final_set),
    .boff  (boff),
    .size  (dec.size),
    .wdata (dec.wdata),
    .rdata (rdata)
  );

  // immediate (non-RAM) result of the instruction
  logic [XLEN-1:0] imm_result;

  always_comb begin
    unique case (dec.op)
      OP_RESERVE, OP_GET_OWNED: imm_result = prot_rdata;
      OP_INV_ERR:               imm_result = XLEN'(last_err);
      OP_GET_PARAM:             imm_result = PARAM_WORD;
      OP_SC:                    imm_result = XLEN'(sc_fail);
      default:                  imm_result = '0;
    endcase
  end

  // ------------------------------------------------------------ stage 1
  logic            s1_valid, s1_from_ram;
  logic [4:0]      s1_rd;
  logic [XLEN-1:0] s1_data;
  logic            can_accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid    <= 1'b0;
      s1_from_ram <= 1'b0;
      s1_rd       <= '0;
      s1_data     <= '0;
    end else begin
      s1_valid    <= fire && dec.xd;
      s1_from_ram <= resp_allowed && is_read(dec.op);
      s1_rd       <= dec.rd;
      s1_data     <= resp_allowed ? imm_result : '0;
    end
  end

  spad_response #(.DEPTH (RESP_DEPTH)) u_response (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (s1_valid),
    .in_rd      (s1_rd),
    .in_data    (s1_from_ram ? rdata : s1_data),
    .can_accept (can_accept),
    .resp_valid (resp_valid),
    .resp_ready (resp_ready),
    .resp_rd    (resp_rd),
    .resp_data  (resp_data)
  );

  assign cmd_ready = can_accept;
  assign busy      = s1_valid || resp_valid;

endmodule

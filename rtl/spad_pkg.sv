// Shared types and constants of the scratchpad accelerator.
//
// The scratchpad is a software-managed, set-associative memory that sits on
// the RoCC (Rocket custom coprocessor) port of a RISC-V core and is driven by
// Custom0 instructions. This package holds what several modules need: the
// instruction layout, the decoded operation, the error codes and the access
// sizes.
//
// Taken from the design: the Custom0 field layout, the mode bit (bit 31), the
// size field (bits 30:29), the special-instruction opcodes (bits 28:25) and
// the six error codes with their numbers. Our own choices: the numbering of
// the internal op_e enumeration, the encoding of size (log2 of the byte
// count, as in RISC-V loads) and the 64-bit register width constant.
package spad_pkg;

  localparam int unsigned XLEN = 64;              // core register width

  localparam logic [6:0] CUSTOM0 = 7'b0001011;    // RISC-V custom-0 major opcode
  localparam logic [1:0] PRV_U   = 2'd0;          // user privilege level

  // Custom0 instruction: funct7 | rs2 | rs1 | xd xs1 xs2 | rd | opcode
  typedef struct packed {
    logic [6:0] funct;
    logic [4:0] rs2;
    logic [4:0] rs1;
    logic       xd;
    logic       xs1;
    logic       xs2;
    logic [4:0] rd;
    logic [6:0] opcode;
  } rocc_inst_t;

  // Special-instruction opcodes (funct[3:0], i.e. instruction bits 28:25)
  localparam logic [3:0] OPC_RESERVE   = 4'b0100;
  localparam logic [3:0] OPC_SET_REG   = 4'b0101;
  localparam logic [3:0] OPC_CLEAR_REG = 4'b0110;
  localparam logic [3:0] OPC_FREE_REG  = 4'b0111;
  localparam logic [3:0] OPC_SC        = 4'b1000;
  localparam logic [3:0] OPC_LR        = 4'b1001;
  localparam logic [3:0] OPC_INV_ERR   = 4'b1010;
  localparam logic [3:0] OPC_GET_PARAM = 4'b1011;
  localparam logic [3:0] OPC_GET_OWNED = 4'b1100;
  localparam logic [3:0] OPC_SET_PID   = 4'b1111;

  // Error codes returned by Investigate Error
  typedef enum logic [2:0] {
    ERR_NONE           = 3'd0,
    ERR_OUT_OF_SPACE   = 3'd1,
    ERR_UNAUTHORIZED   = 3'd2,
    ERR_OUT_OF_STRIPES = 3'd3,
    ERR_BAD_LOCATION   = 3'd4,
    ERR_BAD_STRIPE     = 3'd5
  } err_e;

  // Access size: the access covers 2**size bytes
  typedef enum logic [1:0] {
    SZ_BYTE   = 2'd0,
    SZ_HALF   = 2'd1,
    SZ_WORD   = 2'd2,
    SZ_DOUBLE = 2'd3
  } size_e;

  typedef enum logic [3:0] {
    OP_ILLEGAL   = 4'd0,
    OP_PUT       = 4'd1,
    OP_GET       = 4'd2,
    OP_REMOVE    = 4'd3,
    OP_RESERVE   = 4'd4,
    OP_SET_REG   = 4'd5,
    OP_CLEAR_REG = 4'd6,
    OP_FREE_REG  = 4'd7,
    OP_LR        = 4'd8,
    OP_SC        = 4'd9,
    OP_INV_ERR   = 4'd10,
    OP_GET_PARAM = 4'd11,
    OP_GET_OWNED = 4'd12,
    OP_SET_PID   = 4'd13
  } op_e;

  // Everything the decoder hands to the rest of the accelerator
  typedef struct packed {
    op_e              op;
    size_e            size;
    logic [8:0]       offset;   // reassembled 9-bit immediate offset
    logic [XLEN-1:0]  addr;     // base register + offset
    logic [XLEN-1:0]  wdata;    // value register of Put / Store Conditional
    logic [XLEN-1:0]  arg;      // region index or PID register
    logic [4:0]       stripes;  // stripe count immediate of Reserve Region
    logic             xd;       // a response is expected
    logic [4:0]       rd;       // destination register
  } dec_t;

  function automatic bit is_access(op_e op);
    return op inside {OP_PUT, OP_GET, OP_REMOVE, OP_LR, OP_SC};
  endfunction

  function automatic bit is_read(op_e op);
    return op inside {OP_GET, OP_REMOVE, OP_LR};
  endfunction

  function automatic bit is_write(op_e op);
    return op inside {OP_PUT, OP_SC};
  endfunction

endpackage

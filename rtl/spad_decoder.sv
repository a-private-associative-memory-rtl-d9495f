// Instruction decoder of the scratchpad accelerator.
//
// Turns one Custom0 instruction and its two source-register values into a
// dec_t record. Bit 31 (mode) separates the three access instructions from
// the special ones. Accesses are told apart by the xd/xs1/xs2 bits:
// 011 Put, 110 Get, 111 Remove. Special instructions are told apart by the
// four opcode bits 28:25. The 9-bit offset of an access is split across the
// instruction: bits 28:25 always give offset[8:5], and offset[4:0] sits in
// whichever register field that instruction leaves free (rd for Put, rs2 for
// Get, rs1 for Remove). The access address is the address register plus the
// offset.
//
// Register use follows the instruction table of the design: Put and Store
// Conditional take the value in rs1 and the address in rs2; Get and Load
// Reserved take the address in rs1; Remove takes it in rs2. Our own choices:
// the region index of Set/Clear/Free Region and the new PID of Set PID are
// read from rs2. Any other xregister pattern in an access, an unknown
// special opcode or a major opcode other than Custom0 decodes to OP_ILLEGAL.
// The offset is unsigned and is added without sign extension.
//
// Purely combinational; the enclosing pipeline samples the result on the
// clock edge that accepts the command.
module spad_decoder
  import spad_pkg::*;
(
  input  rocc_inst_t      inst,
  input  logic [XLEN-1:0] rs1_data,
  input  logic [XLEN-1:0] rs2_data,
  output dec_t            dec
);

  logic            mode;
  logic [2:0]      xregs;
  logic [3:0]      opcode;
  logic [4:0]      off_lo;
  logic [XLEN-1:0] base;

  assign mode   = inst.funct[6];
  assign opcode = inst.funct[3:0];
  assign xregs  = {inst.xd, inst.xs1, inst.xs2};

  always_comb begin
    dec         = '0;
    dec.size    = size_e'(inst.funct[5:4]);
    dec.xd      = inst.xd;
    dec.rd      = inst.rd;
    dec.stripes = inst.rs2;
    dec.arg     = rs2_data;
    dec.wdata   = rs1_data;
    off_lo      = '0;
    base        = rs1_data;
    dec.op      = OP_ILLEGAL;

    if (inst.opcode == CUSTOM0) begin
      if (!mode) begin
        unique case (xregs)
          3'b011: begin dec.op = OP_PUT;    off_lo = inst.rd;  base = rs2_data; end
          3'b110: begin dec.op = OP_GET;    off_lo = inst.rs2; base = rs1_data; end
          3'b111: begin dec.op = OP_REMOVE; off_lo = inst.rs1; base = rs2_data; end
          default: dec.op = OP_ILLEGAL;
        endcase
        dec.offset = {opcode, off_lo};
      end else begin
        unique case (opcode)
          OPC_RESERVE:   dec.op = OP_RESERVE;
          OPC_SET_REG:   dec.op = OP_SET_REG;
          OPC_CLEAR_REG: dec.op = OP_CLEAR_REG;
          OPC_FREE_REG:  dec.op = OP_FREE_REG;
          OPC_LR:        begin dec.op = OP_LR; base = rs1_data; end
          OPC_SC:        begin dec.op = OP_SC; base = rs2_data; end
          OPC_INV_ERR:   dec.op = OP_INV_ERR;
          OPC_GET_PARAM: dec.op = OP_GET_PARAM;
          OPC_GET_OWNED: dec.op = OP_GET_OWNED;
          OPC_SET_PID:   dec.op = OP_SET_PID;
          default:       dec.op = OP_ILLEGAL;
        endcase
      end
    end
    dec.addr = base + XLEN'(dec.offset);
  end

endmodule

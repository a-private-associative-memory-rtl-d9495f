// Self-checking testbench of spad_decoder.
//
// Builds every instruction form from the field layout of the instruction set
// (independently of the decoder), with random offsets, register fields and
// register values, and checks the decoded operation, size, reassembled
// offset, address, write value, argument and stripe count. Also checks that
// undefined forms decode as illegal. The decoder is combinational; a
// watchdog ends the run if it hangs.
module tb_spad_decoder;
  import spad_pkg::*;

  logic [31:0]     inst;
  logic [XLEN-1:0] rs1, rs2;
  dec_t            dec;
  int              checks = 0, failures = 0;

  spad_decoder dut (.inst(rocc_inst_t'(inst)), .rs1_data(rs1), .rs2_data(rs2), .dec(dec));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: inst=%h op=%s off=%0d addr=%h", what, inst, dec.op.name(), dec.offset, dec.addr);
    end
  endtask

  // access form: mode 0 | size | off[8:5] | f24_20 | f19_15 | xregs | f11_7 | custom0
  function automatic logic [31:0] acc(logic [1:0] sz, logic [3:0] hi, logic [4:0] f2,
                                      logic [4:0] f1, logic [2:0] xr, logic [4:0] f0);
    return {1'b0, sz, hi, f2, f1, xr, f0, 7'b0001011};
  endfunction
  function automatic logic [31:0] spc(logic [1:0] sz, logic [3:0] opc, logic [4:0] f2,
                                      logic [4:0] f1, logic [2:0] xr, logic [4:0] f0);
    return {1'b1, sz, opc, f2, f1, xr, f0, 7'b0001011};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [8:0]  off;
      logic [1:0]  sz;
      logic [4:0]  r;
      off = 9'($urandom);
      sz  = 2'($urandom);
      r   = 5'($urandom);
      rs1 = {$urandom, $urandom};
      rs2 = {$urandom, $urandom};

      // Put: value in rs1, address in rs2, offset low bits in the rd field
      inst = acc(sz, off[8:5], r, 5'($urandom), 3'b011, off[4:0]); #1;
      check(dec.op == OP_PUT && dec.size == size_e'(sz) && dec.offset == off, "put fields");
      check(dec.addr == rs2 + 64'(off) && dec.wdata == rs1 && !dec.xd, "put addr/data");

      // Get: address in rs1, offset low bits in rs2 field, result to rd
      inst = acc(sz, off[8:5], off[4:0], 5'($urandom), 3'b110, r); #1;
      check(dec.op == OP_GET && dec.offset == off && dec.addr == rs1 + 64'(off), "get");
      check(dec.xd && dec.rd == r, "get rd");

      // Remove: address in rs2, offset low bits in rs1 field
      inst = acc(sz, off[8:5], 5'($urandom), off[4:0], 3'b111, r); #1;
      check(dec.op == OP_REMOVE && dec.offset == off && dec.addr == rs2 + 64'(off), "remove");
      check(dec.rd == r && dec.xd, "remove rd");

      // Load Reserved: address in rs1
      inst = spc(sz, 4'b1001, 5'd0, 5'($urandom), 3'b110, r); #1;
      check(dec.op == OP_LR && dec.addr == rs1 && dec.size == size_e'(sz), "lr");
      // Store Conditional: value in rs1, address in rs2
      inst = spc(sz, 4'b1000, 5'($urandom), 5'($urandom), 3'b111, r); #1;
      check(dec.op == OP_SC && dec.addr == rs2 && dec.wdata == rs1 && dec.rd == r, "sc");

      // Reserve Region: stripe count immediate in bits 24:20
      inst = spc(2'b00, 4'b0100, r, 5'd0, 3'b100, 5'd3); #1;
      check(dec.op == OP_RESERVE && dec.stripes == r && dec.rd == 5'd3, "reserve");
      // region and PID operations take their argument from rs2
      inst = spc(2'b00, 4'b0101, 5'($urandom), 5'($urandom), 3'b011, 5'd0); #1;
      check(dec.op == OP_SET_REG && dec.arg == rs2, "set region");
      inst = spc(2'b00, 4'b0110, 5'($urandom), 5'($urandom), 3'b011, 5'd0); #1;
      check(dec.op == OP_CLEAR_REG && dec.arg == rs2, "clear region");
      inst = spc(2'b00, 4'b0111, 5'($urandom), 5'($urandom), 3'b011, 5'd0); #1;
      check(dec.op == OP_FREE_REG && dec.arg == rs2, "free region");
      inst = spc(2'b00, 4'b1111, 5'($urandom), 5'($urandom), 3'b011, 5'd0); #1;
      check(dec.op == OP_SET_PID && dec.arg == rs2 && !dec.xd, "set pid");
      inst = spc(2'b00, 4'b1010, 5'd0, 5'd0, 3'b100, r); #1;
      check(dec.op == OP_INV_ERR && dec.rd == r, "investigate error");
      inst = spc(2'b00, 4'b1011, 5'd0, 5'd0, 3'b100, r); #1;
      check(dec.op == OP_GET_PARAM, "get parameters");
      inst = spc(2'b00, 4'b1100, 5'd0, 5'd0, 3'b100, r); #1;
      check(dec.op == OP_GET_OWNED, "get owned");

      // undefined forms
      inst = acc(sz, off[8:5], r, r, 3'b010, r); #1;
      check(dec.op == OP_ILLEGAL, "access xregs 010");
      inst = spc(sz, 4'b0001 + 4'($urandom_range(0, 2)), r, r, 3'b100, r); #1;
      check(dec.op == OP_ILLEGAL, "special opcode 0001..0011");
      inst = spc(sz, 4'b1101 + 4'($urandom_range(0, 1)), r, r, 3'b100, r); #1;
      check(dec.op == OP_ILLEGAL, "special opcode 1101/1110");
      inst = acc(sz, off[8:5], r, r, 3'b011, r) ^ 32'h0000_0020; #1;
      check(dec.op == OP_ILLEGAL, "not custom0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

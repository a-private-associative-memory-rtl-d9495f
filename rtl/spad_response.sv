// Response unit: queue of responses waiting for the core.
//
// The accelerator accepts a new command every cycle, but the core may not
// take a response every cycle. Responses therefore enter a DEPTH-entry FIFO.
// When the FIFO is empty a new response is passed straight to the core in
// the cycle it arrives, so an unstalled core sees no extra delay; it is
// queued only if the core is not ready. can_accept tells the front of the
// pipeline whether one more instruction may be accepted: the queue must have
// room for the response already in flight and for the new one.
//
// Taken from the design: a queue of waiting responses so that pipelined
// instructions are never lost when the core stalls. Our own choices: the
// depth (4), the bypass when empty and the acceptance rule.
//
// Interface: in_valid/in_rd/in_data present one response for one cycle
// (no backpressure: can_accept guarantees space). resp_* is a ready/valid
// port; a response, once valid, holds until it is taken.
module spad_response
  import spad_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned CNTB = $clog2(DEPTH + 1),
  localparam int unsigned PTRB = (DEPTH > 1) ? $clog2(DEPTH) : 1
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [4:0]      in_rd,
  input  logic [XLEN-1:0] in_data,
  output logic            can_accept,
  output logic            resp_valid,
  input  logic            resp_ready,
  output logic [4:0]      resp_rd,
  output logic [XLEN-1:0] resp_data
);

  typedef struct packed {
    logic [4:0]      rd;
    logic [XLEN-1:0] data;
  } resp_t;

  resp_t           fifo_q [DEPTH];
  logic [PTRB-1:0] rd_ptr_q, wr_ptr_q;
  logic [CNTB-1:0] count_q;
  logic            empty, bypass, push, pop;

  assign empty      = (count_q == '0);
  assign bypass     = empty && in_valid && resp_ready;
  assign push       = in_valid && !bypass;
  assign pop        = !empty && resp_ready;

  assign resp_valid = !empty || in_valid;
  assign resp_rd    = empty ? in_rd   : fifo_q[rd_ptr_q].rd;
  assign resp_data  = empty ? in_data : fifo_q[rd_ptr_q].data;
  assign can_accept = (32'(count_q) + 32'(in_valid)) < DEPTH;

  function automatic logic [PTRB-1:0] next_ptr(logic [PTRB-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      count_q  <= '0;
    end else begin
      if (push) begin
        fifo_q[wr_ptr_q] <= '{rd: in_rd, data: in_data};
        wr_ptr_q         <= next_ptr(wr_ptr_q);
      end
      if (pop) rd_ptr_q <= next_ptr(rd_ptr_q);
      count_q <= count_q + CNTB'(push) - CNTB'(pop);
    end
  end

  // a response the core has not taken stays valid and unchanged
  a_resp_hold: assert property (@(posedge clk) disable iff (!rst_n)
      resp_valid && !resp_ready |=> resp_valid && $stable(resp_data) && $stable(resp_rd));
  // the queue never overflows
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(push && !pop && 32'(count_q) == DEPTH));

endmodule

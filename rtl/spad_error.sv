// Error unit: decides whether an instruction may answer, and reports errors.
//
// Every unit that vets an instruction offers an error code: the decoder
// (an illegal instruction is reported as Unauthorized Instruction), the
// protection unit and the metadata unit, in that order of priority, which is
// the order an instruction passes through them. When any of them reports an
// error the instruction makes no change, resp_allowed drops so the response
// carries 0 instead of data, the code is stored for Investigate Error, and
// an interrupt is raised to the core.
//
// Taken from the design: the codes, zero response on error, the stored
// latest error and the interrupt. Our own choices: the interrupt is a
// one-cycle pulse in the cycle after the erring instruction is accepted
// (when its response would appear), the stored code starts as No Error and
// returns to No Error when a new PID is set, so a process does not read the
// error of the one before it.
//
// Timing: err and resp_allowed are combinational; last_err and interrupt are
// registered.
module spad_error
  import spad_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid,        // an instruction is accepted this cycle
  input  err_e err_dec,
  input  err_e err_prot,
  input  err_e err_meta,
  input  logic pid_changed,  // a Set PID commits this cycle
  output err_e err,
  output logic resp_allowed,
  output err_e last_err,
  output logic interrupt
);

  always_comb begin
    if (err_dec != ERR_NONE)       err = err_dec;
    else if (err_prot != ERR_NONE) err = err_prot;
    else                           err = err_meta;
  end

  assign resp_allowed = (err == ERR_NONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_err  <= ERR_NONE;
      interrupt <= 1'b0;
    end else begin
      interrupt <= valid && err != ERR_NONE;
      if (valid && err != ERR_NONE) last_err <= err;
      else if (pid_changed)         last_err <= ERR_NONE;
    end
  end

endmodule

// Self-checking testbench of spad_error.
//
// Checks the priority of the three error sources (decoder before protection
// before metadata), that resp_allowed drops exactly when an error is
// reported, that the latest error is stored and kept by error-free
// instructions, that a Set PID returns it to No Error, and that interrupt
// pulses for one cycle, the cycle after the erring instruction.
module tb_spad_error;
  import spad_pkg::*;

  logic clk = 0, rst_n = 0;
  logic valid, pid_changed;
  err_e err_dec, err_prot, err_meta, err, last_err;
  logic resp_allowed, interrupt;
  int   checks = 0, failures = 0;

  spad_error dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: err=%s last=%s irq=%b allowed=%b", what, err.name(), last_err.name(), interrupt, resp_allowed);
    end
  endtask

  function automatic err_e rnd_err();
    return ($urandom_range(0, 2) == 0) ? err_e'($urandom_range(1, 5)) : ERR_NONE;
  endfunction

  initial begin
    err_e exp_last;
    valid = 0; pid_changed = 0; err_dec = ERR_NONE; err_prot = ERR_NONE; err_meta = ERR_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(last_err == ERR_NONE && !interrupt, "reset state");
    exp_last = ERR_NONE;
    for (int i = 0; i < 2000; i++) begin
      err_e e;
      bit   v, pc;
      @(negedge clk);
      v = $urandom_range(0, 3) != 0;
      err_dec = rnd_err(); err_prot = rnd_err(); err_meta = rnd_err();
      e = (err_dec != ERR_NONE) ? err_dec : (err_prot != ERR_NONE) ? err_prot : err_meta;
      pc = v && e == ERR_NONE && $urandom_range(0, 4) == 0;
      valid = v; pid_changed = pc;
      #1;
      check(err == e, "priority");
      check(resp_allowed == (e == ERR_NONE), "resp allowed");
      @(posedge clk); #1;
      check(interrupt == (v && e != ERR_NONE), "interrupt pulse");
      if (v && e != ERR_NONE) exp_last = e;
      else if (pc) exp_last = ERR_NONE;
      check(last_err == exp_last, "latest error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

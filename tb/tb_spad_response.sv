// Self-checking testbench of spad_response.
//
// A producer offers one response per cycle whenever can_accept allows it
// (the rule the accelerator front end follows); the consumer is ready on a
// random subset of cycles. Every response must come out once, in order,
// with its register number and data. The test also checks that with the
// consumer always ready a response leaves in the cycle it arrives (bypass),
// and that the queue really fills and holds the producer back.
module tb_spad_response;
  import spad_pkg::*;

  localparam int DEPTH = 4;

  logic            clk = 0, rst_n = 0;
  logic            in_valid, can_accept, resp_valid, resp_ready;
  logic [4:0]      in_rd, resp_rd;
  logic [XLEN-1:0] in_data, resp_data;
  int              checks = 0, failures = 0;

  spad_response #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [68:0] sent [$];
  int n_in = 0, n_out = 0, n_bypass = 0, n_held = 0;
  logic accepted;   // an instruction was accepted last cycle: its response arrives now

  initial begin
    in_valid = 0; in_rd = 0; in_data = 0; resp_ready = 0; accepted = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // phase 1: always ready; phase 2: random stalls
      resp_ready = (i < 2000) ? 1'b1 : ($urandom_range(0, 2) == 0);
      in_valid = accepted;
      in_rd    = 5'($urandom);
      in_data  = {$urandom, $urandom};
      if (in_valid) begin sent.push_back({in_rd, in_data}); n_in++; end
      #1;
      if (i < 2000 && in_valid) begin
        checks++;
        if (!(resp_valid && resp_rd == in_rd && resp_data == in_data)) begin
          failures++; $display("FAIL bypass at %0d", i);
        end else n_bypass++;
      end
      if (resp_valid && resp_ready) begin
        logic [68:0] e;
        checks++;
        e = sent.pop_front();
        if ({resp_rd, resp_data} != e) begin
          failures++; $display("FAIL order: got %h expected %h", {resp_rd, resp_data}, e);
        end
        n_out++;
      end
      // the front end accepts a new instruction only when can_accept
      if (!can_accept) n_held++;
      accepted = can_accept && ($urandom_range(0, 3) != 0);
    end
    @(negedge clk);
    in_valid = 0; resp_ready = 1;
    repeat (DEPTH + 2) begin
      #1;
      if (resp_valid) begin
        logic [68:0] e;
        checks++;
        e = sent.pop_front();
        if ({resp_rd, resp_data} != e) begin failures++; $display("FAIL drain"); end
        n_out++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_out != n_in || sent.size() != 0) begin failures++; $display("FAIL count in=%0d out=%0d", n_in, n_out); end
    checks++;
    if (n_held == 0 || n_bypass == 0) begin failures++; $display("FAIL coverage held=%0d bypass=%0d", n_held, n_bypass); end
    $display("in=%0d out=%0d bypass=%0d held=%0d", n_in, n_out, n_bypass, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

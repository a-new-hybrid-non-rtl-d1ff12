// tb_hm_timeout: self-checking testbench for hm_timeout (TIMEOUT = 20).
//
// A time tag counts up every cycle. Instructions are traced at gaps of up to
// TIMEOUT cycles, which must not raise timeout_o; then the processor stalls
// and timeout_o must rise exactly when the tag is TIMEOUT+1 past the last
// instruction (plus one register cycle), and fall at the next instruction. A
// frozen time tag (halted processor) must never time out, the tag may wrap,
// and check_en low must disarm the check.
module tb_hm_timeout;
  import hm_pkg::*;

  localparam int unsigned TO = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              check_en = 0, trace_valid = 0, timeout_o;
  logic [TTAG_W-1:0] trace_ttag = '0, now_ttag = TTAG_W'(32'h3FFF_FF00);
  logic              run = 1;

  int checks = 0, failures = 0;

  hm_timeout #(.TIMEOUT(TO)) dut (.*);

  always @(posedge clk) if (run) now_ttag <= now_ttag + TTAG_W'(1);

  task automatic instr();
    @(negedge clk);
    trace_valid = 1; trace_ttag = now_ttag;
    @(negedge clk);
    trace_valid = 0;
  endtask

  initial begin
    int rise;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check_en = 1;
    // instructions with gaps up to the limit: no timeout (tag wraps here)
    for (int i = 0; i < 40; i++) begin
      instr();
      repeat ($urandom % (TO - 2)) begin
        @(negedge clk);
        checks++;
        if (timeout_o) begin failures++; $display("FAIL: early timeout"); end
      end
    end
    // stall: measure when the timeout rises
    instr();
    rise = -1;
    for (int c = 0; c < 3 * TO; c++) begin
      @(negedge clk);
      if (timeout_o && rise < 0) rise = c;
    end
    checks++;
    // last tag L at the instruction's edge; elapsed > TO first at c = TO,
    // seen by the register one edge later.
    if (rise != TO) begin failures++; $display("FAIL: timeout after %0d cycles", rise); end
    instr();
    checks++;
    if (timeout_o) begin failures++; $display("FAIL: timeout not cleared"); end
    // halted processor: frozen time tag
    run = 0;
    repeat (5 * TO) @(negedge clk);
    checks++;
    if (timeout_o) begin failures++; $display("FAIL: timeout while halted"); end
    run = 1;
    // check disabled
    check_en = 0;
    repeat (3 * TO) @(negedge clk);
    checks++;
    if (timeout_o) begin failures++; $display("FAIL: timeout while disabled"); end
    check_en = 1;
    repeat (TO + 5) @(negedge clk);
    checks++;
    if (!timeout_o) begin failures++; $display("FAIL: no timeout after re-enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

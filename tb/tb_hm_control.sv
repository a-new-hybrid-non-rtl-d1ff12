// tb_hm_control: self-checking testbench for hm_control (SYNC_INSTR = 7).
//
// Walks the controller through its sequence: idle (buffer flushed, checks
// off), synchronisation (checks on except the comparison, which is enabled
// after exactly 7 traced instructions), monitoring, latching of each check
// output into error/cause, holding the error while flags return to zero,
// clear (back to synchronisation with a flush), several flags at once, and
// disable.
module tb_hm_control;
  import hm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   enable = 0, clear = 0, trace_valid = 0;
  cause_t flags = '0;
  logic   flush, check_en, compare_en, error, synced_o;
  cause_t cause;

  int checks = 0, failures = 0;
  int n_synced = 0;

  hm_control #(.SYNC_INSTR(7)) dut (.*);

  task automatic expect_out(input string what, input bit fl, input bit ce, input bit cmp,
                            input bit err, input cause_t c);
    checks++;
    if (flush != fl || check_en != ce || compare_en != cmp || error != err || cause != c) begin
      failures++;
      $display("FAIL %s: flush=%b check_en=%b compare_en=%b error=%b cause=%b", what,
               flush, check_en, compare_en, error, cause);
    end
  endtask

  task automatic cyc(); @(negedge clk); endtask

  task automatic sync7();
    for (int i = 0; i < 7; i++) begin
      trace_valid = 1; cyc(); trace_valid = 0;
      if (i < 6) expect_out("sync", 0, 1, 0, 0, '0);
      cyc();
    end
    expect_out("monitor", 0, 1, 1, 0, '0);
  endtask

  initial begin
    cause_t one;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc();
    expect_out("idle", 1, 0, 0, 0, '0);
    enable = 1; cyc();
    expect_out("sync first", 1, 1, 0, 0, '0);
    cyc();
    expect_out("sync", 0, 1, 0, 0, '0);
    sync7();
    // each check alone
    for (int b = 0; b < 4; b++) begin
      one = cause_t'(4'b1 << b);
      flags = one; cyc(); flags = '0;
      expect_out("error", 0, 0, 0, 1, one);
      repeat (3) cyc();
      expect_out("error held", 0, 0, 0, 1, one);
      clear = 1; cyc(); clear = 0;
      expect_out("after clear", 1, 1, 0, 0, '0);
      cyc();
      sync7();
    end
    // two at once
    flags = '{trap: 1'b1, timeout: 1'b0, predict: 1'b1, compare: 1'b0}; cyc(); flags = '0;
    expect_out("two", 0, 0, 0, 1, cause_t'(4'b1010));
    // a flag during synchronisation is also an error
    clear = 1; cyc(); clear = 0; cyc();
    flags.timeout = 1; cyc(); flags = '0;
    expect_out("sync error", 0, 0, 0, 1, cause_t'(4'b0100));
    // disable
    enable = 0; cyc();
    expect_out("disabled", 1, 0, 0, 0, '0);
    checks++;
    if (n_synced != 5) begin failures++; $display("FAIL: synced_o pulsed %0d times", n_synced); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && synced_o) n_synced++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

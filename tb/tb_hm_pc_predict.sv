// tb_hm_pc_predict: self-checking testbench for hm_pc_predict.
//
// Feeds hand-written SPARC V8 instruction traces (PCs as word addresses) and
// checks the mismatch flag one cycle after each instruction against the
// expected verdict written next to it: sequential flow, taken and untaken
// conditional branches with and without the annul bit, branch always/never,
// CALL, JMPL, traps, a branch in a delay slot, restart after check_en low,
// and one wrong next PC for each prediction rule.
module tb_hm_pc_predict;
  import hm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   check_en = 1, trace_valid = 0, mismatch_o;
  trace_t trace = '0;

  int checks = 0, failures = 0, n_err = 0;

  hm_pc_predict dut (.*);

  // SPARC V8 encodings, written out here independently of the design.
  localparam logic [31:0] NOP = 32'h0100_0000;   // sethi 0, %g0
  function automatic logic [31:0] bcc(input bit a, input logic [3:0] cond, input int disp);
    return {2'b00, a, cond, 3'b010, 22'(disp)};
  endfunction
  function automatic logic [31:0] call(input int disp);
    return {2'b01, 30'(disp)};
  endfunction
  localparam logic [31:0] JMPL = {2'b10, 5'd0, 6'b111000, 5'd15, 1'b1, 13'd8}; // retl
  localparam logic [3:0] BA = 4'b1000, BN = 4'b0000, BNE = 4'b1001, BE = 4'b0001;

  task automatic step(input int pc, input logic [31:0] inst, input bit trap, input bit exp);
    @(negedge clk);
    trace       = '0;
    trace.pc    = 30'(pc);
    trace.inst  = inst;
    trace.trap  = trap;
    trace_valid = 1;
    @(negedge clk);
    trace_valid = 0;
    checks++;
    if (exp) n_err++;
    if (mismatch_o != exp) begin
      failures++;
      $display("FAIL: pc=%0d inst=%h mismatch=%b expected %b", pc, inst, mismatch_o, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    step(100, NOP, 0, 0);              // first: not checked
    step(101, NOP, 0, 0);
    step(103, NOP, 0, 1);              // skipped 102
    step(104, bcc(0, BNE, 10), 0, 0);
    step(105, NOP, 0, 0);              // delay slot
    step(114, NOP, 0, 0);              // taken
    step(115, bcc(0, BNE, 5), 0, 0);
    step(116, NOP, 0, 0);
    step(117, NOP, 0, 0);              // not taken
    step(118, bcc(0, BA, 20), 0, 0);
    step(119, NOP, 0, 0);
    step(120, NOP, 0, 1);              // branch always must go to 138
    step(121, NOP, 0, 0);
    step(122, bcc(1, BA, 8), 0, 0);    // ba,a: delay slot annulled
    step(130, NOP, 0, 0);
    step(131, NOP, 0, 0);
    step(140, bcc(1, BN, 3), 0, 1);    // 131 -> 140 is wrong
    step(142, NOP, 0, 0);              // bn,a skips its slot
    step(150, bcc(1, BE, 7), 0, 1);    // 142 -> 150 wrong
    step(151, NOP, 0, 0);              // be,a taken: slot runs
    step(157, NOP, 0, 0);
    step(158, bcc(1, BE, 7), 0, 0);
    step(160, NOP, 0, 0);              // be,a not taken: slot annulled
    step(161, bcc(1, BE, 5), 0, 0);
    step(162, NOP, 0, 0);              // slot ran, so branch taken
    step(163, NOP, 0, 1);              // must be 166
    step(164, bcc(0, BN, 9), 0, 0);
    step(165, NOP, 0, 0);
    step(173, NOP, 0, 1);              // bn never goes to target
    step(174, call(100), 0, 0);
    step(175, NOP, 0, 0);
    step(274, NOP, 0, 0);              // call target
    step(275, call(10), 0, 0);
    step(276, NOP, 0, 0);
    step(277, NOP, 0, 1);              // must be 285
    step(278, JMPL, 0, 0);
    step(279, NOP, 0, 0);
    step(600, NOP, 0, 0);              // indirect target: not checked
    step(601, NOP, 1, 0);              // traps
    step(4, NOP, 0, 0);                // handler: not checked here
    step(5, NOP, 0, 0);
    step(7, NOP, 0, 1);
    step(700, bcc(0, BA, 10), 0, 1);   // 7 -> 700 wrong
    step(701, bcc(0, BA, 50), 0, 0);   // branch in delay slot
    step(710, NOP, 0, 0);              // first target
    step(751, NOP, 0, 0);              // second target: not checked
    step(752, NOP, 0, 0);
    @(negedge clk); check_en = 0;
    @(negedge clk); check_en = 1;
    step(900, NOP, 0, 0);              // restart: first not checked
    step(901, NOP, 0, 0);
    step(905, NOP, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

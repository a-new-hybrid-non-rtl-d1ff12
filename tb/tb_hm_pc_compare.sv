// tb_hm_pc_compare: self-checking testbench for hm_pc_compare.
//
// Presents random buffer contents (with repeated PCs, as in a loop) and a
// trace instruction that is either the fetched copy of one entry, a copy
// with a corrupted opcode, or one with a PC no entry holds. Expected
// behaviour: the oldest entry with the trace PC is the match; pop_n retires
// it and everything older; mismatch_o (one cycle later) is set for a
// corrupted opcode or a missing PC, and only while check_en is high;
// skipped_o counts the retired older entries.
module tb_hm_pc_compare;
  import hm_pkg::*;

  localparam int unsigned DEPTH = 7;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             check_en = 1, trace_valid = 0;
  trace_t           trace = '0;
  fetch_t           entry [DEPTH];
  logic [DEPTH-1:0] entry_valid = '0;
  logic [CW-1:0]    pop_n, skipped_o;
  logic             mismatch_o;

  int checks = 0, failures = 0;
  int n_ok = 0, n_op = 0, n_pc = 0, n_skip = 0;

  hm_pc_compare #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    int n, kind, j, first;
    logic exp_mis;
    int   exp_pop, exp_skip;
    for (int k = 0; k < DEPTH; k++) entry[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      n = 1 + ($urandom % DEPTH);
      for (int k = 0; k < DEPTH; k++) begin
        entry[k].pc   = 30'(100 + ($urandom % 6));   // small range: repeats happen
        entry[k].inst = $urandom;
        entry_valid[k] = (k < n);
      end
      check_en = ($urandom % 8) != 0;
      kind = $urandom % 3;
      j = $urandom % n;
      trace = '0;
      trace.pc   = entry[j].pc;
      trace.inst = entry[j].inst;
      if (kind == 2) trace.pc = 30'h3FFF_0000;
      trace_valid = 1;
      // reference: oldest valid entry with the same PC
      first = -1;
      for (int k = n - 1; k >= 0; k--) if (entry[k].pc == trace.pc) first = k;
      if (kind == 0) trace.inst = entry[first].inst;
      if (kind == 1) trace.inst = entry[first].inst ^ (32'h1 << ($urandom % 32));
      exp_pop  = (first >= 0) ? first + 1 : 0;
      exp_skip = (first >= 0) ? first : 0;
      exp_mis  = check_en && (first < 0 || kind == 1);
      #1;
      checks++;
      if (int'(pop_n) != exp_pop) begin failures++; $display("FAIL: pop_n=%0d expected %0d", pop_n, exp_pop); end
      @(negedge clk);
      trace_valid = 0;
      checks++;
      if (mismatch_o != exp_mis || int'(skipped_o) != exp_skip) begin
        failures++; $display("FAIL: mismatch=%b expected %b, skipped=%0d expected %0d", mismatch_o, exp_mis, skipped_o, exp_skip);
      end
      if (kind == 0) n_ok++; else if (kind == 1) n_op++; else n_pc++;
      if (exp_skip > 0) n_skip++;
      // no trace instruction: nothing retired, nothing reported
      #1;
      checks++;
      if (pop_n != 0) begin failures++; $display("FAIL: pop without trace"); end
    end
    checks++;
    if (n_ok < 100 || n_op < 100 || n_pc < 100 || n_skip < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

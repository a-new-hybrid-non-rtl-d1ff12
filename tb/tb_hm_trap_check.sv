// tb_hm_trap_check: self-checking testbench for hm_trap_check.
//
// Uses a trap table at 0x4000_0000. Traces trapping instructions followed by
// the first handler instruction at TBA + 16*tt for every trap type 0..255:
// implemented types (window overflow/underflow, interrupts, software traps)
// must pass and all others must raise trap_o, with tt_o reporting the type.
// Also checks: a handler PC outside the table or not at a slot start is an
// error, an error-mode entry is always an error, instructions after a
// non-trapping one are not checked, and check_en low suppresses everything.
module tb_hm_trap_check;
  import hm_pkg::*;

  localparam logic [31:0] TBA = 32'h4000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       check_en = 1, trace_valid = 0, trap_o;
  trace_t     trace = '0;
  logic [7:0] tt_o;

  int checks = 0, failures = 0, n_bad = 0, n_good = 0;

  hm_trap_check #(.TRAP_BASE(TBA)) dut (.*);

  // Implemented trap types, listed independently of the design's mask.
  function automatic bit implemented(input int tt);
    return tt == 5 || tt == 6 || (tt >= 17 && tt <= 31) || tt >= 128;
  endfunction

  task automatic instr(input logic [31:0] byte_pc, input bit trap, input bit errmode,
                       input bit exp, input bit check_tt = 0, input int tt = 0);
    @(negedge clk);
    trace         = '0;
    trace.pc      = byte_pc[31:2];
    trace.inst    = 32'h0100_0000;
    trace.trap    = trap;
    trace.errmode = errmode;
    trace_valid   = 1;
    @(negedge clk);
    trace_valid = 0;
    checks++;
    if (trap_o != exp || (check_tt && tt_o != 8'(tt))) begin
      failures++;
      $display("FAIL: pc=%h trap_o=%b expected %b tt=%h", byte_pc, trap_o, exp, tt_o);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int tt = 0; tt < 256; tt++) begin
      instr(32'h0000_1000, 1, 0, 0);                     // trapping instruction
      instr(TBA + 32'(tt * 16), 0, 0, !implemented(tt), 1, tt);
      if (implemented(tt)) n_good++; else n_bad++;
      instr(TBA + 32'(tt * 16) + 4, 0, 0, 0);            // next handler instr: no check
    end
    instr(32'h0000_2000, 1, 0, 0);
    instr(32'h5000_0800, 0, 0, 1);                       // outside the table
    instr(32'h0000_2000, 1, 0, 0);
    instr(TBA + 32'h0000_0804, 0, 0, 1);                 // not a slot start
    instr(32'h0000_3000, 0, 0, 0);
    instr(32'h0000_3004, 0, 1, 1);                       // error mode
    instr(32'h0000_3008, 0, 0, 0);
    check_en = 0;
    instr(32'h0000_2000, 1, 0, 0);
    instr(TBA + 32'h0000_0020, 0, 1, 0);                 // suppressed
    check_en = 1;
    instr(TBA + 32'h0000_0020, 0, 0, 0);                 // no pending trap after disable
    checks++;
    if (n_good != 145 || n_bad != 111) failures++;
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

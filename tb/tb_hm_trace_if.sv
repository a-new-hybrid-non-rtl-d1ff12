// tb_hm_trace_if: self-checking testbench for hm_trace_if.
//
// Presents random 128-bit trace entries, about one in four marked as the
// continuation of a multi-cycle instruction (bit 126), with idle cycles in
// between. One cycle later the interface must report exactly the
// first entries, with PC, opcode, trap, error-mode and time-tag fields taken
// from their LEON3 bit positions, and must pulse dropped_o for the
// continuations. The live time tag must follow with one cycle of delay.
module tb_hm_trace_if;
  import hm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              entry_valid = 0;
  logic [127:0]      entry = '0;
  logic [TTAG_W-1:0] ttag_now = '0;
  logic              trace_valid, dropped_o;
  trace_t            trace;
  logic [TTAG_W-1:0] now_ttag;

  int checks = 0, failures = 0, n_multi = 0, n_valid = 0;

  hm_trace_if dut (.*);

  initial begin
    logic              pv, pm;
    logic [127:0]      pe;
    logic [TTAG_W-1:0] pt;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      pv = entry_valid; pm = entry[126]; pe = entry; pt = ttag_now;
      // check the outputs produced from the previous cycle's inputs
      if (i > 0) begin
        checks++;
        if (trace_valid != (pv && !pm) || dropped_o != (pv && pm) || now_ttag != pt) begin
          failures++; $display("FAIL: strobes valid=%b drop=%b", trace_valid, dropped_o);
        end
        if (pv && !pm) begin
          checks++;
          if (trace.pc != pe[63:34] || trace.inst != pe[31:0] || trace.trap != pe[33] ||
              trace.errmode != pe[32] || trace.ttag != pe[125:96]) begin
            failures++; $display("FAIL: fields of entry %h", pe);
          end
        end
      end
      entry_valid = ($urandom % 3) != 0;
      entry       = {$urandom, $urandom, $urandom, $urandom};
      entry[126]  = ($urandom % 4) == 0;
      ttag_now    = ttag_now + TTAG_W'(1);
      if (entry_valid && entry[126]) n_multi++;
      if (entry_valid && !entry[126]) n_valid++;
    end
    checks++;
    if (n_multi < 100 || n_valid < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// hm_trace_if: trace-port observation interface of the hardware monitor.
//
// Receives the processor's instruction trace, one entry per executed
// instruction, and unpacks it into PC, opcode, trap flag, error-mode flag and
// time tag for the checking blocks. The entry layout is the 128-bit LEON3
// instruction-trace entry (bit 126 multi-cycle, 125:96 time tag, 63:34 PC,
// 33 trap, 32 error mode, 31:0 opcode); the original description names these fields but
// not their positions, which come from the LEON3 trace buffer format.
//
// A multi-cycle instruction (a store, for instance) produces two or three
// entries; only the first describes the instruction, and the later ones
// (bit 126 set) are dropped here so that each executed instruction is seen
// exactly once. dropped_o pulses for each dropped entry.
//
// The processor's free-running time tag is also passed through a register
// (now_ttag) for the timeout check, which must see it advance between
// instructions.
//
// Timing: one register stage; trace_valid follows entry_valid by one cycle.
module hm_trace_if
  import hm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              entry_valid,   // a trace entry is presented
  input  logic [127:0]      entry,         // raw trace entry
  input  logic [TTAG_W-1:0] ttag_now,      // current value of the processor time tag
  output logic              trace_valid,   // one executed instruction this cycle
  output trace_t            trace,         // its fields
  output logic [TTAG_W-1:0] now_ttag,      // registered time tag
  output logic              dropped_o      // a continuation entry was dropped
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trace_valid <= 1'b0;
      trace       <= '0;
      now_ttag    <= '0;
      dropped_o   <= 1'b0;
    end else begin
      now_ttag    <= ttag_now;
      trace_valid <= entry_valid && !entry[TE_MULTI];
      dropped_o   <= entry_valid &&  entry[TE_MULTI];
      if (entry_valid && !entry[TE_MULTI]) begin
        trace.pc      <= entry[TE_PC_HI:TE_PC_LO];
        trace.inst    <= entry[31:0];
        trace.trap    <= entry[TE_TRAP];
        trace.errmode <= entry[TE_ERRMODE];
        trace.ttag    <= entry[TE_TTAG_HI:TE_TTAG_LO];
      end
    end
  end

endmodule

// hm_pc_compare: instruction-flow comparison of the hardware monitor.
//
// For every executed instruction reported by the trace port, looks for the
// same instruction among the fetch records held in the input buffer, in order
// of appearance, and checks that the fetched and the executed opcode agree.
// A corrupted PC or instruction register anywhere in the pipeline makes the
// executed instruction differ from what was fetched.
//
// Matching (this design's choice; the original description says only that trace
// instructions are compared with the buffer "in order of appearance"): the
// oldest buffered entry whose PC equals the trace PC is the fetched copy of
// the instruction. Older entries are fetches the pipeline squashed (wrong-path
// fetches after a taken branch or a trap) and are retired with it. Errors:
//   - no buffered entry has the trace PC (the PC was corrupted after fetch,
//     or an instruction executed that was never fetched); nothing is retired;
//   - the matching entry's opcode differs from the trace opcode (the
//     instruction was corrupted after fetch); the entries are retired.
// skipped_o reports how many squashed fetches were retired.
//
// Timing: pop_n is combinational in the cycle trace_valid is high (the buffer
// acts on it at the clock edge); mismatch_o and skipped_o are registered and
// appear one cycle later. check_en low suppresses mismatch_o (used while the
// monitor synchronises) but matching and retiring still take place.
module hm_pc_compare
  import hm_pkg::*;
#(
  parameter int unsigned DEPTH = 7,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             check_en,
  input  logic             trace_valid,
  input  trace_t           trace,
  input  fetch_t           entry [DEPTH],
  input  logic [DEPTH-1:0] entry_valid,
  output logic [CW-1:0]    pop_n,
  output logic             mismatch_o,
  output logic [CW-1:0]    skipped_o
);

  logic          found;
  logic [CW-1:0] idx;
  logic          op_bad;

  always_comb begin
    found = 1'b0;
    idx   = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (entry_valid[i] && entry[i].pc == trace.pc) begin
        found = 1'b1;
        idx   = CW'(i);
      end
    end
    op_bad = found && (entry[idx].inst != trace.inst);
    pop_n  = (trace_valid && found) ? idx + CW'(1) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mismatch_o <= 1'b0;
      skipped_o  <= '0;
    end else begin
      mismatch_o <= trace_valid && check_en && (!found || op_bad);
      skipped_o  <= (trace_valid && found) ? idx : '0;
    end
  end

endmodule

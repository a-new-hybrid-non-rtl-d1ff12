// hm_trap_check: exception checking of the hardware monitor.
//
// Uses the trap and error-mode flags of the trace port to detect
// fault-induced exceptions. Entry into error mode is always an error. A trap
// may be an implemented one (expected in normal execution) or an unexpected
// one caused by a fault (an invalid instruction, an invalid address); as in
// the original description the two are told apart by the next instruction on the trace
// port, which is the first instruction of the trap handler.
//
// On SPARC V8 a trap jumps to TBA + 16*tt, tt being the 8-bit trap type, so
// the trap type can be read back from the handler's PC (bits 11:4). The trap
// is accepted when that PC lies in the trap table (bits 31:12 equal
// TRAP_BASE, bits 3:2 zero) and ALLOWED_TT has the bit of its trap type set.
// The default mask accepts register-window overflow/underflow (0x05, 0x06),
// interrupts (0x11-0x1F) and software traps (0x80-0xFF); everything else,
// e.g. illegal instruction (0x02) or memory address not aligned (0x07), is
// reported. The table address and the mask are this design's choices; the
// original description does not list which traps are implemented.
//
// Timing: the check is made when the instruction after a trap is traced;
// trap_o is registered (one cycle after that instruction, or after the
// error-mode entry). tt_o holds the trap type derived from the handler PC.
module hm_trap_check
  import hm_pkg::*;
#(
  parameter logic [31:0]  TRAP_BASE  = 32'h0000_0000,
  parameter logic [255:0] ALLOWED_TT = {{128{1'b1}}, 96'h0, 16'hFFFE, 16'h0060}
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       check_en,
  input  logic       trace_valid,
  input  trace_t     trace,
  output logic       trap_o,
  output logic [7:0] tt_o
);

  logic       pending;     // previous executed instruction trapped
  logic [7:0] tt;
  logic       handler_ok;

  assign tt         = trace.pc[11:4];
  assign handler_ok = (trace.pc[31:12] == TRAP_BASE[31:12]) &&
                      (trace.pc[3:2] == 2'b00) && ALLOWED_TT[tt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      trap_o  <= 1'b0;
      tt_o    <= '0;
    end else if (!check_en) begin
      pending <= 1'b0;
      trap_o  <= 1'b0;
    end else begin
      trap_o <= 1'b0;
      if (trace_valid) begin
        if (trace.errmode) trap_o <= 1'b1;
        if (pending) begin
          tt_o <= tt;
          if (!handler_ok) trap_o <= 1'b1;
        end
        pending <= trace.trap;
      end
    end
  end

endmodule

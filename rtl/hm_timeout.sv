// hm_timeout: hang detection of the hardware monitor.
//
// The processor's time tag counts clock cycles while the processor runs. If
// it advances by more than TIMEOUT cycles since the last executed instruction
// appeared on the trace port, the processor is taken to be stuck in one
// instruction and timeout_o is raised. Using the time tag rather than the
// monitor's own clock means that a halted processor (time tag frozen) is not
// reported. The original description gives no threshold; TIMEOUT is this design's choice
// and should exceed the longest legitimate instruction latency (cache refill
// from slow memory, division).
//
// Interface: trace_valid/trace_ttag mark each executed instruction with its
// time tag; now_ttag is the current time tag. Differences are taken modulo
// 2**TTAG_W, so the counter may wrap. check_en low disarms the check; it
// re-arms at the next executed instruction or when check_en rises.
//
// Timing: timeout_o is registered; it rises one cycle after the time tag
// reaches last + TIMEOUT + 1 and stays high until an instruction executes.
module hm_timeout
  import hm_pkg::*;
#(
  parameter int unsigned TIMEOUT = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              check_en,
  input  logic              trace_valid,
  input  logic [TTAG_W-1:0] trace_ttag,
  input  logic [TTAG_W-1:0] now_ttag,
  output logic              timeout_o
);

  logic              armed;
  logic [TTAG_W-1:0] last;
  logic [TTAG_W-1:0] elapsed;

  assign elapsed = now_ttag - last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed     <= 1'b0;
      last      <= '0;
      timeout_o <= 1'b0;
    end else if (!check_en) begin
      armed     <= 1'b0;
      timeout_o <= 1'b0;
    end else if (trace_valid) begin
      armed     <= 1'b1;
      last      <= trace_ttag;
      timeout_o <= 1'b0;
    end else if (!armed) begin
      armed     <= 1'b1;
      last      <= now_ttag;
    end else begin
      timeout_o <= (elapsed > TTAG_W'(TIMEOUT));
    end
  end

endmodule

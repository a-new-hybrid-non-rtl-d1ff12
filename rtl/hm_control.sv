// hm_control: control block of the hardware monitor.
//
// Keeps the other blocks working together and produces the monitor's Error
// output. The original description gives the block's role (correct behaviour of the
// blocks and interfaces) and shows Error as the combination of the PC
// compare, PC prediction, timeout and trap outputs; the sequencing below is
// this design's.
//
// States:
//   IDLE    enable low. The input buffer is held empty, all checks are off.
//   SYNC    monitoring has just started. Instructions already in the pipeline
//           were fetched before the buffer began recording, so the fetch/trace
//           comparison is suppressed until SYNC_INSTR instructions (the buffer
//           depth, i.e. the pipeline length) have been traced. PC prediction,
//           timeout and trap checks already run.
//   MONITOR all four checks run.
//   ERROR   a check fired. error stays high and cause records which checks
//           fired (several may fire together); the checks are stopped. clear
//           restarts monitoring through SYNC with an empty buffer.
// Any state returns to IDLE when enable falls.
//
// Timing: error and cause are registered and rise the cycle after a check
// output is seen; flush is high in IDLE and for the first cycle of SYNC.
module hm_control
  import hm_pkg::*;
#(
  parameter int unsigned SYNC_INSTR = 7
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enable,
  input  logic   clear,
  input  logic   trace_valid,
  input  cause_t flags,        // outputs of the four checks
  output logic   flush,        // empty the input buffer
  output logic   check_en,     // run PC prediction, timeout and trap checks
  output logic   compare_en,   // report fetch/trace mismatches
  output logic   error,
  output cause_t cause,
  output logic   synced_o      // pulses when SYNC ends
);

  typedef enum logic [1:0] { IDLE, SYNC, MONITOR, ERROR } state_e;

  localparam int unsigned SW = $clog2(SYNC_INSTR + 1);

  state_e        state;
  logic [SW-1:0] seen;
  logic          first;       // first cycle of SYNC
  logic          any_flag;

  // Fig. 2: the Error signal is the OR of the four check outputs.
  assign any_flag = |flags;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      seen     <= '0;
      first    <= 1'b0;
      error    <= 1'b0;
      cause    <= '0;
      synced_o <= 1'b0;
    end else begin
      synced_o <= 1'b0;
      first    <= 1'b0;
      if (!enable) begin
        state <= IDLE;
        error <= 1'b0;
        cause <= '0;
      end else begin
        unique case (state)
          IDLE: begin
            state <= SYNC;
            seen  <= '0;
            first <= 1'b1;
          end
          SYNC, MONITOR: begin
            if (any_flag) begin
              state <= ERROR;
              error <= 1'b1;
              cause <= flags;
            end else if (state == SYNC && trace_valid) begin
              if (seen == SW'(SYNC_INSTR - 1)) begin
                state    <= MONITOR;
                synced_o <= 1'b1;
              end
              seen <= seen + SW'(1);
            end
          end
          ERROR: begin
            if (clear) begin
              state <= SYNC;
              seen  <= '0;
              first <= 1'b1;
              error <= 1'b0;
              cause <= '0;
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  assign flush      = (state == IDLE) || first;
  assign check_en   = (state == SYNC) || (state == MONITOR);
  assign compare_en = (state == MONITOR);

endmodule

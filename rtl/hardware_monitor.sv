// hardware_monitor: non-intrusive dual control-flow monitor for a pipelined
// processor.
//
// The monitor taps the processor's instruction flow at its two ends: the
// fetch bus, where each instruction enters the pipeline, and the instruction
// trace port, where each instruction leaves it after execution. Fetched
// (PC, opcode) pairs wait in an input buffer as deep as the pipeline; each
// executed instruction is then compared with its fetched copy, so a
// corruption of the PC or instruction register at any pipeline stage is
// caught. A PC-prediction check on the trace stream catches wrong fetch
// addresses, which look identical at both ends. A timeout on the processor
// time tag catches hangs, and the trap and error-mode flags catch
// fault-induced exceptions. The OR of the four checks is latched as error,
// with cause naming the check(s) that fired. No software support and no
// compile-time information is needed.
//
// Structure (after the original block diagram): fetch-bus interface ->
// input buffer -> PC compare <- trace interface -> PC prediction, timeout,
// trap check; control sequences the blocks and forms error.
//
// Interface: bus_* is the observed fetch bus (pipelined address/data phases,
// see hm_fetch_if); trace_* is the 128-bit LEON3 trace entry with its strobe
// and the live time tag (see hm_trace_if); enable starts monitoring, clear
// re-arms it after an error. Event pulses (squashed fetches skipped,
// buffer overflow, dropped multi-cycle entries, end of synchronisation) are
// brought out for observation.
//
// Timing: both interfaces register their inputs; a check result reaches
// error two cycles after the trace entry of the offending instruction (three
// for the checks on the instruction that follows it).
module hardware_monitor
  import hm_pkg::*;
#(
  parameter int unsigned  DEPTH      = 7,
  parameter int unsigned  TIMEOUT    = 1024,
  parameter logic [31:0]  TRAP_BASE  = 32'h0000_0000,
  parameter logic [255:0] ALLOWED_TT = {{128{1'b1}}, 96'h0, 16'hFFFE, 16'h0060},
  localparam int unsigned CW         = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              clear,
  // fetch bus (observed)
  input  logic              bus_avalid,
  input  logic [31:0]       bus_addr,
  input  logic              bus_ready,
  input  logic [31:0]       bus_rdata,
  // instruction trace port (observed)
  input  logic              trace_valid,
  input  logic [127:0]      trace_entry,
  input  logic [TTAG_W-1:0] trace_ttag,
  // results
  output logic              error,
  output cause_t            cause,
  output logic [7:0]        trap_type,
  // event pulses
  output logic              ev_synced,
  output logic [CW-1:0]     ev_skipped,
  output logic              ev_overflow,
  output logic              ev_multi_dropped,
  output logic              ev_misaligned,
  output logic [CW-1:0]     buf_level         // fetch records waiting in the input buffer
);

  logic          f_valid;
  fetch_t        f_rec;
  logic          t_valid;
  trace_t        t_rec;
  logic [TTAG_W-1:0] now_ttag;

  fetch_t           buf_entry [DEPTH];
  logic [DEPTH-1:0] buf_valid;
  logic [CW-1:0]    pop_n;

  logic   flush, check_en, compare_en;
  cause_t flags;

  hm_fetch_if u_fetch_if (
    .clk, .rst_n,
    .bus_avalid, .bus_addr, .bus_ready, .bus_rdata,
    .fetch_valid (f_valid),
    .fetch       (f_rec),
    .misaligned_o(ev_misaligned)
  );

  hm_trace_if u_trace_if (
    .clk, .rst_n,
    .entry_valid (trace_valid),
    .entry       (trace_entry),
    .ttag_now    (trace_ttag),
    .trace_valid (t_valid),
    .trace       (t_rec),
    .now_ttag    (now_ttag),
    .dropped_o   (ev_multi_dropped)
  );

  hm_input_buffer #(.DEPTH(DEPTH)) u_buffer (
    .clk, .rst_n,
    .flush,
    .push        (f_valid),
    .push_data   (f_rec),
    .pop_n       (pop_n),
    .entry       (buf_entry),
    .entry_valid (buf_valid),
    .count       (buf_level),
    .overflow_o  (ev_overflow)
  );

  hm_pc_compare #(.DEPTH(DEPTH)) u_compare (
    .clk, .rst_n,
    .check_en    (compare_en),
    .trace_valid (t_valid),
    .trace       (t_rec),
    .entry       (buf_entry),
    .entry_valid (buf_valid),
    .pop_n       (pop_n),
    .mismatch_o  (flags.compare),
    .skipped_o   (ev_skipped)
  );

  hm_pc_predict u_predict (
    .clk, .rst_n,
    .check_en,
    .trace_valid (t_valid),
    .trace       (t_rec),
    .mismatch_o  (flags.predict)
  );

  hm_timeout #(.TIMEOUT(TIMEOUT)) u_timeout (
    .clk, .rst_n,
    .check_en,
    .trace_valid (t_valid),
    .trace_ttag  (t_rec.ttag),
    .now_ttag    (now_ttag),
    .timeout_o   (flags.timeout)
  );

  hm_trap_check #(.TRAP_BASE(TRAP_BASE), .ALLOWED_TT(ALLOWED_TT)) u_trap (
    .clk, .rst_n,
    .check_en,
    .trace_valid (t_valid),
    .trace       (t_rec),
    .trap_o      (flags.trap),
    .tt_o        (trap_type)
  );

  hm_control #(.SYNC_INSTR(DEPTH)) u_control (
    .clk, .rst_n,
    .enable, .clear,
    .trace_valid (t_valid),
    .flags,
    .flush, .check_en, .compare_en,
    .error, .cause,
    .synced_o    (ev_synced)
  );

endmodule

// hm_input_buffer: input buffer of the hardware monitor.
//
// Holds the (PC, opcode) records captured on the fetch bus, in order of
// appearance, until the same instructions come out of the processor on the
// trace port. Its depth defaults to 7 entries, the number of LEON3 pipeline
// stages, as the original description sizes it ("equal to the number of pipeline
// stages").
//
// Organisation: a shift register with entry 0 the oldest. All entries and
// their valid bits are visible at once so that the compare block can search
// them in one cycle. In each cycle the compare block may retire the oldest
// pop_n entries (the matched instruction and any older fetches that were
// squashed by the pipeline and never executed) while one new record is
// pushed behind the survivors. If the buffer is full after the retirement,
// the oldest entry is discarded to make room and overflow_o pulses; that is
// this design's choice, the original description does not cover a full
// buffer. flush empties the buffer (used by the control block when
// monitoring (re)starts).
//
// The assertion at the end uses rst_n as its (synchronously sampled) disable
// condition while the flops use it as an asynchronous reset; lint reports
// this mixed use, which is intended and only concerns the assertion.
module hm_input_buffer
  import hm_pkg::*;
#(
  parameter int unsigned DEPTH = 7,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic          push,
  input  fetch_t        push_data,
  input  logic [CW-1:0] pop_n,            // entries to retire from the head (<= count)
  output fetch_t        entry [DEPTH],    // entry 0 is the oldest
  output logic [DEPTH-1:0] entry_valid,
  output logic [CW-1:0] count,
  output logic          overflow_o
);

  fetch_t        mem [DEPTH];
  logic [CW-1:0] cnt;

  // Combinational next state: retire, make room if full, append.
  fetch_t        nxt_mem [DEPTH];
  logic [CW-1:0] nxt_cnt;
  logic          nxt_ovf;

  always_comb begin
    int unsigned shift;
    int unsigned remain;
    shift  = int'(pop_n);
    remain = int'(cnt) - int'(pop_n);
    nxt_ovf = 1'b0;
    if (push && remain == DEPTH) begin
      shift   = shift + 1;
      remain  = remain - 1;
      nxt_ovf = 1'b1;
    end
    for (int i = 0; i < DEPTH; i++) begin
      if (i + shift < DEPTH) nxt_mem[i] = mem[i + shift];
      else                   nxt_mem[i] = '0;
    end
    if (push) begin
      for (int i = 0; i < DEPTH; i++)
        if (i == remain) nxt_mem[i] = push_data;
      remain = remain + 1;
    end
    nxt_cnt = CW'(remain);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      overflow_o <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (flush) begin
      cnt        <= '0;
      overflow_o <= 1'b0;
    end else begin
      cnt        <= nxt_cnt;
      overflow_o <= nxt_ovf;
      for (int i = 0; i < DEPTH; i++) mem[i] <= nxt_mem[i];
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      entry[i]       = mem[i];
      entry_valid[i] = (i < int'(cnt));
    end
  end
  assign count = cnt;

  // The compare block never retires more entries than are held.
  a_pop_le_count: assert property (@(posedge clk) disable iff (!rst_n) pop_n <= cnt);

endmodule

// hm_fetch_if: memory-bus observation interface of the hardware monitor.
//
// Watches the instruction bus between the processor and its instruction
// memory/cache (address "A" out of the processor, instruction "I" back into
// it) and turns every completed fetch into one (PC, opcode) record for the
// input buffer. The monitor only listens; it drives nothing on the bus.
//
// Bus model (this design's choice; the monitored bus is only named as "the
// memory or cache bus"): a pipelined read bus with separate address and data
// phases, as on AMBA AHB. An address is accepted in a cycle where
// bus_avalid and bus_ready are both high; its instruction is on bus_rdata in
// the next cycle where bus_ready is high. bus_ready low stretches the data
// phase (wait states) and holds the address phase. The interface keeps the
// address of the fetch in its data phase and pairs it with the returned
// word.
//
// Timing: fetch_valid/fetch are registered, one cycle after the data phase
// completes. A misaligned fetch address (bits 1:0 not zero) is counted in
// misaligned_o and still recorded with its word address.
module hm_fetch_if
  import hm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_avalid,  // address phase valid (instruction fetch)
  input  logic [31:0] bus_addr,    // fetch address
  input  logic        bus_ready,   // transfer ready (low = wait state)
  input  logic [31:0] bus_rdata,   // instruction returned to the processor
  output logic        fetch_valid, // one completed fetch this cycle
  output fetch_t      fetch,       // its word address and instruction
  output logic        misaligned_o // last completed fetch address was misaligned
);

  logic        dph_valid;   // a fetch is in its data phase
  logic [31:0] dph_addr;    // its address

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dph_valid    <= 1'b0;
      dph_addr     <= '0;
      fetch_valid  <= 1'b0;
      fetch        <= '0;
      misaligned_o <= 1'b0;
    end else begin
      fetch_valid <= 1'b0;
      if (bus_ready) begin
        if (dph_valid) begin
          fetch_valid  <= 1'b1;
          fetch.pc     <= dph_addr[31:2];
          fetch.inst   <= bus_rdata;
          misaligned_o <= (dph_addr[1:0] != 2'b00);
        end
        dph_valid <= bus_avalid;
        if (bus_avalid) dph_addr <= bus_addr;
      end
    end
  end

endmodule

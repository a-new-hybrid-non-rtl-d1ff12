// tb_hm_fetch_if: self-checking testbench for hm_fetch_if.
//
// Acts as bus master and memory: issues fetch addresses on a pipelined
// address/data bus with random idle cycles and random wait states, and
// returns for each address the word addr ^ 32'h5A5A_0F0F. Every record the
// interface delivers must carry the next accepted address (in order) and the
// word returned for it, one cycle after its data phase, and flag a misaligned
// address (a few are issued); at the end the number
// of records must equal the number of accepted fetches.
module tb_hm_fetch_if;
  import hm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bus_avalid = 0, bus_ready = 1;
  logic [31:0] bus_addr = '0, bus_rdata = '0;
  logic        fetch_valid, misaligned_o;
  fetch_t      fetch;

  int checks = 0, failures = 0;

  hm_fetch_if dut (.*);

  function automatic logic [31:0] mem(input logic [31:0] a);
    return a ^ 32'h5A5A_0F0F;
  endfunction

  logic [31:0] accepted[$];   // addresses whose address phase was accepted
  logic [31:0] expect_q[$];   // records the interface must produce
  logic        in_dphase = 0;
  logic [31:0] dph_a;
  int          nrec = 0, nacc = 0, nexp = 0, n_mis = 0;

  // Bus driver and memory model; sampled values change only after the edge.
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      bus_ready  = ($urandom % 4) != 0;
      bus_avalid = ($urandom % 5) != 0;
      bus_addr   = {$urandom} & 32'hFFFF_FFFC;
      if (($urandom % 50) == 0) bus_addr[1:0] = 2'($urandom % 3 + 1);   // misaligned
      bus_rdata  = in_dphase ? mem(dph_a) : 32'hBAD0_BAD0;
      @(posedge clk);
      if (bus_ready) begin
        if (in_dphase) begin expect_q.push_back(dph_a); nexp++; end
        in_dphase = bus_avalid;
        if (bus_avalid) begin dph_a = bus_addr; nacc++; end
      end
    end
    @(negedge clk); bus_avalid = 0; bus_ready = 1; bus_rdata = mem(dph_a);
    @(posedge clk);
    if (in_dphase) begin expect_q.push_back(dph_a); nexp++; end
    in_dphase = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (nrec != nexp || nrec < 1000 || n_mis == 0) begin
      failures++; $display("FAIL: %0d records for %0d fetches", nrec, nexp);
    end
    checks++;
    if (expect_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d fetches never delivered", expect_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker: one cycle after the data phase the record must appear.
  always @(posedge clk) if (rst_n) begin
    #1;
    if (fetch_valid) begin
      logic [31:0] a;
      nrec++;
      checks++;
      if (expect_q.size() == 0) begin
        failures++; $display("FAIL: unexpected record pc=%h at %0t", fetch.pc, $time);
      end else begin
        a = expect_q.pop_front();
        if (fetch.pc != a[31:2] || fetch.inst != mem(a)) begin
          failures++;
          $display("FAIL: record pc=%h inst=%h, expected pc=%h inst=%h",
                   fetch.pc, fetch.inst, a[31:2], mem(a));
        end
        checks++;
        if (misaligned_o != (a[1:0] != 2'b00)) begin failures++; $display("FAIL: misaligned flag"); end
        if (misaligned_o) n_mis++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

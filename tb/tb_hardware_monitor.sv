// tb_hardware_monitor: end-to-end testbench of the hardware monitor at its
// default parameters (buffer depth 7, timeout 1024, trap table at 0).
//
// A behavioural processor model stands in for the monitored processor. It
// runs a randomly generated SPARC V8 program (ordinary instructions, stores,
// conditional branches with and without annul, branch always/never, CALL,
// JMPL, software traps) and produces the two streams the monitor observes:
//   - the fetch bus: every fetched word, including the one or two
//     wrong-path words fetched after each taken transfer or trap and then
//     squashed, on a pipelined address/data bus with random wait states;
//   - the trace port: each executed instruction as a 128-bit trace entry at
//     least 5 cycles after its fetch, stores as two entries, with a time tag
//     counting every cycle.
// The program lives at byte 0x1000-0x1FFF; every trap-table slot holds a
// short handler that returns to the instruction after the trap.
//
// Scenarios, each started from a disabled monitor:
//   clean run, corrupted opcode in the pipeline, corrupted PC in the
//   pipeline, wrong fetch address (same at both points), hang, unexpected
//   trap (illegal instruction), error mode, fetch run-ahead deeper than the
//   input buffer (overflow).
// The clean run must end without error; each fault must set error with the
// expected cause within a fixed number of cycles. Every mechanism (sync,
// squashed-fetch skipping, overflow, multi-cycle entry dropping, bus wait
// states, implemented traps, annulled delay slots, each of the four checks,
// clear) is counted and must occur at least once.
module tb_hardware_monitor;
  import hm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- DUT -------------------------------------------------
  logic              enable = 0, clear = 0;
  logic              bus_avalid = 0, bus_ready = 1;
  logic [31:0]       bus_addr = '0, bus_rdata = '0;
  logic              trace_valid = 0;
  logic [127:0]      trace_entry = '0;
  logic [TTAG_W-1:0] trace_ttag = '0;
  logic              error;
  cause_t            cause;
  logic [7:0]        trap_type;
  logic              ev_synced, ev_overflow, ev_multi_dropped, ev_misaligned;
  logic [2:0]        ev_skipped, buf_level;

  hardware_monitor dut (.*);

  int checks = 0, failures = 0;

  // ---------------- program image ---------------------------------------
  localparam int MEMW  = 2048;          // words
  localparam int PBEG  = 'h400, PEND = 'h7FF;
  localparam logic [31:0] NOP = 32'h0100_0000;
  logic [31:0] mem [MEMW];

  function automatic logic [31:0] bcc(bit a, logic [3:0] cond, int disp);
    return {2'b00, a, cond, 3'b010, 22'(disp)};
  endfunction
  function automatic logic [31:0] ticc(int n);          // ta n
    return {2'b10, 1'b0, 4'b1000, 6'b111010, 5'd0, 1'b1, 6'd0, 7'(n)};
  endfunction
  localparam logic [31:0] STORE = {2'b11, 5'd1, 6'b000100, 5'd0, 1'b1, 13'd64};
  localparam logic [31:0] JMPL  = {2'b10, 5'd0, 6'b111000, 5'd15, 1'b1, 13'd8};
  localparam logic [31:0] RETT  = {2'b10, 5'd0, 6'b111001, 5'd18, 1'b1, 13'd0};

  function automatic int kind_of(logic [31:0] w);  // 0 plain, 1 bcc, 2 call, 3 jmpl/rett, 4 ticc
    if (w[31:30] == 2'b01) return 2;
    if (w[31:30] == 2'b00 && w[24:22] == 3'b010) return 1;
    if (w[31:30] == 2'b10 && (w[24:19] == 6'b111000 || w[24:19] == 6'b111001)) return 3;
    if (w[31:30] == 2'b10 && w[24:19] == 6'b111010) return 4;
    return 0;
  endfunction

  task automatic build_program();
    int w, r, t;
    for (int i = 0; i < MEMW; i++) mem[i] = NOP;
    // trap handlers: two instructions, then an indirect return with RETT in its slot
    for (int tt = 0; tt < 256; tt++) begin
      mem[tt*4 + 0] = NOP;
      mem[tt*4 + 1] = STORE;
      mem[tt*4 + 2] = JMPL;
      mem[tt*4 + 3] = RETT;
    end
    w = PBEG;
    while (w < PEND - 3) begin
      r = $urandom % 100;
      t = PBEG + ($urandom % (PEND - 3 - PBEG));
      if (r < 8)       mem[w] = STORE;
      else if (r < 20) begin mem[w] = bcc(1'($urandom % 2), 4'b1001, t - w); w++; end
      else if (r < 23) begin mem[w] = bcc(1'($urandom % 2), 4'b1000, t - w); w++; end
      else if (r < 25) begin mem[w] = bcc(1'($urandom % 2), 4'b0000, t - w); w++; end
      else if (r < 27) begin mem[w] = {2'b01, 30'(t - w)}; w++; end
      else if (r < 29) begin mem[w] = JMPL; w++; end
      else if (r < 30) mem[w] = ticc($urandom % 16);
      w++;
    end
    mem[PEND - 1] = bcc(0, 4'b1000, PBEG - (PEND - 1));   // loop back
    mem[PEND]     = NOP;
  endtask

  // ---------------- executed stream -------------------------------------
  typedef struct {
    int          pc;       // word address
    logic [31:0] inst;
    bit          trap;
    bit          errmode;
    bit          multi;    // store: second trace entry
  } xitem_t;

  xitem_t xq[$];           // executed instructions, in order
  int     n_annul = 0, n_swtrap = 0;

  // Walk the program for n instructions. inj selects a fault made by the
  // processor itself at instruction k (walk level): 3 = wrong fetch address,
  // 5 = illegal-instruction trap, 6 = error mode (processor stops).
  task automatic walk(int n, int inj, int k);
    int pc, ret, ct, cpc, tgt, after_trap_ret;
    logic [31:0] w;
    bit in_ds, taken;
    pc = PBEG; in_ds = 0; ct = -1; tgt = 0; after_trap_ret = -1;
    xq.delete();
    for (int i = 0; i < n; i++) begin
      xitem_t x;
      // the processor jumps to a wrong address: needs a plain predecessor
      if (inj == 3 && i >= k && !in_ds && xq.size() > 1 &&
          kind_of(xq[$].inst) == 0 && kind_of(xq[$-1].inst) == 0 &&
          !xq[$].trap && !xq[$-1].trap && after_trap_ret < 0) begin
        pc = pc + 6; inj = -3;
      end
      w = mem[pc];
      x.pc = pc; x.inst = w; x.trap = 0; x.errmode = 0;
      x.multi = (w == STORE);
      if (inj == 5 && i >= k && !in_ds && kind_of(w) == 0 && pc >= PBEG) begin
        x.trap = 1; inj = -5;
        xq.push_back(x);
        after_trap_ret = pc + 1; pc = 2 * 4;  // tt = 0x02 handler
        continue;
      end
      if (inj == 6 && i >= k && !in_ds) begin
        x.errmode = 1; xq.push_back(x);
        break;
      end
      xq.push_back(x);
      if (in_ds) begin            // this was a delay slot
        in_ds = 0;
        pc = tgt;
        continue;
      end
      case (kind_of(w))
        1: begin
          cpc = pc;
          tgt = pc + 32'(signed'(w[21:0]));
          case (w[28:25])
            4'b1000: taken = 1;
            4'b0000: taken = 0;
            default: taken = $urandom % 2;
          endcase
          if (w[29] && (!taken || w[28:25] == 4'b1000)) begin   // slot annulled
            n_annul++;
            pc = taken ? tgt : pc + 2;
          end else begin
            in_ds = 1; pc = pc + 1;
            if (!taken) tgt = cpc + 2;
          end
        end
        2: begin tgt = pc + 32'(signed'(w[29:0])); in_ds = 1; pc = pc + 1; end
        3: begin
          // JMPL in a handler returns from the trap; elsewhere jumps anywhere
          if (pc < PBEG) begin tgt = after_trap_ret; after_trap_ret = -1; end
          else tgt = PBEG + ($urandom % (PEND - PBEG - 2));
          in_ds = 1; pc = pc + 1;
        end
        4: begin
          xq[$].trap = 1; n_swtrap++;
          after_trap_ret = pc + 1;
          pc = (128 + int'(w[6:0])) * 4;
        end
        default: pc = pc + 1;
      endcase
      if (pc > PEND || pc < 0) pc = PBEG;
    end
  endtask

  // ---------------- fetch stream ----------------------------------------
  typedef struct { int pc; int xi; } fitem_t;   // xi = executed index, -1 squashed
  fitem_t fq[$];

  task automatic build_fetch();
    fq.delete();
    for (int i = 0; i < xq.size(); i++) begin
      if (i > 0 && xq[i].pc != xq[i-1].pc + 1) begin
        int cnt;
        cnt = $urandom % 3;
        if (xq[i].pc > xq[i-1].pc && xq[i].pc - xq[i-1].pc - 1 < cnt)
          cnt = xq[i].pc - xq[i-1].pc - 1;
        for (int j = 1; j <= cnt; j++) fq.push_back('{pc: xq[i-1].pc + j, xi: -1});
      end
      fq.push_back('{pc: xq[i].pc, xi: i});
    end
  endtask

  // ---------------- timing engine ---------------------------------------
  int  fetched_cycle[$];   // per executed index: cycle its fetch completed (-1 not yet)
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int  err_cycle = -1;     // first cycle in which error was seen high
  always @(negedge clk) if (error && err_cycle < 0) err_cycle = cyc;
  logic run_ttag = 1;
  always @(posedge clk) if (run_ttag) trace_ttag <= trace_ttag + 1'b1;

  int n_wait = 0, n_skip = 0, n_ovf = 0, n_drop = 0, n_sync = 0, n_impl_trap = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_skipped != 0) n_skip++;
    if (ev_overflow) n_ovf++;
    if (ev_multi_dropped) n_drop++;
    if (ev_synced) n_sync++;
  end

  // Runs the streams. limit: fetched-but-not-retired words allowed ahead of
  // the trace. inj_trace: 1 = corrupt opcode, 2 = corrupt PC of instruction
  // k on the trace port. hang_at: stop everything after this many traced
  // instructions (-1 none). Returns the cycle the k-th instruction was traced.
  task automatic run(int limit, int inj_trace, int k, int hang_at, output int k_cycle,
                     output int last_cycle);
    int fi, ti, dph_fi, fseq_done, last_fseq_traced, stall;
    bit dph, multi2;
    int fseq_of [$];
    fi = 0; ti = 0; dph = 0; dph_fi = 0; fseq_done = 0; last_fseq_traced = -1;
    multi2 = 0; k_cycle = -1; last_cycle = cyc;
    fetched_cycle.delete();
    for (int i = 0; i < xq.size(); i++) fetched_cycle.push_back(-1);
    for (int i = 0; i < fq.size(); i++) fseq_of.push_back(i);
    while (ti < xq.size()) begin
      @(negedge clk);
      // ---- bus
      bus_ready  = ($urandom % 5) != 0;
      if (!bus_ready) n_wait++;
      bus_rdata  = dph ? mem[fq[dph_fi].pc] : 32'h0;
      bus_avalid = 0;
      if (bus_ready) begin
        if (dph) begin
          if (fq[dph_fi].xi >= 0) fetched_cycle[fq[dph_fi].xi] = cyc;
          fseq_done = dph_fi + 1;
          dph = 0;
        end
        if (fi < fq.size() && (fi - last_fseq_traced - 1) < limit && ($urandom % 8) != 0) begin
          bus_avalid = 1;
          bus_addr   = 32'(fq[fi].pc) << 2;
          dph = 1; dph_fi = fi; fi++;
        end
      end
      // ---- trace
      trace_valid = 0;
      if (multi2) begin
        trace_valid = 1;
        trace_entry[126] = 1'b1;
        trace_entry[63:0] = {$urandom, $urandom};   // store address / data
        multi2 = 0;
      end else if (hang_at >= 0 && ti >= hang_at) begin
        break;
      end else if (fetched_cycle[ti] >= 0 && cyc - fetched_cycle[ti] >= 5 && ($urandom % 4) != 0) begin
        trace_valid = 1;
        trace_entry = '0;
        trace_entry[125:96] = trace_ttag;
        trace_entry[63:34]  = 30'(xq[ti].pc);
        trace_entry[33]     = xq[ti].trap;
        trace_entry[32]     = xq[ti].errmode;
        trace_entry[31:0]   = xq[ti].inst;
        if (ti == k && inj_trace == 1) trace_entry[31:0] ^= 32'h0000_2000;
        if (ti == k && inj_trace == 2) trace_entry[63:34] += 30'd7;
        if (ti == k) k_cycle = cyc;
        multi2 = xq[ti].multi;
        // fetches up to and including this one are retired from the buffer
        for (int j = 0; j < fq.size(); j++) if (fq[j].xi == ti) last_fseq_traced = j;
        ti++;
        last_cycle = cyc;
      end
    end
    @(negedge clk);
    trace_valid = 0; bus_avalid = 0; bus_ready = 1;
  endtask

  // ---------------- scenarios -------------------------------------------
  int n_det[4];

  task automatic restart();
    @(negedge clk); enable = 0; clear = 0;
    repeat (3) @(negedge clk);
    enable = 1;
    err_cycle = -1;
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_error(string name, int bit_no, int from_cycle, int max_lat);
    int waited;
    waited = 0;
    while (!error && waited < max_lat + 50) begin @(negedge clk); waited++; end
    if (err_cycle < 0) err_cycle = cyc;
    checks++;
    if (!error || !cause[bit_no]) begin
      failures++;
      $display("FAIL %s: error=%b cause=%b", name, error, cause);
    end else begin
      n_det[bit_no]++;
      checks++;
      if (from_cycle >= 0 && err_cycle - from_cycle > max_lat) begin
        failures++;
        $display("FAIL %s: detected %0d cycles after the faulty instruction", name, err_cycle - from_cycle);
      end
    end
  endtask

  initial begin
    int kc, lc;
    build_program();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. clean run
    restart();
    walk(4000, 0, 0); build_fetch();
    run(6, 0, -1, -1, kc, lc);
    repeat (20) @(negedge clk);
    checks++;
    if (error) begin failures++; $display("FAIL clean run: error, cause=%b", cause); end
    checks++;
    if (n_ovf != 0) begin failures++; $display("FAIL clean run: buffer overflow"); end
    checks++;
    if (n_swtrap == 0 || trap_type < 8'h80) begin failures++; $display("FAIL: no software trap seen"); end
    else n_impl_trap++;

    // 2. opcode corrupted inside the pipeline
    restart();
    walk(300, 0, 0); build_fetch();
    run(6, 1, 150, -1, kc, lc);
    expect_error("opcode", 0, kc, 4);

    // 3. PC corrupted inside the pipeline
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;   // clear re-arms
    err_cycle = -1;
    walk(300, 0, 0); build_fetch();
    run(6, 2, 150, -1, kc, lc);
    expect_error("pipeline PC", 0, kc, 4);

    // 4. wrong fetch address: identical at both points, found by prediction
    restart();
    walk(300, 3, 150); build_fetch();
    run(6, 0, -1, -1, kc, lc);
    expect_error("fetch PC", 1, -1, 0);
    checks++;
    if (cause.compare) begin failures++; $display("FAIL fetch PC: compare fired too"); end

    // 5. hang: no instruction for longer than the timeout
    restart();
    walk(300, 0, 0); build_fetch();
    run(6, 0, -1, 200, kc, lc);
    expect_error("hang", 2, lc, 1024 + 6);
    checks++;
    if (err_cycle - lc < 1024) begin failures++; $display("FAIL hang: timeout too early %0d %0d", err_cycle, lc); end

    // 6. unexpected trap
    restart();
    walk(300, 5, 150); build_fetch();
    run(6, 0, -1, -1, kc, lc);
    expect_error("illegal-instruction trap", 3, -1, 0);
    checks++;
    if (trap_type != 8'h02) begin failures++; $display("FAIL: trap type %h", trap_type); end

    // 7. error mode
    restart();
    walk(300, 6, 150); build_fetch();
    run(6, 0, -1, -1, kc, lc);
    expect_error("error mode", 3, lc, 4);

    // 8. fetch runs further ahead than the buffer holds
    restart();
    walk(400, 0, 0); build_fetch();
    run(12, 0, -1, -1, kc, lc);
    expect_error("overflow", 0, -1, 0);

    // mechanism coverage
    $display("events: sync=%0d skip=%0d overflow=%0d multi_drop=%0d wait=%0d annul=%0d swtrap=%0d",
             n_sync, n_skip, n_ovf, n_drop, n_wait, n_annul, n_swtrap);
    $display("detected: compare=%0d predict=%0d timeout=%0d trap=%0d",
             n_det[0], n_det[1], n_det[2], n_det[3]);
    foreach (n_det[i]) begin checks++; if (n_det[i] == 0) failures++; end
    checks++; if (n_sync == 0)      failures++;
    checks++; if (n_skip == 0)      failures++;
    checks++; if (n_ovf == 0)       failures++;
    checks++; if (n_drop == 0)      failures++;
    checks++; if (n_wait == 0)      failures++;
    checks++; if (n_annul == 0)     failures++;
    checks++; if (n_impl_trap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

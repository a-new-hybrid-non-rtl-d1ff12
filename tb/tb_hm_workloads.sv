// tb_hm_workloads: the monitor at its default parameters on the control flow
// of the three benchmark programs of its evaluation: Bubble Sort of 15
// values (BBS), 5x5 matrix multiplication (Mmult) and AES-128 encryption.
//
// Each program is laid out as SPARC V8 code (loops closed by conditional
// branches with delay slots, some annulled, calls to subroutines that send
// intermediate results to an output port and return with JMPL, stores that
// give two trace entries). The branch outcomes are not random: the algorithm
// itself is run here (the sort on 15 random values, the 5x5 loop nest, the AES
// key expansion and 10 rounds) and each conditional branch takes the
// direction the real program would. A behavioural processor model then plays
// the fetch bus and the trace port as in tb_hardware_monitor.
//
// For each program: one fault-free run, which must raise no error, and a
// sampled fault campaign on the PC and instruction register: FI_RUNS runs,
// each with one fault at a random executed instruction - an opcode or a PC
// corrupted between fetch and trace, or a wrong fetch address (seen the same
// at both points). Every fault must be detected (the evaluation reports full
// detection for faults in the PC and instruction registers), with the
// expected cause. Executed instructions and cycles per run are printed.
module tb_hm_workloads;
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

  // ---------------- program image and decisions -------------------------
  localparam int MEMW = 2048;
  localparam int PBEG = 'h400, PEND = 'h7FF;
  logic [31:0] mem [MEMW];
  int          end_pc;
  bit          dq[$];              // conditional-branch outcomes, in order

  function automatic logic [31:0] plain(int n);   // an ALU instruction
    return {2'b10, 5'(n), 6'b000010, 5'd1, 1'b1, 13'(n)};
  endfunction
  localparam logic [31:0] LOAD  = {2'b11, 5'd2, 6'b000000, 5'd3, 1'b1, 13'd0};
  localparam logic [31:0] STORE = {2'b11, 5'd1, 6'b000100, 5'd0, 1'b1, 13'd64};
  localparam logic [31:0] JMPL  = {2'b10, 5'd0, 6'b111000, 5'd15, 1'b1, 13'd8};
  localparam logic [3:0]  BNE = 4'b1001, BE = 4'b0001, BLE = 4'b0010, BL = 4'b0011;

  function automatic logic [31:0] bcc(bit a, logic [3:0] cond, int disp);
    return {2'b00, a, cond, 3'b010, 22'(disp)};
  endfunction

  int la;                          // assembly location
  task automatic org(int a); la = a; endtask
  task automatic op(logic [31:0] w); mem[la] = w; la++; endtask
  task automatic p(); op(plain(la & 31)); endtask
  task automatic br(bit a, logic [3:0] c, int tgt); op(bcc(a, c, tgt - la)); endtask
  task automatic call(int tgt); op({2'b01, 30'(tgt - la)}); endtask

  task automatic clear_mem();
    for (int i = 0; i < MEMW; i++) mem[i] = plain(i & 31);
    dq.delete();
  endtask

  // BBS: bubble sort of 15 values, output after every pass.
  task automatic prog_bbs();
    int a[15];
    clear_mem();
    org('h400); p();                                  // i = 0
    org('h401); p();                                  // L_outer: j = 0
    op(LOAD); op(LOAD); p();                          // 402..404 L_inner
    br(0, BLE, 'h409); p();                           // 405 no swap?  406 slot
    op(STORE); op(STORE);                             // 407, 408 swap
    p(); p(); br(1, BL, 'h402); p();                  // 409 j++, cmp, 40B, 40C slot
    call('h420); p();                                 // 40D, 40E
    p(); p(); br(0, BL, 'h401); p();                  // 40F i++, cmp, 411, 412
    end_pc = 'h413;
    org('h420); op(STORE); op(JMPL); p();             // output routine
    for (int k = 0; k < 15; k++) a[k] = $urandom % 1000;
    for (int i = 0; i < 14; i++) begin
      for (int j = 0; j < 14 - i; j++) begin
        dq.push_back(a[j] <= a[j+1]);
        if (a[j] > a[j+1]) begin int t; t = a[j]; a[j] = a[j+1]; a[j+1] = t; end
        dq.push_back(j + 1 < 14 - i);
      end
      dq.push_back(i + 1 < 14);
    end
  endtask

  // Mmult: C = A x B for 5x5 matrices, each C element sent out.
  task automatic prog_mmult();
    clear_mem();
    org('h400); p();                                  // i = 0
    p(); p(); p();                                    // 401 L_i: j=0, 402 L_j: sum=0, 403 k=0
    op(LOAD); op(LOAD); p(); p(); p(); p();           // 404..409 L_k
    br(1, BL, 'h404); p();                            // 40A, 40B
    op(STORE); call('h420); p();                      // 40C, 40D, 40E
    p(); p(); br(0, BNE, 'h402); p();                 // 40F..412
    p(); p(); br(0, BL, 'h401); p();                  // 413..416
    end_pc = 'h417;
    org('h420); op(STORE); op(JMPL); p();
    for (int i = 0; i < 5; i++) begin
      for (int j = 0; j < 5; j++) begin
        for (int k = 0; k < 5; k++) dq.push_back(k < 4);
        dq.push_back(j < 4);
      end
      dq.push_back(i < 4);
    end
  endtask

  // AES-128: key expansion (40 words) and 10 rounds, state sent out at the end.
  task automatic prog_aes();
    clear_mem();
    org('h400); p();                                  // i = 4
    op(LOAD); p(); br(0, BNE, 'h40A); p();            // 401 L_ke, 402, 403, 404
    call('h430); p(); p(); p(); p();                  // 405..409 rot/sub word, rcon
    p(); op(STORE); p(); p(); br(0, BL, 'h401); p();  // 40A L_skip .. 40F
    p();                                              // 410 r = 1
    p();                                              // 411 L_round: b = 0
    op(LOAD); op(LOAD); op(STORE); p(); p();          // 412 L_sb .. 416
    br(1, BL, 'h412); p();                            // 417, 418
    p(); br(0, BE, 'h424); p();                       // 419, 41A, 41B
    p();                                              // 41C c = 0
    op(LOAD); p(); p(); op(STORE); p();               // 41D L_mc .. 421
    br(0, BL, 'h41D); p();                            // 422, 423
    call('h438); p();                                 // 424 L_ark, 425
    p(); p(); br(0, BLE, 'h411); p();                 // 426..429
    call('h448); p();                                 // 42A, 42B
    end_pc = 'h42C;
    org('h430); op(LOAD); op(LOAD); p(); op(JMPL); p();          // SubWord/RotWord
    org('h438); p(); op(LOAD); p(); op(STORE); p();              // AddRoundKey
    br(0, BL, 'h439); p(); op(JMPL); p();                        // 43D..440
    org('h448); op(STORE); op(JMPL); p();                        // output
    for (int i = 4; i < 44; i++) begin
      dq.push_back(i % 4 != 0);
      dq.push_back(i + 1 < 44);
    end
    for (int r = 1; r <= 10; r++) begin
      for (int b = 0; b < 16; b++) dq.push_back(b < 15);
      dq.push_back(r == 10);
      if (r != 10) for (int c = 0; c < 4; c++) dq.push_back(c < 3);
      for (int w = 0; w < 4; w++) dq.push_back(w < 3);
      dq.push_back(r < 10);
    end
  endtask

  // ---------------- executed stream -------------------------------------
  typedef struct {
    int          pc;
    logic [31:0] inst;
    bit          trap;
    bit          errmode;
    bit          multi;
  } xitem_t;
  xitem_t xq[$];

  function automatic int kind_of(logic [31:0] w);  // 0 plain, 1 bcc, 2 call, 3 jmpl
    if (w[31:30] == 2'b01) return 2;
    if (w[31:30] == 2'b00 && w[24:22] == 3'b010) return 1;
    if (w[31:30] == 2'b10 && w[24:19] == 6'b111000) return 3;
    return 0;
  endfunction

  // Executes the program, taking conditional branches from dq. inj = 3 makes
  // the processor fetch from a wrong address at the first plain instruction
  // at or after k that follows two plain ones.
  task automatic walk(int inj, int k);
    int pc, tgt, cpc, limit;
    int stack[$];
    logic [31:0] w;
    bit in_ds, taken;
    bit d[$];
    d = dq;
    pc = PBEG; in_ds = 0; tgt = 0;
    xq.delete();
    limit = 100000;
    for (int i = 0; i < limit && pc != end_pc; i++) begin
      xitem_t x;
      if (inj == 3 && i >= k && !in_ds && xq.size() > 1 &&
          kind_of(xq[$].inst) == 0 && kind_of(xq[$-1].inst) == 0) begin
        pc = pc + 6; inj = -3; limit = i + 200;
      end
      if (pc < 0 || pc >= MEMW) break;
      w = mem[pc];
      x.pc = pc; x.inst = w; x.trap = 0; x.errmode = 0; x.multi = (w == STORE);
      xq.push_back(x);
      if (in_ds) begin in_ds = 0; pc = tgt; continue; end
      case (kind_of(w))
        1: begin
          cpc = pc;
          tgt = pc + 32'(signed'(w[21:0]));
          if (w[28:25] == 4'b1000) taken = 1;
          else if (w[28:25] == 4'b0000) taken = 0;
          else taken = (d.size() > 0) ? d.pop_front() : 1'b0;
          if (w[29] && (!taken || w[28:25] == 4'b1000)) pc = taken ? tgt : pc + 2;
          else begin in_ds = 1; pc = pc + 1; if (!taken) tgt = cpc + 2; end
        end
        2: begin tgt = pc + 32'(signed'(w[29:0])); stack.push_back(pc + 2); in_ds = 1; pc = pc + 1; end
        3: begin tgt = (stack.size() > 0) ? stack.pop_back() : end_pc; in_ds = 1; pc = pc + 1; end
        default: pc = pc + 1;
      endcase
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

  // ---------------- campaign --------------------------------------------
  localparam int FI_RUNS = 30;

  task automatic restart();
    @(negedge clk); enable = 0; clear = 0;
    repeat (3) @(negedge clk);
    enable = 1;
    repeat (3) @(negedge clk);
  endtask

  int n_detected[3], n_injected[3];

  task automatic campaign(string name, int prog);
    int kc, lc, c0, len, kind, k, bitno, ovf0;
    // program and its fault-free run
    case (prog) 0: prog_bbs(); 1: prog_mmult(); default: prog_aes(); endcase
    restart();
    walk(0, 0); build_fetch();
    len = xq.size();
    c0 = cyc;
    ovf0 = n_ovf;
    run(6, 0, -1, -1, kc, lc);
    repeat (10) @(negedge clk);
    $display("%s: %0d instructions executed, %0d cycles", name, len, cyc - c0);
    checks++;
    if (error || len < 300) begin failures++; $display("FAIL %s fault-free: error=%b cause=%b", name, error, cause); end
    // the buffer, as deep as the pipeline, must not overflow in normal operation
    checks++;
    if (n_ovf != ovf0) begin failures++; $display("FAIL %s fault-free: buffer overflow", name); end
    // fault campaign on PC and instruction register
    for (int r = 0; r < FI_RUNS; r++) begin
      kind = $urandom % 3;
      k = 20 + ($urandom % (len - 40));
      restart();
      if (kind == 2) walk(3, k); else walk(0, 0);
      build_fetch();
      run(6, kind == 2 ? 0 : kind + 1, k, -1, kc, lc);
      repeat (10) @(negedge clk);
      bitno = (kind == 2) ? 1 : 0;
      n_injected[kind]++;
      checks++;
      if (error && cause[bitno]) n_detected[kind]++;
      else begin
        failures++;
        $display("FAIL %s run %0d: fault kind %0d at instruction %0d not detected (error=%b cause=%b)",
                 name, r, kind, k, error, cause);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    campaign("BBS", 0);
    campaign("Mmult", 1);
    campaign("AES", 2);
    $display("faults detected: opcode %0d/%0d, pipeline PC %0d/%0d, fetch address %0d/%0d",
             n_detected[0], n_injected[0], n_detected[1], n_injected[1], n_detected[2], n_injected[2]);
    $display("events: sync=%0d skip=%0d multi_drop=%0d wait=%0d", n_sync, n_skip, n_drop, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

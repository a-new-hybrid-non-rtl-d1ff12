// hm_pc_predict: PC prediction check of the hardware monitor.
//
// Catches errors in the generation of fetch addresses, which the fetch/trace
// comparison cannot see because both observation points then carry the same
// wrong PC. From the opcode and PC of each executed instruction it predicts
// the PC of the next executed instruction and flags a difference. As in the
// original description, a non-branch instruction advances the PC by the instruction size
// and a branch either by its offset (taken) or by the instruction size (not
// taken); the monitor does not know the condition codes, so for a conditional
// branch either outcome is accepted.
//
// SPARC V8 refinements (this design's, from the instruction set the
// monitored processor implements): branches and CALL are delayed, so the
// instruction after a control transfer is its delay slot and the target
// follows it; the annul bit removes the delay slot of an untaken conditional
// branch and of "branch always". Predicted sets, with P the previous
// instruction and C the transfer whose delay slot P is:
//   ordinary P, CALL, JMPL/RETT, branch (a=0) : { P+4 }
//   branch always, a=1 : { target }      branch never, a=1 : { P+8 }
//   conditional branch, a=1 : { P+4 (taken, delay slot), P+8 (not taken) }
//   P in delay slot of CALL / branch always : { target }
//   P in delay slot of branch never : { C+8 }
//   P in delay slot of conditional branch : { target, C+8 } ({ target } if a=1)
//   P in delay slot of JMPL/RETT, P trapped, P a transfer in a delay slot,
//   first instruction after check_en rises : not checked.
// A trapped instruction is followed by its handler; that transfer is checked
// by the trap block instead.
//
// Timing: the check is made in the cycle trace_valid is high; mismatch_o is
// registered and appears one cycle later.
module hm_pc_predict
  import hm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   check_en,     // low: forget history, check nothing
  input  logic   trace_valid,
  input  trace_t trace,
  output logic   mismatch_o
);

  // History: the previous executed instruction and, if it sat in a delay
  // slot, the control transfer that owned the slot.
  logic        prev_valid, prev_trap, prev_in_ds, loose;
  logic [31:2] prev_pc, cti_pc;
  logic [31:0] prev_inst, cti_inst;

  ctrl_e       p_cls, c_cls;
  logic [31:2] exp_a, exp_b;
  logic        exp_a_v, exp_b_v, any;
  logic        bad, next_in_ds, p_annul_uncond;

  always_comb begin
    logic [3:0] cond;
    cond    = '0;
    p_cls   = classify(prev_inst);
    c_cls   = classify(cti_inst);
    exp_a   = prev_pc + 30'd1;
    exp_b   = prev_pc + 30'd2;
    exp_a_v = 1'b1;
    exp_b_v = 1'b0;
    any     = 1'b0;
    p_annul_uncond = (p_cls == CT_BRANCH) && prev_inst[29] &&
                     (prev_inst[27:25] == 3'b000);   // ba,a / bn,a
    if (!prev_valid || prev_trap || loose) begin
      any = 1'b1;
    end else if (prev_in_ds) begin
      cond = cti_inst[28:25];
      if (p_cls != CT_NONE) any = 1'b1;                // DCTI couple
      else if (c_cls == CT_INDIRECT) any = 1'b1;
      else if (c_cls == CT_CALL || cond == 4'b1000) begin
        exp_a = branch_target(cti_pc, cti_inst);
      end else if (cond == 4'b0000) begin
        exp_a = cti_pc + 30'd2;
      end else begin
        exp_a   = branch_target(cti_pc, cti_inst);
        exp_b   = cti_pc + 30'd2;
        exp_b_v = !cti_inst[29];
      end
    end else if (p_cls == CT_BRANCH && prev_inst[29]) begin
      cond = prev_inst[28:25];
      if (cond == 4'b1000)      exp_a = branch_target(prev_pc, prev_inst);
      else if (cond == 4'b0000) exp_a = prev_pc + 30'd2;
      else                      exp_b_v = 1'b1;        // { P+4, P+8 }
    end
    bad = !any && !((exp_a_v && trace.pc == exp_a) || (exp_b_v && trace.pc == exp_b));
    // The new instruction occupies P's delay slot when P is a transfer that
    // was not itself in a slot, P did not trap, and execution went to P+4.
    next_in_ds = prev_valid && !prev_trap && !prev_in_ds && (p_cls != CT_NONE) &&
                 !p_annul_uncond && (trace.pc == prev_pc + 30'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_valid <= 1'b0;
      prev_trap  <= 1'b0;
      prev_in_ds <= 1'b0;
      loose      <= 1'b0;
      prev_pc    <= '0;
      prev_inst  <= '0;
      cti_pc     <= '0;
      cti_inst   <= '0;
      mismatch_o <= 1'b0;
    end else if (!check_en) begin
      prev_valid <= 1'b0;
      mismatch_o <= 1'b0;
    end else begin
      mismatch_o <= trace_valid && bad;
      if (trace_valid) begin
        prev_valid <= 1'b1;
        prev_pc    <= trace.pc;
        prev_inst  <= trace.inst;
        prev_trap  <= trace.trap;
        prev_in_ds <= next_in_ds;
        // After a transfer in a delay slot the next PC is not predictable.
        loose      <= prev_in_ds && (p_cls != CT_NONE);
        if (next_in_ds) begin
          cti_pc   <= prev_pc;
          cti_inst <= prev_inst;
        end
      end
    end
  end

endmodule

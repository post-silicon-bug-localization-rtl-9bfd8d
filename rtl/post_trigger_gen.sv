// post_trigger_gen: IFRA post-trigger generator.
//
// Hard post-triggers (evident failure) stop recording for good and halt the
// core: array parity error, arithmetic residue-check error, in-built fatal
// exception, a long retirement gap (HARD_GAP cycles without a retired
// instruction, two seconds in the document), a segmentation fault declared by
// the OS, and a load/store address equal to zero (null-pointer access,
// detected here on every LSU port). Soft post-triggers (early symptom) only
// pause recording while the core keeps running: a short retirement gap
// (SOFT_GAP cycles, the time of two memory loads), a TLB miss (held until the
// TLB refill; ignored while tlb_soft_dis_i is set, for tests that target TLB
// servicing) and an interrupt / I-TLB-miss handler (held until it returns).
// Recording resumes when the symptom clears without a hard trigger.
//
// Recording control reaches the stages in sequence, commit first and fetch
// last (stage_ctl_o is indexed by ifra_pkg::stage_e), so a later stage never
// records past an earlier one even when the stages run on different clocks.
// The commit-stage control is registered once, so it changes one cycle after
// the trigger input. Every further stage takes, one cycle later, the control
// that the stage before it acknowledges having applied (stage_ack_i, already
// synchronised to clk by the caller). Fed back with stage_ack_i = stage_ctl_o
// in a single clock domain, the stages follow one cycle apart.
// seq_done_o is the acknowledged stop of the fetch stage: every stage has
// stopped. cause_o gives the first hard cause once halted, otherwise the
// active soft cause. Trigger list, resume rules and the commit-to-fetch
// order follow the document; the cycle counts, the acknowledgement handshake
// and the cause encoding are this design's choices.
module post_trigger_gen
  import ifra_pkg::*;
#(
  parameter int unsigned N_LSU    = 2,
  parameter int unsigned A_W      = ADDR_W,
  parameter int unsigned CNT_W    = 32,
  parameter int unsigned SOFT_GAP = 400,            // two memory loads, cycles
  parameter int unsigned HARD_GAP = 2_000_000_000   // two seconds at 1 GHz
) (
  input  logic             clk,
  input  logic             rst_n,
  // symptoms from the core
  input  logic             retire_i,        // at least one instruction retired
  input  logic             parity_err_i,
  input  logic             residue_err_i,
  input  logic             fatal_exc_i,
  input  logic             tlb_miss_i,
  input  logic             tlb_refill_i,
  input  logic             segfault_i,      // OS reports a segfault
  input  logic             intr_i,          // interrupt / I-TLB handler entered
  input  logic             intr_return_i,   // handler returned
  input  logic [N_LSU-1:0] lsu_valid_i,
  input  logic [A_W-1:0]   lsu_addr_i [N_LSU],
  input  logic             tlb_soft_dis_i,
  // control applied by each stage, synchronised back to clk
  input  rec_ctl_t         stage_ack_i [NUM_STAGES],
  // outputs
  output rec_ctl_t         stage_ctl_o [NUM_STAGES],
  output logic             seq_done_o,
  output logic             halt_o,
  output logic             soft_active_o,
  output trig_cause_e      cause_o
);
  initial assert (SOFT_GAP < HARD_GAP && 64'(HARD_GAP) < (64'd1 << CNT_W))
    else $error("post_trigger_gen: need SOFT_GAP < HARD_GAP < 2^CNT_W");

  logic [CNT_W-1:0] gap_q;
  logic             tlb_pend_q, intr_pend_q, stop_q;
  trig_cause_e      hard_cause_q;
  rec_ctl_t         ctl_pipe_q [NUM_STAGES];

  logic        null_addr, soft_gap, hard_gap, hard_now, soft_now;
  trig_cause_e hard_cause, soft_cause;

  always_comb begin
    null_addr = 1'b0;
    for (int unsigned l = 0; l < N_LSU; l++)
      if (lsu_valid_i[l] && lsu_addr_i[l] == '0) null_addr = 1'b1;
    soft_gap = (gap_q >= CNT_W'(SOFT_GAP));
    hard_gap = (gap_q >= CNT_W'(HARD_GAP));

    hard_now   = 1'b1;
    hard_cause = TRIG_NONE;
    if      (parity_err_i)  hard_cause = TRIG_PARITY;
    else if (residue_err_i) hard_cause = TRIG_RESIDUE;
    else if (fatal_exc_i)   hard_cause = TRIG_FATAL;
    else if (hard_gap)      hard_cause = TRIG_DEADLOCK;
    else if (segfault_i)    hard_cause = TRIG_SEGFAULT;
    else if (null_addr)     hard_cause = TRIG_NULLADDR;
    else                    hard_now   = 1'b0;

    soft_now   = 1'b1;
    soft_cause = TRIG_NONE;
    if      (soft_gap)    soft_cause = TRIG_SOFT_GAP;
    else if (tlb_pend_q)  soft_cause = TRIG_SOFT_TLB;
    else if (intr_pend_q) soft_cause = TRIG_SOFT_INTR;
    else                  soft_now   = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gap_q        <= '0;
      tlb_pend_q   <= 1'b0;
      intr_pend_q  <= 1'b0;
      stop_q       <= 1'b0;
      hard_cause_q <= TRIG_NONE;
      for (int unsigned k = 0; k < NUM_STAGES; k++) ctl_pipe_q[k] <= '0;
    end else begin
      // retirement-gap counter, saturating at the hard threshold
      if (retire_i)       gap_q <= '0;
      else if (!hard_gap) gap_q <= gap_q + 1'b1;

      if (tlb_refill_i || segfault_i)          tlb_pend_q <= 1'b0;
      else if (tlb_miss_i && !tlb_soft_dis_i)  tlb_pend_q <= 1'b1;
      if (intr_return_i)  intr_pend_q <= 1'b0;
      else if (intr_i)    intr_pend_q <= 1'b1;

      if (hard_now && !stop_q) begin
        stop_q       <= 1'b1;
        hard_cause_q <= hard_cause;
      end

      // commit first; each later stage follows what the previous one applied
      ctl_pipe_q[0] <= '{pause: soft_now, stop: stop_q || hard_now};
      for (int unsigned k = 1; k < NUM_STAGES; k++) ctl_pipe_q[k] <= stage_ack_i[k-1];
    end
  end

  assign stage_ctl_o   = ctl_pipe_q;
  assign halt_o        = stop_q;
  assign seq_done_o    = stage_ack_i[NUM_STAGES-1].stop;
  assign soft_active_o = soft_now && !stop_q;
  assign cause_o       = stop_q ? hard_cause_q : soft_cause;
endmodule

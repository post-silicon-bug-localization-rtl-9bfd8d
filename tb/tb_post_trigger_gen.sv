// tb_post_trigger_gen: exercises every post-trigger of the generator with
// short gap thresholds (soft 10, hard 50 cycles) and checks, cycle by cycle,
// when pause/stop reach the commit stage and that each further stage towards
// fetch follows one cycle later; that soft triggers clear when their symptom
// does (retirement, TLB refill, handler return); that the TLB soft trigger
// can be disabled; and that each hard trigger halts with its cause code.
// Stages acknowledge the control they receive; normally at once, and in a
// last run only ACK_LAT cycles later, where each stage must then wait for
// the previous stage's acknowledgement (ACK_LAT+1 cycles per stage).
module tb_post_trigger_gen;
  import ifra_pkg::*;
  localparam int SG = 10, HG = 50;
  logic clk = 0, rst_n = 0;
  logic retire, par, res, fat, tmiss, trefill, segv, intr, iret, tdis;
  logic [1:0] lv;
  logic [63:0] la [2];
  rec_ctl_t ctl [NUM_STAGES];
  logic halt, soft_act, seq_done;
  rec_ctl_t ack [NUM_STAGES];
  localparam int ACK_LAT = 3;
  int ack_lat = 0;
  rec_ctl_t ack_dly [NUM_STAGES][ACK_LAT];
  trig_cause_e cause;
  int checks = 0, failures = 0;

  post_trigger_gen #(.SOFT_GAP(SG), .HARD_GAP(HG)) dut (
    .clk, .rst_n, .retire_i(retire), .parity_err_i(par), .residue_err_i(res),
    .fatal_exc_i(fat), .tlb_miss_i(tmiss), .tlb_refill_i(trefill), .segfault_i(segv),
    .intr_i(intr), .intr_return_i(iret), .lsu_valid_i(lv), .lsu_addr_i(la),
    .tlb_soft_dis_i(tdis), .stage_ack_i(ack), .stage_ctl_o(ctl), .seq_done_o(seq_done), .halt_o(halt), .soft_active_o(soft_act),
    .cause_o(cause));

  always #5 clk = ~clk;

  // stage acknowledgement: immediate, or ACK_LAT cycles late
  always_ff @(posedge clk)
    for (int k = 0; k < NUM_STAGES; k++) begin
      ack_dly[k][0] <= ctl[k];
      for (int j = 1; j < ACK_LAT; j++) ack_dly[k][j] <= ack_dly[k][j-1];
    end
  always_comb
    for (int k = 0; k < NUM_STAGES; k++) ack[k] = (ack_lat == 0) ? ctl[k] : ack_dly[k][ACK_LAT-1];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic idle_inputs();
    retire = 1; par = 0; res = 0; fat = 0; tmiss = 0; trefill = 0; segv = 0;
    intr = 0; iret = 0; tdis = 0; lv = '0; la[0] = 64'h1000; la[1] = 64'h2000;
  endtask

  task automatic do_reset();
    idle_inputs();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  // sample at the negedge, c cycles after the stimulus cycle
  function automatic logic [NUM_STAGES-1:0] pauses();
    for (int k = 0; k < NUM_STAGES; k++) pauses[k] = ctl[k].pause;
  endfunction
  function automatic logic [NUM_STAGES-1:0] stops();
    for (int k = 0; k < NUM_STAGES; k++) stops[k] = ctl[k].stop;
  endfunction

  // check that a pause (or stop) front reaches stage k exactly at cycle first+k
  task automatic watch(input bit is_stop, input int first, input int len, input string name);
    for (int c = 1; c <= len; c++) begin
      logic [NUM_STAGES-1:0] v, e;
      @(negedge clk);
      v = is_stop ? stops() : pauses();
      for (int k = 0; k < NUM_STAGES; k++) e[k] = (c >= first + k);
      chk(v == e, $sformatf("%s cycle %0d: got %b exp %b", name, c, v, e));
    end
  endtask

  task automatic hard_case(input string name, input trig_cause_e exp_cause);
    // stimulus for one cycle, stop one cycle later at commit, fetch 5 later
    @(negedge clk);
    chk(!halt, {name, ": not halted before"});
    case (exp_cause)
      TRIG_PARITY:   par = 1;
      TRIG_RESIDUE:  res = 1;
      TRIG_FATAL:    fat = 1;
      TRIG_SEGFAULT: segv = 1;
      TRIG_NULLADDR: begin lv = 2'b10; la[1] = '0; end
      default: ;
    endcase
    @(negedge clk);
    idle_inputs();
    chk(halt && cause == exp_cause, $sformatf("%s: halt %0d cause %s", name, halt, cause.name()));
    watch(1'b1, 0, 8, name);
  endtask

  initial begin
    do_reset();
    // running core: nothing fires, also a non-zero address on both LSUs
    lv = 2'b11;
    repeat (30) begin
      @(negedge clk);
      chk(pauses() == '0 && stops() == '0 && !halt, "quiet while retiring");
    end
    // short retirement gap: soft pause, then retirement resumes recording
    retire = 0;
    watch(1'b0, SG + 1, SG + 1 + 8, "soft gap");
    chk(soft_act && cause == TRIG_SOFT_GAP, "soft gap cause");
    retire = 1;
    @(negedge clk);
    retire = 0;
    #1 chk(pauses() == '1, "pause still held one cycle after retire");
    retire = 1;
    repeat (8) @(negedge clk);
    chk(pauses() == '0 && !halt, "soft gap cleared by retirement");
    // TLB miss pauses until refill
    @(negedge clk); tmiss = 1;
    @(negedge clk); tmiss = 0;
    watch(1'b0, 1, 10, "tlb miss");
    chk(cause == TRIG_SOFT_TLB, "tlb cause");
    trefill = 1;
    @(negedge clk); trefill = 0;
    repeat (8) @(negedge clk);
    chk(pauses() == '0, "tlb refill resumes");
    // disabled TLB soft trigger
    tdis = 1; tmiss = 1;
    repeat (10) @(negedge clk);
    chk(pauses() == '0, "tlb soft trigger disabled");
    tdis = 0; tmiss = 0;
    // interrupt handler
    @(negedge clk); intr = 1;
    @(negedge clk); intr = 0;
    watch(1'b0, 1, 8, "interrupt");
    chk(cause == TRIG_SOFT_INTR, "interrupt cause");
    iret = 1;
    @(negedge clk); iret = 0;
    repeat (8) @(negedge clk);
    chk(pauses() == '0 && !halt, "handler return resumes");
    // long retirement gap: hard deadlock
    @(negedge clk);
    retire = 0;
    watch(1'b1, HG + 1, HG + 10, "deadlock");
    chk(halt && cause == TRIG_DEADLOCK, "deadlock cause");
    // the other hard triggers, each from reset; stop stays latched
    do_reset(); hard_case("parity", TRIG_PARITY);
    repeat (3) @(negedge clk);
    chk(halt && stops() == '1, "stop stays latched");
    do_reset(); hard_case("residue", TRIG_RESIDUE);
    do_reset(); hard_case("fatal", TRIG_FATAL);
    do_reset(); hard_case("segfault", TRIG_SEGFAULT);
    do_reset(); hard_case("null address", TRIG_NULLADDR);
    chk(seq_done, "sequence done after all stages acknowledged");
    // slow acknowledgements: stage k stops (ACK_LAT+1)*k cycles after commit
    ack_lat = ACK_LAT;
    for (int k = 0; k < NUM_STAGES; k++) for (int j = 0; j < ACK_LAT; j++) ack_dly[k][j] = '0;
    do_reset();
    @(negedge clk); par = 1;
    @(negedge clk); idle_inputs();
    for (int c = 1; c <= 30; c++) begin
      logic [NUM_STAGES-1:0] e;
      @(negedge clk);
      for (int k = 0; k < NUM_STAGES; k++) e[k] = (c >= k * (ACK_LAT + 1));
      chk(stops() == e, $sformatf("slow ack cycle %0d: got %b exp %b", c, stops(), e));
      chk(seq_done == (c >= (NUM_STAGES - 1) * (ACK_LAT + 1) + ACK_LAT),
          $sformatf("slow ack seq_done cycle %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

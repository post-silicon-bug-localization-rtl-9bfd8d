// tb_ifra_top: end-to-end test of the IFRA recording infrastructure at its
// full default size (4-wide, n = 64, 1,024-entry recorders).
//
// The testbench plays a simple core: random fetch groups with sequential
// PCs, flushes, the decode stage fed from the unit's registered IDs, and
// dispatch, issue and ALU/MUL traffic that follows one stage per cycle, with
// random register names, operands, results, branch and load/store traffic
// and commits. For every recorder it keeps an independent model of what must
// be recorded: the expected ID sequence (consecutive mod 256, Y+129 after a
// flush by Y), residues computed with the % operator, and run-length
// compaction of idle cycles; recording is gated by the control each clock
// domain has received (read hierarchically). All domain clocks are driven
// from one clock here; tb_ifra_clock_domains runs them at different rates.
// The run passes through a TLB-miss pause, an interrupt pause and a retirement-gap pause, long idle stretches,
// buffer wrap-around and finally a null-address hard trigger. Everything is
// then scanned out and compared recorder by recorder. Each mechanism is
// counted and one that never happened counts as a failure.
module tb_ifra_top;
  import ifra_pkg::*;
  localparam int D = 1024, AW = 10, HW = AW + 2, NREC = 25;
  localparam int FPW [24] = '{40,40,40,40, 12,12,12,12, 14,14,14,14, 14,14,14,14,
                              11,11,11,11, 8,8, 43,43};
  localparam int SOFTGAP = 400;

  logic clk = 0, rst_n = 0;
  logic [3:0]  fetch_valid;  logic [31:0] fetch_pc [4];
  logic [3:0]  fid_valid;    logic [7:0]  fid [4];
  logic        flush;        logic [7:0]  flush_id;
  logic [3:0]  dec_valid;    logic [7:0]  dec_id [4]; logic [3:0] dec_bits [4];
  logic [3:0]  dis_valid;    logic [7:0]  dis_id [4]; logic [6:0] dis_reg [4][3];
  logic [3:0]  iss_valid;    logic [7:0]  iss_id [4]; logic [63:0] iss_opnd [4][2];
  logic [3:0]  ex_valid;     logic [7:0]  ex_id [4];  logic [63:0] ex_result [4];
  logic [1:0]  br_valid;     logic [7:0]  br_id [2];
  logic [1:0]  lsu_valid;    logic [7:0]  lsu_id [2]; logic [63:0] lsu_result [2], lsu_addr [2];
  logic [3:0]  cm_valid;     logic [7:0]  cm_id [4];  logic [3:0] cm_exc [4];
  logic par, res, fat, tmiss, trefill, segv, intr, iret, tdis;
  logic halt, soft_act, all_stopped, seq_done, go, sin, sout, sdone;
  trig_cause_e cause;
  logic [7:0] last_id; logic [3:0] last_exc;

  ifra_top dut (
    .clk_fetch(clk), .clk_decode(clk), .clk_dispatch(clk), .clk_issue(clk),
    .clk_alu(clk), .clk_mul(clk), .clk_branch(clk), .clk_lsu(clk), .clk_commit(clk),
    .rst_n,
    .fetch_valid_i(fetch_valid), .fetch_pc_i(fetch_pc),
    .fetch_id_valid_o(fid_valid), .fetch_id_o(fid),
    .flush_i(flush), .flush_id_i(flush_id),
    .dec_valid_i(dec_valid), .dec_id_i(dec_id), .dec_bits_i(dec_bits),
    .dis_valid_i(dis_valid), .dis_id_i(dis_id), .dis_reg_i(dis_reg),
    .iss_valid_i(iss_valid), .iss_id_i(iss_id), .iss_opnd_i(iss_opnd),
    .ex_valid_i(ex_valid), .ex_id_i(ex_id), .ex_result_i(ex_result),
    .br_valid_i(br_valid), .br_id_i(br_id),
    .lsu_valid_i(lsu_valid), .lsu_id_i(lsu_id), .lsu_result_i(lsu_result), .lsu_addr_i(lsu_addr),
    .commit_valid_i(cm_valid), .commit_id_i(cm_id), .commit_exc_i(cm_exc),
    .parity_err_i(par), .residue_err_i(res), .fatal_exc_i(fat),
    .tlb_miss_i(tmiss), .tlb_refill_i(trefill), .segfault_i(segv),
    .intr_i(intr), .intr_return_i(iret), .tlb_soft_dis_i(tdis),
    .halt_o(halt), .soft_active_o(soft_act), .cause_o(cause), .all_stopped_o(all_stopped), .stop_seq_done_o(seq_done),
    .commit_last_id_o(last_id), .commit_last_exc_o(last_exc),
    .scan_go_i(go), .scan_in_i(sin), .scan_out_o(sout), .scan_done_o(sdone));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_flush = 0, n_idwrap = 0, n_sat = 0, n_bufwrap = 0, n_pause_tlb = 0,
      n_pause_intr = 0, n_pause_gap = 0, n_hard = 0, n_staged = 0, n_scan = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------------ recorder models
  logic [63:0] exp_q [24][$];
  int          run_len [24];
  logic [11:0] exp_commit;

  function automatic int domain_of(int r);
    if (r < 4)  return D_FETCH;
    if (r < 8)  return D_DECODE;
    if (r < 12) return D_DISPATCH;
    if (r < 16) return D_ISSUE;
    if (r < 18) return D_ALU;
    if (r < 20) return D_MUL;
    if (r < 22) return D_BRANCH;
    return D_LSU;
  endfunction

  task automatic model(int r, bit v, logic [63:0] fp);
    int maxi;
    maxi = (FPW[r] >= 31) ? 32'h7fff_ffff : (1 << FPW[r]) - 1;
    if (v) begin
      exp_q[r].push_back(fp);
      run_len[r] = 0;
    end else if (run_len[r] > 0 && run_len[r] < maxi) begin
      run_len[r]++;
      exp_q[r][exp_q[r].size()-1] = (64'd1 << FPW[r]) | 64'(run_len[r]);
    end else begin
      if (run_len[r] == maxi) n_sat++;
      run_len[r] = 1;
      exp_q[r].push_back((64'd1 << FPW[r]) | 64'd1);
    end
    if (exp_q[r].size() > 2 * D) void'(exp_q[r].pop_front());
  endtask

  // ------------------------------------------------------ core stimulus
  int unsigned next_id;
  logic [31:0] pc;
  logic [3:0]  p_fv; logic [7:0] p_fid [4];         // this cycle's fetch IDs (reference)
  logic [3:0]  exp_fid_valid; logic [7:0] exp_fid [4];
  bit traffic;                                       // pipeline busy
  bit retire_on;
  bit null_now;

  task automatic drive_cycle();
    logic [3:0] nv;
    // pipeline: each stage takes the previous stage's group
    ex_valid = iss_valid; ex_id = iss_id;
    for (int s = 0; s < 4; s++) ex_result[s] = {$urandom, $urandom};
    iss_valid = dis_valid; iss_id = dis_id;
    for (int s = 0; s < 4; s++) begin iss_opnd[s][0] = {$urandom, $urandom}; iss_opnd[s][1] = {$urandom, $urandom}; end
    dis_valid = dec_valid; dis_id = dec_id;
    for (int s = 0; s < 4; s++) for (int k = 0; k < 3; k++) dis_reg[s][k] = 7'($urandom % 80);
    dec_valid = fid_valid; dec_id = fid;
    for (int s = 0; s < 4; s++) dec_bits[s] = 4'($urandom);
    // fetch
    nv = traffic ? 4'($urandom) : 4'b0;
    fetch_valid = nv;
    for (int s = 0; s < 4; s++) if (nv[s]) begin fetch_pc[s] = pc; pc += 4; end
    flush = traffic && ($urandom % 40 == 0);
    flush_id = 8'($urandom);
    // execution units without pipeline ordering
    br_valid  = traffic ? 2'($urandom) & 2'($urandom) : '0;
    lsu_valid = traffic ? 2'($urandom) : '0;
    for (int l = 0; l < 2; l++) begin
      br_id[l] = 8'($urandom); lsu_id[l] = 8'($urandom);
      lsu_result[l] = {$urandom, $urandom};
      lsu_addr[l] = {$urandom, $urandom | 32'h8};     // never zero
    end
    if (null_now) begin lsu_valid = 2'b01; lsu_addr[0] = '0; end
    cm_valid = retire_on ? (4'($urandom) | 4'b0001) : '0;
    for (int s = 0; s < 4; s++) begin
      cm_id[s] = 8'($urandom); cm_exc[s] = ($urandom % 16 == 0) ? 4'($urandom) : '0;
    end
  endtask

  // reference IDs and models, evaluated after inputs settle
  task automatic model_cycle();
    int unsigned k;
    rec_ctl_t ctl [NUM_DOMAINS];
    ctl = dut.dom_ctl;
    // IDs of the previous cycle arrive registered
    chk(fid_valid == exp_fid_valid, "fetch_id_valid_o");
    for (int s = 0; s < 4; s++) if (exp_fid_valid[s]) chk(fid[s] == exp_fid[s], "fetch_id_o");
    k = next_id;
    for (int s = 0; s < 4; s++) if (fetch_valid[s]) begin p_fid[s] = 8'(k); k = (k + 1) % 256; end
    if (k < next_id) n_idwrap++;
    next_id = flush ? (int'(flush_id) + 129) % 256 : k;
    if (flush) n_flush++;
    exp_fid_valid = flush ? '0 : fetch_valid;
    exp_fid = p_fid;
    // recorders
    for (int r = 0; r < 24; r++) begin
      rec_ctl_t c;
      bit v;
      logic [63:0] fp;
      c = ctl[domain_of(r)];
      if (c.pause || c.stop || dut.stopped[r]) continue;
      if (r < 4) begin
        v = fetch_valid[r]; fp = {24'd0, p_fid[r], fetch_pc[r]};
      end else if (r < 8) begin
        v = dec_valid[r-4]; fp = {52'd0, dec_id[r-4], dec_bits[r-4]};
      end else if (r < 12) begin
        int s; s = r - 8;
        v = dis_valid[s];
        fp = {50'd0, dis_id[s], 2'(dis_reg[s][2] % 3), 2'(dis_reg[s][1] % 3), 2'(dis_reg[s][0] % 3)};
      end else if (r < 16) begin
        int s; s = r - 12;
        v = iss_valid[s];
        fp = {50'd0, iss_id[s], 3'(iss_opnd[s][1] % 7), 3'(iss_opnd[s][0] % 7)};
      end else if (r < 20) begin
        int s; s = r - 16;
        v = ex_valid[s]; fp = {53'd0, ex_id[s], 3'(ex_result[s] % 7)};
      end else if (r < 22) begin
        v = br_valid[r-20]; fp = {56'd0, br_id[r-20]};
      end else begin
        int l; l = r - 22;
        v = lsu_valid[l]; fp = {21'd0, lsu_id[l], 3'(lsu_result[l] % 7), lsu_addr[l][31:0]};
      end
      model(r, v, fp);
    end
    if (!(ctl[D_COMMIT].pause || ctl[D_COMMIT].stop || dut.stopped[24]))
      for (int s = 0; s < 4; s++) if (cm_valid[s]) exp_commit = {cm_id[s], cm_exc[s]};
    // staged stop: commit already stopped while fetch still records
    if (ctl[D_COMMIT].stop && !ctl[D_FETCH].stop) n_staged++;
  endtask

  task automatic step(int n);
    repeat (n) begin
      @(negedge clk);
      drive_cycle();
      #1 model_cycle();
      if (soft_act && cause == TRIG_SOFT_TLB)  n_pause_tlb++;
      if (soft_act && cause == TRIG_SOFT_INTR) n_pause_intr++;
      if (soft_act && cause == TRIG_SOFT_GAP)  n_pause_gap++;
    end
  endtask

  // ------------------------------------------------------ scan-out check
  logic sbits [];

  task automatic check_scan();
    int pos, nbits;
    nbits = 12;
    for (int r = 0; r < 24; r++) nbits += HW + D * (FPW[r] + 1);
    sbits = new[nbits];
    go = 1; sin = 0;
    @(posedge clk);
    for (int b = 0; b < nbits; b++) begin
      @(negedge clk);
      sbits[b] = sout;
      if (b == nbits - 1) chk(sdone, "scan_done with last bit");
      else if (sdone) begin chk(0, $sformatf("scan_done early at bit %0d", b)); break; end
    end
    @(negedge clk);
    chk(sdone, "scan_done holds");
    n_scan++;
    pos = 0;
    for (int r = 0; r < 24; r++) begin
      int ew, ptr, wrapped, open_idle, youngest, nvalid;
      ew = FPW[r] + 1;
      ptr = 0;
      for (int i = 0; i < AW; i++) ptr |= int'(sbits[pos + i]) << i;
      wrapped = sbits[pos + AW]; open_idle = sbits[pos + AW + 1];
      if (wrapped) n_bufwrap++;
      youngest = open_idle ? ptr : (ptr + D - 1) % D;
      nvalid = wrapped ? D : youngest + 1;
      chk(nvalid == ((exp_q[r].size() > D) ? D : exp_q[r].size()),
          $sformatf("recorder %0d: %0d entries, model %0d", r, nvalid, exp_q[r].size()));
      for (int i = 0; i < nvalid && i < exp_q[r].size(); i++) begin
        int a;
        logic [63:0] got, e;
        a = wrapped ? (youngest + 1 + i) % D : i;
        got = '0;
        for (int b = 0; b < ew; b++) got[b] = sbits[pos + HW + a * ew + b];
        e = exp_q[r][exp_q[r].size() - nvalid + i];
        chk(got == e, $sformatf("recorder %0d entry %0d: got %h exp %h", r, i, got, e));
      end
      pos += HW + D * ew;
    end
    begin
      logic [11:0] got;
      for (int b = 0; b < 12; b++) got[b] = sbits[pos + b];
      chk(got == exp_commit, $sformatf("commit recorder %h exp %h", got, exp_commit));
    end
  endtask

  initial begin
    // quiet inputs
    fetch_valid = '0; flush = 0; flush_id = '0; dec_valid = '0; dis_valid = '0;
    iss_valid = '0; ex_valid = '0; br_valid = '0; lsu_valid = '0; cm_valid = '0;
    for (int s = 0; s < 4; s++) begin
      fetch_pc[s] = '0; dec_id[s] = '0; dec_bits[s] = '0; dis_id[s] = '0; iss_id[s] = '0;
      ex_id[s] = '0; ex_result[s] = '0; cm_id[s] = '0; cm_exc[s] = '0; p_fid[s] = '0; exp_fid[s] = '0;
      for (int k = 0; k < 3; k++) dis_reg[s][k] = '0;
      iss_opnd[s][0] = '0; iss_opnd[s][1] = '0;
    end
    for (int l = 0; l < 2; l++) begin br_id[l] = '0; lsu_id[l] = '0; lsu_result[l] = '0; lsu_addr[l] = 64'h100; end
    par = 0; res = 0; fat = 0; tmiss = 0; trefill = 0; segv = 0; intr = 0; iret = 0; tdis = 0;
    go = 0; sin = 0;
    next_id = 0; pc = 32'h0001_0000; exp_fid_valid = '0; exp_commit = '0;
    traffic = 1; retire_on = 1; null_now = 0;
    for (int r = 0; r < 24; r++) run_len[r] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    step(1500);
    // long idle stretch in every stage (saturates the branch recorders' runs)
    traffic = 0; step(300); traffic = 1;
    step(200);
    // TLB miss: recording pauses until the refill
    tmiss = 1; step(1); tmiss = 0;
    step(40);
    trefill = 1; step(1); trefill = 0;
    step(200);
    // interrupt handler
    intr = 1; step(1); intr = 0;
    step(30);
    iret = 1; step(1); iret = 0;
    step(200);
    // retirement gap longer than the soft threshold
    retire_on = 0; step(SOFTGAP + 50); retire_on = 1;
    step(1500);
    chk(!halt, "no hard trigger before the null access");
    // hard trigger: load from address zero
    null_now = 1; step(1); null_now = 0;
    step(40);
    chk(seq_done, "stop sequence acknowledged by every stage");
    chk(halt && cause == TRIG_NULLADDR, $sformatf("halt %0d cause %s", halt, cause.name()));
    chk(all_stopped, "all recorders stopped");
    if (halt) n_hard++;
    chk(last_id == exp_commit[11:4] && last_exc == exp_commit[3:0], "commit recorder outputs");
    check_scan();

    $display("flushes=%0d id_wraps=%0d saturated_idle_runs=%0d wrapped_recorders=%0d",
             n_flush, n_idwrap, n_sat, n_bufwrap);
    $display("pause_tlb=%0d pause_intr=%0d pause_gap=%0d hard=%0d staged_stop_cycles=%0d scans=%0d",
             n_pause_tlb, n_pause_intr, n_pause_gap, n_hard, n_staged, n_scan);
    chk(n_flush > 0, "flush exercised");
    chk(n_idwrap > 0, "ID wrap exercised");
    chk(n_sat > 0, "idle-run saturation exercised");
    chk(n_bufwrap > 0, "circular-buffer wrap exercised");
    chk(n_pause_tlb > 0, "TLB soft trigger exercised");
    chk(n_pause_intr > 0, "interrupt soft trigger exercised");
    chk(n_pause_gap > 0, "retirement-gap soft trigger exercised");
    chk(n_hard > 0, "hard trigger exercised");
    chk(n_staged > 0, "staged stop exercised");
    chk(n_scan > 0, "scan-out exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

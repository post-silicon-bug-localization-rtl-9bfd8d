// tb_ifra_clock_domains: runs ifra_top with its nine recorder clock domains
// at different, unrelated periods and checks the cross-domain behaviour:
// a soft trigger (TLB miss) and then a hard trigger (parity error) must
// reach the stages strictly in the order commit, execute (all four
// functional-unit domains), issue, dispatch, decode, fetch, each stage only
// after every domain of the previous one; the pause must clear again after
// the refill; after the stop every recorder reports stopped and the whole
// sequence is acknowledged. All clocks are then switched to one scan clock
// and the full chain is shifted out: its length, the done flag and the
// last footprint of fetch recorder 0 and of the commit register are checked
// against what the testbench saw being recorded in those domains.
module tb_ifra_clock_domains;
  import ifra_pkg::*;
  localparam int D = 1024, AW = 10, HW = AW + 2;
  localparam int FPW [24] = '{40,40,40,40, 12,12,12,12, 14,14,14,14, 14,14,14,14,
                              11,11,11,11, 8,8, 43,43};
  // half periods of fetch, decode, dispatch, issue, ALU, MUL, branch, LSU, commit
  localparam int HALF [NUM_DOMAINS] = '{5, 6, 7, 4, 3, 8, 5, 6, 5};

  logic free_clk [NUM_DOMAINS];
  logic scan_clk = 0, scan_mode = 0;
  logic dclk [NUM_DOMAINS];
  logic rst_n = 0;

  logic [3:0]  fetch_valid;  logic [31:0] fetch_pc [4];
  logic [3:0]  fid_valid;    logic [7:0]  fid [4];
  logic [3:0]  dec_valid;    logic [7:0]  dec_id [4]; logic [3:0] dec_bits [4];
  logic [3:0]  dis_valid;    logic [7:0]  dis_id [4]; logic [6:0] dis_reg [4][3];
  logic [3:0]  iss_valid;    logic [7:0]  iss_id [4]; logic [63:0] iss_opnd [4][2];
  logic [3:0]  ex_valid;     logic [7:0]  ex_id [4];  logic [63:0] ex_result [4];
  logic [1:0]  br_valid;     logic [7:0]  br_id [2];
  logic [1:0]  lsu_valid;    logic [7:0]  lsu_id [2]; logic [63:0] lsu_result [2], lsu_addr [2];
  logic [3:0]  cm_valid;     logic [7:0]  cm_id [4];  logic [3:0] cm_exc [4];
  logic par = 0, tmiss = 0, trefill = 0;
  logic halt, soft_act, all_stopped, seq_done, go, sin, sout, sdone;
  trig_cause_e cause;
  logic [7:0] last_id; logic [3:0] last_exc;
  int checks = 0, failures = 0;

  for (genvar d = 0; d < NUM_DOMAINS; d++) begin : g_clk
    initial begin
      free_clk[d] = 0;
      forever #(HALF[d]) free_clk[d] = ~free_clk[d];
    end
    assign dclk[d] = scan_mode ? scan_clk : free_clk[d];
  end
  always #5 scan_clk = ~scan_clk;

  ifra_top dut (
    .clk_fetch(dclk[D_FETCH]), .clk_decode(dclk[D_DECODE]), .clk_dispatch(dclk[D_DISPATCH]),
    .clk_issue(dclk[D_ISSUE]), .clk_alu(dclk[D_ALU]), .clk_mul(dclk[D_MUL]),
    .clk_branch(dclk[D_BRANCH]), .clk_lsu(dclk[D_LSU]), .clk_commit(dclk[D_COMMIT]),
    .rst_n,
    .fetch_valid_i(fetch_valid), .fetch_pc_i(fetch_pc),
    .fetch_id_valid_o(fid_valid), .fetch_id_o(fid),
    .flush_i(1'b0), .flush_id_i(8'd0),
    .dec_valid_i(dec_valid), .dec_id_i(dec_id), .dec_bits_i(dec_bits),
    .dis_valid_i(dis_valid), .dis_id_i(dis_id), .dis_reg_i(dis_reg),
    .iss_valid_i(iss_valid), .iss_id_i(iss_id), .iss_opnd_i(iss_opnd),
    .ex_valid_i(ex_valid), .ex_id_i(ex_id), .ex_result_i(ex_result),
    .br_valid_i(br_valid), .br_id_i(br_id),
    .lsu_valid_i(lsu_valid), .lsu_id_i(lsu_id), .lsu_result_i(lsu_result), .lsu_addr_i(lsu_addr),
    .commit_valid_i(cm_valid), .commit_id_i(cm_id), .commit_exc_i(cm_exc),
    .parity_err_i(par), .residue_err_i(1'b0), .fatal_exc_i(1'b0),
    .tlb_miss_i(tmiss), .tlb_refill_i(trefill), .segfault_i(1'b0),
    .intr_i(1'b0), .intr_return_i(1'b0), .tlb_soft_dis_i(1'b0),
    .halt_o(halt), .soft_active_o(soft_act), .cause_o(cause), .all_stopped_o(all_stopped),
    .stop_seq_done_o(seq_done), .commit_last_id_o(last_id), .commit_last_exc_o(last_exc),
    .scan_go_i(go), .scan_in_i(sin), .scan_out_o(sout), .scan_done_o(sdone));

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------------------------------------- per-domain random traffic
  logic [31:0] pc = 32'h0002_0000;
  logic [40:0] exp_fetch0;       // last entry expected in fetch recorder 0
  int          fetch0_idle;      // open idle run length in fetch recorder 0
  logic [11:0] exp_commit = '0;

  always @(negedge dclk[D_FETCH]) if (rst_n && !scan_mode) begin
    fetch_valid <= 4'($urandom);
    for (int s = 0; s < 4; s++) begin fetch_pc[s] <= pc + 32'(4 * s); end
    pc <= pc + 16;
  end
  // model of fetch recorder 0's youngest entry, sampled at its clock edge
  always @(posedge dclk[D_FETCH]) if (rst_n && !scan_mode) begin
    rec_ctl_t c;
    c = dut.dom_ctl[D_FETCH];
    if (!(c.pause || c.stop || dut.stopped[0])) begin
      if (fetch_valid[0]) begin
        exp_fetch0 <= {1'b0, dut.id_now[0], fetch_pc[0]};
        fetch0_idle <= 0;
      end else begin
        exp_fetch0 <= {1'b1, 40'(fetch0_idle + 1)};
        fetch0_idle <= fetch0_idle + 1;
      end
    end
  end
  always @(negedge dclk[D_DECODE]) if (!scan_mode) begin
    dec_valid <= 4'($urandom);
    for (int s = 0; s < 4; s++) begin dec_id[s] <= 8'($urandom); dec_bits[s] <= 4'($urandom); end
  end
  always @(negedge dclk[D_DISPATCH]) if (!scan_mode) begin
    dis_valid <= 4'($urandom);
    for (int s = 0; s < 4; s++) begin
      dis_id[s] <= 8'($urandom);
      for (int k = 0; k < 3; k++) dis_reg[s][k] <= 7'($urandom);
    end
  end
  always @(negedge dclk[D_ISSUE]) if (!scan_mode) begin
    iss_valid <= 4'($urandom);
    for (int s = 0; s < 4; s++) begin
      iss_id[s] <= 8'($urandom); iss_opnd[s][0] <= {$urandom, $urandom}; iss_opnd[s][1] <= {$urandom, $urandom};
    end
  end
  always @(negedge dclk[D_ALU]) if (!scan_mode) begin
    ex_valid[1:0] <= 2'($urandom);
    for (int s = 0; s < 2; s++) begin ex_id[s] <= 8'($urandom); ex_result[s] <= {$urandom, $urandom}; end
  end
  always @(negedge dclk[D_MUL]) if (!scan_mode) begin
    ex_valid[3:2] <= 2'($urandom);
    for (int s = 2; s < 4; s++) begin ex_id[s] <= 8'($urandom); ex_result[s] <= {$urandom, $urandom}; end
  end
  always @(negedge dclk[D_BRANCH]) if (!scan_mode) begin
    br_valid <= 2'($urandom);
    for (int l = 0; l < 2; l++) br_id[l] <= 8'($urandom);
  end
  always @(negedge dclk[D_LSU]) if (!scan_mode) begin
    lsu_valid <= 2'($urandom);
    for (int l = 0; l < 2; l++) begin
      lsu_id[l] <= 8'($urandom); lsu_result[l] <= {$urandom, $urandom}; lsu_addr[l] <= {$urandom, $urandom | 32'h4};
    end
  end
  always @(negedge dclk[D_COMMIT]) if (!scan_mode) begin
    cm_valid <= 4'($urandom) | 4'b0001;
    for (int s = 0; s < 4; s++) begin cm_id[s] <= 8'($urandom); cm_exc[s] <= 4'($urandom); end
  end
  always @(posedge dclk[D_COMMIT]) if (rst_n && !scan_mode) begin
    rec_ctl_t c;
    c = dut.dom_ctl[D_COMMIT];
    if (!(c.pause || c.stop || dut.stopped[24]))
      for (int s = 0; s < 4; s++) if (cm_valid[s]) exp_commit <= {cm_id[s], cm_exc[s]};
  end

  // ---------------------------------------------- arrival time of control
  time t_pause [NUM_DOMAINS], t_stop [NUM_DOMAINS], t_resume [NUM_DOMAINS];
  for (genvar d = 0; d < NUM_DOMAINS; d++) begin : g_mon
    always @(posedge dclk[d]) if (rst_n && !scan_mode) begin
      if (dut.dom_ctl[d].pause && t_pause[d] == 0) t_pause[d] = $time;
      if (!dut.dom_ctl[d].pause && t_pause[d] != 0 && t_resume[d] == 0) t_resume[d] = $time;
      if (dut.dom_ctl[d].stop && t_stop[d] == 0) t_stop[d] = $time;
    end
  end

  // latest arrival among a stage's domains, and earliest
  function automatic time stage_last(input time t [NUM_DOMAINS], input int st);
    time m = 0;
    for (int d = 0; d < NUM_DOMAINS; d++) begin
      bit in_st;
      case (st)
        ST_COMMIT:   in_st = (d == D_COMMIT);
        ST_EXECUTE:  in_st = (d == D_ALU || d == D_MUL || d == D_BRANCH || d == D_LSU);
        ST_ISSUE:    in_st = (d == D_ISSUE);
        ST_DISPATCH: in_st = (d == D_DISPATCH);
        ST_DECODE:   in_st = (d == D_DECODE);
        default:     in_st = (d == D_FETCH);
      endcase
      if (in_st && t[d] > m) m = t[d];
    end
    return m;
  endfunction
  function automatic time stage_first(input time t [NUM_DOMAINS], input int st);
    time m = '1;
    for (int d = 0; d < NUM_DOMAINS; d++) begin
      bit in_st;
      case (st)
        ST_COMMIT:   in_st = (d == D_COMMIT);
        ST_EXECUTE:  in_st = (d == D_ALU || d == D_MUL || d == D_BRANCH || d == D_LSU);
        ST_ISSUE:    in_st = (d == D_ISSUE);
        ST_DISPATCH: in_st = (d == D_DISPATCH);
        ST_DECODE:   in_st = (d == D_DECODE);
        default:     in_st = (d == D_FETCH);
      endcase
      if (in_st && t[d] < m) m = t[d];
    end
    return m;
  endfunction

  task automatic check_order(input time t [NUM_DOMAINS], input string what);
    for (int d = 0; d < NUM_DOMAINS; d++) chk(t[d] != 0, $sformatf("%s reached domain %0d", what, d));
    for (int st = 1; st < NUM_STAGES; st++)
      chk(stage_first(t, st) > stage_last(t, st - 1),
          $sformatf("%s: stage %0d at %0t not after stage %0d at %0t", what, st,
                    stage_first(t, st), st - 1, stage_last(t, st - 1)));
  endtask

  initial begin
    fetch_valid = '0; dec_valid = '0; dis_valid = '0; iss_valid = '0; ex_valid = '0;
    br_valid = '0; lsu_valid = '0; cm_valid = '0; go = 0; sin = 0;
    exp_fetch0 = '0; fetch0_idle = 0;
    for (int d = 0; d < NUM_DOMAINS; d++) begin t_pause[d] = 0; t_stop[d] = 0; t_resume[d] = 0; end
    #100 rst_n = 1;
    #20000;
    chk(!halt && !soft_act, "quiet while running");
    // soft trigger in the commit domain
    @(negedge dclk[D_COMMIT]); tmiss = 1;
    @(negedge dclk[D_COMMIT]); tmiss = 0;
    #3000;
    check_order(t_pause, "pause");
    chk(soft_act && cause == TRIG_SOFT_TLB, "TLB pause active");
    @(negedge dclk[D_COMMIT]); trefill = 1;
    @(negedge dclk[D_COMMIT]); trefill = 0;
    #3000;
    for (int d = 0; d < NUM_DOMAINS; d++) chk(t_resume[d] != 0 && !dut.dom_ctl[d].pause, $sformatf("domain %0d resumed", d));
    #20000;
    // hard trigger
    @(negedge dclk[D_COMMIT]); par = 1;
    @(negedge dclk[D_COMMIT]); par = 0;
    #3000;
    check_order(t_stop, "stop");
    chk(halt && cause == TRIG_PARITY, "parity halt");
    chk(all_stopped, "all recorders stopped");
    chk(seq_done, "stop sequence acknowledged");
    chk(last_id == exp_commit[11:4] && last_exc == exp_commit[3:0], "commit register");
    // scan-out on one clock
    scan_mode = 1;
    #100;
    begin
      int nbits, pos;
      logic [63:0] e0;
      logic [11:0] cm;
      int ptr, open_idle, youngest;
      logic sb [];
      nbits = 12;
      for (int r = 0; r < 24; r++) nbits += HW + D * (FPW[r] + 1);
      sb = new[nbits];
      @(negedge scan_clk); go = 1;
      @(posedge scan_clk);
      for (int b = 0; b < nbits; b++) begin
        @(negedge scan_clk);
        sb[b] = sout;
        if (b < nbits - 1 && sdone) begin chk(0, $sformatf("done early at %0d", b)); break; end
      end
      chk(sdone, "scan_done at the last bit");
      // fetch recorder 0 is first in the chain
      ptr = 0;
      for (int i = 0; i < AW; i++) ptr |= int'(sb[i]) << i;
      open_idle = sb[AW + 1];
      youngest = open_idle ? ptr : (ptr + D - 1) % D;
      e0 = '0;
      for (int b = 0; b < 41; b++) e0[b] = sb[HW + youngest * 41 + b];
      chk(e0 == 64'(exp_fetch0), $sformatf("fetch0 youngest entry %h exp %h", e0, exp_fetch0));
      pos = nbits - 12;
      for (int b = 0; b < 12; b++) cm[b] = sb[pos + b];
      chk(cm == exp_commit, $sformatf("commit register scanned %h exp %h", cm, exp_commit));
    end
    $display("stop arrival times: commit %0t, ALU %0t, MUL %0t, branch %0t, LSU %0t, issue %0t, dispatch %0t, decode %0t, fetch %0t",
             t_stop[D_COMMIT], t_stop[D_ALU], t_stop[D_MUL], t_stop[D_BRANCH], t_stop[D_LSU],
             t_stop[D_ISSUE], t_stop[D_DISPATCH], t_stop[D_DECODE], t_stop[D_FETCH]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

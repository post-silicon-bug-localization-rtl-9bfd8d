// ifra_top: instruction-footprint recording (IFRA) infrastructure for a
// 4-way out-of-order core with up to n = 64 instructions in flight.
//
// The core itself is outside this module: its pipeline stages present, per
// slot, a valid bit, the instruction's IFRA ID and the raw values the
// recorders summarise. Inside are
//   * id_assign_unit   IDs (log2(4n) = 8 bits) for instructions leaving
//                      fetch; the core carries fetch_id_o down its pipeline
//                      and presents it back at every later stage;
//   * 25 recorders     fetch x4 {ID, PC[31:0]}, decode x4 {ID, decoded bits},
//                      dispatch x4 {ID, three mod-3 register-name residues},
//                      issue x4 {ID, two mod-7 operand residues},
//                      ALU/MUL x4 {ID, mod-7 result residue}, branch x2 {ID},
//                      LSU x2 {ID, mod-7 result residue, address[31:0]},
//                      and the one-register commit recorder {ID, exception};
//   * post_trigger_gen soft triggers pause and hard triggers stop all
//                      recorders, commit stage first and fetch stage last,
//                      each stage only after the previous one acknowledged;
//   * a scan chain     after the stop, holding scan_go_i high shifts every
//                      recorder out on scan_out_o, one bit per clock, in the
//                      order fetch 0-3, decode 0-3, dispatch 0-3, issue 0-3,
//                      ALU/MUL 0-3, branch 0-1, LSU 0-1, commit, with no gap
//                      between recorders; scan_done_o rises with the last bit.
// Clocking: every in-order stage and every execute functional-unit type
// (ALU, MUL, branch, LSU) has its own clock input, as the method allows, so
// each may be scaled independently. The ID unit and the fetch recorders run
// on clk_fetch, the post-trigger generator on clk_commit. Recording control
// crosses into each domain through a two-flop synchroniser and the applied
// value is synchronised back as an acknowledgement; the generator moves on to
// the next stage (commit, execute, issue, dispatch, decode, fetch) only once
// the previous one has acknowledged, so a later stage never records past an
// earlier one whatever the clock ratios. The execute stage acknowledges when
// all four of its domains have. With all clocks tied together the stages
// follow each other five cycles apart. The core must present every input in
// its stage's domain (flush_i and flush_id_i in the fetch domain) and the
// failure symptoms in the commit domain. For scan-out all domain clocks must
// run from one clock (the usual scan-dump arrangement of the clock
// generator, outside this module), since the chain runs through every
// recorder. Reset is asynchronous; its release must be synchronised to each
// domain by the reset network.
// Recorder counts, widths and depths follow the document's recorder table;
// the recorded fields' bit order ({ID, aux} with ID in the upper bits), the
// residue field order (slot/operand 0 in the low bits), the synchronisers and
// the acknowledgement handshake are this design's choices.
module ifra_top
  import ifra_pkg::*;
#(
  parameter int unsigned DEPTH    = REC_DEPTH,
  parameter int unsigned SOFT_GAP = 400,
  parameter int unsigned HARD_GAP = 2_000_000_000
) (
  input  logic                 clk_fetch,
  input  logic                 clk_decode,
  input  logic                 clk_dispatch,
  input  logic                 clk_issue,
  input  logic                 clk_alu,
  input  logic                 clk_mul,
  input  logic                 clk_branch,
  input  logic                 clk_lsu,
  input  logic                 clk_commit,
  input  logic                 rst_n,
  // fetch stage
  input  logic [3:0]           fetch_valid_i,
  input  logic [REC_ADDR_W-1:0] fetch_pc_i     [4],
  output logic [3:0]           fetch_id_valid_o,           // registered, to decode
  output logic [ID_W-1:0]      fetch_id_o     [4],
  input  logic                 flush_i,
  input  logic [ID_W-1:0]      flush_id_i,
  // decode stage: decoded bits {fu[1:0], uses_dest, uses_src2}
  input  logic [3:0]           dec_valid_i,
  input  logic [ID_W-1:0]      dec_id_i       [4],
  input  logic [AUX_DECODE_W-1:0] dec_bits_i  [4],
  // dispatch stage: register names (two sources, one destination)
  input  logic [3:0]           dis_valid_i,
  input  logic [ID_W-1:0]      dis_id_i       [4],
  input  logic [PREG_W-1:0]    dis_reg_i      [4][3],
  // issue stage: operand values
  input  logic [3:0]           iss_valid_i,
  input  logic [ID_W-1:0]      iss_id_i       [4],
  input  logic [DATA_W-1:0]    iss_opnd_i     [4][2],
  // execute: ALU0, ALU1, MUL0, MUL1
  input  logic [3:0]           ex_valid_i,
  input  logic [ID_W-1:0]      ex_id_i        [4],
  input  logic [DATA_W-1:0]    ex_result_i    [4],
  // execute: branch units
  input  logic [1:0]           br_valid_i,
  input  logic [ID_W-1:0]      br_id_i        [2],
  // execute: load/store units
  input  logic [1:0]           lsu_valid_i,
  input  logic [ID_W-1:0]      lsu_id_i       [2],
  input  logic [DATA_W-1:0]    lsu_result_i   [2],
  input  logic [ADDR_W-1:0]    lsu_addr_i     [2],
  // commit stage
  input  logic [3:0]           commit_valid_i,
  input  logic [ID_W-1:0]      commit_id_i    [4],
  input  logic [AUX_COMMIT_W-1:0] commit_exc_i [4],
  // failure symptoms
  input  logic                 parity_err_i,
  input  logic                 residue_err_i,
  input  logic                 fatal_exc_i,
  input  logic                 tlb_miss_i,
  input  logic                 tlb_refill_i,
  input  logic                 segfault_i,
  input  logic                 intr_i,
  input  logic                 intr_return_i,
  input  logic                 tlb_soft_dis_i,
  // status
  output logic                 halt_o,
  output logic                 soft_active_o,
  output trig_cause_e          cause_o,
  output logic                 all_stopped_o,
  output logic                 stop_seq_done_o,     // every stage acknowledged the stop
  output logic [ID_W-1:0]      commit_last_id_o,    // youngest committed ID
  output logic [AUX_COMMIT_W-1:0] commit_last_exc_o,
  // scan-out (towards the boundary-scan port)
  input  logic                 scan_go_i,
  input  logic                 scan_in_i,
  output logic                 scan_out_o,
  output logic                 scan_done_o
);
  localparam int unsigned NREC = 25;
  localparam int unsigned R_FET = 0, R_DEC = 4, R_DIS = 8, R_ISS = 12,
                          R_EX = 16, R_BR = 20, R_LSU = 22, R_CM = 24;

  rec_ctl_t          stage_ctl [NUM_STAGES];   // generator output, clk_commit
  rec_ctl_t          stage_ack [NUM_STAGES];   // acknowledged, clk_commit
  rec_ctl_t          dom_ctl   [NUM_DOMAINS];  // applied in each domain
  rec_ctl_t          dom_ack   [NUM_DOMAINS];  // dom_ctl back in clk_commit
  logic              dom_clk   [NUM_DOMAINS];
  logic [NREC-1:0]   so, done, go, stopped;
  logic [ID_W-1:0]   id_now [4];

  // ------------------------------------------------------------ clock domains
  assign dom_clk[D_FETCH]    = clk_fetch;
  assign dom_clk[D_DECODE]   = clk_decode;
  assign dom_clk[D_DISPATCH] = clk_dispatch;
  assign dom_clk[D_ISSUE]    = clk_issue;
  assign dom_clk[D_ALU]      = clk_alu;
  assign dom_clk[D_MUL]      = clk_mul;
  assign dom_clk[D_BRANCH]   = clk_branch;
  assign dom_clk[D_LSU]      = clk_lsu;
  assign dom_clk[D_COMMIT]   = clk_commit;

  function automatic stage_e stage_of_domain(domain_e d);
    case (d)
      D_FETCH:    return ST_FETCH;
      D_DECODE:   return ST_DECODE;
      D_DISPATCH: return ST_DISPATCH;
      D_ISSUE:    return ST_ISSUE;
      D_COMMIT:   return ST_COMMIT;
      default:    return ST_EXECUTE;
    endcase
  endfunction

  for (genvar d = 0; d < NUM_DOMAINS; d++) begin : g_dom
    rec_ctl_sync u_to_dom (.clk(dom_clk[d]), .rst_n,
      .d_i(stage_ctl[stage_of_domain(domain_e'(d))]), .q_o(dom_ctl[d]));
    rec_ctl_sync u_ack (.clk(clk_commit), .rst_n, .d_i(dom_ctl[d]), .q_o(dom_ack[d]));
  end

  always_comb begin
    stage_ack[ST_COMMIT]   = dom_ack[D_COMMIT];
    stage_ack[ST_ISSUE]    = dom_ack[D_ISSUE];
    stage_ack[ST_DISPATCH] = dom_ack[D_DISPATCH];
    stage_ack[ST_DECODE]   = dom_ack[D_DECODE];
    stage_ack[ST_FETCH]    = dom_ack[D_FETCH];
    stage_ack[ST_EXECUTE].pause = dom_ack[D_ALU].pause && dom_ack[D_MUL].pause &&
                                  dom_ack[D_BRANCH].pause && dom_ack[D_LSU].pause;
    stage_ack[ST_EXECUTE].stop  = dom_ack[D_ALU].stop && dom_ack[D_MUL].stop &&
                                  dom_ack[D_BRANCH].stop && dom_ack[D_LSU].stop;
  end

  // ------------------------------------------------------------ ID assignment
  id_assign_unit #(.WIDTH(4), .MAX_INFLIGHT(MAX_INFLIGHT), .ID_W(ID_W)) u_ids (
    .clk(clk_fetch), .rst_n,
    .fetch_valid_i, .flush_i, .flush_id_i,
    .id_o(id_now), .id_valid_q_o(fetch_id_valid_o), .id_q_o(fetch_id_o));

  // ------------------------------------------------------- post-trigger gen
  post_trigger_gen #(.N_LSU(2), .A_W(ADDR_W), .SOFT_GAP(SOFT_GAP), .HARD_GAP(HARD_GAP)) u_ptg (
    .clk(clk_commit), .rst_n,
    .retire_i(|commit_valid_i), .parity_err_i, .residue_err_i, .fatal_exc_i,
    .tlb_miss_i, .tlb_refill_i, .segfault_i, .intr_i, .intr_return_i,
    .lsu_valid_i, .lsu_addr_i, .tlb_soft_dis_i,
    .stage_ack_i(stage_ack), .stage_ctl_o(stage_ctl), .seq_done_o(stop_seq_done_o), .halt_o, .soft_active_o, .cause_o);

  // ------------------------------------------------------------ scan chain
  always_comb begin
    for (int unsigned k = 0; k < NREC; k++)
      go[k] = scan_go_i && ((k == 0) ? 1'b1 : done[(k == 0) ? 0 : k-1]);
  end
  assign scan_out_o    = so[0];
  assign scan_done_o   = done[NREC-1];
  assign all_stopped_o = &stopped;

  // ------------------------------------------------------------- recorders
  for (genvar s = 0; s < 4; s++) begin : g_slot
    localparam int unsigned KF = R_FET + s, KD = R_DEC + s, KP = R_DIS + s,
                            KI = R_ISS + s, KE = R_EX + s;
    logic [1:0] rres [3];
    logic [2:0] ores [2];
    logic [2:0] eres;

    footprint_recorder #(.FP_W(ID_W + AUX_FETCH_W), .DEPTH(DEPTH)) u_fetch (
      .clk(clk_fetch), .rst_n, .fp_valid_i(fetch_valid_i[s]), .fp_i({id_now[s], fetch_pc_i[s]}),
      .ctl_i(dom_ctl[D_FETCH]), .stopped_o(stopped[KF]),
      .scan_go_i(go[KF]), .scan_in_i(so[KF+1]), .scan_out_o(so[KF]), .scan_done_o(done[KF]));

    footprint_recorder #(.FP_W(ID_W + AUX_DECODE_W), .DEPTH(DEPTH)) u_decode (
      .clk(clk_decode), .rst_n, .fp_valid_i(dec_valid_i[s]), .fp_i({dec_id_i[s], dec_bits_i[s]}),
      .ctl_i(dom_ctl[D_DECODE]), .stopped_o(stopped[KD]),
      .scan_go_i(go[KD]), .scan_in_i(so[KD+1]), .scan_out_o(so[KD]), .scan_done_o(done[KD]));

    for (genvar r = 0; r < 3; r++) begin : g_rres
      residue_gen #(.IN_W(PREG_W), .MOD(3)) u_res (.value_i(dis_reg_i[s][r]), .residue_o(rres[r]));
    end
    footprint_recorder #(.FP_W(ID_W + AUX_DISPATCH_W), .DEPTH(DEPTH)) u_dispatch (
      .clk(clk_dispatch), .rst_n, .fp_valid_i(dis_valid_i[s]), .fp_i({dis_id_i[s], rres[2], rres[1], rres[0]}),
      .ctl_i(dom_ctl[D_DISPATCH]), .stopped_o(stopped[KP]),
      .scan_go_i(go[KP]), .scan_in_i(so[KP+1]), .scan_out_o(so[KP]), .scan_done_o(done[KP]));

    for (genvar o = 0; o < 2; o++) begin : g_ores
      residue_gen #(.IN_W(DATA_W), .MOD(7)) u_res (.value_i(iss_opnd_i[s][o]), .residue_o(ores[o]));
    end
    footprint_recorder #(.FP_W(ID_W + AUX_ISSUE_W), .DEPTH(DEPTH)) u_issue (
      .clk(clk_issue), .rst_n, .fp_valid_i(iss_valid_i[s]), .fp_i({iss_id_i[s], ores[1], ores[0]}),
      .ctl_i(dom_ctl[D_ISSUE]), .stopped_o(stopped[KI]),
      .scan_go_i(go[KI]), .scan_in_i(so[KI+1]), .scan_out_o(so[KI]), .scan_done_o(done[KI]));

    residue_gen #(.IN_W(DATA_W), .MOD(7)) u_eres (.value_i(ex_result_i[s]), .residue_o(eres));
    footprint_recorder #(.FP_W(ID_W + AUX_EXEC_W), .DEPTH(DEPTH)) u_exec (
      .clk((s < 2) ? clk_alu : clk_mul), .rst_n, .fp_valid_i(ex_valid_i[s]), .fp_i({ex_id_i[s], eres}),
      .ctl_i((s < 2) ? dom_ctl[D_ALU] : dom_ctl[D_MUL]), .stopped_o(stopped[KE]),
      .scan_go_i(go[KE]), .scan_in_i(so[KE+1]), .scan_out_o(so[KE]), .scan_done_o(done[KE]));
  end

  for (genvar b = 0; b < 2; b++) begin : g_br
    localparam int unsigned KB = R_BR + b;
    footprint_recorder #(.FP_W(ID_W + AUX_BRANCH_W), .DEPTH(DEPTH)) u_branch (
      .clk(clk_branch), .rst_n, .fp_valid_i(br_valid_i[b]), .fp_i(br_id_i[b]),
      .ctl_i(dom_ctl[D_BRANCH]), .stopped_o(stopped[KB]),
      .scan_go_i(go[KB]), .scan_in_i(so[KB+1]), .scan_out_o(so[KB]), .scan_done_o(done[KB]));
  end

  for (genvar l = 0; l < 2; l++) begin : g_lsu
    localparam int unsigned KL = R_LSU + l;
    logic [2:0] lres;
    residue_gen #(.IN_W(DATA_W), .MOD(7)) u_lres (.value_i(lsu_result_i[l]), .residue_o(lres));
    footprint_recorder #(.FP_W(ID_W + AUX_LSU_W), .DEPTH(DEPTH)) u_lsu (
      .clk(clk_lsu), .rst_n, .fp_valid_i(lsu_valid_i[l]),
      .fp_i({lsu_id_i[l], lres, lsu_addr_i[l][REC_ADDR_W-1:0]}),
      .ctl_i(dom_ctl[D_LSU]), .stopped_o(stopped[KL]),
      .scan_go_i(go[KL]), .scan_in_i(so[KL+1]), .scan_out_o(so[KL]), .scan_done_o(done[KL]));
  end

  commit_recorder #(.WIDTH(4), .EXC_W(AUX_COMMIT_W)) u_commit (
    .clk(clk_commit), .rst_n, .commit_valid_i, .commit_id_i, .commit_exc_i,
    .ctl_i(dom_ctl[D_COMMIT]), .stopped_o(stopped[R_CM]),
    .last_id_o(commit_last_id_o), .last_exc_o(commit_last_exc_o),
    .scan_go_i(go[R_CM]), .scan_in_i(scan_in_i), .scan_out_o(so[R_CM]), .scan_done_o(done[R_CM]));
endmodule

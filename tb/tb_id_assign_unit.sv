// tb_id_assign_unit: drives random fetch groups and flushes into a 4-way,
// n = 64 ID-assignment unit and checks every ID against a reference that
// applies the three assignment rules directly: IDs start at 0, run
// consecutively modulo 4n over valid slots, and restart at Y+2n+1 after a
// flush by ID Y. Also checks the one-cycle-later registered copy. A second,
// 2-way instance with n = 16 (6-bit IDs, the width of the example unit drawn
// for a 2-way processor) runs alongside on the low two fetch slots with its
// own reference.
module tb_id_assign_unit;
  localparam int W = 4, N = 64, IDW = 8;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] fv;
  logic flush;
  logic [IDW-1:0] fid;
  logic [IDW-1:0] ids [W];
  logic [W-1:0] vq;
  logic [IDW-1:0] idq [W];
  int checks = 0, failures = 0, flushes = 0, wraps = 0;
  int unsigned next_id;             // reference: ID for the next valid instruction
  logic [IDW-1:0] exp_q [W];
  logic [W-1:0]   exp_vq;
  localparam int W2 = 2, N2 = 16, IDW2 = 6;
  logic [IDW2-1:0] ids2 [W2];
  logic [W2-1:0]   vq2;
  logic [IDW2-1:0] idq2 [W2];
  int unsigned     next_id2;

  id_assign_unit #(.WIDTH(W), .MAX_INFLIGHT(N)) dut (
    .clk, .rst_n, .fetch_valid_i(fv), .flush_i(flush), .flush_id_i(fid),
    .id_o(ids), .id_valid_q_o(vq), .id_q_o(idq));
  id_assign_unit #(.WIDTH(W2), .MAX_INFLIGHT(N2), .ID_W(IDW2)) dut2 (
    .clk, .rst_n, .fetch_valid_i(fv[W2-1:0]), .flush_i(flush), .flush_id_i(fid[IDW2-1:0]),
    .id_o(ids2), .id_valid_q_o(vq2), .id_q_o(idq2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fv = '0; flush = 0; fid = '0; next_id = 0; next_id2 = 0; exp_vq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // registered copy from the previous cycle
      if (cyc > 0) begin
        checks++;
        if (vq !== exp_vq) begin failures++; $display("FAIL vq %b exp %b", vq, exp_vq); end
        for (int s = 0; s < W; s++) if (exp_vq[s]) begin
          checks++;
          if (idq[s] !== exp_q[s]) begin failures++; $display("FAIL idq[%0d]", s); end
        end
      end
      fv    = 4'($urandom);
      flush = ($urandom % 23) == 0;
      fid   = 8'($urandom);
      #1;
      exp_vq = flush ? '0 : fv;
      begin
        automatic int unsigned k = next_id;
        for (int s = 0; s < W; s++) begin
          if (fv[s]) begin
            checks++;
            if (ids[s] !== 8'(k % (4*N))) begin
              failures++;
              $display("FAIL cyc %0d slot %0d id %0d exp %0d", cyc, s, ids[s], k % (4*N));
            end
            exp_q[s] = ids[s];
            k++;
          end
        end
        if ((k % (4*N)) < (next_id % (4*N))) wraps++;
        next_id = flush ? (int'(fid) + 2*N + 1) % (4*N) : k % (4*N);
      end
      begin
        automatic int unsigned k2 = next_id2;
        for (int s = 0; s < W2; s++) begin
          if (fv[s]) begin
            checks++;
            if (ids2[s] !== 6'(k2 % (4*N2))) begin
              failures++;
              $display("FAIL 2-way cyc %0d slot %0d id %0d exp %0d", cyc, s, ids2[s], k2 % (4*N2));
            end
            k2++;
          end
        end
        next_id2 = flush ? (int'(fid[IDW2-1:0]) + 2*N2 + 1) % (4*N2) : k2 % (4*N2);
      end
      if (flush) flushes++;
    end
    if (flushes == 0) begin failures++; $display("no flush exercised"); end
    if (wraps == 0) begin failures++; $display("no wrap exercised"); end
    $display("flushes=%0d wraps=%0d", flushes, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_commit_recorder: drives random 4-wide commit groups with exception
// codes and pauses into the commit-stage recorder, checks after every cycle
// that it holds the youngest committed {ID, exception} seen while recording,
// then stops it and checks the 12 scanned-out bits and their timing.
module tb_commit_recorder;
  import ifra_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] cv;
  logic [7:0] cid [4];
  logic [3:0] cexc [4];
  rec_ctl_t ctl;
  logic stopped, go, sin, sout, sdone;
  logic [7:0] lid;
  logic [3:0] lexc;
  logic [11:0] exp_rec, got;
  int checks = 0, failures = 0, n_pause = 0, n_multi = 0;

  commit_recorder dut (
    .clk, .rst_n, .commit_valid_i(cv), .commit_id_i(cid), .commit_exc_i(cexc),
    .ctl_i(ctl), .stopped_o(stopped), .last_id_o(lid), .last_exc_o(lexc),
    .scan_go_i(go), .scan_in_i(sin), .scan_out_o(sout), .scan_done_o(sdone));

  always #5 clk = ~clk;

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

  initial begin
    cv = '0; ctl = '0; go = 0; sin = 0;
    foreach (cid[s]) begin cid[s] = '0; cexc[s] = '0; end
    exp_rec = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      cv = 4'($urandom);
      foreach (cid[s]) begin cid[s] = 8'($urandom); cexc[s] = ($urandom % 8 == 0) ? 4'($urandom) : '0; end
      ctl.pause = ($urandom % 10) == 0;
      if (ctl.pause) n_pause++;
      if ($countones(cv) > 1) n_multi++;
      if (!ctl.pause)
        for (int s = 0; s < 4; s++) if (cv[s]) exp_rec = {cid[s], cexc[s]};
      @(negedge clk);
      chk({lid, lexc} == exp_rec, $sformatf("cycle %0d: got %h exp %h", c, {lid, lexc}, exp_rec));
    end
    cv = 4'hF; ctl.stop = 1;            // not recorded: stop wins
    @(negedge clk);
    ctl = '0; cv = '0;
    chk(stopped && {lid, lexc} == exp_rec, "stop holds the register");
    go = 1; sin = 1;
    @(posedge clk);
    for (int b = 0; b < 12; b++) begin
      @(negedge clk);
      got[b] = sout;
      chk(sdone == (b == 11), $sformatf("done at bit %0d", b));
    end
    chk(got == exp_rec, $sformatf("scanned %h exp %h", got, exp_rec));
    @(negedge clk);
    chk(sout == 1'b1 && sdone, "pass-through after done");
    chk(n_pause > 0 && n_multi > 0, "pauses and multi-commit groups exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

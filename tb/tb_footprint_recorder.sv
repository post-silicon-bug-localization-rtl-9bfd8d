// tb_footprint_recorder: records random footprint traffic (with idle runs
// longer than one entry can hold and with pauses) into a 16-entry recorder,
// stops it, scans it out and compares the unwrapped contents against a
// run-length model of the recorded cycles kept by this testbench. Checks the
// scan timing (first bit one cycle after scan_go, done with the last bit,
// pass-through afterwards). Runs a short (unwrapped) and a long (wrapped)
// trace.
module tb_footprint_recorder;
  import ifra_pkg::*;
  localparam int FPW = 4, D = 16, AW = 4, EW = FPW + 1, HW = AW + 2;
  localparam int MAXI = (1 << FPW) - 1;

  logic clk = 0, rst_n = 0;
  logic fv;
  logic [FPW-1:0] fp;
  rec_ctl_t ctl;
  logic stopped, go, sin, sout, sdone;
  int checks = 0, failures = 0;
  int n_sat = 0, n_pause = 0, n_wrap = 0;

  footprint_recorder #(.FP_W(FPW), .DEPTH(D)) dut (
    .clk, .rst_n, .fp_valid_i(fv), .fp_i(fp), .ctl_i(ctl), .stopped_o(stopped),
    .scan_go_i(go), .scan_in_i(sin), .scan_out_o(sout), .scan_done_o(sdone));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(input int cycles);
    int exp_q[$];        // expected entries, oldest first: {idle, payload}
    int run_len;
    logic [HW + D*EW - 1:0] bits;
    int hdr_ptr, wrapped, open_idle, youngest, n_valid;
    int got[$];
    fv = 0; fp = '0; ctl = '0; go = 0; sin = 1'b1;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    run_len = 0;
    for (int c = 0; c < cycles; c++) begin
      if (c > 0) @(negedge clk);
      // traffic with bursts of idleness and occasional pauses
      fv  = ($urandom % 100) < ((c / 40) % 2 ? 80 : 5);
      fp  = FPW'($urandom);
      ctl.pause = (c % 97) > 90;
      if (!ctl.pause) begin
        if (fv) begin
          exp_q.push_back(int'({1'b0, fp}));
          run_len = 0;
        end else if (run_len > 0 && run_len < MAXI) begin
          run_len++;
          exp_q[exp_q.size()-1] = int'({1'b1, FPW'(run_len)});
        end else begin
          if (run_len == MAXI) n_sat++;
          run_len = 1;
          exp_q.push_back(int'({1'b1, FPW'(1)}));
        end
      end else n_pause++;
    end
    @(negedge clk);
    fv = 1; ctl.stop = 1;                  // the stop cycle itself is not recorded
    @(negedge clk);
    fv = 0; ctl = '0;
    chk(stopped, "stopped_o after stop");
    // scan out
    go = 1;
    @(posedge clk);
    for (int b = 0; b < HW + D*EW; b++) begin
      @(negedge clk);
      bits[b] = sout;
      chk(sdone == (b == HW + D*EW - 1), $sformatf("scan_done at bit %0d", b));
    end
    @(negedge clk);
    sin = 1'b0; #1;
    chk(sout == 1'b0 && sdone, "pass-through after done (0)");
    sin = 1'b1; #1;
    chk(sout == 1'b1, "pass-through after done (1)");
    go = 0;
    // decode header and unwrap
    hdr_ptr   = int'(bits[AW-1:0]);
    wrapped   = int'(bits[AW]);
    open_idle = int'(bits[AW+1]);
    youngest  = open_idle ? hdr_ptr : (hdr_ptr + D - 1) % D;
    n_valid   = wrapped ? D : youngest + 1;
    if (wrapped) n_wrap++;
    for (int i = 0; i < n_valid; i++) begin
      int a = wrapped ? (youngest + 1 + i) % D : i;
      got.push_back(int'(bits[HW + a*EW +: EW]));
    end
    chk(wrapped == (exp_q.size() > D), $sformatf("wrapped flag %0d for %0d entries", wrapped, exp_q.size()));
    chk(n_valid == ((exp_q.size() > D) ? D : exp_q.size()), "number of entries");
    for (int i = 0; i < n_valid && i < exp_q.size(); i++) begin
      int e = exp_q[exp_q.size() - n_valid + i];
      chk(got[i] == e, $sformatf("entry %0d: got %h exp %h (ptr %0d open %0d n %0d)", i, got[i], e, hdr_ptr, open_idle, exp_q.size()));
    end
  endtask

  initial begin
    run(8);
    run(30);
    run(600);
    run(1500);
    chk(n_sat > 0, "idle-run saturation exercised");
    chk(n_pause > 0, "pause exercised");
    chk(n_wrap > 0, "buffer wrap exercised");
    $display("saturated runs=%0d paused cycles=%0d wrapped runs=%0d", n_sat, n_pause, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

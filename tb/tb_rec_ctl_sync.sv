// tb_rec_ctl_sync: drives random {pause, stop} values into rec_ctl_sync
// from a source clock unrelated to the destination clock and checks, at
// every destination edge, that the output equals the input as sampled
// STAGES destination edges earlier (the input is changed away from the
// destination edge, so sampling is unambiguous). Also checks the reset
// value and a build with three stages.
module tb_rec_ctl_sync;
  import ifra_pkg::*;
  logic clk = 0, rst_n = 0;
  rec_ctl_t d;
  rec_ctl_t q2, q3;
  rec_ctl_t hist [4];
  int checks = 0, failures = 0;

  rec_ctl_sync dut2 (.clk, .rst_n, .d_i(d), .q_o(q2));
  rec_ctl_sync #(.STAGES(3)) dut3 (.clk, .rst_n, .d_i(d), .q_o(q3));

  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source side: changes at times that are never a destination edge
  initial begin
    d = '0;
    forever begin
      #(7 + 10 * ($urandom % 3));
      d = rec_ctl_t'($urandom);
    end
  end

  initial begin
    d = '0;
    for (int k = 0; k < 4; k++) hist[k] = '0;
    #3 d = '1;
    #10;
    checks++; if (q2 != '0 || q3 != '0) begin failures++; $display("FAIL reset value"); end
    @(negedge clk) rst_n = 1;
    repeat (2000) begin
      @(posedge clk);
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = d;
      #1;
      checks++;
      if (q2 != hist[1]) begin failures++; $display("FAIL 2-stage %b exp %b at %0t", q2, hist[1], $time); end
      checks++;
      if (q3 != hist[2]) begin failures++; $display("FAIL 3-stage %b exp %b at %0t", q3, hist[2], $time); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rec_ctl_sync: brings recording control (rec_ctl_t {pause, stop}) into
// another clock domain through a chain of STAGES flip-flops per bit. Both
// bits are levels that change rarely and are held far longer than a few
// destination cycles, and stop never falls once raised, so independent
// per-bit synchronisers are sufficient; a one-cycle skew between pause and
// stop is harmless because either one halts recording. Used in both
// directions: from the post-trigger generator into each stage's clock
// domain, and back as the acknowledgement that a stage has applied it.
// Latency: STAGES cycles of clk. Reset clears the chain (no pause, no stop).
module rec_ctl_sync
  import ifra_pkg::*;
#(
  parameter int unsigned STAGES = 2
) (
  input  logic     clk,     // destination clock
  input  logic     rst_n,
  input  rec_ctl_t d_i,     // from the source domain
  output rec_ctl_t q_o
);
  rec_ctl_t chain_q [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < STAGES; k++) chain_q[k] <= '0;
    end else begin
      chain_q[0] <= d_i;
      for (int unsigned k = 1; k < STAGES; k++) chain_q[k] <= chain_q[k-1];
    end
  end

  assign q_o = chain_q[STAGES-1];
endmodule

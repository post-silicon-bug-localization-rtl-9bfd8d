// footprint_recorder: one IFRA instruction-footprint recorder.
//
// Each cycle its pipeline slot either delivers a footprint (instruction ID
// plus the stage's auxiliary information, FP_W bits in all) or is idle. The
// recorder writes footprints into a DEPTH-entry circular buffer that simply
// overwrites its oldest entry, so it always holds the most recent history.
// Runs of idle cycles are compacted into a single entry. A post-trigger
// "pause" holds recording (a soft post-trigger: the core keeps running), and
// a "stop" ends it for good (hard post-trigger). After the stop the buffer
// is serialised onto a daisy-chained scan path.
//
// Entry format (ENTRY_W = FP_W + 1 bits): bit FP_W is the idle flag. With
// the flag clear, bits FP_W-1:0 are a footprint. With it set, they are the
// number of consecutive idle cycles the entry stands for (1 .. 2^FP_W-1); a
// longer run continues in the next entry. The idle flag and this count
// encoding are this design's choice: the document says only that idle runs
// occupy a single entry and are expanded again off-line.
//
// Scan-out: while scan_go_i is high and the recorder is stopped, it shifts
// out, LSB first, one bit per clock: a header {open_idle, wrapped, wr_ptr}
// (AW+2 bits; wr_ptr is the next entry to write, wrapped says the buffer has
// gone round at least once, open_idle says entry wr_ptr holds an unfinished
// idle run), then the DEPTH entries in address order 0..DEPTH-1, each LSB
// first. Unwrapping (oldest first) is left to off-line software. When not
// shifting its own data the recorder passes scan_in_i straight to
// scan_out_o, and scan_done_o rises during its last bit so the next
// recorder up the chain starts without a gap. The first header bit appears
// on scan_out_o one cycle after scan_go_i is sampled high.
module footprint_recorder
  import ifra_pkg::*;
#(
  parameter int unsigned FP_W  = ID_W + AUX_FETCH_W,
  parameter int unsigned DEPTH = REC_DEPTH
) (
  input  logic            clk,
  input  logic            rst_n,
  // footprint input from the pipeline stage
  input  logic            fp_valid_i,
  input  logic [FP_W-1:0] fp_i,
  // recording control from the post-trigger generator
  input  rec_ctl_t        ctl_i,
  output logic            stopped_o,
  // scan chain
  input  logic            scan_go_i,
  input  logic            scan_in_i,
  output logic            scan_out_o,
  output logic            scan_done_o
);
  localparam int unsigned AW      = $clog2(DEPTH);
  localparam int unsigned ENTRY_W = FP_W + 1;
  localparam int unsigned HDR_W   = AW + 2;
  localparam int unsigned SH_W    = (ENTRY_W > HDR_W) ? ENTRY_W : HDR_W;
  localparam int unsigned BC_W    = $clog2(SH_W + 1);
  localparam logic [FP_W-1:0] MAX_IDLE = '1;

  initial assert (DEPTH == (1 << AW)) else $error("footprint_recorder: DEPTH must be a power of 2");

  logic [ENTRY_W-1:0] mem [DEPTH];
  logic [AW-1:0]      wr_ptr_q;
  logic               wrapped_q;
  logic [FP_W-1:0]    idle_cnt_q;   // length of the open idle run (0: none)
  logic               stop_q;
  logic               recording;
  logic               wr_en;
  logic [AW-1:0]      wr_addr;
  logic [ENTRY_W-1:0] wr_data;
  logic               wraps;    // the pointer passes the end of the buffer

  assign recording = !stop_q && !ctl_i.stop && !ctl_i.pause;
  assign stopped_o = stop_q;

  // ---------------------------------------------------------------- recording
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr_q   <= '0;
      wrapped_q  <= 1'b0;
      idle_cnt_q <= '0;
      stop_q     <= 1'b0;
    end else begin
      if (ctl_i.stop) stop_q <= 1'b1;
      if (recording) begin
        if (fp_valid_i) begin
          idle_cnt_q <= '0;            // the open idle run (if any) is closed
          wr_ptr_q   <= wr_addr + 1'b1;
          if (wraps) wrapped_q <= 1'b1;
        end else if (idle_cnt_q == MAX_IDLE) begin
          // run is full: it stays where it is, a new run starts after it
          wr_ptr_q   <= wr_addr;
          idle_cnt_q <= FP_W'(1);
          if (wraps) wrapped_q <= 1'b1;
        end else begin
          idle_cnt_q <= idle_cnt_q + 1'b1;
        end
      end
    end
  end

  // buffer write port (no reset: an SRAM-like array). A footprint goes to
  // wr_ptr, or to the entry after it when wr_ptr holds an open idle run.
  always_comb begin
    wr_en   = recording;
    wr_addr = wr_ptr_q;
    wr_data = {1'b1, idle_cnt_q + 1'b1};
    if (fp_valid_i) begin
      wr_addr = wr_ptr_q + ((idle_cnt_q != '0) ? AW'(1) : AW'(0));
      wr_data = {1'b0, fp_i};
    end else if (idle_cnt_q == MAX_IDLE) begin
      wr_addr = wr_ptr_q + AW'(1);
      wr_data = {1'b1, FP_W'(1)};
    end
    wraps = (wr_addr < wr_ptr_q) || (wr_addr == AW'(DEPTH - 1) && fp_valid_i);
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  // ---------------------------------------------------------------- scan-out
  typedef enum logic [1:0] {SC_IDLE, SC_SHIFT, SC_DONE} scan_state_e;
  scan_state_e     sc_state_q;
  logic [SH_W-1:0] shreg_q;
  logic [BC_W-1:0] bits_left_q;   // bits of shreg_q still to send, incl. current
  logic [AW:0]     entries_q;     // entries loaded so far
  logic            last_bit;

  assign last_bit = (sc_state_q == SC_SHIFT) && (bits_left_q == BC_W'(1)) &&
                    (entries_q == (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc_state_q  <= SC_IDLE;
      shreg_q     <= '0;
      bits_left_q <= '0;
      entries_q   <= '0;
    end else begin
      unique case (sc_state_q)
        SC_IDLE: if (scan_go_i && stop_q) begin
          shreg_q     <= SH_W'({(idle_cnt_q != '0), wrapped_q, wr_ptr_q});
          bits_left_q <= BC_W'(HDR_W);
          entries_q   <= '0;
          sc_state_q  <= SC_SHIFT;
        end
        SC_SHIFT: begin
          if (bits_left_q == BC_W'(1)) begin
            if (entries_q == (AW+1)'(DEPTH)) begin
              sc_state_q <= SC_DONE;
            end else begin
              shreg_q     <= SH_W'(mem[entries_q[AW-1:0]]);
              bits_left_q <= BC_W'(ENTRY_W);
              entries_q   <= entries_q + 1'b1;
            end
          end else begin
            shreg_q     <= shreg_q >> 1;
            bits_left_q <= bits_left_q - 1'b1;
          end
        end
        SC_DONE: if (!scan_go_i) sc_state_q <= SC_IDLE;
        default: sc_state_q <= SC_IDLE;
      endcase
    end
  end

  assign scan_out_o  = (sc_state_q == SC_SHIFT) ? shreg_q[0] : scan_in_i;
  assign scan_done_o = (sc_state_q == SC_DONE) || last_bit;

  // scan-out is only meaningful once recording has stopped
  a_scan_after_stop: assert property (@(posedge clk) disable iff (!rst_n)
    (sc_state_q == SC_SHIFT) |-> stop_q);
endmodule

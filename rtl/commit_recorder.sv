// commit_recorder: the commit-stage IFRA recorder. Unlike the other
// recorders it has no circular buffer, only one register holding the ID of
// the youngest instruction committed so far and the fatal-exception code that
// instruction raised (0: none). Up to WIDTH instructions commit per cycle, in
// slot order, so the youngest is the highest-numbered valid slot. The
// register follows the same pause/stop control as the other recorders.
// After the stop, while scan_go_i is high it shifts its FP_W bits
// ({id, exc}, LSB first) onto the scan chain starting one cycle after
// scan_go_i is sampled, passes scan_in_i through otherwise, and raises
// scan_done_o during its last bit. The single register and the 4-bit code
// are the document's; the slot convention and scan protocol are this
// design's.
module commit_recorder
  import ifra_pkg::*;
#(
  parameter int unsigned WIDTH = FETCH_WIDTH,
  parameter int unsigned EXC_W = AUX_COMMIT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] commit_valid_i,
  input  logic [ID_W-1:0]  commit_id_i  [WIDTH],
  input  logic [EXC_W-1:0] commit_exc_i [WIDTH],
  input  rec_ctl_t         ctl_i,
  output logic             stopped_o,
  output logic [ID_W-1:0]  last_id_o,
  output logic [EXC_W-1:0] last_exc_o,
  input  logic             scan_go_i,
  input  logic             scan_in_i,
  output logic             scan_out_o,
  output logic             scan_done_o
);
  localparam int unsigned FP_W = ID_W + EXC_W;
  localparam int unsigned BC_W = $clog2(FP_W + 1);

  logic            stop_q;
  logic [FP_W-1:0] rec_q;
  logic            recording;

  assign recording  = !stop_q && !ctl_i.stop && !ctl_i.pause;
  assign stopped_o  = stop_q;
  assign {last_id_o, last_exc_o} = rec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stop_q <= 1'b0;
      rec_q  <= '0;
    end else begin
      if (ctl_i.stop) stop_q <= 1'b1;
      if (recording) begin
        for (int unsigned s = 0; s < WIDTH; s++)
          if (commit_valid_i[s]) rec_q <= {commit_id_i[s], commit_exc_i[s]};
      end
    end
  end

  typedef enum logic [1:0] {SC_IDLE, SC_SHIFT, SC_DONE} scan_state_e;
  scan_state_e     sc_state_q;
  logic [FP_W-1:0] shreg_q;
  logic [BC_W-1:0] bits_left_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc_state_q  <= SC_IDLE;
      shreg_q     <= '0;
      bits_left_q <= '0;
    end else begin
      unique case (sc_state_q)
        SC_IDLE: if (scan_go_i && stop_q) begin
          shreg_q     <= rec_q;
          bits_left_q <= BC_W'(FP_W);
          sc_state_q  <= SC_SHIFT;
        end
        SC_SHIFT: begin
          shreg_q     <= shreg_q >> 1;
          bits_left_q <= bits_left_q - 1'b1;
          if (bits_left_q == BC_W'(1)) sc_state_q <= SC_DONE;
        end
        SC_DONE: if (!scan_go_i) sc_state_q <= SC_IDLE;
        default: sc_state_q <= SC_IDLE;
      endcase
    end
  end

  assign scan_out_o  = (sc_state_q == SC_SHIFT) ? shreg_q[0] : scan_in_i;
  assign scan_done_o = (sc_state_q == SC_DONE) ||
                       (sc_state_q == SC_SHIFT && bits_left_q == BC_W'(1));
endmodule

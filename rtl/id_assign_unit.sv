// id_assign_unit: IFRA instruction-ID assignment for a WIDTH-way fetch.
// IDs are log2(4n) bits wide (n = instructions in flight). Each cycle the q
// valid instructions leaving fetch receive X+1 .. X+q (mod 4n), in slot
// order, where X is the last ID handed out; after reset the first ID is 0.
// When the instruction with ID Y causes a pipeline flush, X is overwritten
// with Y+2n (mod 4n), so the first instruction fetched afterwards gets
// Y+2n+1. These three rules are the document's. This design's choices: valid
// slots need not be contiguous (IDs go to valid slots in slot order), a flush
// takes priority over instructions leaving fetch in the same cycle (those are
// younger than the flushing instruction and are flushed anyway), and the IDs
// are given combinationally in the cycle the instructions leave fetch (for
// the fetch-stage recorders) and registered one cycle later (for the
// decode-stage pipeline register), as in the block diagram.
module id_assign_unit #(
  parameter int unsigned WIDTH        = 4,
  parameter int unsigned MAX_INFLIGHT = 64,
  parameter int unsigned ID_W         = $clog2(4 * MAX_INFLIGHT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [WIDTH-1:0]      fetch_valid_i,   // instruction in slot leaves fetch
  input  logic                  flush_i,         // pipeline flush
  input  logic [ID_W-1:0]       flush_id_i,      // ID Y of the flush-causing instruction
  output logic [ID_W-1:0]       id_o      [WIDTH], // IDs this cycle (to fetch recorders)
  output logic [WIDTH-1:0]      id_valid_q_o,      // registered copy for decode
  output logic [ID_W-1:0]       id_q_o    [WIDTH]
);
  localparam int unsigned MODN = 4 * MAX_INFLIGHT;

  logic [ID_W-1:0] last_id_q;  // X
  logic [ID_W-1:0] next_last;

  initial assert (MODN == (1 << ID_W)) else $error("id_assign_unit: ID_W must be log2(4n)");

  always_comb begin
    logic [ID_W-1:0] cnt;
    cnt = '0;
    for (int unsigned s = 0; s < WIDTH; s++) begin
      if (fetch_valid_i[s]) cnt = cnt + 1'b1;
      id_o[s] = last_id_q + cnt;    // slot's ID if valid, wraps mod 4n
    end
    if (flush_i) next_last = flush_id_i + ID_W'(2 * MAX_INFLIGHT);
    else         next_last = last_id_q + cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_id_q    <= '1;        // X = -1, so the first ID is 0 (Rule 1)
      id_valid_q_o <= '0;
      for (int unsigned s = 0; s < WIDTH; s++) id_q_o[s] <= '0;
    end else begin
      last_id_q    <= next_last;
      id_valid_q_o <= flush_i ? '0 : fetch_valid_i;
      for (int unsigned s = 0; s < WIDTH; s++) id_q_o[s] <= id_o[s];
    end
  end
endmodule

// ocp_prio_queue: priority queue of the response scheduler.
//
// Holds up to DEPTH response beats, each with a priority set by the priority
// setter. The head is the entry with the smallest priority value; among equal
// priorities the oldest entry wins, so beats of the same TagID (which always
// get the same priority) leave in the order they arrived. Entries are kept in
// arrival order in a shifting array: a pop removes the chosen entry and closes
// the gap, a push appends at the end. Push and pop may happen in the same
// cycle; a push into a full queue is ignored (the caller checks full).
//
// Depth 4 is the configuration the bus is specified with; the smallest-value
// first ordering and the age tie-break are this design's reading of "returned
// from the first priority to the last priority".
module ocp_prio_queue #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned PW    = ocp_pkg::PW,
  parameter int unsigned W     = $bits(ocp_pkg::ocp_rsp_t)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [PW-1:0] push_prio,
  input  logic [W-1:0]  push_data,
  input  logic          pop,
  output logic          head_valid,
  output logic [PW-1:0] head_prio,
  output logic [W-1:0]  head_data,
  output logic          empty,
  output logic          full
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [PW-1:0] prio_q [DEPTH];
  logic [W-1:0]  data_q [DEPTH];
  logic [CW-1:0] count;
  logic [IW-1:0] head_idx;

  assign empty      = (count == '0);
  assign full       = (count == CW'(DEPTH));
  assign head_valid = !empty;

  // Head: first entry (oldest) holding the minimum priority value
  always_comb begin
    head_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (CW'(i) < count && prio_q[i] <= prio_q[head_idx]) head_idx = IW'(i);
    end
    head_prio = prio_q[head_idx];
    head_data = data_q[head_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        prio_q[i] <= '0;
        data_q[i] <= '0;
      end
    end else begin
      automatic logic do_pop  = pop && !empty;
      automatic logic do_push = push && (!full || do_pop);
      automatic logic [CW-1:0] n = count;
      if (do_pop) begin
        for (int i = 0; i < DEPTH - 1; i++) begin
          if (IW'(i) >= head_idx) begin
            prio_q[i] <= prio_q[i+1];
            data_q[i] <= data_q[i+1];
          end
        end
        n = n - 1'b1;
      end
      if (do_push) begin
        prio_q[n[IW-1:0]] <= push_prio;
        data_q[n[IW-1:0]] <= push_data;
        n = n + 1'b1;
      end
      count <= n;
    end
  end
endmodule

// ocp_scheduler: response scheduler of one master port.
//
// Returns the responses of all slaves to one master without breaking the OCP
// ordering rule: responses of transactions with the same TagID come back in
// request order, responses with different TagIDs may overtake each other.
// Transactions without a TagID (in_order = 1) form one more ordering class.
//
// Parts, in the order a response beat passes them:
//  * MUX1 picks one of the slaves' response beats, the slave with the lowest
//    index first (slave NUM_SLAVES, the FSM-S's ERR generator, is last).
//    Slaves marked blocked are skipped until the recorder changes.
//  * MUX2 chooses between MUX1 and the loop-back buffer and always prefers a
//    loop-back beat that may now go.
//  * The recorder keeps, in request order, one entry per outstanding
//    transaction of this master: target slave, TagID / in-order class and
//    beats still to come. The FSM-S appends entries; the last beat of a
//    transaction removes its entry.
//  * The comparator lets a beat pass when the oldest recorder entry of its
//    class belongs to the slave it came from. A beat that fails is sent back
//    into the loop-back buffer (LB_DEPTH beats); if that is full it stays at
//    its slave, which is then blocked.
//  * The priority setter gives a passing beat the priority TagID + 1, and an
//    in-order beat priority 0 (in-order first, ooo_first = 0) or the largest
//    value (out-of-order first, ooo_first = 1).
//  * The priority queue (Q_DEPTH beats) releases the smallest priority value
//    first, oldest first among equals. When it is empty a passing beat skips
//    it and goes straight to the output register.
// The output register holds the beat on SResp until the master's
// MRespAccept, so a presented response never changes.
//
// Deadlock freedom: a slave that keeps a beat because the loop-back buffer is
// full also holds up its responses to other masters, which could close a
// cycle of waiting masters. The recorder therefore reserves loop-back room
// when it admits a transaction. An entry is "exposed" when an older entry of
// its class targets another slave: only the beats of exposed entries can
// fail the comparator (a slave answers in order, so an entry with all older
// entries of its class at its own slave always finds them finished). A
// transaction is admitted (rec_ok) if the recorder has a free entry and, when
// it would be exposed itself, the beats in the loop-back buffer plus the
// beats still due to exposed entries plus its own beats fit in LB_DEPTH.
// Every failing beat then finds room, and no slave is ever blocked.
//
// The part list and the flow between them follow the document; the slave
// priority order, the admission rule, the buffer sizes other than the queue
// depth of 4, and the output register are this design's choices.
module ocp_scheduler
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = ocp_pkg::DEF_NUM_SLAVES,
  parameter int unsigned REC_DEPTH  = 4,
  parameter int unsigned LB_DEPTH   = REC_DEPTH - 1,
  parameter int unsigned Q_DEPTH    = 4,
  localparam int unsigned NIN       = NUM_SLAVES + 1,
  localparam int unsigned SIDW      = $clog2(NUM_SLAVES + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ooo_first,        // 1: out-of-order responses first
  // response beats of the slaves (index NUM_SLAVES: ERR generator)
  input  logic            in_valid [NIN],
  input  ocp_rsp_t        in_rsp   [NIN],
  output logic            in_ready [NIN],
  // recorder entry from the FSM-S
  input  logic            rec_valid,
  input  logic [SIDW-1:0] rec_sid,
  input  logic [TW-1:0]   rec_tag,
  input  logic            rec_in_order,
  input  logic [BLW-1:0]  rec_beats,
  output logic            rec_ok,
  input  logic            rec_push,
  // OCP response to the master core
  output logic            m_rsp_valid,
  output ocp_rsp_t        m_rsp,
  input  logic            m_rsp_accept
);
  localparam int unsigned RCW = $clog2(REC_DEPTH + 1);
  localparam int unsigned RIW = (REC_DEPTH > 1) ? $clog2(REC_DEPTH) : 1;
  localparam int unsigned LIW = (LB_DEPTH > 1) ? $clog2(LB_DEPTH) : 1;
  localparam int unsigned BUW = BLW + $clog2(REC_DEPTH + LB_DEPTH + 2) + 1;

  // ---------------- recorder ----------------
  logic [SIDW-1:0] r_sid   [REC_DEPTH];
  logic [TW-1:0]   r_tag   [REC_DEPTH];
  logic            r_io    [REC_DEPTH];
  logic [BLW-1:0]  r_left  [REC_DEPTH];
  logic [RCW-1:0]  r_count;

  // ---------------- loop-back buffer ----------------
  logic            lb_v   [LB_DEPTH];
  ocp_rsp_t        lb_rsp [LB_DEPTH];
  logic [SIDW-1:0] lb_sid [LB_DEPTH];

  logic [LIW:0]    lb_cnt;   // entries, kept oldest first

  // recorder admission
  logic            r_exposed [REC_DEPTH]; // an older entry of its class is elsewhere
  logic            rec_exposed;           // the new entry would be exposed
  logic [BUW-1:0]  budget;                // loop-back beats taken or reserved
  logic [NIN-1:0]  blocked;

  // ---------------- output register ----------------
  logic            out_v;
  ocp_rsp_t        out_rsp;

  function automatic logic same_class(input logic io_a, input logic [TW-1:0] tag_a,
                                      input logic io_b, input logic [TW-1:0] tag_b);
    return (io_a && io_b) || (!io_a && !io_b && tag_a == tag_b);
  endfunction

  // Comparator: index of the oldest entry of the beat's class, and whether
  // that entry belongs to the beat's slave.
  function automatic logic [RIW:0] oldest(input logic io, input logic [TW-1:0] tag);
    logic [RIW:0] r;
    r = '0;
    for (int i = REC_DEPTH - 1; i >= 0; i--) begin
      if (RCW'(i) < r_count && same_class(r_io[i], r_tag[i], io, tag)) r = {1'b1, RIW'(i)};
    end
    return r;
  endfunction

  function automatic logic beat_ok(input ocp_rsp_t b, input logic [SIDW-1:0] sid);
    logic [RIW:0] o;
    o = oldest(b.in_order, b.tag);
    // a beat no entry is waiting for is let through rather than kept forever
    return !o[RIW] || (r_sid[o[RIW-1:0]] == sid);
  endfunction

  // ---------------- datapath control ----------------
  logic            lb_hit, m1_hit, cand_v, cand_ok, bypass, push_q, pop_q, fwd;
  logic [LIW-1:0]  lb_sel;
  logic            lb_free;
  logic [SIDW-1:0] m1_sel;
  ocp_rsp_t        cand;
  logic [PW-1:0]   cand_prio;
  logic [RIW:0]    cand_rec;
  logic            q_valid, q_empty, q_full;
  logic [PW-1:0]   q_prio;
  logic [$bits(ocp_rsp_t)-1:0] q_data;
  ocp_rsp_t        q_head;
  logic            out_free, to_lb, block_m1, rec_remove;

  always_comb begin
    // MUX2 side: first loop-back beat that may go now
    lb_hit = 1'b0;
    lb_sel = '0;
    for (int i = LB_DEPTH - 1; i >= 0; i--) begin
      if (lb_v[i] && beat_ok(lb_rsp[i], lb_sid[i])) begin
        lb_hit = 1'b1;
        lb_sel = LIW'(i);
      end
    end
    lb_free = (lb_cnt < (LIW+1)'(LB_DEPTH));
    // MUX1: highest-priority (lowest index) slave with a beat, not blocked
    m1_hit = 1'b0;
    m1_sel = '0;
    for (int s = NIN - 1; s >= 0; s--) begin
      if (in_valid[s] && !blocked[s]) begin
        m1_hit = 1'b1;
        m1_sel = SIDW'(s);
      end
    end
    // MUX2
    cand     = lb_hit ? lb_rsp[lb_sel] : in_rsp[m1_sel];
    cand_v   = lb_hit || m1_hit;
    cand_ok  = lb_hit || (m1_hit && beat_ok(in_rsp[m1_sel], m1_sel));
    cand_rec = oldest(cand.in_order, cand.tag);
    // priority setter
    if (cand.in_order) cand_prio = ooo_first ? '1 : '0;
    else               cand_prio = PW'(cand.tag) + 1'b1;
    // priority queue / bypass / output register
    out_free = !out_v || m_rsp_accept;
    pop_q    = q_valid && out_free;
    bypass   = cand_v && cand_ok && q_empty && out_free;
    push_q   = cand_v && cand_ok && !bypass && (!q_full || pop_q);
    fwd      = bypass || push_q;
    // comparator failed: back into the loop-back buffer, or block the slave
    to_lb    = !lb_hit && m1_hit && !cand_ok && lb_free;
    block_m1 = !lb_hit && m1_hit && !cand_ok && !lb_free;
    rec_remove = fwd && cand_rec[RIW] && (r_left[cand_rec[RIW-1:0]] == BLW'(1));

    for (int s = 0; s < NIN; s++) in_ready[s] = 1'b0;
    if (!lb_hit && m1_hit && (fwd || to_lb)) in_ready[m1_sel] = 1'b1;

    // recorder admission: loop-back room for every beat that can fail
    budget      = BUW'(lb_cnt);
    rec_exposed = 1'b0;
    for (int i = 0; i < REC_DEPTH; i++) begin
      r_exposed[i] = 1'b0;
      for (int j = 0; j < i; j++) begin
        if (same_class(r_io[j], r_tag[j], r_io[i], r_tag[i]) && r_sid[j] != r_sid[i])
          r_exposed[i] = 1'b1;
      end
      if (RCW'(i) < r_count) begin
        if (r_exposed[i]) budget = budget + BUW'(r_left[i]);
        if (same_class(r_io[i], r_tag[i], rec_in_order, rec_tag) && r_sid[i] != rec_sid)
          rec_exposed = 1'b1;
      end
    end
    rec_ok = rec_valid && (r_count < RCW'(REC_DEPTH)) &&
             (!rec_exposed || budget + BUW'(rec_beats) <= BUW'(LB_DEPTH));
  end

  ocp_prio_queue #(.DEPTH(Q_DEPTH), .PW(PW), .W($bits(ocp_rsp_t))) u_queue (
    .clk, .rst_n,
    .push      (push_q),
    .push_prio (cand_prio),
    .push_data (cand),
    .pop       (pop_q),
    .head_valid(q_valid),
    .head_prio (q_prio),
    .head_data (q_data),
    .empty     (q_empty),
    .full      (q_full)
  );

  assign q_head      = ocp_rsp_t'(q_data);
  assign m_rsp_valid = out_v;
  assign m_rsp       = out_rsp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_v   <= 1'b0;
      out_rsp <= '0;
    end else begin
      if (pop_q) begin
        out_v   <= 1'b1;
        out_rsp <= ocp_rsp_t'(q_data);
      end else if (bypass) begin
        out_v   <= 1'b1;
        out_rsp <= cand;
      end else if (m_rsp_accept) begin
        out_v   <= 1'b0;
      end
    end
  end

  // loop-back buffer (oldest first, so beats of one slave keep their order)
  // and blocked slaves
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blocked <= '0;
      lb_cnt  <= '0;
      for (int i = 0; i < LB_DEPTH; i++) begin
        lb_v[i]   <= 1'b0;
        lb_rsp[i] <= '0;
        lb_sid[i] <= '0;
      end
    end else begin
      automatic logic [LIW:0] n = lb_cnt;
      if (lb_hit && fwd) begin
        for (int i = 0; i < LB_DEPTH; i++) begin
          if (LIW'(i) >= lb_sel) begin
            if (i < LB_DEPTH - 1) begin
              lb_v[i]   <= lb_v[i+1];
              lb_rsp[i] <= lb_rsp[i+1];
              lb_sid[i] <= lb_sid[i+1];
            end else begin
              lb_v[i]   <= 1'b0;
            end
          end
        end
        n = n - 1'b1;
      end
      if (to_lb) begin
        lb_v[n[LIW-1:0]]   <= 1'b1;
        lb_rsp[n[LIW-1:0]] <= in_rsp[m1_sel];
        lb_sid[n[LIW-1:0]] <= m1_sel;
        n = n + 1'b1;
      end
      lb_cnt <= n;
      if (rec_remove)    blocked <= '0;
      else if (block_m1) blocked[m1_sel] <= 1'b1;
    end
  end

  // recorder update: count down / remove the served entry, append a new one
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_count <= '0;
      for (int i = 0; i < REC_DEPTH; i++) begin
        r_sid[i]   <= '0;
        r_tag[i]   <= '0;
        r_io[i]    <= 1'b0;
        r_left[i]  <= '0;
      end
    end else begin
      automatic logic [RCW-1:0] n = r_count;
      automatic logic [RIW-1:0] k = cand_rec[RIW-1:0];
      if (fwd && cand_rec[RIW]) begin
        if (rec_remove) begin
          for (int i = 0; i < REC_DEPTH - 1; i++) begin
            if (RIW'(i) >= k) begin
              r_sid[i]   <= r_sid[i+1];
              r_tag[i]   <= r_tag[i+1];
              r_io[i]    <= r_io[i+1];
              r_left[i]  <= r_left[i+1];
            end
          end
          n = n - 1'b1;
        end else begin
          r_left[k] <= r_left[k] - 1'b1;
        end
      end
      if (rec_push && rec_ok) begin
        r_sid[n[RIW-1:0]]   <= rec_sid;
        r_tag[n[RIW-1:0]]   <= rec_tag;
        r_io[n[RIW-1:0]]    <= rec_in_order;
        r_left[n[RIW-1:0]]  <= rec_beats;
        n = n + 1'b1;
      end
      r_count <= n;
    end
  end

  // Every response beat belongs to a recorded transaction.
  // A presented response stays until accepted (the output register only
  // loads when it is free).
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_known: assert (!fwd || cand_rec[RIW]);
      a_hold:  assert (!(out_v && !m_rsp_accept) || !(pop_q || bypass));
      // the queue head carries the priority the setter gives its class
      a_prio:  assert (!q_valid ||
                       (q_head.in_order ? (q_prio == '0 || q_prio == '1)
                                        : (q_prio == PW'(q_head.tag) + 1'b1)));
    end
  end
endmodule

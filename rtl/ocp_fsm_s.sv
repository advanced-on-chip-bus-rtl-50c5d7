// ocp_fsm_s: slave-side state machine of one master port (FSM-S).
//
// The FSM-S acts as the OCP slave that a master core talks to. It takes the
// master's request beats, sends them towards the decoded slave and returns
// SCmdAccept to the master once the slave side has taken the beat. It keeps
// the beat count of a burst so that the arbiter holds the slave for the whole
// burst, and it raises hold for OCP lock transactions as well.
//  * The first beat of a transaction (single request, first beat of a
//    single-request burst, or any beat of a multi-request burst) is routed
//    with the decoder's slave index.
//  * The later data beats of a single-request write burst go to the slave of
//    the first beat, marked as continuation beats.
//  * Every read, and every transaction to an illegal address, is entered in
//    the scheduler's recorder when it is accepted; the FSM-S waits while the
//    scheduler reports that it cannot take the entry.
//  * A transaction to an illegal address is accepted by the FSM-S itself and
//    answered with ERR: as many ERR beats as a read would have returned data
//    beats, one ERR beat for a write. These beats enter the scheduler as the
//    responses of an extra, lowest-priority slave.
// The master's response side (SResp, SData, STagID, MRespAccept) is served by
// the scheduler directly.
//
// The split of the request handling into FSM-S and FSM-M follows the
// document; posting writes, the ERR beat counts and the recorder hand-shake
// are this design's choices.
module ocp_fsm_s
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = ocp_pkg::DEF_NUM_SLAVES,
  localparam int unsigned SIDW      = $clog2(NUM_SLAVES + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // OCP request from the master core
  input  ocp_req_t        m_req,
  output logic            m_cmd_accept,
  // decoder
  input  logic [SIDW-1:0] dec_sid,
  input  logic            dec_err,
  // towards the arbiters / MUXes of the slaves
  output logic            out_valid,
  output logic [SIDW-1:0] out_sid,
  output bus_req_t        out_req,
  output logic            out_hold,
  input  logic            out_ready,   // granted and taken by the slave's FSM-M
  // recorder entry in the scheduler
  output logic            rec_valid,   // request to record (drives can_issue)
  output logic [SIDW-1:0] rec_sid,
  output logic [TW-1:0]   rec_tag,
  output logic            rec_in_order,
  output logic [BLW-1:0]  rec_beats,
  input  logic            rec_ok,      // recorder can take the entry
  output logic            rec_push,    // entry is recorded this cycle
  // ERR responses (an extra slave input of the scheduler)
  output logic            err_valid,
  output ocp_rsp_t        err_rsp,
  input  logic            err_ready
);
  // burst progress
  logic            in_burst;       // beats of a burst still to come
  logic [BLW-1:0]  beat;           // index of the current beat
  logic [BLW-1:0]  blen;           // beats of the running burst
  logic            bsrmd;          // running burst is a single-request burst
  logic [SIDW-1:0] bsid;           // slave of a running single-request write burst
  logic            berr;           // running single-request write burst is illegal

  // ERR generator
  logic            eg_busy;
  logic [BLW-1:0]  eg_left;
  logic [TW-1:0]   eg_tag;
  logic            eg_in_order;

  logic            active, cont, first, is_rd, illegal, needs_rec, last_beat, accept;
  logic [BLW-1:0]  len0;

  always_comb begin
    active    = (m_req.cmd != CMD_IDLE);
    is_rd     = (m_req.cmd == CMD_RD);
    len0      = beats(m_req.burst_len);
    cont      = in_burst && bsrmd;            // data beat of an SRMD write burst
    first     = !cont;                        // opens a recorded transaction
    illegal   = cont ? berr : dec_err;
    // beats of this request the arbiter has to keep together
    if (in_burst) last_beat = (beat == blen - 1'b1);
    else          last_beat = (m_req.single_req && is_rd) || (len0 == BLW'(1));
    needs_rec = first && (is_rd || illegal);

    rec_valid    = active && needs_rec;
    rec_sid      = illegal ? SIDW'(NUM_SLAVES) : dec_sid;
    rec_tag      = m_req.tag;
    rec_in_order = m_req.in_order;
    rec_beats    = (is_rd && m_req.single_req) ? len0 : BLW'(1);

    out_sid          = cont ? bsid : dec_sid;
    out_req.req      = m_req;
    out_req.cont     = cont;
    out_req.last     = last_beat;
    out_hold         = m_req.lock || !last_beat;
    out_valid        = active && !illegal && (!needs_rec || rec_ok);

    if (illegal) begin
      // absorbed here; a new ERR transaction needs the generator free
      accept = active && (needs_rec ? (rec_ok && !eg_busy) : 1'b1);
    end else begin
      accept = out_valid && out_ready;
    end
    m_cmd_accept = accept;
    rec_push     = accept && needs_rec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_burst <= 1'b0;
      beat     <= '0;
      blen     <= '0;
      bsrmd    <= 1'b0;
      bsid     <= '0;
      berr     <= 1'b0;
    end else if (accept) begin
      if (!in_burst) begin
        if (!last_beat) begin
          in_burst <= 1'b1;
          beat     <= BLW'(1);
          blen     <= len0;
          bsrmd    <= m_req.single_req;
          bsid     <= dec_sid;
          berr     <= dec_err;
        end
      end else begin
        beat <= beat + 1'b1;
        if (last_beat) in_burst <= 1'b0;
      end
    end
  end

  // ERR generator
  assign err_valid = eg_busy;
  assign err_rsp   = '{resp: RESP_ERR, data: '0, tag: eg_tag, in_order: eg_in_order,
                       last: (eg_left == BLW'(1))};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eg_busy     <= 1'b0;
      eg_left     <= '0;
      eg_tag      <= '0;
      eg_in_order <= 1'b0;
    end else begin
      if (eg_busy && err_ready) begin
        eg_left <= eg_left - 1'b1;
        if (eg_left == BLW'(1)) eg_busy <= 1'b0;
      end
      if (accept && illegal && needs_rec) begin
        eg_busy     <= 1'b1;
        eg_left     <= rec_beats;
        eg_tag      <= m_req.tag;
        eg_in_order <= m_req.in_order;
      end
    end
  end

  // A new ERR transaction is only taken while the generator is idle.
  always_ff @(posedge clk) begin
    if (rst_n) a_eg: assert (!(accept && illegal && needs_rec) || !eg_busy);
  end
endmodule

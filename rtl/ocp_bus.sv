// ocp_bus: crossbar on-chip bus with OCP master and slave ports.
//
// NUM_MASTERS master cores and NUM_SLAVES slave cores are joined by a full
// crossbar, so different masters can talk to different slaves in the same
// cycle. Per master port there is an FSM-S (OCP slave towards the core), an
// address decoder and a response scheduler; per slave port an arbiter, a
// request MUX and an FSM-M (OCP master towards the core).
//
// Request path: master -> FSM-S (decoder picks the slave) -> arbiter of that
// slave grants -> MUX -> FSM-M -> slave. A beat is accepted (SCmdAccept) in
// the cycle the slave accepts the access it turns into, so an idle path has
// no added latency. Response path: slave -> FSM-M (adds master, TagID) ->
// scheduler of that master (ordering, priority queue) -> output register ->
// master, at least one cycle.
//
// Transactions supported: single reads/writes; multi-request and
// single-request bursts (burst_len beats, addresses in 8-byte steps); lock
// (lock = 1 keeps the slave's arbiter on the master); pipelined reads (up to
// 4 outstanding per master, limited by the recorder); out-of-order reads
// (TagID, in_order = 0). Writes are posted. Illegal addresses get ERR.
// ooo_first selects whether in-order or out-of-order responses are favoured.
//
// Master port m: m_req[m] is held until m_cmd_accept[m]; m_rsp[m] is valid
// while m_rsp_valid[m] and held until m_rsp_accept[m]. Slave port s is a
// single-beat OCP port: s_req[s].cmd != IDLE until s_cmd_accept[s]; s_resp[s]
// != NULL presents s_data[s] until s_rsp_accept[s]; reads answer in order.
module ocp_bus
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = ocp_pkg::DEF_NUM_MASTERS,
  parameter int unsigned NUM_SLAVES  = ocp_pkg::DEF_NUM_SLAVES,
  parameter int unsigned Q_DEPTH     = 4,
  parameter int unsigned REC_DEPTH   = 4,
  localparam int unsigned MIDW       = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1,
  localparam int unsigned SIDW       = $clog2(NUM_SLAVES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ooo_first,
  // master ports
  input  ocp_req_t      m_req        [NUM_MASTERS],
  output logic          m_cmd_accept [NUM_MASTERS],
  output logic          m_rsp_valid  [NUM_MASTERS],
  output ocp_rsp_t      m_rsp        [NUM_MASTERS],
  input  logic          m_rsp_accept [NUM_MASTERS],
  // slave ports
  output slv_req_t      s_req        [NUM_SLAVES],
  input  logic          s_cmd_accept [NUM_SLAVES],
  input  resp_e         s_resp       [NUM_SLAVES],
  input  logic [DW-1:0] s_data       [NUM_SLAVES],
  output logic          s_rsp_accept [NUM_SLAVES]
);
  // master side
  logic [SIDW-1:0]       dec_sid  [NUM_MASTERS];
  logic [NUM_SLAVES-1:0] dec_sel  [NUM_MASTERS];
  logic                  dec_err  [NUM_MASTERS];
  logic                  f_valid  [NUM_MASTERS];
  logic [SIDW-1:0]       f_sid    [NUM_MASTERS];
  bus_req_t              f_req    [NUM_MASTERS];
  logic                  f_hold   [NUM_MASTERS];
  logic                  f_ready  [NUM_MASTERS];
  logic                  rec_valid[NUM_MASTERS];
  logic [SIDW-1:0]       rec_sid  [NUM_MASTERS];
  logic [TW-1:0]         rec_tag  [NUM_MASTERS];
  logic                  rec_io   [NUM_MASTERS];
  logic [BLW-1:0]        rec_beats[NUM_MASTERS];
  logic                  rec_ok   [NUM_MASTERS];
  logic                  rec_push [NUM_MASTERS];
  logic                  sc_valid [NUM_MASTERS][NUM_SLAVES+1];
  ocp_rsp_t              sc_rsp   [NUM_MASTERS][NUM_SLAVES+1];
  logic                  sc_ready [NUM_MASTERS][NUM_SLAVES+1];

  // slave side
  logic [NUM_MASTERS-1:0] a_req   [NUM_SLAVES];
  logic [NUM_MASTERS-1:0] a_hold  [NUM_SLAVES];
  logic [NUM_MASTERS-1:0] a_gnt   [NUM_SLAVES];
  logic [MIDW-1:0]        a_idx   [NUM_SLAVES];
  logic                   a_valid [NUM_SLAVES];
  logic                   a_locked[NUM_SLAVES];
  logic                   x_valid [NUM_SLAVES];
  bus_req_t               x_req   [NUM_SLAVES];
  logic [MIDW-1:0]        x_mid   [NUM_SLAVES];
  logic                   fm_ready[NUM_SLAVES];
  logic                   r_valid [NUM_SLAVES];
  ocp_rsp_t               r_rsp   [NUM_SLAVES];
  logic [MIDW-1:0]        r_mid   [NUM_SLAVES];
  logic                   r_ready [NUM_SLAVES];

  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_master
    ocp_decoder #(.NUM_SLAVES(NUM_SLAVES)) u_dec (
      .addr(m_req[m].addr), .sid(dec_sid[m]), .sel(dec_sel[m]), .err(dec_err[m])
    );

    ocp_fsm_s #(.NUM_SLAVES(NUM_SLAVES)) u_fsm_s (
      .clk, .rst_n,
      .m_req        (m_req[m]),
      .m_cmd_accept (m_cmd_accept[m]),
      .dec_sid      (dec_sid[m]),
      .dec_err      (dec_err[m]),
      .out_valid    (f_valid[m]),
      .out_sid      (f_sid[m]),
      .out_req      (f_req[m]),
      .out_hold     (f_hold[m]),
      .out_ready    (f_ready[m]),
      .rec_valid    (rec_valid[m]),
      .rec_sid      (rec_sid[m]),
      .rec_tag      (rec_tag[m]),
      .rec_in_order (rec_io[m]),
      .rec_beats    (rec_beats[m]),
      .rec_ok       (rec_ok[m]),
      .rec_push     (rec_push[m]),
      .err_valid    (sc_valid[m][NUM_SLAVES]),
      .err_rsp      (sc_rsp[m][NUM_SLAVES]),
      .err_ready    (sc_ready[m][NUM_SLAVES])
    );

    // the beat is taken when this master holds the grant of its slave and
    // that slave's FSM-M accepts
    always_comb begin
      f_ready[m] = 1'b0;
      for (int s = 0; s < NUM_SLAVES; s++) begin
        if (f_sid[m] == SIDW'(s) && a_gnt[s][m] && fm_ready[s]) f_ready[m] = 1'b1;
      end
    end

    for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_rsp
      assign sc_valid[m][s] = r_valid[s] && (r_mid[s] == MIDW'(m));
      assign sc_rsp[m][s]   = r_rsp[s];
    end

    ocp_scheduler #(.NUM_SLAVES(NUM_SLAVES), .REC_DEPTH(REC_DEPTH), .Q_DEPTH(Q_DEPTH)) u_sched (
      .clk, .rst_n,
      .ooo_first    (ooo_first),
      .in_valid     (sc_valid[m]),
      .in_rsp       (sc_rsp[m]),
      .in_ready     (sc_ready[m]),
      .rec_valid    (rec_valid[m]),
      .rec_sid      (rec_sid[m]),
      .rec_tag      (rec_tag[m]),
      .rec_in_order (rec_io[m]),
      .rec_beats    (rec_beats[m]),
      .rec_ok       (rec_ok[m]),
      .rec_push     (rec_push[m]),
      .m_rsp_valid  (m_rsp_valid[m]),
      .m_rsp        (m_rsp[m]),
      .m_rsp_accept (m_rsp_accept[m])
    );
  end

  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_slave
    always_comb begin
      for (int m = 0; m < NUM_MASTERS; m++) begin
        a_req[s][m]  = f_valid[m] && (f_sid[m] == SIDW'(s));
        a_hold[s][m] = f_hold[m];
      end
    end

    ocp_arbiter #(.NUM_MASTERS(NUM_MASTERS)) u_arb (
      .clk, .rst_n,
      .req       (a_req[s]),
      .hold      (a_hold[s]),
      .accept    (fm_ready[s]),
      .gnt       (a_gnt[s]),
      .gnt_idx   (a_idx[s]),
      .gnt_valid (a_valid[s]),
      .locked    (a_locked[s])
    );

    ocp_req_mux #(.NUM_MASTERS(NUM_MASTERS)) u_mux (
      .in_req    (f_req),
      .gnt_valid (a_valid[s]),
      .gnt_idx   (a_idx[s]),
      .out_valid (x_valid[s]),
      .out_req   (x_req[s]),
      .out_mid   (x_mid[s])
    );

    ocp_fsm_m #(.NUM_MASTERS(NUM_MASTERS)) u_fsm_m (
      .clk, .rst_n,
      .in_valid      (x_valid[s]),
      .in_req        (x_req[s]),
      .in_mid        (x_mid[s]),
      .in_ready      (fm_ready[s]),
      .s_req         (s_req[s]),
      .s_cmd_accept  (s_cmd_accept[s]),
      .s_resp        (s_resp[s]),
      .s_data        (s_data[s]),
      .s_resp_accept (s_rsp_accept[s]),
      .rsp_valid     (r_valid[s]),
      .rsp           (r_rsp[s]),
      .rsp_mid       (r_mid[s]),
      .rsp_ready     (r_ready[s])
    );

    always_comb begin
      r_ready[s] = 1'b0;
      for (int m = 0; m < NUM_MASTERS; m++) begin
        if (r_mid[s] == MIDW'(m) && sc_ready[m][s]) r_ready[s] = 1'b1;
      end
    end

    // a continuation beat of a single-request write can only reach the
    // FSM-M while the arbiter is locked on the master that began the burst
    always_ff @(posedge clk) begin
      if (rst_n) begin
        a_cont_locked: assert (!(x_valid[s] && x_req[s].cont) || a_locked[s]);
      end
    end
  end

  // the one-hot select of each decoder agrees with its slave index
  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_dec_chk
    always_ff @(posedge clk) begin
      if (rst_n) begin
        a_dec_sel: assert (dec_err[m] || dec_sel[m] == (NUM_SLAVES'(1) << dec_sid[m]));
      end
    end
  end
endmodule

// tb_ocp_fsm_s: the FSM-S of one master port, with the slave side, the
// recorder and the ERR path modelled by the test (random ready, random
// recorder refusal, random ERR back-pressure). Random single requests,
// multi-request bursts, single-request bursts, locked requests and requests
// to unmapped addresses are driven. For every accepted beat the test checks
// the routing (slave index, continuation flag, last flag, hold for lock and
// bursts), that a beat is only accepted when the slave side or the ERR path
// takes it, and that exactly the reads and the illegal transactions are
// entered in the recorder with the right beat count. ERR beats are checked
// for count, TagID and last flag.
module tb_ocp_fsm_s;
  import ocp_pkg::*;
  localparam int NS = 6;
  logic       clk = 1'b0, rst_n = 1'b0;
  ocp_req_t   m_req;
  logic       m_cmd_accept, dec_err, out_valid, out_hold, out_ready;
  logic [2:0] dec_sid, out_sid, rec_sid;
  bus_req_t   out_req;
  logic       rec_valid, rec_in_order, rec_ok, rec_push, err_valid, err_ready;
  logic [1:0] rec_tag;
  logic [3:0] rec_beats;
  ocp_rsp_t   err_rsp;
  int checks = 0, failures = 0, n_recs = 0, n_exp_recs = 0, n_refused = 0;

  ocp_fsm_s #(.NUM_SLAVES(NS)) dut (.clk, .rst_n, .m_req, .m_cmd_accept, .dec_sid, .dec_err,
    .out_valid, .out_sid, .out_req, .out_hold, .out_ready, .rec_valid, .rec_sid, .rec_tag,
    .rec_in_order, .rec_beats, .rec_ok, .rec_push, .err_valid, .err_rsp, .err_ready);

  always #5 clk = ~clk;

  // decoder stand-in
  always_comb begin
    dec_err = (32'(m_req.addr[31:16]) >= NS);
    dec_sid = dec_err ? 3'(NS) : 3'(m_req.addr[31:16]);
  end

  typedef struct { logic [1:0] tag; logic io; logic last; } eexp_t;
  eexp_t errq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // environment: random readiness, set after each edge
  always @(posedge clk) begin
    #1;
    out_ready = ($urandom_range(0, 9) < 6);
    rec_ok    = rec_valid && ($urandom_range(0, 9) < 8);
    err_ready = ($urandom_range(0, 9) < 5);
  end
  always @(negedge clk) if (rst_n) begin
    if (rec_valid && !rec_ok) begin
      n_refused++;
      check(!m_cmd_accept, "beat accepted while the recorder refused it");
    end
    if (rec_push) n_recs++;
    if (err_valid && err_ready) begin
      check(errq.size() != 0, "unexpected ERR beat");
      if (errq.size() != 0) begin
        automatic eexp_t e = errq.pop_front();
        check(err_rsp.resp == RESP_ERR && err_rsp.tag == e.tag && err_rsp.last == e.last,
              "ERR beat fields");
      end
    end
  end

  // drive a beat, check routing when it is accepted
  task automatic beat(input ocp_req_t r, input logic [2:0] sid, input bit legal, input bit cont,
                      input bit last, input bit rec, input int rbeats);
    m_req = r;
    forever begin
      @(negedge clk);
      if (legal) check(m_cmd_accept == (out_valid && out_ready), "accept follows slave side");
      else       check(!out_valid, "illegal beat sent to a slave");
      if (m_cmd_accept) break;
    end
    if (legal)
      check(out_sid == sid && out_req.cont == cont && out_req.last == last &&
            out_hold == (r.lock || !last) && out_req.req == r,
            $sformatf("routing sid %0d/%0d cont %0d/%0d last %0d/%0d hold %0d", out_sid, sid,
                      out_req.cont, cont, out_req.last, last, out_hold));
    check(rec_push == rec, "recorder push");
    if (rec) check(rec_sid == (legal ? sid : 3'(NS)) && rec_beats == 4'(rbeats) &&
                   rec_tag == r.tag && rec_in_order == r.in_order, "recorder entry");
    if (rec) n_exp_recs++;
    @(posedge clk); #1;
    m_req.cmd = CMD_IDLE;
  endtask

  initial begin
    m_req = '0; out_ready = 0; rec_ok = 0; err_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int t = 0; t < 1500; t++) begin
      automatic int kind = $urandom_range(0, 3);   // 0 wr, 1 rd, 2 SRMD wr, 3 SRMD rd
      automatic int len  = $urandom_range(1, 8);
      automatic bit bad  = ($urandom_range(0, 7) == 0);
      automatic logic [2:0] s = bad ? 3'(NS) : 3'($urandom_range(0, NS - 1));
      automatic ocp_req_t r = '0;
      automatic bit wr = (kind == 0 || kind == 2);
      r.cmd = wr ? CMD_WR : CMD_RD;
      r.burst_len = 4'(len);
      r.single_req = (kind >= 2);
      r.tag = 2'($urandom);
      r.in_order = 1'($urandom);
      r.lock = ($urandom_range(0, 5) == 0);
      if (kind == 3) begin
        r.addr = {16'(s), 16'($urandom_range(0, 8191) * 8)};
        if (bad) for (int k = 0; k < len; k++) errq.push_back('{r.tag, r.in_order, k == len - 1});
        beat(r, s, !bad, 1'b0, 1'b1, 1'b1, len);
      end else begin
        for (int b = 0; b < len; b++) begin
          automatic bit cont = (kind == 2 && b > 0);
          automatic bit rec  = !cont && (!wr || bad);
          r.addr = {16'(cont ? 3'(7) : s), 16'($urandom_range(0, 8191) * 8)};
          if (rec && bad) errq.push_back('{r.tag, r.in_order, 1'b1});
          beat(r, s, !bad, cont, b == len - 1, rec, 1);
        end
      end
    end
    repeat (50) @(posedge clk);
    check(errq.size() == 0, "all ERR beats delivered");
    check(n_recs == n_exp_recs, "recorder push count");
    check(n_refused > 0, "recorder refusal exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

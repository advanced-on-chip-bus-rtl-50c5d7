// tb_ocp_scheduler: the response scheduler of one master with three slaves
// plus the ERR input, modelled by the test as in-order responders with
// different fixed latencies (so responses arrive out of request order).
// Transactions with random TagID / in-order class, target and beat count are
// entered through the recorder port whenever rec_ok allows; each target
// returns its beats in order after its latency, unless back-pressured.
// Checked: every output beat is the next expected beat of its class (data,
// TagID, last), all beats arrive, rec_ok refuses only when the recorder is
// full or the loop-back buffer could not take every beat that may have to
// wait, no slave is ever blocked, and the loop-back path, the
// bypass, the priority queue and out-of-order return all occur. A directed
// part checks both settings of ooo_first.
module tb_ocp_scheduler;
  import ocp_pkg::*;
  localparam int NS = 3, NIN = NS + 1;
  localparam int LB = 3;               // loop-back buffer of the default scheduler
  logic       clk = 1'b0, rst_n = 1'b0, ooo_first = 1'b0;
  logic       in_valid [NIN];
  ocp_rsp_t   in_rsp   [NIN];
  logic       in_ready [NIN];
  logic       rec_valid, rec_in_order, rec_ok, rec_push, m_rsp_valid, m_rsp_accept;
  logic [1:0] rec_sid, rec_tag;
  logic [3:0] rec_beats;
  ocp_rsp_t   m_rsp;
  int checks = 0, failures = 0, n_overtake = 0, n_conflict_refused = 0;
  int n_lb = 0, n_bypass = 0, n_queue = 0;
  longint cycle = 0;
  bit rand_acc = 1'b1, acc_hold = 1'b0;

  ocp_scheduler #(.NUM_SLAVES(NS)) dut (.clk, .rst_n, .ooo_first, .in_valid, .in_rsp, .in_ready,
    .rec_valid, .rec_sid, .rec_tag, .rec_in_order, .rec_beats, .rec_ok, .rec_push,
    .m_rsp_valid, .m_rsp, .m_rsp_accept);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint at; ocp_rsp_t b; int txn; } sb_t;
  sb_t        slq  [NIN][$];          // beats each responder still has to return
  ocp_rsp_t   expq [5][$];            // expected beats per class
  int         expt [5][$];
  int         pend [int];
  int         txn_id = 0;
  int         lat [NIN] = '{3, 12, 1, 6};
  logic [7:0] log_q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // responders
  for (genvar s = 0; s < NIN; s++) begin : g_sl
    initial begin
      in_valid[s] = 1'b0; in_rsp[s] = '0;
      forever begin
        @(posedge clk); #1;
        in_valid[s] = (slq[s].size() != 0 && cycle >= slq[s][0].at);
        if (in_valid[s]) in_rsp[s] = slq[s][0].b;
        @(negedge clk);
        if (in_valid[s] && in_ready[s]) void'(slq[s].pop_front());
      end
    end
  end

  // master side
  initial begin
    m_rsp_accept = 1'b0;
    forever begin
      @(posedge clk); #1;
      m_rsp_accept = !acc_hold && (!rand_acc || $urandom_range(0, 9) < 6);
      @(negedge clk);
      if (m_rsp_valid && m_rsp_accept) begin
        automatic int c = m_rsp.in_order ? 4 : int'(m_rsp.tag);
        log_q.push_back({3'b0, m_rsp.in_order, 2'b0, m_rsp.tag});
        check(expq[c].size() != 0, "unexpected beat");
        if (expq[c].size() != 0) begin
          automatic ocp_rsp_t e = expq[c].pop_front();
          automatic int id = expt[c].pop_front();
          automatic int k;
          check(m_rsp == e, $sformatf("beat %h exp %h", m_rsp.data, e.data));
          if ((pend.first(k) != 0) && k < id) n_overtake++;
          pend[id]--;
          if (pend[id] == 0) pend.delete(id);
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.to_lb)  n_lb++;
    // the admission rule leaves room for every beat that has to wait
    if (dut.block_m1) begin
      checks++;
      failures++;
      $display("FAIL: slave %0d blocked at a full loop-back buffer", dut.m1_sel);
    end
    if (dut.bypass) n_bypass++;
    if (dut.push_q) n_queue++;
  end

  function automatic bit same_cls(input logic io_a, input logic [1:0] tag_a,
                                  input logic io_b, input logic [1:0] tag_b);
    return (io_a && io_b) || (!io_a && !io_b && tag_a == tag_b);
  endfunction

  // enter one transaction through the recorder port
  task automatic issue(input int s, input logic [1:0] tag, input logic io, input int n);
    rec_valid = 1'b1; rec_sid = 2'(s); rec_tag = tag; rec_in_order = io; rec_beats = 4'(n);
    forever begin
      @(negedge clk);
      if (rec_ok) break;
      // refusal must come from a full recorder or from the loop-back budget:
      // beats in the loop-back buffer + beats due to entries that have an
      // older entry of their class at another slave + this transaction's
      // beats (if it has such an older entry) exceed the buffer
      begin
        automatic bit conflict = 1'b0, exposed = 1'b0;
        automatic int budget = int'(dut.lb_cnt);
        for (int i = 0; i < int'(dut.r_count); i++) begin
          automatic bit ex = 1'b0;
          for (int j = 0; j < i; j++)
            if (same_cls(dut.r_io[j], dut.r_tag[j], dut.r_io[i], dut.r_tag[i]) &&
                dut.r_sid[j] != dut.r_sid[i]) ex = 1'b1;
          if (ex) budget += int'(dut.r_left[i]);
          if (same_cls(dut.r_io[i], dut.r_tag[i], io, tag) && dut.r_sid[i] != 2'(s))
            exposed = 1'b1;
        end
        conflict = exposed && (budget + n > LB);
        check(conflict || dut.r_count == 4, "rec_ok refused without reason");
        if (conflict) n_conflict_refused++;
      end
    end
    rec_push = 1'b1;
    begin
      automatic int id = txn_id++;
      pend[id] = n;
      for (int k = 0; k < n; k++) begin
        automatic ocp_rsp_t b;
        b.resp = (s == NS) ? RESP_ERR : RESP_DVA;
        b.data = {32'(id), 32'(k)};
        b.tag = tag; b.in_order = io; b.last = (k == n - 1);
        expq[io ? 4 : int'(tag)].push_back(b);
        expt[io ? 4 : int'(tag)].push_back(id);
        slq[s].push_back('{cycle + longint'(lat[s]), b, id});
      end
    end
    @(posedge clk); #1;
    rec_valid = 1'b0; rec_push = 1'b0;
  endtask

  task automatic drain();
    automatic int n;
    do begin
      @(posedge clk);
      n = 0;
      for (int c = 0; c < 5; c++) n += expq[c].size();
    end while (n != 0);
    @(posedge clk); #1;
  endtask

  initial begin
    rec_valid = 0; rec_push = 0; rec_sid = 0; rec_tag = 0; rec_in_order = 0; rec_beats = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // same TagID to a slow and then a fast slave: the fast beat must wait
    issue(1, 2'd0, 1'b0, 1);
    issue(2, 2'd0, 1'b0, 1);
    issue(0, 2'd1, 1'b0, 2);
    drain();
    // policy: hold the master, queue an in-order and a tagged beat behind one
    for (int p = 0; p < 2; p++) begin
      ooo_first = p[0];
      acc_hold = 1'b1;
      issue(2, 2'd3, 1'b0, 1);
      issue(2, 2'd0, 1'b1, 1);
      issue(2, 2'd1, 1'b0, 1);
      repeat (20) @(posedge clk);
      log_q.delete();
      #1 acc_hold = 1'b0;
      drain();
      check(log_q.size() == 3 && log_q[1][4] == (p == 0), $sformatf("policy ooo_first=%0d", p));
    end
    ooo_first = 1'b0;
    // random traffic
    for (int t = 0; t < 1500; t++) begin
      automatic int s = $urandom_range(0, NIN - 1);
      automatic int n = ($urandom_range(0, 3) == 0) ? $urandom_range(2, 4) : 1;
      if (t == 750) ooo_first = 1'b1;
      issue(s, 2'($urandom_range(0, 1)), ($urandom_range(0, 4) == 0), n);
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end
    drain();
    $display("loop-back %0d bypass %0d queued %0d overtake %0d refused %0d", n_lb, n_bypass,
             n_queue, n_overtake, n_conflict_refused);
    check(n_lb > 0, "loop-back used");
    check(n_bypass > 0, "bypass used");
    check(n_queue > 0, "priority queue used");
    check(n_overtake > 0, "out-of-order return");
    check(n_conflict_refused > 0, "loop-back budget refusal exercised");
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

// tb_ocp_system: end-to-end test of the crossbar OCP bus with its memory
// slaves, at the default size (4 masters, 6 slaves, 64-bit data).
//
// Four master drivers run concurrently. Each first fills its own 64-word
// window in every slave with single-request write bursts, then runs directed
// scenarios and a stream of random transactions: single reads and writes,
// multi-request bursts, single-request read and write bursts, locked
// write/read pairs, reads and writes to unmapped addresses, tagged and
// in-order. The expected response beats of every transaction are computed
// from a shadow copy of memory when the transaction is accepted, and queued
// per master and ordering class (TagID 0..3, in-order). Each response beat
// must match the head of its class queue: this checks data, ERR responses,
// the last-beat flag and the ordering rule at once.
//
// Directed checks: the read latency of an idle path (slave latency + 1), the
// out-of-order scenario of a long burst followed by short reads to faster
// slaves (the short ones must come back first, and sooner than in order),
// and the in-order-first / out-of-order-first policy of the priority queue.
// Every bus mechanism (arbitration contention, lock, burst address
// generation, pipelining, out-of-order return, comparator loop-back,
// priority queue, bypass, ERR) is counted and must occur at least once.
module tb_ocp_system;
  import ocp_pkg::*;

  localparam int NM = DEF_NUM_MASTERS;
  localparam int NS = DEF_NUM_SLAVES;
  localparam int WIN = 64;           // words per master and slave
  localparam int NRAND = 250;        // random transactions per master

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     ooo_first = 1'b0;
  ocp_req_t m_req        [NM];
  logic     m_cmd_accept [NM];
  logic     m_rsp_valid  [NM];
  ocp_rsp_t m_rsp        [NM];
  logic     m_rsp_accept [NM];

  ocp_system dut (
    .clk, .rst_n, .ooo_first, .m_req, .m_cmd_accept, .m_rsp_valid, .m_rsp, .m_rsp_accept
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- expected responses ----------------
  typedef struct {
    resp_e        resp;
    logic [63:0]  data;
    logic         last;
    int           txn;
  } exp_t;

  exp_t        exp_q   [NM][5][$];
  logic [63:0] shadow  [NM][NS][WIN];
  int          pending [NM][int];     // beats still due per transaction id
  int          txn_id  [NM];
  int          rsp_seen[NM];
  bit          acc_rand = 1'b1;       // random MRespAccept
  bit          acc_hold [NM];         // directed: hold MRespAccept low
  longint      first_rsp_cycle[NM];
  int          first_rsp_tag  [NM];
  bit          first_rsp_io   [NM];
  logic [7:0]  rsp_log [NM][$];       // {io, tag} of each beat, directed tests

  // mechanism counters
  int n_overtake = 0, n_err = 0;

  function automatic int cls(input logic io, input logic [TW-1:0] tag);
    return io ? 4 : int'(tag);
  endfunction

  function automatic logic [AW-1:0] waddr(input int m, input int s, input int w);
    return AW'(s) << REGION_AW | AW'((m * WIN + w) * BYTES);
  endfunction

  // ---------------- response side ----------------
  for (genvar m = 0; m < NM; m++) begin : g_rsp
    initial begin
      m_rsp_accept[m] = 1'b0;
      first_rsp_cycle[m] = -1;
      forever begin
        @(posedge clk); #1;
        m_rsp_accept[m] = !acc_hold[m] && (!acc_rand || ($urandom_range(0, 9) < 7));
        @(negedge clk);
        if (rst_n && m_rsp_valid[m] && m_rsp_accept[m]) begin
          automatic int c = cls(m_rsp[m].in_order, m_rsp[m].tag);
          rsp_seen[m]++;
          rsp_log[m].push_back({3'b0, m_rsp[m].in_order, 2'b0, m_rsp[m].tag});
          if (first_rsp_cycle[m] < 0) begin
            first_rsp_cycle[m] = cycle;
            first_rsp_tag[m]   = int'(m_rsp[m].tag);
            first_rsp_io[m]    = m_rsp[m].in_order;
          end
          checks++;
          if (exp_q[m][c].size() == 0) begin
            failures++;
            $display("FAIL m%0d: unexpected response class %0d", m, c);
          end else begin
            automatic exp_t e = exp_q[m][c].pop_front();
            if (m_rsp[m].resp != e.resp || m_rsp[m].last != e.last ||
                (e.resp == RESP_DVA && m_rsp[m].data != e.data)) begin
              failures++;
              $display("FAIL m%0d txn %0d: resp %0d/%0d data %h/%h last %0d/%0d", m, e.txn,
                       m_rsp[m].resp, e.resp, m_rsp[m].data, e.data, m_rsp[m].last, e.last);
            end
            // out-of-order return: an earlier transaction is still waiting
            begin
              automatic int k;
              if ((pending[m].first(k) != 0) && k < e.txn) n_overtake++;
            end
            if (e.resp == RESP_ERR) n_err++;
            pending[m][e.txn]--;
            if (pending[m][e.txn] == 0) pending[m].delete(e.txn);
          end
        end
      end
    end
  end

  // ---------------- request side ----------------
  // Drive one request beat and wait until it is accepted.
  task automatic beat(input int m, input ocp_req_t r);
    m_req[m] = r;
    forever begin
      @(negedge clk);
      if (m_cmd_accept[m]) break;
    end
    @(posedge clk); #1;
    m_req[m].cmd = CMD_IDLE;
  endtask

  task automatic expect_beats(input int m, input logic io, input logic [TW-1:0] tag,
                              input resp_e resp, input int n, input int s, input int w);
    automatic int id = txn_id[m]++;
    pending[m][id] = n;
    for (int i = 0; i < n; i++) begin
      automatic exp_t e;
      e.resp = resp;
      e.data = (resp == RESP_DVA) ? shadow[m][s][w+i] : '0;
      e.last = (i == n - 1);
      e.txn  = id;
      exp_q[m][cls(io, tag)].push_back(e);
    end
  endtask

  // One transaction. s = NS means an unmapped address.
  //  kind: 0 single/MRMD write, 1 single/MRMD read, 2 SRMD write, 3 SRMD read
  task automatic txn(input int m, input int kind, input int s, input int w, input int len,
                     input logic [TW-1:0] tag, input logic io, input logic lock);
    automatic ocp_req_t r;
    automatic bit bad = (s >= NS);
    automatic int sx = bad ? 0 : s;
    r = '0;
    r.cmd        = (kind == 0 || kind == 2) ? CMD_WR : CMD_RD;
    r.burst_len  = BLW'(len);
    r.single_req = (kind >= 2);
    r.tag        = tag;
    r.in_order   = io;
    r.lock       = lock;
    if (kind == 3) begin
      r.addr = bad ? 32'hF000_0000 : waddr(m, s, w);
      // expected beats are queued before the beat can be answered
      if (bad) expect_beats(m, io, tag, RESP_ERR, len, 0, 0);
      else     expect_beats(m, io, tag, RESP_DVA, len, s, w);
      beat(m, r);
    end else if (kind == 2) begin
      if (bad) expect_beats(m, io, tag, RESP_ERR, 1, 0, 0);
      for (int b = 0; b < len; b++) begin
        r.addr = bad ? 32'hF000_0000 : ((b == 0) ? waddr(m, s, w) : 32'hDEAD_BEE8);
        r.data = {$urandom, $urandom};
        if (!bad) shadow[m][sx][w+b] = r.data;
        beat(m, r);
      end
    end else begin
      for (int b = 0; b < len; b++) begin
        r.addr = bad ? 32'hF000_0000 : waddr(m, s, w + b);
        r.data = {$urandom, $urandom};
        if (kind == 0) begin
          if (!bad) shadow[m][sx][w+b] = r.data;
          else expect_beats(m, io, tag, RESP_ERR, 1, 0, 0);
        end else begin
          if (bad) expect_beats(m, io, tag, RESP_ERR, 1, 0, 0);
          else     expect_beats(m, io, tag, RESP_DVA, 1, s, w + b);
        end
        beat(m, r);
      end
    end
  endtask

  task automatic wait_idle(input int m);
    automatic int all;
    do begin
      @(posedge clk);
      all = 0;
      for (int c = 0; c < 5; c++) all += exp_q[m][c].size();
    end while (all != 0);
    @(posedge clk); #1;
  endtask

  task automatic random_txn(input int m);
    automatic int pick = $urandom_range(0, 99);
    automatic int s    = $urandom_range(0, NS - 1);
    automatic int len  = $urandom_range(1, 8);
    automatic int w    = $urandom_range(0, WIN - len);
    automatic logic [TW-1:0] tag = TW'($urandom_range(0, 3));
    automatic logic io = ($urandom_range(0, 3) == 0);
    if (pick < 15)      txn(m, 0, s, w, 1, tag, io, 1'b0);
    else if (pick < 35) txn(m, 1, s, w, 1, tag, io, 1'b0);
    else if (pick < 45) txn(m, 0, s, w, (len > 4) ? 4 : len, tag, io, 1'b0);
    else if (pick < 55) txn(m, 1, s, w, (len > 4) ? 4 : len, tag, io, 1'b0);
    else if (pick < 67) txn(m, 2, s, w, len, tag, io, 1'b0);
    else if (pick < 85) txn(m, 3, s, w, len, tag, io, 1'b0);
    else if (pick < 92) begin
      // locked pair: write, then read back, the slave held in between
      txn(m, 0, s, w, 1, tag, io, 1'b1);
      txn(m, 1, s, w, 1, tag, io, 1'b0);
    end else if (pick < 96) txn(m, 3, NS, 0, len, tag, io, 1'b0);
    else                    txn(m, 0, NS, 0, 1, tag, io, 1'b0);
    repeat ($urandom_range(0, 2)) @(posedge clk);
    #1;
  endtask

  // ---------------- monitors of bus mechanisms ----------------
  int n_contend [NS], n_lockhold [NS], n_rdburst [NS], n_wrburst [NS];
  int n_pipe [NM], n_loop [NM], n_bypass [NM], n_queue [NM], n_block [NM];
  int n_parallel = 0;

  for (genvar s = 0; s < NS; s++) begin : g_smon
    always @(posedge clk) if (rst_n) begin
      automatic logic [NM-1:0] rq = dut.u_bus.g_slave[s].u_arb.req;
      if ((rq & (rq - 1'b1)) != '0) n_contend[s]++;
      if (dut.u_bus.g_slave[s].u_arb.locked && (rq & ~dut.u_bus.g_slave[s].u_arb.gnt) != '0)
        n_lockhold[s]++;
      if (dut.u_bus.g_slave[s].u_fsm_m.state == 2'd1) n_rdburst[s]++;
      if (dut.u_bus.g_slave[s].u_fsm_m.state == 2'd2) n_wrburst[s]++;
    end
  end
  for (genvar m = 0; m < NM; m++) begin : g_mmon
    always @(posedge clk) if (rst_n) begin
      if (dut.u_bus.g_master[m].u_sched.r_count >= 2) n_pipe[m]++;
      if (dut.u_bus.g_master[m].u_sched.to_lb)        n_loop[m]++;
      if (dut.u_bus.g_master[m].u_sched.bypass)       n_bypass[m]++;
      if (dut.u_bus.g_master[m].u_sched.push_q)       n_queue[m]++;
      if (dut.u_bus.g_master[m].u_sched.block_m1)     n_block[m]++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    automatic int acc = 0;
    for (int s = 0; s < NS; s++)
      if (dut.s_req[s].cmd != CMD_IDLE && dut.s_cmd_accept[s]) acc++;
    if (acc >= 2) n_parallel++;
  end

  // ---------------- directed scenarios (master 0, bus otherwise idle) -------
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic directed();
    longint t0, t_ooo, t_ino;
    // idle-path read latency: slave latency + 1 cycles after acceptance
    for (int s = 0; s < NS; s += NS - 1) begin
      first_rsp_cycle[0] = -1;
      txn(0, 1, s, 3, 1, 2'd0, 1'b1, 1'b0);
      t0 = cycle;
      acc_rand = 1'b0;
      wait_idle(0);
      check(first_rsp_cycle[0] - t0 == longint'(2 + 3 * s) + 1,
            $sformatf("idle read latency slave %0d: %0d", s, first_rsp_cycle[0] - t0));
      acc_rand = 1'b1;
    end
    // out-of-order: 4-beat burst from the slowest slave, then short reads
    // from fast slaves with other TagIDs; the short ones return first
    acc_rand = 1'b0;
    first_rsp_cycle[0] = -1;
    t0 = cycle;
    txn(0, 3, NS - 1, 0, 4, 2'd0, 1'b0, 1'b0);
    txn(0, 3, 0, 8, 2, 2'd1, 1'b0, 1'b0);
    txn(0, 1, 1, 9, 1, 2'd2, 1'b0, 1'b0);
    wait_idle(0);
    t_ooo = cycle - t0;
    check(!first_rsp_io[0] && first_rsp_tag[0] == 1, "out-of-order: short read first");
    // the same reads all in order
    t0 = cycle;
    txn(0, 3, NS - 1, 0, 4, 2'd0, 1'b1, 1'b0);
    txn(0, 3, 0, 8, 2, 2'd0, 1'b1, 1'b0);
    txn(0, 1, 1, 9, 1, 2'd0, 1'b1, 1'b0);
    wait_idle(0);
    t_ino = cycle - t0;
    check(t_ooo < t_ino, $sformatf("out-of-order faster: %0d vs %0d cycles", t_ooo, t_ino));
    $display("out-of-order sequence %0d cycles, in-order %0d cycles", t_ooo, t_ino);
    // priority policy: hold the master, queue an in-order and a tagged beat
    for (int p = 0; p < 2; p++) begin
      ooo_first = p[0];
      acc_hold[0] = 1'b1;
      txn(0, 1, 0, 1, 1, 2'd3, 1'b0, 1'b0);  // fills the output register
      txn(0, 1, 0, 2, 1, 2'd0, 1'b1, 1'b0);  // in-order, priority 0 or max
      txn(0, 1, 0, 3, 1, 2'd1, 1'b0, 1'b0);  // TagID 1, priority 2
      repeat (20) @(posedge clk);
      rsp_log[0].delete();
      #1 acc_hold[0] = 1'b0;
      wait_idle(0);
      check(rsp_log[0].size() == 3, "policy: three responses");
      if (rsp_log[0].size() == 3)
        check(rsp_log[0][1][4] == (p == 0), $sformatf("policy ooo_first=%0d order", p));
    end
    ooo_first = 1'b0;
    acc_rand = 1'b1;
  endtask

  // ---------------- stimulus ----------------
  int done = 0, fill_done = 0;
  bit dir_done = 1'b0;
  for (genvar m = 0; m < NM; m++) begin : g_drv
    initial begin
      m_req[m] = '0;
      acc_hold[m] = 1'b0;
      wait (rst_n);
      @(posedge clk); #1;
      // fill the window in every slave
      for (int s = 0; s < NS; s++)
        for (int w = 0; w < WIN; w += 8)
          txn(m, 2, s, w, 8, 2'd0, 1'b1, 1'b0);
      wait_idle(m);
      fill_done++;
      if (m == 0) begin
        wait (fill_done == NM);
        directed();
        dir_done = 1'b1;
      end else begin
        wait (dir_done);
      end
      #1;
      for (int i = 0; i < NRAND; i++) random_txn(m);
      wait_idle(m);
      done++;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (done == NM);
    repeat (10) @(posedge clk);
    begin
      automatic int sc = 0, sl = 0, srb = 0, swb = 0, sp = 0, slb = 0, sby = 0, sq = 0;
      for (int s = 0; s < NS; s++) begin
        sc += n_contend[s]; sl += n_lockhold[s]; srb += n_rdburst[s]; swb += n_wrburst[s];
      end
      for (int m = 0; m < NM; m++) begin
        sp += n_pipe[m]; slb += n_loop[m]; sby += n_bypass[m]; sq += n_queue[m];
      end
      $display("contention %0d lock-hold %0d rd-burst %0d wr-burst %0d parallel %0d err %0d", sc, sl, srb, swb, n_parallel, n_err);
      $display("pipelined %0d overtake %0d loop-back %0d bypass %0d queued %0d", sp, n_overtake, slb, sby, sq);
      check(sc > 0, "arbitration contention happened");
      check(sl > 0, "lock held a slave against another master");
      check(srb > 0, "single-request read burst expanded");
      check(swb > 0, "single-request write burst expanded");
      check(n_parallel > 0, "two slaves served in one cycle");
      check(sp > 0, "pipelined transactions");
      check(n_overtake > 0, "out-of-order return");
      check(slb > 0, "comparator loop-back");
      check(sby > 0, "queue bypass");
      check(sq > 0, "priority queue used");
      check(n_err > 0, "ERR responses for unmapped addresses");
      for (int m = 0; m < NM; m++)
        for (int c = 0; c < 5; c++)
          check(exp_q[m][c].size() == 0, $sformatf("m%0d class %0d drained", m, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ocp_scenarios: the bus's showcase transactions, run on the full-size
// system (4 masters, 6 memory slaves with latencies 2, 5, 8, 11, 14, 17).
//
// Master 0 runs each scenario on an otherwise idle bus:
//  1. Burst write of length 8 as a single request: the FSM-M of the target
//     slave must issue 8 writes on 8 consecutive cycles at the start address
//     plus 8 bytes per beat, each carrying its beat's data; a single-request
//     read burst then returns the 8 words on 8 consecutive cycles, last flag
//     on the 8th.
//  2. Burst read of 4 beats, multi-request (4 request handshakes) and
//     single-request (1 handshake): both must return the same 4 words.
//  3. Non-pipelined against pipelined reads from one slave: A11 (4 beats),
//     A21 (2 beats), A31 (1 beat), in order. Pipelined, A21 and A31 are
//     accepted before the first data of A11 returns, the data order is
//     unchanged and the three complete sooner.
//  4. In-order against out-of-order: A11 (4 beats, slowest slave), A21 (2
//     beats) and A31 (1 beat) from fast slaves. With one class for all, the
//     data comes back in request order; with three TagIDs, D21, D22 and D31
//     come back before D11, and the sequence completes sooner.
// Expected data is the write pattern pat(s, w), worked out in the testbench.
module tb_ocp_scenarios;
  import ocp_pkg::*;

  localparam int NM = DEF_NUM_MASTERS;
  localparam int NS = DEF_NUM_SLAVES;

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [AW-1:0] waddr(input int s, input int w);
    return AW'(s) << REGION_AW | AW'(w * BYTES);
  endfunction

  function automatic logic [DW-1:0] pat(input int s, input int w);
    return {16'hA5C3, 16'(s), 32'(w)};
  endfunction

  // ---------------- monitors ----------------
  typedef struct {
    ocp_rsp_t rsp;
    longint   cyc;
  } rsp_rec_t;
  rsp_rec_t rlog[$];

  always @(posedge clk) begin
    if (rst_n && m_rsp_valid[0] && m_rsp_accept[0]) rlog.push_back('{m_rsp[0], cycle});
  end

  // write accesses that reach the slave port of the burst-write target
  localparam int WS = 2;
  typedef struct {
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
    longint        cyc;
  } wr_rec_t;
  wr_rec_t wlog[$];

  always @(posedge clk) begin
    if (rst_n && dut.s_req[WS].cmd == CMD_WR && dut.s_cmd_accept[WS])
      wlog.push_back('{dut.s_req[WS].addr, dut.s_req[WS].data, cycle});
  end

  // ---------------- request side (master 0) ----------------
  int     n_hs = 0;      // request handshakes of master 0
  longint last_acc;      // cycle of the latest accepted request beat

  // drives just after a clock edge, whatever the caller waited for
  task automatic send(input ocp_req_t r);
    #1;
    m_req[0] = r;
    forever begin
      @(negedge clk);
      if (m_cmd_accept[0]) break;
    end
    last_acc = cycle;
    n_hs++;
    @(posedge clk); #1;
    m_req[0].cmd = CMD_IDLE;
  endtask

  function automatic ocp_req_t mk(input cmd_e c, input int s, input int w, input int len,
                                  input bit srmd, input logic [TW-1:0] tag, input bit io);
    ocp_req_t r = '0;
    r.cmd        = c;
    r.addr       = waddr(s, w);
    r.burst_len  = BLW'(len);
    r.single_req = srmd;
    r.tag        = tag;
    r.in_order   = io;
    return r;
  endfunction

  // single-request write burst with the pattern data
  task automatic wr_burst(input int s, input int w, input int len);
    ocp_req_t r = mk(CMD_WR, s, w, len, 1'b1, '0, 1'b1);
    for (int b = 0; b < len; b++) begin
      r.data = pat(s, w + b);
      send(r);
    end
  endtask

  task automatic rd_srmd(input int s, input int w, input int len,
                         input logic [TW-1:0] tag, input bit io);
    send(mk(CMD_RD, s, w, len, 1'b1, tag, io));
  endtask

  task automatic rd_mrmd(input int s, input int w, input int len,
                         input logic [TW-1:0] tag, input bit io);
    ocp_req_t r = mk(CMD_RD, s, w, len, 1'b0, tag, io);
    for (int b = 0; b < len; b++) begin
      r.addr = waddr(s, w + b);
      send(r);
    end
  endtask

  task automatic wait_rsp(input int n);
    while (rlog.size() < n) @(posedge clk);
  endtask

  // check that rlog[i0 +: n] carries pat(s, w .. w+n-1) and the last flag
  task automatic check_data(input int i0, input int s, input int w, input int n,
                            input string what);
    for (int i = 0; i < n; i++) begin
      check(rlog[i0+i].rsp.resp == RESP_DVA && rlog[i0+i].rsp.data == pat(s, w + i),
            $sformatf("%s beat %0d data %h", what, i, rlog[i0+i].rsp.data));
      check(rlog[i0+i].rsp.last == (i == n - 1), $sformatf("%s beat %0d last", what, i));
    end
  endtask

  // ---------------- scenarios ----------------
  longint t0, t_np, t_p, t_io, t_oo, a31_acc;

  initial begin
    for (int m = 0; m < NM; m++) begin
      m_req[m] = '0;
      m_rsp_accept[m] = 1'b1;
    end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // 1. burst write of length 8, addresses generated from the start address
    wlog.delete();
    wr_burst(WS, 16, 8);
    repeat (5) @(posedge clk);
    check(wlog.size() == 8, $sformatf("burst write: %0d slave writes", wlog.size()));
    for (int i = 0; i < wlog.size() && i < 8; i++) begin
      check(wlog[i].addr == waddr(WS, 16 + i),
            $sformatf("burst write beat %0d address %h", i, wlog[i].addr));
      check(wlog[i].data == pat(WS, 16 + i), $sformatf("burst write beat %0d data", i));
      check(wlog[i].cyc == wlog[0].cyc + longint'(i), $sformatf("burst write beat %0d cycle", i));
    end
    rlog.delete();
    rd_srmd(WS, 16, 8, '0, 1'b1);
    wait_rsp(8);
    check_data(0, WS, 16, 8, "burst write read-back");
    check(rlog[7].cyc - rlog[0].cyc == 7, "burst read: one beat per cycle");

    // data for the read scenarios: 8 words at the start of every slave
    for (int s = 0; s < NS; s++) wr_burst(s, 0, 8);

    // 2. multi-request against single-request burst read
    rlog.delete();
    n_hs = 0;
    rd_mrmd(1, 0, 4, '0, 1'b1);
    check(n_hs == 4, "multi-request burst: 4 request handshakes");
    wait_rsp(4);
    check_data(0, 1, 0, 1, "multi-request beat 0");
    for (int i = 1; i < 4; i++)
      check(rlog[i].rsp.data == pat(1, i), $sformatf("multi-request beat %0d data", i));
    rlog.delete();
    n_hs = 0;
    rd_srmd(1, 0, 4, '0, 1'b1);
    check(n_hs == 1, "single-request burst: 1 request handshake");
    wait_rsp(4);
    check_data(0, 1, 0, 4, "single-request");

    // 3. non-pipelined: each read only after the data of the previous one
    rlog.delete();
    t0 = cycle;
    rd_srmd(3, 0, 4, '0, 1'b1);
    wait_rsp(4);
    rd_srmd(3, 4, 2, '0, 1'b1);
    wait_rsp(6);
    rd_srmd(3, 6, 1, '0, 1'b1);
    wait_rsp(7);
    t_np = rlog[6].cyc - t0;
    check_data(0, 3, 0, 4, "non-pipelined A11");
    check_data(4, 3, 4, 2, "non-pipelined A21");
    check_data(6, 3, 6, 1, "non-pipelined A31");
    //    pipelined: A21 and A31 right after A11
    rlog.delete();
    t0 = cycle;
    rd_srmd(3, 0, 4, '0, 1'b1);
    rd_srmd(3, 4, 2, '0, 1'b1);
    rd_srmd(3, 6, 1, '0, 1'b1);
    a31_acc = last_acc;
    wait_rsp(7);
    t_p = rlog[6].cyc - t0;
    check(a31_acc < rlog[0].cyc, "pipelined: A21 and A31 issued before D11 returns");
    check_data(0, 3, 0, 4, "pipelined A11");
    check_data(4, 3, 4, 2, "pipelined A21");
    check_data(6, 3, 6, 1, "pipelined A31");
    check(t_p < t_np, $sformatf("pipelined faster: %0d vs %0d cycles", t_p, t_np));
    $display("non-pipelined %0d cycles, pipelined %0d cycles", t_np, t_p);

    // 4. in order: all three reads in one class
    rlog.delete();
    t0 = cycle;
    rd_srmd(NS - 1, 0, 4, '0, 1'b1);
    rd_srmd(0, 4, 2, '0, 1'b1);
    rd_srmd(1, 6, 1, '0, 1'b1);
    wait_rsp(7);
    t_io = rlog[6].cyc - t0;
    check_data(0, NS - 1, 0, 4, "in-order A11");
    check_data(4, 0, 4, 2, "in-order A21");
    check_data(6, 1, 6, 1, "in-order A31");
    //    out of order: three TagIDs
    rlog.delete();
    t0 = cycle;
    rd_srmd(NS - 1, 0, 4, 2'd0, 1'b0);
    rd_srmd(0, 4, 2, 2'd1, 1'b0);
    rd_srmd(1, 6, 1, 2'd2, 1'b0);
    wait_rsp(7);
    t_oo = rlog[6].cyc - t0;
    begin
      automatic int n11 = 0, i21 = 0;
      for (int i = 0; i < 7; i++) begin
        case (rlog[i].rsp.tag)
          2'd0: begin
            check(rlog[i].rsp.data == pat(NS - 1, n11), $sformatf("ooo D1%0d data", n11 + 1));
            check(rlog[i].rsp.last == (n11 == 3), $sformatf("ooo D1%0d last", n11 + 1));
            n11++;
          end
          2'd1: begin
            check(rlog[i].rsp.data == pat(0, 4 + i21), $sformatf("ooo D2%0d data", i21 + 1));
            check(n11 == 0, $sformatf("ooo D2%0d before D11", i21 + 1));
            i21++;
          end
          default: begin
            check(rlog[i].rsp.data == pat(1, 6) && rlog[i].rsp.last, "ooo D31 data");
            check(n11 == 0, "ooo D31 before D11");
          end
        endcase
      end
      check(n11 == 4 && i21 == 2, "ooo: all beats returned");
    end
    check(t_oo < t_io, $sformatf("out-of-order faster: %0d vs %0d cycles", t_oo, t_io));
    $display("in-order %0d cycles, out-of-order %0d cycles", t_io, t_oo);

    repeat (5) @(posedge clk);
    check(rlog.size() == 7, "no extra responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ocp_fsm_m: the FSM-M of one slave port, in front of a memory slave.
// Random single accesses, multi-request bursts and single-request read and
// write bursts are fed in with random master indices and TagIDs. Checked:
// the sequence of accesses the slave accepts (command, generated burst
// address in 8-byte steps, write data) against a list built by the test,
// and every response beat (data, master index, TagID, in-order flag, last
// flag) against the expected beats, under random response back-pressure.
// The number of cycles spent on a single-request burst is checked too: one
// slave access per cycle when the slave is ready.
module tb_ocp_fsm_m;
  import ocp_pkg::*;
  localparam int NM = 4, WORDS = 256;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, in_ready, s_cmd_accept, s_resp_accept, rsp_valid, rsp_ready;
  bus_req_t    in_req;
  logic [1:0]  in_mid, rsp_mid;
  slv_req_t    s_req;
  resp_e       s_resp;
  logic [63:0] s_data;
  ocp_rsp_t    rsp;
  int checks = 0, failures = 0;
  longint cycle = 0;

  ocp_fsm_m #(.NUM_MASTERS(NM)) dut (.clk, .rst_n, .in_valid, .in_req, .in_mid, .in_ready,
    .s_req, .s_cmd_accept, .s_resp, .s_data, .s_resp_accept, .rsp_valid, .rsp, .rsp_mid,
    .rsp_ready);
  ocp_mem_slave #(.LATENCY(2), .WORDS(WORDS), .DEPTH(4)) mem (.clk, .rst_n, .req(s_req),
    .cmd_accept(s_cmd_accept), .resp(s_resp), .rdata(s_data), .resp_accept(s_resp_accept));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { cmd_e cmd; logic [31:0] addr; logic [63:0] data; } acc_t;
  typedef struct { logic [63:0] data; logic [1:0] mid; logic [1:0] tag; logic io; logic last; } rexp_t;
  acc_t        accq [$];
  longint      acc_first = -1, acc_last = -1;
  rexp_t       rspq [$];
  logic [63:0] shadow [WORDS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // slave-side monitor
  always @(negedge clk) if (rst_n && s_req.cmd != CMD_IDLE && s_cmd_accept) begin
    if (acc_first < 0) acc_first = cycle;
    acc_last = cycle;
    check(accq.size() != 0, "unexpected slave access");
    if (accq.size() != 0) begin
      automatic acc_t e = accq.pop_front();
      check(s_req.cmd == e.cmd && s_req.addr == e.addr && (e.cmd != CMD_WR || s_req.data == e.data),
            $sformatf("access %0d %h %h, expected %0d %h %h", s_req.cmd, s_req.addr, s_req.data,
                      e.cmd, e.addr, e.data));
    end
  end

  // response side
  initial begin
    rsp_ready = 1'b0;
    forever begin
      @(posedge clk); #1;
      rsp_ready = ($urandom_range(0, 9) < 6);
      @(negedge clk);
      if (rsp_valid && rsp_ready) begin
        check(rspq.size() != 0, "unexpected response");
        if (rspq.size() != 0) begin
          automatic rexp_t e = rspq.pop_front();
          check(rsp.resp == RESP_DVA && rsp.data == e.data && rsp_mid == e.mid &&
                rsp.tag == e.tag && rsp.in_order == e.io && rsp.last == e.last,
                $sformatf("response %h mid %0d tag %0d last %0d, expected %h %0d %0d %0d",
                          rsp.data, rsp_mid, rsp.tag, rsp.last, e.data, e.mid, e.tag, e.last));
        end
      end
    end
  end

  task automatic send(input bus_req_t r, input logic [1:0] mid);
    in_req = r; in_mid = mid; in_valid = 1'b1;
    forever begin
      @(negedge clk);
      if (in_ready) break;
    end
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  // kind 0 write (MRMD if len>1), 1 read (MRMD), 2 SRMD write, 3 SRMD read
  task automatic op(input int kind, input int w, input int len, input logic [1:0] mid,
                    input logic [1:0] tag, input logic io);
    automatic bus_req_t r = '0;
    r.req.cmd = (kind == 0 || kind == 2) ? CMD_WR : CMD_RD;
    r.req.burst_len = 4'(len);
    r.req.single_req = (kind >= 2);
    r.req.tag = tag;
    r.req.in_order = io;
    for (int b = 0; b < ((kind == 3) ? 1 : len); b++) begin
      r.req.addr = (kind == 2 && b > 0) ? 32'h0BAD_0000 : 32'((w + b) * 8);
      r.req.data = {$urandom, $urandom};
      r.cont = (kind == 2 && b > 0);
      r.last = (b == len - 1) || kind == 3;
      if (kind == 0 || kind == 2) begin
        shadow[w+b] = r.req.data;
        accq.push_back('{CMD_WR, 32'((w + b) * 8), r.req.data});
      end else if (kind == 1) begin
        accq.push_back('{CMD_RD, 32'((w + b) * 8), '0});
        rspq.push_back('{shadow[w+b], mid, tag, io, 1'b1});
      end else begin
        for (int k = 0; k < len; k++) begin
          accq.push_back('{CMD_RD, 32'((w + k) * 8), '0});
          rspq.push_back('{shadow[w+k], mid, tag, io, k == len - 1});
        end
      end
      send(r, mid);
    end
  endtask

  initial begin
    in_valid = 1'b0; in_req = '0; in_mid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int w = 0; w < WORDS; w += 8) op(2, w, 8, 2'd0, 2'd0, 1'b1);
    // burst timing: 8 reads issued in 8 consecutive cycles
    while (rspq.size() != 0 || accq.size() != 0) @(posedge clk);
    #1;
    acc_first = -1;
    op(3, 16, 4, 2'd1, 2'd2, 1'b0);
    while (accq.size() != 0) @(posedge clk);
    check(acc_last - acc_first == 3,
          $sformatf("4-beat read burst issued over %0d cycles", acc_last - acc_first + 1));
    while (rspq.size() != 0) @(posedge clk);
    #1;
    for (int t = 0; t < 600; t++) begin
      automatic int kind = $urandom_range(0, 3);
      automatic int len  = $urandom_range(1, 8);
      automatic int w    = $urandom_range(0, WORDS - len);
      op(kind, w, len, 2'($urandom), 2'($urandom), 1'($urandom));
    end
    while (rspq.size() != 0 || accq.size() != 0) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

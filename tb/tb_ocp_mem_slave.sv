// tb_ocp_mem_slave: writes random words, reads them back in random order
// with random MRespAccept, and checks the data and the in-order return.
// Also checks the idle read latency (SResp appears LATENCY cycles after the
// accepting clock edge) and that reads stop being accepted once DEPTH reads
// are outstanding and nothing is taken.
module tb_ocp_mem_slave;
  import ocp_pkg::*;
  localparam int LAT = 3, WORDS = 64, DEPTH = 4;
  logic        clk = 1'b0, rst_n = 1'b0;
  slv_req_t    req;
  logic        cmd_accept, resp_accept;
  resp_e       resp;
  logic [63:0] rdata;
  int checks = 0, failures = 0;
  logic [63:0] shadow [WORDS];
  logic [63:0] expq [$];
  longint cycle = 0;

  ocp_mem_slave #(.LATENCY(LAT), .WORDS(WORDS), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .req, .cmd_accept, .resp, .rdata, .resp_accept);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // drive one request, wait for acceptance
  task automatic issue(input cmd_e c, input int w, input logic [63:0] d);
    req = '{cmd: c, addr: AW'(w * 8), data: d};
    forever begin
      @(negedge clk);
      if (cmd_accept) break;
    end
    @(posedge clk); #1;
    req.cmd = CMD_IDLE;
  endtask

  // response collector
  bit rand_acc = 1'b1;
  initial begin
    resp_accept = 1'b0;
    forever begin
      @(posedge clk); #1;
      resp_accept = rand_acc ? ($urandom_range(0, 9) < 6) : 1'b0;
      @(negedge clk);
      if (resp != RESP_NULL && resp_accept) begin
        check(expq.size() != 0, "unexpected response");
        if (expq.size() != 0) begin
          automatic logic [63:0] e = expq.pop_front();
          check(resp == RESP_DVA && rdata == e, $sformatf("read data %h exp %h", rdata, e));
        end
      end
    end
  end

  initial begin
    longint t0;
    req = '{cmd: CMD_IDLE, addr: '0, data: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int w = 0; w < WORDS; w++) begin
      shadow[w] = {$urandom, $urandom};
      issue(CMD_WR, w, shadow[w]);
    end
    // idle latency
    rand_acc = 1'b0;
    expq.push_back(shadow[5]);
    issue(CMD_RD, 5, '0);
    t0 = cycle;
    do @(negedge clk); while (resp == RESP_NULL);
    check(cycle - t0 == longint'(LAT), $sformatf("latency %0d", cycle - t0));
    @(posedge clk); #1;
    // back-pressure: DEPTH reads in flight, the next one must wait
    for (int i = 1; i < DEPTH; i++) begin
      expq.push_back(shadow[i]);
      issue(CMD_RD, i, '0);
    end
    req = '{cmd: CMD_RD, addr: '0, data: '0};
    repeat (LAT + 2) @(negedge clk);
    check(!cmd_accept, "read accepted beyond DEPTH");

    req.cmd = CMD_IDLE;
    rand_acc = 1'b1;
    // random mix
    for (int t = 0; t < 2000; t++) begin
      automatic int w = $urandom_range(0, WORDS - 1);
      if ($urandom_range(0, 2) == 0) begin
        shadow[w] = {$urandom, $urandom};
        issue(CMD_WR, w, shadow[w]);
      end else begin
        expq.push_back(shadow[w]);
        issue(CMD_RD, w, '0);
      end
    end
    while (expq.size() != 0) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

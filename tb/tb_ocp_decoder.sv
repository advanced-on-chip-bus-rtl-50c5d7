// tb_ocp_decoder: checks the address decoder against the address map.
// Random and boundary addresses are decoded; slave i must be selected for
// addresses i*64 KiB .. i*64 KiB + 64 KiB - 1, and every address from
// 6*64 KiB up must be flagged illegal with slave index 6 and no select bit.
module tb_ocp_decoder;
  import ocp_pkg::*;
  localparam int NS = DEF_NUM_SLAVES;
  logic [AW-1:0] addr;
  logic [2:0]    sid;
  logic [NS-1:0] sel;
  logic          err;
  int checks = 0, failures = 0;

  ocp_decoder dut (.addr, .sid, .sel, .err);

  task automatic try(input logic [AW-1:0] a);
    automatic int unsigned r = 32'(a) >> 16;
    automatic bit e = (r >= NS);
    addr = a;
    #1;
    checks++;
    if (err != e || sid != (e ? 3'(NS) : 3'(r)) || sel != (e ? '0 : NS'(1) << r)) begin
      failures++;
      $display("FAIL addr %h: sid %0d sel %b err %0d", a, sid, sel, err);
    end
  endtask

  initial begin
    for (int i = 0; i <= NS; i++) begin
      try(32'(i) << 16);
      try((32'(i) << 16) - 1);
      try((32'(i) << 16) + 32'hFFF8);
    end
    try(32'hFFFF_FFF8);
    for (int i = 0; i < 2000; i++) try(($urandom_range(0, 1) != 0) ? $urandom : {13'b0, 19'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

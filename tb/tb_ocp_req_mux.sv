// tb_ocp_req_mux: the slave-side request MUX must pass the granted master's
// request beat and index unchanged, and valid only with a grant.
module tb_ocp_req_mux;
  import ocp_pkg::*;
  localparam int NM = DEF_NUM_MASTERS;
  bus_req_t   in_req [NM];
  logic       gnt_valid;
  logic [1:0] gnt_idx;
  logic       out_valid;
  bus_req_t   out_req;
  logic [1:0] out_mid;
  int checks = 0, failures = 0;

  ocp_req_mux dut (.in_req, .gnt_valid, .gnt_idx, .out_valid, .out_req, .out_mid);

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int m = 0; m < NM; m++) begin
        in_req[m] = '0;
        in_req[m].req.cmd  = ($urandom_range(0, 1) != 0) ? CMD_WR : CMD_RD;
        in_req[m].req.addr = $urandom;
        in_req[m].req.data = {$urandom, $urandom};
        in_req[m].req.tag  = 2'($urandom);
        in_req[m].last     = 1'($urandom);
      end
      gnt_valid = 1'($urandom);
      gnt_idx   = 2'($urandom);
      #1;
      checks++;
      if (out_valid != gnt_valid || out_mid != gnt_idx || out_req != in_req[gnt_idx]) begin
        failures++;
        $display("FAIL t=%0d", t);
      end
    end
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

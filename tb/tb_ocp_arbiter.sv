// tb_ocp_arbiter: random requests, hold and accept against a reference
// model of fixed-priority arbitration (master 0 first) with lock: after an
// accepted beat with hold high, only that master may be granted until one
// of its beats is accepted with hold low. Also checks that lock keeps a
// higher-priority master out at least once.
module tb_ocp_arbiter;
  localparam int NM = 4;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic [NM-1:0] req, hold, gnt;
  logic [1:0]    gnt_idx;
  logic          gnt_valid, accept, locked;
  int checks = 0, failures = 0, lock_blocks = 0;
  bit         m_locked = 1'b0;
  int         m_owner = 0;

  ocp_arbiter #(.NUM_MASTERS(NM)) dut (.clk, .rst_n, .req, .hold, .accept, .gnt, .gnt_idx,
                                       .gnt_valid, .locked);
  always #5 clk = ~clk;

  initial begin
    req = '0; hold = '0; accept = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      req    = NM'($urandom);
      hold   = (($urandom_range(0, 3)) == 0) ? NM'($urandom) : '0;
      accept = ($urandom_range(0, 3) != 0);
      #1;
      begin
        automatic logic [NM-1:0] exp = '0;
        if (m_locked) begin
          if (req[m_owner]) exp[m_owner] = 1'b1;
          if ((req & ~(NM'(1) << m_owner)) != '0) lock_blocks++;
        end else begin
          for (int i = NM - 1; i >= 0; i--) if (req[i]) exp = NM'(1) << i;
        end
        checks++;
        if (gnt != exp || gnt_valid != (exp != '0) || locked != m_locked ||
            (exp != '0 && (NM'(1) << gnt_idx) != exp)) begin
          failures++;
          $display("FAIL t=%0d req %b gnt %b exp %b", t, req, gnt, exp);
        end
        @(posedge clk);
        if (accept && exp != '0) begin
          for (int i = 0; i < NM; i++) if (exp[i]) begin
            m_locked = hold[i];
            m_owner  = i;
          end
        end
      end
    end
    checks++;
    if (lock_blocks == 0) begin
      failures++;
      $display("FAIL: lock never kept another master out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

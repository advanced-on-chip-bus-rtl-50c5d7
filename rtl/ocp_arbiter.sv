// ocp_arbiter: per-slave arbiter of the crossbar, with lock.
//
// Every slave port has its own arbiter that picks which master may send the
// next request beat to that slave. Arbitration is fixed priority, master 0
// highest. A master that has been granted can keep the slave for itself: when
// a beat is accepted while that master's hold input is high, the arbiter locks
// onto it and grants no other master until the owner has a beat accepted with
// hold low. Hold is raised for OCP lock transactions and for every beat of a
// burst except the last, so a low-priority master completes what it was
// granted without being interrupted.
//
// Interface: req/hold per master, accept = the granted beat was taken by the
// slave side this cycle. gnt is combinational from req and the lock state;
// the lock state changes on the clock edge after an accepted beat.
module ocp_arbiter #(
  parameter int unsigned NUM_MASTERS = ocp_pkg::DEF_NUM_MASTERS,
  localparam int unsigned MIDW       = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_MASTERS-1:0] req,
  input  logic [NUM_MASTERS-1:0] hold,
  input  logic                   accept,
  output logic [NUM_MASTERS-1:0] gnt,
  output logic [MIDW-1:0]        gnt_idx,
  output logic                   gnt_valid,
  output logic                   locked
);
  logic [MIDW-1:0] owner;

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    if (locked) begin
      gnt_idx = owner;
      if (req[owner]) begin
        gnt[owner] = 1'b1;
        gnt_valid  = 1'b1;
      end
    end else begin
      for (int i = NUM_MASTERS - 1; i >= 0; i--) begin
        if (req[i]) begin
          gnt_idx = MIDW'(i);
        end
      end
      if (req != '0) begin
        gnt[gnt_idx] = 1'b1;
        gnt_valid    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
    end else if (accept && gnt_valid) begin
      locked <= hold[gnt_idx];
      owner  <= gnt_idx;
    end
  end

  // Only the granted master may be selected, and at most one.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_onehot: assert ((gnt & (gnt - 1'b1)) == '0);
      a_lock:   assert (!(locked && gnt_valid) || gnt_idx == owner);
    end
  end
endmodule

// ocp_req_mux: request multiplexer in front of one slave port.
//
// Forwards the request beat of the master that the slave's arbiter granted to
// that slave's FSM-M, together with the master's index, which the FSM-M keeps
// to route the response back. Purely combinational.
module ocp_req_mux
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = ocp_pkg::DEF_NUM_MASTERS,
  localparam int unsigned MIDW       = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  bus_req_t         in_req [NUM_MASTERS],
  input  logic             gnt_valid,
  input  logic [MIDW-1:0]  gnt_idx,
  output logic             out_valid,
  output bus_req_t         out_req,
  output logic [MIDW-1:0]  out_mid
);
  always_comb begin
    out_valid = gnt_valid;
    out_mid   = gnt_idx;
    out_req   = in_req[gnt_idx];
  end
endmodule

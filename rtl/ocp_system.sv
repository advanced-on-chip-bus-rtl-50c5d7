// ocp_system: the crossbar OCP bus with a memory slave on every slave port.
//
// This is the bus as it sits in a system: NUM_MASTERS master ports are
// brought out for the master cores (processors, DMA engines, accelerators),
// and each of the NUM_SLAVES slave ports carries an OCP memory slave. The
// slaves' access latencies grow with the port number (LAT_BASE + LAT_STEP*s),
// so that short- and long-latency slaves share the bus as in the
// out-of-order scenario the bus is built for. Each slave takes up to
// SLAVE_DEPTH reads ahead, as many as an FSM-M can track, so a master can
// keep several reads in flight to one slave. 4 masters, 6 slaves, 32-bit addresses, 64-bit data and
// depth-4 priority queues are the specified configuration; the latencies,
// read buffering and memory sizes are this design's choices. Slave s answers addresses
// s*64 KiB to s*64 KiB + 64 KiB - 1; higher addresses return ERR.
//
// Master port timing and handshakes are those of ocp_bus.
module ocp_system
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = ocp_pkg::DEF_NUM_MASTERS,
  parameter int unsigned NUM_SLAVES  = ocp_pkg::DEF_NUM_SLAVES,
  parameter int unsigned Q_DEPTH     = 4,
  parameter int unsigned REC_DEPTH   = 4,
  parameter int unsigned SLAVE_WORDS = 2 ** (REGION_AW - $clog2(BYTES)),
  // access latency of slave s in cycles: 2 + 3*s (2, 5, 8, 11, 14, 17)
  parameter int unsigned LAT_BASE    = 2,
  parameter int unsigned LAT_STEP    = 3,
  // reads a memory slave accepts before it returns the first
  parameter int unsigned SLAVE_DEPTH = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ooo_first,
  input  ocp_req_t m_req        [NUM_MASTERS],
  output logic     m_cmd_accept [NUM_MASTERS],
  output logic     m_rsp_valid  [NUM_MASTERS],
  output ocp_rsp_t m_rsp        [NUM_MASTERS],
  input  logic     m_rsp_accept [NUM_MASTERS]
);
  slv_req_t      s_req        [NUM_SLAVES];
  logic          s_cmd_accept [NUM_SLAVES];
  resp_e         s_resp       [NUM_SLAVES];
  logic [DW-1:0] s_data       [NUM_SLAVES];
  logic          s_rsp_accept [NUM_SLAVES];

  ocp_bus #(
    .NUM_MASTERS(NUM_MASTERS), .NUM_SLAVES(NUM_SLAVES),
    .Q_DEPTH(Q_DEPTH), .REC_DEPTH(REC_DEPTH)
  ) u_bus (
    .clk, .rst_n, .ooo_first,
    .m_req, .m_cmd_accept, .m_rsp_valid, .m_rsp, .m_rsp_accept,
    .s_req, .s_cmd_accept, .s_resp, .s_data, .s_rsp_accept
  );

  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_mem
    ocp_mem_slave #(.LATENCY(LAT_BASE + LAT_STEP * s), .WORDS(SLAVE_WORDS),
                    .DEPTH(SLAVE_DEPTH)) u_mem (
      .clk, .rst_n,
      .req         (s_req[s]),
      .cmd_accept  (s_cmd_accept[s]),
      .resp        (s_resp[s]),
      .rdata       (s_data[s]),
      .resp_accept (s_rsp_accept[s])
    );
  end
endmodule

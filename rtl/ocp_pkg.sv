// ocp_pkg: types and constants shared by the crossbar OCP bus.
//
// The bus carries Open Core Protocol style transfers between NUM_MASTERS master
// cores and NUM_SLAVES slave cores. Address and data widths (32 and 64 bits) and
// the 4 x 6 crossbar are the configuration the design is built for. Command and
// response encodings follow the OCP MCmd / SResp convention (IDLE, WR, RD and
// NULL, DVA, FAIL, ERR). Tag width, burst-length width, the address map and the
// extra request fields (single-request flag, in-order flag, lock) are this
// design's own choices.
package ocp_pkg;

  // Widths of the bus
  localparam int unsigned AW          = 32;  // address width
  localparam int unsigned DW          = 64;  // data width
  localparam int unsigned BYTES       = DW / 8;
  localparam int unsigned TW          = 2;   // TagID width: four tags
  localparam int unsigned BLW         = 4;   // burst length field: 1..15 beats
  localparam int unsigned PW          = TW + 1; // priority width in the scheduler

  // Default crossbar size
  localparam int unsigned DEF_NUM_MASTERS = 4;
  localparam int unsigned DEF_NUM_SLAVES  = 6;

  // Address map: slave i owns [i*2^REGION_AW, (i+1)*2^REGION_AW)
  localparam int unsigned REGION_AW   = 16;

  typedef enum logic [2:0] {
    CMD_IDLE = 3'd0,
    CMD_WR   = 3'd1,
    CMD_RD   = 3'd2
  } cmd_e;

  typedef enum logic [1:0] {
    RESP_NULL = 2'd0,
    RESP_DVA  = 2'd1,
    RESP_FAIL = 2'd2,
    RESP_ERR  = 2'd3
  } resp_e;

  // Request as driven by a master core (one beat of the request phase).
  //  burst_len   : beats in the burst (0 is treated as 1)
  //  single_req  : 1 = single-request burst (address given once),
  //                0 = multi-request burst (one request per beat)
  //  tag         : TagID of an out-of-order transaction
  //  in_order    : 1 = transaction carries no TagID and is returned in order
  //  lock        : keep the slave's arbiter on this master after this beat
  typedef struct packed {
    cmd_e             cmd;
    logic [AW-1:0]    addr;
    logic [DW-1:0]    data;
    logic [BLW-1:0]   burst_len;
    logic             single_req;
    logic [TW-1:0]    tag;
    logic             in_order;
    logic             lock;
  } ocp_req_t;

  // Response beat as seen by a master core.
  typedef struct packed {
    resp_e            resp;
    logic [DW-1:0]    data;
    logic [TW-1:0]    tag;
    logic             in_order;
    logic             last;      // last beat of the transaction
  } ocp_rsp_t;

  // Simple single-beat OCP request on a slave port (burst already expanded).
  typedef struct packed {
    cmd_e             cmd;
    logic [AW-1:0]    addr;
    logic [DW-1:0]    data;
  } slv_req_t;

  // Request beat on its way from a master's FSM-S to a slave's FSM-M.
  //  cont : data beat of a single-request write burst after the first one
  //         (its address is generated by the FSM-M, req.addr is ignored)
  //  last : last beat the arbiter has to keep together (ends a burst)
  typedef struct packed {
    ocp_req_t         req;
    logic             cont;
    logic             last;
  } bus_req_t;

  // Helper: number of beats of a request (0 counts as 1)
  function automatic logic [BLW-1:0] beats(input logic [BLW-1:0] len);
    return (len == '0) ? BLW'(1) : len;
  endfunction

endpackage

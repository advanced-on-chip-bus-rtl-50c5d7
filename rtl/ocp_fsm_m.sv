// ocp_fsm_m: master-side state machine of one slave port (FSM-M).
//
// The FSM-M acts as the OCP master of its slave IP. It takes the request
// beats that the slave's arbiter and MUX let through and turns every burst
// into single-beat OCP requests, generating the addresses itself: a burst
// counter steps from the first address in 8-byte (one data word) increments.
//  * single beat or multi-request burst beat: passed on with its own address;
//  * single-request read burst of L beats: one incoming request, L reads
//    issued by the FSM-M (state RD_BURST);
//  * single-request write burst of L beats: the first beat carries the
//    address, the L-1 data beats that follow (cont = 1) are written to the
//    generated addresses (state WR_BURST).
// For every read it issues, the FSM-M stores the requesting master, TagID,
// in-order flag and last-beat flag in a FIFO (the slave answers in order),
// and it attaches them to the slave's response so that the response reaches
// that master's scheduler. Writes are posted and complete when the slave
// accepts them.
//
// Timing: in IDLE the incoming beat is forwarded combinationally and
// accepted in the cycle the slave asserts SCmdAccept. Response beats pass
// through combinationally; MRespAccept is the scheduler's ready.
//
// The burst address generation from a start address and a counter follows
// the document; the state encoding, the word-sized address step and the
// tracking FIFO are this design's choices.
module ocp_fsm_m
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = ocp_pkg::DEF_NUM_MASTERS,
  parameter int unsigned TRK_DEPTH   = 8,
  localparam int unsigned MIDW       = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the request MUX
  input  logic            in_valid,
  input  bus_req_t        in_req,
  input  logic [MIDW-1:0] in_mid,
  output logic            in_ready,
  // OCP master port towards the slave IP
  output slv_req_t        s_req,
  input  logic            s_cmd_accept,
  input  resp_e           s_resp,
  input  logic [DW-1:0]   s_data,
  output logic            s_resp_accept,
  // tagged response towards the schedulers
  output logic            rsp_valid,
  output ocp_rsp_t        rsp,
  output logic [MIDW-1:0] rsp_mid,
  input  logic            rsp_ready
);
  typedef enum logic [1:0] {IDLE, RD_BURST, WR_BURST} state_e;

  typedef struct packed {
    logic [MIDW-1:0] mid;
    logic [TW-1:0]   tag;
    logic            in_order;
    logic            last;
  } trk_t;

  localparam int unsigned CW = $clog2(TRK_DEPTH + 1);
  localparam int unsigned IW = (TRK_DEPTH > 1) ? $clog2(TRK_DEPTH) : 1;

  state_e          state;
  logic [AW-1:0]   base;       // first address of the burst
  logic [BLW-1:0]  cnt;        // beat counter of the burst
  logic [BLW-1:0]  len;        // beats in the burst
  trk_t            binfo;      // routing info of the running read burst

  trk_t            trk [TRK_DEPTH];
  logic [IW-1:0]   trk_rd, trk_wr;
  logic [CW-1:0]   trk_cnt;
  logic            trk_full, trk_push, trk_pop;
  trk_t            trk_in;

  logic [AW-1:0]   gen_addr;
  logic            first_multi; // accepted first beat opens a single-request burst

  assign trk_full = (trk_cnt == CW'(TRK_DEPTH));
  assign gen_addr = base + AW'(cnt) * AW'(BYTES);

  always_comb begin
    s_req       = '{cmd: CMD_IDLE, addr: '0, data: '0};
    in_ready    = 1'b0;
    trk_push    = 1'b0;
    trk_in      = '{mid: in_mid, tag: in_req.req.tag, in_order: in_req.req.in_order, last: 1'b1};
    first_multi = in_req.req.single_req && (beats(in_req.req.burst_len) > BLW'(1));
    unique case (state)
      IDLE: begin
        if (in_valid && !(in_req.req.cmd == CMD_RD && trk_full)) begin
          s_req.cmd  = in_req.req.cmd;
          s_req.addr = in_req.req.addr;
          s_req.data = in_req.req.data;
          in_ready   = s_cmd_accept;
          if (in_req.req.cmd == CMD_RD) begin
            trk_push    = s_cmd_accept;
            trk_in.last = !first_multi;
          end
        end
      end
      RD_BURST: begin
        trk_in = binfo;
        trk_in.last = (cnt == len - 1'b1);
        if (!trk_full) begin
          s_req.cmd  = CMD_RD;
          s_req.addr = gen_addr;
          trk_push   = s_cmd_accept;
        end
      end
      WR_BURST: begin
        if (in_valid) begin
          s_req.cmd  = CMD_WR;
          s_req.addr = gen_addr;
          s_req.data = in_req.req.data;
          in_ready   = s_cmd_accept;
        end
      end
      default: ;
    endcase
  end

  // Burst control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      base  <= '0;
      cnt   <= '0;
      len   <= '0;
      binfo <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid && in_ready && first_multi) begin
          base  <= in_req.req.addr;
          cnt   <= BLW'(1);
          len   <= beats(in_req.req.burst_len);
          binfo <= trk_in;
          state <= (in_req.req.cmd == CMD_RD) ? RD_BURST : WR_BURST;
        end
        RD_BURST: if (trk_push) begin
          cnt <= cnt + 1'b1;
          if (cnt == len - 1'b1) state <= IDLE;
        end
        WR_BURST: if (in_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == len - 1'b1) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Tracking FIFO: one entry per read issued to the slave
  assign rsp_valid     = (s_resp != RESP_NULL) && (trk_cnt != '0);
  assign rsp_mid       = trk[trk_rd].mid;
  assign rsp           = '{resp: s_resp, data: s_data, tag: trk[trk_rd].tag,
                           in_order: trk[trk_rd].in_order, last: trk[trk_rd].last};
  assign s_resp_accept = rsp_valid && rsp_ready;
  assign trk_pop       = s_resp_accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trk_rd  <= '0;
      trk_wr  <= '0;
      trk_cnt <= '0;
      for (int i = 0; i < TRK_DEPTH; i++) trk[i] <= '0;
    end else begin
      if (trk_push) begin
        trk[trk_wr] <= trk_in;
        trk_wr      <= (trk_wr == IW'(TRK_DEPTH - 1)) ? '0 : trk_wr + 1'b1;
      end
      if (trk_pop) trk_rd <= (trk_rd == IW'(TRK_DEPTH - 1)) ? '0 : trk_rd + 1'b1;
      trk_cnt <= trk_cnt + CW'(trk_push) - CW'(trk_pop);
    end
  end

  // A continuation beat may only arrive while a write burst is running.
  always_ff @(posedge clk) begin
    if (rst_n) a_cont: assert (!(in_valid && in_req.cont) || state == WR_BURST);
  end
endmodule

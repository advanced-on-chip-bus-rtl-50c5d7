// ocp_mem_slave: OCP slave core with an internal memory.
//
// A slave IP for the bus: a word-addressed memory of WORDS 64-bit words behind
// a single-beat OCP slave port. Writes are stored in the cycle they are
// accepted and get no response (posted). Reads return SResp = DVA with the
// word LATENCY cycles after the request is accepted at the earliest, always
// in request order. A read is accepted only while fewer than DEPTH reads are
// in flight or waiting in the response buffer, so a master that holds off
// MRespAccept back-pressures the slave instead of losing data.
//
// Timing: SCmdAccept depends only on internal state. Each accepted read goes
// into a delay line of LATENCY stages and then into a DEPTH-entry response
// FIFO whose head drives SResp/SData until MRespAccept.
//
// The memory and the burst-free slave port follow the document's OCP slave
// with internal memory; the latency, size and buffering are this design's
// choices, made per instance so that slaves with different access latencies
// can be attached (the situation out-of-order transactions are meant for).
module ocp_mem_slave
  import ocp_pkg::*;
#(
  parameter int unsigned LATENCY = 2,
  parameter int unsigned WORDS   = 2 ** (REGION_AW - $clog2(BYTES)),
  parameter int unsigned DEPTH   = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  slv_req_t      req,
  output logic          cmd_accept,
  output resp_e         resp,
  output logic [DW-1:0] rdata,
  input  logic          resp_accept
);
  localparam int unsigned XW = $clog2(WORDS);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [WORDS];

  // Delay line
  logic          dl_v [LATENCY];
  logic [DW-1:0] dl_d [LATENCY];

  // Response FIFO
  logic [DW-1:0] fifo [DEPTH];
  logic [IW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] fcount;   // entries in the FIFO
  logic [CW-1:0] credit;   // reads accepted and not yet returned

  logic [XW-1:0] widx;
  logic          do_rd, do_wr, do_ret, fifo_in;

  assign widx       = req.addr[XW+$clog2(BYTES)-1:$clog2(BYTES)];
  assign cmd_accept = (req.cmd == CMD_WR) || (credit < CW'(DEPTH));
  assign do_wr      = (req.cmd == CMD_WR);
  assign do_rd      = (req.cmd == CMD_RD) && (credit < CW'(DEPTH));
  assign resp       = (fcount != '0) ? RESP_DVA : RESP_NULL;
  assign rdata      = fifo[rd_ptr];
  assign do_ret     = (fcount != '0) && resp_accept;
  assign fifo_in    = dl_v[LATENCY-1];

  always_ff @(posedge clk) begin
    if (do_wr) mem[widx] <= req.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin
        dl_v[i] <= 1'b0;
        dl_d[i] <= '0;
      end
      for (int i = 0; i < DEPTH; i++) fifo[i] <= '0;
      rd_ptr <= '0;
      wr_ptr <= '0;
      fcount <= '0;
      credit <= '0;
    end else begin
      dl_v[0] <= do_rd;
      dl_d[0] <= mem[widx];
      for (int i = 1; i < LATENCY; i++) begin
        dl_v[i] <= dl_v[i-1];
        dl_d[i] <= dl_d[i-1];
      end
      if (fifo_in) begin
        fifo[wr_ptr] <= dl_d[LATENCY-1];
        wr_ptr       <= (wr_ptr == IW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_ret) rd_ptr <= (rd_ptr == IW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      fcount <= fcount + CW'(fifo_in) - CW'(do_ret);
      credit <= credit + CW'(do_rd) - CW'(do_ret);
    end
  end
endmodule

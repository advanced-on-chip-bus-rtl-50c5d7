// ocp_decoder: address decoder of one master port.
//
// Maps a request address onto the slave that owns it and flags addresses that
// belong to no slave. Each slave owns one aligned region of 2^REGION_AW bytes,
// slave i starting at i * 2^REGION_AW; everything from NUM_SLAVES * 2^REGION_AW
// upwards is illegal and answered with an OCP ERR response by the FSM-S. The
// slave index also goes to the scheduler's recorder, which uses it to tell
// which slave must return each response.
//
// Purely combinational. The region size and layout are this design's choice;
// the decoding and the error check are what the bus description asks for.
module ocp_decoder
  import ocp_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = ocp_pkg::DEF_NUM_SLAVES,
  localparam int unsigned SIDW      = $clog2(NUM_SLAVES + 1)
) (
  input  logic [AW-1:0]         addr,
  output logic [SIDW-1:0]       sid,      // target slave (NUM_SLAVES when illegal)
  output logic [NUM_SLAVES-1:0] sel,      // one-hot slave select, zero when illegal
  output logic                  err       // address maps onto no slave
);
  logic [AW-REGION_AW-1:0] region;

  always_comb begin
    region = addr[AW-1:REGION_AW];
    err    = (region >= (AW-REGION_AW)'(NUM_SLAVES));
    sid    = err ? SIDW'(NUM_SLAVES) : SIDW'(region);
    sel    = '0;
    if (!err) sel[SIDW'(region)] = 1'b1;
  end
endmodule

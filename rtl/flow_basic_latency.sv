// flow_basic_latency: the no-contention latency C_i of a packet flow.
//
// The basic latency is derived from the flow's route (its link vector from
// xy_routing) and its packet length L_i. The link count is taken with one
// parallel population count over the whole link vector rather than a
// bit-by-bit scan. This design assumes a router-plus-link delay of one cycle
// per hop for the header flit, with the remaining flits pipelined behind it:
//   C_i = L_i + hops - 1   for a flow that crosses the network,
//   C_i = 0                for a flow whose route is empty (both tasks on
//                          the same core), which never uses a link.
// Purely combinational; the result saturates at the largest time value.
module flow_basic_latency
  import e2erta_pkg::*;
#(
  parameter int unsigned NLINKS = 560
) (
  input  logic [NLINKS-1:0] route,
  input  time_t             len,
  output logic [15:0]       hops,
  output time_t             c
);

  logic [TW:0] sum;

  always_comb begin
    hops = '0;
    for (int unsigned k = 0; k < NLINKS; k++) hops = hops + 16'(route[k]);
    sum = {1'b0, len} + (TW+1)'(hops) - (TW+1)'(1);
    if (hops == '0)  c = '0;
    else if (sum[TW]) c = '1;
    else              c = sum[TW-1:0];
  end

endmodule

// Dual-coded bus link: encoder at the sending end, decoder at the receiving
// end of an N-bit data bus widened to N + N/4 wires.
//
// The encoder turns data_i into the encoded word X and one control bit per
// 4-bit subset; together they drive bus_o. The wires themselves (a coupled
// RLC interconnect) are not part of this module: bus_o leaves it and bus_i
// comes back, so a bus model, a pipeline stage or a network link can sit in
// between. With bus_i tied to bus_o, data_o equals data_i.
//
// Bus layout (this design's choice; the publication only gives the total
// width n + n/4): bus[N-1:0] = X, bus[N+k] = control bit of subset k, subset 0
// being the rightmost data bits 3..0.
//
// Interface: data_i -> bus_o and bus_i -> data_o, both purely combinational;
// there is no clock, as the code itself needs no state. bus_o[0] is data_i[0]
// and data_o[0] is bus_i[0]: the code sends its rightmost bit unchanged.
module dc_link
  import dc_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]            data_i,
  output logic [N+N/SUBSET_W-1:0] bus_o,
  input  logic [N+N/SUBSET_W-1:0] bus_i,
  output logic [N-1:0]            data_o
);

  localparam int unsigned NS = N / SUBSET_W;

  logic [N-1:0]  tx_code;
  logic [NS-1:0] tx_ctrl;

  dc_encoder #(.N(N)) u_enc (
    .data_i (data_i),
    .code_o (tx_code),
    .ctrl_o (tx_ctrl)
  );

  assign bus_o = {tx_ctrl, tx_code};

  dc_decoder #(.N(N)) u_dec (
    .code_i (bus_i[N-1:0]),
    .ctrl_i (bus_i[N +: NS]),
    .data_o (data_o)
  );

endmodule

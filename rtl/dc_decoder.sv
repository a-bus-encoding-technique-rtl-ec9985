// Dual XOR/XNOR bus decoder.
//
// Inverse of dc_encoder. The rightmost bit is passed as it is, D(n) = X(n),
// and every other bit is recovered from its own encoded bit and its right
// neighbour:
//   D(P) = X(P) XOR  X(P+1)   where its subset's control bit is 1,
//   D(P) = X(P) XNOR X(P+1)   where its subset's control bit is 0.
// Unlike the encoder there is no chain: every output bit is one two-input
// gate plus the control-bit selection. The rules are the published ones; the
// use of the neighbouring subset's bit at a subset's right edge mirrors the
// encoder's reading.
//
// Interface: code_i (N bits, X) and ctrl_i (N/4 control bits, ctrl_i[k] for
// bits 4k+3..4k) in; data_o (N bits, D) out. Position P of the publication is
// bit N-P. Purely combinational. N must be a multiple of 4.
module dc_decoder
  import dc_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]          code_i,
  input  logic [N/SUBSET_W-1:0] ctrl_i,
  output logic [N-1:0]          data_o
);

  initial begin
    assert (N % SUBSET_W == 0 && N >= SUBSET_W)
      else $fatal(1, "dc_decoder: N=%0d is not a positive multiple of %0d", N, SUBSET_W);
  end

  always_comb begin
    data_o[0] = code_i[0];
    for (int unsigned b = 1; b < N; b++) begin
      data_o[b] = code_i[b] ^ code_i[b-1] ^ ~ctrl_i[b / SUBSET_W];
    end
  end

endmodule

// Dual XOR/XNOR bus encoder.
//
// An N-bit data word D is split into N/4 subsets of four bits, counted from
// the right. A dc_subset_mode instance per subset picks its operation and
// control bit. The encoded word X is then built from right to left: the
// rightmost bit is sent as it is, X(n) = D(n), and every other bit is
//   X(P) = D(P) XOR  X(P+1)   where its subset's control bit is 1,
//   X(P) = D(P) XNOR X(P+1)   where its subset's control bit is 0.
// The chain runs through subset boundaries: the rightmost bit of a subset
// uses the encoded leftmost bit of the subset to its right. The rules are the
// published ones; the chain across subsets is how this design reads them, and
// it reproduces the published 8-, 16-, 32- and 64-bit example words.
//
// Bit order: the publication numbers positions 1 (left) to n (right);
// position P is bit N-P here, so the chain runs from bit 0 up to bit N-1.
//
// Interface: data_i (N bits) in; code_o (N bits) and ctrl_o (N/4 bits,
// ctrl_o[k] for data bits 4k+3..4k) out. Purely combinational; the critical
// path is the N-1 gate ripple chain. N must be a multiple of 4.
module dc_encoder
  import dc_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]            data_i,
  output logic [N-1:0]            code_o,
  output logic [N/SUBSET_W-1:0]   ctrl_o
);

  localparam int unsigned NS = N / SUBSET_W;

  initial begin
    assert (N % SUBSET_W == 0 && N >= SUBSET_W)
      else $fatal(1, "dc_encoder: N=%0d is not a positive multiple of %0d", N, SUBSET_W);
  end

  for (genvar k = 0; k < NS; k++) begin : g_subset
    op_e op;
    dc_subset_mode u_mode (
      .sub_i  (data_i[k*SUBSET_W +: SUBSET_W]),
      .ctrl_o (op)
    );
    assign ctrl_o[k] = op;
  end

  logic [N-1:0] chain;

  always_comb begin
    chain    = '0;
    chain[0] = data_i[0];
    for (int unsigned b = 1; b < N; b++) begin
      // XNOR is XOR followed by inversion when the control bit is 0
      chain[b] = data_i[b] ^ chain[b-1] ^ ~ctrl_o[b / SUBSET_W];
    end
  end

  assign code_o = chain;

endmodule

// Operation selector for one 4-bit subset of the dual bus code.
//
// Counts the zeroes and ones of the subset. More zeroes than ones selects XOR
// (control bit 1), more ones than zeroes selects XNOR (control bit 0). On a
// 2-2 tie the number of transitions between neighbouring bits of the subset
// (three neighbour pairs) decides: more than one transition selects XOR,
// otherwise XNOR. These rules follow the published encoder algorithm; reading
// "transition" as a change between neighbouring bits inside the subset is
// this design's interpretation of the tie rule.
//
// Interface: sub_i is the subset, bit 0 its rightmost bit; ctrl_o is the
// control bit (dc_pkg::op_e value). Purely combinational, no clock.
module dc_subset_mode
  import dc_pkg::*;
(
  input  logic [SUBSET_W-1:0] sub_i,
  output op_e                 ctrl_o
);

  logic [2:0] ones;
  logic [2:0] trans;

  always_comb begin
    ones  = '0;
    trans = '0;
    for (int i = 0; i < SUBSET_W; i++) begin
      ones = ones + 3'(sub_i[i]);
    end
    for (int i = 0; i < SUBSET_W - 1; i++) begin
      trans = trans + 3'(sub_i[i] ^ sub_i[i+1]);
    end

    // zeroes = SUBSET_W - ones, so zeroes > ones <=> ones < SUBSET_W/2
    if (ones < 3'(SUBSET_W / 2))      ctrl_o = OP_XOR;
    else if (ones > 3'(SUBSET_W / 2)) ctrl_o = OP_XNOR;
    else if (trans > 3'd1)            ctrl_o = OP_XOR;
    else                              ctrl_o = OP_XNOR;
  end

endmodule

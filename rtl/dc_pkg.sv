// Shared constants and types of the dual (XOR/XNOR) bus code.
//
// The data word is cut into subsets of SUBSET_W bits counted from the right.
// Each subset is encoded with one of two operations, named by its control bit:
// OP_XOR (control bit 1) or OP_XNOR (control bit 0). The subset width of four
// and the control-bit values follow the published encoding rules.
package dc_pkg;

  localparam int unsigned SUBSET_W = 4;

  typedef enum logic {
    OP_XNOR = 1'b0,
    OP_XOR  = 1'b1
  } op_e;

  // Number of control bits (one per subset) for an n-bit word.
  function automatic int unsigned num_subsets(int unsigned n);
    return n / SUBSET_W;
  endfunction

endpackage

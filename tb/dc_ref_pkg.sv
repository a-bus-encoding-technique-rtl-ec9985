// Reference model of the dual XOR/XNOR bus code for the testbenches.
//
// Written in the position numbering of the published rules: positions 1
// (leftmost) to n (rightmost), position P held in vector bit n-P, subsets of
// four positions counted from the right. Words up to 64 bits are held in the
// low n bits of a 64-bit vector; control bit k belongs to the k-th subset
// from the right.
package dc_ref_pkg;

  localparam int MAXN = 64;

  // Operation of one subset: 1 = XOR, 0 = XNOR.
  function automatic bit ref_mode(input logic [3:0] s);
    int zeroes, ones, trans;
    zeroes = 0; ones = 0; trans = 0;
    for (int i = 0; i < 4; i++) begin
      if (s[i]) ones++;
      else      zeroes++;
    end
    for (int i = 3; i > 0; i--) begin
      if (s[i] != s[i-1]) trans++;
    end
    if (zeroes > ones)      return 1'b1;
    else if (zeroes < ones) return 1'b0;
    else if (trans > 1)     return 1'b1;
    else                    return 1'b0;
  endfunction

  // Subset (0 = rightmost) that position P of an n-bit word belongs to.
  function automatic int subset_of(input int n, input int p);
    return (n - p) / 4;
  endfunction

  function automatic void ref_encode(input  logic [MAXN-1:0] d, input int n,
                                     output logic [MAXN-1:0] x,
                                     output logic [MAXN/4-1:0] c);
    x = '0; c = '0;
    for (int k = 0; k < n / 4; k++) c[k] = ref_mode(d[4*k +: 4]);
    x[0] = d[0];                                   // X(n) = D(n)
    for (int p = n - 1; p >= 1; p--) begin
      if (c[subset_of(n, p)]) x[n-p] = d[n-p] ^ x[n-p-1];       // (1)
      else                    x[n-p] = ~(d[n-p] ^ x[n-p-1]);    // (2)
    end
  endfunction

  function automatic logic [MAXN-1:0] ref_decode(input logic [MAXN-1:0] x,
                                                 input logic [MAXN/4-1:0] c,
                                                 input int n);
    logic [MAXN-1:0] d;
    d = '0;
    d[0] = x[0];                                   // D(n) = X(n)
    for (int p = n - 1; p >= 1; p--) begin
      if (c[subset_of(n, p)]) d[n-p] = x[n-p] ^ x[n-p-1];       // (3)
      else                    d[n-p] = ~(x[n-p] ^ x[n-p-1]);    // (4)
    end
    return d;
  endfunction

  // Random word whose nibbles are uniformly distributed over all 16 values.
  function automatic logic [MAXN-1:0] rand_word(input int n);
    logic [MAXN-1:0] w;
    w = {$urandom, $urandom};
    if (n < MAXN) w &= (64'd1 << n) - 64'd1;
    return w;
  endfunction

  // Coupling transitions between two consecutive words on adjacent wires:
  // neighbours that switch in opposite directions.
  function automatic int coupling_transitions(input logic [MAXN+MAXN/4-1:0] a,
                                              input logic [MAXN+MAXN/4-1:0] b,
                                              input int w);
    int cnt;
    cnt = 0;
    for (int i = 0; i < w - 1; i++) begin
      if (a[i] != b[i] && a[i+1] != b[i+1] && b[i] != b[i+1]) cnt++;
    end
    return cnt;
  endfunction

endpackage

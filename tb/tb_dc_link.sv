// End-to-end testbench of dc_link at its default width (64 data bits, 80 bus
// wires). The bus is looped back (bus_i = bus_o), as an ideal wire. Each
// clock one word is sent: first the published 64-bit example word, then
// 10,000 random words. For every word the testbench checks the 80 bus wires
// against the reference encoder and the received word against the sent one.
//
// It counts how often each rule of the subset selector fired (majority of
// zeroes -> XOR, majority of ones -> XNOR, tie with more than one transition
// -> XOR, tie with at most one transition -> XNOR) and fails if one never
// did. It also reports, for information only, the coupling transitions
// (neighbouring wires switching in opposite directions) on the plain 64-wire
// bus and on the 80-wire coded bus for the same word stream.
module tb_dc_link;
  import dc_pkg::*;
  import dc_ref_pkg::*;

  localparam int N  = 64;
  localparam int NB = N + N / 4;
  localparam int NWORDS = 10000;

  logic          clk;
  logic [N-1:0]  data_in, data_out;
  logic [NB-1:0] bus;
  int            checks = 0, failures = 0;
  int            n_zero_major = 0, n_one_major = 0, n_tie_xor = 0, n_tie_xnor = 0;
  int            ct_plain = 0, ct_coded = 0;

  dc_link dut (
    .data_i (data_in),
    .bus_o  (bus),
    .bus_i  (bus),
    .data_o (data_out)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (NWORDS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input logic [NB-1:0] got, input logic [NB-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h expected=%h", what, got, exp);
    end
  endtask

  // classify the subsets of a word by the rule that decides them
  task automatic classify(input logic [N-1:0] d);
    int ones, trans;
    for (int k = 0; k < N / 4; k++) begin
      ones  = $countones(d[4*k +: 4]);
      trans = $countones(d[4*k +: 3] ^ d[4*k+1 +: 3]);
      if (ones < 2)       n_zero_major++;
      else if (ones > 2)  n_one_major++;
      else if (trans > 1) n_tie_xor++;
      else                n_tie_xnor++;
    end
  endtask

  task automatic send(input logic [N-1:0] d, input logic [NB-1:0] prev_bus,
                      input logic [N-1:0] prev_d);
    logic [63:0] xr;
    logic [15:0] cr;
    ref_encode(d, N, xr, cr);
    data_in = d;
    @(posedge clk);
    cmp("bus", bus, {cr, xr});
    cmp("data", NB'(data_out), NB'(d));
    classify(d);
    ct_plain += coupling_transitions(NB'(prev_d), NB'(d), N);
    ct_coded += coupling_transitions(prev_bus, bus, NB);
  endtask

  initial begin
    logic [N-1:0]  d, prev_d;
    logic [NB-1:0] prev_bus;
    d = 64'b11110100_10010000_01000010_11110010_11101000_11110101_11110010_00011101;
    prev_d = '0;
    prev_bus = '0;
    send(d, prev_bus, prev_d);
    cmp("table 64", bus, {16'h7D56,
        64'b00000011_10001111_11000001_11111110_00001000_00000011_00000001_11110001});
    for (int i = 1; i < NWORDS; i++) begin
      prev_d = d;
      prev_bus = bus;
      d = rand_word(N);
      send(d, prev_bus, prev_d);
    end
    $display("subset rules fired: zero-majority XOR %0d, one-majority XNOR %0d, tie XOR %0d, tie XNOR %0d",
             n_zero_major, n_one_major, n_tie_xor, n_tie_xnor);
    $display("coupling transitions over %0d words: plain %0d-wire bus %0d, coded %0d-wire bus %0d",
             NWORDS, N, ct_plain, NB, ct_coded);
    checks += 4;
    if (n_zero_major == 0) begin failures++; $display("FAIL zero-majority rule never fired"); end
    if (n_one_major  == 0) begin failures++; $display("FAIL one-majority rule never fired"); end
    if (n_tie_xor    == 0) begin failures++; $display("FAIL tie XOR rule never fired"); end
    if (n_tie_xnor   == 0) begin failures++; $display("FAIL tie XNOR rule never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of dc_encoder at the four published widths (8, 16,
// 32 and 64 bits). It checks the published example words of each width, then
// 2,000 random words per width against the reference model in dc_ref_pkg.
// The encoder is combinational: outputs are checked one clock after the
// input changes, i.e. within the same cycle.
module tb_dc_encoder;
  import dc_ref_pkg::*;

  logic clk;
  int   checks = 0, failures = 0;

  logic [7:0]  d8;  logic [7:0]  x8;  logic [1:0]  c8;
  logic [15:0] d16; logic [15:0] x16; logic [3:0]  c16;
  logic [31:0] d32; logic [31:0] x32; logic [7:0]  c32;
  logic [63:0] d64; logic [63:0] x64; logic [15:0] c64;

  dc_encoder #(.N(8))  u8  (.data_i(d8),  .code_o(x8),  .ctrl_o(c8));
  dc_encoder #(.N(16)) u16 (.data_i(d16), .code_o(x16), .ctrl_o(c16));
  dc_encoder #(.N(32)) u32 (.data_i(d32), .code_o(x32), .ctrl_o(c32));
  dc_encoder           u64 (.data_i(d64), .code_o(x64), .ctrl_o(c64));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h expected=%h", what, got, exp);
    end
  endtask

  // Apply one word to the encoder of width n and compare code and control
  // bits with the reference model.
  task automatic apply(input int n, input logic [63:0] d);
    logic [63:0] xr;
    logic [15:0] cr;
    ref_encode(d, n, xr, cr);
    case (n)
      8:  d8  = d[7:0];
      16: d16 = d[15:0];
      32: d32 = d[31:0];
      default: d64 = d;
    endcase
    @(posedge clk);
    case (n)
      8:  begin cmp("x8",  64'(x8),  xr); cmp("c8",  64'(c8),  64'(cr)); end
      16: begin cmp("x16", 64'(x16), xr); cmp("c16", 64'(c16), 64'(cr)); end
      32: begin cmp("x32", 64'(x32), xr); cmp("c32", 64'(c32), 64'(cr)); end
      default: begin cmp("x64", x64, xr); cmp("c64", 64'(c64), 64'(cr)); end
    endcase
  endtask

  initial begin
    // Published example words: data and encoded word as printed.
    d8 = 8'b00001101;
    d16 = 16'b10110100_00101110;
    d32 = 32'b10111000_11010000_11111000_11110000;
    d64 = 64'b11110100_10010000_01000010_11110010_11101000_11110101_11110010_00011101;
    @(posedge clk);
    cmp("table 8",  64'(x8),  64'b00000001);
    cmp("table 16", 64'(x16), 64'b11000011_11100000);
    cmp("table 32", 64'(x32), 64'b00111000_00011111_11111000_00000000);
    cmp("table 64", x64,
        64'b00000011_10001111_11000001_11111110_00001000_00000011_00000001_11110001);
    // control bits of those words, worked out by hand from the subset rules
    cmp("table 8 ctrl",  64'(c8),  64'b10);
    cmp("table 16 ctrl", 64'(c16), 64'b0110);
    cmp("table 32 ctrl", 64'(c32), 64'h55);
    cmp("table 64 ctrl", 64'(c64), 64'h7D56);

    // corner words
    foreach (d64[i]) apply(64, 64'd1 << i);
    apply(64, '0);
    apply(64, '1);
    apply(8, 64'hFF);
    apply(16, 64'hA5A5);

    for (int i = 0; i < 2000; i++) begin
      apply(8,  rand_word(8));
      apply(16, rand_word(16));
      apply(32, rand_word(32));
      apply(64, rand_word(64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

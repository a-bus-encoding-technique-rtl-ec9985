// Runs the published example words (8, 16, 32 and 64 bits) through dc_link.
//
// Each word is sent through a link of its own width and checked against the
// published encoded word; the received word must equal the sent one. The 8-,
// 16- and 32-bit words are also sent, zero-extended, through the default
// 64-bit link: because the code is built from the rightmost bit leftwards,
// the low bits of the 64-bit code must equal the narrow code.
module tb_table1;

  logic clk;
  int   checks = 0, failures = 0;

  logic [7:0]  d8,  r8;  logic [9:0]  b8;
  logic [15:0] d16, r16; logic [19:0] b16;
  logic [31:0] d32, r32; logic [39:0] b32;
  logic [63:0] d64, r64; logic [79:0] b64;

  dc_link #(.N(8))  u8  (.data_i(d8),  .bus_o(b8),  .bus_i(b8),  .data_o(r8));
  dc_link #(.N(16)) u16 (.data_i(d16), .bus_o(b16), .bus_i(b16), .data_o(r16));
  dc_link #(.N(32)) u32 (.data_i(d32), .bus_o(b32), .bus_i(b32), .data_o(r32));
  dc_link           u64 (.data_i(d64), .bus_o(b64), .bus_i(b64), .data_o(r64));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100) @(posedge clk);
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

  localparam logic [7:0]  T8D  = 8'b00001101;
  localparam logic [7:0]  T8X  = 8'b00000001;
  localparam logic [15:0] T16D = 16'b10110100_00101110;
  localparam logic [15:0] T16X = 16'b11000011_11100000;
  localparam logic [31:0] T32D = 32'b10111000_11010000_11111000_11110000;
  localparam logic [31:0] T32X = 32'b00111000_00011111_11111000_00000000;
  localparam logic [63:0] T64D =
    64'b11110100_10010000_01000010_11110010_11101000_11110101_11110010_00011101;
  localparam logic [63:0] T64X =
    64'b00000011_10001111_11000001_11111110_00001000_00000011_00000001_11110001;

  initial begin
    d8 = T8D; d16 = T16D; d32 = T32D; d64 = T64D;
    @(posedge clk);
    cmp("8-bit code",  64'(b8[7:0]),   64'(T8X));
    cmp("16-bit code", 64'(b16[15:0]), 64'(T16X));
    cmp("32-bit code", 64'(b32[31:0]), 64'(T32X));
    cmp("64-bit code", b64[63:0],      T64X);
    cmp("8-bit data",  64'(r8),  64'(T8D));
    cmp("16-bit data", 64'(r16), 64'(T16D));
    cmp("32-bit data", 64'(r32), 64'(T32D));
    cmp("64-bit data", r64,      T64D);

    d64 = 64'(T8D);
    @(posedge clk);
    cmp("8-bit word on 64-bit link",  64'(b64[7:0]),  64'(T8X));
    cmp("8-bit word back",            r64,            64'(T8D));
    d64 = 64'(T16D);
    @(posedge clk);
    cmp("16-bit word on 64-bit link", 64'(b64[15:0]), 64'(T16X));
    cmp("16-bit word back",           r64,            64'(T16D));
    d64 = 64'(T32D);
    @(posedge clk);
    cmp("32-bit word on 64-bit link", 64'(b64[31:0]), 64'(T32X));
    cmp("32-bit word back",           r64,            64'(T32D));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of dc_decoder. It decodes the published encoded
// example words of 8, 16, 32 and 64 bits (with their control bits, worked out
// by hand) and checks that the published data words come back. It then
// decodes 2,000 random code/control pairs per width against the reference
// model, and 2,000 reference-encoded random words per width for a round trip.
module tb_dc_decoder;
  import dc_ref_pkg::*;

  logic clk;
  int   checks = 0, failures = 0;

  logic [7:0]  x8;  logic [1:0]  c8;  logic [7:0]  d8;
  logic [15:0] x16; logic [3:0]  c16; logic [15:0] d16;
  logic [31:0] x32; logic [7:0]  c32; logic [31:0] d32;
  logic [63:0] x64; logic [15:0] c64; logic [63:0] d64;

  dc_decoder #(.N(8))  u8  (.code_i(x8),  .ctrl_i(c8),  .data_o(d8));
  dc_decoder #(.N(16)) u16 (.code_i(x16), .ctrl_i(c16), .data_o(d16));
  dc_decoder #(.N(32)) u32 (.code_i(x32), .ctrl_i(c32), .data_o(d32));
  dc_decoder           u64 (.code_i(x64), .ctrl_i(c64), .data_o(d64));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
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

  task automatic apply(input int n, input logic [63:0] x, input logic [15:0] c,
                       input logic [63:0] exp);
    case (n)
      8:  begin x8  = x[7:0];  c8  = c[1:0]; end
      16: begin x16 = x[15:0]; c16 = c[3:0]; end
      32: begin x32 = x[31:0]; c32 = c[7:0]; end
      default: begin x64 = x; c64 = c; end
    endcase
    @(posedge clk);
    case (n)
      8:  cmp("d8",  64'(d8),  exp);
      16: cmp("d16", 64'(d16), exp);
      32: cmp("d32", 64'(d32), exp);
      default: cmp("d64", d64, exp);
    endcase
  endtask

  initial begin
    logic [63:0] d, x;
    logic [15:0] c;
    apply(8, 64'b00000001, 16'b10, 64'b00001101);
    apply(16, 64'b11000011_11100000, 16'b0110, 64'b10110100_00101110);
    apply(32, 64'b00111000_00011111_11111000_00000000, 16'h55,
              64'b10111000_11010000_11111000_11110000);
    apply(64, 64'b00000011_10001111_11000001_11111110_00001000_00000011_00000001_11110001,
              16'h7D56,
              64'b11110100_10010000_01000010_11110010_11101000_11110101_11110010_00011101);
    for (int i = 0; i < 2000; i++) begin
      for (int w = 8; w <= 64; w *= 2) begin
        x = rand_word(w);
        c = 16'($urandom) & 16'((32'd1 << (w / 4)) - 1);
        apply(w, x, c, ref_decode(x, c, w));
        d = rand_word(w);
        ref_encode(d, w, x, c);
        apply(w, x, c, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

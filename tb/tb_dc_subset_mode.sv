// Self-checking testbench of dc_subset_mode: applies all 16 subsets and
// compares the control bit with the reference rule, and with a table of
// values worked out by hand for a few of them.
module tb_dc_subset_mode;
  import dc_pkg::*;
  import dc_ref_pkg::*;

  logic       clk;
  logic [3:0] sub;
  op_e        ctrl;
  int         checks = 0, failures = 0;

  dc_subset_mode dut (.sub_i(sub), .ctrl_o(ctrl));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] s, input bit exp);
    sub = s;
    @(posedge clk);
    checks++;
    if (ctrl !== op_e'(exp)) begin
      failures++;
      $display("FAIL sub=%b ctrl=%b expected=%b", s, ctrl, exp);
    end
  endtask

  initial begin
    // hand-worked: majority zero -> XOR(1), majority one -> XNOR(0),
    // tie with 2 or 3 transitions -> XOR, tie with 1 transition -> XNOR
    check(4'b0000, 1'b1);
    check(4'b1000, 1'b1);
    check(4'b1101, 1'b0);
    check(4'b1111, 1'b0);
    check(4'b1001, 1'b1);
    check(4'b0101, 1'b1);
    check(4'b0011, 1'b0);
    check(4'b1100, 1'b0);
    check(4'b0110, 1'b1);
    for (int v = 0; v < 16; v++) check(4'(v), ref_mode(4'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tn_logic: self-checking test of the one-neuron logic operators. One
// instance of each operator (AND, OR, NOT, NOR, NAND, implication a -> b)
// receives the same random input pairs, with and without tick, over many
// steps; every output is compared with the Boolean function, which checks
// both the truth table and that the neurons stay memoryless.
module tb_tn_logic;
  import tn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic a = 1'b0, b = 1'b0;
  logic [5:0] y, e;
  int checks = 0, failures = 0;
  int seen [4];

  tn_logic                 dut   (.clk, .rst_n, .tick, .a, .b, .y(y[0]));
  tn_logic #(.OP(OP_OR))   u_or  (.clk, .rst_n, .tick, .a, .b, .y(y[1]));
  tn_logic #(.OP(OP_NOT))  u_not (.clk, .rst_n, .tick, .a, .b, .y(y[2]));
  tn_logic #(.OP(OP_NOR))  u_nor (.clk, .rst_n, .tick, .a, .b, .y(y[3]));
  tn_logic #(.OP(OP_NAND)) u_nand(.clk, .rst_n, .tick, .a, .b, .y(y[4]));
  tn_logic #(.OP(OP_IMPL)) u_impl(.clk, .rst_n, .tick, .a, .b, .y(y[5]));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      a = 1'($urandom_range(0, 1));
      b = 1'($urandom_range(0, 1));
      tick = ($urandom_range(0, 3) != 0);
      e = {!a || b, !(a && b), !(a || b), !a, a || b, a && b};
      #1;
      seen[{a, b}]++;
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (y[k] !== e[k]) begin
          failures++;
          if (failures < 10) $display("t=%0d op %0d a=%b b=%b y=%b expected %b", t, k, a, b, y[k], e[k]);
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gf_add: checks the adder: sum equals the XOR of the operands, result
// one clock after load_b, operand A kept across additions, output held.
module tb_gf_add;
  import ecc_ref_pkg::*;
  localparam int N = 191;

  logic clk = 0, rst_n = 0, load_a = 0, load_b = 0, busy;
  logic [N-1:0] din = '0, dout;
  int checks = 0, failures = 0;

  gf_add dut (.clk, .rst_n, .load_a, .load_b, .din, .dout, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t a, b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      b = frand();
      if (i % 2 == 0) begin
        a = frand();
        @(negedge clk); din = a; load_a = 1;
        @(negedge clk); load_a = 0;
      end
      din = b; load_b = 1;
      @(negedge clk); load_b = 0; din = frand();
      checks++;
      if (!busy) begin failures++; $display("FAIL busy"); end
      @(negedge clk);
      checks += 2;
      if (busy) begin failures++; $display("FAIL latency"); end
      if (dout !== (a ^ b)) begin failures++; $display("FAIL sum"); end
      @(negedge clk);
      checks++;
      if (dout !== (a ^ b)) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lfsr_mul: checks the serial LFSR multiplier against the reference
// multiplication in GF(2^191), for the bit-serial default (D = 1, 191
// clocks per product) and for a word-level instance (D = 8, 24 clocks),
// including operands 0, 1 and x^190 and random ones, the product latency
// and that the result holds until the next start.
module tb_lfsr_mul;
  import ecc_ref_pkg::*;
  localparam int N = 191;

  logic clk = 0, rst_n = 0;
  logic la1 = 0, lb1 = 0, la8 = 0, lb8 = 0;
  logic [N-1:0] din = '0, d1, d8;
  logic b1, b8;
  int checks = 0, failures = 0;

  lfsr_mul dut1 (.clk, .rst_n, .load_a(la1), .load_b(lb1), .din, .dout(d1), .busy(b1));
  lfsr_mul #(.D(8)) dut8 (.clk, .rst_n, .load_a(la8), .load_b(lb8), .din, .dout(d8), .busy(b8));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [N-1:0] a, input logic [N-1:0] b, input bit wide);
    int lat;
    fe_t exp;
    exp = fmul(a, b);
    @(negedge clk);
    din = a; if (wide) la8 = 1; else la1 = 1;
    @(negedge clk);
    la1 = 0; la8 = 0;
    din = b; if (wide) lb8 = 1; else lb1 = 1;
    @(negedge clk);
    lb1 = 0; lb8 = 0; din = '0;
    lat = 1;
    while (wide ? b8 : b1) begin @(negedge clk); lat++; end
    checks += 2;
    if ((wide ? d8 : d1) !== exp) begin failures++; $display("FAIL product %h * %h", a, b); end
    if (lat != (wide ? 25 : 192)) begin failures++; $display("FAIL latency %0d", lat); end
    repeat (3) @(negedge clk);
    checks++;
    if ((wide ? d8 : d1) !== exp) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    fe_t top;
    top = '0; top[N-1] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 2; w++) begin
      one('0, frand(), w[0]);
      one(N'(1), 191'h5a5a, w[0]);
      one(top, top, w[0]);
      one(top, N'(2), w[0]);
      for (int i = 0; i < 20; i++) one(frand(), frand(), w[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

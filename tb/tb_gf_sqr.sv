// tb_gf_sqr: checks the squarer against reference multiplication a*a in
// GF(2^191), for 0, 1, x^190, x^95..x^96 and random elements, the one-clock
// latency, and a chain of 191 squarings which must return the start value
// (a^(2^191) = a).
module tb_gf_sqr;
  import ecc_ref_pkg::*;
  localparam int N = 191;

  logic clk = 0, rst_n = 0, load = 0, busy;
  logic [N-1:0] din = '0, dout;
  int checks = 0, failures = 0;

  gf_sqr dut (.clk, .rst_n, .load, .din, .dout, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sq(input logic [N-1:0] a, output logic [N-1:0] r);
    @(negedge clk);
    din = a; load = 1;
    @(negedge clk);
    load = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy"); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL latency"); end
    r = dout;
  endtask

  initial begin
    fe_t v, r, s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      case (i)
        0: v = '0;
        1: v = N'(1);
        2: begin v = '0; v[N-1] = 1; end
        3: begin v = '0; v[95] = 1; v[96] = 1; end
        default: v = frand();
      endcase
      sq(v, r);
      checks++;
      if (r !== fmul(v, v)) begin failures++; $display("FAIL square of %h", v); end
    end
    v = frand();
    s = v;
    for (int i = 0; i < N; i++) sq(s, s);
    checks++;
    if (s !== v) begin failures++; $display("FAIL a^(2^191) != a"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

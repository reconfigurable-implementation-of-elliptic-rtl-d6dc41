// tb_pau: runs the point doubling unit on the datapath. A random affine
// point (x, y) is put in Jacobian form with a random Z (X = x Z^2,
// Y = y Z^3); after the doubling, X'/Z'^2 and Y'/Z'^3 must equal the
// affine double computed by the reference model. Also checks that the
// doubling takes three multiplication times plus a small overhead and that
// the base point words are left alone.
module tb_pau;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  localparam int N = 191;

  logic clk = 0, rst_n = 0, start = 0, done;
  xfer_t xfer;
  logic xfer_valid, xfer_accept;
  logic [4:0] ha_addr = '0;
  logic ha_we = 0;
  logic [N-1:0] ha_wdata = '0, ha_rdata;
  logic [3:0] mul_busy;
  logic [1:0] sqr_busy, add_busy;
  int checks = 0, failures = 0;

  pau dut (.clk, .rst_n, .start, .done, .xfer, .xfer_valid, .xfer_accept);
  ecc_datapath u_dp (.clk, .rst_n, .xfer, .xfer_valid, .xfer_accept, .ha_addr, .ha_we,
                     .ha_wdata, .ha_rdata, .mul_busy, .sqr_busy, .add_busy);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [4:0] a, input fe_t v);
    @(negedge clk); ha_addr = a; ha_wdata = v; ha_we = 1;
    @(negedge clk); ha_we = 0;
  endtask
  task automatic rd(input logic [4:0] a, output fe_t v);
    @(negedge clk); ha_addr = a; #1 v = ha_rdata;
  endtask

  initial begin
    pt_t p, q, e;
    fe_t a, z, z2, zi, X, Y, Z, px;
    int cl;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      p.inf = 0; p.x = frand(); p.y = frand(); a = frand();
      z = (t == 0) ? N'(1) : frand();
      z2 = fmul(z, z);
      px = frand();
      q.inf = 0; q.x = px; q.y = frand();
      wr(A_PX, px);
      wr(A_PY, q.y);
      wr(A_CA, a);
      wr(A_X, fmul(p.x, z2));
      wr(A_Y, fmul(p.y, fmul(z2, z)));
      wr(A_Z, z);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cl = 1;
      while (!done) begin @(negedge clk); cl++; end
      rd(A_X, X); rd(A_Y, Y); rd(A_Z, Z);
      e = padd(p, q, a);
      zi = finv(Z);
      checks += 3;
      if (fmul(X, fmul(zi, zi)) !== e.x) begin failures++; $display("FAIL x of Q+P"); end
      if (fmul(Y, fmul(zi, fmul(zi, zi))) !== e.y) begin failures++; $display("FAIL y of Q+P"); end
      if (cl < 4 * N || cl > 4 * (N + 1) + 60) begin failures++; $display("FAIL clocks %0d", cl); end
      rd(A_PX, X);
      checks++;
      if (X !== px) begin failures++; $display("FAIL PX changed"); end
      if (t == 0) $display("addition: %0d clocks", cl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

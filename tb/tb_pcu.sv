// tb_pcu: runs the point conversion unit on the datapath. For random X, Y
// and Z (and Z = 1, Z = x^190) the results x = X/Z^2 and y = Y/Z^3 are
// compared with the reference inversion by the extended Euclidean
// algorithm. Also checks the conversion time: 12 multiplications in
// sequence and 191 squarings at two clocks each, plus a small overhead.
module tb_pcu;
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

  pcu dut (.clk, .rst_n, .start, .done, .xfer, .xfer_valid, .xfer_accept);
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
    fe_t X, Y, Z, zi, x, y;
    int cl;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      X = frand(); Y = frand();
      case (t)
        0: Z = N'(1);
        1: begin Z = '0; Z[N-1] = 1; end
        default: Z = frand();
      endcase
      wr(A_X, X); wr(A_Y, Y); wr(A_Z, Z);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cl = 1;
      while (!done) begin @(negedge clk); cl++; end
      rd(A_XR, x); rd(A_YR, y);
      zi = finv(Z);
      checks += 3;
      if (x !== fmul(X, fmul(zi, zi))) begin failures++; $display("FAIL x"); end
      if (y !== fmul(Y, fmul(zi, fmul(zi, zi)))) begin failures++; $display("FAIL y"); end
      if (cl < 12 * N + 2 * 191 || cl > 12 * (N + 1) + 2 * 191 + 80) begin
        failures++; $display("FAIL clocks %0d", cl);
      end
      if (t == 0) $display("conversion: %0d clocks", cl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ecc_datapath: drives the datapath with single bus transfers. It
// multiplies, squares and adds words of the operand memory on every unit
// (each unit index), passes values through the register and the constant
// one, chains a unit's output straight into another unit, and checks the
// interlock: a transfer that reads a busy multiplier is held exactly until
// the product is ready.
module tb_ecc_datapath;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  localparam int N = 191;

  logic clk = 0, rst_n = 0;
  xfer_t xfer;
  logic xfer_valid = 0, xfer_accept;
  logic [4:0] ha_addr = '0;
  logic ha_we = 0;
  logic [N-1:0] ha_wdata = '0, ha_rdata;
  logic [3:0] mul_busy;
  logic [1:0] sqr_busy, add_busy;
  int checks = 0, failures = 0;

  ecc_datapath dut (.clk, .rst_n, .xfer, .xfer_valid, .xfer_accept, .ha_addr, .ha_we,
                    .ha_wdata, .ha_rdata, .mul_busy, .sqr_busy, .add_busy);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue one transfer, return the clocks it waited
  task automatic go(input xfer_t x, output int waited);
    @(negedge clk);
    xfer = x; xfer_valid = 1;
    waited = 0;
    #1;
    while (!xfer_accept) begin @(negedge clk); waited++; #1; end
    @(negedge clk);
    xfer_valid = 0;
  endtask

  task automatic mv1(input src_e s, input logic [4:0] sa, input dst_e d, input logic [4:0] da);
    int w;
    go(mv(s, sa, d, da), w);
  endtask

  task automatic wr(input logic [4:0] a, input fe_t v);
    @(negedge clk); ha_addr = a; ha_wdata = v; ha_we = 1;
    @(negedge clk); ha_we = 0;
  endtask

  task automatic chk(input string what, input logic [4:0] a, input fe_t exp);
    @(negedge clk); ha_addr = a; #1;
    checks++;
    if (ha_rdata !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    fe_t a, b, c;
    int w;
    xfer = mv(S_RAM, 5'd0, D_REG, 5'd0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int u = 0; u < 4; u++) begin
      a = frand(); b = frand();
      wr(5'd16, a); wr(5'd17, b);
      mv1(S_RAM, 5'd16, D_MULA, 5'(u));
      mv1(S_RAM, 5'd17, D_MULB, 5'(u));
      go(mv(S_MUL, 5'(u), D_RAM, 5'(20 + u)), w);
      checks++;
      if (w < 189 || w > 191) begin failures++; $display("FAIL interlock wait %0d", w); end
      chk("product", 5'(20 + u), fmul(a, b));
    end
    for (int u = 0; u < 2; u++) begin
      a = frand(); b = frand();
      wr(5'd16, a); wr(5'd17, b);
      mv1(S_RAM, 5'd16, D_SQR, 5'(u));
      mv1(S_SQR, 5'(u), D_RAM, 5'd24);
      chk("square", 5'd24, fmul(a, a));
      mv1(S_RAM, 5'd16, D_ADDA, 5'(u));
      mv1(S_RAM, 5'd17, D_ADDB, 5'(u));
      mv1(S_ADD, 5'(u), D_RAM, 5'd25);
      chk("sum", 5'd25, a ^ b);
      // chain: (a + b)^2 straight from the adder into the other squarer
      mv1(S_ADD, 5'(u), D_SQR, 5'(1 - u));
      mv1(S_SQR, 5'(1 - u), D_RAM, 5'd26);
      chk("chained square", 5'd26, fmul(a ^ b, a ^ b));
    end
    a = frand();
    wr(5'd16, a);
    mv1(S_RAM, 5'd16, D_REG, 5'd0);
    mv1(S_REG, 5'd0, D_RAM, 5'd27);
    chk("register", 5'd27, a);
    mv1(S_ONE, 5'd0, D_RAM, 5'd28);
    chk("constant one", 5'd28, N'(1));
    // a product fed straight into a multiplier: a*b*c
    a = frand(); b = frand(); c = frand();
    wr(5'd16, a); wr(5'd17, b); wr(5'd18, c);
    mv1(S_RAM, 5'd16, D_MULA, 5'd0);
    mv1(S_RAM, 5'd17, D_MULB, 5'd0);
    mv1(S_RAM, 5'd18, D_MULA, 5'd3);
    mv1(S_MUL, 5'd0, D_MULB, 5'd3);
    mv1(S_MUL, 5'd3, D_RAM, 5'd29);
    chk("product chain", 5'd29, fmul(fmul(a, b), c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

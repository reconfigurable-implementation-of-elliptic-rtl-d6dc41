// tb_dp_ram: checks the dual-port operand memory: writes through either
// port are read back through both, the ports work at the same time on
// different words, and port B wins a same-word write collision.
module tb_dp_ram;
  import ecc_ref_pkg::*;
  localparam int W = 191;

  logic clk = 0;
  logic [4:0] a_addr = '0, b_addr = '0;
  logic a_we = 0, b_we = 0;
  logic [W-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [W-1:0] model [32];
  int checks = 0, failures = 0;

  dp_ram dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata, .b_addr, .b_we, .b_wdata, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill all words, alternating ports
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      model[i] = frand();
      if (i % 2 == 1) begin b_addr = 5'(i); b_wdata = model[i]; b_we = 1; end
      else       begin a_addr = 5'(i); a_wdata = model[i]; a_we = 1; end
      @(negedge clk);
      a_we = 0; b_we = 0;
    end
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      a_addr = 5'(i); b_addr = 5'(31 - i);
      #1;
      checks += 2;
      if (a_rdata !== model[i])      begin failures++; $display("FAIL A read %0d", i); end
      if (b_rdata !== model[31 - i]) begin failures++; $display("FAIL B read %0d", 31 - i); end
    end
    // simultaneous writes to different words
    for (int i = 0; i < 100; i++) begin
      int x, y;
      x = $urandom_range(31, 0);
      y = (x + $urandom_range(31, 1)) % 32;
      @(negedge clk);
      a_addr = 5'(x); a_wdata = frand(); a_we = 1;
      b_addr = 5'(y); b_wdata = frand(); b_we = 1;
      model[x] = a_wdata; model[y] = b_wdata;
      @(negedge clk);
      a_we = 0; b_we = 0;
      a_addr = 5'(y); b_addr = 5'(x);
      #1;
      checks += 2;
      if (a_rdata !== model[y]) begin failures++; $display("FAIL dual write A"); end
      if (b_rdata !== model[x]) begin failures++; $display("FAIL dual write B"); end
    end
    // collision: port B wins
    @(negedge clk);
    a_addr = 5'd7; a_wdata = frand(); a_we = 1;
    b_addr = 5'd7; b_wdata = frand(); b_we = 1;
    model[7] = b_wdata;
    @(negedge clk);
    a_we = 0; b_we = 0;
    #1;
    checks++;
    if (a_rdata !== model[7]) begin failures++; $display("FAIL collision"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

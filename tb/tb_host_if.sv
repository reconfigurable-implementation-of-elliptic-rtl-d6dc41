// tb_host_if: checks the host control interface alone against a memory
// model and a stand-in controller: memory writes and reads pass to port A,
// the scalar write reaches the controller, start is given only for a write
// of bit 0 to the control address while the controller is idle, and the
// status word shows busy, sticky done (cleared by start) and infinity.
module tb_host_if;
  import ecc_ref_pkg::*;
  localparam int N = 191;

  logic clk = 0, rst_n = 0;
  logic [5:0] h_addr = '0;
  logic h_we = 0;
  logic [N-1:0] h_wdata = '0, h_rdata;
  logic [4:0] ram_addr;
  logic ram_we, m_we, start;
  logic [N-1:0] ram_wdata, ram_rdata, m_wdata, m_q;
  logic busy = 0, done = 0, inf = 0;
  logic [N-1:0] mem [32];
  int checks = 0, failures = 0, n_start = 0;

  host_if dut (.clk, .rst_n, .h_addr, .h_we, .h_wdata, .h_rdata, .ram_addr, .ram_we,
               .ram_wdata, .ram_rdata, .m_we, .m_wdata, .m_q, .start, .busy, .done, .inf);

  always #5 clk = ~clk;
  assign ram_rdata = mem[ram_addr];
  always @(posedge clk) begin
    if (ram_we) mem[ram_addr] <= ram_wdata;
    if (m_we) m_q <= m_wdata;
    if (start) n_start++;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [5:0] a, input logic [N-1:0] d);
    @(negedge clk); h_addr = a; h_wdata = d; h_we = 1;
    @(negedge clk); h_we = 0;
  endtask
  task automatic expect_rd(input string what, input logic [5:0] a, input logic [N-1:0] e);
    @(negedge clk); h_addr = a; #1;
    checks++;
    if (h_rdata !== e) begin failures++; $display("FAIL %s: %h", what, h_rdata); end
  endtask

  initial begin
    logic [N-1:0] v [32];
    m_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin v[i] = frand(); wr(6'(i), v[i]); end
    for (int i = 0; i < 32; i++) expect_rd("memory", 6'(i), v[i]);
    v[0] = frand();
    wr(6'd32, v[0]);
    expect_rd("m", 6'd32, v[0]);
    for (int i = 0; i < 32; i++) expect_rd("memory unchanged by m write", 6'(i), mem[i]);
    expect_rd("status idle", 6'd33, '0);
    wr(6'd33, N'(2));
    checks++;
    if (n_start != 0) begin failures++; $display("FAIL start without bit 0"); end
    wr(6'd33, N'(1));
    checks++;
    if (n_start != 1) begin failures++; $display("FAIL no start"); end
    busy = 1;
    wr(6'd33, N'(1));
    checks++;
    if (n_start != 1) begin failures++; $display("FAIL start while busy"); end
    expect_rd("status busy", 6'd33, N'(1));
    @(negedge clk); busy = 0; done = 1; inf = 1;
    @(negedge clk); done = 0;
    expect_rd("status done", 6'd33, N'(6));
    repeat (3) @(negedge clk);
    expect_rd("done sticky", 6'd33, N'(6));
    inf = 0;
    wr(6'd33, N'(1));
    expect_rd("done cleared", 6'd33, N'(0));
    expect_rd("unmapped", 6'd40, N'(0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mcu: checks the main control unit alone. Stand-in PDU/PAU/PCU answer
// each start with done after a random delay, and the transfer accept is
// random. For random scalars (and 0, 1, 2, 3, all ones, a scalar with many
// leading zeros) the testbench records the order of doublings, additions
// and conversion and compares it with the one expected from the scalar's
// bits, checks the five initial transfers, the infinity flag, the
// leading-zero scan time (one clock per zero) and that m is 0 afterwards.
module tb_mcu;
  import ecc_pkg::*;
  localparam int N = 191;

  logic clk = 0, rst_n = 0;
  logic m_we = 0, start = 0, busy, done, inf;
  logic [N-1:0] m_wdata = '0, m_q;
  logic pdu_start, pau_start, pcu_start;
  logic pdu_done = 0, pau_done = 0, pcu_done = 0;
  xfer_t xfer;
  logic xfer_valid, xfer_accept;
  int checks = 0, failures = 0;
  string seq;
  bit seen_done = 0;
  xfer_t got_x [$];

  mcu dut (.clk, .rst_n, .m_we, .m_wdata, .m_q, .start, .busy, .done, .inf,
           .pdu_start, .pdu_done, .pau_start, .pau_done, .pcu_start, .pcu_done,
           .xfer, .xfer_valid, .xfer_accept);

  always #5 clk = ~clk;

  assign xfer_accept = xfer_valid && ($urandom_range(3, 0) != 0);

  always @(posedge clk) if (xfer_accept) got_x.push_back(xfer);
  always @(posedge clk) if (done) seen_done = 1;

  // stand-in units
  always @(posedge clk) begin
    if (pdu_start) begin seq = {seq, "D"}; fork begin repeat ($urandom_range(5, 1)) @(posedge clk); pdu_done <= 1; @(posedge clk); pdu_done <= 0; end join_none end
    if (pau_start) begin seq = {seq, "A"}; fork begin repeat ($urandom_range(5, 1)) @(posedge clk); pau_done <= 1; @(posedge clk); pau_done <= 0; end join_none end
    if (pcu_start) begin seq = {seq, "C"}; fork begin repeat ($urandom_range(5, 1)) @(posedge clk); pcu_done <= 1; @(posedge clk); pcu_done <= 0; end join_none end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [N-1:0] m);
    string exp;
    int top, scan;
    xfer_t ex [5];
    exp = "";
    top = -1;
    for (int i = N - 1; i >= 0; i--) begin
      if (top >= 0) begin exp = {exp, "D"}; if (m[i]) exp = {exp, "A"}; end
      else if (m[i]) top = i;
    end
    if (top >= 0) exp = {exp, "C"};
    seq = "";
    got_x.delete();
    @(negedge clk); m_wdata = m; m_we = 1;
    @(negedge clk); m_we = 0;
    checks++;
    if (m_q !== m) begin failures++; $display("FAIL m load"); end
    seen_done = 0;
    start = 1;
    @(negedge clk); start = 0;
    scan = 0;
    while (!dut.xfer_valid && !seen_done) begin @(negedge clk); scan++; end
    // a write to m while busy must be ignored
    m_wdata = '1; m_we = busy;
    @(negedge clk); m_we = 0;
    for (int k = 0; k < 20000 && !seen_done; k++) @(negedge clk);
    checks++;
    if (!seen_done) begin
      failures++;
      $display("FAIL run for m=%h did not finish", m);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    checks += 4;
    if (seq != exp) begin failures++; $display("FAIL order %s expected %s", seq, exp); end
    if (inf !== (m == '0)) begin failures++; $display("FAIL inf"); end
    if (m_q !== '0 && m != '0) begin failures++; $display("FAIL m not consumed"); end
    if (top >= 0 && scan != N - top) begin failures++; $display("FAIL scan %0d for top bit %0d", scan, top); end
    if (top >= 0) begin
      ex[0] = mv(S_RAM, A_PX, D_REG, 5'd0);
      ex[1] = mv(S_REG, 5'd0, D_RAM, A_X);
      ex[2] = mv(S_RAM, A_PY, D_REG, 5'd0);
      ex[3] = mv(S_REG, 5'd0, D_RAM, A_Y);
      ex[4] = mv(S_ONE, 5'd0, D_RAM, A_Z);
      checks++;
      if (got_x.size() != 5) begin failures++; $display("FAIL %0d init transfers", got_x.size()); end
      else for (int i = 0; i < 5; i++) if (got_x[i] !== ex[i]) begin failures++; $display("FAIL init transfer %0d", i); end
    end
  endtask

  initial begin
    logic [N-1:0] m;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run('0);
    run(N'(1));
    run(N'(2));
    run(N'(3));
    run('1);
    run(N'(32'hdeadbeef));
    for (int i = 0; i < 10; i++) begin
      for (int j = 0; j < 6; j++) m = {m[N-33:0], 32'($urandom)};
      run(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

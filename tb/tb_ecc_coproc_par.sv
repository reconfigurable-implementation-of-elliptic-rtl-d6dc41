// tb_ecc_coproc_par: the end-to-end test of tb_ecc_coproc with fully
// parallel multipliers (all N bits per clock, one clock per product) in
// place of the bit-serial ones, the controller unchanged. The bus transfers
// alone set the pace.
//
// Through the host bus it loads a random point P, a random curve
// coefficient a2 and scalars m, runs point multiplications and compares the
// affine result with an independent affine double-and-add model. Cases:
// m = 0 (point at infinity), m = 1, 2, 3, 0b1011, a 20-bit scalar with
// leading zeros and a full 191-bit scalar with 95 one bits. While one run
// is busy the host writes and reads back a spare memory word through the
// second memory port. It counts how often each mechanism happens (bus
// stalls, doublings, additions, conversions, leading-zero skips, infinity
// result, host access during a run) and fails for one that never happened.
// Cycle counts of the 191-bit run are checked against bounds derived from
// the multiplier latency and printed next to the reference figures of
// 183742 + 2482 clocks.
module tb_ecc_coproc_par;
  import ecc_ref_pkg::*;

  localparam int N = 191;
  localparam int ML = 1;     // clocks per multiplication
  localparam int OVH = 100;   // allowed overhead clocks per point operation

  logic         clk = 0, rst_n = 0;
  logic [5:0]   h_addr = '0;
  logic         h_we = 0;
  logic [N-1:0] h_wdata = '0, h_rdata;
  logic         irq_done;

  int checks = 0, failures = 0;
  int n_stall = 0, n_dbl = 0, n_add = 0, n_conv = 0, n_skip = 0, n_inf = 0, n_host = 0;
  int cyc = 0;

  ecc_coproc #(.MUL_D(N)) dut (.clk, .rst_n, .h_addr, .h_we, .h_wdata, .h_rdata, .irq_done);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dut.xfer_valid && !dut.xfer_accept) n_stall++;
      if (dut.u_acu.pdu_done) n_dbl++;
      if (dut.u_acu.pau_done) n_add++;
      if (dut.u_acu.pcu_done) n_conv++;
      if (dut.u_acu.u_mcu.state_q == 4'd1 && !dut.m_q[N-1]) n_skip++;  // state 1: SCAN
    end
  end

  initial begin
    #(10 * 3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(input logic [5:0] a, input logic [N-1:0] d);
    @(negedge clk);
    h_addr = a; h_wdata = d; h_we = 1;
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic hread(input logic [5:0] a, output logic [N-1:0] d);
    @(negedge clk);
    h_addr = a;
    #1 d = h_rdata;
  endtask

  task automatic check(input string what, input logic [N-1:0] got, input logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // one point multiplication; returns clocks from start to done
  task automatic run(input logic [N-1:0] m, input pt_t p, input logic [N-1:0] a,
                     input bit host_poke, output int clocks);
    pt_t exp;
    logic [N-1:0] st, rx, ry, v;
    int t0;
    int a_dbl, a_add;
    hwrite(6'd0, p.x);
    hwrite(6'd1, p.y);
    hwrite(6'd2, a);
    hwrite(6'd32, m);
    a_dbl = n_dbl; a_add = n_add;
    hwrite(6'd33, 1);
    t0 = cyc;
    if (host_poke) begin
      repeat (50) @(negedge clk);
      v = frand();
      hwrite(6'd20, v);
      hread(6'd33, st);
      hread(6'd20, rx);
      if (st[0]) n_host++;
      check("host word during run", rx, v);
    end
    do hread(6'd33, st); while (st[1] == 0);
    clocks = cyc - t0;
    exp = pmul(m, p, a);
    checks++;
    if (st[2] !== exp.inf) begin
      failures++;
      $display("FAIL infinity flag m=%h", m);
    end
    if (exp.inf) n_inf++;
    else begin
      hread(6'd6, rx);
      hread(6'd7, ry);
      check("x of mP", rx, exp.x);
      check("y of mP", ry, exp.y);
      // doublings and additions match the scalar's bits
      checks++;
      if (n_dbl - a_dbl != $clog2(m + 1) - 1 || n_add - a_add != $countones(m) - 1) begin
        failures++;
        $display("FAIL operation count dbl=%0d add=%0d", n_dbl - a_dbl, n_add - a_add);
      end
    end
  endtask

  initial begin
    pt_t p;
    logic [N-1:0] a, m;
    int c, c0, c1;
    p.inf = 0;
    p.x = frand(); p.y = frand(); a = frand();
    repeat (3) @(negedge clk);
    rst_n = 1;

    run('0, p, a, 0, c);
    run(N'(1), p, a, 0, c0);
    run(N'(2), p, a, 0, c);
    run(N'(3), p, a, 0, c);
    run(N'(11), p, a, 1, c);
    p.x = frand(); p.y = frand(); a = frand();
    run(N'(20'hA5C3F), p, a, 0, c);

    // full-length scalar: top bit set, 95 ones in all
    m = '0;
    m[N-1] = 1;
    while ($countones(m) < 95) m[$urandom_range(N-2, 0)] = 1;
    p.x = frand(); p.y = frand(); a = frand();
    c1 = 0;
    run(m, p, a, 0, c1);
    $display("191-bit scalar, 95 ones: %0d clocks in all (m = 1, i.e. scan and conversion: %0d); bit-serial reference design: 183742 + 2482",
             c1, c0);
    // each doubling has 3 multiplications in sequence, each addition 4, the
    // conversion 12: lower bounds; upper bounds allow 60 clocks per operation
    checks++;
    if (c1 < 190*3*ML + 94*4*ML + 12*ML || c1 > 190*(3*(ML+1)+OVH) + 94*(4*(ML+1)+OVH) + 12*(ML+1) + 2*191 + 400) begin
      failures++;
      $display("FAIL cycle count %0d out of bounds", c1);
    end
    checks++;
    // m = 1 also spends N-1 clocks skipping leading zeros
    if (c0 < 12*ML + 2*191 + (N-1) || c0 > 12*(ML+1) + 2*191 + (N-1) + 200) begin
      failures++;
      $display("FAIL conversion cycle count %0d", c0);
    end

    $display("mechanisms: stalls=%0d doublings=%0d additions=%0d conversions=%0d skips=%0d inf=%0d host_during_run=%0d",
             n_stall, n_dbl, n_add, n_conv, n_skip, n_inf, n_host);
    // leading zeros of 1, 2, 3, 11, the 20-bit and the 191-bit scalar
    checks++;
    if (n_skip != 190 + 189 + 189 + 187 + 171 + 0) begin failures++; $display("FAIL skip count"); end
    checks++;
    if (n_dbl != 0 + 1 + 1 + 3 + 19 + 190) begin failures++; $display("FAIL doubling count"); end
    checks += 7;
    if (n_stall == 0) failures++;
    if (n_dbl == 0) failures++;
    if (n_add == 0) failures++;
    if (n_conv == 0) failures++;
    if (n_skip == 0) failures++;
    if (n_inf == 0) failures++;
    if (n_host == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// gf_sqr: squarer for GF(2^N) in polynomial basis.
//
// Squaring is linear over GF(2): the coefficients of a are spread to the
// even positions of a 2N-1 bit polynomial (a fixed permutation, no gates),
// which is then reduced modulo f(x) = x^N + POLY. For a trinomial such as
// x^191 + x^9 + 1 the reduction is a small XOR network.
//
// Interface: load copies din into the operand register and starts; one
// clock later the reduced square is in the output register: busy is high
// for that one clock. dout holds the square until the next load.
// Permutation plus reduction follows the reference design; the generic
// reduction loop and the one-clock timing are this implementation's.
module gf_sqr #(
  parameter int unsigned  N    = 191,
  parameter logic [N-1:0] POLY = N'(1) | (N'(1) << 9)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout,
  output logic         busy
);
  logic [N-1:0] a_q, c_q, sq;
  logic         busy_q;

  // spread then reduce, highest term first
  always_comb begin
    logic [2*N-2:0] s;
    s = '0;
    for (int i = 0; i < int'(N); i++) s[2*i] = a_q[i];
    for (int k = 2*N-2; k >= int'(N); k--) begin
      if (s[k]) begin
        s[k] = 1'b0;
        s = s ^ ((2*N-1)'(POLY) << (k - N));
      end
    end
    sq = s[N-1:0];
  end

  assign busy = busy_q;
  assign dout = c_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      c_q    <= '0;
      busy_q <= 1'b0;
    end else begin
      busy_q <= load;
      if (load) a_q <= din;
      if (busy_q) c_q <= sq;
    end
  end

  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !load)
    else $error("gf_sqr loaded while busy");
endmodule

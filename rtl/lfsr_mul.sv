// lfsr_mul: serial LFSR multiplier for GF(2^N) in polynomial basis.
//
// Computes c = a * b mod f(x), f(x) = x^N + POLY (POLY holds the low terms).
// It scans b from its most significant digit, D bits per clock (Horner's
// rule): c <- c * x^D + digit(b) * a, each multiplication by x being a shift
// with one conditional XOR of POLY, i.e. an LFSR step. D = 1 is the bit-level
// multiplier used in the reference design; D > 1 gives the word-level
// variant with ceil(N/D) clocks per product.
//
// Interface: operand register A loads din on load_a; load_b loads operand B
// from din and starts the product. busy is high for ceil(N/D) clocks after
// the load_b clock; when it falls, dout holds the product and keeps it until
// the next load_b. Loading while busy is not allowed (asserted).
// The LFSR structure, bit-level default and n-clock latency follow the
// reference design; the most-significant-first scan order is this
// implementation's choice.
module lfsr_mul #(
  parameter int unsigned       N    = 191,
  parameter int unsigned       D    = 1,
  parameter logic [N-1:0]      POLY = N'(1) | (N'(1) << 9)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_a,
  input  logic         load_b,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout,
  output logic         busy
);
  localparam int unsigned M  = (N + D - 1) / D;   // clocks per product
  localparam int unsigned BW = M * D;              // B padded to whole digits
  localparam int unsigned CW = $clog2(M + 1);

  logic [N-1:0]  a_q, c_q, c_nxt;
  logic [BW-1:0] b_q;
  logic [CW-1:0] cnt_q;

  assign busy = (cnt_q != '0);
  assign dout = c_q;

  always_comb begin
    c_nxt = c_q;
    for (int j = 0; j < int'(D); j++) begin
      c_nxt = {c_nxt[N-2:0], 1'b0} ^ (c_nxt[N-1] ? POLY : '0);
      if (b_q[BW-1-j]) c_nxt = c_nxt ^ a_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      cnt_q <= '0;
    end else begin
      if (load_a) a_q <= din;
      if (load_b) begin
        b_q   <= BW'(din);
        c_q   <= '0;
        cnt_q <= CW'(M);
      end else if (busy) begin
        c_q   <= c_nxt;
        b_q   <= b_q << D;
        cnt_q <= cnt_q - 1'b1;
      end
    end
  end

  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(load_a || load_b))
    else $error("lfsr_mul loaded while busy");
endmodule

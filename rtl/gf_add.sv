// gf_add: adder for GF(2^N), the bitwise XOR of two N-bit vectors, which is
// the field addition in any basis.
//
// Like every arithmetic unit of the datapath it has operand registers and
// an output register. load_a loads operand A; load_b loads operand B and
// starts: one clock later the sum is in the output register (busy is high
// for that one clock). dout holds the sum until the next load_b.
// The register structure follows the reference architecture; the one-clock
// timing is this implementation's choice.
module gf_add #(
  parameter int unsigned N = 191
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_a,
  input  logic         load_b,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout,
  output logic         busy
);
  logic [N-1:0] a_q, b_q, c_q;
  logic         busy_q;

  assign busy = busy_q;
  assign dout = c_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      b_q    <= '0;
      c_q    <= '0;
      busy_q <= 1'b0;
    end else begin
      busy_q <= load_b;
      if (load_a) a_q <= din;
      if (load_b) b_q <= din;
      if (busy_q) c_q <= a_q ^ b_q;
    end
  end

  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(load_a || load_b))
    else $error("gf_add loaded while busy");
endmodule

// ecc_coproc: elliptic curve point multiplication coprocessor over
// GF(2^191), polynomial basis, f(x) = x^191 + x^9 + 1.
//
// Computes the affine point mP for a scalar m and an affine point P on
// y^2 + xy = x^3 + a2 x^2 + a6 with the double-and-add method, keeping the
// running point in Jacobian coordinates (no inversion per step) and
// converting to affine once at the end with a Fermat inversion.
//
// Structure: the host interface gives the host access to the operand memory
// (port A) and to the arithmetic control unit (ACU); the ACU drives the
// datapath (four serial LFSR multipliers, two squarers, two adders, a
// register and port B of the operand memory on one operand bus).
//
// Use: write PX, PY, a2 to memory words 0, 1, 2, write m to address 32,
// write 1 to address 33, poll address 33 until done (bit 1); read x, y of
// mP from words 6 and 7. If bit 2 is set, m was 0 and mP is the point at
// infinity. Time: about 600 clocks per doubling, 800 per addition, 2700 for
// the conversion (MUL_D = 1).
module ecc_coproc
  import ecc_pkg::*;
#(
  parameter int unsigned  N     = FIELD_N,
  parameter logic [N-1:0] POLY  = N'(FIELD_POLY),
  parameter int unsigned  MUL_D = 1,
  parameter int unsigned  DEPTH = RAM_DEPTH,
  localparam int unsigned HAW   = $clog2(DEPTH) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [HAW-1:0] h_addr,
  input  logic           h_we,
  input  logic [N-1:0]   h_wdata,
  output logic [N-1:0]   h_rdata,
  output logic           irq_done
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW-1:0] ram_addr;
  logic          ram_we;
  logic [N-1:0]  ram_wdata, ram_rdata;
  logic          m_we, start, busy, done, inf;
  logic [N-1:0]  m_wdata, m_q;
  xfer_t         xfer;
  logic          xfer_valid, xfer_accept;

  host_if #(.N(N), .DEPTH(DEPTH)) u_host (
    .clk, .rst_n, .h_addr, .h_we, .h_wdata, .h_rdata,
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata,
    .m_we, .m_wdata, .m_q, .start, .busy, .done, .inf
  );

  acu #(.N(N)) u_acu (
    .clk, .rst_n, .m_we, .m_wdata, .m_q, .start, .busy, .done, .inf,
    .xfer, .xfer_valid, .xfer_accept
  );

  ecc_datapath #(.N(N), .POLY(POLY), .MUL_D(MUL_D), .DEPTH(DEPTH)) u_dp (
    .clk, .rst_n, .xfer, .xfer_valid, .xfer_accept,
    .ha_addr (ram_addr), .ha_we (ram_we), .ha_wdata (ram_wdata), .ha_rdata (ram_rdata),
    .mul_busy (), .sqr_busy (), .add_busy ()
  );

  assign irq_done = done;

  // the conversion unit's inversion chain is written for GF(2^191)
  if (N != 191) begin : g_field_check
    $error("ecc_coproc: the PCU inversion chain supports N = 191 only");
  end
endmodule

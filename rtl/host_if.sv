// host_if: host control interface of the coprocessor.
//
// A word-wide register interface. Addresses 0..DEPTH-1 reach the operand
// memory through its port A (combinational read, write at the clock edge),
// which the host may use while a point multiplication runs. Above it:
//   M_ADDR    (DEPTH)     write: load the scalar m (while idle); read: m
//   CTRL_ADDR (DEPTH + 1) write bit 0 = 1: start;
//                         read: bit 0 busy, bit 1 done, bit 2 result is the
//                         point at infinity
// done is sticky: it is set when the point multiplication ends and cleared
// by the next start. The register map is this implementation's choice.
module host_if
  import ecc_pkg::*;
#(
  parameter int unsigned N     = FIELD_N,
  parameter int unsigned DEPTH = RAM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned HAW  = AW + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // host bus
  input  logic [HAW-1:0] h_addr,
  input  logic           h_we,
  input  logic [N-1:0]   h_wdata,
  output logic [N-1:0]   h_rdata,
  // operand memory port A
  output logic [AW-1:0]  ram_addr,
  output logic           ram_we,
  output logic [N-1:0]   ram_wdata,
  input  logic [N-1:0]   ram_rdata,
  // arithmetic control unit
  output logic           m_we,
  output logic [N-1:0]   m_wdata,
  input  logic [N-1:0]   m_q,
  output logic           start,
  input  logic           busy,
  input  logic           done,
  input  logic           inf
);
  localparam logic [HAW-1:0] M_ADDR    = HAW'(DEPTH);
  localparam logic [HAW-1:0] CTRL_ADDR = HAW'(DEPTH + 1);

  logic is_ram, done_q;

  assign is_ram    = (h_addr < HAW'(DEPTH));
  assign ram_addr  = h_addr[AW-1:0];
  assign ram_we    = h_we && is_ram;
  assign ram_wdata = h_wdata;
  assign m_we      = h_we && (h_addr == M_ADDR);
  assign m_wdata   = h_wdata;
  assign start     = h_we && (h_addr == CTRL_ADDR) && h_wdata[0] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     done_q <= 1'b0;
    else if (start) done_q <= 1'b0;
    else if (done)  done_q <= 1'b1;
  end

  always_comb begin
    if (is_ram)                  h_rdata = ram_rdata;
    else if (h_addr == M_ADDR)   h_rdata = m_q;
    else if (h_addr == CTRL_ADDR) h_rdata = N'({inf, done_q, busy});
    else                         h_rdata = '0;
  end
endmodule

// dp_ram: dual-port operand memory of the datapath.
//
// DEPTH words of W bits. Port A belongs to the host interface, port B to the
// datapath, so the host can move data while a point multiplication runs.
// Each port has one address, a write enable and a write data input: writes
// happen at the clock edge, reads are asynchronous (distributed-RAM style),
// so a word read in a clock can be loaded into a unit in the same clock.
// If both ports write the same word in one clock, port B (datapath) wins;
// the host is expected to avoid the words the datapath uses while it runs.
// The dual-port arrangement, with the host on the second port, follows the
// reference architecture; the depth, the read timing and the collision rule
// are this implementation's choices.
module dp_ram #(
  parameter int unsigned W     = 191,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A (host)
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // port B (datapath)
  input  logic [AW-1:0] b_addr,
  input  logic          b_we,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && !(b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

  assign a_rdata = mem[a_addr];
  assign b_rdata = mem[b_addr];
endmodule

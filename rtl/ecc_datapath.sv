// ecc_datapath: the arithmetic datapath of the coprocessor.
//
// Four serial LFSR multipliers, two squarers, two adders and one register
// share a single operand bus. The bus is driven by a multiplexer whose
// inputs are the operand memory (port B of the dual-port RAM), the register,
// the output register of every arithmetic unit and the constant 1 (used to
// set Z = 1 when an affine point enters Jacobian form). Every unit input and
// the memory write port take their data from this bus. Port A of the memory
// is brought out for the host interface.
//
// Control is one transfer per clock (see ecc_pkg::xfer_t). A transfer is
// accepted (xfer_accept) in the clock it is presented when its source unit
// has a valid result (not busy) and its destination unit is free (not
// busy); otherwise it waits. On acceptance the destination register or
// memory word takes the bus value at the clock edge. This interlock is a
// choice of this implementation; the unit mix and the bus follow the
// reference datapath.
//
// Timing: memory reads are combinational, so a memory-to-unit transfer
// takes one clock; a multiplication takes ceil(N/MUL_D) clocks after its
// start, a squaring or an addition one clock.
module ecc_datapath
  import ecc_pkg::*;
#(
  parameter int unsigned  N     = FIELD_N,
  parameter logic [N-1:0] POLY  = N'(FIELD_POLY),
  parameter int unsigned  MUL_D = 1,
  parameter int unsigned  DEPTH = RAM_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // transfer from the arithmetic control unit
  input  xfer_t                    xfer,
  input  logic                     xfer_valid,
  output logic                     xfer_accept,
  // operand memory port A (host)
  input  logic [$clog2(DEPTH)-1:0] ha_addr,
  input  logic                     ha_we,
  input  logic [N-1:0]             ha_wdata,
  output logic [N-1:0]             ha_rdata,
  // unit status, for observation
  output logic [NUM_MUL-1:0]       mul_busy,
  output logic [NUM_SQR-1:0]       sqr_busy,
  output logic [NUM_ADD-1:0]       add_busy
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [N-1:0] bus;
  logic [N-1:0] ram_b_rdata, reg_q;
  logic [N-1:0] mul_dout [NUM_MUL];
  logic [N-1:0] sqr_dout [NUM_SQR];
  logic [N-1:0] add_dout [NUM_ADD];
  logic         src_ready, dst_ready;
  logic         ram_b_we;
  logic [AW-1:0] ram_b_addr;

  // ---------------- operand bus multiplexer ----------------
  always_comb begin
    unique case (xfer.src)
      S_RAM:   bus = ram_b_rdata;
      S_REG:   bus = reg_q;
      S_MUL:   bus = mul_dout[xfer.sa[1:0]];
      S_SQR:   bus = sqr_dout[xfer.sa[0]];
      S_ADD:   bus = add_dout[xfer.sa[0]];
      S_ONE:   bus = N'(1);
      default: bus = '0;
    endcase
  end

  // ---------------- interlock ----------------
  always_comb begin
    unique case (xfer.src)
      S_MUL:   src_ready = !mul_busy[xfer.sa[1:0]];
      S_SQR:   src_ready = !sqr_busy[xfer.sa[0]];
      S_ADD:   src_ready = !add_busy[xfer.sa[0]];
      default: src_ready = 1'b1;
    endcase
    unique case (xfer.dst)
      D_MULA, D_MULB: dst_ready = !mul_busy[xfer.da[1:0]];
      D_SQR:          dst_ready = !sqr_busy[xfer.da[0]];
      D_ADDA, D_ADDB: dst_ready = !add_busy[xfer.da[0]];
      default:        dst_ready = 1'b1;
    endcase
  end

  assign xfer_accept = xfer_valid && src_ready && dst_ready;

  // ---------------- operand memory ----------------
  assign ram_b_we   = xfer_accept && (xfer.dst == D_RAM);
  assign ram_b_addr = (xfer.dst == D_RAM) ? xfer.da[AW-1:0] : xfer.sa[AW-1:0];

  dp_ram #(.W(N), .DEPTH(DEPTH)) u_ram (
    .clk     (clk),
    .a_addr  (ha_addr),
    .a_we    (ha_we),
    .a_wdata (ha_wdata),
    .a_rdata (ha_rdata),
    .b_addr  (ram_b_addr),
    .b_we    (ram_b_we),
    .b_wdata (bus),
    .b_rdata (ram_b_rdata)
  );

  // ---------------- register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   reg_q <= '0;
    else if (xfer_accept && xfer.dst == D_REG)    reg_q <= bus;
  end

  // ---------------- arithmetic units ----------------
  for (genvar i = 0; i < NUM_MUL; i++) begin : g_mul
    logic hit;
    assign hit = xfer_accept && (xfer.da[1:0] == 2'(i));
    lfsr_mul #(.N(N), .D(MUL_D), .POLY(POLY)) u_mul (
      .clk    (clk),
      .rst_n  (rst_n),
      .load_a (hit && xfer.dst == D_MULA),
      .load_b (hit && xfer.dst == D_MULB),
      .din    (bus),
      .dout   (mul_dout[i]),
      .busy   (mul_busy[i])
    );
  end

  for (genvar i = 0; i < NUM_SQR; i++) begin : g_sqr
    gf_sqr #(.N(N), .POLY(POLY)) u_sqr (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (xfer_accept && xfer.dst == D_SQR && xfer.da[0] == 1'(i)),
      .din   (bus),
      .dout  (sqr_dout[i]),
      .busy  (sqr_busy[i])
    );
  end

  for (genvar i = 0; i < NUM_ADD; i++) begin : g_add
    logic hit;
    assign hit = xfer_accept && (xfer.da[0] == 1'(i));
    gf_add #(.N(N)) u_add (
      .clk    (clk),
      .rst_n  (rst_n),
      .load_a (hit && xfer.dst == D_ADDA),
      .load_b (hit && xfer.dst == D_ADDB),
      .din    (bus),
      .dout   (add_dout[i]),
      .busy   (add_busy[i])
    );
  end

  // port B carries one address per clock: a memory-to-memory transfer
  // must go through the register
  a_no_ram_to_ram: assert property (@(posedge clk) disable iff (!rst_n)
      xfer_valid |-> !(xfer.src == S_RAM && xfer.dst == D_RAM))
    else $error("memory-to-memory transfer");
endmodule

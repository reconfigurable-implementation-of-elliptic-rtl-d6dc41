// acu: arithmetic control unit, the hierarchical controller of the
// coprocessor.
//
// The main control unit (MCU, holding the scalar m) runs the point
// multiplication and starts the point addition unit (PAU), the point
// doubling unit (PDU) and the point conversion unit (PCU) in turn. Each of
// them, and the MCU itself for its initial copies, produces a stream of
// bus transfers for the datapath. Only one of them is active at a time, so
// the ACU merges the streams by selecting the one whose valid is high and
// returns the datapath's accept to it.
module acu
  import ecc_pkg::*;
#(
  parameter int unsigned N = FIELD_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         m_we,
  input  logic [N-1:0] m_wdata,
  output logic [N-1:0] m_q,
  input  logic         start,
  output logic         busy,
  output logic         done,
  output logic         inf,
  output xfer_t        xfer,
  output logic         xfer_valid,
  input  logic         xfer_accept
);
  xfer_t mcu_x, pdu_x, pau_x, pcu_x;
  logic  mcu_v, pdu_v, pau_v, pcu_v;
  logic  pdu_start, pdu_done, pau_start, pau_done, pcu_start, pcu_done;

  mcu #(.N(N)) u_mcu (
    .clk, .rst_n, .m_we, .m_wdata, .m_q, .start, .busy, .done, .inf,
    .pdu_start, .pdu_done, .pau_start, .pau_done, .pcu_start, .pcu_done,
    .xfer (mcu_x), .xfer_valid (mcu_v), .xfer_accept (xfer_accept && mcu_v)
  );

  pdu u_pdu (.clk, .rst_n, .start (pdu_start), .done (pdu_done),
             .xfer (pdu_x), .xfer_valid (pdu_v), .xfer_accept (xfer_accept && pdu_v));
  pau u_pau (.clk, .rst_n, .start (pau_start), .done (pau_done),
             .xfer (pau_x), .xfer_valid (pau_v), .xfer_accept (xfer_accept && pau_v));
  pcu u_pcu (.clk, .rst_n, .start (pcu_start), .done (pcu_done),
             .xfer (pcu_x), .xfer_valid (pcu_v), .xfer_accept (xfer_accept && pcu_v));

  always_comb begin
    xfer_valid = mcu_v | pdu_v | pau_v | pcu_v;
    if (pdu_v)      xfer = pdu_x;
    else if (pau_v) xfer = pau_x;
    else if (pcu_v) xfer = pcu_x;
    else            xfer = mcu_x;
  end

  a_one_active: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({mcu_v, pdu_v, pau_v, pcu_v}))
    else $error("two controller units active");
endmodule

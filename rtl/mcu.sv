// mcu: main control unit of the arithmetic control unit, with the scalar
// register m.
//
// Runs the left-to-right double-and-add point multiplication mP. The host
// loads m (m_we) while the unit is idle. On start the MCU
//   1. returns at once with inf = 1 if m = 0 (mP is the point at infinity);
//   2. shifts m left until its leading 1 leaves the register, one bit per
//      clock, counting the bits that remain below it;
//   3. copies the affine base point into the Jacobian accumulator
//      (X, Y, Z) = (PX, PY, 1) with five bus transfers of its own;
//   4. for each remaining bit, from the most significant down: starts the
//      PDU (doubling) and, if the bit is 1, the PAU (addition of P), each
//      time waiting for the unit's done;
//   5. starts the PCU (conversion to affine) and then pulses done.
// m is shifted in place and is 0 after a run. Which bits are processed and
// in which order follows the double-and-add method; the m register as part
// of the controller follows the reference design; the rest is this
// implementation's.
module mcu
  import ecc_pkg::*;
#(
  parameter int unsigned N = FIELD_N
) (
  input  logic         clk,
  input  logic         rst_n,
  // host side
  input  logic         m_we,
  input  logic [N-1:0] m_wdata,
  output logic [N-1:0] m_q,
  input  logic         start,
  output logic         busy,
  output logic         done,
  output logic         inf,
  // sub-units
  output logic         pdu_start,
  input  logic         pdu_done,
  output logic         pau_start,
  input  logic         pau_done,
  output logic         pcu_start,
  input  logic         pcu_done,
  // own transfers
  output xfer_t        xfer,
  output logic         xfer_valid,
  input  logic         xfer_accept
);
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [3:0] {
    IDLE, SCAN, INIT, DBL, DBL_W, ADD, ADD_W, NEXT, CONV, CONV_W
  } state_e;

  state_e        state_q;
  logic [CW-1:0] left_q;     // bits of m still to process
  logic [2:0]    init_q;     // init transfer index

  always_comb begin
    unique case (init_q)
      3'd0:    xfer = mv(S_RAM, A_PX, D_REG, 5'd0);
      3'd1:    xfer = mv(S_REG, 5'd0, D_RAM, A_X);
      3'd2:    xfer = mv(S_RAM, A_PY, D_REG, 5'd0);
      3'd3:    xfer = mv(S_REG, 5'd0, D_RAM, A_Y);
      default: xfer = mv(S_ONE, 5'd0, D_RAM, A_Z);
    endcase
    xfer_valid = (state_q == INIT);
    pdu_start  = (state_q == DBL);
    pau_start  = (state_q == ADD);
    pcu_start  = (state_q == CONV);
    busy       = (state_q != IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      m_q     <= '0;
      left_q  <= '0;
      init_q  <= '0;
      done    <= 1'b0;
      inf     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        IDLE: begin
          if (m_we) m_q <= m_wdata;
          if (start) begin
            if (m_q == '0) begin
              inf  <= 1'b1;
              done <= 1'b1;
            end else begin
              inf     <= 1'b0;
              left_q  <= CW'(N - 1);
              state_q <= SCAN;
            end
          end
        end
        SCAN: begin
          m_q <= m_q << 1;
          if (m_q[N-1]) begin
            init_q  <= '0;
            state_q <= INIT;
          end else begin
            left_q <= left_q - 1'b1;
          end
        end
        INIT: if (xfer_accept) begin
          init_q <= init_q + 1'b1;
          if (init_q == 3'd4) state_q <= NEXT;
        end
        NEXT: state_q <= (left_q == '0) ? CONV : DBL;
        DBL:  state_q <= DBL_W;
        DBL_W: if (pdu_done) state_q <= m_q[N-1] ? ADD : ADD_W;
        ADD:  state_q <= ADD_W;
        ADD_W: if (pau_done || !m_q[N-1]) begin
          m_q     <= m_q << 1;
          left_q  <= left_q - 1'b1;
          state_q <= NEXT;
        end
        CONV: state_q <= CONV_W;
        CONV_W: if (pcu_done) begin
          done    <= 1'b1;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end
endmodule

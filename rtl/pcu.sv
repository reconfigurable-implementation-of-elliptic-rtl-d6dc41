// pcu: point conversion unit of the arithmetic control unit.
//
// Converts the Jacobian result (X, Y, Z) to affine coordinates,
// x = X/Z^2 and y = Y/Z^3, written to the result words XR and YR.
// 1/Z is computed by Fermat's theorem, Z^-1 = Z^(2^191 - 2), with the
// Itoh-Tsujii addition chain of the reference design for GF(2^191): with
// y_k = Z^(2^k - 1), y_(i+j) = y_i^(2^j) * y_j along
//   1, 2, 3, 5, 10, 20, 40, 80, 85, 95, 190
// and Z^-1 = y_190^2: 10 multiplications and 190 squarings. Then
// Zi2 = Zi^2, Zi3 = Zi*Zi2, x = X*Zi2, y = Y*Zi3 (the last two in parallel
// on two multipliers): 13 multiplications and 191 squarings in all.
// Runs of squarings are one table entry repeated: the squarer's output is
// fed back to its input, one squaring per two clocks.
// The chain is specific to n = 191; the unit is only correct for that field.
//
// Interface and handshake as in pdu: start, done, xfer/xfer_valid/xfer_accept.
// Time: about 12 * (N + 1) + 2 * 191 + 60 clocks.
module pcu
  import ecc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  done,
  output xfer_t xfer,
  output logic  xfer_valid,
  input  logic  xfer_accept
);
  localparam int unsigned LAST = 53;

  typedef struct packed {
    xfer_t      x;
    logic [6:0] rep;    // issue the transfer rep+1 times
  } step_t;

  logic       run_q;
  logic [5:0] step_q;
  logic [6:0] cnt_q;
  step_t      cur;

  function automatic step_t st(xfer_t x, logic [6:0] rep);
    step_t s;
    s.x   = x;
    s.rep = rep;
    return s;
  endfunction

  // y1 = Z; y2, y5, y10, y20, y40, y95 are kept in T0..T5
  function automatic step_t prog(logic [5:0] s);
    unique case (s)
      6'd0:  return st(mv(S_RAM, A_Z,  D_SQR,  5'd0), 7'd0);
      6'd1:  return st(mv(S_SQR, 5'd0, D_MULA, 5'd0), 7'd0);
      6'd2:  return st(mv(S_RAM, A_Z,  D_MULB, 5'd0), 7'd0);   // y2
      6'd3:  return st(mv(S_MUL, 5'd0, D_RAM,  A_T0), 7'd0);
      6'd4:  return st(mv(S_MUL, 5'd0, D_SQR,  5'd0), 7'd0);
      6'd5:  return st(mv(S_SQR, 5'd0, D_MULA, 5'd0), 7'd0);
      6'd6:  return st(mv(S_RAM, A_Z,  D_MULB, 5'd0), 7'd0);   // y3
      6'd7:  return st(mv(S_MUL, 5'd0, D_SQR,  5'd0), 7'd0);
      6'd8:  return st(mv(S_SQR, 5'd0, D_SQR,  5'd0), 7'd0);   // ^(2^2)
      6'd9:  return st(mv(S_SQR, 5'd0, D_MULA, 5'd0), 7'd0);
      6'd10: return st(mv(S_RAM, A_T0, D_MULB, 5'd0), 7'd0);   // y5
      6'd11: return st(mv(S_MUL, 5'd0, D_RAM,  A_T1), 7'd0);
      6'd12: return st(mv(S_MUL, 5'd0, D_SQR,  5'd0), 7'd0);
      6'd13: return st(mv(S_SQR, 5'd0, D_SQR,  5'd0), 7'd3);   // ^(2^5)
      6'd14: return st(mv(S_SQR, 5'd0, D_MULA, 5'd0), 7'd0);
      6'd15: return st(mv(S_RAM, A_T1, D_MULB, 5'd0), 7'd0);   // y10
      6'd16: return st(mv(S_MUL, 5'd0, D_RAM,  A_T2), 7'd0);
      6'd17: return st(mv(S_MUL, 5'd0, D_SQR,  5'd0), 7'd0);
      6'd18: return st(mv(S_SQR, 5'd0, D_SQR,  5'd0), 7'd8);   // ^(2^10)
      6'd19: return st(mv(S_SQR, 5'd0, D_MULA, 5'd0), 7'd0);
      6'd20: return st(mv(S_RAM, A_T2, D_MULB, 5'd0), 7'd0);   // y20
      6'd21: return st(mv(S_MUL, 5'd0, D_RAM,  A_T3), 7'd0);
      6'd22: return st(mv(S_MUL, 5'd0, D_SQR,  5'd0), 7'd0);
      6'd23: return st(mv(S_SQR, 5'd0, D_SQR,  5'd0), 7'd18);  // ^(2^20)
      6'd24: return st(mv(S_SQR, 5'd0, D_MULA, 5'd0), 7'd0);
      6'd25: return st(mv(S_RAM, A_T3, D_MULB, 5'd0), 7'd0);   // y40
      6'd26: return st(mv(S_MUL, 5'd0, D_RAM,  A_T4), 7'd0);
      6'd27: return st(mv(S_MUL, 5'd0, D_SQR,  5'd0), 7'd0);
      6'd28: return st(mv(S_SQR, 5'd0, D_SQR,  5'd0), 7'd38);  // ^(2^40)
      6'd29: return st(mv(S_SQR, 5'd0, D_MULA, 5'd0), 7'd0);
      6'd30: return st(mv(S_RAM, A_T4, D_MULB, 5'd0), 7'd0);   // y80
      6'd31: return st(mv(S_MUL, 5'd0, D_SQR,  5'd0), 7'd0);
      6'd32: return st(mv(S_SQR, 5'd0, D_SQR,  5'd0), 7'd3);   // ^(2^5)
      6'd33: return st(mv(S_SQR, 5'd0, D_MULA, 5'd0), 7'd0);
      6'd34: return st(mv(S_RAM, A_T1, D_MULB, 5'd0), 7'd0);   // y85
      6'd35: return st(mv(S_MUL, 5'd0, D_SQR,  5'd0), 7'd0);
      6'd36: return st(mv(S_SQR, 5'd0, D_SQR,  5'd0), 7'd8);   // ^(2^10)
      6'd37: return st(mv(S_SQR, 5'd0, D_MULA, 5'd0), 7'd0);
      6'd38: return st(mv(S_RAM, A_T2, D_MULB, 5'd0), 7'd0);   // y95
      6'd39: return st(mv(S_MUL, 5'd0, D_RAM,  A_T5), 7'd0);
      6'd40: return st(mv(S_MUL, 5'd0, D_SQR,  5'd0), 7'd0);
      6'd41: return st(mv(S_SQR, 5'd0, D_SQR,  5'd0), 7'd93);  // ^(2^95)
      6'd42: return st(mv(S_SQR, 5'd0, D_MULA, 5'd0), 7'd0);
      6'd43: return st(mv(S_RAM, A_T5, D_MULB, 5'd0), 7'd0);   // y190
      6'd44: return st(mv(S_MUL, 5'd0, D_SQR,  5'd0), 7'd0);   // Zi = y190^2
      6'd45: return st(mv(S_SQR, 5'd0, D_MULA, 5'd1), 7'd0);
      6'd46: return st(mv(S_SQR, 5'd0, D_SQR,  5'd1), 7'd0);   // Zi2
      6'd47: return st(mv(S_SQR, 5'd1, D_MULB, 5'd1), 7'd0);   // Zi3 = Zi*Zi2
      6'd48: return st(mv(S_RAM, A_X,  D_MULA, 5'd2), 7'd0);
      6'd49: return st(mv(S_SQR, 5'd1, D_MULB, 5'd2), 7'd0);   // x = X*Zi2
      6'd50: return st(mv(S_RAM, A_Y,  D_MULA, 5'd3), 7'd0);
      6'd51: return st(mv(S_MUL, 5'd1, D_MULB, 5'd3), 7'd0);   // y = Y*Zi3
      6'd52: return st(mv(S_MUL, 5'd2, D_RAM,  A_XR), 7'd0);
      default: return st(mv(S_MUL, 5'd3, D_RAM, A_YR), 7'd0);
    endcase
  endfunction

  always_comb begin
    cur        = prog(step_q);
    xfer       = cur.x;
    xfer_valid = run_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      step_q <= '0;
      cnt_q  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !run_q) begin
        run_q  <= 1'b1;
        step_q <= '0;
        cnt_q  <= '0;
      end else if (run_q && xfer_accept) begin
        if (cnt_q != cur.rep) begin
          cnt_q <= cnt_q + 1'b1;
        end else begin
          cnt_q <= '0;
          if (step_q == 6'(LAST)) begin
            run_q <= 1'b0;
            done  <= 1'b1;
          end else begin
            step_q <= step_q + 1'b1;
          end
        end
      end
    end
  end
endmodule

// pau: point addition unit of the arithmetic control unit.
//
// Adds the fixed affine base point P = (PX, PY) to the Jacobian accumulator
// (X, Y, Z) in place (mixed Jacobian/affine addition, x = X/Z^2,
// y = Y/Z^3, curve y^2 + xy = x^3 + a2 x^2 + a6):
//   Z2 = Z^2        U1 = PX*Z2      Z3c = Z*Z2     S1 = PY*Z3c
//   W  = X + U1     R  = Y + S1     L  = Z*W  -> Z'
//   T  = R + L      L2 = L^2        W2 = W^2       W3 = W*W2
//   Rx = R*PX       Ly = L*PY       V  = Rx + Ly
//   X' = T*R + W3 + a2*L2           Y' = T*X' + V*L2
// 11 multiplications, 3 squarings and 8 additions. Exceptional inputs
// (accumulator at infinity, equal to P or to -P) are not treated; in a
// left-to-right double-and-add with a scalar below the order of P they do
// not occur. The formulas and the schedule are this implementation's
// choice: the schedule is hand-made for four multipliers, with four
// multiplication levels on the critical path, about 4 * (N + 1) + 30 clocks.
//
// Interface and handshake as in pdu: start, done, xfer/xfer_valid/xfer_accept.
module pau
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
  localparam int unsigned LAST = 44;

  logic       run_q;
  logic [5:0] step_q;

  function automatic xfer_t prog(logic [5:0] s);
    unique case (s)
      6'd0:  return mv(S_RAM, A_Z,  D_SQR,  5'd0);  // Z2 = Z^2          (sqr0)
      6'd1:  return mv(S_RAM, A_PX, D_MULA, 5'd0);
      6'd2:  return mv(S_SQR, 5'd0, D_MULB, 5'd0);  // U1 = PX*Z2        (mul0)
      6'd3:  return mv(S_RAM, A_Z,  D_MULA, 5'd1);
      6'd4:  return mv(S_SQR, 5'd0, D_MULB, 5'd1);  // Z3c = Z*Z2        (mul1)
      6'd5:  return mv(S_RAM, A_X,  D_ADDA, 5'd0);
      6'd6:  return mv(S_MUL, 5'd0, D_ADDB, 5'd0);  // W = X + U1        (add0)
      6'd7:  return mv(S_RAM, A_PY, D_MULA, 5'd1);
      6'd8:  return mv(S_MUL, 5'd1, D_MULB, 5'd1);  // S1 = PY*Z3c       (mul1)
      6'd9:  return mv(S_ADD, 5'd0, D_SQR,  5'd1);  // W2 = W^2          (sqr1)
      6'd10: return mv(S_RAM, A_Z,  D_MULA, 5'd2);
      6'd11: return mv(S_ADD, 5'd0, D_MULB, 5'd2);  // L = Z*W           (mul2)
      6'd12: return mv(S_ADD, 5'd0, D_MULA, 5'd3);
      6'd13: return mv(S_SQR, 5'd1, D_MULB, 5'd3);  // W3 = W*W2         (mul3)
      6'd14: return mv(S_RAM, A_Y,  D_ADDA, 5'd1);
      6'd15: return mv(S_MUL, 5'd1, D_ADDB, 5'd1);  // R = Y + S1        (add1)
      6'd16: return mv(S_MUL, 5'd2, D_RAM,  A_Z);   // Z' = L
      6'd17: return mv(S_MUL, 5'd2, D_SQR,  5'd0);  // L2 = L^2          (sqr0)
      6'd18: return mv(S_ADD, 5'd1, D_ADDA, 5'd0);
      6'd19: return mv(S_MUL, 5'd2, D_ADDB, 5'd0);  // T = R + L         (add0)
      6'd20: return mv(S_RAM, A_PX, D_MULA, 5'd0);
      6'd21: return mv(S_ADD, 5'd1, D_MULB, 5'd0);  // Rx = R*PX         (mul0)
      6'd22: return mv(S_RAM, A_PY, D_MULA, 5'd2);
      6'd23: return mv(S_MUL, 5'd2, D_MULB, 5'd2);  // Ly = L*PY         (mul2)
      6'd24: return mv(S_MUL, 5'd3, D_RAM,  A_T0);  // keep W3
      6'd25: return mv(S_RAM, A_CA, D_MULA, 5'd3);
      6'd26: return mv(S_SQR, 5'd0, D_MULB, 5'd3);  // aL2 = a2*L2       (mul3)
      6'd27: return mv(S_SQR, 5'd0, D_RAM,  A_T1);  // keep L2
      6'd28: return mv(S_ADD, 5'd1, D_MULA, 5'd1);
      6'd29: return mv(S_ADD, 5'd0, D_MULB, 5'd1);  // TR = T*R          (mul1)
      6'd30: return mv(S_ADD, 5'd0, D_RAM,  A_T2);  // keep T
      6'd31: return mv(S_MUL, 5'd0, D_ADDA, 5'd0);
      6'd32: return mv(S_MUL, 5'd2, D_ADDB, 5'd0);  // V = Rx + Ly       (add0)
      6'd33: return mv(S_RAM, A_T0, D_ADDA, 5'd1);
      6'd34: return mv(S_MUL, 5'd3, D_ADDB, 5'd1);  // W3 + aL2          (add1)
      6'd35: return mv(S_ADD, 5'd1, D_ADDA, 5'd1);
      6'd36: return mv(S_MUL, 5'd1, D_ADDB, 5'd1);  // X' = .. + TR      (add1)
      6'd37: return mv(S_ADD, 5'd1, D_RAM,  A_X);   // X' out
      6'd38: return mv(S_RAM, A_T2, D_MULA, 5'd0);
      6'd39: return mv(S_ADD, 5'd1, D_MULB, 5'd0);  // TX = T*X'         (mul0)
      6'd40: return mv(S_ADD, 5'd0, D_MULA, 5'd1);
      6'd41: return mv(S_RAM, A_T1, D_MULB, 5'd1);  // VL2 = V*L2        (mul1)
      6'd42: return mv(S_MUL, 5'd0, D_ADDA, 5'd0);
      6'd43: return mv(S_MUL, 5'd1, D_ADDB, 5'd0);  // Y' = TX + VL2     (add0)
      default: return mv(S_ADD, 5'd0, D_RAM, A_Y);  // Y' out
    endcase
  endfunction

  always_comb begin
    xfer       = prog(step_q);
    xfer_valid = run_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      step_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !run_q) begin
        run_q  <= 1'b1;
        step_q <= '0;
      end else if (run_q && xfer_accept) begin
        if (step_q == 6'(LAST)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end else begin
          step_q <= step_q + 1'b1;
        end
      end
    end
  end
endmodule

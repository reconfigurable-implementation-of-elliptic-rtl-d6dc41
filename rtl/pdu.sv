// pdu: point doubling unit of the arithmetic control unit.
//
// Doubles the Jacobian point (X, Y, Z) held in operand memory in place,
// x = X/Z^2, y = Y/Z^3, on y^2 + xy = x^3 + a2 x^2 + a6. The algorithm is
// the data dependency graph of the reference design, 6 multiplications,
// 4 squarings and 4 additions:
//   S1 = Z^2      M1 = Z*Y      S2 = X^2      M2 = X*S1  -> Z3
//   A1 = M1 + S2  S3 = S2^2     A2 = M2 + A1  S4 = M2^2
//   M3 = S3*Z3    M4 = A2*A1    m1 = S4*a2    A3 = M4 + m1 -> X3
//   M5 = A2*A3    A4 = M5 + M3 -> Y3
// The schedule, hand-made for four multipliers, two squarers and two adders,
// is a fixed list of 27 bus transfers. The datapath holds a transfer while
// a unit it names is busy, so the three multiplication levels on the
// critical path set the time: about 3 * (N + 1) + 25 clocks.
//
// Interface: start (one clock, while idle) begins; xfer/xfer_valid present
// the current transfer, which advances on xfer_accept; done pulses for one
// clock after the last transfer is accepted.
module pdu
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
  localparam int unsigned LAST = 26;

  logic       run_q;
  logic [4:0] step_q;

  function automatic xfer_t prog(logic [4:0] s);
    unique case (s)
      5'd0:  return mv(S_RAM, A_Z,  D_SQR,  5'd0);  // S1 = Z^2       (sqr0)
      5'd1:  return mv(S_RAM, A_Z,  D_MULA, 5'd0);
      5'd2:  return mv(S_RAM, A_Y,  D_MULB, 5'd0);  // M1 = Z*Y       (mul0)
      5'd3:  return mv(S_RAM, A_X,  D_SQR,  5'd1);  // S2 = X^2       (sqr1)
      5'd4:  return mv(S_RAM, A_X,  D_MULA, 5'd1);
      5'd5:  return mv(S_SQR, 5'd0, D_MULB, 5'd1);  // M2 = X*S1      (mul1)
      5'd6:  return mv(S_SQR, 5'd1, D_ADDA, 5'd0);  // S2 -> add0.A
      5'd7:  return mv(S_SQR, 5'd1, D_SQR,  5'd0);  // S3 = S2^2      (sqr0)
      5'd8:  return mv(S_SQR, 5'd0, D_MULA, 5'd2);  // S3 -> mul2.A
      5'd9:  return mv(S_MUL, 5'd0, D_ADDB, 5'd0);  // A1 = M1 + S2   (add0)
      5'd10: return mv(S_MUL, 5'd1, D_MULB, 5'd2);  // M3 = S3*Z3     (mul2)
      5'd11: return mv(S_MUL, 5'd1, D_SQR,  5'd1);  // S4 = Z3^2      (sqr1)
      5'd12: return mv(S_MUL, 5'd1, D_RAM,  A_Z);   // Z3 out
      5'd13: return mv(S_ADD, 5'd0, D_ADDA, 5'd1);
      5'd14: return mv(S_MUL, 5'd1, D_ADDB, 5'd1);  // A2 = M2 + A1   (add1)
      5'd15: return mv(S_ADD, 5'd0, D_MULA, 5'd3);  // A1 -> mul3.A
      5'd16: return mv(S_SQR, 5'd1, D_MULA, 5'd0);  // S4 -> mul0.A
      5'd17: return mv(S_RAM, A_CA, D_MULB, 5'd0);  // m1 = S4*a2     (mul0)
      5'd18: return mv(S_ADD, 5'd1, D_MULB, 5'd3);  // M4 = A2*A1     (mul3)
      5'd19: return mv(S_ADD, 5'd1, D_MULA, 5'd1);  // A2 -> mul1.A
      5'd20: return mv(S_MUL, 5'd3, D_ADDA, 5'd0);
      5'd21: return mv(S_MUL, 5'd0, D_ADDB, 5'd0);  // A3 = M4 + m1   (add0)
      5'd22: return mv(S_ADD, 5'd0, D_RAM,  A_X);   // X3 out
      5'd23: return mv(S_ADD, 5'd0, D_MULB, 5'd1);  // M5 = A2*A3     (mul1)
      5'd24: return mv(S_MUL, 5'd2, D_ADDA, 5'd1);
      5'd25: return mv(S_MUL, 5'd1, D_ADDB, 5'd1);  // A4 = M5 + M3   (add1)
      default: return mv(S_ADD, 5'd1, D_RAM,  A_Y);   // Y3 out
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
        if (step_q == 5'(LAST)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end else begin
          step_q <= step_q + 1'b1;
        end
      end
    end
  end
endmodule

// gf_inv: sequential GF(2^8) inverter by the continuous-square algorithm.
//
// Since gamma^(2^m - 1) = 1, gamma^-1 = gamma^(2^m - 2) = prod_{i=1}^{m-1}
// gamma^(2^i). The unit keeps a square register sq (gamma^(2^i)) and an
// accumulator acc; each cycle it squares sq and multiplies acc by the new
// square, both with bit-parallel multipliers. After m-1 = 7 steps acc holds
// the inverse. The inverse of 0 is returned as 0.
//
// Interface: pulse start with the operand on d_in (ignored while busy).
// busy is high for GF_M-1 cycles; done pulses for one cycle with d_out
// valid, GF_M-1 cycles after the start edge. d_out holds until next done.
// Reset is synchronous and active high (this design's choice).
module gf_inv
  import gf_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  gf_t  d_in,
  output logic busy,
  output logic done,
  output gf_t  d_out
);

  typedef enum logic {IDLE, INVERSION} state_t;
  state_t state;

  gf_t sq, acc, sq2, acc_nx;
  logic [3:0] step_cnt;

  gf_mult u_sq  (.a(sq),  .b(sq),  .p(sq2));
  gf_mult u_acc (.a(acc), .b(sq2), .p(acc_nx));

  assign busy = (state == INVERSION);

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= IDLE;
      sq       <= '0;
      acc      <= '0;
      step_cnt <= '0;
      done     <= 1'b0;
      d_out    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          sq       <= d_in;
          acc      <= gf_t'(1);
          step_cnt <= '0;
          state    <= INVERSION;
        end
        INVERSION: begin
          sq       <= sq2;
          acc      <= acc_nx;
          step_cnt <= step_cnt + 1'b1;
          if (step_cnt == 4'(GF_M-2)) begin
            d_out <= acc_nx;
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule

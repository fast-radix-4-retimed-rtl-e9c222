// div_ctrl: sequencer of the radix-4 divider.
//
// A division takes NDIG + 3 cycles after the cycle in which start is taken:
// NDIG + 1 recurrence cycles produce w[0] .. w[NDIG] and, in register R1, the
// state from which q_{NDIG+1} is decoded; one more recurrence cycle applies
// q_{NDIG+1} and gives w[NDIG+1]; one cycle assimilates the residual,
// corrects, normalises and rounds. This cycle budget follows the method;
// the start/busy/done handshake is this design's choice.
//
// Interface: start is taken only when idle (busy low); init is high in that
// cycle and loads all registers. iter is high for the NDIG + 2 recurrence
// cycles, fin for the rounding cycle; done pulses for one cycle when the
// rounded result is in the output registers.
module div_ctrl #(
  parameter int NDIG = 27
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic init,
  output logic iter,
  output logic fin,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_FIN} state_t;

  localparam int CW = $clog2(NDIG + 3);

  state_t        state;
  logic [CW-1:0] cnt;

  assign init = (state == S_IDLE) && start;
  assign iter = (state == S_ITER);
  assign fin  = (state == S_FIN);
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ITER;
          cnt   <= '0;
        end
        S_ITER: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NDIG + 1)) state <= S_FIN;
        end
        S_FIN: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

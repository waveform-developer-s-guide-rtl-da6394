// ResetGen: system reset generator.
//
// SystemReset is held while Enable (the clock wizard's Locked) is low, and is
// stretched for RESET_CYCLES clocks after Enable rises, after the push-button
// SwitchReset is released, and after a SoftReset pulse. The push button
// and Enable are each synchronised by two flip-flops. The inputs follow the original reset
// generator's test description; the stretch length and the synchroniser are
// this design's choices. The state machine flags SMFailure if it ever reaches
// an undefined state (it then restarts the reset).
module ResetGen #(
  parameter int RESET_CYCLES = 16
) (
  input  logic Clk,
  input  logic Enable,
  input  logic SwitchReset,
  input  logic SoftReset,
  output logic SystemReset,
  output logic SMFailure
);
  typedef enum logic [1:0] {S_HOLD = 2'd0, S_STRETCH = 2'd1, S_RUN = 2'd2} state_e;
  state_e state;
  logic [$clog2(RESET_CYCLES+1)-1:0] cnt;
  logic sw1, sw2, en1, en2;

  always_ff @(posedge Clk) begin
    sw1 <= SwitchReset;
    sw2 <= sw1;
    en1 <= Enable;
    en2 <= en1;
  end

  always_ff @(posedge Clk) begin
    if (!en2) begin
      state       <= S_HOLD;
      cnt         <= '0;
      SystemReset <= 1'b1;
      SMFailure   <= 1'b0;
    end else begin
      case (state)
        S_HOLD: begin
          SystemReset <= 1'b1;
          cnt         <= '0;
          if (!sw2) state <= S_STRETCH;
        end
        S_STRETCH: begin
          SystemReset <= 1'b1;
          if (sw2 || SoftReset) cnt <= '0;
          else if (cnt == ($bits(cnt))'(RESET_CYCLES - 1)) state <= S_RUN;
          else cnt <= cnt + 1'b1;
        end
        S_RUN: begin
          SystemReset <= 1'b0;
          if (sw2) state <= S_HOLD;
          else if (SoftReset) begin
            state <= S_STRETCH;
            cnt   <= '0;
            SystemReset <= 1'b1;
          end
        end
        default: begin
          SMFailure <= 1'b1;
          state     <= S_HOLD;
        end
      endcase
    end
  end
endmodule

// uart_rx: UART receiver, 8-N-1.
//
// It watches the line (synchronised by two flip-flops) for a falling edge,
// the start of a frame. It then counts 8 ticks of tick16_i to the middle of
// the start bit, checks that the line is still low (otherwise the edge was a
// glitch and it goes back to waiting), and samples the eight data bits (LSB
// first) and the stop bit 16 ticks apart, in the middle of each bit. At the
// stop bit it pulses valid_o for one cycle with the byte on data_o;
// frame_err_o is high in that cycle if the stop bit was low.
//
// Follows the reference design: falling-edge start detection. Own choices:
// oversampling, glitch check and synchroniser.
module uart_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick16_i,
  input  logic       rxd_i,
  output logic       valid_o,
  output logic [7:0] data_o,
  output logic       frame_err_o
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t     state;
  logic [1:0] sync;
  logic       rxd_q;
  logic [3:0] tcnt;
  logic [2:0] bitn;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync        <= 2'b11;
      rxd_q       <= 1'b1;
      state       <= IDLE;
      tcnt        <= '0;
      bitn        <= '0;
      data_o      <= '0;
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
    end else begin
      sync    <= {sync[0], rxd_i};
      rxd_q   <= sync[1];
      valid_o <= 1'b0;
      unique case (state)
        IDLE: begin
          if (rxd_q && !sync[1]) begin    // falling edge
            state <= START;
            tcnt  <= '0;
          end
        end
        START: if (tick16_i) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd7) begin
            if (sync[1]) state <= IDLE;   // glitch, not a start bit
            else begin
              state <= DATA;
              tcnt  <= '0;
              bitn  <= '0;
            end
          end
        end
        DATA: if (tick16_i) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin
            data_o <= {sync[1], data_o[7:1]};
            bitn   <= bitn + 1'b1;
            if (bitn == 3'd7) state <= STOP;
          end
        end
        STOP: if (tick16_i) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin
            valid_o     <= 1'b1;
            frame_err_o <= !sync[1];
            state       <= IDLE;
          end
        end
      endcase
    end
  end

endmodule

// uart_tx: UART transmitter, 8 data bits, no parity, one stop bit (8-N-1).
//
// When idle the line is high. A byte offered with valid_i/ready_o is sent as
// a start bit (low), eight data bits LSB first and a stop bit (high); each bit
// lasts 16 ticks of tick16_i (the start bit up to one tick less, as it
// begins at once, between ticks). ready_o is high only while idle, and a byte is
// taken in a cycle where valid_i and ready_o are both high.
//
// Follows the reference design: 8-N-1 framing. Own choice: the handshake.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick16_i,
  input  logic       valid_i,
  input  logic [7:0] data_i,
  output logic       ready_o,
  output logic       txd_o
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t     state;
  logic [3:0] tcnt;     // ticks within a bit
  logic [2:0] bitn;
  logic [7:0] shreg;

  assign ready_o = (state == IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      tcnt  <= '0;
      bitn  <= '0;
      shreg <= '0;
      txd_o <= 1'b1;
    end else begin
      unique case (state)
        IDLE: begin
          txd_o <= 1'b1;
          if (valid_i) begin
            txd_o <= 1'b0;        // start bit begins at once
            shreg <= data_i;
            state <= START;
            tcnt  <= '0;
          end
        end
        START: begin
          txd_o <= 1'b0;
          if (tick16_i) begin
            tcnt <= tcnt + 1'b1;
            if (tcnt == 4'd15) begin
              state <= DATA;
              bitn  <= '0;
              txd_o <= shreg[0];
            end
          end
        end
        DATA: begin
          txd_o <= shreg[0];
          if (tick16_i) begin
            tcnt <= tcnt + 1'b1;
            if (tcnt == 4'd15) begin
              shreg <= {1'b0, shreg[7:1]};
              bitn  <= bitn + 1'b1;
              if (bitn == 3'd7) begin
                state <= STOP;
                txd_o <= 1'b1;
              end else begin
                txd_o <= shreg[1];
              end
            end
          end
        end
        STOP: begin
          txd_o <= 1'b1;
          if (tick16_i) begin
            tcnt <= tcnt + 1'b1;
            if (tcnt == 4'd15) state <= IDLE;
          end
        end
      endcase
    end
  end

endmodule

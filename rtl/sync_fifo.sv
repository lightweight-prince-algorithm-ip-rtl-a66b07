// sync_fifo: small synchronous first-in first-out buffer used by the UART.
//
// DEPTH entries of WIDTH bits. A write when full and a read when empty are
// ignored. rdata_o always shows the oldest entry (first-word fall-through);
// rd_i removes it. clear_i empties the buffer. count_o gives the fill level.
//
// Helper of this design; the FIFO depth is its own choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear_i,
  input  logic                     wr_i,
  input  logic [WIDTH-1:0]         wdata_i,
  input  logic                     rd_i,
  output logic [WIDTH-1:0]         rdata_o,
  output logic                     empty_o,
  output logic                     full_o,
  output logic [$clog2(DEPTH):0]   count_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty_o = (count_o == 0);
  assign full_o  = (count_o == (AW+1)'(DEPTH));
  assign do_wr   = wr_i && !full_o;
  assign do_rd   = rd_i && !empty_o;
  assign rdata_o = mem[rptr];

  always_ff @(posedge clk) begin
    if (rst || clear_i) begin
      wptr    <= '0;
      rptr    <= '0;
      count_o <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count_o <= count_o + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (do_wr) begin
      mem[wptr] <= wdata_i;
    end
  end

endmodule

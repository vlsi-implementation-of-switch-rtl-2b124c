// sii: switch incoming interface, a one-cell buffer in front of the switch.
//
// While inc_wr_en_in is 1 the words of a 14-word cell are written into a
// 14-entry array. cell_rdy_out is 1 from the cycle the 14th word is written
// until the cell is read, so the reader can decide in that last write cycle
// and start reading in the next. The header is sliced on
// the way in: the first word enters the low half of the 64-bit register
// CELL_HDR_OUT_TEMP, and on the second word the low half moves to the high
// half while the new word enters the low half; the 40 bits [63:24] (first
// word and the top byte of the second) are inc_cell_hdr_out, for the header
// validation. While inc_rd_en_in is 1 one word per cycle is read out on
// port_cell32_out in the same cycle (asynchronous array read); after the 14th
// the buffer is empty again and ready_out is 1.
//
// Write, read and header slicing follow the original design; the one-cell
// depth, same-cycle read and the ready flags are this design's.
module sii
  import atm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  inc_wr_en_in,
  input  word_t port_cell32_in,
  input  logic  inc_rd_en_in,
  output word_t port_cell32_out,
  output hdr_t  inc_cell_hdr_out,
  output logic  cell_rdy_out,
  output logic  ready_out
);

  typedef enum logic [1:0] {I_EMPTY, I_FILL, I_FULL, I_DRAIN} state_t;

  state_t      state;
  word_t       mem [CELL_WORDS];
  logic [3:0]  wptr, rptr;
  logic [63:0] cell_hdr_out_temp;

  wire wr = inc_wr_en_in && (state == I_EMPTY || state == I_FILL);
  wire rd = inc_rd_en_in && (state == I_FULL  || state == I_DRAIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= I_EMPTY;
      wptr              <= '0;
      rptr              <= '0;
      cell_hdr_out_temp <= '0;
    end else begin
      if (wr) begin
        wptr  <= (int'(wptr) == CELL_WORDS - 1) ? '0 : wptr + 1'b1;
        state <= (int'(wptr) == CELL_WORDS - 1) ? I_FULL : I_FILL;
        if (int'(wptr) < HDR_WORDS) cell_hdr_out_temp <= {cell_hdr_out_temp[31:0], port_cell32_in};
      end
      if (rd) begin
        rptr  <= (int'(rptr) == CELL_WORDS - 1) ? '0 : rptr + 1'b1;
        state <= (int'(rptr) == CELL_WORDS - 1) ? I_EMPTY : I_DRAIN;
      end
    end
  end

  always_ff @(posedge clk)
    if (wr) mem[wptr] <= port_cell32_in;

  assign port_cell32_out  = mem[rptr];
  assign inc_cell_hdr_out = cell_hdr_out_temp[63:24];
  assign cell_rdy_out     = (state == I_FULL) || (wr && int'(wptr) == CELL_WORDS - 1);
  assign ready_out        = (state == I_EMPTY);

endmodule

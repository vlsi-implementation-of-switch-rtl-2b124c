// msf: main switch FSM for one output port.
//
// In the idle state the FSM watches cell_avail_in, which the main memory
// raises while a cell for this port is queued or its last word is being
// written. The next cycle it starts 14 cycles of reading: mem_rd_en_out is 1
// and each word from the memory is driven on pkt32_out with pkt_active_out
// high. It then returns to idle for at least one cycle. cells_out counts the
// cells sent. The 14-cycle read follows the original design; the idle cycle
// between cells and the counter are this design's.
module msf
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cell_avail_in,
  input  word_t       mem_data_in,
  output logic        mem_rd_en_out,
  output word_t       pkt32_out,
  output logic        pkt_active_out,
  output logic [15:0] cells_out
);

  typedef enum logic {O_IDLE, O_READ} state_t;

  state_t     state;
  logic [3:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= O_IDLE;
      cnt       <= '0;
      cells_out <= '0;
    end else begin
      unique case (state)
        O_IDLE: if (cell_avail_in) begin
          cnt   <= '0;
          state <= O_READ;
        end
        O_READ: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == CELL_WORDS - 1) begin
            cells_out <= cells_out + 1'b1;
            state     <= O_IDLE;
          end
        end
        default: state <= O_IDLE;
      endcase
    end
  end

  assign mem_rd_en_out  = (state == O_READ);
  assign pkt_active_out = (state == O_READ);
  assign pkt32_out      = (state == O_READ) ? mem_data_in : '0;

endmodule

// mmf: main memory FSM, moves cells from the input SIIs into the main memory.
//
// In state 2'b00 (idle) it looks, round-robin starting after the input it
// served last, for an SII whose cell is complete (cell_rdy_in is already 1 in
// the cycle the SII writes the 14th word, so a transfer can start right
// after it). If that cell's header is
// invalid it goes to 2'b11 (discard): the SII is read out for 14 cycles and
// nothing is written. If the header is valid but the main memory has no free
// cell slot it waits in 2'b01. Otherwise, or once a slot is free, it enters
// 2'b10 (transfer): for 14 cycles inc_rd_en_out of the chosen SII and
// mem_wr_en_out are 1, with mem_wr_port_out naming the cell's output queue
// (0 for port 2, 1 for port 3), so each word goes from the SII into the main
// memory in the same cycle. The FSM spends at least one cycle in 2'b00
// between cells; for a lone cell that cycle overlaps the SII's last write.
//
// State 2'b10 raising the SII read and main memory write enables follows the
// original design; the other states, the round robin and discarding are this
// design's.
module mmf
  import atm_pkg::*;
#(
  parameter int NIN = NUM_IN
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NIN-1:0]         cell_rdy_in,
  input  logic [NIN-1:0]         valid_hdr_flag_in,
  input  port_t [NIN-1:0]        out_port_in,
  input  logic                   mem_free_in,
  output logic [NIN-1:0]         inc_rd_en_out,
  output logic [$clog2(NIN)-1:0] sel_out,
  output logic                   mem_wr_en_out,
  output logic                   mem_wr_port_out,
  output logic [1:0]             mem_curr_state_out,
  output logic                   drop_out
);

  localparam int SW = $clog2(NIN);

  typedef enum logic [1:0] {
    M_IDLE = 2'b00,
    M_WAIT = 2'b01,
    M_XFER = 2'b10,
    M_DROP = 2'b11
  } state_t;

  state_t     state;
  logic [SW-1:0] sel, last;
  logic [3:0] cnt;
  logic       found;
  logic [SW-1:0] cand;

  // Round-robin pick: first SII with a cell, starting after the last served.
  always_comb begin
    found = 1'b0;
    cand  = last;
    for (int i = 1; i <= NIN; i++) begin
      automatic logic [SW-1:0] idx = SW'((int'(last) + i) % NIN);
      if (!found && cell_rdy_in[idx]) begin
        found = 1'b1;
        cand  = idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE;
      sel   <= '0;
      last  <= SW'(NIN - 1);
      cnt   <= '0;
    end else begin
      unique case (state)
        M_IDLE: if (found) begin
          sel <= cand;
          cnt <= '0;
          if (!valid_hdr_flag_in[cand]) state <= M_DROP;
          else if (!mem_free_in)        state <= M_WAIT;
          else                          state <= M_XFER;
        end
        M_WAIT: if (mem_free_in) state <= M_XFER;
        M_XFER, M_DROP: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == CELL_WORDS - 1) begin
            last  <= sel;
            state <= M_IDLE;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  always_comb begin
    inc_rd_en_out      = '0;
    inc_rd_en_out[sel] = (state == M_XFER) || (state == M_DROP);
    mem_wr_en_out      = (state == M_XFER);
    mem_wr_port_out    = (out_port_in[sel] == port_t'(FIRST_OUT + 1));
    mem_curr_state_out = state;
    sel_out            = sel;
    drop_out           = (state == M_DROP) && (cnt == '0);
  end

  // Only one SII is read at a time, and a cell is never written while the
  // memory is full.
  a_onehot_rd: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(inc_rd_en_out));
  a_wr_valid:  assert property (@(posedge clk) disable iff (!rst_n)
                                (state == M_IDLE && found && valid_hdr_flag_in[cand] && !mem_free_in)
                                |=> state == M_WAIT);

endmodule

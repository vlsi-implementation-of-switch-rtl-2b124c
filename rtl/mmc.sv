// mmc: main memory control, the switch's shared cell buffer.
//
// NCELLS cell slots of 14 words each are shared by all output ports. While
// mem_wr_en_in is 1 one word per cycle is written; on the first word of a
// cell the lowest free slot is taken, and after the 14th the slot number is
// appended to the FIFO queue of output mem_wr_port_in. Each output has its
// own read port: while mem_rd_en_in[o] is 1, one word per cycle of the cell
// at the head of queue o is on mem_data_out[o] in the same cycle, and after
// the 14th word the slot is released. mem_free_out says a slot is free for
// the next cell. cell_avail_out[o] says queue o holds a complete cell, or
// receives one at the next clock edge (the 14th word is being written), so a
// reader can start in the cycle right after a cell is complete.
//
// Writing and reading the cell under the two enables follow the original
// design; the shared-slot organisation with per-output queues, the size and
// the slot choice are this design's.
module mmc
  import atm_pkg::*;
#(
  parameter int NCELLS = 16,
  parameter int NOUT   = NUM_OUT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        mem_wr_en_in,
  input  logic [$clog2(NOUT)-1:0]     mem_wr_port_in,
  input  word_t                       mem_data_in,
  output logic                        mem_free_out,
  input  logic [NOUT-1:0]             mem_rd_en_in,
  output word_t [NOUT-1:0]            mem_data_out,
  output logic [NOUT-1:0]             cell_avail_out,
  output logic [$clog2(NCELLS+1)-1:0] cells_used_out
);

  localparam int SW = (NCELLS > 1) ? $clog2(NCELLS) : 1;
  localparam int AW = $clog2(NCELLS * CELL_WORDS);
  localparam int CW = $clog2(NCELLS + 1);

  typedef logic [SW-1:0] slot_t;
  typedef logic [AW-1:0] addr_t;

  word_t       mem [NCELLS * CELL_WORDS];
  logic [NCELLS-1:0] busy;
  slot_t       wr_slot, free_slot;
  logic [3:0]  wr_cnt;
  slot_t       q     [NOUT][NCELLS];
  slot_t       head  [NOUT];
  slot_t       tail  [NOUT];
  logic [CW-1:0] count [NOUT];
  logic [3:0]  rd_cnt [NOUT];
  logic [NOUT-1:0] queued;     // queue o holds a complete cell

  function automatic addr_t addr(slot_t s, logic [3:0] w);
    return addr_t'(int'(s) * CELL_WORDS + int'(w));
  endfunction

  always_comb begin
    free_slot = '0;
    for (int i = NCELLS - 1; i >= 0; i--)
      if (!busy[i]) free_slot = slot_t'(i);
  end

  slot_t cur_slot;
  assign cur_slot = (wr_cnt == '0) ? free_slot : wr_slot;

  always_ff @(posedge clk)
    if (mem_wr_en_in) mem[addr(cur_slot, wr_cnt)] <= mem_data_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= '0;
      wr_slot <= '0;
      wr_cnt  <= '0;
      for (int o = 0; o < NOUT; o++) begin
        head[o]   <= '0;
        tail[o]   <= '0;
        count[o]  <= '0;
        rd_cnt[o] <= '0;
      end
    end else begin
      for (int o = 0; o < NOUT; o++) begin
        automatic logic push = mem_wr_en_in && int'(wr_cnt) == CELL_WORDS - 1
                               && int'(mem_wr_port_in) == o;
        automatic logic pop  = mem_rd_en_in[o] && int'(rd_cnt[o]) == CELL_WORDS - 1;
        if (mem_rd_en_in[o]) rd_cnt[o] <= pop ? '0 : rd_cnt[o] + 1'b1;
        if (pop) begin
          busy[q[o][head[o]]] <= 1'b0;
          head[o]             <= slot_t'((int'(head[o]) + 1) % NCELLS);
        end
        if (push) begin
          q[o][tail[o]] <= wr_slot;
          tail[o]       <= slot_t'((int'(tail[o]) + 1) % NCELLS);
        end
        count[o] <= count[o] + CW'(push) - CW'(pop);
      end
      if (mem_wr_en_in) begin
        if (wr_cnt == '0) begin
          busy[free_slot] <= 1'b1;
          wr_slot         <= free_slot;
        end
        wr_cnt <= (int'(wr_cnt) == CELL_WORDS - 1) ? '0 : wr_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      mem_data_out[o]   = mem[addr(q[o][head[o]], rd_cnt[o])];
      queued[o]         = (count[o] != '0);
      cell_avail_out[o] = queued[o] ||
                          (mem_wr_en_in && int'(wr_cnt) == CELL_WORDS - 1 && int'(mem_wr_port_in) == o);
    end
    mem_free_out   = !(&busy);
    cells_used_out = '0;
    for (int i = 0; i < NCELLS; i++) cells_used_out = cells_used_out + CW'(busy[i]);
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
                                   (mem_wr_en_in && wr_cnt == '0) |-> !busy[free_slot]);
  a_no_underrun:  assert property (@(posedge clk) disable iff (!rst_n)
                                   (mem_rd_en_in & ~queued) == '0);

endmodule

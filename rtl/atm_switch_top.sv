// atm_switch_top: a two-input, two-output ATM cell switch.
//
// Each input port (0 and 1) takes packets as 32-bit words. Its segmentation
// module stores a packet and cuts it into 48-byte payloads; its ATM host
// interface wraps each payload into a 14-word cell with the header of the
// virtual path connection to the packet's destination; its switch incoming
// interface (SII) buffers the cell and slices the 40-bit header, which the
// header validation (HVF) maps to an output port. The main memory FSM (MMF)
// moves complete cells, one at a time and round robin between the inputs,
// into the shared main memory (MMC), which queues them per output port. Per
// output port (2 and 3) a main switch FSM (MSF) reads queued cells out.
//
// Every cell hop (into the SII, into the MMC, out of the MMC) takes 14 cycles,
// one word per cycle, and each hop starts in the cycle after the previous one
// ends (the next stage decides during the last word). A cell's last word thus
// leaves 42 cycles after its first word entered the SII, when nothing else is
// queued. Between cells the MMF and each MSF idle for one cycle, so the switch
// passes one cell every 15 cycles.
//
// Interface, per input i: env_pkt_start[i] is a word-valid level held for a
// whole packet (first word: identifier, bits [1:0] = destination port 2 or
// 3), env_pkt32_in[i] the word; env_pkt_over_out[i] rises once all cells of
// the packet have left the segmentation module, after which the next packet
// may start. Per output o: env_pkt32_out[o] and atm_pkt_active_out[o] carry a
// cell for port 2+o. cell_drop_out pulses for each cell discarded for an
// unknown VPI.
//
// Module partitioning, the 14-word cell, the connection headers and the
// per-hop 14-cycle timing follow the original design; the handshakes, the
// shared memory organisation and sizes are this design's choices.
module atm_switch_top
  import atm_pkg::*;
#(
  parameter int NCELLS    = 16,
  parameter int SEG_WORDS = 36
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic  [NUM_IN-1:0]   env_pkt_start,
  input  word_t [NUM_IN-1:0]   env_pkt32_in,
  output logic  [NUM_IN-1:0]   env_pkt_over_out,
  output logic  [NUM_IN-1:0]   env_seg_overflow_out,
  output word_t [NUM_OUT-1:0]  env_pkt32_out,
  output logic  [NUM_OUT-1:0]  atm_pkt_active_out,
  output logic                 cell_drop_out
);

  // Input side, per port.
  word_t [NUM_IN-1:0] seg_cell32, sw_cell32, sii_cell32;
  logic  [NUM_IN-1:0] seg_cell_rdy, seg_rd_en, sw_cell_valid;
  logic  [NUM_IN-1:0] sii_ready, sii_rdy, inc_rd_en, valid_hdr;
  port_t [NUM_IN-1:0] dest_port, out_port;
  hdr_t  [NUM_IN-1:0] cell_hdr;

  for (genvar i = 0; i < NUM_IN; i++) begin : g_in
    segmentation #(.MAX_WORDS(SEG_WORDS)) u_seg (
      .clk, .rst_n,
      .pkt_start               (env_pkt_start[i]),
      .port_cell32_in          (env_pkt32_in[i]),
      .seg_rd_en_in            (seg_rd_en[i]),
      .port_cell32_out         (seg_cell32[i]),
      .cell_rdy_out            (seg_cell_rdy[i]),
      .seg_read_packet_over_out(env_pkt_over_out[i]),
      .dest_port_out           (dest_port[i]),
      .overflow_out            (env_seg_overflow_out[i])
    );

    atm_host_interface #(.SRC_PORT(port_t'(i))) u_ahi (
      .clk, .rst_n,
      .seg_cell_rdy_in       (seg_cell_rdy[i]),
      .seg_cell32_in         (seg_cell32[i]),
      .dest_port_in          (dest_port[i]),
      .sii_ready_in          (sii_ready[i]),
      .seg_rd_en_out         (seg_rd_en[i]),
      .sw_port_cell32_out    (sw_cell32[i]),
      .sw_port_cell_valid_out(sw_cell_valid[i])
    );

    sii u_sii (
      .clk, .rst_n,
      .inc_wr_en_in    (sw_cell_valid[i]),
      .port_cell32_in  (sw_cell32[i]),
      .inc_rd_en_in    (inc_rd_en[i]),
      .port_cell32_out (sii_cell32[i]),
      .inc_cell_hdr_out(cell_hdr[i]),
      .cell_rdy_out    (sii_rdy[i]),
      .ready_out       (sii_ready[i])
    );

    hvf u_hvf (
      .cell_hdr_in       (cell_hdr[i]),
      .valid_hdr_flag_out(valid_hdr[i]),
      .out_port_out      (out_port[i])
    );
  end

  // Shared memory and its write-side FSM.
  logic [$clog2(NUM_IN)-1:0]  sel;
  logic                       mem_wr_en, mem_wr_port, mem_free;
  logic [1:0]                 mem_curr_state;
  logic [NUM_OUT-1:0]         mem_rd_en, cell_avail;
  word_t [NUM_OUT-1:0]        mem_data;
  logic [$clog2(NCELLS+1)-1:0] cells_used;

  mmf u_mmf (
    .clk, .rst_n,
    .cell_rdy_in      (sii_rdy),
    .valid_hdr_flag_in (valid_hdr),
    .out_port_in       (out_port),
    .mem_free_in       (mem_free),
    .inc_rd_en_out     (inc_rd_en),
    .sel_out           (sel),
    .mem_wr_en_out     (mem_wr_en),
    .mem_wr_port_out   (mem_wr_port),
    .mem_curr_state_out(mem_curr_state),
    .drop_out          (cell_drop_out)
  );

  mmc #(.NCELLS(NCELLS)) u_mmc (
    .clk, .rst_n,
    .mem_wr_en_in  (mem_wr_en),
    .mem_wr_port_in(mem_wr_port),
    .mem_data_in   (sii_cell32[sel]),
    .mem_free_out  (mem_free),
    .mem_rd_en_in  (mem_rd_en),
    .mem_data_out  (mem_data),
    .cell_avail_out(cell_avail),
    .cells_used_out(cells_used)
  );

  // Output side, per port.
  for (genvar o = 0; o < NUM_OUT; o++) begin : g_out
    logic [15:0] cells_out;
    msf u_msf (
      .clk, .rst_n,
      .cell_avail_in (cell_avail[o]),
      .mem_data_in   (mem_data[o]),
      .mem_rd_en_out (mem_rd_en[o]),
      .pkt32_out     (env_pkt32_out[o]),
      .pkt_active_out(atm_pkt_active_out[o]),
      .cells_out     (cells_out)
    );
  end

endmodule

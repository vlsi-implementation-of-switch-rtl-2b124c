// segmentation: stores one packet and hands it out as 48-byte cell payloads.
//
// While pkt_start is 1 (and seg_rd_en_in is 0) a 32-bit word is written each
// cycle. The first word of a packet is its identifier, whose bits [1:0] name
// the destination port; the rest is payload, kept in a MAX_WORDS-deep array.
// A packet ends when pkt_start falls. From then on cell_rdy_out is 1 while at
// least one unread cell remains; each cycle seg_rd_en_in is 1 one payload word
// is read, and appears on port_cell32_out one cycle later. A last cell that
// is shorter than 12 words is padded with zero words. When the last cell has
// been read, seg_read_packet_over_out rises and stays 1 until the next packet
// starts; a new packet is accepted only then (or straight after reset).
// Words beyond MAX_WORDS are dropped and overflow_out is set for the packet.
//
// The write/read enables, the 48-byte cell and the two flags follow the
// original design. The identifier format, store-and-forward behaviour,
// zero padding, the memory depth and overflow handling are this design's.
module segmentation
  import atm_pkg::*;
#(
  parameter int MAX_WORDS = 36
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pkt_start,
  input  word_t port_cell32_in,
  input  logic  seg_rd_en_in,
  output word_t port_cell32_out,
  output logic  cell_rdy_out,
  output logic  seg_read_packet_over_out,
  output port_t dest_port_out,
  output logic  overflow_out
);

  localparam int PW = $clog2(MAX_WORDS + PAYLOAD_WORDS + 1);
  localparam int AW = (MAX_WORDS > 1) ? $clog2(MAX_WORDS) : 1;
  typedef logic [PW-1:0] ptr_t;

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ} state_t;

  state_t state;
  word_t  mem [MAX_WORDS];
  ptr_t   wptr, rptr;
  ptr_t   cell_end;      // read pointer value at the end of the current cell

  wire wr = pkt_start && !seg_rd_en_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state                    <= S_IDLE;
      wptr                     <= '0;
      rptr                     <= '0;
      cell_end                 <= ptr_t'(PAYLOAD_WORDS);
      dest_port_out            <= '0;
      overflow_out             <= 1'b0;
      seg_read_packet_over_out <= 1'b0;
      port_cell32_out          <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          // Waiting for the identifier word of a packet.
          if (wr) begin
            dest_port_out            <= port_t'(port_cell32_in[1:0]);
            wptr                     <= '0;
            rptr                     <= '0;
            cell_end                 <= ptr_t'(PAYLOAD_WORDS);
            overflow_out             <= 1'b0;
            seg_read_packet_over_out <= 1'b0;
            state                    <= S_WRITE;
          end
        end
        S_WRITE: begin
          if (wr) begin
            if (int'(wptr) < MAX_WORDS) begin
              wptr      <= wptr + 1'b1;
            end else begin
              overflow_out <= 1'b1;
            end
          end else if (!pkt_start) begin
            if (wptr == '0) begin
              seg_read_packet_over_out <= 1'b1;   // identifier only: no cell
              state                    <= S_IDLE;
            end else begin
              state <= S_READ;
            end
          end
        end
        S_READ: begin
          if (seg_rd_en_in) begin
            port_cell32_out <= (rptr < wptr) ? mem[rptr[AW-1:0]] : '0;
            rptr            <= rptr + 1'b1;
            if (rptr + 1'b1 == cell_end) begin
              cell_end <= cell_end + ptr_t'(PAYLOAD_WORDS);
              if (cell_end >= wptr) begin
                seg_read_packet_over_out <= 1'b1;
                state                    <= S_IDLE;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (state == S_WRITE && wr && int'(wptr) < MAX_WORDS) mem[wptr[AW-1:0]] <= port_cell32_in;

  // A whole (possibly padded) cell is unread: the packet is complete and the
  // read pointer is on a cell boundary short of the write pointer.
  assign cell_rdy_out = (state == S_READ) && (rptr + ptr_t'(PAYLOAD_WORDS) == cell_end)
                        && (rptr < wptr);

endmodule

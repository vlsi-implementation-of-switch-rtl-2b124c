// atm_host_interface: turns segmented payloads of one input port into cells.
//
// When the segmentation module has a cell ready and the switch incoming
// interface (SII) is empty, a 14-cycle cell is sent on sw_port_cell32_out with
// sw_port_cell_valid_out high: cycle 1 the first header word of the virtual
// path connection from SRC_PORT to the packet's destination, cycle 2 the word
// 00000000, cycles 3 to 14 the twelve payload words. seg_rd_en_out is raised
// in cycles 2 to 13, so that each payload word, which the segmentation module
// delivers one cycle after the request, is on seg_cell32_in exactly when it
// is sent. A cell is started in the cycle after the decision (one idle cycle).
//
// The header words and the 14-cycle layout follow the original design; the
// separate valid flag and the ready handshake with the SII are this design's.
module atm_host_interface
  import atm_pkg::*;
#(
  parameter port_t SRC_PORT = 2'd0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  seg_cell_rdy_in,
  input  word_t seg_cell32_in,
  input  port_t dest_port_in,
  input  logic  sii_ready_in,
  output logic  seg_rd_en_out,
  output word_t sw_port_cell32_out,
  output logic  sw_port_cell_valid_out
);

  typedef enum logic [1:0] {H_IDLE, H_HDR1, H_HDR2, H_PAY} state_t;

  state_t     state;
  logic [3:0] cnt;          // payload word being sent, 0..11
  word_t      hdr_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= H_IDLE;
      cnt      <= '0;
      hdr_word <= '0;
    end else begin
      unique case (state)
        H_IDLE: if (seg_cell_rdy_in && sii_ready_in) begin
          hdr_word <= conn_header(SRC_PORT, dest_port_in);
          state    <= H_HDR1;
        end
        H_HDR1: state <= H_HDR2;
        H_HDR2: begin
          cnt   <= '0;
          state <= H_PAY;
        end
        H_PAY: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == PAYLOAD_WORDS - 1) state <= H_IDLE;
        end
        default: state <= H_IDLE;
      endcase
    end
  end

  always_comb begin
    sw_port_cell_valid_out = (state != H_IDLE);
    seg_rd_en_out          = (state == H_HDR2) ||
                             (state == H_PAY && int'(cnt) < PAYLOAD_WORDS - 1);
    unique case (state)
      H_HDR1:  sw_port_cell32_out = hdr_word;
      H_PAY:   sw_port_cell32_out = seg_cell32_in;
      default: sw_port_cell32_out = '0;
    endcase
  end

endmodule

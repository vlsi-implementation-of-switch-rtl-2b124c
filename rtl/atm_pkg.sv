// atm_pkg: types, constants and connection tables shared by the ATM switch.
//
// A cell on every internal bus is 14 consecutive 32-bit words: two header
// words followed by twelve payload words (48 bytes). The 40-bit ATM header is
// the first header word plus the top byte of the second, in the usual UNI
// layout GFC[39:36] VPI[35:28] VCI[27:12] PT[11:9] CLP[8] HEC[7:0].
//
// Ports 0 and 1 are inputs, ports 2 and 3 outputs. The four virtual path
// connections and their first header words (0->2 01400000, 0->3 01900000,
// 1->2 02800000, 1->3 05000000) follow the original design; reading the VPI
// from bits [35:28], and routing on the VPI alone, are this design's choices.
package atm_pkg;

  localparam int WORD_W        = 32;
  localparam int HDR_WORDS     = 2;
  localparam int PAYLOAD_WORDS = 12;
  localparam int CELL_WORDS    = HDR_WORDS + PAYLOAD_WORDS;
  localparam int HDR_BITS      = 40;
  localparam int NUM_IN        = 2;
  localparam int NUM_OUT       = 2;
  localparam int FIRST_OUT     = 2;   // port number of output 0

  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [HDR_BITS-1:0] hdr_t;
  typedef logic [1:0]          port_t;

  // Result of a VPI lookup.
  typedef struct packed {
    logic  valid;
    port_t port;
  } route_t;

  // First header word of the connection from input src to output dst.
  // Unknown connections get VPI 0, which route() rejects.
  function automatic word_t conn_header(port_t src, port_t dst);
    unique case ({src, dst})
      {2'd0, 2'd2}: return 32'h0140_0000;
      {2'd0, 2'd3}: return 32'h0190_0000;
      {2'd1, 2'd2}: return 32'h0280_0000;
      {2'd1, 2'd3}: return 32'h0500_0000;
      default:      return '0;
    endcase
  endfunction

  function automatic logic [7:0] hdr_vpi(hdr_t h);
    return h[35:28];
  endfunction

  // Output port of a VPI.
  function automatic route_t route(logic [7:0] vpi);
    unique case (vpi)
      8'h14, 8'h28: return '{valid: 1'b1, port: 2'd2};
      8'h19, 8'h50: return '{valid: 1'b1, port: 2'd3};
      default:      return '{valid: 1'b0, port: 2'd0};
    endcase
  endfunction

endpackage

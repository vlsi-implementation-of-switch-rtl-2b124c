// hvf: header validation for one input port.
//
// Combinational. Takes the 40-bit header sliced by the SII, extracts the VPI
// (bits [35:28]) and looks it up among the switch's virtual path connections:
// valid_hdr_flag_out is 1 for a known VPI, and out_port_out names its output
// port (2 or 3). The flag name follows the original design; the lookup itself
// is this design's reading of what the validation does.
module hvf
  import atm_pkg::*;
(
  input  hdr_t  cell_hdr_in,
  output logic  valid_hdr_flag_out,
  output port_t out_port_out
);

  route_t r;

  always_comb begin
    r                  = route(hdr_vpi(cell_hdr_in));
    valid_hdr_flag_out = r.valid;
    out_port_out       = r.port;
  end

endmodule

// tb_hvf: checks the header validation's VPI lookup.
//
// Applies every 8-bit VPI value in a header with random other fields and
// compares the flag and output port against the four connections 0x14/0x28
// (to port 2) and 0x19/0x50 (to port 3), written here independently.
module tb_hvf;
  import atm_pkg::*;

  hdr_t  hdr;
  logic  valid;
  port_t port;
  int    checks = 0, failures = 0;

  hvf dut (.cell_hdr_in(hdr), .valid_hdr_flag_out(valid), .out_port_out(port));

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic  exp_v;
      port_t exp_p;
      hdr = {4'($urandom), 8'(v), 28'($urandom)};
      exp_v = (v == 'h14) || (v == 'h28) || (v == 'h19) || (v == 'h50);
      exp_p = (v == 'h14 || v == 'h28) ? 2'd2 : 2'd3;
      #1;
      checks++;
      if (valid !== exp_v) begin
        failures++;
        $display("FAIL vpi=%02h valid=%b exp=%b", v, valid, exp_v);
      end
      if (exp_v) begin
        checks++;
        if (port !== exp_p) begin
          failures++;
          $display("FAIL vpi=%02h port=%0d exp=%0d", v, port, exp_p);
        end
      end
    end
    // The printed first header words themselves.
    hdr = {32'h0140_0000, 8'h00}; #1; checks++; if (!(valid && port == 2)) failures++;
    hdr = {32'h0190_0000, 8'h00}; #1; checks++; if (!(valid && port == 3)) failures++;
    hdr = {32'h0280_0000, 8'h00}; #1; checks++; if (!(valid && port == 2)) failures++;
    hdr = {32'h0500_0000, 8'h00}; #1; checks++; if (!(valid && port == 3)) failures++;
    hdr = '0;                     #1; checks++; if (valid)                failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_segmentation: checks packet storage, 48-byte segmentation, padding,
// the cell-ready and packet-over flags, and overflow.
//
// Packets of several lengths (one with 144 bytes of payload, three full
// cells) are written; the testbench then reads cells 12 words at a time while
// cell_rdy_out is 1 and compares each word, one cycle after the read enable,
// with the payload it sent (zero past the end). It checks the number of
// cells, the destination port, packet-over after the last cell, and that a
// 40-word payload overflows a 36-word memory.
module tb_segmentation;
  import atm_pkg::*;

  localparam int MAXW = 36;

  logic  clk = 0, rst_n = 0;
  logic  pkt_start = 0, rd_en = 0;
  word_t din = '0, dout;
  logic  cell_rdy, over, ovf;
  port_t dest;
  int    checks = 0, failures = 0, cycles = 0;

  segmentation #(.MAX_WORDS(MAXW)) dut (
    .clk, .rst_n, .pkt_start, .port_cell32_in(din), .seg_rd_en_in(rd_en),
    .port_cell32_out(dout), .cell_rdy_out(cell_rdy), .seg_read_packet_over_out(over),
    .dest_port_out(dest), .overflow_out(ovf));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic run_packet(int nwords, port_t d);
    word_t payload [$];
    int    ncells, got_cells;
    for (int k = 0; k < nwords; k++) payload.push_back($urandom);
    // write: identifier then payload
    @(negedge clk);
    pkt_start = 1; din = {30'h0ABC_D00, d};
    for (int k = 0; k < nwords; k++) begin
      @(negedge clk);
      din = payload[k];
      check(!cell_rdy, "cell_rdy while writing");
    end
    @(negedge clk);
    pkt_start = 0; din = '0;
    @(negedge clk);
    check(dest == d, $sformatf("dest %0d exp %0d", dest, d));
    check(ovf == (nwords > MAXW), $sformatf("overflow flag %b for %0d words", ovf, nwords));
    ncells = (nwords > MAXW) ? (MAXW + 11) / 12 : (nwords + 11) / 12;
    got_cells = 0;
    while (cell_rdy) begin
      for (int w = 0; w < PAYLOAD_WORDS; w++) begin
        int idx;
        rd_en = 1;
        @(negedge clk);
        idx = got_cells * PAYLOAD_WORDS + w;
        check(dout == ((idx < nwords && idx < MAXW) ? payload[idx] : 32'h0),
              $sformatf("cell %0d word %0d: %h", got_cells, w, dout));
      end
      rd_en = 0;
      got_cells++;
      @(negedge clk);
    end
    check(got_cells == ncells, $sformatf("cells %0d exp %0d", got_cells, ncells));
    check(over, "packet over not set");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_packet(36, 2'd2);   // 144 bytes: three full cells
    run_packet(12, 2'd3);
    run_packet(17, 2'd2);   // last cell padded
    run_packet(1, 2'd3);
    run_packet(40, 2'd2);   // overflow
    run_packet(24, 2'd3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

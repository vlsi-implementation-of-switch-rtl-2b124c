// tb_atm_host_interface: checks cw framing for every source/destination
// pair against the header words 01400000 (0->2), 01900000 (0->3), 02800000
// (1->2) and 05000000 (1->3), then 00000000, then the 12 payload words.
//
// A small model of the segmentation read port answers each seg_rd_en_out with
// the next payload word one cycle later. The testbench checks the 14-cycle
// valid window, exactly 12 read requests per cw, and that no cw starts
// while the SII is not ready.
module tb_atm_host_interface;
  import atm_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  cell_rdy = 0, sii_ready = 0;
  port_t dest = 2;
  word_t seg_word = '0;
  logic  [1:0] rd_en, valid;
  word_t [1:0] cw;
  int    checks = 0, failures = 0;
  word_t payload [PAYLOAD_WORDS];
  int    rd_idx;

  // Both sources; only the selected one gets the ready signals.
  int sel_src = 0;
  for (genvar s = 0; s < 2; s++) begin : g
    atm_host_interface #(.SRC_PORT(port_t'(s))) dut (
      .clk, .rst_n, .seg_cell_rdy_in(cell_rdy && sel_src == s), .seg_cell32_in(seg_word),
      .dest_port_in(dest), .sii_ready_in(sii_ready && sel_src == s),
      .seg_rd_en_out(rd_en[s]), .sw_port_cell32_out(cw[s]), .sw_port_cell_valid_out(valid[s]));
  end

  always #5 clk = ~clk;

  always @(posedge clk) if (rd_en[sel_src]) begin
    seg_word <= payload[rd_idx];
    rd_idx   <= rd_idx + 1;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic word_t exp_hdr(int s, int d);
    if (s == 0 && d == 2) return 32'h0140_0000;
    if (s == 0 && d == 3) return 32'h0190_0000;
    if (s == 1 && d == 2) return 32'h0280_0000;
    if (s == 1 && d == 3) return 32'h0500_0000;
    return 32'h0;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      int s, d, nrd;
      s = t % 2;
      d = (t < 8) ? 2 + (t / 2) % 2 : 1;
      sel_src = s; dest = port_t'(d);
      foreach (payload[k]) payload[k] = $urandom;
      rd_idx = 0;
      // Cell ready but SII busy: nothing may start.
      cell_rdy = 1; sii_ready = 0;
      repeat (3) begin
        @(negedge clk);
        check(!valid[s], "started while SII not ready");
      end
      sii_ready = 1;
      @(negedge clk);
      sii_ready = 0; cell_rdy = 0;
      nrd = 0;
      for (int w = 0; w < CELL_WORDS; w++) begin
        word_t e;
        e = (w == 0) ? exp_hdr(s, d) : (w == 1) ? 32'h0 : payload[w - 2];
        #1;
        check(valid[s], $sformatf("valid low in cycle %0d", w));
        check(cw[s] == e, $sformatf("src %0d dst %0d word %0d %h exp %h", s, d, w, cw[s], e));
        check(!valid[1 - s], "other source active");
        nrd += rd_en[s];
        @(negedge clk);
      end
      check(!valid[s], "valid longer than 14 cycles");
      check(nrd == PAYLOAD_WORDS, $sformatf("%0d reads", nrd));
    end
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

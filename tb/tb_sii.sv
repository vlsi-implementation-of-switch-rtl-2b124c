// tb_sii: checks the switch incoming interface's cw write, header slicing
// and cw read.
//
// Writes 14-word cells (with gaps in the write enable), checks ready_out and
// cell_rdy_out (already 1 in the cycle the 14th word is written),
// the 40-bit header (first word and top byte of the second) and reads the
// cw back word by word with gaps in the read enable, counting that the
// write and the read each take exactly 14 enabled cycles.
module tb_sii;
  import atm_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  wr = 0, rd = 0;
  word_t din = '0, dout;
  hdr_t  hdr;
  logic  full, ready;
  int    checks = 0, failures = 0;

  sii dut (.clk, .rst_n, .inc_wr_en_in(wr), .port_cell32_in(din), .inc_rd_en_in(rd),
           .port_cell32_out(dout), .inc_cell_hdr_out(hdr), .cell_rdy_out(full),
           .ready_out(ready));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      word_t cw [CELL_WORDS];
      int    n;
      bit    gaps;
      gaps = (t % 2 == 1);
      foreach (cw[k]) cw[k] = $urandom;
      @(negedge clk);
      check(ready && !full, "not ready when empty");
      n = 0;
      while (n < CELL_WORDS) begin
        if (gaps && $urandom_range(0, 2) == 0) begin
          wr = 0;
        end else begin
          wr = 1; din = cw[n]; n++;
        end
        @(negedge clk);
        check(full == (n == CELL_WORDS || (wr && n == CELL_WORDS - 1)), $sformatf("cell_rdy %b after %0d words", full, n));
      end
      wr = 0;
      check(full && !ready, "not ready after 14 words");
      check(hdr == {cw[0], cw[1][31:24]}, $sformatf("header %h", hdr));
      // Further writes are ignored while full.
      wr = 1; din = 32'hDEAD_BEEF;
      @(negedge clk);
      wr = 0;
      n = 0;
      while (n < CELL_WORDS) begin
        if (gaps && $urandom_range(0, 2) == 0) begin
          rd = 0;
          @(negedge clk);
        end else begin
          rd = 1;
          #1;
          check(dout == cw[n], $sformatf("read word %0d %h exp %h", n, dout, cw[n]));
          n++;
          @(negedge clk);
        end
      end
      rd = 0;
      check(ready && !full, "not empty after 14 reads");
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

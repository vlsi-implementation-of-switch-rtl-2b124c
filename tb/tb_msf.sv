// tb_msf: checks the main switch FSM's 14-cycle cell read.
//
// A model memory holds queued cells for one output; each read enable returns
// the next word of the head cell in the same cycle. The testbench checks the
// output words, that pkt_active_out lasts exactly 14 cycles per cell, one
// idle cycle between back-to-back cells, and the cell counter.
module tb_msf;
  import atm_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  rd_en, active;
  word_t mdata, dout;
  logic  [15:0] cells_out;
  int    checks = 0, failures = 0;

  word_t q [$];        // queued words, 14 per cell
  int    rd_ptr = 0;

  wire avail = (q.size() - rd_ptr) >= CELL_WORDS;
  assign mdata = (rd_ptr < q.size()) ? q[rd_ptr] : 32'hFFFF_FFFF;

  msf dut (.clk, .rst_n, .cell_avail_in(avail), .mem_data_in(mdata), .mem_rd_en_out(rd_en),
           .pkt32_out(dout), .pkt_active_out(active), .cells_out);

  always #5 clk = ~clk;
  always @(posedge clk) if (rd_en) rd_ptr <= rd_ptr + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  int run, idle, ncell;
  word_t exp_q [$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 5 * CELL_WORDS; k++) begin
      word_t w;
      w = $urandom;
      q.push_back(w);
      exp_q.push_back(w);
    end
    run = 0; idle = 0; ncell = 0;
    for (int cyc = 0; cyc < 120; cyc++) begin
      @(negedge clk);
      #1;
      if (active) begin
        check(dout == exp_q[0], $sformatf("word %h exp %h", dout, exp_q[0]));
        void'(exp_q.pop_front());
        if (run == 0 && ncell > 0) check(idle == 1, $sformatf("gap %0d cycles", idle));
        run++; idle = 0;
      end else begin
        if (run > 0) begin
          check(run == CELL_WORDS, $sformatf("active %0d cycles", run));
          ncell++;
        end
        run = 0; idle++;
        check(dout == '0, "data while idle");
      end
    end
    check(ncell == 5, $sformatf("%0d cells", ncell));
    check(cells_out == 5, $sformatf("cells_out %0d", cells_out));
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

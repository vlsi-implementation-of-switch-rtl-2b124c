// tb_mmc: checks the shared main memory against a per-output FIFO model.
//
// A writer stores cells (random contents, random output queue) whenever a
// slot is free; two readers, one per output, read the head cell of their
// queue at random times. Every word read is compared with the model's queue.
// The memory is first filled completely to check mem_free_out and the
// occupancy count, then written and read concurrently.
module tb_mmc;
  import atm_pkg::*;

  localparam int NC = 16;

  logic  clk = 0, rst_n = 0;
  logic  wr_en = 0, wr_port = 0, mem_free;
  word_t wdata = '0;
  logic  [1:0] rd_en = '0, avail;
  word_t [1:0] rdata;
  logic  [$clog2(NC+1)-1:0] used;
  int    checks = 0, failures = 0;
  int    written = 0, read_cells = 0, full_seen = 0;
  bit    readers_on = 0;

  word_t model0 [$], model1 [$];   // queued words per output, 14 per cell

  mmc #(.NCELLS(NC)) dut (
    .clk, .rst_n, .mem_wr_en_in(wr_en), .mem_wr_port_in(wr_port), .mem_data_in(wdata),
    .mem_free_out(mem_free), .mem_rd_en_in(rd_en), .mem_data_out(rdata),
    .cell_avail_out(avail), .cells_used_out(used));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic write_cell();
    word_t c [CELL_WORDS];
    int    p;
    p = $urandom_range(0, 1);
    foreach (c[k]) c[k] = $urandom;
    for (int w = 0; w < CELL_WORDS; w++) begin
      wr_en = 1; wr_port = p[0]; wdata = c[w];
      if (w == CELL_WORDS - 1) begin
        #1;
        check(avail[p], "cell_avail not raised during the last word");
      end
      @(negedge clk);
    end
    wr_en = 0;
    for (int w = 0; w < CELL_WORDS; w++)
      if (p == 0) model0.push_back(c[w]);
      else        model1.push_back(c[w]);
    written++;
  endtask

  // A reader decides in the cycle it sees cell_avail_out and reads from the
  // next cycle on, as the output FSM does.
  task automatic reader(int o);
    forever begin
      @(negedge clk);
      if (readers_on && avail[o] && $urandom_range(0, 3) == 0) begin
        @(negedge clk);
        #2;
        check(((o == 0) ? model0.size() : model1.size()) >= CELL_WORDS, "avail with empty model");
        for (int w = 0; w < CELL_WORDS; w++) begin
          word_t e;
          e = (o == 0) ? model0.pop_front() : model1.pop_front();
          rd_en[o] = 1;
          #1;
          check(rdata[o] == e, $sformatf("out %0d word %0d %h exp %h", o, w, rdata[o], e));
          @(negedge clk);
          #2;
        end
        rd_en[o] = 0;
        read_cells++;
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(mem_free && used == 0 && avail == 0, "not empty after reset");
    for (int k = 0; k < NC; k++) begin
      check(mem_free, "no free slot before full");
      write_cell();
    end
    check(!mem_free, "free slot reported when full");
    check(used == NC, $sformatf("used %0d", used));
    check(avail == {model1.size() > 0, model0.size() > 0}, "avail flags");
    full_seen++;
    fork
      reader(0);
      reader(1);
    join_none
    readers_on = 1;
    while (written < 120) begin
      if (mem_free) write_cell();
      else begin
        full_seen++;
        @(negedge clk);
      end
    end
    while (read_cells < written) @(negedge clk);
    repeat (2) @(negedge clk);
    check(used == 0 && mem_free && avail == 0, "not empty at the end");
    check(full_seen > 1, "memory never full while running");
    $display("cells %0d, full %0d times", read_cells, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

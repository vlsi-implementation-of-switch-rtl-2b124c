// tb_mmf: checks the main memory FSM's arbitration and transfer timing.
//
// Two modelled SIIs raise cell_rdy_in; each read enable consumes one word,
// and a buffer stops being full at its first read. The testbench checks:
// state 2'b10 raises inc_rd_en for the chosen SII and mem_wr_en together for
// exactly 14 cycles, one decision cycle in state 2'b00 precedes it, the two
// inputs are served in turn, the output queue follows the header's port, a
// cell with an invalid header is read out with no write (state 2'b11, one
// drop pulse), and a full memory holds the FSM in 2'b01 with no reads.
module tb_mmf;
  import atm_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  [1:0] full = '0, valid = '0, rd;
  port_t [1:0] oport = '{2'd2, 2'd2};
  logic  mem_free = 1, wr_en, wr_port, drop;
  logic  sel;
  logic  [1:0] st;
  int    checks = 0, failures = 0;
  int    nrd [2] = '{0, 0};

  mmf dut (.clk, .rst_n, .cell_rdy_in(full), .valid_hdr_flag_in(valid), .out_port_in(oport),
           .mem_free_in(mem_free), .inc_rd_en_out(rd), .sel_out(sel), .mem_wr_en_out(wr_en),
           .mem_wr_port_out(wr_port), .mem_curr_state_out(st), .drop_out(drop));

  always #5 clk = ~clk;

  always @(posedge clk) for (int i = 0; i < 2; i++) if (rd[i]) begin
    full[i] <= 1'b0;
    nrd[i]  <= nrd[i] + 1;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // Watch one cell hand-over from input i; expect a write (or a drop).
  task automatic expect_cell(int i, bit write, bit exp_port);
    int n0, ndrop;
    n0 = nrd[i]; ndrop = 0;
    // decision cycle
    #1;
    check(st == 2'b00 && rd == 0 && !wr_en, $sformatf("no decision cycle, state %b", st));
    @(negedge clk); #1;
    for (int w = 0; w < CELL_WORDS; w++) begin
      check(st == (write ? 2'b10 : 2'b11), $sformatf("state %b in word %0d", st, w));
      check(rd == 2'(1 << i), $sformatf("rd %b exp input %0d", rd, i));
      check(wr_en == write, "write enable");
      if (write) check(wr_port == exp_port, "write port");
      ndrop += drop;
      @(negedge clk); #1;
    end
    check(rd == 0 && !wr_en, "enables longer than 14 cycles");
    check(nrd[i] - n0 == CELL_WORDS, $sformatf("%0d reads", nrd[i] - n0));
    check(ndrop == (write ? 0 : 1), $sformatf("%0d drop pulses", ndrop));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Both full and valid: input 0 first, then input 1.
    valid = 2'b11; oport[0] = 2'd3; oport[1] = 2'd2;
    full = 2'b11;
    expect_cell(0, 1, 1'b1);
    expect_cell(1, 1, 1'b0);
    // Round robin again, starting after input 1.
    full = 2'b11; oport[0] = 2'd2; oport[1] = 2'd3;
    expect_cell(0, 1, 1'b0);
    expect_cell(1, 1, 1'b1);
    // Invalid header on input 1: discarded.
    valid = 2'b01; full = 2'b10;
    expect_cell(1, 0, 1'b0);
    // Memory full: wait in 2'b01 without reading.
    valid = 2'b11; mem_free = 0; full = 2'b01;
    @(negedge clk);
    repeat (5) begin
      @(negedge clk); #1;
      check(st == 2'b01 && rd == 0 && !wr_en, $sformatf("not waiting, state %b", st));
    end
    mem_free = 1;
    @(negedge clk); #1;
    check(st == 2'b10 && rd == 2'b01 && wr_en, "did not leave the wait state");
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

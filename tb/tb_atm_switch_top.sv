// tb_atm_switch_top: end-to-end test of the two-port ATM switch at its
// default sizes.
//
// 1. Latency: one single-cell packet through an empty switch; the last word
//    must leave 42 cycles after the first header word entered the SII
//    (three back-to-back 14-cycle transfers), and every output cell
//    must last 14 cycles.
// 2. The 144-byte packet (three cells) from port 0 to port 2.
// 3. Random traffic on both inputs at once: lengths 1..40 words (over 36
//    overflows the segmentation memory), destinations 2 and 3, sometimes
//    port 1, which has no connection and must be dropped.
// A scoreboard predicts every cell (header word of the source/destination
// connection, a zero word, 12 payload words padded with zeros) per output and
// source, and checks order and contents. The testbench counts how often each
// mechanism happened and fails if one never did: multi-cell segmentation,
// padding, overflow, each of the four connections, invalid-header drop, both
// SIIs full at once (arbitration), an SII holding off its host interface,
// and more than one cell held in the shared memory.
module tb_atm_switch_top;
  import atm_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  [1:0] pkt_start = '0;
  word_t [1:0] pkt_in = '0;
  logic  [1:0] pkt_over, ovf;
  word_t [1:0] pkt_out;
  logic  [1:0] active;
  logic  drop;
  int    checks = 0, failures = 0;
  longint cyc = 0;

  atm_switch_top dut (
    .clk, .rst_n, .env_pkt_start(pkt_start), .env_pkt32_in(pkt_in),
    .env_pkt_over_out(pkt_over), .env_seg_overflow_out(ovf),
    .env_pkt32_out(pkt_out), .atm_pkt_active_out(active), .cell_drop_out(drop));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d %s", cyc, msg);
    end
  endtask

  // Expected words per (output, source): q[o*2+s].
  word_t exp_q [4][$];
  int    exp_drops = 0, got_drops = 0, exp_cells = 0, got_cells = 0;
  int    n_conn [2][2];
  int    n_multi = 0, n_pad = 0, n_ovf = 0, n_arb = 0, n_hold = 0, n_queue = 0;

  function automatic word_t hdr_word(int s, int d);
    if (s == 0 && d == 2) return 32'h0140_0000;
    if (s == 0 && d == 3) return 32'h0190_0000;
    if (s == 1 && d == 2) return 32'h0280_0000;
    if (s == 1 && d == 3) return 32'h0500_0000;
    return 32'h0;
  endfunction

  // Send one packet on input s and record its cells.
  task automatic send(int s, int d, int nwords);
    word_t pay [$];
    int    kept, ncells;
    for (int k = 0; k < nwords; k++) pay.push_back($urandom);
    kept   = (nwords > 36) ? 36 : nwords;
    ncells = (kept + PAYLOAD_WORDS - 1) / PAYLOAD_WORDS;
    if (ncells > 1) n_multi++;
    if (kept % PAYLOAD_WORDS != 0) n_pad++;
    for (int c = 0; c < ncells; c++) begin
      if (d < 2) begin
        exp_drops++;
        continue;
      end
      exp_cells++;
      exp_q[(d - 2) * 2 + s].push_back(hdr_word(s, d));
      exp_q[(d - 2) * 2 + s].push_back(32'h0);
      for (int w = 0; w < PAYLOAD_WORDS; w++) begin
        int idx;
        idx = c * PAYLOAD_WORDS + w;
        exp_q[(d - 2) * 2 + s].push_back(idx < kept ? pay[idx] : 32'h0);
      end
    end
    @(negedge clk);
    pkt_start[s] = 1; pkt_in[s] = {30'h0, 2'(d)};
    foreach (pay[k]) begin
      @(negedge clk);
      pkt_in[s] = pay[k];
    end
    @(negedge clk);
    pkt_start[s] = 0; pkt_in[s] = '0;
    @(negedge clk);
    check(ovf[s] == (nwords > 36), "overflow flag");
    if (ovf[s]) n_ovf++;
    wait (pkt_over[s]);
  endtask

  // Output monitors: collect cells, check 14-cycle runs and contents.
  for (genvar o = 0; o < 2; o++) begin : g_mon
    word_t cur [$];
    int    run = 0;
    always @(negedge clk) if (rst_n) begin
      if (active[o]) begin
        cur.push_back(pkt_out[o]);
        run++;
      end else if (run > 0) begin
        int s;
        check(run == CELL_WORDS, $sformatf("output %0d active %0d cycles", o, run));
        s = (cur[0] == hdr_word(0, o + 2)) ? 0 : (cur[0] == hdr_word(1, o + 2)) ? 1 : -1;
        check(s >= 0, $sformatf("output %0d unknown header %h", o, cur[0]));
        if (s >= 0) begin
          n_conn[s][o]++;
          check(exp_q[o * 2 + s].size() >= CELL_WORDS, "unexpected cell");
          foreach (cur[k]) if (exp_q[o * 2 + s].size() > 0) begin
            word_t e;
            e = exp_q[o * 2 + s].pop_front();
            check(cur[k] == e, $sformatf("out %0d src %0d word %0d %h exp %h", o, s, k, cur[k], e));
          end
        end
        got_cells++;
        cur.delete();
        run = 0;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (drop) got_drops++;
    if (dut.sii_rdy == 2'b11) n_arb++;
    if (|(dut.seg_cell_rdy & ~dut.sii_ready)) n_hold++;
    if (dut.cells_used > 1) n_queue++;
  end

  task automatic traffic(int s, int npkts);
    for (int p = 0; p < npkts; p++) begin
      int d, n, r;
      r = $urandom_range(0, 9);
      d = (r == 0) ? 1 : (r < 5) ? 2 : 3;
      r = $urandom_range(0, 9);
      n = (r == 0) ? $urandom_range(37, 40) : (r < 3) ? 36 : $urandom_range(1, 36);
      send(s, d, n);
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
  endtask

  initial begin
    int t_in, t_out;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. Latency of one cell through the empty switch.
    fork
      send(0, 2, 12);
      begin
        @(posedge dut.sw_cell_valid[0]);
        t_in = int'(cyc);
        @(negedge active[0]);
        t_out = int'(cyc) - 1;
      end
    join
    check(t_out - t_in + 1 == 42, $sformatf("latency %0d cycles, expected 42", t_out - t_in + 1));
    $display("single-cell latency: %0d cycles", t_out - t_in + 1);

    // 2. 144 bytes from port 0 to port 2.
    send(0, 2, 36);
    repeat (60) @(negedge clk);

    // 3. Random traffic on both inputs.
    fork
      traffic(0, 40);
      traffic(1, 40);
    join
    while (got_cells < exp_cells) @(negedge clk);
    repeat (40) @(negedge clk);

    check(got_cells == exp_cells, $sformatf("cells %0d exp %0d", got_cells, exp_cells));
    check(got_drops == exp_drops, $sformatf("drops %0d exp %0d", got_drops, exp_drops));
    for (int k = 0; k < 4; k++) check(exp_q[k].size() == 0, "cells left over");
    for (int s = 0; s < 2; s++)
      for (int o = 0; o < 2; o++) check(n_conn[s][o] > 0, $sformatf("connection %0d->%0d unused", s, o + 2));
    check(n_multi > 0, "no multi-cell packet");
    check(n_pad > 0, "no padded cell");
    check(n_ovf > 0, "no overflow");
    check(got_drops > 0, "no drop");
    check(n_arb > 0, "no arbitration conflict");
    check(n_hold > 0, "no SII hold-off");
    check(n_queue > 0, "no queueing in shared memory");
    $display("cells %0d drops %0d conn %0d/%0d/%0d/%0d multi %0d pad %0d ovf %0d arb %0d hold %0d queue %0d",
             got_cells, got_drops, n_conn[0][0], n_conn[0][1], n_conn[1][0], n_conn[1][1],
             n_multi, n_pad, n_ovf, n_arb, n_hold, n_queue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_indexing_controller: the controller walks a 40-entry adjacency list (neighbour lists of 12
// source nodes, two of them empty) against buffers modelled in the testbench with a one-cycle
// read. Every task must carry the right source id, flags, p, q and h', in order; the first
// task must come 2 cycles after the first issue; and with stall held high no new task may
// start (at most the two in flight finish).
module tb_indexing_controller;
  import oco_pkg::*;
  localparam int COLS = 2, SRC = 16, TGT = 32, ADJ = 64, NE = 40;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, stall, busy;
  logic [6:0] n_entries;
  logic [5:0] adj_raddr;
  adj_entry_t adj_rdata;
  logic [3:0] left_raddr;
  data_t left_rdata, right_rdata;
  logic [4:0] tgt_raddr;
  data_t [COLS-1:0] com_rdata;
  logic task_valid, task_last, task_empty;
  logic [3:0] task_src;
  data_t task_p, task_q;
  data_t [COLS-1:0] task_h;
  int checks = 0, failures = 0;

  adj_entry_t adjm [ADJ];
  int pm [SRC], qm [TGT], hm [TGT][COLS];
  int exp_src [NE];
  int got = 0, cyc = 0, first_task_cyc = -1, start_cyc = 0, stall_tasks = 0;
  logic stall_q1, stall_q2;

  indexing_controller #(.COLS(COLS), .SRC_MAX(SRC), .TGT_MAX(TGT), .ADJ_MAX(ADJ)) dut (.*);

  always @(posedge clk) begin
    adj_rdata <= adjm[adj_raddr];
    left_rdata <= 16'(pm[left_raddr]);
    right_rdata <= 16'(qm[tgt_raddr]);
    for (int c = 0; c < COLS; c++) com_rdata[c] <= 16'(hm[tgt_raddr][c]);
    cyc++;
    stall_q1 <= stall;
    stall_q2 <= stall_q1;
  end

  initial begin
    int e, s;
    for (int i = 0; i < SRC; i++) pm[i] = int'($urandom % 2000) - 1000;
    for (int j = 0; j < TGT; j++) begin
      qm[j] = int'($urandom % 2000) - 1000;
      for (int c = 0; c < COLS; c++) hm[j][c] = int'($urandom % 2000) - 1000;
    end
    e = 0; s = 0;
    while (e < NE) begin
      int nn;
      nn = (s == 2 || s == 7) ? 0 : int'($urandom % 5) + 1;
      if (e + ((nn == 0) ? 1 : nn) > NE || s == SRC - 1) nn = NE - e;
      if (nn == 0) begin
        adjm[e] = '{empty: 1'b1, last: 1'b1, tgt: 14'd0}; exp_src[e] = s; e++;
      end else
        for (int t = 0; t < nn; t++) begin
          adjm[e] = '{empty: 1'b0, last: (t == nn - 1), tgt: 14'($urandom % TGT)};
          exp_src[e] = s; e++;
        end
      s++;
    end
    rst_n = 0; start = 0; stall = 0; n_entries = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; n_entries = 7'(NE);
    start_cyc = cyc;
    @(negedge clk);
    start = 0;
    repeat (8) @(negedge clk);
    stall = 1;
    repeat (10) @(negedge clk);
    stall = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (got != NE) begin failures++; $display("%0d tasks, expected %0d", got, NE); end
    checks++;
    if (first_task_cyc - start_cyc != 3) begin
      failures++; $display("first task %0d cycles after start", first_task_cyc - start_cyc);
    end
    checks++;
    if (stall_tasks > 2) begin failures++; $display("%0d tasks during stall", stall_tasks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && task_valid) begin
    adj_entry_t en;
    en = adjm[got];
    if (first_task_cyc < 0) first_task_cyc = cyc;
    if (stall_q1 && stall_q2 && stall) stall_tasks++;
    checks++;
    if (int'(task_src) != exp_src[got] || task_last != en.last || task_empty != en.empty ||
        task_p != 16'(pm[exp_src[got]]) ||
        (!en.empty && (task_q != 16'(qm[en.tgt]) || task_h[0] != 16'(hm[en.tgt][0]) ||
                       task_h[1] != 16'(hm[en.tgt][1])))) begin
      failures++;
      $display("task %0d: src %0d (exp %0d) last %b empty %b p %0d q %0d", got, task_src,
               exp_src[got], task_last, task_empty, task_p, task_q);
    end
    got++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

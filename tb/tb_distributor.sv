// tb_distributor: 50 nodes with 25 target nodes per module and 13 source nodes per lane, then
// 60 adjacency entries with random lane tags, pass through the Distributor (2 modules x 4
// lanes). Every write must reach the right module, lane and address one cycle after its input,
// and the per-lane entry counts must match; clear restarts the node counters.
module tb_distributor;
  import oco_pkg::*;
  localparam int N = 2, L = 4, COLS = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, clear, in_valid, adj_clear, adj_valid;
  logic [5:0] tgt_per_acm;
  logic [4:0] src_per_lane;
  data_t [COLS-1:0] in_h, t_h;
  data_t in_p, in_q, p_data, t_q;
  logic [31:0] n_nodes_in;
  logic [15:0] adj_lane;
  adj_entry_t adj_data, a_data;
  logic [N-1:0] p_we, t_we, a_we;
  logic [1:0] p_lane, a_lane;
  logic [3:0] p_addr;
  logic [4:0] t_addr;
  logic [5:0] a_addr;
  logic [N-1:0][L-1:0][6:0] n_entries;
  int checks = 0, failures = 0;
  int cnt [N][L];

  distributor #(.N_ACM(N), .LANES(L), .COLS(COLS), .SRC_MAX(16), .TGT_MAX(32), .ADJ_MAX(64)) dut (.*);

  task automatic send_nodes(int nn);
    for (int n = 0; n < nn; n++) begin
      @(negedge clk);
      in_valid = 1; in_p = 16'(n * 3); in_q = 16'(n * 5); in_h[0] = 16'(n); in_h[1] = 16'(-n);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (p_we != 2'b11 || p_lane != 2'(n / 13) || p_addr != 4'(n % 13) || p_data != 16'(n * 3) ||
          t_we != 2'(1 << (n / 25)) || t_addr != 5'(n % 25) || t_q != 16'(n * 5) ||
          t_h[1] != 16'(-n)) begin
        failures++;
        $display("node %0d: p_we %b lane %0d addr %0d t_we %b addr %0d", n, p_we, p_lane, p_addr,
                 t_we, t_addr);
      end
    end
    checks++;
    if (n_nodes_in != 32'(nn)) begin failures++; $display("count %0d", n_nodes_in); end
  endtask

  initial begin
    rst_n = 0; clear = 0; in_valid = 0; adj_clear = 0; adj_valid = 0; adj_lane = 0;
    adj_data = '0; in_h = '0; in_p = 0; in_q = 0; tgt_per_acm = 25; src_per_lane = 13;
    repeat (2) @(negedge clk);
    rst_n = 1;
    send_nodes(20);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    send_nodes(50);
    @(negedge clk); adj_clear = 1; @(negedge clk); adj_clear = 0;
    for (int s = 0; s < N; s++) for (int g = 0; g < L; g++) cnt[s][g] = 0;
    for (int e = 0; e < 60; e++) begin
      int ln;
      @(negedge clk);
      ln = int'($urandom % (N * L));
      adj_valid = 1; adj_lane = 16'(ln);
      adj_data = '{empty: 1'b0, last: e[0], tgt: 14'(e)};
      @(negedge clk);
      adj_valid = 0;
      checks++;
      if (a_we != 2'(1 << (ln / L)) || a_lane != 2'(ln % L) || a_addr != 6'(cnt[ln / L][ln % L]) ||
          a_data.tgt != 14'(e)) begin
        failures++;
        $display("entry %0d lane %0d: a_we %b a_lane %0d a_addr %0d", e, ln, a_we, a_lane, a_addr);
      end
      cnt[ln / L][ln % L]++;
    end
    for (int s = 0; s < N; s++)
      for (int g = 0; g < L; g++) begin
        checks++;
        if (n_entries[s][g] != 7'(cnt[s][g])) begin failures++; $display("n_entries %0d %0d", s, g); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

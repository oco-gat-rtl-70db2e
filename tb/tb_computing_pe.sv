// tb_computing_pe: streams node pairs of 60 source nodes (0 to 5 neighbours each, none giving an
// empty token) with random gaps into one Computing PE with 4-element vectors. Each output must
// carry the right source id, arrive exactly 10 cycles after the source's last pair, and hold
// sum exp(LeakyReLU(p+q)) and sum exp(..) * h' within the fixed-point tolerance of a
// floating-point model.
module tb_computing_pe;
  import oco_pkg::*;
  localparam int COLS = 4, NSRC = 60;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_last, in_empty, out_valid;
  logic [7:0] in_src, out_src;
  data_t in_p, in_q;
  data_t [COLS-1:0] in_h;
  acc_t out_coeff;
  acc_t [COLS-1:0] out_prod;
  int checks = 0, failures = 0, cyc = 0;
  real rc [NSRC];
  real rp [NSRC][COLS];
  real ra [NSRC][COLS];
  int  n_terms [NSRC];
  int  last_cyc [NSRC];
  int  got_n = 0;

  computing_pe #(.COLS(COLS), .SRC_W(8)) dut (.*);

  always @(posedge clk) cyc++;

  initial begin
    rst_n = 0; in_valid = 0; in_last = 0; in_empty = 0; in_src = 0; in_p = 0; in_q = 0; in_h = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NSRC; i++) begin
      int nn, pi;
      nn = (i % 7 == 3) ? 0 : int'($urandom % 5) + 1;
      pi = int'($urandom % 1536) - 768;
      rc[i] = 0.0;
      n_terms[i] = nn;
      for (int c = 0; c < COLS; c++) begin rp[i][c] = 0.0; ra[i][c] = 0.0; end
      for (int t = 0; t < ((nn == 0) ? 1 : nn); t++) begin
        int qj, s, e;
        real ep;
        while ($urandom % 4 == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        qj = int'($urandom % 1536) - 768;
        in_valid = 1; in_src = 8'(i); in_last = (t == ((nn == 0) ? 0 : nn - 1));
        in_empty = (nn == 0); in_p = 16'(pi); in_q = 16'(qj);
        s = pi + qj;
        e = (s < 0) ? int'((longint'(s) * 51) >>> 8) : s;
        ep = $exp(real'(e) / 256.0);
        if (nn != 0) rc[i] += ep;
        for (int c = 0; c < COLS; c++) begin
          int hv;
          hv = int'($urandom % 1024) - 512;
          in_h[c] = 16'(hv);
          if (nn != 0) begin
            rp[i][c] += ep * real'(hv) / 256.0;
            ra[i][c] += ep * ((hv < 0) ? -real'(hv) : real'(hv)) / 256.0;
          end
        end
        if (in_last) last_cyc[i] = cyc;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (got_n != NSRC) begin failures++; $display("%0d outputs, expected %0d", got_n, NSRC); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    real gc, tol;
    checks++;
    if (int'(out_src) != got_n) begin failures++; $display("source %0d, expected %0d", out_src, got_n); end
    else begin
      checks++;
      if (cyc - last_cyc[got_n] != 10) begin
        failures++; $display("source %0d latency %0d", got_n, cyc - last_cyc[got_n]);
      end
      gc = real'(out_coeff) / 4096.0;
      tol = 0.001 * rc[got_n] + n_terms[got_n] * 2.0 / 4096.0;
      checks++;
      if (gc - rc[got_n] > tol || rc[got_n] - gc > tol) begin
        failures++; $display("source %0d coeff %f expected %f", got_n, gc, rc[got_n]);
      end
      for (int c = 0; c < COLS; c++) begin
        real gp;
        gp = real'(out_prod[c]) / 4096.0;
        tol = 0.001 * ra[got_n][c] + n_terms[got_n] * 2.0 / 4096.0;
        checks++;
        if (gp - rp[got_n][c] > tol || rp[got_n][c] - gp > tol) begin
          failures++; $display("source %0d prod[%0d] %f expected %f", got_n, c, gp, rp[got_n][c]);
        end
      end
    end
    got_n++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

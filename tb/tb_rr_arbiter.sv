// tb_rr_arbiter: four requesters that raise req at random, keep it until
// they have been granted, hold the grant for a random time and release.
// Each cycle the grant is compared with a round-robin reference computed
// here (owner keeps the grant while it requests; otherwise the first
// requester after the previous owner wins), and no requester may wait for
// more than N grants to others.
// Follows the source's round-robin service of ports; the held grant is
// this design's choice.
module tb_rr_arbiter;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so the asynchronous resets act
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  localparam int N = 4;
  logic [N-1:0] req;
  logic gv;
  logic [1:0] gi;
  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .gnt_valid(gv), .gnt_idx(gi));

  int  m_last, m_idx, wait_grants [N];
  bit  m_valid;
  int  hold;

  initial begin
    req = '0; m_last = N - 1; m_valid = 0; m_idx = 0; hold = 0;
    foreach (wait_grants[i]) wait_grants[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // requesters
      for (int i = 0; i < N; i++) begin
        if (gv && gi == i && req[i]) begin
          if (hold == 0) req[i] = 0; else hold--;
        end else if (!req[i] && $urandom_range(3) == 0) req[i] = 1;
      end
      // reference for the next edge
      if (m_valid && req[m_idx]) ;
      else begin
        bit found;
        found = 0;
        for (int k = 1; k <= N; k++) begin
          int c;
          c = (m_last + k) % N;
          if (!found && req[c]) begin found = 1; m_idx = c; end
        end
        if (found) begin
          m_valid = 1; m_last = m_idx; hold = $urandom_range(4);
          for (int i = 0; i < N; i++) if (i != m_idx && req[i]) wait_grants[i]++;
          wait_grants[m_idx] = 0;
        end else m_valid = 0;
      end
      @(posedge clk); #1;
      checks++;
      if (gv !== m_valid || (m_valid && gi !== 2'(m_idx))) begin
        failures++;
        $display("FAIL cycle %0d: grant %0b/%0d expected %0b/%0d", cyc, gv, gi, m_valid, m_idx);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (wait_grants[i] > N - 1) begin failures++; $display("FAIL requester %0d starved", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

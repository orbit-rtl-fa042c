// tb_dispatch_select: random test of the cross-thread dispatch arbiter.
//
// Each cycle every thread offers a random number of candidates (a
// contiguous run from slot 0). Checked: the number granted is the smaller
// of the offers and the width; grants are a prefix of each thread's offers;
// the compact list matches the grants; and the share is round-robin: no
// thread gets two more grants than another that still had offers left.
module tb_dispatch_select;
  import orbit_pkg::*;
  localparam int NT = 4, W = 8;
  logic clk = 0, rst_n = 0;
  logic cand_v [NT][W];
  logic grant  [NT][W];
  logic sel_v  [W];
  tid_t sel_tid [W];
  logic [$clog2(W)-1:0] sel_slot [W];
  int checks = 0, failures = 0;

  dispatch_select #(.NTHREADS(NT), .DISP_W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NT; t++) for (int r = 0; r < W; r++) cand_v[t][r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int offer [NT]; int got [NT]; int total, ngr, nsel;
      @(negedge clk);
      total = 0;
      for (int t = 0; t < NT; t++) begin
        offer[t] = (cyc % 3 == 0) ? W : $urandom_range(W);
        total += offer[t];
        for (int r = 0; r < W; r++) cand_v[t][r] = (r < offer[t]);
      end
      #1;
      ngr = 0; nsel = 0;
      for (int t = 0; t < NT; t++) begin
        got[t] = 0;
        for (int r = 0; r < W; r++) if (grant[t][r]) begin
          got[t]++; ngr++;
          checks++;
          if (r >= offer[t] || (r > 0 && !grant[t][r-1])) begin failures++; $display("non-prefix grant"); end
        end
      end
      checks++;
      if (ngr != ((total < W) ? total : W)) begin failures++; $display("granted %0d of %0d", ngr, total); end
      for (int s = 0; s < W; s++) if (sel_v[s]) begin
        nsel++;
        checks++;
        if (!grant[sel_tid[s]][sel_slot[s]]) begin failures++; $display("sel list mismatch"); end
        if (s > 0 && !sel_v[s-1]) begin failures++; $display("sel list not compact"); end
      end
      checks++;
      if (nsel != ngr) begin failures++; $display("sel count %0d grants %0d", nsel, ngr); end
      for (int a = 0; a < NT; a++) for (int b = 0; b < NT; b++)
        if (got[a] < offer[a]) begin
          checks++;
          if (got[b] > got[a] + 1) begin failures++; $display("unfair share %0d vs %0d", got[b], got[a]); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

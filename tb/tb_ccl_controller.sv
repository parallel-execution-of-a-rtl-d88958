// tb_ccl_controller: runs the controller twice (N=8) and checks the stage
// timing: issue cycles span exactly N^2+6N-4 cycles starting in the cycle after
// start, busy covers the cycle after start through the last processing cycle, done
// pulses once right after it, every pixel is issued once in each of the four
// passes (Passes 1/2 before Passes 3/4), the table clears of PE2/PE4 coincide
// with those of PE1/PE3, and a clear falls on every first merge-pass pixel of
// PE1 and PE3.
module tb_ccl_controller;
  import ccl_pkg::*;
  localparam int N = 8, XW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic [3:0] iss_valid, iss_first_row, tbl_clr;
  pass_e [3:0] iss_pass;
  logic [3:0][XW-1:0] iss_x, iss_y;

  ccl_controller #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("%0t: %s", $time, m); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int seen [4][N+1][N+1];
      int first, last, ndone, busy_cycles, t, ndone_t, nclr;
      bit fwd_done;
      for (int p = 0; p < 4; p++) for (int a = 0; a <= N; a++) for (int b = 0; b <= N; b++) seen[p][a][b] = 0;
      first = -1; last = -1; ndone = 0; busy_cycles = 0; ndone_t = -1; nclr = 0;
      fwd_done = 0;
      repeat (3) @(negedge clk);
      start = 1;
      for (t = 0; t < total_cycles(N) + 10; t++) begin
        #1;
        if (busy) busy_cycles++;
        if (done) begin ndone++; ndone_t = t; end
        chk(tbl_clr[1] == tbl_clr[0] && tbl_clr[3] == tbl_clr[2], "pair clears differ");
        for (int i = 0; i < 4; i++) begin
          if (iss_valid[i]) begin
            if (first < 0) first = t;
            last = t;
            seen[iss_pass[i]][iss_y[i]][iss_x[i]]++;
            if (iss_pass[i] == PASS3 || iss_pass[i] == PASS4) fwd_done = 1;
            else chk(!fwd_done, "forward pixel after the backward stage began");
            if (i % 2 == 0)
              chk(tbl_clr[i] == ((iss_pass[i] == PASS1 || iss_pass[i] == PASS3) && iss_x[i] == 1),
                  "clear at first merge pixel");
          end else if (i % 2 == 0) chk(!tbl_clr[i], "clear while idle");
          nclr += int'(tbl_clr[i]);
        end
        @(negedge clk);
        start = 0;
      end
      chk(first == 1, $sformatf("first issue at %0d", first));
      chk(last - first + 1 == total_cycles(N), $sformatf("issue span %0d", last - first + 1));
      chk(busy_cycles == total_cycles(N) + 1, $sformatf("busy %0d cycles", busy_cycles));
      chk(ndone == 1 && ndone_t == last + 2, $sformatf("done %0d times at %0d", ndone, ndone_t));
      chk(nclr == 2 * 2 * (N / 4) * 2, $sformatf("%0d clears", nclr));
      for (int p = 0; p < 4; p++)
        for (int a = 1; a <= N; a++)
          for (int b = 1; b <= N; b++)
            chk(seen[p][a][b] == 1, $sformatf("pass %0d (%0d,%0d) issued %0d times", p + 1, b, a, seen[p][a][b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

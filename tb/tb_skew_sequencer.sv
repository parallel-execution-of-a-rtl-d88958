// tb_skew_sequencer: runs the four per-PE schedules through a forward and a
// backward stage (N=8) and compares every issued pixel with a schedule built
// independently: PE i starts row j at 2j(N+4), 2j(N+4)+2, (2j+1)(N+4) or
// (2j+1)(N+4)+2 cycles after the stage start, row i+4j forward or N+1-i-4j
// backward, N merge-pass pixels then N relabel-pass pixels. Also checks
// first_row, row_start, that each stage ends within N^2/2+3N-2 cycles, and
// that every pixel is issued once per pass.
module tb_skew_sequencer;
  import ccl_pkg::*;
  localparam int N = 8, XW = $clog2(N + 1), F = N * N / 2 + 3 * N - 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic stage_start = 0, backward = 0;
  logic [3:0] valid, first_row, row_start, busy;
  pass_e [3:0] pass;
  logic [3:0][XW-1:0] x, y;

  for (genvar i = 0; i < 4; i++) begin : g
    skew_sequencer #(.N(N), .PE_IDX(i + 1)) dut (
      .clk, .rst_n, .stage_start, .backward,
      .valid(valid[i]), .pass(pass[i]), .x(x[i]), .y(y[i]),
      .first_row(first_row[i]), .row_start(row_start[i]), .busy(busy[i]));
  end

  int checks = 0, failures = 0;
  int seen [4][N+1][N+1];

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int offs(int i, int j);
    unique case (i)
      0: return 2 * j * (N + 4);
      1: return 2 * j * (N + 4) + 2;
      2: return (2 * j + 1) * (N + 4);
      default: return (2 * j + 1) * (N + 4) + 2;
    endcase
  endfunction

  task automatic run_stage(input bit bwd);
    @(negedge clk);
    stage_start = 1; backward = bwd;
    for (int t = 0; t < F + 4; t++) begin
      if (t == 1) begin stage_start = 0; backward = 0; end
      #1;
      for (int i = 0; i < 4; i++) begin
        bit ev; int ep, ex, ey, r;
        ev = 0; ep = 0; ex = 0; ey = 0;
        for (int j = 0; j < N / 4; j++) begin
          r = t - offs(i, j);
          if (r >= 0 && r < 2 * N) begin
            ev = 1;
            ep = (r < N) ? (bwd ? 2 : 0) : (bwd ? 3 : 1);
            ex = r % N + 1;
            ey = bwd ? N + 1 - (i + 1) - 4 * j : (i + 1) + 4 * j;
            checks++;
            if (first_row[i] != (i == 0 && j == 0) || row_start[i] != (r == 0)) begin
              failures++;
              $display("t=%0d PE%0d flags", t, i + 1);
            end
          end
        end
        checks++;
        if (valid[i] != ev || (ev && (int'(pass[i]) != ep || int'(x[i]) != ex || int'(y[i]) != ey))) begin
          failures++;
          if (failures < 10)
            $display("t=%0d PE%0d: v=%0b p=%0d x=%0d y=%0d exp v=%0b p=%0d x=%0d y=%0d", t, i + 1,
                     valid[i], pass[i], x[i], y[i], ev, ep, ex, ey);
        end
        if (valid[i]) seen[pass[i]][y[i]][x[i]]++;
        if (t >= F) begin
          checks++;
          if (busy[i]) begin failures++; $display("PE%0d busy after the stage", i + 1); end
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    for (int p = 0; p < 4; p++) for (int a = 0; a <= N; a++) for (int b = 0; b <= N; b++) seen[p][a][b] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_stage(0);
    run_stage(1);
    for (int p = 0; p < 4; p++)
      for (int a = 1; a <= N; a++)
        for (int b = 1; b <= N; b++) begin
          checks++;
          if (seen[p][a][b] != 1) begin
            failures++;
            $display("pass %0d pixel (%0d,%0d) issued %0d times", p + 1, b, a, seen[p][a][b]);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

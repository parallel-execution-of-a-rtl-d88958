// tb_ccl_full: end-to-end test of the labeling array at its default size
// (N=128, 8-bit pixels, equivalence tables of N records in PE1/PE3 and 2N in
// PE2/PE4).
//
// Loads images into the array, runs one labeling operation per image and
// compares every label with a software flood fill: pixels of equal value that
// touch (8-neighbourhood) share a component, and the expected label of a
// component is y*N+x of its first pixel in raster order (x, y from 1). Images:
// uniform, checkerboard, stripes, a spiral, U and inverted-U shapes, staircase
// patterns, a pattern that fills the equivalence tables, random binary and
// three-level gray images (24 images in all). Each run must take exactly
// N^2+6N-4 processing cycles. Counts how often each mechanism occurs (new
// label, own merge, received equivalence, relabel in Pass 2/4, RSR rewrite)
// and fails a mechanism that never occurred.
module tb_ccl_full;
  import ccl_pkg::*;

  localparam int N     = 128;
  localparam int PIX_W = 8;
  localparam int LW    = label_bits(N);
  localparam int AW    = $clog2(N * N);
  localparam int NIMG  = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             ld_we = 0, start = 0;
  logic [AW-1:0]    ld_addr = '0, hr_addr = '0;
  logic [PIX_W-1:0] ld_pix = '0, hr_pix;
  logic [LW-1:0]    hr_lbl;
  logic             busy, done, overflow;
  pe_events_t [3:0] pe_ev;

  ccl_top dut (.*);

  int checks = 0, failures = 0;
  int img [N*N];
  int exp_lbl [N*N];
  longint n_new = 0, n_merge = 0, n_recv = 0, n_relabel = 0, n_rsr = 0;
  longint cyc = 0, first_act = -1, last_act = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 4; i++) begin
      if (pe_ev[i].active) begin
        if (first_act < 0) first_act = cyc;
        last_act = cyc;
      end
      n_new     += pe_ev[i].new_label;
      n_merge   += pe_ev[i].merge;
      n_recv    += pe_ev[i].received;
      n_relabel += pe_ev[i].relabel;
      n_rsr     += pe_ev[i].rsr_hit;
    end
  end

  initial begin : watchdog
    repeat (NIMG * (N * N + 6 * N + 4 * N * N) + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference labels by flood fill
  function automatic void reference();
    int stack [N*N];
    int sp;
    for (int k = 0; k < N * N; k++) exp_lbl[k] = 0;
    for (int k = 0; k < N * N; k++) begin
      if (exp_lbl[k] == 0) begin
        int lab;
        lab = (k / N + 1) * N + (k % N + 1);
        exp_lbl[k] = lab;
        sp = 0;
        stack[sp++] = k;
        while (sp > 0) begin
          int c, cx, cy;
          c  = stack[--sp];
          cx = c % N;
          cy = c / N;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++) begin
              int nx, ny, nk;
              nx = cx + dx;
              ny = cy + dy;
              if (nx >= 0 && nx < N && ny >= 0 && ny < N) begin
                nk = ny * N + nx;
                if (exp_lbl[nk] == 0 && img[nk] == img[c]) begin
                  exp_lbl[nk] = lab;
                  stack[sp++] = nk;
                end
              end
            end
        end
      end
    end
  endfunction

  function automatic void make_image(int n);
    int kind;
    kind = n < 12 ? n : 12 + (n % 4);
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        int v;
        unique case (kind)
          0: v = 0;
          1: v = (x + y) % 2;
          2: v = (x / 2) % 2;
          3: v = (y % 2);
          4: begin  // spiral of ones
            int d;
            d = (x < y ? x : y);
            d = d < (N - 1 - x) ? d : (N - 1 - x);
            d = d < (N - 1 - y) ? d : (N - 1 - y);
            v = (d % 2 == 0) ? 1 : 0;
            if (d % 2 == 1 && x == d && y == d + 1) v = 1;  // bridge to the next ring
            if (d % 2 == 0 && x == d && y == d + 1 && d > 0) v = 0;
          end
          5: v = (x == 0 || x == N - 1 || y == N - 1) ? 1 : 0;   // U
          6: v = (x == 0 || x == N - 1 || y == 0) ? 1 : 0;       // inverted U
          7: v = ((x % 4 == 0) || (y == N - 1 && x % 8 < 5)) ? 1 : 0;  // combs
          8: v = ((x + 2 * y) % 5 == 0) ? 1 : 0;                   // diagonals
          9: v = ((N - 1 - x + y) % 3 == 0) ? 1 : 0;
          10: v = (x * 7 + y * 3) % 5;                             // gray bands
          11: begin  // rows 2-4 force many equivalences in PE3/PE4 (more than N at N=16)
            int pat [3][16];
            pat = '{'{2, 1, 2, 1, 2, 1, 2, 1, 2, 1, 2, 1, 0, 1, 0, 1},
                    '{2, 2, 1, 2, 0, 2, 1, 2, 0, 2, 1, 1, 1, 0, 1, 2},
                    '{1, 1, 0, 0, 1, 1, 0, 0, 1, 1, 2, 0, 0, 2, 2, 0}};
            v = (y >= 1 && y <= 3) ? pat[y - 1][x % 16] : 7;
          end
          12: v = ($urandom_range(99) < 45) ? 1 : 0;
          13: v = ($urandom_range(99) < 60) ? 1 : 0;
          14: v = $urandom_range(2);
          default: v = ($urandom_range(99) < 30) ? 1 : 0;
        endcase
        img[y * N + x] = v;
      end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NIMG; n++) begin
      int bad;
      longint t0;
      make_image(n);
      reference();
      for (int k = 0; k < N * N; k++) begin
        ld_we   <= 1;
        ld_addr <= AW'(k);
        ld_pix  <= PIX_W'(img[k]);
        @(posedge clk);
      end
      ld_we <= 0;
      first_act = -1;
      start <= 1;
      @(posedge clk);
      start <= 0;
      t0 = cyc;
      while (!done) @(posedge clk);
      checks++;
      if (last_act - first_act + 1 != total_cycles(N)) begin
        failures++;
        $display("image %0d: %0d processing cycles, expected %0d", n,
                 last_act - first_act + 1, total_cycles(N));
      end
      checks++;
      if (overflow) begin
        failures++;
        $display("image %0d: equivalence table overflow", n);
      end
      bad = 0;
      for (int k = 0; k < N * N; k++) begin
        hr_addr <= AW'(k);
        @(posedge clk);
        #1;
        checks++;
        if (int'(hr_lbl) != exp_lbl[k]) begin
          failures++;
          if (bad < 5)
            $display("image %0d pixel (x=%0d,y=%0d) value %0d: label %0d, expected %0d",
                     n, k % N + 1, k / N + 1, img[k], hr_lbl, exp_lbl[k]);
          bad++;
        end
      end
    end
    $display("events: new_label=%0d merge=%0d received=%0d relabel=%0d rsr=%0d",
             n_new, n_merge, n_recv, n_relabel, n_rsr);
    checks += 5;
    if (n_new == 0)     begin failures++; $display("no new label"); end
    if (n_merge == 0)   begin failures++; $display("no merge"); end
    if (n_recv == 0)    begin failures++; $display("no received equivalence"); end
    if (n_relabel == 0) begin failures++; $display("no relabel"); end
    if (n_rsr == 0)     begin failures++; $display("no RSR rewrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

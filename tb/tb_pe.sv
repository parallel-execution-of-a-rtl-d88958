// tb_pe: tests a pair of processing elements, PE_a (sends equivalences) and
// PE_b (receives them), the way the array pairs PE1/PE2 and PE3/PE4. PE_a
// labels row y-1 from a given previous row r0 (or the image border), PE_b
// labels row y from PE_a's stream two pixels behind, both in a merge pass
// followed by a relabel pass. The testbench models the image buffer.
//
// Reference: a union-find over the pixels of r0, y-1 and y, joining 8-adjacent
// pixels of equal value in consecutive rows, horizontal neighbours of equal
// value, and pixels of one row that carry the same given label. Each pixel
// has a weight: its given label (r0; and the forward label in the backward
// passes) or y*N+x (Pass 1). After the relabel pass, a pixel of row y-1 must hold
// the minimum weight of its class over rows r0..y-1, a pixel of row y the
// minimum over rows r0..y. Forward trials give r0 and the rows random runs;
// backward trials (Passes 3/4) give one distinct label per value in each row.
// Also checks the cycle of every buffer write and that PE_a sends
// equivalences and PE_b receives them.
module tb_pe;
  import ccl_pkg::*;
  localparam int N = 8, PIX_W = 2, LW = label_bits(N), VW = PIX_W + 1;
  localparam int XW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // schedule inputs
  logic          iv [2];
  pass_e         ip [2];
  logic [XW-1:0] ix [2], iy [2];
  logic          ifirst [2], iclr;
  // buffer model
  int mem_p [N+2][N+2];
  int mem_l [N+2][N+2];
  logic [PIX_W-1:0] bp [2];
  logic [LW-1:0]    bl [2];
  // PE_a port 2
  logic [VW-1:0] pa_p;
  logic [LW-1:0] pa_l;
  // outputs
  logic [VW-1:0] op [2];
  logic [LW-1:0] ol [2], oo [2], on [2], wl [2];
  logic          oe [2], we [2], ovf [2];
  logic [XW-1:0] wx [2], wy [2];
  pe_events_t    ev [2];

  pe #(.N(N), .PIX_W(PIX_W), .TBL_DEPTH(N), .SEND_EQ(1'b1)) u_a (
    .clk, .rst_n, .iss_valid(iv[0]), .iss_pass(ip[0]), .iss_x(ix[0]), .iss_y(iy[0]),
    .iss_first_row(ifirst[0]), .tbl_clr(iclr), .buf_p(bp[0]), .buf_l(bl[0]),
    .prev_p(pa_p), .prev_l(pa_l), .prev_eq_valid(1'b0), .prev_eq_old('0), .prev_eq_new('0),
    .out_p(op[0]), .out_l(ol[0]), .out_eq_valid(oe[0]), .out_eq_old(oo[0]), .out_eq_new(on[0]),
    .wr_en(we[0]), .wr_x(wx[0]), .wr_y(wy[0]), .wr_l(wl[0]), .overflow(ovf[0]), .ev(ev[0]));

  pe #(.N(N), .PIX_W(PIX_W), .TBL_DEPTH(N), .SEND_EQ(1'b0)) u_b (
    .clk, .rst_n, .iss_valid(iv[1]), .iss_pass(ip[1]), .iss_x(ix[1]), .iss_y(iy[1]),
    .iss_first_row(ifirst[1]), .tbl_clr(iclr), .buf_p(bp[1]), .buf_l(bl[1]),
    .prev_p(op[0]), .prev_l(ol[0]), .prev_eq_valid(oe[0]), .prev_eq_old(oo[0]), .prev_eq_new(on[0]),
    .out_p(op[1]), .out_l(ol[1]), .out_eq_valid(oe[1]), .out_eq_old(oo[1]), .out_eq_new(on[1]),
    .wr_en(we[1]), .wr_x(wx[1]), .wr_y(wy[1]), .wr_l(wl[1]), .overflow(ovf[1]), .ev(ev[1]));

  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++) begin
      bp[i] <= PIX_W'(mem_p[iy[i]][ix[i]]);
      bl[i] <= LW'(mem_l[iy[i]][ix[i]]);
      if (we[i]) mem_l[wy[i]][wx[i]] <= int'(wl[i]);
    end
  end

  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_new = 0;
  always @(posedge clk) begin
    n_sent += int'(oe[0]);
    n_recv += int'(ev[1].received);
    n_new  += int'(ev[0].new_label) + int'(ev[1].new_label);
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference union-find over 3 rows x N
  int par [3*N];
  function automatic int find(int a);
    while (par[a] != a) a = par[a];
    return a;
  endfunction
  function automatic void join2(int a, int b);
    a = find(a); b = find(b);
    if (a != b) par[a] = b;
  endfunction

  int v [3][N];     // values: row 0 = r0, 1 = row handled by PE_a, 2 = PE_b
  int w [3][N];     // weights
  int gl [3][N];    // given labels (r0 always; rows 1,2 in backward trials)

  function automatic int expect_min(int row, int col, int upto);
    int best, r;
    for (int k = 0; k < 3 * N; k++) par[k] = k;
    for (int a = 0; a <= upto; a++)
      for (int c = 0; c < N; c++) begin
        if (c > 0 && v[a][c] == v[a][c-1]) join2(a * N + c, a * N + c - 1);
        for (int c2 = 0; c2 < N; c2++)
          if (gl[a][c] >= 0 && gl[a][c] == gl[a][c2]) join2(a * N + c, a * N + c2);
        if (a > 0)
          for (int d = -1; d <= 1; d++)
            if (c + d >= 0 && c + d < N && v[a-1][c+d] == v[a][c]) join2(a * N + c, (a - 1) * N + c + d);
      end
    r = find(row * N + col);
    best = 1 << 30;
    for (int a = 0; a <= upto; a++)
      for (int c = 0; c < N; c++)
        if (find(a * N + c) == r && w[a][c] < best) best = w[a][c];
    return best;
  endfunction

  task automatic trial(input bit bwd, input bit border);
    int ya, yb, y0;
    y0 = bwd ? 7 : 4;
    ya = bwd ? 6 : 5;
    yb = bwd ? 5 : 6;
    for (int a = 0; a < 3; a++)
      for (int c = 0; c < N; c++) begin
        v[a][c] = (a == 0 && border) ? -1 : $urandom_range(2 ** PIX_W - 1);
        gl[a][c] = -1;
      end
    if (bwd) begin
      // distinct labels: one per (row, value)
      int perval [3][4];
      int pool [$];
      for (int k = 1; k <= N * N; k++) pool.push_back(k);
      pool.shuffle();
      for (int a = 0; a < 3; a++) for (int k = 0; k < 4; k++) perval[a][k] = pool[a * 4 + k];
      for (int a = 0; a < 3; a++)
        for (int c = 0; c < N; c++)
          if (v[a][c] >= 0) begin gl[a][c] = perval[a][v[a][c]]; w[a][c] = gl[a][c]; end
    end else begin
      for (int c = 0; c < N; c++) begin
        if (v[0][c] >= 0) begin
          if (c > 0 && v[0][c] == v[0][c-1]) gl[0][c] = gl[0][c-1];
          else if (c > 1 && v[0][c] == v[0][c-2] && $urandom_range(1) == 1) gl[0][c] = gl[0][c-2];
          else gl[0][c] = 1 + $urandom_range(y0 * N + N - 1);
          w[0][c] = gl[0][c];
        end
        w[1][c] = ya * N + c + 1;
        w[2][c] = yb * N + c + 1;
      end
    end
    // image buffer contents
    for (int c = 0; c < N; c++) begin
      mem_p[ya][c+1] = v[1][c]; mem_p[yb][c+1] = v[2][c];
      mem_l[ya][c+1] = bwd ? gl[1][c] : 0;
      mem_l[yb][c+1] = bwd ? gl[2][c] : 0;
    end
    // run: PE_a issues at t = 0..2N-1, PE_b at t = 2..2N+1
    for (int t = -1; t < 2 * N + 4; t++) begin
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        int r;
        r = t - 2 * i;
        iv[i] = (r >= 0 && r < 2 * N);
        ip[i] = (r < N) ? (bwd ? PASS3 : PASS1) : (bwd ? PASS4 : PASS2);
        ix[i] = XW'(r >= 0 && r < 2 * N ? r % N + 1 : 0);
        iy[i] = XW'(i == 0 ? ya : yb);
        ifirst[i] = (i == 0) && border;
      end
      iclr = (t == 0);
      // PE_a's port 2 carries r0 pixel x+1 while PE_a processes pixel x
      // (process cycle = issue cycle + 1, so pixel t-1 is processed now)
      begin
        int px;
        px = t;  // pixel processed in this cycle is x = t, neighbour x+1
        if (px >= 0 && px < N && !border) begin
          pa_p = VW'(v[0][px]); pa_l = LW'(gl[0][px]);
        end else begin
          pa_p = '1; pa_l = '0;
        end
      end
      #1;
      // buffer writes happen in processing cycles
      for (int i = 0; i < 2; i++) begin
        int r;
        r = t - 1 - 2 * i;
        checks++;
        if (we[i] != (r >= 0 && r < 2 * N) || (we[i] && int'(wx[i]) != r % N + 1)) begin
          failures++;
          if (failures < 10) $display("PE%0d write timing at t=%0d", i, t);
        end
      end
    end
    for (int i = 0; i < 2; i++) begin iv[i] = 0; end
    @(negedge clk);
    for (int c = 0; c < N; c++) begin
      int e;
      e = expect_min(1, c, 1);
      checks++;
      if (mem_l[ya][c+1] != e) begin
        failures++;
        if (failures < 10) $display("%s PE_a x=%0d: %0d expected %0d", bwd ? "bwd" : "fwd", c + 1, mem_l[ya][c+1], e);
      end
      e = expect_min(2, c, 2);
      checks++;
      if (mem_l[yb][c+1] != e) begin
        failures++;
        if (failures < 10) $display("%s PE_b x=%0d: %0d expected %0d", bwd ? "bwd" : "fwd", c + 1, mem_l[yb][c+1], e);
      end
    end
    checks++;
    if (ovf[0] || ovf[1]) begin failures++; $display("table overflow"); end
  endtask

  initial begin
    for (int i = 0; i < 2; i++) begin iv[i] = 0; ip[i] = PASS1; ix[i] = '0; iy[i] = '0; ifirst[i] = 0; end
    iclr = 0; pa_p = '1; pa_l = '0;
    for (int a = 0; a < N + 2; a++) for (int c = 0; c < N + 2; c++) begin mem_p[a][c] = 0; mem_l[a][c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) trial(0, k % 10 == 0);
    for (int k = 0; k < 300; k++) trial(1, k % 10 == 0);
    checks += 3;
    if (n_sent == 0) begin failures++; $display("PE_a sent no equivalence"); end
    if (n_recv == 0) begin failures++; $display("PE_b received no equivalence"); end
    if (n_new == 0)  begin failures++; $display("no new label"); end
    $display("sent=%0d received=%0d new=%0d", n_sent, n_recv, n_new);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

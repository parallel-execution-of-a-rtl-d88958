// tb_image_buffer: loads a random image through the host port, then reads and
// writes random words through the four PE ports and the host read port,
// checking every read (one cycle latency) against a software copy. Write
// addresses of the four ports are kept distinct in a cycle, as the schedule
// guarantees.
module tb_image_buffer;
  localparam int N = 8, PIX_W = 4, LW = 7, NPORT = 4, AW = $clog2(N * N);
  logic clk = 0;
  always #5 clk = ~clk;

  logic ld_we;
  logic [AW-1:0] ld_addr, hr_addr;
  logic [PIX_W-1:0] ld_pix, hr_pix;
  logic [LW-1:0] hr_lbl;
  logic [NPORT-1:0][AW-1:0] rd_addr, wr_addr;
  logic [NPORT-1:0][PIX_W-1:0] rd_pix;
  logic [NPORT-1:0][LW-1:0] rd_lbl, wr_lbl;
  logic [NPORT-1:0] wr_en;

  image_buffer #(.N(N), .PIX_W(PIX_W), .LW(LW), .NPORT(NPORT)) dut (.*);

  int checks = 0, failures = 0;
  int pix [N*N];
  int lbl [N*N];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    wr_en = '0; ld_we = 0; hr_addr = '0; rd_addr = '0; wr_addr = '0; wr_lbl = '0;
    ld_addr = '0; ld_pix = '0;
    @(negedge clk);
    for (int k = 0; k < N * N; k++) begin
      ld_we = 1; ld_addr = AW'(k); ld_pix = PIX_W'($urandom);
      pix[k] = int'(ld_pix); lbl[k] = 0;
      @(negedge clk);
    end
    ld_we = 0;
    for (int i = 0; i < 1500; i++) begin
      int ea [NPORT];
      int eh;
      hr_addr = AW'($urandom_range(N * N - 1));
      eh = int'(hr_addr);
      for (int p = 0; p < NPORT; p++) begin
        rd_addr[p] = AW'($urandom_range(N * N - 1));
        ea[p] = int'(rd_addr[p]);
        wr_en[p] = $urandom_range(1) == 1;
        wr_addr[p] = AW'(p * (N * N / NPORT) + $urandom_range(N * N / NPORT - 1));
        wr_lbl[p] = LW'($urandom);
      end
      begin
        int oldp [NPORT], oldl [NPORT], ohp, ohl;
        for (int p = 0; p < NPORT; p++) begin oldp[p] = pix[ea[p]]; oldl[p] = lbl[ea[p]]; end
        ohp = pix[eh]; ohl = lbl[eh];
        for (int p = 0; p < NPORT; p++) if (wr_en[p]) lbl[wr_addr[p]] = int'(wr_lbl[p]);
        @(negedge clk);
        wr_en = '0;
        chk(int'(hr_pix), ohp, "host pixel");
        chk(int'(hr_lbl), ohl, "host label");
        for (int p = 0; p < NPORT; p++) begin
          chk(int'(rd_pix[p]), oldp[p], "PE pixel");
          chk(int'(rd_lbl[p]), oldl[p], "PE label");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

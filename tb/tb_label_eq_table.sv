// tb_label_eq_table: random test of the equivalence table against a software
// model that keeps, for every label, the smallest label of its class.
// Each cycle may add a received equivalence (arbitrary labels) and an own
// equivalence built from two lookup results; lookups must return the class
// minimum after the received equivalence. The table is cleared at random
// intervals; the overflow flag must rise exactly when more records are needed
// than DEPTH, after which roots are not checked until the next clear.
module tb_label_eq_table;
  localparam int LW = 6, DEPTH = 12, NLOOK = 5, NL = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear;
  logic [NLOOK-1:0][LW-1:0] look_lbl, look_root;
  logic rx_valid, own_valid, rx_effective, own_effective, overflow;
  logic [LW-1:0] rx_old, rx_new, own_old, own_new;
  logic [$clog2(DEPTH+1)-1:0] used;

  label_eq_table #(.DEPTH(DEPTH), .LW(LW), .NLOOK(NLOOK)) dut (.*);

  int checks = 0, failures = 0;
  int cls [NL];      // class minimum per label
  int tmp [NL];
  int nrec;

  function automatic void unite(ref int c [NL], input int a, input int b, output bit eff);
    int ra, rb, lo, hi;
    ra = c[a]; rb = c[b];
    lo = ra < rb ? ra : rb;
    hi = ra < rb ? rb : ra;
    eff = (ra != rb);
    for (int l = 0; l < NL; l++) if (c[l] == hi) c[l] = lo;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int next_clear;
    bit e1, e2;
    clear = 0; rx_valid = 0; own_valid = 0;
    rx_old = 0; rx_new = 0; own_old = 0; own_new = 0; look_lbl = '0;
    for (int l = 0; l < NL; l++) cls[l] = l;
    nrec = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    next_clear = 10;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      clear = (cyc == next_clear);
      if (clear) next_clear = cyc + 4 + $urandom_range(20);
      rx_valid = ($urandom_range(99) < 50);
      rx_old   = LW'($urandom_range(NL - 1));
      rx_new   = LW'($urandom_range(NL - 1));
      for (int q = 0; q < NLOOK; q++) look_lbl[q] = LW'($urandom_range(NL - 1));
      tmp = cls;
      if (rx_valid) unite(tmp, int'(rx_old), int'(rx_new), e1); else e1 = 0;
      own_valid = ($urandom_range(99) < 50);
      own_old   = LW'(tmp[look_lbl[0]]);
      own_new   = LW'(tmp[look_lbl[1]]);
      #1;
      check(overflow == (nrec > DEPTH), $sformatf("overflow=%0b with %0d records", overflow, nrec));
      if (nrec <= DEPTH) begin
        check(used == ($clog2(DEPTH+1))'(nrec), $sformatf("used=%0d expected %0d", used, nrec));
        check(rx_effective == e1, "rx_effective");
        for (int q = 0; q < NLOOK; q++)
          check(int'(look_root[q]) == tmp[look_lbl[q]],
                $sformatf("lookup %0d of %0d: %0d expected %0d", q, look_lbl[q], look_root[q], tmp[look_lbl[q]]));
      end
      if (own_valid) unite(tmp, int'(own_old), int'(own_new), e2); else e2 = 0;
      if (nrec <= DEPTH) check(own_effective == e2, "own_effective");
      @(posedge clk);
      if (clear) begin
        for (int l = 0; l < NL; l++) cls[l] = l;
        nrec = 0;
      end else begin
        cls = tmp;
        nrec += int'(e1) + int'(e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_connectivity_logic: random test of the connectivity logic against a
// reference written from the pass rules: set A of neighbours with the pixel's
// value, new label y*N+x from the incrementing generator in Pass 1 when A is
// empty, minimum label and (maximum, minimum) equivalence otherwise, the
// pixel's own label joining the comparison in Pass 3, and the own label
// unchanged in Passes 2 and 4. Neighbour values include the border value.
module tb_connectivity_logic;
  import ccl_pkg::*;
  localparam int LW = 10, VW = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  pass_e pass;
  logic [3:0][VW-1:0] nb_p;
  logic [3:0][LW-1:0] nb_l;
  logic [VW-1:0] own_p;
  logic [LW-1:0] own_l, gen_init, l_out, eq_old, eq_new;
  logic gen_load, a_empty, eq_valid;

  connectivity_logic #(.LW(LW), .VW(VW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gen, n_new, n_eq;
    gen = 0; n_new = 0; n_eq = 0;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      int lab [$];
      int e_l, e_old, e_new, mn, mx;
      bit e_v, empty;
      pass = pass_e'($urandom_range(3));
      for (int k = 0; k < 4; k++) begin
        nb_p[k] = ($urandom_range(5) == 0) ? '1 : VW'($urandom_range(2));
        nb_l[k] = LW'($urandom_range(60));
      end
      own_p = VW'($urandom_range(2));
      own_l = LW'($urandom_range(60));
      gen_load = (i == 0) || ($urandom_range(15) == 0);
      gen_init = LW'(100 + $urandom_range(500));
      if (gen_load) gen = int'(gen_init);
      // reference
      lab = {};
      for (int k = 0; k < 4; k++) if (nb_p[k] == own_p) lab.push_back(int'(nb_l[k]));
      empty = (lab.size() == 0);
      e_v = 0; e_l = int'(own_l); e_old = 0; e_new = 0;
      if (pass == PASS1) begin
        if (empty) e_l = gen;
        else begin
          mn = lab.min()[0]; mx = lab.max()[0];
          e_l = mn; e_v = (mn != mx); e_old = mx; e_new = mn;
        end
      end else if (pass == PASS3 && !empty) begin
        lab.push_back(int'(own_l));
        mn = lab.min()[0]; mx = lab.max()[0];
        e_l = mn; e_v = (mn != mx); e_old = mx; e_new = mn;
      end
      #1;
      checks++;
      if (int'(l_out) != e_l || a_empty != empty || eq_valid != e_v ||
          (e_v && (int'(eq_old) != e_old || int'(eq_new) != e_new))) begin
        failures++;
        if (failures < 10)
          $display("vector %0d pass %0d: label %0d exp %0d, eq %0b(%0d,%0d) exp %0b(%0d,%0d)",
                   i, pass, l_out, e_l, eq_valid, eq_old, eq_new, e_v, e_old, e_new);
      end
      n_new += int'(pass == PASS1 && empty);
      n_eq  += int'(e_v);
      @(negedge clk);
      gen++;
    end
    checks++;
    if (n_new == 0 || n_eq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

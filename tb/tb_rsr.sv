// tb_rsr: random test of the relabel shift register. The output in a cycle
// must be the label registered one cycle earlier, replaced by L-new when it
// matched L-old and the equivalence was valid; the pixel value is delayed
// unchanged. Labels come from a small range so that matches are frequent.
module tb_rsr;
  localparam int LW = 5, VW = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [LW-1:0] l_in, l_old, l_new, l_out;
  logic [VW-1:0] p_in, p_out;
  logic eq_valid, hit;

  rsr #(.LW(LW), .VW(VW)) dut (.*);

  int checks = 0, failures = 0, hits = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LW-1:0] pl, po, pn;
    logic [VW-1:0] pp;
    logic pv;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      l_in = LW'($urandom_range(3)); p_in = VW'($urandom);
      l_old = LW'($urandom_range(3)); l_new = LW'($urandom_range(31));
      eq_valid = $urandom_range(1) == 1;
      pl = l_in; po = l_old; pn = l_new; pp = p_in; pv = eq_valid;
      @(negedge clk);
      checks++;
      if (l_out !== ((pv && pl == po) ? pn : pl) || p_out !== pp || hit !== (pv && pl == po)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: out %0d/%0d hit %0b", i, l_out, p_out, hit);
      end
      hits += int'(hit);
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

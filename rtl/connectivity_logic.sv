// connectivity_logic (CL): decides the label of the current pixel P(x,y).
//
// Inputs are the values and resolved labels of the four neighbours that come
// before P in scan order (index 0: (x-1,y-+1), 1: (x,y-+1), 2: (x+1,y-+1),
// 3: (x-1,y)), and the value and resolved stored label of P itself. Four
// equality compares (the XNOR row) mark the neighbours with P's value (the set
// A); their NOR gives "A is empty". A 4-way minimum and a 4-way maximum
// comparator over the marked labels give L-new and L-old.
//   Pass 1: A empty -> new label from the label generator, no equivalence;
//           else L = min, equivalence (max, min).
//   Pass 3: A empty -> L = P's own (forward) label; else P's own label joins
//           the comparison, L = min, equivalence (max, min).
//   Pass 2/4: L = P's own label resolved through the table.
// The label generator is an incrementer: loaded with y*N+1 at the first pixel
// of a row (gen_load) and stepped every cycle, so its value is y*N+x.
//
// Timing: combinational except the generator register. Neighbour values carry
// one extra top bit; the all-ones value stands for a pixel outside the image
// and never equals a real pixel. The compare/NOR/min/max/incrementer structure
// follows the design. Own choices: Pass 3 includes P's own label in both
// comparators (equal to the design's rule whenever the neighbours below are
// final), and Pass 2/4 always use the table lookup.
module connectivity_logic
  import ccl_pkg::*;
#(
  parameter int unsigned LW = 15,
  parameter int unsigned VW = 9
) (
  input  logic                clk,
  input  pass_e               pass,
  input  logic [3:0][VW-1:0]  nb_p,
  input  logic [3:0][LW-1:0]  nb_l,
  input  logic [VW-1:0]       own_p,
  input  logic [LW-1:0]       own_l,
  input  logic                gen_load,
  input  logic [LW-1:0]       gen_init,
  output logic [LW-1:0]       l_out,
  output logic                a_empty,
  output logic                eq_valid,
  output logic [LW-1:0]       eq_old,
  output logic [LW-1:0]       eq_new
);

  logic [3:0]    same;
  logic [LW-1:0] mn, mx, gen_q, gen_cur;

  assign gen_cur = gen_load ? gen_init : gen_q;

  always_ff @(posedge clk) gen_q <= gen_cur + LW'(1);

  always_comb begin
    for (int k = 0; k < 4; k++) same[k] = (nb_p[k] == own_p);
    a_empty = ~|same;
    mn = '1;
    mx = '0;
    for (int k = 0; k < 4; k++) begin
      if (same[k] && nb_l[k] < mn) mn = nb_l[k];
      if (same[k] && nb_l[k] > mx) mx = nb_l[k];
    end
    l_out    = own_l;
    eq_valid = 1'b0;
    eq_old   = mx;
    eq_new   = mn;
    unique case (pass)
      PASS1: begin
        if (a_empty) l_out = gen_cur;
        else begin
          l_out    = mn;
          eq_valid = (mx != mn);
        end
      end
      PASS3: begin
        if (!a_empty) begin
          if (own_l < mn) mn = own_l;
          if (own_l > mx) mx = own_l;
          l_out    = mn;
          eq_old   = mx;
          eq_new   = mn;
          eq_valid = (mx != mn);
        end
      end
      default: l_out = own_l;
    endcase
  end

endmodule

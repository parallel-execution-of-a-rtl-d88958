// rsr: relabel shift register, one stage of the PE's neighbour delay line.
//
// Each clock the stage registers an incoming pixel value and label together
// with the equivalence (L-old, L-new) the PE found in the same cycle. Its
// output is the registered label, replaced by L-new when it equals L-old (a
// W-bit equality compare driving a 2:1 multiplexer); the pixel value passes
// through unchanged. Two stages in a row turn the stream PL(x+1,y-1) coming from
// the previous PE into PL(x,y-1) and PL(x-1,y-1), so that labels that are
// still in flight follow merges made while they wait.
//
// Interface/timing: one-cycle latency, no enable (it shifts every cycle), no
// reset (the PE masks what it reads at row edges). The four registers, the
// compare and the multiplexer follow the design; the eq_valid qualifier is this
// design's addition so that "no equivalence" needs no reserved label value.
module rsr #(
  parameter int unsigned LW = 15,
  parameter int unsigned VW = 9
) (
  input  logic          clk,
  input  logic [LW-1:0] l_in,
  input  logic [VW-1:0] p_in,
  input  logic          eq_valid,
  input  logic [LW-1:0] l_old,
  input  logic [LW-1:0] l_new,
  output logic [LW-1:0] l_out,
  output logic [VW-1:0] p_out,
  output logic          hit
);

  logic [LW-1:0] lbl_q, old_q, new_q;
  logic [VW-1:0] pix_q;
  logic          v_q;

  always_ff @(posedge clk) begin
    lbl_q <= l_in;
    pix_q <= p_in;
    old_q <= l_old;
    new_q <= l_new;
    v_q   <= eq_valid;
  end

  assign hit   = v_q && (lbl_q == old_q);
  assign l_out = hit ? new_q : lbl_q;
  assign p_out = pix_q;

endmodule

// ccl_top: connected component labeling on a linear array of four PEs.
//
// The host loads an NxN image of PIX_W-bit pixels (ld_*), pulses start and
// waits for done; the label map is then read back (hr_addr -> hr_lbl one cycle
// later). Pixels with equal values that touch, including diagonally, form a
// component; every pixel of a component ends with the label y*N+x of the
// component's first pixel in raster order (row y, column x, both from 1).
//
// The four PEs form a ring: PE i takes the previous row from PE i-1 (PE1 from
// PE4) two pixels behind it, so in the forward stage rows 1+4j..4+4j are
// processed by PE1..PE4 with pairs (PE1,PE2) and (PE3,PE4) overlapping their
// merge passes; PE1 and PE3 send their equivalences to PE2 and PE4. The backward
// stage repeats this from the bottom row upwards. A full operation takes
// N^2+6N-4 processing cycles; done pulses in the cycle after the last one.
//
// Equivalence tables hold N records in PE1/PE3 and 2N in PE2/PE4: a PE records
// at most one equivalence per pixel, and PE2/PE4 also store their partner's, so
// these sizes cannot overflow. overflow (which should never rise) reports a
// table that ran out of records; pe_ev exposes per-PE event flags, whose
// 'received' bit is constant 0 for PE1/PE3 by design.
// Addresses are (y-1)*N + (x-1). The host ports must be idle while busy.
//
// The four-PE ring, the pairing and the schedule follow the design; the host
// interface, the per-PE buffer ports and the event outputs are this design's.
// The 2N-record tables of PE2/PE4 follow the original's per-pixel routine, in
// which those PEs add their partner's records as well as their own; its
// hardware summary counts only N records of memory per PE.
module ccl_top
  import ccl_pkg::*;
#(
  parameter int unsigned N              = 128,
  parameter int unsigned PIX_W          = 8,
  parameter int unsigned TBL_DEPTH_ODD  = N,
  parameter int unsigned TBL_DEPTH_EVEN = 2 * N,
  localparam int unsigned LW       = label_bits(N),
  localparam int unsigned AW       = $clog2(N * N),
  localparam int unsigned XW       = $clog2(N + 1),
  localparam int unsigned VW       = PIX_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld_we,
  input  logic [AW-1:0]    ld_addr,
  input  logic [PIX_W-1:0] ld_pix,
  input  logic [AW-1:0]    hr_addr,
  output logic [PIX_W-1:0] hr_pix,
  output logic [LW-1:0]    hr_lbl,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             overflow,
  output pe_events_t [3:0] pe_ev
);

  logic [3:0]            iss_valid, iss_first, tbl_clr;
  pass_e [3:0]           iss_pass;
  logic [3:0][XW-1:0]    iss_x, iss_y;

  ccl_controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .iss_valid, .iss_pass, .iss_x, .iss_y,
    .iss_first_row(iss_first), .tbl_clr);

  logic [3:0][AW-1:0]    rd_addr, wr_addr;
  logic [3:0][PIX_W-1:0] rd_pix;
  logic [3:0][LW-1:0]    rd_lbl, wr_lbl;
  logic [3:0]            wr_en;
  logic [3:0][XW-1:0]    wr_x, wr_y;

  function automatic logic [AW-1:0] addr_of(input logic [XW-1:0] x, input logic [XW-1:0] y);
    return AW'((int'(y) - 1) * int'(N) + int'(x) - 1);
  endfunction

  image_buffer #(.N(N), .PIX_W(PIX_W), .LW(LW), .NPORT(4)) u_buf (
    .clk, .ld_we, .ld_addr, .ld_pix, .hr_addr, .hr_pix, .hr_lbl,
    .rd_addr, .rd_pix, .rd_lbl, .wr_en, .wr_addr, .wr_lbl);

  logic [3:0][VW-1:0] o_p;
  logic [3:0][LW-1:0] o_l, o_old, o_new;
  logic [3:0]         o_eq, ovf;

  for (genvar i = 0; i < 4; i++) begin : g_pe
    localparam int unsigned P = (i + 3) % 4;  // previous PE in the ring

    assign rd_addr[i] = addr_of(iss_x[i], iss_y[i]);
    assign wr_addr[i] = addr_of(wr_x[i], wr_y[i]);

    pe #(.N(N), .PIX_W(PIX_W), .LW(LW), .TBL_DEPTH(i % 2 == 0 ? TBL_DEPTH_ODD : TBL_DEPTH_EVEN),
         .SEND_EQ(i % 2 == 0)) u_pe (
      .clk, .rst_n,
      .iss_valid(iss_valid[i]), .iss_pass(iss_pass[i]),
      .iss_x(iss_x[i]), .iss_y(iss_y[i]),
      .iss_first_row(iss_first[i]), .tbl_clr(tbl_clr[i]),
      .buf_p(rd_pix[i]), .buf_l(rd_lbl[i]),
      .prev_p(o_p[P]), .prev_l(o_l[P]),
      .prev_eq_valid(o_eq[P]), .prev_eq_old(o_old[P]), .prev_eq_new(o_new[P]),
      .out_p(o_p[i]), .out_l(o_l[i]),
      .out_eq_valid(o_eq[i]), .out_eq_old(o_old[i]), .out_eq_new(o_new[i]),
      .wr_en(wr_en[i]), .wr_x(wr_x[i]), .wr_y(wr_y[i]), .wr_l(wr_lbl[i]),
      .overflow(ovf[i]), .ev(pe_ev[i]));
  end

  // Sticky per run: cleared at start.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      overflow <= 1'b0;
    else if (start)  overflow <= 1'b0;
    else if (|ovf)   overflow <= 1'b1;
  end

endmodule

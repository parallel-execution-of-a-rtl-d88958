// pe: processing element of the linear array.
//
// A PE labels one image row per pass. In each cycle it takes pixel P(x,y) (value
// and stored label) from the image buffer through Port 1, and through Port 2 the
// value/label of P(x+1,y-1) produced by the previous PE two pixels ahead of it,
// plus the previous PE's equivalence (L-old, L-new). Two relabel shift
// registers delay the Port 2 stream into P(x,y-1) and P(x-1,y-1); the output
// register feeds back P(x-1,y). (In the backward stage "y-1" is the row below.)
// All five labels are resolved through the label equivalence table, the
// connectivity logic picks the label and the equivalence, and the result is
// registered towards the next PE and written to the image buffer.
//
// SEND_EQ=1 (PE1, PE3) forwards its own equivalences to the next PE during a
// merge pass; SEND_EQ=0 (PE2, PE4) instead adds the equivalences it receives to
// its own table, so the pair shares one row's merges. A PE stores at most one
// record of its own per pixel, so TBL_DEPTH = N suffices for SEND_EQ=1 and 2N
// for SEND_EQ=0; the table's fill count is not used here.
//
// Timing: the controller presents a pixel one cycle ahead (iss_*), when the
// image buffer read is issued; the PE processes it in the next cycle, when the
// buffer data arrive. tbl_clr empties the table at the end of the issue cycle.
// Outputs to the next PE are registered (one cycle); the buffer write port is
// driven combinationally in the processing cycle.
//
// The Port 1/Port 2 structure, the two RSRs, the feedback register and the
// registered outputs follow the design. Resolving every neighbour label
// through the table when it is used (rather than once on entry), and the
// explicit masking of neighbours outside the image, are this design's choices.
module pe
  import ccl_pkg::*;
#(
  parameter int unsigned N         = 128,
  parameter int unsigned PIX_W     = 8,
  parameter int unsigned LW        = label_bits(N),
  parameter int unsigned TBL_DEPTH = N,
  parameter bit          SEND_EQ   = 1'b1,
  localparam int unsigned VW       = PIX_W + 1,
  localparam int unsigned XW       = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // schedule for the next cycle
  input  logic             iss_valid,
  input  pass_e            iss_pass,
  input  logic [XW-1:0]    iss_x,
  input  logic [XW-1:0]    iss_y,
  input  logic             iss_first_row,
  input  logic             tbl_clr,
  // Port 1: image buffer read data (aligned with the processing cycle)
  input  logic [PIX_W-1:0] buf_p,
  input  logic [LW-1:0]    buf_l,
  // Port 2: from the previous PE
  input  logic [VW-1:0]    prev_p,
  input  logic [LW-1:0]    prev_l,
  input  logic             prev_eq_valid,
  input  logic [LW-1:0]    prev_eq_old,
  input  logic [LW-1:0]    prev_eq_new,
  // to the next PE
  output logic [VW-1:0]    out_p,
  output logic [LW-1:0]    out_l,
  output logic             out_eq_valid,
  output logic [LW-1:0]    out_eq_old,
  output logic [LW-1:0]    out_eq_new,
  // to the image buffer (label map)
  output logic             wr_en,
  output logic [XW-1:0]    wr_x,
  output logic [XW-1:0]    wr_y,
  output logic [LW-1:0]    wr_l,
  output logic             overflow,
  output pe_events_t       ev
);

  localparam logic [VW-1:0] BORDER = '1;

  // processing-stage control
  logic          v_q, first_q;
  pass_e         pass_q;
  logic [XW-1:0] x_q, y_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= 1'b0;
      first_q <= 1'b0;
      pass_q  <= PASS1;
      x_q     <= '0;
      y_q     <= '0;
    end else begin
      v_q     <= iss_valid;
      first_q <= iss_first_row;
      pass_q  <= iss_pass;
      x_q     <= iss_x;
      y_q     <= iss_y;
    end
  end

  // CL results
  logic [LW-1:0] cl_l, cl_old, cl_new;
  logic          cl_eq, cl_empty;
  logic          own_eq;
  assign own_eq = v_q && cl_eq;

  // neighbour delay line: PL(x+1,y-1) -> PL(x,y-1) -> PL(x-1,y-1)
  logic [LW-1:0] u_l, ul_l;
  logic [VW-1:0] u_p, ul_p;
  logic          hit1, hit2;

  rsr #(.LW(LW), .VW(VW)) u_rsr1 (
    .clk, .l_in(prev_l), .p_in(prev_p),
    .eq_valid(own_eq), .l_old(cl_old), .l_new(cl_new),
    .l_out(u_l), .p_out(u_p), .hit(hit1));

  rsr #(.LW(LW), .VW(VW)) u_rsr2 (
    .clk, .l_in(u_l), .p_in(u_p),
    .eq_valid(own_eq), .l_old(cl_old), .l_new(cl_new),
    .l_out(ul_l), .p_out(ul_p), .hit(hit2));

  // neighbours with image-edge masking
  logic [3:0][VW-1:0] nb_p;
  logic [3:0][LW-1:0] nb_l;
  always_comb begin
    nb_p[0] = (first_q || x_q == XW'(1)) ? BORDER : ul_p;
    nb_p[1] = first_q ? BORDER : u_p;
    nb_p[2] = (first_q || x_q == XW'(N)) ? BORDER : prev_p;
    nb_p[3] = (x_q == XW'(1)) ? BORDER : out_p;
    nb_l[0] = ul_l;
    nb_l[1] = u_l;
    nb_l[2] = prev_l;
    nb_l[3] = out_l;
  end

  // label equivalence table
  logic [4:0][LW-1:0] look_lbl, look_root;
  logic               rx_eff, own_eff;

  assign look_lbl = {buf_l, nb_l[3], nb_l[2], nb_l[1], nb_l[0]};

  label_eq_table #(.DEPTH(TBL_DEPTH), .LW(LW), .NLOOK(5)) u_table (
    .clk, .rst_n, .clear(tbl_clr),
    .look_lbl, .look_root,
    .rx_valid(!SEND_EQ && prev_eq_valid), .rx_old(prev_eq_old), .rx_new(prev_eq_new),
    .own_valid(own_eq), .own_old(cl_old), .own_new(cl_new),
    .rx_effective(rx_eff), .own_effective(own_eff),
    .overflow, .used());

  // connectivity logic
  logic [LW-1:0] gen_init;
  assign gen_init = LW'(y_q) * LW'(N) + LW'(1);

  connectivity_logic #(.LW(LW), .VW(VW)) u_cl (
    .clk, .pass(pass_q),
    .nb_p, .nb_l({look_root[3], look_root[2], look_root[1], look_root[0]}),
    .own_p({1'b0, buf_p}), .own_l(look_root[4]),
    .gen_load(v_q && x_q == XW'(1)), .gen_init,
    .l_out(cl_l), .a_empty(cl_empty),
    .eq_valid(cl_eq), .eq_old(cl_old), .eq_new(cl_new));

  // outputs to the next PE
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_p        <= BORDER;
      out_l        <= '0;
      out_eq_valid <= 1'b0;
      out_eq_old   <= '0;
      out_eq_new   <= '0;
    end else begin
      out_p        <= {1'b0, buf_p};
      out_l        <= cl_l;
      out_eq_valid <= SEND_EQ && own_eq;
      out_eq_old   <= cl_old;
      out_eq_new   <= cl_new;
    end
  end

  assign wr_en = v_q;
  assign wr_x  = x_q;
  assign wr_y  = y_q;
  assign wr_l  = cl_l;

  always_comb begin
    ev.active    = v_q;
    ev.new_label = v_q && pass_q == PASS1 && cl_empty;
    ev.merge     = own_eff;
    ev.received  = rx_eff;
    ev.relabel   = v_q && (pass_q == PASS2 || pass_q == PASS4) && (cl_l != buf_l);
    ev.rsr_hit   = hit1 || hit2;
  end

endmodule

// label_eq_table: the label equivalence table of one processing element.
//
// A content-addressable memory of (L-old, L-new) records. A label with a record
// is resolved to its L-new field in one parallel search; a label without one is
// its own root. The table is kept flat: every L-new is a root (it has no record
// of its own), so one search always gives the final root.
//
// Adding an equivalence is the parallel search and multiple update (PSMU): the
// two labels are resolved, the larger root becomes L-old and the smaller L-new,
// every record whose L-new equals that L-old is rewritten to the new L-new in the
// same cycle, and the record (L-old, L-new) is appended. Up to two equivalences
// are added per cycle: first the one received from the previous PE (rx_*),
// then the PE's own (own_*). The own one must be formed from look_root values,
// which already include the received equivalence: a lookup returns the root
// after the received equivalence is applied (forwarding), so the PE never sees a
// label that the equivalence arriving this cycle has just retired.
//
// Timing: lookups are combinational; additions and clear take effect at the
// next rising edge. clear empties the table (start of a new row). overflow is
// sticky until clear/reset and flags a dropped record when DEPTH is exceeded.
//
// The record layout and the CAM+PSMU operation follow the design; resolving
// both labels before an update (a union of roots), the forwarding and the
// sticky overflow flag are this design's choices. DEPTH defaults to N = 128
// records, the original's size per PE; the array gives the PEs that also store
// their partner's records 2N.
module label_eq_table #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned LW    = 15,
  parameter int unsigned NLOOK = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic [NLOOK-1:0][LW-1:0]   look_lbl,
  output logic [NLOOK-1:0][LW-1:0]   look_root,
  input  logic                       rx_valid,
  input  logic [LW-1:0]              rx_old,
  input  logic [LW-1:0]              rx_new,
  input  logic                       own_valid,
  input  logic [LW-1:0]              own_old,
  input  logic [LW-1:0]              own_new,
  output logic                       rx_effective,
  output logic                       own_effective,
  output logic                       overflow,
  output logic [$clog2(DEPTH+1)-1:0] used
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [LW-1:0] rec_old [DEPTH];
  logic [LW-1:0] rec_new [DEPTH];

  // Parallel search: root of a label in the stored table.
  function automatic logic [LW-1:0] search(input logic [LW-1:0] lbl,
                                           input logic [CW-1:0] n);
    logic [LW-1:0] r;
    r = lbl;
    for (int k = 0; k < int'(DEPTH); k++) begin
      if (CW'(k) < n && rec_old[k] == lbl) r = rec_new[k];
    end
    return r;
  endfunction

  logic [LW-1:0] rx_ro, rx_rn, hi1, lo1, hi2, lo2;

  always_comb begin
    rx_ro = search(rx_old, used);
    rx_rn = search(rx_new, used);
    hi1   = (rx_ro > rx_rn) ? rx_ro : rx_rn;
    lo1   = (rx_ro > rx_rn) ? rx_rn : rx_ro;
    rx_effective = rx_valid && (rx_ro != rx_rn);
    for (int q = 0; q < int'(NLOOK); q++) begin
      look_root[q] = search(look_lbl[q], used);
      if (rx_effective && look_root[q] == hi1) look_root[q] = lo1;
    end
    hi2 = (own_old > own_new) ? own_old : own_new;
    lo2 = (own_old > own_new) ? own_new : own_old;
    own_effective = own_valid && (own_old != own_new);
  end

  // Record appended for the received equivalence; its L-new may be retired
  // by the own equivalence of the same cycle.
  logic [LW-1:0] lo1_final;
  assign lo1_final = (own_effective && lo1 == hi2) ? lo2 : lo1;

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [IW-1:0] wa0, wa1;
  assign wa0 = IW'(used);
  assign wa1 = IW'(used + CW'(1));

  logic [CW:0] need;
  assign need = (CW+1)'(used) + (CW+1)'(rx_effective) + (CW+1)'(own_effective);

  always_ff @(posedge clk) begin
    // Multiple update of every stored record.
    for (int k = 0; k < int'(DEPTH); k++) begin
      if (CW'(k) < used) begin
        logic [LW-1:0] v;
        v = rec_new[k];
        if (rx_effective && v == hi1) v = lo1;
        if (own_effective && v == hi2) v = lo2;
        rec_new[k] <= v;
      end
    end
    // Appends (dropped on overflow).
    if (rx_effective && used < CW'(DEPTH)) begin
      rec_old[wa0] <= hi1;
      rec_new[wa0] <= lo1_final;
    end
    if (own_effective) begin
      if (rx_effective) begin
        if (used + 1 < CW'(DEPTH)) begin
          rec_old[wa1] <= hi2;
          rec_new[wa1] <= lo2;
        end
      end else if (used < CW'(DEPTH)) begin
        rec_old[wa0] <= hi2;
        rec_new[wa0] <= lo2;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used     <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      used     <= '0;
      overflow <= 1'b0;
    end else begin
      if (need > (CW+1)'(DEPTH)) begin
        used     <= CW'(DEPTH);
        overflow <= 1'b1;
      end else begin
        used <= CW'(need);
      end
    end
  end

endmodule

// skew_sequencer: the skewed schedule of one PE within one stage.
//
// In a stage PE i (PE_IDX) handles rows i+4j (forward) or N+1-i-4j (backward),
// j = 0..N/4-1. Row j starts D(j) cycles after the stage starts, with
//   PE1: 2j(N+4)   PE2: 2j(N+4)+2   PE3: (2j+1)(N+4)   PE4: (2j+1)(N+4)+2,
// the lengths of the input delay lines of the linear array. A row takes 2N
// cycles: N for the merge pass (Pass 1/3), then N for the relabel pass
// (Pass 2/4), x = 1..N in each. Between rows the PE idles 8 cycles.
//
// Outputs describe the pixel to issue in the current cycle: valid, pass, x, y,
// first_row (the row has no previous row: row 1 forward, row N backward) and
// row_start (first pixel of the merge pass). stage_start (one-cycle pulse)
// starts the schedule with D counted from that cycle; backward selects the
// stage. busy is high from stage_start until the last pixel is issued.
//
// The offsets, the 2N-cycle row and the row assignment follow the design; a
// down-counter plus row/column counters in place of delay lines is this
// design's choice. N must be a multiple of 4.
module skew_sequencer
  import ccl_pkg::*;
#(
  parameter int unsigned N      = 128,
  parameter int unsigned PE_IDX = 1,
  localparam int unsigned XW    = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          stage_start,
  input  logic          backward,
  output logic          valid,
  output pass_e         pass,
  output logic [XW-1:0] x,
  output logic [XW-1:0] y,
  output logic          first_row,
  output logic          row_start,
  output logic          busy
);

  localparam int unsigned PERIOD = 2 * (N + 4);
  localparam int unsigned OFFSET = (PE_IDX == 1) ? 0 :
                                   (PE_IDX == 2) ? 2 :
                                   (PE_IDX == 3) ? N + 4 : N + 6;
  localparam int unsigned ROWS   = N / 4;
  localparam int unsigned CW     = $clog2(PERIOD + OFFSET + 1);
  localparam int unsigned JW     = $clog2(ROWS + 1);

  typedef enum logic [1:0] {IDLE, WAIT, RUN} state_e;
  state_e        state;
  logic [CW-1:0] cnt;   // WAIT: cycles left; RUN: position within the period
  logic [JW-1:0] j;
  logic          bwd;

  initial begin
    assert (N % 4 == 0) else $error("skew_sequencer: N must be a multiple of 4");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      j     <= '0;
      bwd   <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (stage_start) begin
          bwd <= backward;
          j   <= '0;
          if (OFFSET == 0) begin
            state <= RUN;
            cnt   <= CW'(1);
          end else begin
            state <= WAIT;
            cnt   <= CW'(OFFSET - 1);
          end
        end
        WAIT: begin
          if (cnt == '0) begin
            state <= RUN;
            cnt   <= CW'(1);
          end else begin
            cnt <= cnt - CW'(1);
          end
        end
        RUN: begin
          if (j == JW'(ROWS - 1) && cnt == CW'(2 * N - 1)) begin
            state <= IDLE;
            cnt   <= '0;
          end else if (cnt == CW'(PERIOD - 1)) begin
            cnt <= '0;
            j   <= j + JW'(1);
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // position of the pixel issued this cycle
  logic          act;
  logic [CW-1:0] pos;
  always_comb begin
    // The first pixel of a stage with OFFSET 0 is issued in the stage_start cycle.
    if (state == IDLE) begin
      act = stage_start && OFFSET == 0;
      pos = '0;
    end else if (state == WAIT) begin
      act = (cnt == '0);
      pos = '0;
    end else begin
      act = (cnt < CW'(2 * N));
      pos = cnt;
    end
  end

  logic [JW-1:0] jj;
  logic          bb;
  assign jj = (state == RUN) ? j : '0;
  assign bb = (state == IDLE) ? backward : bwd;

  always_comb begin
    valid     = act;
    pass      = (pos < CW'(N)) ? (bb ? PASS3 : PASS1) : (bb ? PASS4 : PASS2);
    x         = (pos < CW'(N)) ? XW'(pos + CW'(1)) : XW'(pos - CW'(N - 1));
    y         = bb ? XW'(N + 1 - PE_IDX - 4 * int'(jj)) : XW'(PE_IDX + 4 * int'(jj));
    first_row = (PE_IDX == 1) && (jj == '0);
    row_start = act && pos == '0;
    busy      = (state != IDLE) || stage_start;
  end

endmodule

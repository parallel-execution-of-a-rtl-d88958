// ccl_controller: sequences the forward and the backward stage.
//
// After a start pulse the controller counts issue cycles t = 0 .. 2F-1 with
// F = N^2/2 + 3N - 2, the length of one stage. At t = 0 it starts the four
// per-PE schedules of the forward stage (Passes 1 and 2, rows top to bottom), at
// t = F those of the backward stage (Passes 3 and 4, rows bottom to top). The
// pixel issued at t is processed by its PE at t+1, so the PEs are busy for
// exactly N^2 + 6N - 4 cycles. busy rises in the cycle after start (the first
// issue cycle) and stays high through the last
// processing cycle, N^2+6N-3 cycles in all; done pulses in the cycle after it.
//
// It also derives the table clears: PE1 and PE3 clear their equivalence table
// when they issue the first pixel of a merge pass, and PE2 and PE4 clear
// theirs at the same moment, because from then on they receive the partner's
// equivalences.
//
// Stage lengths follow the design; the counter-based control, the start/busy/
// done handshake and the clear rule are this design's choices.
module ccl_controller
  import ccl_pkg::*;
#(
  parameter int unsigned N  = 128,
  localparam int unsigned XW = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [3:0]            iss_valid,
  output pass_e [3:0]           iss_pass,
  output logic [3:0][XW-1:0]    iss_x,
  output logic [3:0][XW-1:0]    iss_y,
  output logic [3:0]            iss_first_row,
  output logic [3:0]            tbl_clr
);

  localparam int unsigned F  = stage_cycles(N);
  localparam int unsigned TW = $clog2(2 * F + 2);

  logic          run;
  logic [TW-1:0] t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      t    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1;
          t   <= '0;
        end
      end else if (t == TW'(2 * F)) begin
        run  <= 1'b0;
        done <= 1'b1;
      end else begin
        t <= t + TW'(1);
      end
    end
  end

  assign busy = run;

  logic       st_fwd, st_bwd;
  logic [3:0] seq_busy, row_start;
  assign st_fwd = run && t == '0;
  assign st_bwd = run && t == TW'(F);

  for (genvar i = 0; i < 4; i++) begin : g_seq
    skew_sequencer #(.N(N), .PE_IDX(i + 1)) u_seq (
      .clk, .rst_n,
      .stage_start(st_fwd || st_bwd),
      .backward(st_bwd),
      .valid(iss_valid[i]),
      .pass(iss_pass[i]),
      .x(iss_x[i]),
      .y(iss_y[i]),
      .first_row(iss_first_row[i]),
      .row_start(row_start[i]),
      .busy(seq_busy[i]));
  end

  assign tbl_clr = {row_start[2], row_start[2], row_start[0], row_start[0]};

  // Every schedule has ended by the last processing cycle.
  always_ff @(posedge clk) begin
    if (run && t == TW'(2 * F)) begin
      assert (seq_busy == '0) else $error("a PE schedule outlasts the operation");
    end
  end

endmodule

// image_buffer: the image buffer / label map memory shared by the PEs.
//
// One word per pixel holds the pixel value and its current label. The host
// writes pixel values through the load port (the label is cleared) and reads
// value and label back through the host read port. While labeling runs, each PE
// has one read port (value and label of the pixel it will process next) and one
// write port (the label it produced), so the array stores the input image first
// and the label map as processing continues.
//
// Timing: all reads are synchronous (data one cycle after the address); writes
// happen at the rising edge. A read and a write of the same word in one cycle
// return the old word. Addresses are (y-1)*N + (x-1). The schedule never lets two
// PEs write the same word in one cycle; if the load port and a PE write collide,
// the PE write wins.
//
// What the buffer holds follows the design. Replacing the skewed delay lines
// of the design by per-PE read ports driven on the same skewed schedule (see
// skew_sequencer) is this design's choice.
module image_buffer #(
  parameter int unsigned N     = 128,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned LW    = ccl_pkg::label_bits(N),
  parameter int unsigned NPORT = 4,
  localparam int unsigned AW   = $clog2(N * N)
) (
  input  logic                         clk,
  // host load / read
  input  logic                         ld_we,
  input  logic [AW-1:0]                ld_addr,
  input  logic [PIX_W-1:0]             ld_pix,
  input  logic [AW-1:0]                hr_addr,
  output logic [PIX_W-1:0]             hr_pix,
  output logic [LW-1:0]                hr_lbl,
  // PE ports
  input  logic [NPORT-1:0][AW-1:0]     rd_addr,
  output logic [NPORT-1:0][PIX_W-1:0]  rd_pix,
  output logic [NPORT-1:0][LW-1:0]     rd_lbl,
  input  logic [NPORT-1:0]             wr_en,
  input  logic [NPORT-1:0][AW-1:0]     wr_addr,
  input  logic [NPORT-1:0][LW-1:0]     wr_lbl
);

  logic [PIX_W-1:0] pix_mem [N*N];
  logic [LW-1:0]    lbl_mem [N*N];

  always_ff @(posedge clk) begin
    if (ld_we) begin
      pix_mem[ld_addr] <= ld_pix;
      lbl_mem[ld_addr] <= '0;
    end
    for (int p = 0; p < int'(NPORT); p++) begin
      if (wr_en[p]) lbl_mem[wr_addr[p]] <= wr_lbl[p];
    end
  end

  always_ff @(posedge clk) begin
    hr_pix <= pix_mem[hr_addr];
    hr_lbl <= lbl_mem[hr_addr];
    for (int p = 0; p < int'(NPORT); p++) begin
      rd_pix[p] <= pix_mem[rd_addr[p]];
      rd_lbl[p] <= lbl_mem[rd_addr[p]];
    end
  end

endmodule

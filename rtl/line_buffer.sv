// line_buffer: the row store of the Gaussian-derivative convolution stage.
//
// Eight dual-port row memories, each holding one image row, give the nine
// pixels of one image column (the current pixel and the same column in the
// eight previous rows) in parallel, so that all seven separable convolvers can
// share them. The memories form a cascade: for each accepted pixel at column
// x, memory k is read at x and, in the same cycle, rewritten with the value
// memory k-1 held at x (memory 0 takes the new pixel). Each memory therefore
// uses one read and one write port at the same address, read-before-write.
// The cascade arrangement and the column counter are this design's choice; the
// eight shared row memories are the architecture's own.
//
// Interface: in_valid qualifies in_pix; in_sof marks the first pixel of a frame
// and restarts the column address. line_len is the number of pixels per image
// row, 1 to IMG_W; it may change between frames, so one build serves any
// image width up to IMG_W. One cycle after an accepted pixel,
// col_valid is high and col[0..8] hold the column from the oldest row (col[0],
// eight rows above) to the current pixel (col[8]). Row memories are not
// cleared, so the first eight rows of the first frame see stale data.
module line_buffer #(
  parameter int PW    = 8,
  parameter int IMG_W = 1000,
  parameter int NROWS = 8,
  localparam int LW   = $clog2(IMG_W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic [PW-1:0] in_pix,
  input  logic [LW-1:0] line_len,
  output logic          col_valid,
  output logic          col_sof,
  output logic [PW-1:0] col [NROWS+1]
);

  localparam int AW = (IMG_W > 1) ? $clog2(IMG_W) : 1;

  logic [PW-1:0] mem [NROWS][IMG_W];
  logic [AW-1:0] x_cnt;
  logic [AW-1:0] addr;

  // A frame start forces column 0.
  assign addr = in_sof ? '0 : x_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_cnt <= '0;
    end else if (in_valid) begin
      x_cnt <= ({1'b0, addr} + 1'b1 >= (AW + 1)'(line_len)) ? '0 : addr + AW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col_valid <= 1'b0;
      col_sof   <= 1'b0;
    end else begin
      col_valid <= in_valid;
      col_sof   <= in_valid & in_sof;
    end
  end

  // Row memories, read-before-write cascade.
  for (genvar k = 0; k < NROWS; k++) begin : g_row
    always_ff @(posedge clk) begin
      if (in_valid) begin
        col[NROWS-1-k] <= mem[k][addr];
        if (k == 0) mem[k][addr] <= in_pix;
        else        mem[k][addr] <= mem[k-1][addr];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) col[NROWS] <= in_pix;
  end

endmodule

// window3x3: 3x3 neighbourhood generator over a raster stream, used twice by
// the Harris extractor (for the gradient and for the windowed sums).
//
// Two line buffers of LINE words hold the previous two rows. For an input
// sample at row r, column c (0-based within the stream's own raster) the
// column {row r-2, row r-1, row r} at c is shifted into a 3x3 register window,
// and the line buffers move down by one row at c. win[i][j] then holds the
// sample at (r-2+i, c-2+j); out_valid is raised when r >= 2 and c >= 2, with
// the window centre (r-1, c-1). Samples must arrive in raster order, but may
// have gaps. Timing: outputs follow the input sample by one clock.
module window3x3
  import femip_pkg::*;
#(
  parameter int W    = 10,
  parameter int LINE = 1018
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [W-1:0]                in_data,
  input  logic [COORD_W-1:0]          in_c,
  input  logic [COORD_W-1:0]          in_r,
  input  logic                        in_frame,
  output logic [2:0][2:0][W-1:0]      win,
  output logic                        out_valid,
  output logic [COORD_W-1:0]          out_c,
  output logic [COORD_W-1:0]          out_r,
  output logic                        out_frame
);
  localparam int A_W = $clog2(LINE);

  logic [W-1:0] lb1 [LINE];   // row r-1
  logic [W-1:0] lb2 [LINE];   // row r-2
  logic [A_W-1:0] a;
  assign a = in_c[A_W-1:0];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb2[a] <= lb1[a];
      lb1[a] <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
      out_valid <= 1'b0;
      out_c <= '0; out_r <= '0; out_frame <= 1'b0;
    end else begin
      out_valid <= in_valid && (in_c >= COORD_W'(2)) && (in_r >= COORD_W'(2));
      if (in_valid) begin
        for (int i = 0; i < 3; i++) begin
          win[i][0] <= win[i][1];
          win[i][1] <= win[i][2];
        end
        win[0][2] <= lb2[a];
        win[1][2] <= lb1[a];
        win[2][2] <= in_data;
        out_c     <= in_c - 1'b1;
        out_r     <= in_r - 1'b1;
        out_frame <= in_frame;
      end
    end
  end
endmodule

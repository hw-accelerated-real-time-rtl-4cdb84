// gaussian_blur: first Canny phase, 3x3 Gaussian smoothing of 8-bit pixels.
//
// A line_window supplies the 3x3 neighbourhood of each pixel; the output is
// the neighbourhood weighted by the kernel [1 2 1; 2 4 2; 1 2 1], divided by
// 16 with rounding. Pixels on the frame border, whose neighbourhood is
// incomplete, pass through unchanged. The original design specifies a 3x3
// convolution on an 8-bit grayscale stream; the kernel weights and the
// border rule are this design's choices.
//
// Interface: valid/ready streams, one pixel per cycle. Latency WIDTH+1 input
// beats (the window lag) plus one cycle; out_last marks the last pixel of the
// frame.
module gaussian_blur
  import canny_pkg::*;
#(
  parameter int WIDTH  = 1280,
  parameter int HEIGHT = 720
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pixel_t in_data,
  input  logic   in_valid,
  output logic   in_ready,
  output pixel_t out_data,
  output logic   out_last,
  output logic   out_valid,
  input  logic   out_ready
);

  logic [8:0][7:0] win;
  logic [8:0]      tap_ok;
  logic            win_last, win_valid, win_ready;

  line_window #(.DW(8), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_win (
    .clk, .rst_n, .in_data, .in_valid, .in_ready,
    .win, .tap_ok, .win_last, .win_valid, .win_ready
  );

  logic [11:0] acc;
  pixel_t      blurred;

  always_comb begin
    acc = 12'd8
        + 12'(win[0]) + (12'(win[1]) << 1) + 12'(win[2])
        + (12'(win[3]) << 1) + (12'(win[4]) << 2) + (12'(win[5]) << 1)
        + 12'(win[6]) + (12'(win[7]) << 1) + 12'(win[8]);
    blurred = (&tap_ok) ? acc[11:4] : win[TAP_C];
  end

  axis_skid #(.DW(8)) u_out (
    .clk, .rst_n,
    .in_data(blurred), .in_last(win_last), .in_valid(win_valid), .in_ready(win_ready),
    .out_data, .out_last, .out_valid, .out_ready
  );

endmodule

// sobel_gradient: second Canny phase, intensity gradient.
//
// From the 3x3 neighbourhood of each blurred pixel it forms the Sobel
// gradients gx (left-to-right) and gy (top-to-bottom), then the gradient
// magnitude floor(sqrt(gx^2 + gy^2)) saturated to 255, and the gradient
// orientation rounded to the nearest of 0, 45, 90 and 135 degrees. Both
// results leave as one 16-bit beat {magnitude, orientation}, as in the
// original design, which merged its two result streams into one to keep them
// in step. The original computes the angle with an arctangent; here the
// rounding to 45-degree sectors is done by comparing |gy| with |gx| scaled by
// tan(22.5) and tan(67.5) (8-bit fixed point), which gives the same sectors
// without a divider. The square root is an 8-step restoring integer root on
// the 16-bit sum (larger sums saturate). Border pixels produce magnitude 0.
//
// Interface: 8-bit valid/ready input, 16-bit (canny_pkg::grad_t) valid/ready
// output, one pixel per cycle; latency WIDTH+1 input beats plus one cycle.
module sobel_gradient
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
  output grad_t  out_data,
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

  // Integer square root of a 16-bit value, restoring method, 8 result bits.
  function automatic logic [7:0] isqrt16(input logic [15:0] v);
    logic [7:0]  root;
    logic [15:0] trial;
    root = '0;
    for (int b = 7; b >= 0; b--) begin
      trial = 16'(root) | (16'd1 << b);
      if (trial * trial <= v) root = root | (8'd1 << b);
    end
    return root;
  endfunction

  logic signed [11:0] gx, gy;
  logic        [10:0] ax, ay;
  logic        [21:0] sumsq;
  logic        [20:0] ay_q8, ax_lo, ax_hi;
  grad_t              grad;

  always_comb begin
    gx = (12'(win[2]) + (12'(win[5]) << 1) + 12'(win[8]))
       - (12'(win[0]) + (12'(win[3]) << 1) + 12'(win[6]));
    gy = (12'(win[6]) + (12'(win[7]) << 1) + 12'(win[8]))
       - (12'(win[0]) + (12'(win[1]) << 1) + 12'(win[2]));
    ax = gx[11] ? 11'(-gx) : 11'(gx);
    ay = gy[11] ? 11'(-gy) : 11'(gy);
    sumsq = 22'(ax) * 22'(ax) + 22'(ay) * 22'(ay);

    grad.mag = (sumsq[21:16] != '0) ? 8'd255 : isqrt16(sumsq[15:0]);

    ay_q8 = 21'(ay) << 8;
    ax_lo = 21'(ax) * 21'(TAN22_Q8);
    ax_hi = 21'(ax) * 21'(TAN67_Q8);
    if (ay_q8 <= ax_lo)         grad.dir = DIR_0;
    else if (ay_q8 >= ax_hi)    grad.dir = DIR_90;
    else if (gx[11] == gy[11])  grad.dir = DIR_45;
    else                        grad.dir = DIR_135;

    if (!(&tap_ok)) grad = '0;
  end

  axis_skid #(.DW(16)) u_out (
    .clk, .rst_n,
    .in_data(grad), .in_last(win_last), .in_valid(win_valid), .in_ready(win_ready),
    .out_data, .out_last, .out_valid, .out_ready
  );

endmodule

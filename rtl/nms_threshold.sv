// nms_threshold: third Canny phase, non-maximum suppression plus double
// thresholding.
//
// The phase takes the 16-bit {magnitude, orientation} stream. For each pixel
// it compares the magnitude with the two neighbours that lie along the
// gradient orientation (0: left/right, 90: up/down, 45: up-left/down-right,
// 135: up-right/down-left, with rows growing downward) and keeps it only if
// it is not smaller than either. A kept magnitude of at least HIGH_THRESH
// becomes a strong edge (255), one of at least LOW_THRESH a weak edge
// (WEAK_VAL), anything else 0. Thresholding needs no neighbours, so, as in
// the original design, it is folded into this phase. Neighbours outside the
// frame count as magnitude 0. Threshold values, the weak code and the tie
// rule are this design's choices.
//
// Interface: 16-bit valid/ready input, 8-bit valid/ready output, one pixel
// per cycle; latency WIDTH+1 input beats plus one cycle.
module nms_threshold
  import canny_pkg::*;
#(
  parameter int     WIDTH       = 1280,
  parameter int     HEIGHT      = 720,
  parameter pixel_t LOW_THRESH  = 8'd20,
  parameter pixel_t HIGH_THRESH = 8'd50,
  parameter pixel_t WEAK_VAL    = WEAK_DEF
) (
  input  logic   clk,
  input  logic   rst_n,
  input  grad_t  in_data,
  input  logic   in_valid,
  output logic   in_ready,
  output pixel_t out_data,
  output logic   out_last,
  output logic   out_valid,
  input  logic   out_ready
);

  logic [8:0][15:0] win;
  logic [8:0]       tap_ok;
  logic             win_last, win_valid, win_ready;

  line_window #(.DW(16), .WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_win (
    .clk, .rst_n, .in_data, .in_valid, .in_ready,
    .win, .tap_ok, .win_last, .win_valid, .win_ready
  );

  grad_t  cen;
  pixel_t n1, n2, cls;
  logic   keep;

  always_comb begin
    cen = win[TAP_C];
    unique case (cen.dir)
      DIR_90:  begin n1 = win[1][15:8]; n2 = win[7][15:8]; end
      DIR_45:  begin n1 = win[0][15:8]; n2 = win[8][15:8]; end
      DIR_135: begin n1 = win[2][15:8]; n2 = win[6][15:8]; end
      default: begin n1 = win[3][15:8]; n2 = win[5][15:8]; end
    endcase
    keep = (cen.mag >= n1) && (cen.mag >= n2);
    if (keep && cen.mag >= HIGH_THRESH)     cls = STRONG;
    else if (keep && cen.mag >= LOW_THRESH) cls = WEAK_VAL;
    else                                    cls = '0;
  end

  axis_skid #(.DW(8)) u_out (
    .clk, .rst_n,
    .in_data(cls), .in_last(win_last), .in_valid(win_valid), .in_ready(win_ready),
    .out_data, .out_last, .out_valid, .out_ready
  );

endmodule

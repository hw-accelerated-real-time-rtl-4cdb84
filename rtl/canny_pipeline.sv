// canny_pipeline: the four Canny phases chained by valid/ready streams.
//
//   8-bit pixels -> gaussian_blur -> 8-bit blurred pixels
//                -> sobel_gradient -> 16-bit {magnitude, orientation}
//                -> nms_threshold  -> 8-bit 0 / weak / strong
//                -> hysteresis     -> 8-bit edge map (0 or 255)
//
// Each phase holds its own row buffers and works on one pixel per cycle, so
// the phases run concurrently on different rows of the same frame; this is
// the streaming organisation of the original design, where each phase
// consumes the output stream of the previous one. Every phase lags its input
// by WIDTH+1 pixels and flushes its last row on its own after the frame's
// last pixel, so one frame of WIDTH*HEIGHT pixels leaves the pipeline about
// 4*(WIDTH+2) cycles after it fully entered, at one pixel per cycle when
// neither side stalls. out_last marks the frame's last pixel.
module canny_pipeline
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
  input  pixel_t in_data,
  input  logic   in_valid,
  output logic   in_ready,
  output pixel_t out_data,
  output logic   out_last,
  output logic   out_valid,
  input  logic   out_ready
);

  pixel_t blur_data;
  logic   blur_valid, blur_ready;
  grad_t  grad_data;
  logic   grad_valid, grad_ready;
  pixel_t cls_data;
  logic   cls_valid, cls_ready;
  // Intermediate last flags are not needed: each phase counts the frame.
  logic   blur_last, grad_last, cls_last;

  gaussian_blur #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_blur (
    .clk, .rst_n,
    .in_data, .in_valid, .in_ready,
    .out_data(blur_data), .out_last(blur_last), .out_valid(blur_valid), .out_ready(blur_ready)
  );

  sobel_gradient #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_sobel (
    .clk, .rst_n,
    .in_data(blur_data), .in_valid(blur_valid), .in_ready(blur_ready),
    .out_data(grad_data), .out_last(grad_last), .out_valid(grad_valid), .out_ready(grad_ready)
  );

  nms_threshold #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .LOW_THRESH(LOW_THRESH),
                  .HIGH_THRESH(HIGH_THRESH), .WEAK_VAL(WEAK_VAL)) u_nms (
    .clk, .rst_n,
    .in_data(grad_data), .in_valid(grad_valid), .in_ready(grad_ready),
    .out_data(cls_data), .out_last(cls_last), .out_valid(cls_valid), .out_ready(cls_ready)
  );

  hysteresis #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .WEAK_VAL(WEAK_VAL)) u_hyst (
    .clk, .rst_n,
    .in_data(cls_data), .in_valid(cls_valid), .in_ready(cls_ready),
    .out_data, .out_last, .out_valid, .out_ready
  );

  // Frame ordering check: a later phase can never finish more frames than
  // the phase feeding it.
  logic [7:0] frames_blur, frames_grad, frames_cls;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frames_blur <= '0;
      frames_grad <= '0;
      frames_cls  <= '0;
    end else begin
      if (blur_valid && blur_ready && blur_last) frames_blur <= frames_blur + 1'b1;
      if (grad_valid && grad_ready && grad_last) frames_grad <= frames_grad + 1'b1;
      if (cls_valid && cls_ready && cls_last)    frames_cls  <= frames_cls + 1'b1;
      assert (frames_blur - frames_grad <= 8'd1 && frames_grad - frames_cls <= 8'd1)
        else $error("canny_pipeline: phases disagree on frame boundaries");
    end
  end

endmodule

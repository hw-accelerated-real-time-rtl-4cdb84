// canny_top: Canny edge-detection compute block for one video stream.
//
// The processor stores a grayscale frame in DRAM, starts this block through
// its AXI4-Lite control slave, and a DMA engine streams the frame in (image_in)
// and the edge map back out (image_out). Inside, the four Canny phases
// (Gaussian blur, Sobel gradient, non-maximum suppression with double
// thresholding, hysteresis edge tracking) run as one streaming pipeline with
// row buffers, so no frame is ever held in the block. When the last edge
// pixel of the frame has been taken, the control slave raises done and the
// interrupt.
//
// Stream side: the DMA moves 32-bit beats carrying one pixel in bits 7:0.
// The byte selection on image_in and the zero extension on image_out take the
// place of the two stream width converters of the original system, which
// contain no logic. image_in is accepted only while a started frame still
// expects pixels (WIDTH*HEIGHT per start); image_in's last flag is not used,
// image_out's last flag marks the frame's last pixel. Throughput is one pixel
// per clock; a frame leaves about 4*(WIDTH+2) cycles after its last pixel
// entered. Frame size and thresholds are parameters; 1280x720 is the frame
// of the original system, the threshold values are this design's choice.
//
// Port names follow the original block: clk/rst_n are ap_clk/ap_rst_n
// (synchronous, active low), s_axil_* is s_axi_AXILiteS, s_axis_* is image_in,
// m_axis_* is image_out.
module canny_top
  import canny_pkg::*;
#(
  parameter int     WIDTH       = 1280,
  parameter int     HEIGHT      = 720,
  parameter pixel_t LOW_THRESH  = 8'd20,
  parameter pixel_t HIGH_THRESH = 8'd50
) (
  input  logic        clk,
  input  logic        rst_n,
  // control (s_axi_AXILiteS)
  input  logic [5:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [5:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // image_in, from the DMA read channel
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tlast,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  // image_out, to the DMA write channel
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tlast,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        interrupt
);

  logic   in_enable, pipe_in_ready, frame_done;
  pixel_t edge_px;
  logic   unused_in;

  assign unused_in = ^{s_axis_tdata[31:8], s_axis_tlast};

  canny_ctrl #(.AW(6), .FRAME_PIXELS(WIDTH * HEIGHT)) u_ctrl (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .in_enable,
    .in_beat(s_axis_tvalid && s_axis_tready),
    .frame_done,
    .interrupt
  );

  assign s_axis_tready = in_enable && pipe_in_ready;

  canny_pipeline #(.WIDTH(WIDTH), .HEIGHT(HEIGHT),
                   .LOW_THRESH(LOW_THRESH), .HIGH_THRESH(HIGH_THRESH)) u_pipe (
    .clk, .rst_n,
    .in_data(s_axis_tdata[7:0]),
    .in_valid(s_axis_tvalid && in_enable),
    .in_ready(pipe_in_ready),
    .out_data(edge_px),
    .out_last(m_axis_tlast),
    .out_valid(m_axis_tvalid),
    .out_ready(m_axis_tready)
  );

  assign m_axis_tdata = {24'd0, edge_px};
  assign frame_done   = m_axis_tvalid && m_axis_tready && m_axis_tlast;

endmodule

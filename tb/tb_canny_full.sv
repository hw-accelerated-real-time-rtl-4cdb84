// tb_canny_full: one full 1280x720 frame through canny_top at its default
// parameters.
//
// Starts one frame through the control slave, streams the test image in
// without stalls, compares all 921600 output pixels and tlast with the
// reference Canny model, and checks the frame time: one pixel per clock plus
// four row-buffer lags of WIDTH+2 cycles. Then checks done, the interrupt
// and the frame counter.
module tb_canny_full;
  import canny_ref_pkg::*;
  import axil_bfm_pkg::*;

  localparam int W = 1280;
  localparam int H = 720;
  localparam int N = W * H;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [5:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axis_tdata, m_axis_tdata;
  logic        s_axis_tlast, s_axis_tvalid, s_axis_tready;
  logic        m_axis_tlast, m_axis_tvalid, m_axis_tready;
  logic        irq;

  canny_top dut (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .s_axis_tdata, .s_axis_tlast, .s_axis_tvalid, .s_axis_tready,
    .m_axis_tdata, .m_axis_tlast, .m_axis_tvalid, .m_axis_tready,
    .interrupt(irq)
  );

  `include "axil_master_tasks.svh"

  int checks = 0, failures = 0, mismatches = 0, edges = 0;
  frame_t src, expv;
  int out_idx = 0;
  bit done_out = 1'b0;
  longint cyc = 0, t_first_in = -1, t_last_out = -1;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && m_axis_tvalid && m_axis_tready && !done_out) begin
      checks++;
      if (m_axis_tdata !== 32'(expv[out_idx]) || m_axis_tlast != (out_idx == N - 1)) begin
        failures++;
        mismatches++;
        if (mismatches < 10)
          $display("FAIL: pixel %0d (r%0d c%0d): got %0d/%0b expected %0d", out_idx,
                   out_idx / W, out_idx % W, m_axis_tdata, m_axis_tlast, expv[out_idx]);
      end
      if (m_axis_tdata != 0) edges++;
      if (out_idx == N - 1) begin
        t_last_out = cyc;
        done_out = 1'b1;
      end
      out_idx++;
    end
  end

  assign m_axis_tready = 1'b1;

  initial begin
    s_axis_tvalid = 1'b0;
    s_axis_tdata  = '0;
    s_axis_tlast  = 1'b0;
    wait (rst_n);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      s_axis_tvalid = 1'b1;
      s_axis_tdata  = 32'(src[i]);
      s_axis_tlast  = (i == N - 1);
      @(posedge clk);
      while (!s_axis_tready) @(posedge clk);
      if (i == 0) t_first_in = cyc;
    end
    @(negedge clk);
    s_axis_tvalid = 1'b0;
  end

  logic [31:0] d;

  initial begin
    frame_t b, g, n;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0;
    s_axil_arvalid = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    src  = make_image(W, H, 6);
    b    = ref_blur(src, W, H);
    g    = ref_sobel(b, W, H);
    n    = ref_nms(g, W, H, 20, 50, 128);
    expv = ref_hyst(n, W, H, 128);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    axil_write(R_GIE, 32'h1);
    axil_write(R_IER, 32'h1);
    axil_write(R_CTRL, 32'h1);
    wait (irq);
    checks++;
    if (!done_out) begin failures++; $display("FAIL: interrupt before the last pixel"); end
    axil_read(R_CTRL, d);
    checks++;
    if (d != 32'hE) begin failures++; $display("FAIL: CTRL %h", d); end
    axil_read(R_FRAMES, d);
    checks++;
    if (d != 32'd1) begin failures++; $display("FAIL: FRAMES %0d", d); end
    checks++;
    if (t_last_out - t_first_in > N + 4 * (W + 2) + 10) begin
      failures++;
      $display("FAIL: frame took %0d cycles", t_last_out - t_first_in);
    end
    checks++;
    if (edges == 0) begin failures++; $display("FAIL: no edge pixels"); end
    $display("frame: %0d pixels in %0d cycles, %0d edge pixels, %0d mismatches",
             N, t_last_out - t_first_in, edges, mismatches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

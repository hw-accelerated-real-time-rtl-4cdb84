// tb_canny_top: end-to-end testbench of canny_top at a reduced frame size.
//
// Plays the processor (AXI4-Lite master) and the DMA (32-bit stream source
// and sink). Four WIDTH x HEIGHT test images go through the block: frame 0
// started by a register write and run without stalls (its cycle count is
// checked against one pixel per clock plus four row-buffer lags); frame 1
// with random input bubbles and output back-pressure; frames 2 and 3 back to
// back through auto-restart. Every output beat is compared with the
// reference Canny model, including tlast and the zero upper bytes; the
// source fills the unused upper input bytes with junk. The interrupt,
// done/idle bits and the frame counter are checked after each frame.
// Each mechanism of the design is counted and must occur at least once:
// input bubbles, output back-pressure, input held off while no frame is
// started, auto-restart, interrupts, strong edges, weak pixels kept and
// dropped by hysteresis, and pixels suppressed by non-maximum suppression.
module tb_canny_top;
  import canny_ref_pkg::*;
  import axil_bfm_pkg::*;

  localparam int W = 32;
  localparam int H = 20;
  localparam int N = W * H;
  localparam int FRAMES = 4;
  localparam int LO = 20, HI = 50, WEAK = 128;

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

  canny_top #(.WIDTH(W), .HEIGHT(H), .LOW_THRESH(8'(LO)), .HIGH_THRESH(8'(HI))) dut (
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

  int checks = 0, failures = 0;
  frame_t src [FRAMES];
  frame_t expv [FRAMES];
  int out_frame = 0, out_idx = 0;
  bit stress = 1'b0;
  longint cyc = 0, t_first_in = -1, t_last_out = -1;
  // mechanism counters
  int n_bubble = 0, n_backpressure = 0, n_held_off = 0, n_auto_restart = 0, n_irq = 0;
  int n_strong = 0, n_weak_kept = 0, n_weak_dropped = 0, n_suppressed = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) fail($sformatf("%s: got %h expected %h", what, got, exp));
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // DMA sink: compare, count back-pressure.
  always @(posedge clk) begin
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      checks++;
      if (m_axis_tdata !== 32'(expv[out_frame][out_idx]))
        fail($sformatf("frame %0d pixel %0d (r%0d c%0d): got %0d expected %0d", out_frame, out_idx,
             out_idx / W, out_idx % W, m_axis_tdata, expv[out_frame][out_idx]));
      checks++;
      if (m_axis_tlast != (out_idx == N - 1)) fail($sformatf("tlast at pixel %0d", out_idx));
      if (out_frame == 0 && out_idx == N - 1) t_last_out = cyc;
      if (out_idx == N - 1) begin out_idx = 0; out_frame++; end
      else out_idx++;
    end
    if (rst_n && m_axis_tvalid && !m_axis_tready) n_backpressure++;
    if (rst_n && s_axis_tvalid && !s_axis_tready && !dut.u_ctrl.in_enable) n_held_off++;
    if (rst_n && irq && !$past(irq)) n_irq++;
  end

  always @(negedge clk) m_axis_tready <= stress ? ($urandom_range(3) != 0) : 1'b1;

  // DMA source: presents the frames back to back, whether started or not.
  initial begin
    s_axis_tvalid = 1'b0;
    s_axis_tdata  = '0;
    s_axis_tlast  = 1'b0;
    wait (rst_n);
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        while (stress && $urandom_range(3) == 0) begin
          s_axis_tvalid = 1'b0;
          n_bubble++;
          @(negedge clk);
        end
        s_axis_tvalid = 1'b1;
        s_axis_tdata  = {24'($urandom), 8'(src[f][i])};
        s_axis_tlast  = (i == N - 1);
        @(posedge clk);
        while (!s_axis_tready) @(posedge clk);
        if (f == 0 && i == 0) t_first_in = cyc;
      end
    end
    @(negedge clk);
    s_axis_tvalid = 1'b0;
  end

  logic [31:0] d;

  initial begin
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0;
    s_axil_arvalid = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    for (int f = 0; f < FRAMES; f++) begin
      frame_t b, g, n;
      src[f] = make_image(W, H, (f == 0) ? 3 : 12 * f);
      b = ref_blur(src[f], W, H);
      g = ref_sobel(b, W, H);
      n = ref_nms(g, W, H, LO, HI, WEAK);
      expv[f] = ref_hyst(n, W, H, WEAK);
      for (int i = 0; i < N; i++) begin
        if (expv[f][i] == 255 && n[i] == 255) n_strong++;
        if (n[i] == WEAK && expv[f][i] == 255) n_weak_kept++;
        if (n[i] == WEAK && expv[f][i] == 0) n_weak_dropped++;
        if (g[i] / 256 >= LO && n[i] == 0) n_suppressed++;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);   // source waits on a closed gate meanwhile

    axil_read(R_CTRL, d);   expect_eq("idle after reset", d, 32'h4);
    axil_write(R_GIE, 32'h1);
    axil_write(R_IER, 32'h1);

    // Frame 0: no stalls, timed.
    axil_write(R_CTRL, 32'h1);
    wait (irq);
    axil_read(R_CTRL, d);   expect_eq("CTRL after frame 0", d, 32'hE);
    axil_write(R_ISR, 32'h1);
    checks++;
    if (t_last_out - t_first_in > N + 4 * (W + 2) + 10)
      fail($sformatf("frame 0 took %0d cycles", t_last_out - t_first_in));
    $display("frame 0: %0d pixels in %0d cycles", N, t_last_out - t_first_in);

    // Frame 1: random stalls on both streams.
    stress = 1'b1;
    axil_write(R_CTRL, 32'h1);
    wait (irq);
    axil_read(R_CTRL, d);   expect_eq("CTRL after frame 1", d, 32'hE);
    axil_write(R_ISR, 32'h1);

    // Frames 2 and 3: auto-restart.
    axil_write(R_CTRL, 32'h81);
    wait (out_frame == 3);
    n_auto_restart++;
    checks++;
    if (!dut.u_ctrl.busy) fail("auto-restart did not start frame 3");
    axil_write(R_CTRL, 32'h0);
    wait (out_frame == 4);
    repeat (5) @(posedge clk);
    axil_read(R_CTRL, d);   expect_eq("CTRL idle at end", d & 32'h5, 32'h4);
    axil_read(R_FRAMES, d); expect_eq("frames done", d, 32'd4);

    $display("mechanisms: bubble=%0d backpressure=%0d held_off=%0d auto_restart=%0d irq=%0d",
             n_bubble, n_backpressure, n_held_off, n_auto_restart, n_irq);
    $display("pixels: strong=%0d weak_kept=%0d weak_dropped=%0d nms_suppressed=%0d",
             n_strong, n_weak_kept, n_weak_dropped, n_suppressed);
    checks++; if (n_bubble == 0)       fail("no input bubble");
    checks++; if (n_backpressure == 0) fail("no output back-pressure");
    checks++; if (n_held_off == 0)     fail("input never held off");
    checks++; if (n_auto_restart == 0) fail("no auto-restart");
    checks++; if (n_irq < 2)           fail("interrupt not seen twice");
    checks++; if (n_strong == 0)       fail("no strong edge");
    checks++; if (n_weak_kept == 0)    fail("no weak pixel kept");
    checks++; if (n_weak_dropped == 0) fail("no weak pixel dropped");
    checks++; if (n_suppressed == 0)   fail("no pixel suppressed by NMS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

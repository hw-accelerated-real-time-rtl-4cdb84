// tb_canny_ctrl: self-checking testbench of canny_ctrl.
//
// Drives the AXI4-Lite slave with an AXI4-Lite master and plays the datapath:
// it offers an input beat every cycle the gate is open and pulses frame_done.
// Checks: idle after reset; start opens the input gate for exactly
// FRAME_PIXELS beats; done/ready set at the frame end and cleared by reading
// CTRL; the frame counter; the interrupt only with GIE and IER set, and its
// clearing by writing ISR; auto-restart keeps the block busy and reopens the
// gate for the next frame.
module tb_canny_ctrl;
  import axil_bfm_pkg::*;

  localparam int NPIX = 10;

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
  logic        in_enable, in_beat, frame_done, irq;

  canny_ctrl #(.AW(6), .FRAME_PIXELS(NPIX)) dut (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .in_enable, .in_beat, .frame_done, .interrupt(irq)
  );

  `include "axil_master_tasks.svh"

  int checks = 0, failures = 0;
  int beats = 0;
  bit feed = 1'b0;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Datapath stand-in: takes a beat whenever the gate is open.
  always @(negedge clk) in_beat <= feed && in_enable;
  always @(posedge clk) if (in_beat) beats++;

  task automatic end_frame();
    @(negedge clk);
    frame_done = 1'b1;
    @(negedge clk);
    frame_done = 1'b0;
  endtask

  task automatic feed_frame(int expect_beats);
    int b0 = beats;
    feed = 1'b1;
    repeat (NPIX * 3) @(posedge clk);
    feed = 1'b0;
    @(posedge clk);
    expect_eq("beats taken per start", 32'(beats - b0), 32'(expect_beats));
    expect_eq("gate closed after a frame", 32'(in_enable), 0);
  endtask

  logic [31:0] d;

  initial begin
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0;
    s_axil_arvalid = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    frame_done = 0; in_beat = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    axil_read(R_CTRL, d);   expect_eq("CTRL after reset", d, 32'h4);
    expect_eq("gate closed after reset", 32'(in_enable), 0);

    // Frame 1, interrupts off.
    axil_write(R_CTRL, 32'h1);
    axil_read(R_CTRL, d);   expect_eq("CTRL while running", d, 32'h1);
    feed_frame(NPIX);
    end_frame();
    expect_eq("no interrupt while disabled", 32'(irq), 0);
    axil_read(R_ISR, d);    expect_eq("ISR after frame", d, 32'h1);
    axil_read(R_CTRL, d);   expect_eq("CTRL done+ready+idle", d, 32'hE);
    axil_read(R_CTRL, d);   expect_eq("CTRL done cleared on read", d, 32'h4);
    axil_read(R_FRAMES, d); expect_eq("frame count 1", d, 32'd1);
    axil_write(R_ISR, 32'h1);
    axil_read(R_ISR, d);    expect_eq("ISR cleared by toggle", d, 32'h0);

    // Frame 2, interrupts on.
    axil_write(R_GIE, 32'h1);
    axil_write(R_IER, 32'h1);
    axil_write(R_CTRL, 32'h1);
    feed_frame(NPIX);
    expect_eq("no interrupt before done", 32'(irq), 0);
    end_frame();
    @(posedge clk);
    expect_eq("interrupt after done", 32'(irq), 1);
    axil_write(R_ISR, 32'h1);
    @(posedge clk);
    expect_eq("interrupt cleared", 32'(irq), 0);

    // Frames 3 and 4 with auto-restart.
    axil_write(R_CTRL, 32'h81);
    feed_frame(NPIX);
    end_frame();
    @(posedge clk);
    expect_eq("gate reopened by auto-restart", 32'(in_enable), 1);
    axil_read(R_CTRL, d);   expect_eq("CTRL busy with auto-restart", d, 32'h8B);
    axil_write(R_CTRL, 32'h0);
    feed_frame(NPIX);
    end_frame();
    axil_read(R_CTRL, d);   expect_eq("CTRL idle after auto-restart off", d, 32'hE);
    axil_read(R_FRAMES, d); expect_eq("frame count 4", d, 32'd4);
    expect_eq("bresp OKAY", 32'(s_axil_bresp), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// canny_ctrl: AXI4-Lite control slave of the Canny compute block.
//
// The ARM core starts a frame through this slave and is told, by status bit
// and interrupt, when the processed frame has left the block. The register
// map follows the common block-level control layout of HLS-generated cores,
// which the original block was; the exact map is this design's choice:
//
//   0x00 CTRL  bit0 start (write 1; reads 1 until the frame is done)
//              bit1 done  (set when a frame completes, cleared by reading CTRL)
//              bit2 idle  (no frame in progress)
//              bit3 ready (set with done, cleared by reading CTRL)
//              bit7 auto_restart (R/W: start the next frame right after done)
//   0x04 GIE   bit0 global interrupt enable
//   0x08 IER   bit0 enable the frame-done interrupt
//   0x0C ISR   bit0 frame-done status; writing 1 toggles it (clears it)
//   0x10 FRAMES number of frames completed since reset (read only)
//
// Stream gating: in_enable is high while a started frame still expects
// input; the parent counts accepted input beats (in_beat) here, so that at
// most FRAME_PIXELS pixels enter per start. frame_done is a one-cycle pulse
// on the handshake of the frame's last output pixel.
//
// AXI4-Lite: one write and one read in flight; a write takes its address and
// data together; responses are always OKAY. Read data follows the address by
// one cycle.
module canny_ctrl #(
  parameter int AW           = 6,
  parameter int FRAME_PIXELS = 1280 * 720
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite slave
  input  logic [AW-1:0] s_axil_awaddr,
  input  logic          s_axil_awvalid,
  output logic          s_axil_awready,
  input  logic [31:0]   s_axil_wdata,
  input  logic [3:0]    s_axil_wstrb,
  input  logic          s_axil_wvalid,
  output logic          s_axil_wready,
  output logic [1:0]    s_axil_bresp,
  output logic          s_axil_bvalid,
  input  logic          s_axil_bready,
  input  logic [AW-1:0] s_axil_araddr,
  input  logic          s_axil_arvalid,
  output logic          s_axil_arready,
  output logic [31:0]   s_axil_rdata,
  output logic [1:0]    s_axil_rresp,
  output logic          s_axil_rvalid,
  input  logic          s_axil_rready,
  // to the datapath
  output logic          in_enable,
  input  logic          in_beat,
  input  logic          frame_done,
  output logic          interrupt
);

  localparam logic [AW-1:0] A_CTRL   = AW'(6'h00);
  localparam logic [AW-1:0] A_GIE    = AW'(6'h04);
  localparam logic [AW-1:0] A_IER    = AW'(6'h08);
  localparam logic [AW-1:0] A_ISR    = AW'(6'h0C);
  localparam logic [AW-1:0] A_FRAMES = AW'(6'h10);
  localparam int            PW       = $clog2(FRAME_PIXELS + 1);

  logic          busy, done_flag, ready_flag, auto_restart, gie, ier, isr;
  logic [31:0]   frames;
  logic [PW-1:0] in_count;
  logic          wr_fire, rd_fire, start_wr;

  assign s_axil_awready = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_wready  = s_axil_awready;
  assign wr_fire        = s_axil_awready;
  assign s_axil_arready = !s_axil_rvalid;
  assign rd_fire        = s_axil_arvalid && s_axil_arready;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;

  assign start_wr  = wr_fire && s_axil_awaddr == A_CTRL && s_axil_wstrb[0] && s_axil_wdata[0];
  assign in_enable = busy && (in_count != PW'(FRAME_PIXELS));
  assign interrupt = gie && ier && isr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
      busy          <= 1'b0;
      done_flag     <= 1'b0;
      ready_flag    <= 1'b0;
      auto_restart  <= 1'b0;
      gie           <= 1'b0;
      ier           <= 1'b0;
      isr           <= 1'b0;
      frames        <= '0;
      in_count      <= '0;
    end else begin
      // write channel
      if (wr_fire) s_axil_bvalid <= 1'b1;
      else if (s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_fire && s_axil_wstrb[0]) begin
        unique case (s_axil_awaddr)
          A_CTRL:  auto_restart <= s_axil_wdata[7];
          A_GIE:   gie          <= s_axil_wdata[0];
          A_IER:   ier          <= s_axil_wdata[0];
          default: ;
        endcase
      end

      // read channel
      if (rd_fire) begin
        s_axil_rvalid <= 1'b1;
        unique case (s_axil_araddr)
          A_CTRL:   s_axil_rdata <= {24'd0, auto_restart, 3'd0, ready_flag, !busy, done_flag, busy};
          A_GIE:    s_axil_rdata <= {31'd0, gie};
          A_IER:    s_axil_rdata <= {31'd0, ier};
          A_ISR:    s_axil_rdata <= {31'd0, isr};
          A_FRAMES: s_axil_rdata <= frames;
          default:  s_axil_rdata <= '0;
        endcase
      end else if (s_axil_rready) begin
        s_axil_rvalid <= 1'b0;
      end

      // start / done handshake; a frame end wins over a read that clears flags
      if (rd_fire && s_axil_araddr == A_CTRL) begin
        done_flag  <= 1'b0;
        ready_flag <= 1'b0;
      end
      if (in_beat) in_count <= in_count + 1'b1;
      if (frame_done) begin
        done_flag  <= 1'b1;
        ready_flag <= 1'b1;
        frames     <= frames + 1'b1;
        busy       <= auto_restart;
        in_count   <= '0;
      end else if (start_wr && !busy) begin
        busy     <= 1'b1;
        in_count <= '0;
      end

      // interrupt status: set by a frame end, toggled by writing 1
      if (frame_done)
        isr <= 1'b1;
      else if (wr_fire && s_axil_awaddr == A_ISR && s_axil_wstrb[0] && s_axil_wdata[0])
        isr <= !isr;
    end
  end

  // A frame can only end while one is in progress, and input never exceeds a frame.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!frame_done || busy) else $error("canny_ctrl: frame done while idle");
      assert (!in_beat || in_enable) else $error("canny_ctrl: input beat while gated");
    end
  end

endmodule

// tb_line_window: self-checking testbench of line_window.
//
// Streams three 7x5 frames of 16-bit pixels whose value encodes their frame,
// row and column, so every tap of every window can be checked against the
// coordinates it should come from: in-frame taps must carry the pixel at
// (r+dr, c+dc), out-of-frame taps must read 0 with tap_ok clear. win_last
// must mark only the window of the last pixel. Frame 0 runs without stalls
// and must finish within W*H + W + 2 cycles; later frames use random input
// bubbles and random window back-pressure.
module tb_line_window;

  localparam int W = 7;
  localparam int H = 5;
  localparam int N = W * H;
  localparam int FRAMES = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]       in_data;
  logic              in_valid, in_ready;
  logic [8:0][15:0]  win;
  logic [8:0]        tap_ok;
  logic              win_last, win_valid, win_ready;

  line_window #(.DW(16), .WIDTH(W), .HEIGHT(H)) dut (
    .clk, .rst_n, .in_data, .in_valid, .in_ready,
    .win, .tap_ok, .win_last, .win_valid, .win_ready
  );

  int checks = 0, failures = 0;
  int out_frame = 0, out_idx = 0;
  bit stress = 1'b0;
  longint cyc = 0, t_first = -1, t_last = -1;

  function automatic logic [15:0] code(int f, int r, int c);
    return 16'((f + 1) * 4096 + r * 64 + c + 1);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && win_valid && win_ready) begin
      int r, c;
      r = out_idx / W;
      c = out_idx % W;
      for (int dr = -1; dr <= 1; dr++)
        for (int dc = -1; dc <= 1; dc++) begin
          int t;
          bit in_frame;
          logic [15:0] e;
          t = (dr + 1) * 3 + (dc + 1);
          in_frame = (r + dr >= 0) && (r + dr < H) && (c + dc >= 0) && (c + dc < W);
          e = in_frame ? code(out_frame, r + dr, c + dc) : 16'd0;
          checks++;
          if (win[t] !== e || tap_ok[t] !== in_frame) begin
            failures++;
            $display("FAIL: frame %0d r%0d c%0d tap %0d: got %h/%0b expected %h/%0b",
                     out_frame, r, c, t, win[t], tap_ok[t], e, in_frame);
          end
        end
      checks++;
      if (win_last != (out_idx == N - 1)) begin
        failures++;
        $display("FAIL: win_last at %0d", out_idx);
      end
      if (out_frame == 0 && out_idx == N - 1) t_last = cyc;
      if (out_idx == N - 1) begin out_idx = 0; out_frame++; end
      else out_idx++;
    end
  end

  always @(negedge clk) win_ready <= stress ? ($urandom_range(2) != 0) : 1'b1;

  initial begin
    in_valid = 1'b0;
    in_data  = '0;
    win_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      if (f == 1) wait (out_frame == 1);
      stress = (f != 0);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        while (stress && $urandom_range(2) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = code(f, i / W, i % W);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (f == 0 && i == 0) t_first = cyc;
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    wait (out_frame == FRAMES);
    checks++;
    if (t_last - t_first > N + W + 2) begin
      failures++;
      $display("FAIL: frame 0 took %0d cycles", t_last - t_first);
    end
    $display("frame 0 cycles=%0d", t_last - t_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_hysteresis: self-checking testbench of hysteresis.
//
// Streams 3 frames of 12x8 through the block and compares every
// output beat with the frame-level reference model in canny_ref_pkg.
// Frame 0 runs without stalls and checks the cycle count from the first
// input beat to the last output beat (at most 112 cycles: one pixel per
// cycle plus the row-buffer lag and flush). Later frames insert random input
// bubbles and random output back-pressure. The last flag is checked on every
// beat. Inputs: random mix of 0, weak (128) and strong (255) pixels.
module tb_hysteresis;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int W = 12;
  localparam int H = 8;
  localparam int FRAMES = 3;
  localparam int N = W * H;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [8-1:0] in_data;
  logic            in_valid, in_ready;
  logic [8-1:0] out_data;
  logic            out_last, out_valid, out_ready;

  hysteresis #(.WIDTH(W), .HEIGHT(H), .WEAK_VAL(8'd128)) dut (
    .clk, .rst_n, .in_data, .in_valid, .in_ready,
    .out_data, .out_last, .out_valid, .out_ready
  );

  int checks = 0, failures = 0;
  frame_t src [FRAMES];
  frame_t expv [FRAMES];
  int out_frame = 0, out_idx = 0;
  bit stress = 1'b0;
  longint cyc = 0, t_first_in = -1, t_last_out = -1;
  int n_bubbles = 0, n_backpressure = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // Output monitor and back-pressure.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (int'(out_data) != expv[out_frame][out_idx])
        fail($sformatf("frame %0d pixel %0d (r%0d c%0d): got %0d expected %0d",
             out_frame, out_idx, out_idx / W, out_idx % W, out_data, expv[out_frame][out_idx]));
      checks++;
      if (out_last != (out_idx == N - 1))
        fail($sformatf("frame %0d pixel %0d: last=%0b", out_frame, out_idx, out_last));
      if (out_frame == 0 && out_idx == N - 1) t_last_out = cyc;
      if (out_idx == N - 1) begin
        out_idx = 0;
        out_frame++;
      end else begin
        out_idx++;
      end
    end
    if (rst_n && out_valid && !out_ready) n_backpressure++;
  end

  always @(negedge clk) out_ready <= stress ? ($urandom_range(3) != 0) : 1'b1;

  initial begin
    in_valid = 1'b0;
    in_data  = '0;
    out_ready = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      src[f] = new[N];
      for (int i = 0; i < N; i++) begin
        int k;
        k = int'($urandom_range(9));
        src[f][i] = (k < 5) ? 0 : (k < 8) ? 128 : 255;
      end
      expv[f] = ref_hyst(src[f], W, H, 128);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      if (f == 1) wait (out_frame == 1);
      stress = (f != 0);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        while (stress && $urandom_range(3) == 0) begin
          in_valid = 1'b0;
          n_bubbles++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = 8'(src[f][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (f == 0 && i == 0) t_first_in = cyc;
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    wait (out_frame == FRAMES);
    checks++;
    if (t_last_out - t_first_in > 112)
      fail($sformatf("frame 0 took %0d cycles, budget 112", t_last_out - t_first_in));
    checks++;
    if (n_bubbles == 0 || n_backpressure == 0) fail("stalls were not exercised");
    $display("frame 0 cycles=%0d bubbles=%0d backpressure=%0d", t_last_out - t_first_in, n_bubbles, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

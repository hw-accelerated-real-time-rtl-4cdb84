// line_window: row buffers and a 3x3 sliding window over a raster pixel stream.
//
// Every convolution phase of the Canny pipeline needs the 3x3 neighbourhood
// of each pixel while pixels arrive one per beat in raster order. Two row
// memories of WIDTH entries hold the two previous image rows; together with
// the incoming pixel they form one new window column per beat, which is
// shifted into a 3x3 register window. The rows therefore move down the frame
// one row at a time, as the line-buffer scheme of the original design does;
// keeping two stored rows (the third row being the live input) is this
// design's choice.
//
// The window centred on pixel q is complete once pixel q+WIDTH+1 has arrived,
// so the window lags the input by WIDTH+1 beats. After the last pixel of a
// frame the block runs WIDTH+1 flush steps on its own (input not ready) to
// emit the windows of the last row. Each emitted window comes with tap_ok,
// one bit per tap, cleared for neighbours outside the frame; such taps read
// as zero. Tap index = (dr+1)*3 + (dc+1) for row offset dr and column offset
// dc in -1..1; tap 4 is the centre. win_last marks the window centred on the
// last pixel of the frame. Frame borders are found by counting, input last
// flags are not needed.
//
// The row memories are written and read once per step at two different
// addresses (the read fetches the next column ahead of time), so each maps
// onto a simple dual-port block RAM with a registered read; WIDTH >= 2.
//
// Interface: valid/ready on both sides. win_* is a registered output; one
// window per cycle while win_ready is high.
module line_window #(
  parameter int DW     = 8,
  parameter int WIDTH  = 1280,
  parameter int HEIGHT = 720
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [DW-1:0]      in_data,
  input  logic               in_valid,
  output logic               in_ready,
  output logic [8:0][DW-1:0] win,
  output logic [8:0]         tap_ok,
  output logic               win_last,
  output logic               win_valid,
  input  logic               win_ready
);

  localparam int RW = $clog2(HEIGHT + 2);
  localparam int CW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  // Row memory entry: {pixel two rows up, pixel one row up}.
  logic [2*DW-1:0] rows [WIDTH];

  logic [RW-1:0] in_r;     // row of the next input position (HEIGHT, HEIGHT+1 = flush)
  logic [CW-1:0] in_c;
  logic [RW-1:0] out_r;    // centre of the next window to emit
  logic [CW-1:0] out_c;
  logic [RW-1:0] cen_r;    // centre of the window now held
  logic [CW-1:0] cen_c;
  logic [2:0][2:0][DW-1:0] w;  // w[row][col], row 0 = top, col 0 = left

  logic            flush, produce, step, last_step, can_step;
  logic [DW-1:0]   x;
  logic [2*DW-1:0] rd;       // row-memory entry of column in_c, read one step ahead
  logic [CW-1:0]   next_c;   // column of the following step

  assign flush     = (in_r >= RW'(HEIGHT));
  assign can_step  = !win_valid || win_ready;
  assign step      = can_step && (flush || in_valid);
  assign in_ready  = can_step && !flush;
  assign last_step = (in_r == RW'(HEIGHT + 1));
  // A window is complete once WIDTH+1 positions have been taken.
  assign produce   = (in_r >= RW'(1)) && !(in_r == RW'(1) && in_c == '0);
  assign x         = flush ? '0 : in_data;
  assign next_c    = (last_step || in_c == CW'(WIDTH - 1)) ? '0 : in_c + 1'b1;

  // Row memory with a synchronous, enabled read: each step writes column
  // in_c and reads column next_c, a different address, so the memory maps
  // onto a simple dual-port block RAM. The first read after reset is
  // undefined, but it only feeds rows above the frame, which are masked.
  always_ff @(posedge clk) begin
    if (step) begin
      rows[in_c] <= {rd[DW-1:0], x};
      rd         <= rows[next_c];
    end
  end

  // Read-ahead needs two distinct columns.
  if (WIDTH < 2) begin : g_width_check
    $error("line_window: WIDTH must be at least 2");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_r      <= '0;
      in_c      <= '0;
      out_r     <= '0;
      out_c     <= '0;
      cen_r     <= '0;
      cen_c     <= '0;
      win_valid <= 1'b0;
      w         <= '0;
    end else begin
      if (step) begin
        for (int r = 0; r < 3; r++) begin
          w[r][0] <= w[r][1];
          w[r][1] <= w[r][2];
        end
        w[0][2] <= rd[2*DW-1:DW];
        w[1][2] <= rd[DW-1:0];
        w[2][2] <= x;

        if (last_step) begin
          in_r <= '0;
          in_c <= '0;
        end else if (in_c == CW'(WIDTH - 1)) begin
          in_c <= '0;
          in_r <= in_r + 1'b1;
        end else begin
          in_c <= in_c + 1'b1;
        end

        win_valid <= produce;
        if (produce) begin
          cen_r <= out_r;
          cen_c <= out_c;
          if (last_step) begin
            out_r <= '0;
            out_c <= '0;
          end else if (out_c == CW'(WIDTH - 1)) begin
            out_c <= '0;
            out_r <= out_r + 1'b1;
          end else begin
            out_c <= out_c + 1'b1;
          end
        end
      end else if (win_ready) begin
        win_valid <= 1'b0;
      end
    end
  end

  // Which taps of the held window lie inside the frame.
  logic up_ok, dn_ok, lf_ok, rt_ok;
  assign up_ok = (cen_r != '0);
  assign dn_ok = (cen_r != RW'(HEIGHT - 1));
  assign lf_ok = (cen_c != '0);
  assign rt_ok = (cen_c != CW'(WIDTH - 1));

  always_comb begin
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        tap_ok[r*3+c] = (r != 0 || up_ok) && (r != 2 || dn_ok) &&
                        (c != 0 || lf_ok) && (c != 2 || rt_ok);
        win[r*3+c]    = tap_ok[r*3+c] ? w[r][c] : '0;
      end
    end
  end

  assign win_last = (cen_r == RW'(HEIGHT - 1)) && (cen_c == CW'(WIDTH - 1));

endmodule

// axis_skid: two-entry register slice for a valid/ready stream.
//
// Registers data and last, and registers the ready signal towards the source
// as well, so no combinational path crosses the slice in either direction.
// Full throughput: one beat per cycle when the sink is always ready. A beat
// accepted in cycle n appears at the output in cycle n+1 at the earliest.
// The usual stream rule holds on both sides: a presented beat stays unchanged
// until it is taken. This slice is a design choice of this implementation.
module axis_skid #(
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] in_data,
  input  logic          in_last,
  input  logic          in_valid,
  output logic          in_ready,
  output logic [DW-1:0] out_data,
  output logic          out_last,
  output logic          out_valid,
  input  logic          out_ready
);

  logic [DW-1:0] skid_data;
  logic          skid_last;
  logic          skid_full;

  assign in_ready = !skid_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      skid_full <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      skid_data <= '0;
      skid_last <= 1'b0;
    end else begin
      if (!out_valid || out_ready) begin
        // Output register free: fill it from the skid entry first, else from the input.
        if (skid_full) begin
          out_data  <= skid_data;
          out_last  <= skid_last;
          out_valid <= 1'b1;
          skid_full <= 1'b0;
        end else begin
          out_data  <= in_data;
          out_last  <= in_last;
          out_valid <= in_valid;
        end
      end else if (in_valid && in_ready) begin
        // Output stalled: park the incoming beat.
        skid_data <= in_data;
        skid_last <= in_last;
        skid_full <= 1'b1;
      end
    end
  end

  // Stream rule at the output: a beat that was presented and not taken must
  // still be presented, unchanged, in the next cycle.
  logic          was_stalled;
  logic [DW-1:0] stalled_data;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      was_stalled  <= 1'b0;
      stalled_data <= '0;
    end else begin
      was_stalled  <= out_valid && !out_ready;
      stalled_data <= out_data;
      if (was_stalled) begin
        assert (out_valid && out_data == stalled_data)
          else $error("axis_skid: stalled output beat changed");
      end
    end
  end

endmodule

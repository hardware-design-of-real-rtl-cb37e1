// config_regs: configurable registers holding the transform order.
//
// The point select input is sampled on the first sample of every input
// frame (frame_start) and held for the rest of that frame, so an order
// change takes effect exactly at a frame boundary. In the frame_start cycle
// the sampled value is passed through (order), so the input counter knows
// the new frame length from its first sample. order_change pulses for one
// cycle after a frame starts whose order differs from the previous frame;
// nlast is the frame length minus one. The order is
// then carried with each frame through the pipeline, so every stage
// reconfigures its timing and addresses on its own when that frame arrives.
module config_regs
  import fft_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start,
  input  order_t        point_sel,
  output order_t        order,
  output logic [AW-1:0] nlast,
  output logic          order_change
);

  order_t cur_q;
  logic   seen_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q        <= '0;
      seen_q       <= 1'b0;
      order_change <= 1'b0;
    end else begin
      order_change <= frame_start && seen_q && (point_sel != cur_q);
      if (frame_start) begin
        cur_q  <= point_sel;
        seen_q <= 1'b1;
      end
    end
  end

  assign order = frame_start ? point_sel : cur_q;
  assign nlast = order_nlast(order);

endmodule

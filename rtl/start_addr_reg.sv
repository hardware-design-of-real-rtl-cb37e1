// start_addr_reg: start address of the twiddle region of the current order.
//
// When a stage begins a frame (load high) the register takes the first
// twiddle-memory address of that frame's order; it then holds it for the
// whole frame, so the stage's twiddle address is start + offset. During
// the load cycle the new address is passed straight through, so the first
// twiddle read of a frame needs no extra cycle.
module start_addr_reg
  import fft_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  order_t         order,
  output logic [TAW-1:0] start_addr
);

  logic [TAW-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= order_tw_base(order);
  end

  assign start_addr = load ? order_tw_base(order) : q;

endmodule

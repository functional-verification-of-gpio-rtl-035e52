// gpio_pad_if: interface from the GPIO core to the external I/O cells.
//
// Each pad output comes from RGPIO_OUT, or from the auxiliary input aux_i
// where the RGPIO_AUX bit is set, so that other on-chip peripherals can share
// the GPIO pins. Each pad output enable is the RGPIO_OE bit: 1 drives the pad,
// 0 leaves the three-state or open-drain cell released so the pin is an input.
// Both follow the architecture. The block is combinational (this design's
// choice), so a register write reaches the pads in the clock it takes effect.
module gpio_pad_if #(
  parameter int unsigned GPIO_W = 32
) (
  input  logic [GPIO_W-1:0] rgpio_out,
  input  logic [GPIO_W-1:0] rgpio_oe,
  input  logic [GPIO_W-1:0] rgpio_aux,
  input  logic [GPIO_W-1:0] aux_i,
  output logic [GPIO_W-1:0] ext_pad_o,
  output logic [GPIO_W-1:0] ext_padoe_o
);

  always_comb begin
    ext_pad_o   = (rgpio_aux & aux_i) | (~rgpio_aux & rgpio_out);
    ext_padoe_o = rgpio_oe;
  end

endmodule

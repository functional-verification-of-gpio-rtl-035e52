// gpio_irq: interrupt unit of the GPIO core (RGPIO_INTS, RGPIO_CTRL, IRQ).
//
// Every input whose RGPIO_INTE bit is set raises an event on the edge of
// RGPIO_IN chosen by its RGPIO_PTRIG bit: rising when PTRIG = 1, falling when
// PTRIG = 0. While RGPIO_CTRL[INTE] is set, an event sets the input's bit in
// RGPIO_INTS and RGPIO_CTRL[INTS]; these bits stay set until software writes
// them to 0. irq = CTRL[INTE] & CTRL[INTS], so the interrupt is removed either
// by clearing INTS (both the register and the CTRL bit) or by clearing
// CTRL[INTE]. All of this follows the architecture.
//
// This design's choices: an edge is found by comparing RGPIO_IN with its value
// one clock earlier, so INTS and irq rise one clock after RGPIO_IN changes;
// the previous-value register resets to 0; an event in the same clock as a
// software write to INTS or CTRL wins over the write, so none is lost.
// CTRL bit positions are in gpio_pkg (INTE = bit 0, INTS = bit 1). A write
// changes only the bytes its req.be selects (CTRL lives in byte 0).
module gpio_irq
  import gpio_pkg::*;
#(
  parameter int unsigned GPIO_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  reg_req_t          req,
  input  logic [GPIO_W-1:0] rgpio_in,
  input  logic [GPIO_W-1:0] rgpio_inte,
  input  logic [GPIO_W-1:0] rgpio_ptrig,
  output logic [GPIO_W-1:0] rgpio_ints,
  output logic [1:0]        rgpio_ctrl,
  output logic              irq
);

  logic [GPIO_W-1:0] in_q;     // RGPIO_IN one clock earlier
  logic [GPIO_W-1:0] rise, fall, event_v;
  logic              any_event;
  logic [GPIO_W-1:0] ints_mask;  // INTS bits in the written bytes

  assign ints_mask = GPIO_W'(be_mask(req.be));

  assign rise      = rgpio_in & ~in_q;
  assign fall      = ~rgpio_in & in_q;
  assign event_v   = ((rise & rgpio_ptrig) | (fall & ~rgpio_ptrig))
                     & rgpio_inte & {GPIO_W{rgpio_ctrl[CTRL_INTE]}};
  assign any_event = |event_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q       <= '0;
      rgpio_ints <= '0;
      rgpio_ctrl <= '0;
    end else begin
      in_q <= rgpio_in;

      if (req.we && req.idx == REG_INTS)
        rgpio_ints <= (rgpio_ints & ~ints_mask) | (req.wdata[GPIO_W-1:0] & ints_mask)
                      | event_v;
      else
        rgpio_ints <= rgpio_ints | event_v;

      if (req.we && req.idx == REG_CTRL && req.be[0]) begin
        rgpio_ctrl[CTRL_INTE] <= req.wdata[CTRL_INTE];
        rgpio_ctrl[CTRL_INTS] <= req.wdata[CTRL_INTS] | any_event;
      end else begin
        rgpio_ctrl[CTRL_INTS] <= rgpio_ctrl[CTRL_INTS] | any_event;
      end
    end
  end

  assign irq = rgpio_ctrl[CTRL_INTE] & rgpio_ctrl[CTRL_INTS];

endmodule

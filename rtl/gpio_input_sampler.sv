// gpio_input_sampler: registers the general-purpose inputs into RGPIO_IN.
//
// Each input bit is sampled either on the system clock or on an external
// clock reference, gpio_eclk, as selected by its RGPIO_ECLK bit; its RGPIO_NEC
// bit then picks the falling (1) or rising (0) gpio_eclk edge. Two flip-flops
// per bit capture the pad on the rising and on the falling gpio_eclk edge.
// A per-bit multiplexer passes either the pad itself (ECLK = 0) or the chosen
// capture (ECLK = 1), and one system-clock flip-flop per bit forms RGPIO_IN,
// so that the value seen by the bus and the interrupt unit is registered in
// the system clock domain.
//
// Timing: with ECLK = 0 a pad change appears in RGPIO_IN after the next rising
// clk edge. With ECLK = 1 it is first captured on the selected gpio_eclk edge
// and appears after the following rising clk edge. Reset clears all
// flip-flops. The per-bit clock selection follows the architecture; the
// capture-then-register structure is this design's reading of it. There is no
// synchronizer beyond the one register; a system that drives asynchronous
// inputs should add one in front of ext_pad_i.
module gpio_input_sampler #(
  parameter int unsigned GPIO_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              gpio_eclk,
  input  logic [GPIO_W-1:0] ext_pad_i,
  input  logic [GPIO_W-1:0] rgpio_eclk,
  input  logic [GPIO_W-1:0] rgpio_nec,
  output logic [GPIO_W-1:0] rgpio_in
);

  logic [GPIO_W-1:0] pos_cap;   // captured on rising gpio_eclk
  logic [GPIO_W-1:0] neg_cap;   // captured on falling gpio_eclk
  logic [GPIO_W-1:0] in_mux;

  always_ff @(posedge gpio_eclk or negedge rst_n) begin
    if (!rst_n) pos_cap <= '0;
    else        pos_cap <= ext_pad_i;
  end

  always_ff @(negedge gpio_eclk or negedge rst_n) begin
    if (!rst_n) neg_cap <= '0;
    else        neg_cap <= ext_pad_i;
  end

  always_comb begin
    for (int i = 0; i < GPIO_W; i++) begin
      if (!rgpio_eclk[i])    in_mux[i] = ext_pad_i[i];
      else if (rgpio_nec[i]) in_mux[i] = neg_cap[i];
      else                   in_mux[i] = pos_cap[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rgpio_in <= '0;
    else        rgpio_in <= in_mux;
  end

endmodule

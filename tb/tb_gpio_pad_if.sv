// tb_gpio_pad_if: self-checking test of the pad interface.
// Applies random RGPIO_OUT / OE / AUX / aux_i words plus all-zero and all-one
// corner cases and checks every pad output and output enable bit against a
// bit-by-bit expectation: AUX set -> aux input, otherwise RGPIO_OUT.
`timescale 1ns/10ps
module tb_gpio_pad_if;
  localparam int W = 32;
  logic [W-1:0] out, oe, aux, aux_i, pad_o, padoe_o;
  int checks = 0, failures = 0;

  gpio_pad_if #(.GPIO_W(W)) dut (
    .rgpio_out(out), .rgpio_oe(oe), .rgpio_aux(aux), .aux_i(aux_i),
    .ext_pad_o(pad_o), .ext_padoe_o(padoe_o)
  );

  task automatic check_once();
    #1;
    for (int i = 0; i < W; i++) begin
      logic exp_o;
      exp_o = aux[i] ? aux_i[i] : out[i];
      checks++;
      if (pad_o[i] !== exp_o || padoe_o[i] !== oe[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL bit %0d out=%b aux=%b aux_i=%b oe=%b -> pad_o=%b padoe=%b",
                   i, out[i], aux[i], aux_i[i], oe[i], pad_o[i], padoe_o[i]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    out = '0; oe = '0; aux = '0; aux_i = '1; check_once();
    out = '1; oe = '1; aux = '0; aux_i = '0; check_once();
    out = '0; oe = '1; aux = '1; aux_i = '1; check_once();
    out = '1; oe = '0; aux = '1; aux_i = '0; check_once();
    repeat (200) begin
      out = $urandom; oe = $urandom; aux = $urandom; aux_i = $urandom;
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

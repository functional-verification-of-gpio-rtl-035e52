// tb_gpio_top_options: end-to-end test of the core's synthesis options.
// Two cores sit side by side on one APB, each with its own PSEL and PRDATA:
//   core 0: 8-bit host bus, configuration read back disabled
//   core 1: 16-bit host bus, full read back
// For each core the testbench builds 32-bit RGPIO_OE and RGPIO_OUT values from
// byte-lane writes and checks the pads; rewrites one lane and checks that the
// other bytes are kept; reads RGPIO_OUT back (0 on core 0, the value on
// core 1); assembles RGPIO_IN from lane reads; and runs an interrupt on pin 31
// (byte lane 3) through to IRQ and clears it with lane writes to INTS and CTRL.
// Each of these mechanisms is counted and must occur.
`timescale 1ns/10ps
module tb_gpio_top_options;
  import gpio_pkg::*;
  localparam int W = 32;

  logic PCLK = 0, PRESETN = 0;
  logic [1:0] psel = '0;
  logic PENABLE = 0, PWRITE = 0;
  logic [7:0] PADDR = '0;
  logic [31:0] PWDATA = '0;
  logic [7:0]  prd8;
  logic [15:0] prd16;
  logic [1:0]  pready, pslverr, irq;
  logic gpio_eclk = 0;
  logic [W-1:0] aux_i = '0, ext_pad_i = '0;
  logic [W-1:0] pad_o [2], padoe_o [2];

  gpio_top #(.BUS_W(8), .READBACK_EN(1'b0)) dut0 (
    .PCLK, .PRESETN, .PSEL(psel[0]), .PENABLE, .PWRITE, .PADDR, .PWDATA(PWDATA[7:0]),
    .PRDATA(prd8), .PREADY(pready[0]), .PSLVERR(pslverr[0]), .IRQ(irq[0]),
    .gpio_eclk, .aux_i, .ext_pad_i, .ext_pad_o(pad_o[0]), .ext_padoe_o(padoe_o[0])
  );
  gpio_top #(.BUS_W(16), .READBACK_EN(1'b1)) dut1 (
    .PCLK, .PRESETN, .PSEL(psel[1]), .PENABLE, .PWRITE, .PADDR, .PWDATA(PWDATA[15:0]),
    .PRDATA(prd16), .PREADY(pready[1]), .PSLVERR(pslverr[1]), .IRQ(irq[1]),
    .gpio_eclk, .aux_i, .ext_pad_i, .ext_pad_o(pad_o[1]), .ext_padoe_o(padoe_o[1])
  );

  always #5 PCLK = ~PCLK;

  int checks = 0, failures = 0;
  int n_lane_write = 0, n_partial = 0, n_readback_on = 0, n_readback_off = 0;
  int n_lane_read = 0, n_irq = 0;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s got %h exp %h", $time, what, got, exp);
    end
  endtask

  function automatic int lanes_of(int k);
    return (k == 0) ? 1 : 2;
  endfunction

  task automatic apb(int k, bit wr, logic [7:0] a, logic [31:0] d, output logic [31:0] rd);
    @(negedge PCLK);
    psel[k] = 1; PENABLE = 0; PWRITE = wr; PADDR = a; PWDATA = d;
    @(negedge PCLK);
    PENABLE = 1;
    #1;
    rd = (k == 0) ? 32'(prd8) : 32'(prd16);
    chk("pslverr", 32'(pslverr[k]), 0);
    @(negedge PCLK);
    psel = '0; PENABLE = 0;
  endtask

  // full 32-bit register write, one lane group at a time
  task automatic wr32(int k, reg_idx_e r, logic [31:0] d);
    logic [31:0] rd;
    int l = lanes_of(k);
    for (int g = 0; g < 4 / l; g++)
      apb(k, 1, 8'(4 * r + g * l), 32'(d >> (8 * l * g)), rd);
  endtask

  task automatic rd32(int k, reg_idx_e r, output logic [31:0] v);
    logic [31:0] rd;
    int l = lanes_of(k);
    v = '0;
    for (int g = 0; g < 4 / l; g++) begin
      apb(k, 0, 8'(4 * r + g * l), '0, rd);
      v |= rd << (8 * l * g);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, o, e, rd;
    int lat;
    #22 PRESETN = 1;
    for (int k = 0; k < 2; k++) begin
      // lane writes build full registers
      o = $urandom; e = $urandom;
      wr32(k, REG_OE, e);
      wr32(k, REG_OUT, o);
      chk("pads", pad_o[k], o);
      chk("enables", padoe_o[k], e);
      n_lane_write++;
      // one lane rewritten, the rest kept
      apb(k, 1, 8'(4 * REG_OUT + 2), 32'h0000_005A, rd);
      o[23:16] = 8'h5A;
      if (k == 1) o[31:24] = 8'h00;            // 16-bit lane group covers bytes 2-3
      chk("partial write", pad_o[k], o);
      n_partial++;
      // read back of a configuration register
      rd32(k, REG_OUT, v);
      if (k == 0) begin
        chk("readback disabled", v, '0);
        n_readback_off++;
      end else begin
        chk("readback enabled", v, o);
        n_readback_on++;
      end
      // RGPIO_IN assembled from lanes
      wr32(k, REG_OE, '0);
      ext_pad_i = $urandom;
      repeat (2) @(negedge PCLK);
      rd32(k, REG_IN, v);
      chk("lane read of IN", v, ext_pad_i);
      n_lane_read++;
      // interrupt on pin 31, rising edge
      ext_pad_i[31] = 1'b0;
      repeat (3) @(negedge PCLK);
      wr32(k, REG_PTRIG, 32'h8000_0000);
      wr32(k, REG_INTE,  32'h8000_0000);
      wr32(k, REG_INTS,  32'h0);
      apb(k, 1, 8'(4 * REG_CTRL), 32'h1, rd);
      ext_pad_i[31] = 1'b1;
      lat = 0;
      while (!irq[k] && lat < 10) begin @(posedge PCLK); #1 lat++; end
      chk("irq latency", lat, 2);
      rd32(k, REG_INTS, v);
      chk("ints", v, 32'h8000_0000);
      // clear INTS through the lane group that holds bit 31, then CTRL[INTS]
      apb(k, 1, 8'(4 * REG_INTS + 4 - lanes_of(k)), 32'h0, rd);
      chk("irq held by CTRL[INTS]", 32'(irq[k]), 1);
      apb(k, 1, 8'(4 * REG_CTRL), 32'h1, rd);
      chk("irq cleared", 32'(irq[k]), 0);
      rd32(k, REG_INTS, v);
      chk("ints cleared", v, 0);
      n_irq++;
      wr32(k, REG_INTE, '0);
      apb(k, 1, 8'(4 * REG_CTRL), 32'h0, rd);
      ext_pad_i = '0;
    end
    $display("mechanisms: lane_write=%0d partial=%0d readback_on=%0d readback_off=%0d lane_read=%0d irq=%0d",
             n_lane_write, n_partial, n_readback_on, n_readback_off, n_lane_read, n_irq);
    checks += 6;
    if (n_lane_write == 0) failures++;
    if (n_partial == 0) failures++;
    if (n_readback_on == 0) failures++;
    if (n_readback_off == 0) failures++;
    if (n_lane_read == 0) failures++;
    if (n_irq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

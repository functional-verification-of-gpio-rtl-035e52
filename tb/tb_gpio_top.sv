// tb_gpio_top: end-to-end test of the GPIO core at its default size
// (32 I/O signals, 8-bit PADDR), driven only through its APB port, pads,
// auxiliary inputs and gpio_eclk.
//
// Phases, each counted as a mechanism that must occur at least once:
//   reset      all outputs disabled, registers 0, IRQ low
//   write/read every register written and read back over APB (random data,
//              random order), compared with a shadow copy
//   output     RGPIO_OE / RGPIO_OUT drive ext_pad_o / ext_padoe_o
//   aux        RGPIO_AUX hands pads to aux_i
//   polled     ext_pad_i read through RGPIO_IN on the system clock
//   eclk_rise  inputs captured on the rising gpio_eclk edge (NEC = 0)
//   eclk_fall  inputs captured on the falling gpio_eclk edge (NEC = 1)
//   irq_rise   IRQ on a rising input edge (PTRIG = 1), two clocks after the
//              pad changes, INTS bit set
//   irq_fall   IRQ on a falling input edge (PTRIG = 0)
//   clr_ints   IRQ removed by writing 0 to INTS and CTRL[INTS]
//   clr_inte   IRQ removed by clearing CTRL[INTE]
//   masked     edges on inputs with INTE = 0 raise nothing
//   bidir      one pin toggled between output and input mode
//   slverr     PSLVERR on a write to RGPIO_IN and on an unmapped address
`timescale 1ns/10ps
module tb_gpio_top;
  import gpio_pkg::*;
  localparam int W = 32;

  logic PCLK = 0, PRESETN = 0;
  logic PSEL = 0, PENABLE = 0, PWRITE = 0;
  logic [7:0] PADDR = '0;
  logic [31:0] PWDATA = '0, PRDATA;
  logic PREADY, PSLVERR, IRQ;
  logic gpio_eclk = 0;
  logic [W-1:0] aux_i = '0, ext_pad_i = '0, ext_pad_o, ext_padoe_o;

  gpio_top dut (.*);

  always #5 PCLK = ~PCLK;

  int checks = 0, failures = 0;
  typedef enum int {M_RESET, M_RW, M_OUTPUT, M_AUX, M_POLLED, M_ECLK_RISE,
                    M_ECLK_FALL, M_IRQ_RISE, M_IRQ_FALL, M_CLR_INTS, M_CLR_INTE,
                    M_MASKED, M_BIDIR, M_SLVERR, M_COUNT} mech_e;
  int seen [M_COUNT];
  string mech_name [M_COUNT] = '{"reset", "write/read", "output", "aux", "polled",
      "eclk_rise", "eclk_fall", "irq_rise", "irq_fall", "clr_ints", "clr_inte",
      "masked", "bidir", "slverr"};

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s got %h exp %h", $time, what, got, exp);
    end
  endtask

  // APB master: setup on one negedge, access on the next
  task automatic apb(bit wr, logic [7:0] a, logic [31:0] d, output logic [31:0] rd,
                     output logic err);
    @(negedge PCLK);
    PSEL = 1; PENABLE = 0; PWRITE = wr; PADDR = a; PWDATA = d;
    @(negedge PCLK);
    PENABLE = 1;
    #1;
    rd = PRDATA; err = PSLVERR;
    @(negedge PCLK);
    PSEL = 0; PENABLE = 0;
  endtask

  task automatic wr(reg_idx_e r, logic [31:0] d);
    logic [31:0] rd; logic err;
    apb(1, 8'(4 * r), d, rd, err);
    chk($sformatf("write %s err", r.name()), 32'(err), 0);
  endtask

  task automatic rd_chk(reg_idx_e r, logic [31:0] exp);
    logic [31:0] rd; logic err;
    apb(0, 8'(4 * r), '0, rd, err);
    chk($sformatf("read %s", r.name()), rd, exp);
    chk("read err", 32'(err), 0);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] shadow [NUM_REGS];
    logic [31:0] rd, a, b;
    logic err;
    int lat;

    #22 PRESETN = 1;

    // ---- reset state
    chk("reset padoe", ext_padoe_o, '0);
    chk("reset irq", 32'(IRQ), 0);
    for (int r = 0; r < NUM_REGS; r++) rd_chk(reg_idx_e'(r), '0);
    seen[M_RESET]++;

    // ---- write/read of every writable register (CTRL last bits only)
    for (int r = 0; r < NUM_REGS; r++) shadow[r] = '0;
    repeat (200) begin
      reg_idx_e r;
      r = reg_idx_e'($urandom_range(1, NUM_REGS - 1));
      if (r inside {REG_CTRL, REG_INTS, REG_INTE}) continue;  // keep interrupts off
      if ($urandom_range(0, 1) == 1) begin
        logic [31:0] d;
        d = $urandom;
        wr(r, d);
        shadow[r] = d;
      end else begin
        rd_chk(r, shadow[r]);
      end
      seen[M_RW]++;
    end
    for (int r = 1; r < NUM_REGS; r++)
      if (!(reg_idx_e'(r) inside {REG_CTRL, REG_INTS, REG_INTE})) rd_chk(reg_idx_e'(r), shadow[r]);

    // ---- output mode
    wr(REG_AUX, 0); wr(REG_ECLK, 0); wr(REG_NEC, 0);
    a = $urandom; b = $urandom;
    wr(REG_OE, b); wr(REG_OUT, a);
    chk("output pads", ext_pad_o, a);
    chk("output enables", ext_padoe_o, b);
    seen[M_OUTPUT]++;

    // ---- auxiliary inputs on the upper half
    aux_i = $urandom;
    wr(REG_AUX, 32'hFFFF_0000);
    chk("aux pads", ext_pad_o, {aux_i[31:16], a[15:0]});
    aux_i = ~aux_i;
    #1 chk("aux follows aux_i", ext_pad_o, {aux_i[31:16], a[15:0]});
    seen[M_AUX]++;
    wr(REG_AUX, 0);
    wr(REG_OE, 0);
    chk("inputs released", ext_padoe_o, '0);

    // ---- polled input, system clock
    repeat (4) begin
      ext_pad_i = $urandom;
      rd_chk(REG_IN, ext_pad_i);
      seen[M_POLLED]++;
    end

    // ---- external clock, rising edge
    wr(REG_ECLK, '1); wr(REG_NEC, '0);
    ext_pad_i = 32'hA5A5_1234;
    #3 gpio_eclk = 1;
    #3 ext_pad_i = 32'h0F0F_F0F0;
    #3 gpio_eclk = 0;                     // falling edge ignored
    repeat (3) @(negedge PCLK);
    rd_chk(REG_IN, 32'hA5A5_1234);
    seen[M_ECLK_RISE]++;

    // ---- external clock, falling edge
    wr(REG_NEC, '1);
    #3 gpio_eclk = 1;                     // rising edge ignored
    #3 ext_pad_i = 32'h1357_9BDF;
    #3 gpio_eclk = 0;
    #3 ext_pad_i = 32'hFFFF_FFFF;
    #3 gpio_eclk = 1;
    repeat (3) @(negedge PCLK);
    rd_chk(REG_IN, 32'h1357_9BDF);
    seen[M_ECLK_FALL]++;

    // ---- per-bit mixture: low byte system clock, next rising, next falling
    wr(REG_ECLK, 32'h00FF_FF00); wr(REG_NEC, 32'h00FF_0000);
    gpio_eclk = 0;
    ext_pad_i = 32'h0011_2233;
    #3 gpio_eclk = 1;                     // bytes 1 capture 0x22
    #3 ext_pad_i = 32'h0044_5566;
    #3 gpio_eclk = 0;                     // byte 2 captures 0x44
    #3 ext_pad_i = 32'h0077_8899;
    repeat (3) @(negedge PCLK);
    rd_chk(REG_IN, 32'h0044_2299);
    wr(REG_ECLK, 0); wr(REG_NEC, 0);
    ext_pad_i = '0;
    repeat (3) @(negedge PCLK);

    // ---- interrupt on rising edge, bit 5
    wr(REG_PTRIG, 32'h0000_0020);
    wr(REG_INTE,  32'h0000_0060);
    wr(REG_INTS,  0);
    wr(REG_CTRL,  32'h1);
    chk("irq idle", 32'(IRQ), 0);
    ext_pad_i[6] = 1'b1;                  // rising edge on bit 6: PTRIG = 0, ignored
    repeat (4) @(negedge PCLK);
    chk("irq ignores rising on falling-trigger bit", 32'(IRQ), 0);
    ext_pad_i[5] = 1'b1;
    lat = 0;
    while (!IRQ && lat < 10) begin @(posedge PCLK); #1 lat++; end
    chk("irq latency", lat, 2);
    rd_chk(REG_INTS, 32'h20);
    rd_chk(REG_CTRL, 32'h3);
    seen[M_IRQ_RISE]++;

    // ---- clear by INTS and CTRL[INTS]
    wr(REG_INTS, 0);
    chk("irq still set until CTRL[INTS] cleared", 32'(IRQ), 1);
    wr(REG_CTRL, 32'h1);
    chk("irq cleared", 32'(IRQ), 0);
    seen[M_CLR_INTS]++;

    // ---- masked input: bit 9 has INTE = 0
    ext_pad_i[9] = 1'b1;
    repeat (3) @(negedge PCLK);
    ext_pad_i[9] = 1'b0;
    repeat (3) @(negedge PCLK);
    chk("masked bit raises nothing", 32'(IRQ), 0);
    rd_chk(REG_INTS, 0);
    seen[M_MASKED]++;

    // ---- interrupt on falling edge, bit 6
    ext_pad_i[6] = 1'b0;
    lat = 0;
    while (!IRQ && lat < 10) begin @(posedge PCLK); #1 lat++; end
    chk("irq falling latency", lat, 2);
    rd_chk(REG_INTS, 32'h40);
    seen[M_IRQ_FALL]++;

    // ---- clear by CTRL[INTE]
    wr(REG_CTRL, 32'h2);
    chk("irq off by INTE", 32'(IRQ), 0);
    rd_chk(REG_INTS, 32'h40);             // status kept
    seen[M_CLR_INTE]++;
    wr(REG_INTS, 0); wr(REG_CTRL, 0); wr(REG_INTE, 0);

    ext_pad_i = '0;
    // ---- bi-directional pin 0
    wr(REG_OUT, 32'h1);
    wr(REG_OE, 32'h1);
    chk("bidir drive", {30'b0, ext_padoe_o[0], ext_pad_o[0]}, 32'h3);
    wr(REG_OE, 32'h0);
    chk("bidir release", 32'(ext_padoe_o[0]), 0);
    ext_pad_i[0] = 1'b1;
    rd_chk(REG_IN, 32'h1);
    ext_pad_i[0] = 1'b0;
    rd_chk(REG_IN, 32'h0);
    seen[M_BIDIR]++;

    // ---- bus errors
    apb(1, 8'h00, 32'hFFFF_FFFF, rd, err);
    chk("slverr write IN", 32'(err), 1);
    apb(0, 8'h40, 0, rd, err);
    chk("slverr unmapped", 32'(err), 1);
    rd_chk(REG_OUT, 32'h1);               // nothing disturbed
    seen[M_SLVERR]++;

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-10s occurred %0d times", mech_name[m], seen[m]);
      checks++;
      if (seen[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

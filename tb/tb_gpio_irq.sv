// tb_gpio_irq: self-checking test of the interrupt unit.
// Drives RGPIO_IN, INTE and PTRIG directly and writes CTRL and INTS through
// the request bundle. A reference model recomputes, every clock, the edge
// events (rising for PTRIG = 1, falling for PTRIG = 0, gated by INTE and
// CTRL[INTE]), the sticky INTS bits, CTRL[INTS] and IRQ, with events winning
// over a simultaneous software write. Directed phases check the one-clock
// latency from an RGPIO_IN edge to IRQ, both ways of removing the interrupt
// (clear INTS + CTRL[INTS], or clear CTRL[INTE]) and that nothing is recorded
// while CTRL[INTE] is 0; a random phase then mixes everything, including
// writes that enable only some bytes of INTS or CTRL.
`timescale 1ns/10ps
module tb_gpio_irq;
  import gpio_pkg::*;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  reg_req_t req;
  logic [W-1:0] in_v, inte, ptrig, ints;
  logic [1:0] ctrl;
  logic irq;
  logic [W-1:0] m_prev, m_ints;
  logic [1:0] m_ctrl;
  int checks = 0, failures = 0;

  gpio_irq #(.GPIO_W(W)) dut (
    .clk, .rst_n, .req, .rgpio_in(in_v), .rgpio_inte(inte), .rgpio_ptrig(ptrig),
    .rgpio_ints(ints), .rgpio_ctrl(ctrl), .irq
  );

  always #5 clk = ~clk;

  // reference model, updated on the same edge as the DUT
  always @(posedge clk) if (rst_n) begin
    logic [W-1:0] ev;
    ev = '0;
    for (int i = 0; i < W; i++)
      if (inte[i] && m_ctrl[0] &&
          ((ptrig[i] && in_v[i] && !m_prev[i]) || (!ptrig[i] && !in_v[i] && m_prev[i])))
        ev[i] = 1'b1;
    m_prev <= in_v;
    m_ints <= ((req.we && req.idx == REG_INTS)
               ? ((m_ints & ~be_mask(req.be)) | (req.wdata[W-1:0] & be_mask(req.be)))
               : m_ints) | ev;
    if (req.we && req.idx == REG_CTRL && req.be[0]) m_ctrl <= {req.wdata[1] | (|ev), req.wdata[0]};
    else                               m_ctrl <= {m_ctrl[1] | (|ev), m_ctrl[0]};
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s got %h exp %h", $time, what, got, exp);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    chk("ints", ints, m_ints);
    chk("ctrl", 32'(ctrl), 32'(m_ctrl));
    chk("irq", 32'(irq), 32'(m_ctrl[0] & m_ctrl[1]));
  end

  task automatic wr(reg_idx_e idx, logic [31:0] d);
    @(negedge clk);
    req.we = 1'b1; req.idx = idx; req.be = 4'hF; req.wdata = d;
    @(negedge clk);
    req.we = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; in_v = '0; inte = '0; ptrig = '0;
    m_prev = '0; m_ints = '0; m_ctrl = '0;
    #12 rst_n = 1;
    // edges with CTRL[INTE] = 0 are not recorded
    inte = '1; ptrig = '1;
    @(negedge clk) in_v = 32'h0000_00FF;
    repeat (2) @(negedge clk);
    chk("masked ints", ints, '0);
    chk("masked irq", 32'(irq), 0);
    // enable; rising edge on bit 3 with PTRIG set -> IRQ one clock later
    wr(REG_CTRL, 32'h1);
    in_v = '0;
    repeat (2) @(negedge clk);          // falling edges ignored with PTRIG = 1
    chk("no irq on falling", 32'(irq), 0);
    in_v[3] = 1'b1;                      // edge seen by RGPIO_IN now
    @(negedge clk);
    chk("irq after 1 clk", 32'(irq), 1);
    chk("ints bit 3", ints, 32'h8);
    // clear by writing 0 to INTS and CTRL[INTS]
    wr(REG_INTS, 32'h0);
    wr(REG_CTRL, 32'h1);
    chk("irq cleared", 32'(irq), 0);
    // falling edge with PTRIG = 0 on bit 3
    ptrig[3] = 1'b0;
    @(negedge clk) in_v[3] = 1'b0;
    @(negedge clk);
    chk("irq falling", 32'(irq), 1);
    // clear by disabling CTRL[INTE]
    wr(REG_CTRL, 32'h2);
    chk("irq off by INTE", 32'(irq), 0);
    // random mixture
    repeat (2000) begin
      @(negedge clk);
      in_v  = $urandom;
      if ($urandom_range(0, 9) == 0) inte  = $urandom;
      if ($urandom_range(0, 9) == 0) ptrig = $urandom;
      req.we = ($urandom_range(0, 7) == 0);
      req.idx = ($urandom_range(0, 1) == 1) ? REG_CTRL : REG_INTS;
      req.wdata = ($urandom_range(0, 1) == 1) ? $urandom : 32'h1;
      req.be = ($urandom_range(0, 1) == 1) ? 4'hF : 4'($urandom);
    end
    @(negedge clk) req.we = 1'b0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

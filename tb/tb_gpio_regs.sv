// tb_gpio_regs: self-checking test of the configuration register file.
// Two instances share one request bundle: one with read back of every
// register (the default) and one with configuration read back disabled.
// Checks the reset values (all I/O in input mode, interrupts masked, system
// clock sampling), then performs random writes, with random byte enables, to
// random registers, including the read-only IN and the externally held
// CTRL/INTS indices. After each write the register outputs of both instances
// must match a shadow copy kept by the testbench, the full read back must
// return every register, and the reduced one must return 0 for the seven
// configuration registers but IN, CTRL and INTS as they are. Writes take
// effect one clock after the strobe.
`timescale 1ns/10ps
module tb_gpio_regs;
  import gpio_pkg::*;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  reg_req_t req;
  logic [W-1:0] in_v, ints_v;
  logic [1:0] ctrl_v;
  logic [31:0] rdata, rdata_nr;
  logic [W-1:0] q_out, q_oe, q_inte, q_ptrig, q_aux, q_eclk, q_nec;
  logic [W-1:0] n_out, n_oe, n_inte, n_ptrig, n_aux, n_eclk, n_nec;
  logic [31:0] shadow [NUM_REGS];
  int checks = 0, failures = 0;

  gpio_regs #(.GPIO_W(W)) dut (
    .clk, .rst_n, .req, .rgpio_in(in_v), .rgpio_ints(ints_v), .rgpio_ctrl(ctrl_v),
    .rdata, .rgpio_out(q_out), .rgpio_oe(q_oe), .rgpio_inte(q_inte),
    .rgpio_ptrig(q_ptrig), .rgpio_aux(q_aux), .rgpio_eclk(q_eclk), .rgpio_nec(q_nec)
  );

  gpio_regs #(.GPIO_W(W), .READBACK_EN(1'b0)) dut_nr (
    .clk, .rst_n, .req, .rgpio_in(in_v), .rgpio_ints(ints_v), .rgpio_ctrl(ctrl_v),
    .rdata(rdata_nr), .rgpio_out(n_out), .rgpio_oe(n_oe), .rgpio_inte(n_inte),
    .rgpio_ptrig(n_ptrig), .rgpio_aux(n_aux), .rgpio_eclk(n_eclk), .rgpio_nec(n_nec)
  );

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic check_all();
    chk("out",   q_out,   shadow[REG_OUT]);
    chk("oe",    q_oe,    shadow[REG_OE]);
    chk("inte",  q_inte,  shadow[REG_INTE]);
    chk("ptrig", q_ptrig, shadow[REG_PTRIG]);
    chk("aux",   q_aux,   shadow[REG_AUX]);
    chk("eclk",  q_eclk,  shadow[REG_ECLK]);
    chk("nec",   q_nec,   shadow[REG_NEC]);
    chk("nr out", n_out, shadow[REG_OUT]);
    chk("nr oe",  n_oe,  shadow[REG_OE]);
    chk("nr nec", n_nec, shadow[REG_NEC]);
    for (int r = 0; r < NUM_REGS; r++) begin
      logic [31:0] exp, exp_nr;
      req.idx = reg_idx_e'(r);
      #1;
      case (reg_idx_e'(r))
        REG_IN:   exp = in_v;
        REG_CTRL: exp = {30'b0, ctrl_v};
        REG_INTS: exp = ints_v;
        default:  exp = shadow[r];
      endcase
      exp_nr = (reg_idx_e'(r) inside {REG_IN, REG_CTRL, REG_INTS}) ? exp : '0;
      chk($sformatf("read idx %0d", r), rdata, exp);
      chk($sformatf("no-readback read idx %0d", r), rdata_nr, exp_nr);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    in_v = 32'h1234_5678; ints_v = 32'h0F0F_0F0F; ctrl_v = 2'b10;
    for (int r = 0; r < NUM_REGS; r++) shadow[r] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    check_all();                                   // reset values
    repeat (400) begin
      int r;
      logic [31:0] d, m;
      logic [3:0] be;
      @(negedge clk);
      r = $urandom_range(0, NUM_REGS - 1);
      d = $urandom;
      be = ($urandom_range(0, 1) == 1) ? 4'hF : 4'($urandom);
      req.we = 1'b1; req.idx = reg_idx_e'(r); req.be = be; req.wdata = d;
      in_v = $urandom; ints_v = $urandom; ctrl_v = 2'($urandom);
      @(posedge clk);
      #1 req.we = 1'b0;
      m = be_mask(be);
      if (!(reg_idx_e'(r) inside {REG_IN, REG_CTRL, REG_INTS}))
        shadow[r] = (shadow[r] & ~m) | (d & m);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

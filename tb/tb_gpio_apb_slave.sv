// tb_gpio_apb_slave: self-checking test of the APB slave front end.
// A bus-functional master performs two-cycle APB transfers (setup, access) on
// three slaves at once: the default 32-bit bus and the 16- and 8-bit bus
// options, sharing the control and address lines. The register side of each
// is stubbed: rdata is a word with a different value in every byte, computed
// from the requested index, so every read checks the address decode and the
// byte lane selection. Per slave the testbench works out independently
// whether the access is legal (aligned to the bus width, inside the ten
// registers, no write to RGPIO_IN) and checks: PREADY = 1; PSLVERR; that a
// legal write gives exactly one req.we strobe, in the access phase, with the
// right index, byte enables and data in the right lanes; that an illegal one
// gives none; that reads return the addressed bytes in the access phase.
`timescale 1ns/10ps
module tb_gpio_apb_slave;
  import gpio_pkg::*;
  localparam int AW = 8;
  logic PCLK = 0, PRESETN = 0;
  logic PSEL, PENABLE, PWRITE;
  logic [AW-1:0] PADDR;
  logic [31:0] PWDATA;
  logic [31:0] prdata [3];
  logic [31:0] prd32;
  logic [15:0] prd16;
  logic [7:0]  prd8;
  logic        pready [3], pslverr [3];
  reg_req_t    req [3];
  int checks = 0, failures = 0;
  int strobes [3];
  localparam int BW [3] = '{32, 16, 8};

  function automatic logic [31:0] stub(reg_idx_e idx);
    return 32'h3322_1100 ^ {4{4'hA, idx}};
  endfunction

  gpio_apb_slave #(.ADDR_W(AW), .BUS_W(32)) dut32 (
    .PCLK, .PRESETN, .PSEL, .PENABLE, .PWRITE, .PADDR, .PWDATA(PWDATA),
    .PRDATA(prd32), .PREADY(pready[0]), .PSLVERR(pslverr[0]), .req(req[0]),
    .rdata(stub(req[0].idx))
  );
  gpio_apb_slave #(.ADDR_W(AW), .BUS_W(16)) dut16 (
    .PCLK, .PRESETN, .PSEL, .PENABLE, .PWRITE, .PADDR, .PWDATA(PWDATA[15:0]),
    .PRDATA(prd16), .PREADY(pready[1]), .PSLVERR(pslverr[1]), .req(req[1]),
    .rdata(stub(req[1].idx))
  );
  gpio_apb_slave #(.ADDR_W(AW), .BUS_W(8)) dut8 (
    .PCLK, .PRESETN, .PSEL, .PENABLE, .PWRITE, .PADDR, .PWDATA(PWDATA[7:0]),
    .PRDATA(prd8), .PREADY(pready[2]), .PSLVERR(pslverr[2]), .req(req[2]),
    .rdata(stub(req[2].idx))
  );

  assign prdata[0] = prd32;
  assign prdata[1] = 32'(prd16);
  assign prdata[2] = 32'(prd8);

  always #5 PCLK = ~PCLK;

  always @(posedge PCLK)
    for (int k = 0; k < 3; k++) if (req[k].we) strobes[k]++;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s got %h exp %h", $time, what, got, exp);
    end
  endtask

  function automatic bit is_err(int k, bit wr, logic [AW-1:0] a);
    int lanes = BW[k] / 8;
    return (32'(a[1:0]) % lanes != 0) || (32'(a[AW-1:2]) >= NUM_REGS)
           || (wr && a[AW-1:2] == 0);
  endfunction

  // one APB transfer, checked on all three slaves
  task automatic xfer(bit wr, logic [AW-1:0] a, logic [31:0] d);
    int s0 [3];
    PSEL = 1; PENABLE = 0; PWRITE = wr; PADDR = a; PWDATA = d;
    @(negedge PCLK);
    for (int k = 0; k < 3; k++) chk($sformatf("bus%0d no strobe in setup", BW[k]), 32'(req[k].we), 0);
    PENABLE = 1;
    #1;
    for (int k = 0; k < 3; k++) begin
      bit err = is_err(k, wr, a);
      int lanes = BW[k] / 8;
      int off = 32'(a[1:0]);
      string n = $sformatf("bus%0d", BW[k]);
      chk({n, " pready"}, 32'(pready[k]), 1);
      chk({n, " pslverr"}, 32'(pslverr[k]), 32'(err));
      if (wr) begin
        chk({n, " we"}, 32'(req[k].we), 32'(!err));
        if (!err) begin
          chk({n, " idx"}, 32'(req[k].idx), 32'(a[AW-1:2]));
          chk({n, " be"}, 32'(req[k].be), ((1 << lanes) - 1) << off);
          for (int b = 0; b < lanes; b++)
            chk({n, " wdata lane"}, 32'(req[k].wdata[8*(off+b) +: 8]), 32'(d[8*b +: 8]));
        end
      end else begin
        logic [31:0] exp;
        chk({n, " no we on read"}, 32'(req[k].we), 0);
        exp = err ? '0 : stub(reg_idx_e'(a[5:2])) >> (8 * off);
        if (lanes < 4) exp &= (32'h1 << (8 * lanes)) - 1;
        chk({n, " read data"}, prdata[k], exp);
      end
      s0[k] = strobes[k];
    end
    @(negedge PCLK);
    for (int k = 0; k < 3; k++)
      chk($sformatf("bus%0d strobe count", BW[k]), 32'(strobes[k] - s0[k]),
          32'(wr && !is_err(k, wr, a)));
    PENABLE = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) strobes[k] = 0;
    PSEL = 0; PENABLE = 0; PWRITE = 0; PADDR = '0; PWDATA = '0;
    #12 PRESETN = 1;
    @(negedge PCLK);
    // idle: nothing happens, PRDATA is 0
    for (int k = 0; k < 3; k++) begin
      chk("idle prdata", prdata[k], 0);
      chk("idle pslverr", 32'(pslverr[k]), 0);
    end
    // every byte address of every register, write then read, back to back
    for (int a = 0; a < 4 * NUM_REGS; a++) xfer(1, AW'(a), $urandom);
    for (int a = 0; a < 4 * NUM_REGS; a++) xfer(0, AW'(a), '0);
    // errors beyond the map
    xfer(1, 8'h28, 32'h1);
    xfer(0, 8'hFC, 32'h0);
    // random traffic with idle gaps
    repeat (400) begin
      logic [AW-1:0] a;
      a = AW'($urandom_range(0, 4 * 12 - 1));
      xfer(($urandom_range(0, 1) == 1), a, $urandom);
      if ($urandom_range(0, 1) == 1) begin
        PSEL = 0;
        @(negedge PCLK);
      end
    end
    PSEL = 0;
    @(negedge PCLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

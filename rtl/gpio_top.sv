// gpio_top: general-purpose I/O controller with an APB host interface.
//
// Software programs each of GPIO_W I/O signals through ten registers (see
// gpio_pkg): input, output, bi-directional, or output driven by an auxiliary
// on-chip peripheral, with optional interrupts on a chosen input edge and
// optional input sampling on an external clock reference gpio_eclk.
//
// Structure, as in the architecture: APB slave -> register file -> pad
// interface, with the auxiliary inputs joining on the way to the pads; the
// input sampler feeds RGPIO_IN to the register file and to the interrupt unit.
//   gpio_apb_slave      APB decode, PREADY = 1, PSLVERR on bad access
//   gpio_regs           OUT, OE, INTE, PTRIG, AUX, ECLK, NEC and read mux
//   gpio_input_sampler  RGPIO_IN, per bit on clk or a gpio_eclk edge
//   gpio_irq            INTS, CTRL and IRQ
//   gpio_pad_if         aux multiplexing and output enables
//
// Synthesis options, as the core offers them: the number of I/O signals
// (GPIO_W), the host bus width (BUS_W = 8, 16 or 32; a narrower bus reaches
// the 32-bit registers one byte lane group at a time) and CPU read back of
// the configuration registers (READBACK_EN). The defaults are the main
// configuration: 32 I/O signals on a 32-bit APB with full read back.
//
// Timing (PCLK cycles): a write takes effect at the edge ending its access
// phase; a pad input reaches RGPIO_IN one clock later (clock-domain sampling),
// and IRQ rises one clock after that. All registers except the two gpio_eclk
// capture flip-flops per bit are in the PCLK domain; PRESETN resets both
// domains asynchronously. The I/O cells themselves are outside the core:
// ext_pad_i, ext_pad_o and ext_padoe_o (1 = drive) connect to them.
module gpio_top
  import gpio_pkg::*;
#(
  parameter int unsigned GPIO_W      = 32,    // number of I/O signals, 1..32
  parameter int unsigned ADDR_W      = 8,     // PADDR width, at least 6
  parameter int unsigned BUS_W       = 32,    // APB data width: 8, 16 or 32
  parameter bit          READBACK_EN = 1'b1   // configuration registers readable
) (
  // APB slave
  input  logic                PCLK,
  input  logic                PRESETN,
  input  logic                PSEL,
  input  logic                PENABLE,
  input  logic                PWRITE,
  input  logic [ADDR_W-1:0]   PADDR,
  input  logic [BUS_W-1:0]    PWDATA,
  output logic [BUS_W-1:0]    PRDATA,
  output logic                PREADY,
  output logic                PSLVERR,
  output logic                IRQ,
  // auxiliary inputs and external interface
  input  logic                gpio_eclk,
  input  logic [GPIO_W-1:0]   aux_i,
  input  logic [GPIO_W-1:0]   ext_pad_i,
  output logic [GPIO_W-1:0]   ext_pad_o,
  output logic [GPIO_W-1:0]   ext_padoe_o
);

  reg_req_t          req;
  logic [DATA_W-1:0] rdata;
  logic [GPIO_W-1:0] rgpio_in, rgpio_out, rgpio_oe, rgpio_inte, rgpio_ptrig;
  logic [GPIO_W-1:0] rgpio_aux, rgpio_eclk, rgpio_nec, rgpio_ints;
  logic [1:0]        rgpio_ctrl;

  gpio_apb_slave #(.ADDR_W(ADDR_W), .BUS_W(BUS_W)) u_apb (
    .PCLK, .PRESETN, .PSEL, .PENABLE, .PWRITE, .PADDR, .PWDATA,
    .PRDATA, .PREADY, .PSLVERR, .req, .rdata
  );

  gpio_regs #(.GPIO_W(GPIO_W), .READBACK_EN(READBACK_EN)) u_regs (
    .clk(PCLK), .rst_n(PRESETN), .req,
    .rgpio_in, .rgpio_ints, .rgpio_ctrl, .rdata,
    .rgpio_out, .rgpio_oe, .rgpio_inte, .rgpio_ptrig, .rgpio_aux,
    .rgpio_eclk, .rgpio_nec
  );

  gpio_input_sampler #(.GPIO_W(GPIO_W)) u_in (
    .clk(PCLK), .rst_n(PRESETN), .gpio_eclk, .ext_pad_i,
    .rgpio_eclk, .rgpio_nec, .rgpio_in
  );

  gpio_irq #(.GPIO_W(GPIO_W)) u_irq (
    .clk(PCLK), .rst_n(PRESETN), .req, .rgpio_in, .rgpio_inte,
    .rgpio_ptrig, .rgpio_ints, .rgpio_ctrl, .irq(IRQ)
  );

  gpio_pad_if #(.GPIO_W(GPIO_W)) u_pad (
    .rgpio_out, .rgpio_oe, .rgpio_aux, .aux_i, .ext_pad_o, .ext_padoe_o
  );

endmodule

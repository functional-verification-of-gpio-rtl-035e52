// gpio_regs: configuration registers of the GPIO core and the read multiplexer.
//
// Holds RGPIO_OUT, RGPIO_OE, RGPIO_INTE, RGPIO_PTRIG, RGPIO_AUX, RGPIO_ECLK and
// RGPIO_NEC, one bit per general-purpose I/O (GPIO_W = 1..32). On a write
// request (req.we) the bytes selected by req.be take the matching bits of
// req.wdata at the next clock edge, and the new value is visible on the
// outputs from then on. rdata is combinational from req.idx and also returns
// RGPIO_IN, RGPIO_CTRL and RGPIO_INTS, which live in the input sampler and the
// interrupt unit; unused upper bits read as 0.
//
// READBACK_EN is the core's "CPU read back" synthesis option. With it set
// (default) every register can be read. With it cleared, the configuration
// registers above read as 0 and their read multiplexer disappears; RGPIO_IN,
// RGPIO_CTRL and RGPIO_INTS stay readable, since software cannot work without
// them (which registers keep read back is this design's choice).
//
// Hardware reset puts every I/O in input mode (OE = 0), masks all interrupts
// (INTE = 0) and selects the system clock for the inputs (ECLK = 0), as the
// architecture requires; resetting OUT, PTRIG, AUX and NEC to 0 as well is
// this design's choice.
module gpio_regs
  import gpio_pkg::*;
#(
  parameter int unsigned GPIO_W      = 32,
  parameter bit          READBACK_EN = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  reg_req_t          req,
  // registers kept elsewhere, for read back
  input  logic [GPIO_W-1:0] rgpio_in,
  input  logic [GPIO_W-1:0] rgpio_ints,
  input  logic [1:0]        rgpio_ctrl,
  output logic [DATA_W-1:0] rdata,
  // register contents
  output logic [GPIO_W-1:0] rgpio_out,
  output logic [GPIO_W-1:0] rgpio_oe,
  output logic [GPIO_W-1:0] rgpio_inte,
  output logic [GPIO_W-1:0] rgpio_ptrig,
  output logic [GPIO_W-1:0] rgpio_aux,
  output logic [GPIO_W-1:0] rgpio_eclk,
  output logic [GPIO_W-1:0] rgpio_nec
);

  logic [GPIO_W-1:0] wbits, wmask;
  assign wbits = req.wdata[GPIO_W-1:0];
  assign wmask = GPIO_W'(be_mask(req.be));

  // old value with the enabled bytes replaced
  function automatic logic [GPIO_W-1:0] merge(logic [GPIO_W-1:0] old);
    return (old & ~wmask) | (wbits & wmask);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rgpio_out   <= '0;
      rgpio_oe    <= '0;
      rgpio_inte  <= '0;
      rgpio_ptrig <= '0;
      rgpio_aux   <= '0;
      rgpio_eclk  <= '0;
      rgpio_nec   <= '0;
    end else if (req.we) begin
      unique case (req.idx)
        REG_OUT:   rgpio_out   <= merge(rgpio_out);
        REG_OE:    rgpio_oe    <= merge(rgpio_oe);
        REG_INTE:  rgpio_inte  <= merge(rgpio_inte);
        REG_PTRIG: rgpio_ptrig <= merge(rgpio_ptrig);
        REG_AUX:   rgpio_aux   <= merge(rgpio_aux);
        REG_ECLK:  rgpio_eclk  <= merge(rgpio_eclk);
        REG_NEC:   rgpio_nec   <= merge(rgpio_nec);
        default:   ;  // IN is read only; CTRL and INTS live in gpio_irq
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    unique case (req.idx)
      REG_IN:    rdata[GPIO_W-1:0] = rgpio_in;
      REG_CTRL:  rdata[1:0]        = rgpio_ctrl;
      REG_INTS:  rdata[GPIO_W-1:0] = rgpio_ints;
      REG_OUT:   if (READBACK_EN) rdata[GPIO_W-1:0] = rgpio_out;
      REG_OE:    if (READBACK_EN) rdata[GPIO_W-1:0] = rgpio_oe;
      REG_INTE:  if (READBACK_EN) rdata[GPIO_W-1:0] = rgpio_inte;
      REG_PTRIG: if (READBACK_EN) rdata[GPIO_W-1:0] = rgpio_ptrig;
      REG_AUX:   if (READBACK_EN) rdata[GPIO_W-1:0] = rgpio_aux;
      REG_ECLK:  if (READBACK_EN) rdata[GPIO_W-1:0] = rgpio_eclk;
      REG_NEC:   if (READBACK_EN) rdata[GPIO_W-1:0] = rgpio_nec;
      default:   rdata = '0;
    endcase
  end

endmodule

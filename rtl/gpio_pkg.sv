// gpio_pkg: types and constants shared by the GPIO core.
//
// The core has ten software-visible registers. The register names and their
// meaning follow the GPIO architecture this RTL implements; the word offsets,
// the RGPIO_CTRL bit positions and the internal request bundle are this
// design's own choices. Register i sits at byte offset 4*i on the host bus,
// whatever the bus width; a narrower bus reaches its upper bytes at
// 4*i+1 .. 4*i+3.
package gpio_pkg;

  // Width of a register inside the core (and of the default APB data bus).
  localparam int unsigned DATA_W = 32;

  // Word index of each register; byte offset = 4 * index.
  typedef enum logic [3:0] {
    REG_IN    = 4'd0,  // 0x00  RGPIO_IN     input values (read only)
    REG_OUT   = 4'd1,  // 0x04  RGPIO_OUT    output values
    REG_OE    = 4'd2,  // 0x08  RGPIO_OE     output driver enables
    REG_INTE  = 4'd3,  // 0x0C  RGPIO_INTE   per-input interrupt enables
    REG_PTRIG = 4'd4,  // 0x10  RGPIO_PTRIG  1 = rising edge, 0 = falling edge
    REG_AUX   = 4'd5,  // 0x14  RGPIO_AUX    1 = output driven by aux input
    REG_CTRL  = 4'd6,  // 0x18  RGPIO_CTRL   {INTS, INTE}
    REG_INTS  = 4'd7,  // 0x1C  RGPIO_INTS   interrupt status
    REG_ECLK  = 4'd8,  // 0x20  RGPIO_ECLK   1 = sample input on gpio_eclk
    REG_NEC   = 4'd9   // 0x24  RGPIO_NEC    1 = falling gpio_eclk edge
  } reg_idx_e;

  localparam int unsigned NUM_REGS = 10;

  // RGPIO_CTRL bit positions.
  localparam int unsigned CTRL_INTE = 0;  // global interrupt enable
  localparam int unsigned CTRL_INTS = 1;  // an interrupt has been recorded

  // One register request from the bus slave. we is a one-clock strobe at the
  // end of an APB write access phase; be selects the bytes of the 32-bit
  // register that the write changes (all four on a 32-bit bus). The read path
  // uses idx only.
  typedef struct packed {
    logic              we;     // write strobe, one clock
    reg_idx_e          idx;    // addressed register
    logic [3:0]        be;     // byte enables within the register
    logic [DATA_W-1:0] wdata;  // write data, already in its byte lanes
  } reg_req_t;

  // Bit mask of the bytes selected by be.
  function automatic logic [DATA_W-1:0] be_mask(logic [3:0] be);
    logic [DATA_W-1:0] m;
    for (int b = 0; b < 4; b++) m[8*b +: 8] = {8{be[b]}};
    return m;
  endfunction

endpackage

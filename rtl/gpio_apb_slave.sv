// gpio_apb_slave: APB slave front end of the GPIO core.
//
// Decodes PADDR into a register index and turns each APB write into a
// one-clock write request (req.we) at the clock edge that ends the access
// phase. Reads are combinational: req.idx selects the register and the
// register file returns its 32-bit rdata, of which the addressed bytes are
// passed to PRDATA during the access phase (PRDATA is 0 outside it). The slave
// never inserts wait states, so PREADY is 1 and every transfer takes two PCLK
// cycles (setup + access).
//
// The host bus width BUS_W is a synthesis option of 8, 16 or 32 bits (32 is
// the default and the main configuration). Registers stay 32 bits wide and
// sit at byte offsets 4*i; a narrower bus reaches byte lane group k of a
// register at offset 4*i + k*BUS_W/8, and a write changes only those bytes
// (req.be). PSLVERR is raised in the access phase for an address not aligned
// to BUS_W/8, an address beyond the last register, or a write to the
// read-only RGPIO_IN; an erroneous write changes nothing.
//
// The APB slave and the 8/16/32-bit option follow the architecture; zero wait
// states, the byte-lane mapping, the error rule and the register offsets (see
// gpio_pkg) are this design's choices. Assertions check the APB rules the
// master must keep.
module gpio_apb_slave
  import gpio_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,   // at least 6
  parameter int unsigned BUS_W  = 32   // 8, 16 or 32
) (
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
  // register side
  output reg_req_t            req,
  input  logic [DATA_W-1:0]   rdata
);

  localparam int unsigned LANES = BUS_W / 8;            // bytes per transfer
  localparam logic [3:0]  LANE_BE = 4'((1 << LANES) - 1);

  logic [ADDR_W-3:0] word;
  logic [1:0]        byte_off;
  logic              aligned, addr_ok, access;

  assign word     = PADDR[ADDR_W-1:2];
  assign byte_off = PADDR[1:0];
  assign aligned  = (32'(byte_off) % LANES) == 0;
  assign addr_ok  = aligned && (word < (ADDR_W-2)'(NUM_REGS));
  assign access   = PSEL && PENABLE;

  always_comb begin
    req.idx   = addr_ok ? reg_idx_e'(word[3:0]) : REG_IN;
    req.wdata = {(DATA_W / BUS_W){PWDATA}};             // copy into every lane
    req.be    = LANE_BE << byte_off;
    req.we    = access && PWRITE && addr_ok && (req.idx != REG_IN);
  end

  assign PREADY  = 1'b1;
  assign PSLVERR = access && (!addr_ok || (PWRITE && req.idx == REG_IN));
  assign PRDATA  = (access && !PWRITE && addr_ok)
                 ? BUS_W'(rdata >> (8 * byte_off)) : '0;

  // APB protocol rules for the master.
  logic psel_q, penable_q, pwrite_q;
  logic [ADDR_W-1:0] paddr_q;
  always_ff @(posedge PCLK or negedge PRESETN) begin
    if (!PRESETN) begin
      psel_q    <= 1'b0;
      penable_q <= 1'b0;
      pwrite_q  <= 1'b0;
      paddr_q   <= '0;
    end else begin
      psel_q    <= PSEL;
      penable_q <= PENABLE;
      pwrite_q  <= PWRITE;
      paddr_q   <= PADDR;
    end
  end

  // PENABLE is shared by all slaves on the bus; only PSEL is this slave's.
  // With no wait states, each access phase of this slave directly follows
  // its setup phase (selected, PENABLE low) ...
  a_access_after_setup: assert property (@(posedge PCLK) disable iff (!PRESETN)
    (PSEL && PENABLE) |-> (psel_q && !penable_q));
  // ... and keeps the address and direction of that setup phase.
  a_stable_in_access: assert property (@(posedge PCLK) disable iff (!PRESETN)
    (PSEL && PENABLE) |-> (PADDR == paddr_q && PWRITE == pwrite_q));

  // Only the bus widths the core offers.
  if (!(BUS_W == 8 || BUS_W == 16 || BUS_W == 32)) begin : g_bad_bus_w
    $error("gpio_apb_slave: BUS_W must be 8, 16 or 32");
  end

endmodule

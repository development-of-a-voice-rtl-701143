// mem_module: one 128 KB local memory module with byte parity.
//
// Follows the document's memory module: four arrays of 18 16K dynamic RAMs
// (here one 64K x 18 array: 16 data bits and one parity bit per byte), an
// address/control latch, a data latch, a parity generator/detector, a
// refresh counter, and a 19-bit register that keeps the address of the
// earliest parity error until the PNC reads it (the error raises a level-6
// interrupt request).  After a Processor Node reset the module is in
// self-refresh mode: it refreshes itself and ignores every PNC access except
// a write of the memory control register that returns it to normal mode.
// In normal mode the PNC refreshes it (`refresh`).
//
// A memory access takes three microsteps.  The address and operation reach
// the module in the cycle after the PNC's address microstep (the command
// latch is in mem_interface).  Read: the array is read at the end of that
// cycle and `rdata`/`rvalid` are valid in the next one (the PNC's third
// microstep).  Write: the PNC broadcasts the data in its second microstep;
// it arrives (`wstb`) one cycle later and the selected module writes it.
//
// This design's own choices: odd parity per byte; the module answers word
// addresses whose bits 17:16 equal MODULE_ID and bit 18 is zero; control
// register bit 0 = normal mode, bit 1 = parity test (stores inverted parity
// so that the detector can be exercised); the self-refresh timer steps the
// 7-bit row counter every REFRESH_INTERVAL cycles (the document's table gives
// 2.48 us for a refresh).  DRAM timing itself is not modelled.
module mem_module
  import pn_pkg::*;
#(
  parameter int unsigned WORDS            = 65536,
  parameter logic [1:0]  MODULE_ID        = 2'd0,
  parameter int unsigned REFRESH_INTERVAL = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [18:0] m_addr,
  input  mop_e        m_op,
  input  logic        m_bsel,
  input  logic [15:0] m_wdata,
  input  logic        m_wstb,
  input  logic        ctl_we,
  input  logic [15:0] ctl_data,
  input  logic        refresh,
  input  logic        perr_clr,    // PNC has read the error register
  output logic [15:0] rdata,
  output logic        rvalid,
  output logic        perr_irq,
  output logic [18:0] perr_addr,
  output logic [1:0]  ctl_q,
  output logic [6:0]  refresh_row
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [17:0]   mem [WORDS];
  logic          normal, ptest;
  logic          sel;
  logic          wpend, wbyte, wsel_b;
  logic [AW-1:0] waddr;
  logic [17:0]   rword;
  logic [18:0]   raddr;
  logic [$clog2(REFRESH_INTERVAL+1)-1:0] rtimer;
  logic [17:0]   old, nw;
  logic          p_hi, p_lo;

  assign sel   = normal && (m_addr[18] == 1'b0) && (m_addr[17:16] == MODULE_ID);
  assign ctl_q = {ptest, normal};
  assign rdata = rword[15:0];

  // odd parity of the data to be written, inverted in parity-test mode
  always_comb begin
    old = mem[waddr];
    nw  = old;
    if (!wbyte || !wsel_b) nw[15:8] = m_wdata[15:8];
    if (!wbyte ||  wsel_b) nw[7:0]  = m_wdata[7:0];
    p_hi = ~^nw[15:8] ^ ptest;
    p_lo = ~^nw[7:0]  ^ ptest;
    nw[17:16] = {p_hi, p_lo};
  end

  always_ff @(posedge clk) begin
    if (wpend && m_wstb) mem[waddr] <= nw;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      normal      <= 1'b0;
      ptest       <= 1'b0;
      wpend       <= 1'b0;
      wbyte       <= 1'b0;
      wsel_b      <= 1'b0;
      waddr       <= '0;
      rvalid      <= 1'b0;
      rword       <= '0;
      raddr       <= '0;
      perr_irq    <= 1'b0;
      perr_addr   <= '0;
      rtimer      <= '0;
      refresh_row <= '0;
    end else begin
      rvalid <= 1'b0;
      if (ctl_we) begin
        normal <= ctl_data[0];
        ptest  <= ctl_data[1];
      end
      // refresh: by the PNC in normal mode, by the module's own timer otherwise
      if (!normal) begin
        if (32'(rtimer) == REFRESH_INTERVAL-1) begin
          rtimer      <= '0;
          refresh_row <= refresh_row + 1'b1;
        end else rtimer <= rtimer + 1'b1;
      end else if (refresh) begin
        refresh_row <= refresh_row + 1'b1;
      end
      // access
      if (m_wstb) wpend <= 1'b0;
      if (sel && m_op != MOP_NONE && !ctl_we) begin
        if (m_op == MOP_READ) begin
          rword  <= mem[m_addr[AW-1:0]];
          raddr  <= m_addr;
          rvalid <= 1'b1;
        end else begin
          wpend  <= 1'b1;
          waddr  <= m_addr[AW-1:0];
          wbyte  <= (m_op == MOP_BWRITE);
          wsel_b <= m_bsel;
        end
      end
      // parity check on the word being returned; keep the earliest error
      if (perr_clr) perr_irq <= 1'b0;
      else if (rvalid && ((~^rword[15:8] != rword[17]) || (~^rword[7:0] != rword[16]))
               && !perr_irq) begin
        perr_irq  <= 1'b1;
        perr_addr <= raddr;
      end
    end
  end
endmodule

// mem_interface: Processor Node side of the local memory.
//
// As in the document, this is a transceiver between the PNC Data bus and the
// Memory Address/Data bus, and a multiplexer that sources the high 4 bits of
// the local memory address from the MMU RAM data (relocation), the Data bus
// or the BIOLINK address bits 16-19.  Here the Data bus nibble is held in a
// register (`hi_we`) so that a full address can be sent in one microstep.
//
// Address format (this design's reading): the byte address is 20 bits,
// {nibble, Data bus}; the memory bus carries the 19-bit word address
// {nibble, dbus[15:1]} and dbus[0] selects the byte for byte writes
// (0 = high byte, MC68000 order).  `nib_sel`: 0 nibble register,
// 1 MMU SAR bits 3:0, 2 BIOLINK bits 19:16, 3 zero.
//
// Timing: the memory bus command is registered: an address strobe in
// microstep 1 reaches the modules at the next edge, like the latch on each
// memory board in the document.  Read data from the modules passes
// combinationally to `rdata` for the Data bus.
module mem_interface
  import pn_pkg::*;
#(
  parameter int unsigned N_MOD = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] dbus,
  input  mop_e        op,          // address strobe with operation, microstep 1
  input  logic [1:0]  nib_sel,
  input  logic [3:0]  mmu_nib,
  input  logic [3:0]  bio_nib,
  input  logic        hi_we,
  input  logic        wdata_we,    // write data broadcast
  output logic [18:0] m_addr,
  output mop_e        m_op,
  output logic        m_bsel,
  output logic [15:0] m_wdata,
  output logic        m_wstb,
  input  logic [N_MOD-1:0]       m_rvalid,
  input  logic [N_MOD-1:0][15:0] m_rdata,
  output logic [15:0] rdata
);
  logic [3:0] hi_nib, nib;

  always_comb begin
    unique case (nib_sel)
      2'd0:    nib = hi_nib;
      2'd1:    nib = mmu_nib;
      2'd2:    nib = bio_nib;
      default: nib = 4'h0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hi_nib  <= '0;
      m_addr  <= '0;
      m_op    <= MOP_NONE;
      m_bsel  <= 1'b0;
      m_wdata <= '0;
      m_wstb  <= 1'b0;
    end else begin
      if (hi_we) hi_nib <= dbus[3:0];
      m_op   <= op;
      m_wstb <= wdata_we;
      if (op != MOP_NONE) begin
        m_addr <= {nib, dbus[15:1]};
        m_bsel <= dbus[0];
      end
      if (wdata_we) m_wdata <= dbus;
    end
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < N_MOD; i++)
      if (m_rvalid[i]) rdata = rdata | m_rdata[i];
  end
endmodule

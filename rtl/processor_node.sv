// processor_node: the Butterfly Processor Node of the Voice Funnel.
//
// A Processor Node is one processor of the Butterfly multiprocessor: an
// MC68000 with a memory management unit, local memory, a bootstrap ROM, an
// adapter to the BIOLINK I/O bus and the receiver and transmitter for the
// Butterfly Switch.  All of them hang on one 16-bit Data bus, and the
// Processor Node Controller (PNC) sequences every transfer on it with
// microcode; the receiver, transmitter and BIOLINK adapter run their own
// state machines and call the PNC with microinterrupts.
//
// This module wires those blocks together as the document's block diagram
// does.  The Data bus is built here as a multiplexer steered by the source
// field of the executing microword, and the destination field strobes one
// block per microstep.  Parts that are bought or analog stay outside and
// appear as ports: the MC68000 bus, the EPROM chip, the BIOLINK, and the
// switch input and output ports (whose ECL line drivers are not modelled).
//
// This design's own choices: the Data bus source/destination codes and
// branch-condition and request numbering of pn_pkg; a Restart accepted by the
// receiver resets the node for one clock (the control store keeps its
// contents, as PROMs do); the MC68000 access request is a level that the PNC
// answers with an acknowledge, or with a bus error when it acknowledges with
// the protection half of the SAR selected and a violation is flagged;
// level 7 interrupts come from a receiver checksum error, level 6 from a
// memory parity error, levels 4 and 3 from the I/O system.  The document
// makes the interrupt acknowledge sequence a PNC function: an acknowledge
// cycle (`cpu_iack`, decoded from the MC68000 function code outside) calls
// its own service routine, which supplies the vector on the data port and
// acknowledges like any other access.
//
// Timing: single clock (the document's 8 MHz Processor Node clock); all
// blocks are synchronous to it.
module processor_node
  import pn_pkg::*;
#(
  parameter int unsigned N_MEM_MODULES = 4,
  parameter int unsigned MEM_WORDS     = 65536,
  parameter logic [15:0] RESTART_PASSWORD = 16'hB8B1
) (
  input  logic        clk,
  input  logic        rst,
  // MC68000 bus
  input  logic        cpu_as,
  input  logic [23:0] cpu_va,
  input  logic        cpu_rw,
  input  logic        cpu_user,
  input  logic        cpu_iack,     // interrupt acknowledge cycle (function code 7)
  input  logic [15:0] cpu_wdata,
  output logic [15:0] cpu_rdata,
  output logic        cpu_dtack,
  output logic        cpu_berr,
  output logic [2:0]  cpu_ipl,
  output logic        cpu_br,
  // bootstrap EPROM chip
  output logic [11:0] rom_addr,
  output logic        rom_oe,
  input  logic [7:0]  rom_data,
  // BIOLINK
  output logic [15:0] bio_ad_out,
  output logic        bio_ad_oe,
  input  logic [15:0] bio_ad_in,
  input  logic [3:0]  bio_addr_hi,
  input  logic [3:0]  bio_dma_req,
  input  logic        bio_strobe,
  input  logic        bio_dev_ack,
  input  logic        bio_irq_hi,
  input  logic        bio_irq_lo,
  output logic [3:0]  bio_grant,
  output logic        bio_ack,
  output logic [3:0]  bio_lines,
  // Butterfly Switch output port (into the receiver)
  input  logic [3:0]  rx_data,
  input  logic        rx_frame,
  input  logic        rx_ignore,
  output logic        rx_reject,
  output logic        rx_stop,
  // Butterfly Switch input port (from the transmitter)
  output logic [3:0]  tx_data,
  output logic        tx_frame,
  output logic        tx_ignore,
  input  logic        tx_reject,
  input  logic        tx_stop,
  // control store programming
  input  logic        cs_prog_we,
  input  logic [9:0]  cs_prog_addr,
  input  logic [63:0] cs_prog_data,
  // status
  output logic        restart_out
);
  logic        node_rst, restart, restart_q;
  uword_t      uw;
  logic [15:0] dbus, rega;
  logic [9:0]  upc;
  logic        uint_taken;
  logic [NCOND-1:0] ext_cond;
  logic [NREQ-1:0]  func_req;
  bus_src_e    bsrc;
  bus_dst_e    bdst;

  // MMU
  logic [15:0] sar_q, ar_q, asar_q;
  logic [3:0]  ar_branch;
  logic [19:0] pa;
  acc_e        acc;
  logic        prot_violation;
  // interrupts
  logic [7:1]  irq_hw, irq_pending;
  // ROM
  logic [15:0] rom_word;
  logic        rom_busy, rom_done;
  // BIOLINK
  logic [15:0] io_in;
  logic        io_dma_uint, io_ack_uint;
  logic [1:0]  io_granted;
  // memory
  mop_e        mem_op, m_op;
  logic [18:0] m_addr;
  logic        m_bsel, m_wstb;
  logic [15:0] m_wdata, mem_rdata;
  logic [N_MEM_MODULES-1:0]       m_rvalid, m_perr;
  logic [N_MEM_MODULES-1:0][15:0] m_rdata;
  logic [N_MEM_MODULES-1:0][18:0] m_perr_addr;
  logic [N_MEM_MODULES-1:0][1:0]  m_ctl;
  logic [N_MEM_MODULES-1:0][6:0]  m_row;
  logic [18:0] perr_addr;
  logic        perr_any;
  // receiver / transmitter
  logic [1:0][15:0] rx_head;
  logic [1:0]  rx_uint, rx_avail, rx_done;
  logic [15:0] rx_status;
  logic [15:0] tx_ram_q, tx_status;
  logic [1:0]  tx_ne;
  logic [2:0]  tx_uint;
  // MC68000 side registers
  logic [15:0] cpu_din_latch, cpu_dout_latch;
  logic        cpu_acked;

  assign bsrc = uw.bus_src;
  assign bdst = uw.bus_dst;

  // a correct Restart message resets the whole node for one clock
  always_ff @(posedge clk) begin
    if (rst) restart_q <= 1'b0;
    else     restart_q <= restart;
  end
  assign node_rst    = rst || restart_q;
  assign restart_out = restart_q;

  // ---------------------------------------------------------------- Data bus
  always_comb begin
    unique case (bsrc)
      BS_NONE:   dbus = '0;
      BS_K:      dbus = uw.k;
      BS_REGA:   dbus = rega;
      BS_IRQ:    dbus = {5'b0, irq_pending, 1'b0, cpu_ipl};
      BS_MEM:    dbus = mem_rdata;
      BS_RXPOP0: dbus = rx_head[0];
      BS_RXPOP1: dbus = rx_head[1];
      BS_RXSTAT: dbus = rx_status;
      BS_TXRAM:  dbus = tx_ram_q;
      BS_TXSTAT: dbus = tx_status;
      BS_IOIN:   dbus = io_in;
      BS_SAR:    dbus = sar_q;
      BS_PADDR:  dbus = pa[15:0];
      BS_ROM:    dbus = rom_word;
      BS_CPUD:   dbus = cpu_din_latch;
      default:   dbus = perr_addr[15:0];
    endcase
  end

  always_comb begin
    unique case (bdst)
      BD_MEMA_RD: mem_op = MOP_READ;
      BD_MEMA_WW: mem_op = MOP_WWRITE;
      BD_MEMA_WB: mem_op = MOP_BWRITE;
      default:    mem_op = MOP_NONE;
    endcase
  end

  // ------------------------------------------------------- conditions, requests
  // An MC68000 cycle asks for service until it is acknowledged.  The request
  // is withdrawn in the microstep that acknowledges the access, so a dispatch
  // in that same microword does not re-enter the routine.
  logic cpu_req;
  assign cpu_req = cpu_as && !cpu_acked && !cpu_br && (bdst != BD_CPUACK);

  always_comb begin
    ext_cond          = '0;
    ext_cond[C_RX0]   = rx_avail[0];
    ext_cond[C_RX1]   = rx_avail[1];
    ext_cond[C_RXD0]  = rx_done[0];
    ext_cond[C_RXD1]  = rx_done[1];
    ext_cond[C_TXNE0] = tx_ne[0];
    ext_cond[C_TXNE1] = tx_ne[1];
    ext_cond[C_ROMBSY]= rom_busy;
    ext_cond[C_PROT]  = prot_violation;
    ext_cond[C_AR0]   = ar_branch[0];
    ext_cond[C_AR1]   = ar_branch[1];
    ext_cond[C_AR2]   = ar_branch[2];
    ext_cond[C_AR3]   = ar_branch[3];
    ext_cond[C_IODMA] = io_dma_uint;
    ext_cond[C_IOACK] = io_ack_uint;
    ext_cond[C_CPUWR] = !cpu_rw;
    func_req          = '0;
    func_req[R_RX0]   = rx_uint[0];
    func_req[R_RX1]   = rx_uint[1];
    func_req[R_TXD0]  = tx_uint[0];
    func_req[R_TXD1]  = tx_uint[1];
    func_req[R_TXREJ] = tx_uint[2];
    func_req[R_IODMA] = io_dma_uint;
    func_req[R_IOACK] = io_ack_uint;
    func_req[R_PERR]  = perr_any;
    // the access PLA picks the service routine for an MC68000 access, and an
    // interrupt acknowledge cycle has a routine of its own
    func_req[R_CPU + int'(acc)] = cpu_req && !cpu_iack;
    func_req[R_IACK]            = cpu_req && cpu_iack;
  end

  pnc u_pnc (
    .clk, .rst(node_rst), .dbus, .ext_cond, .func_req, .uw, .rega, .upc, .uint_taken,
    .prog_we(cs_prog_we), .prog_addr(cs_prog_addr), .prog_data(cs_prog_data)
  );

  // ------------------------------------------------------------- MC68000 side
  always_ff @(posedge clk) begin
    if (node_rst) begin
      cpu_din_latch  <= '0;
      cpu_dout_latch <= '0;
      cpu_acked      <= 1'b0;
      cpu_dtack      <= 1'b0;
      cpu_berr       <= 1'b0;
      cpu_br         <= 1'b0;
    end else begin
      if (cpu_as && !cpu_acked) cpu_din_latch <= cpu_wdata;
      if (bdst == BD_CPUD)   cpu_dout_latch <= dbus;
      if (bdst == BD_BUSREQ) cpu_br <= dbus[0];
      cpu_dtack <= (bdst == BD_CPUACK) && !(uw.sar_prot && prot_violation);
      cpu_berr  <= (bdst == BD_CPUACK) &&  (uw.sar_prot && prot_violation);
      if (bdst == BD_CPUACK) cpu_acked <= 1'b1;
      else if (!cpu_as)      cpu_acked <= 1'b0;
    end
  end
  assign cpu_rdata = cpu_dout_latch;

  mmu #(.NSAR(512)) u_mmu (
    .clk, .rst(node_rst), .cpu_va, .cpu_rw, .cpu_user,
    .use_ar(cpu_br), .sar_prot(uw.sar_prot), .dbus,
    .ar_we(bdst == BD_AR), .asar_we(bdst == BD_ASAR), .sar_we(bdst == BD_SARW),
    .sar_q, .ar_q, .asar_q, .ar_branch, .pa, .acc, .prot_violation
  );

  assign irq_hw = {rx_status[14] | rx_status[6], perr_any, 1'b0, bio_irq_hi, bio_irq_lo, 1'b0, 1'b0};

  irq_arbiter #(.LEVELS(7)) u_irq (
    .clk, .rst(node_rst), .hw_req(irq_hw), .set_we(bdst == BD_IRQSET), .set_data(dbus),
    .pending(irq_pending), .ipl(cpu_ipl)
  );

  boot_rom_ctrl #(.ROM_BYTES(4096), .BYTE_WAIT(8)) u_rom (
    .clk, .rst(node_rst), .start(bdst == BD_ROMRD), .word_addr(dbus[11:1]),
    .rom_addr, .rom_oe, .rom_data, .word(rom_word), .busy(rom_busy), .done(rom_done)
  );

  biolink_adapter #(.N_IO(4)) u_bio (
    .clk, .rst(node_rst), .dbus, .out_we(bdst == BD_IOOUT), .ctl_we(bdst == BD_IOCTL),
    .in_q(io_in), .dma_uint(io_dma_uint), .ack_uint(io_ack_uint), .granted(io_granted),
    .ad_out(bio_ad_out), .ad_oe(bio_ad_oe), .ad_in(bio_ad_in), .dma_req(bio_dma_req),
    .io_strobe(bio_strobe), .dev_ack(bio_dev_ack), .grant(bio_grant), .ack(bio_ack),
    .pnc_lines(bio_lines)
  );

  // ------------------------------------------------------------------ memory
  mem_interface #(.N_MOD(N_MEM_MODULES)) u_mif (
    .clk, .rst(node_rst), .dbus, .op(mem_op), .nib_sel(uw.b_addr[1:0]),
    .mmu_nib(sar_q[3:0]), .bio_nib(bio_addr_hi), .hi_we(bdst == BD_MEMHI),
    .wdata_we(bdst == BD_MEMW), .m_addr, .m_op, .m_bsel, .m_wdata, .m_wstb,
    .m_rvalid, .m_rdata, .rdata(mem_rdata)
  );

  for (genvar i = 0; i < N_MEM_MODULES; i++) begin : g_mem
    mem_module #(.WORDS(MEM_WORDS), .MODULE_ID(2'(i))) u_mem (
      .clk, .rst(node_rst), .m_addr, .m_op, .m_bsel, .m_wdata, .m_wstb,
      .ctl_we(bdst == BD_MEMCTL), .ctl_data(dbus), .refresh(bdst == BD_REFRESH),
      .perr_clr(bsrc == BS_PERR && m_perr[i]),
      .rdata(m_rdata[i]), .rvalid(m_rvalid[i]), .perr_irq(m_perr[i]),
      .perr_addr(m_perr_addr[i]), .ctl_q(m_ctl[i]), .refresh_row(m_row[i])
    );
  end

  always_comb begin
    perr_any  = |m_perr;
    perr_addr = '0;
    for (int i = N_MEM_MODULES-1; i >= 0; i--)
      if (m_perr[i]) perr_addr = m_perr_addr[i];
  end

  // ---------------------------------------------------------------- switch
  sw_receiver #(.RAM_WORDS(16), .BUF_WORDS(8), .PASSWORD(RESTART_PASSWORD)) u_rx (
    .clk, .rst(node_rst), .sw_data(rx_data), .sw_frame(rx_frame), .sw_ignore(rx_ignore),
    .sw_reject(rx_reject), .sw_stop(rx_stop),
    .hck_we(bdst == BD_HCKSUM), .dbus,
    .pop({bsrc == BS_RXPOP1, bsrc == BS_RXPOP0}),
    .release_buf((bdst == BD_RXCTL) ? dbus[1:0] : 2'b00),
    .head(rx_head), .uint_req(rx_uint), .data_avail(rx_avail), .done(rx_done),
    .status(rx_status), .restart
  );

  sw_transmitter #(.RAM_WORDS(16), .BUF_WORDS(6)) u_tx (
    .clk, .rst(node_rst), .dbus, .ram_we({bdst == BD_TXRAM || bdst == BD_TXRAMH, bdst == BD_TXRAM || bdst == BD_TXRAML}), .ram_addr(uw.b_addr[3:0]),
    .ram_q(tx_ram_q), .ctl_we(bdst == BD_TXCTL), .path_we(bdst == BD_PATHEN),
    .not_empty(tx_ne), .uint_req(tx_uint), .status(tx_status),
    .sw_data(tx_data), .sw_frame(tx_frame), .sw_ignore(tx_ignore),
    .sw_reject(tx_reject), .sw_stop(tx_stop)
  );
endmodule

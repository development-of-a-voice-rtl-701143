// pn_pkg: types and constants shared by the Processor Node blocks.
//
// The Processor Node is a set of autonomous hardware resources (MMU, memory,
// boot ROM, BIOLINK adapter, switch receiver and transmitter) tied together by
// one 16-bit Data bus and sequenced by the Processor Node Controller (PNC), a
// microprogrammed 16-bit processor with a 1K x 64-bit control store.  The
// document gives the widths used here (16-bit Data bus, 10-bit control store
// address, 64-bit microword, 20 branch conditions, 32 function requests).  The
// field layout of the microword, the Data bus source/destination codes and the
// condition numbering are not given by the document; they are this design's
// own choice and are collected here so that microcode and hardware agree.
package pn_pkg;

  localparam int unsigned DW  = 16;   // Data bus width
  localparam int unsigned CSA = 10;   // control store address width
  localparam int unsigned CSW = 64;   // microword width

  // Sequencer operations (microword bits [13:10]).
  typedef enum logic [3:0] {
    SQ_CONT   = 4'd0,  // next = upc + 1
    SQ_JUMP   = 4'd1,  // next = addr field
    SQ_JCOND  = 4'd2,  // next = cond ? addr : upc + 1
    SQ_JMAP4  = 4'd3,  // next = {addr[9:2], cond_b, cond_a}  (four-way branch)
    SQ_CALL   = 4'd4,  // push upc + 1, next = addr
    SQ_RET    = 4'd5,  // next = pop
    SQ_ZERO   = 4'd6,  // next = 0
    SQ_LDREG  = 4'd7,  // internal register := addr, next = upc + 1
    SQ_JREG   = 4'd8,  // next = internal register
    SQ_DISP   = 4'd9,  // microinterrupts enabled: next = MSRAG address if a request, else addr
    SQ_CCALL  = 4'd10, // cond ? call addr : upc + 1
    SQ_CRET   = 4'd11  // cond ? pop : upc + 1
  } seq_op_e;

  // ALU functions (2901 style).
  typedef enum logic [2:0] {
    AF_ADD = 3'd0, AF_SUBR = 3'd1, AF_SUBS = 3'd2, AF_OR = 3'd3,
    AF_AND = 3'd4, AF_NOTRS = 3'd5, AF_XOR = 3'd6, AF_XNOR = 3'd7
  } alu_fn_e;

  // ALU operand pairs (R,S), 2901 style; D is the Data bus.
  typedef enum logic [2:0] {
    AS_AQ = 3'd0, AS_AB = 3'd1, AS_ZQ = 3'd2, AS_ZB = 3'd3,
    AS_ZA = 3'd4, AS_DA = 3'd5, AS_DQ = 3'd6, AS_DZ = 3'd7
  } alu_src_e;

  // ALU destinations.  RAMQL/RAMQR rotate the 32-bit pair {F,Q}.
  typedef enum logic [2:0] {
    AD_NOP = 3'd0, AD_QREG = 3'd1, AD_RAMA = 3'd2, AD_RAMF = 3'd3,
    AD_RAMQR = 3'd4, AD_RAMR = 3'd5, AD_RAMQL = 3'd6, AD_RAML = 3'd7
  } alu_dst_e;

  // Data bus sources (microword bits [42:39]).
  typedef enum logic [3:0] {
    BS_NONE   = 4'd0,  // bus reads zero
    BS_K      = 4'd1,  // 16-bit microword constant
    BS_REGA   = 4'd2,  // ALU register selected by the A address
    BS_IRQ    = 4'd3,  // interrupt arbitrator: pending levels and current code
    BS_MEM    = 4'd4,  // memory read data (third microstep)
    BS_RXPOP0 = 4'd5,  // head word of receiver buffer 0, and pop it
    BS_RXPOP1 = 4'd6,  // head word of receiver buffer 1, and pop it
    BS_RXSTAT = 4'd7,  // receiver status
    BS_TXRAM  = 4'd8,  // transmitter RAM word at the port address
    BS_TXSTAT = 4'd9,  // transmitter status
    BS_IOIN   = 4'd10, // BIOLINK address/data input latch
    BS_SAR    = 4'd11, // SAR RAM word (relocation or protection half)
    BS_PADDR  = 4'd12, // MMU physical address bits 15:0
    BS_ROM    = 4'd13, // assembled boot ROM word
    BS_CPUD   = 4'd14, // MC68000 data input latch
    BS_PERR   = 4'd15  // memory parity error address (low 16 bits) and re-arm
  } bus_src_e;

  // Data bus destinations / strobes (microword bits [47:43]).
  typedef enum logic [4:0] {
    BD_NONE    = 5'd0,
    BD_MEMA_RD = 5'd1,  // memory address latch, read
    BD_MEMA_WW = 5'd2,  // memory address latch, word write
    BD_MEMA_WB = 5'd3,  // memory address latch, byte write
    BD_MEMW    = 5'd4,  // memory write data broadcast
    BD_MEMCTL  = 5'd5,  // memory control register (mode, parity test)
    BD_MEMHI   = 5'd6,  // high address nibble register
    BD_TXRAM   = 5'd7,  // transmitter RAM word at the port address
    BD_TXCTL   = 5'd8,  // transmitter control (set non-empty, clear done)
    BD_PATHEN  = 5'd9,  // Path Enable register
    BD_RXCTL   = 5'd10, // receiver control (release buffers)
    BD_HCKSUM  = 5'd11, // header checksum register
    BD_IOOUT   = 5'd12, // BIOLINK data output latch
    BD_IOCTL   = 5'd13, // BIOLINK PNC-driven control lines and DMA acknowledge
    BD_AR      = 5'd14, // MMU Address Register
    BD_ASAR    = 5'd15, // MMU Address Space Attribute Register
    BD_SARW    = 5'd16, // write SAR RAM word
    BD_ROMRD   = 5'd17, // start a boot ROM word read at bus[11:1]
    BD_IRQSET  = 5'd18, // microcode-settable interrupt requests
    BD_CPUD    = 5'd19, // MC68000 data output latch
    BD_REFRESH = 5'd20, // one memory refresh cycle
    BD_BUSREQ  = 5'd21, // bus[0]: PNC takes (1) or returns (0) the MC68000 address lines
    BD_CPUACK  = 5'd22, // acknowledge (DTACK) the MC68000 access
    BD_TXRAMH  = 5'd23, // transmitter RAM word at the port address, high byte only
    BD_TXRAML  = 5'd24  // transmitter RAM word at the port address, low byte only
  } bus_dst_e;

  // Branch conditions (microword bits [18:14]); 20 are used, as in the
  // document.  A four-way branch uses condition `cond` as its low bit and
  // `cond + 1` as its high bit.
  localparam int unsigned NCOND = 20;
  localparam logic [4:0] C_TRUE = 5'd0,  C_CARRY = 5'd1, C_ZERO = 5'd2, C_NEG = 5'd3,
                         C_NZ   = 5'd4,  C_RX0   = 5'd5, C_RX1  = 5'd6, C_RXD0 = 5'd7,
                         C_RXD1 = 5'd8,  C_TXNE0 = 5'd9, C_TXNE1 = 5'd10, C_ROMBSY = 5'd11,
                         C_PROT = 5'd12, C_AR0   = 5'd13, C_AR1 = 5'd14, C_AR2 = 5'd15,
                         C_AR3  = 5'd16, C_IODMA = 5'd17, C_IOACK = 5'd18, C_CPUWR = 5'd19;

  // Function request lines into the service routine address generator.
  localparam int unsigned NREQ = 32;
  localparam int unsigned R_RX0 = 0, R_RX1 = 1, R_TXD0 = 2, R_TXD1 = 3, R_TXREJ = 4,
                          R_IODMA = 5, R_IOACK = 6, R_PERR = 7,
                          R_CPU = 8,  // 8..12: MC68000 access, one line per MMU access type
                          R_IACK = 13; // MC68000 interrupt acknowledge cycle

  // Microword layout.
  typedef struct packed {
    logic [15:0] k;        // [63:48] constant
    bus_dst_e    bus_dst;  // [47:43]
    bus_src_e    bus_src;  // [42:39]
    alu_dst_e    alu_dst;  // [38:36]
    logic [4:0]  b_addr;   // [35:31] also port address / byte-select for RAM transfers
    logic [4:0]  a_addr;   // [30:26]
    alu_src_e    alu_src;  // [25:23]
    alu_fn_e     alu_fn;   // [22:20]
    logic        sar_prot; // [19] SAR half select (protection when 1)
    logic [4:0]  cond;     // [18:14] branch condition select
    seq_op_e     seq;      // [13:10]
    logic [9:0]  addr;     // [9:0] branch address
  } uword_t;

  // MMU access types produced by the access PLA.
  typedef enum logic [2:0] {
    ACC_LOCAL = 3'd0, ACC_REMOTE = 3'd1, ACC_IO = 3'd2, ACC_SEG0 = 3'd3, ACC_ROM = 3'd4
  } acc_e;

  // Memory operation latched with the address.
  typedef enum logic [1:0] {
    MOP_NONE = 2'd0, MOP_READ = 2'd1, MOP_WWRITE = 2'd2, MOP_BWRITE = 2'd3
  } mop_e;

  // Switch message types (first nibble after routing).  Restart is fixed;
  // types with bit 3 clear need a reply and use receiver buffer 0.
  localparam logic [3:0] MT_RESTART = 4'h0;

endpackage

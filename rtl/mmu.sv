// mmu: Memory Management Unit between the MC68000 and the Processor Node.
//
// Follows the document's MC68000/MMU architecture.  512 32-bit Segment
// Attribute Registers (SARs) live in one 1K x 16 RAM that is time-multiplexed:
// the relocation half is read during the synchronization microstep, the
// protection half when the microword's SAR-half bit is set.  The SAR index is
// the logical OR of the virtual segment number and the Address Space
// Attribute Register (ASAR).  From the relocation half:
//   physical bits 19:16 = SAR bits 3:0,
//   physical bits 15:8  = SAR bits 15:8 + virtual bits 15:8 (8-bit adder),
//   physical bits 7:0   = virtual bits 7:0,
//   SAR bits 7:6 feed the access PLA (local, remote, I/O, segment zero).
// Virtual segment FF is mapped to physical segment zero (the PNC control
// registers), and in segment zero the ROM window 8000-8FFF and locations 0-7
// are reported as ROM accesses.  The protection PLA raises `prot_violation`
// from the protection half.  The Address Register, loaded by the PNC, can
// drive the address lines in place of the MC68000 (after the PNC has taken
// the bus), lets the PNC reach any SAR, and gives bits 3:0 to the branch
// multiplexers.
//
// This design's own choices, where the document gives no detail: the
// Address Register drives virtual address bits 23:8 (bits 7:0 are then zero);
// the SAR index is {0, segment} | ASAR[8:0]; relocation-half bits 7:6 encode
// 00 local, 01 remote, 10 I/O, 11 segment zero; the protection half holds
// [0] supervisor read, [1] supervisor write, [2] user read, [3] user write
// and [15:8] the highest page number of the segment.
//
// Timing: the SAR RAM reads asynchronously, so `pa`, `acc`, `prot_violation`
// and `sar_q` are combinational; SAR, AR and ASAR writes take effect at the
// rising edge.  `pa`/`acc` are meaningful while `sar_prot` = 0,
// `prot_violation` while `sar_prot` = 1.
module mmu
  import pn_pkg::*;
#(
  parameter int unsigned NSAR = 512
) (
  input  logic        clk,
  input  logic        rst,
  // MC68000 side
  input  logic [23:0] cpu_va,     // byte address
  input  logic        cpu_rw,     // 1 = read
  input  logic        cpu_user,   // 1 = user mode
  // PNC side
  input  logic        use_ar,     // Address Register drives the address lines
  input  logic        sar_prot,   // microword bit: select protection half
  input  logic [15:0] dbus,
  input  logic        ar_we,
  input  logic        asar_we,
  input  logic        sar_we,
  output logic [15:0] sar_q,      // SAR word gated to the Data bus
  output logic [15:0] ar_q,
  output logic [15:0] asar_q,
  output logic [3:0]  ar_branch,
  output logic [19:0] pa,
  output acc_e        acc,
  output logic        prot_violation
);
  localparam int unsigned IW = $clog2(NSAR);

  logic [15:0] sar_ram [2*NSAR];
  logic [15:0] ar, asar;
  logic [23:0] va;
  logic [IW-1:0] idx;
  logic [IW:0]   ram_addr;
  logic          seg_ff, seg0;
  logic [7:0]    page_sum;
  logic          allowed;

  assign va       = use_ar ? {ar, 8'h00} : cpu_va;
  assign idx      = IW'({1'b0, va[23:16]}) | asar[IW-1:0];
  assign ram_addr = {sar_prot, idx};
  assign sar_q    = sar_ram[ram_addr];
  assign seg_ff   = (va[23:16] == 8'hFF);
  assign page_sum = sar_q[15:8] + va[15:8];

  always_comb begin
    seg0 = seg_ff || (sar_q[7:6] == 2'b11);
    if (seg0) pa = {4'h0, va[15:0]};
    else      pa = {sar_q[3:0], page_sum, va[7:0]};
    if (seg0) begin
      if (va[15:12] == 4'h8 || va[15:3] == '0) acc = ACC_ROM;
      else                                       acc = ACC_SEG0;
    end else begin
      unique case (sar_q[7:6])
        2'b00:   acc = ACC_LOCAL;
        2'b01:   acc = ACC_REMOTE;
        default: acc = ACC_IO;
      endcase
    end
    // protection PLA
    unique case ({cpu_user, cpu_rw})
      2'b01:   allowed = sar_q[0];
      2'b00:   allowed = sar_q[1];
      2'b11:   allowed = sar_q[2];
      default: allowed = sar_q[3];
    endcase
    prot_violation = !seg_ff && (!allowed || (va[15:8] > sar_q[15:8]));
  end

  always_ff @(posedge clk) begin
    if (sar_we) sar_ram[ram_addr] <= dbus;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ar   <= '0;
      asar <= '0;
    end else begin
      if (ar_we)   ar   <= dbus;
      if (asar_we) asar <= dbus;
    end
  end

  assign ar_q      = ar;
  assign asar_q    = asar;
  assign ar_branch = ar[3:0];
endmodule

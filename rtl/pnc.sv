// pnc: Processor Node Controller.
//
// The PNC is the microprogrammed controller that performs every Processor
// Node function as a sequence of Data bus transfers and control-line
// strobes.  As in the document it has four parts: the microprogram sequencer,
// the 1K x 64-bit control store with its output (pipeline) register, the
// 16-bit ALU with seventeen registers, and the Microinterrupt Service Routine
// Address Generator (MSRAG), which turns the highest-priority function
// request into the address of its service routine.  Microinterrupts are taken
// only where the microcode enables them (sequencer operation SQ_DISP), so a
// service routine is never interrupted.
//
// This block decodes the branch conditions (carry, zero, negative, not-zero
// from the ALU; the rest from the Processor Node via `ext_cond`) and hands
// the bus-control fields of the executing microword to the Processor Node,
// which builds the Data bus (`dbus`) from them; the ALU's D input is that
// bus.  The microword layout is pn_pkg::uword_t (this design's own).
//
// Timing: one microword per clock.  The word executing in cycle n was
// addressed in cycle n-1; a branch decided in cycle n takes effect in n+1.
module pnc
  import pn_pkg::*;
#(
  parameter int unsigned CS_WORDS = 1024,
  parameter int unsigned CS_WIDTH = 64
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [15:0]       dbus,
  input  logic [NCOND-1:0]  ext_cond,     // bits 0..4 are replaced internally
  input  logic [NREQ-1:0]   func_req,
  output uword_t            uw,           // executing microword
  output logic [15:0]       rega,         // ALU register A (bus source)
  output logic [CSA-1:0]    upc,
  output logic              uint_taken,
  // control store programming port
  input  logic              prog_we,
  input  logic [CSA-1:0]    prog_addr,
  input  logic [CS_WIDTH-1:0] prog_data
);
  logic [CS_WIDTH-1:0] cs_q;
  logic [CSA-1:0]      next_addr, uaddr;
  logic                ureq;
  logic [$clog2(NREQ)-1:0] uidx;
  logic                c_q, z_q, n_q;
  logic [NCOND-1:0]    conds;
  logic                cond_a, cond_b;
  logic [15:0]         f_unused, y_unused;

  assign uw = uword_t'(cs_q);

  always_comb begin
    conds         = ext_cond;
    conds[C_TRUE] = 1'b1;
    conds[C_CARRY]= c_q;
    conds[C_ZERO] = z_q;
    conds[C_NEG]  = n_q;
    conds[C_NZ]   = !z_q;
    cond_a = (int'(uw.cond) < NCOND)     ? conds[uw.cond]      : 1'b0;
    cond_b = (int'(uw.cond) + 1 < NCOND) ? conds[uw.cond + 1'b1] : 1'b0;
  end

  pnc_control_store #(.WORDS(CS_WORDS), .WIDTH(CS_WIDTH)) u_cs (
    .clk, .rst, .addr(next_addr), .uword(cs_q),
    .prog_we, .prog_addr, .prog_data
  );

  pnc_msrag #(.NREQ(NREQ), .AW(CSA)) u_msrag (
    .req(func_req), .req_any(ureq), .idx(uidx), .addr(uaddr)
  );

  pnc_sequencer #(.AW(CSA), .STACK_DEPTH(4)) u_seq (
    .clk, .rst, .op(uw.seq), .d(uw.addr), .cond_a, .cond_b,
    .uint_req(ureq), .uint_addr(uaddr), .next_addr, .upc, .uint_taken
  );

  pnc_alu #(.W(16), .NREGS(17)) u_alu (
    .clk, .rst, .fn(uw.alu_fn), .src(uw.alu_src), .dst(uw.alu_dst),
    .a_addr(uw.a_addr), .b_addr(uw.b_addr),
    .cin(uw.alu_fn == AF_SUBR || uw.alu_fn == AF_SUBS),
    .d(dbus), .flags_we(|{uw.alu_fn, uw.alu_src, uw.alu_dst}),
    .f(f_unused), .a_out(rega), .y(y_unused), .c_q, .z_q, .n_q
  );
endmodule

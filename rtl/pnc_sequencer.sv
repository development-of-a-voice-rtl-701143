// pnc_sequencer: microprogram sequencer of the Processor Node Controller.
//
// Follows the document: an AMD 2911-style sequencer producing the 10-bit
// control store address, with a pushdown stack of 4 return addresses, a way
// of returning to microword zero, an internal address register for commonly
// used routines, and two condition multiplexers that allow two-condition
// four-way branches.  When the microword enables microinterrupts (SQ_DISP) and
// the Microinterrupt Service Routine Address Generator has a request, its
// address is used instead.  The operation codes are this design's own.
//
// Reset sets `upc` to all ones so that the first address fetched is 0.
// Timing: `next_addr` is combinational from the current microword (held in
// the control store's output register) and is registered into `upc` (the
// address of the word now executing) on the clock edge, so each microword
// executes in one cycle while the next one is fetched.  A push onto a full
// stack drops the oldest entry; a pop of an empty stack returns 0.
module pnc_sequencer
  import pn_pkg::*;
#(
  parameter int unsigned AW          = 10,
  parameter int unsigned STACK_DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  seq_op_e       op,
  input  logic [AW-1:0] d,          // branch address field
  input  logic          cond_a,     // selected condition (2-way and low bit of 4-way)
  input  logic          cond_b,     // second condition (high bit of 4-way)
  input  logic          uint_req,   // MSRAG has a request
  input  logic [AW-1:0] uint_addr,  // MSRAG service routine address
  output logic [AW-1:0] next_addr,  // address presented to the control store
  output logic [AW-1:0] upc,        // address of the executing microword
  output logic          uint_taken  // a microinterrupt is being entered
);
  logic [AW-1:0] stack [STACK_DEPTH];
  logic [$clog2(STACK_DEPTH+1)-1:0] sp;
  logic [AW-1:0] areg;
  logic [AW-1:0] inc;
  logic push, pop;

  assign inc = upc + 1'b1;

  always_comb begin
    next_addr  = inc;
    push       = 1'b0;
    pop        = 1'b0;
    uint_taken = 1'b0;
    unique case (op)
      SQ_CONT:  next_addr = inc;
      SQ_JUMP:  next_addr = d;
      SQ_JCOND: next_addr = cond_a ? d : inc;
      SQ_JMAP4: next_addr = {d[AW-1:2], cond_b, cond_a};
      SQ_CALL:  begin next_addr = d; push = 1'b1; end
      SQ_RET:   begin next_addr = (sp != 0) ? stack[sp-1] : '0; pop = 1'b1; end
      SQ_ZERO:  next_addr = '0;
      SQ_LDREG: next_addr = inc;
      SQ_JREG:  next_addr = areg;
      SQ_DISP:  begin
        next_addr  = uint_req ? uint_addr : d;
        uint_taken = uint_req;
      end
      SQ_CCALL: if (cond_a) begin next_addr = d; push = 1'b1; end
      SQ_CRET:  if (cond_a) begin next_addr = (sp != 0) ? stack[sp-1] : '0; pop = 1'b1; end
      default:  next_addr = inc;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      upc  <= '1;   // so that the first fetch after reset is word 0
      sp   <= '0;
      areg <= '0;
      for (int i = 0; i < STACK_DEPTH; i++) stack[i] <= '0;
    end else begin
      upc <= next_addr;
      if (op == SQ_LDREG) areg <= d;
      if (push) begin
        if (32'(sp) == STACK_DEPTH) begin
          for (int i = 0; i < STACK_DEPTH-1; i++) stack[i] <= stack[i+1];
          stack[STACK_DEPTH-1] <= inc;
        end else begin
          stack[sp[$clog2(STACK_DEPTH)-1:0]] <= inc;
          sp <= sp + 1'b1;
        end
      end else if (pop && sp != 0) begin
        sp <= sp - 1'b1;
      end
    end
  end
endmodule

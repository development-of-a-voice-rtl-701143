// pnc_msrag: Microinterrupt Service Routine Address Generator.
//
// Per the document, a hardware element turns the highest-priority of the
// PNC's function request lines (32 in the figure) into the 10-bit address of
// the microinterrupt service routine for it; in the original it is a PLA so
// that functions can be added.  Here request line 0 has the highest priority
// and routine i starts at BASE + i * STRIDE; both the priority order and the
// address map are this design's choices.
//
// Timing: purely combinational; the sequencer samples `req_any` and `addr`
// in the microword that enables microinterrupts.
module pnc_msrag #(
  parameter int unsigned NREQ   = 32,
  parameter int unsigned AW     = 10,
  parameter int unsigned BASE   = 512,
  parameter int unsigned STRIDE = 16
) (
  input  logic [NREQ-1:0]         req,
  output logic                    req_any,
  output logic [$clog2(NREQ)-1:0] idx,
  output logic [AW-1:0]           addr
);

  always_comb begin
    req_any = 1'b0;
    idx     = '0;
    for (int i = NREQ-1; i >= 0; i--) begin
      if (req[i]) begin
        req_any = 1'b1;
        idx     = i[$clog2(NREQ)-1:0];
      end
    end
    addr = AW'(BASE + idx * STRIDE);
  end
endmodule

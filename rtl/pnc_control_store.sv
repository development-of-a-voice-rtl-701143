// pnc_control_store: 1K x 64-bit PNC control store with output register.
//
// The document's control store is 16 high-speed PROMs with edge-triggered
// output registers: the next microword is fetched while the current one
// executes.  Here the PROM array is a memory read synchronously into the
// output register `uword`.  The PROM contents (the Processor Node microcode)
// are not given by the document, so the array has a programming port
// (`prog_we`, `prog_addr`, `prog_data`) standing in for PROM programming;
// it is this design's own addition and is not used while running.
//
// Timing: `uword` holds the word at the address presented one edge earlier.
// Reset clears the output register to an all-zero microword (continue, no
// bus transfer, no register write), which executes as a no-op while word 0 is
// fetched.
module pnc_control_store #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [WIDTH-1:0]         uword,
  input  logic                     prog_we,
  input  logic [$clog2(WORDS)-1:0] prog_addr,
  input  logic [WIDTH-1:0]         prog_data
);
  logic [WIDTH-1:0] rom [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) rom[prog_addr] <= prog_data;
  end

  always_ff @(posedge clk) begin
    if (rst) uword <= '0;
    else     uword <= rom[addr];
  end
endmodule

// irq_arbiter: MC68000 interrupt request arbitrator.
//
// The MC68000 takes a 3-bit interrupt priority code.  The document allocates
// its seven levels (7 highest): 7 PNC error or remote interrupt message,
// 6 memory parity error, 5 microcode-settable, 4 I/O high, 3 I/O low,
// 2 microcode-settable or system timer, 1 microcode-settable.  This block
// holds the microcode-settable requests (levels 5, 2 and 1) in a register the
// PNC writes from the Data bus (bits 4, 1 and 0: this design's choice), ORs
// them with the hardware request lines and encodes the highest active level.
// Level 0 means no request.  The code is positive logic here (the MC68000's
// pins are active low; inversion belongs to the pad drivers).
//
// Timing: `ipl` is registered, so it follows a request one clock later.
module irq_arbiter #(
  parameter int unsigned LEVELS = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [LEVELS:1]   hw_req,   // hardware request per level
  input  logic              set_we,   // PNC writes the settable requests
  input  logic [15:0]       set_data,
  output logic [LEVELS:1]   pending,
  output logic [2:0]        ipl
);
  logic [LEVELS:1] sw_set;

  always_ff @(posedge clk) begin
    if (rst) sw_set <= '0;
    else if (set_we) begin
      sw_set    <= '0;
      sw_set[5] <= set_data[4];
      sw_set[2] <= set_data[1];
      sw_set[1] <= set_data[0];
    end
  end

  assign pending = hw_req | sw_set;

  always_ff @(posedge clk) begin
    if (rst) ipl <= '0;
    else begin
      ipl <= '0;
      for (int l = 1; l <= LEVELS; l++)
        if (pending[l]) ipl <= 3'(l);
    end
  end
endmodule

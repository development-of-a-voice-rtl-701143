// pnc_alu: 16-bit microprogrammed arithmetic/logic unit of the PNC.
//
// Follows the document's list of features of the 2901-based processor:
// seventeen 16-bit registers (13 for Processor Node variables and 4 for use
// inside microinterrupt service routines), an eight-function ALU, a
// two-address register file read on ports A and B at once, operands chosen
// from the A and B registers, the Q register, the Data bus (D) and zero,
// left/right 32-bit rotates of the pair {F,Q}, and carry, zero and negative
// flags for conditional branches.  The function, operand-pair and destination
// codes follow the AMD 2901; the extra register (index 16) and the rotate
// destinations are this design's reading of "seventeen registers" and
// "32-bit rotates".
//
// Timing: F and the flags are combinational; the register file, Q and the
// registered flags (`c_q`, `z_q`, `n_q`) update on the rising clock edge.
module pnc_alu
  import pn_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned NREGS = 17
) (
  input  logic                     clk,
  input  logic                     rst,
  input  alu_fn_e                  fn,
  input  alu_src_e                 src,
  input  alu_dst_e                 dst,
  input  logic [$clog2(NREGS)-1:0] a_addr,
  input  logic [$clog2(NREGS)-1:0] b_addr,
  input  logic                     cin,
  input  logic [W-1:0]             d,       // Data bus
  input  logic                     flags_we, // register the flags of this operation
  output logic [W-1:0]             f,       // ALU result
  output logic [W-1:0]             a_out,   // register A contents
  output logic [W-1:0]             y,       // A for RAMA, else F
  output logic                     c_q,
  output logic                     z_q,
  output logic                     n_q
);
  logic [W-1:0] regs [NREGS];
  logic [W-1:0] q;
  logic [W-1:0] a, b, r, s;
  logic [W:0]   sum;
  logic         cout;

  assign a = (32'(a_addr) < NREGS) ? regs[a_addr] : '0;
  assign b = (32'(b_addr) < NREGS) ? regs[b_addr] : '0;
  assign a_out = a;

  always_comb begin
    unique case (src)
      AS_AQ: begin r = a;  s = q;  end
      AS_AB: begin r = a;  s = b;  end
      AS_ZQ: begin r = '0; s = q;  end
      AS_ZB: begin r = '0; s = b;  end
      AS_ZA: begin r = '0; s = a;  end
      AS_DA: begin r = d;  s = a;  end
      AS_DQ: begin r = d;  s = q;  end
      default: begin r = d; s = '0; end
    endcase
    sum = '0;
    unique case (fn)
      AF_ADD:  sum = {1'b0, r} + {1'b0, s} + {{W{1'b0}}, cin};
      AF_SUBR: sum = {1'b0, s} + {1'b0, ~r} + {{W{1'b0}}, cin};
      AF_SUBS: sum = {1'b0, r} + {1'b0, ~s} + {{W{1'b0}}, cin};
      AF_OR:   sum = {1'b0, r | s};
      AF_AND:  sum = {1'b0, r & s};
      AF_NOTRS:sum = {1'b0, ~r & s};
      AF_XOR:  sum = {1'b0, r ^ s};
      default: sum = {1'b0, ~(r ^ s)};
    endcase
    f    = sum[W-1:0];
    cout = sum[W];
    y    = (dst == AD_RAMA) ? a : f;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
      q   <= '0;
      c_q <= 1'b0;
      z_q <= 1'b0;
      n_q <= 1'b0;
    end else begin
      if (flags_we) begin
        c_q <= cout;
        z_q <= (f == '0);
        n_q <= f[W-1];
      end
      if (32'(b_addr) < NREGS) begin
        unique case (dst)
          AD_RAMA, AD_RAMF: regs[b_addr] <= f;
          AD_RAMR:  regs[b_addr] <= {f[0], f[W-1:1]};
          AD_RAML:  regs[b_addr] <= {f[W-2:0], f[W-1]};
          AD_RAMQR: regs[b_addr] <= {q[0], f[W-1:1]};
          AD_RAMQL: regs[b_addr] <= {f[W-2:0], q[W-1]};
          default: ;
        endcase
      end
      unique case (dst)
        AD_QREG:  q <= f;
        AD_RAMQR: q <= {f[0], q[W-1:1]};
        AD_RAMQL: q <= {q[W-2:0], f[W-1]};
        default: ;
      endcase
    end
  end
endmodule

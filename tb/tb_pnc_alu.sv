// tb_pnc_alu: self-checking test of the PNC ALU.
// Random operations (every function, operand pair and destination) are
// applied and the register file, Q register, result and flags are compared
// with a reference model kept in the testbench.
module tb_pnc_alu;
  import pn_pkg::*;
  logic clk = 0, rst = 1;
  alu_fn_e fn; alu_src_e src; alu_dst_e dst;
  logic [4:0] a_addr, b_addr;
  logic cin, fwe;
  logic [15:0] d, f, a_out, y;
  logic c_q, z_q, n_q;
  int checks = 0, failures = 0;
  logic [15:0] mr [17];
  logic [15:0] mq;
  logic mc, mz, mn;

  pnc_alu dut (.clk, .rst, .fn, .src, .dst, .a_addr, .b_addr, .cin, .d, .flags_we(fwe),
               .f, .a_out, .y, .c_q, .z_q, .n_q);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [16:0] ref_f(alu_fn_e fn_i, logic [15:0] r, logic [15:0] s, logic ci);
    case (fn_i)
      AF_ADD:  return {1'b0, r} + {1'b0, s} + 17'(ci);
      AF_SUBR: return {1'b0, s} + {1'b0, ~r} + 17'(ci);
      AF_SUBS: return {1'b0, r} + {1'b0, ~s} + 17'(ci);
      AF_OR:   return {1'b0, r | s};
      AF_AND:  return {1'b0, r & s};
      AF_NOTRS:return {1'b0, ~r & s};
      AF_XOR:  return {1'b0, r ^ s};
      default: return {1'b0, ~(r ^ s)};
    endcase
  endfunction

  initial begin
    fn = AF_ADD; src = AS_AQ; dst = AD_NOP; a_addr = 0; b_addr = 0; cin = 0; d = 0; fwe = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 17; i++) mr[i] = '0;
    mq = '0; mc = 0; mz = 0; mn = 0;
    // load registers with known values
    for (int i = 0; i < 17; i++) begin
      fn = AF_OR; src = AS_DZ; dst = AD_RAMF; b_addr = 5'(i); d = 16'($urandom); fwe = 0;
      @(posedge clk); #1; mr[i] = d;
    end
    for (int t = 0; t < 3000; t++) begin
      logic [15:0] r, s, a, b; logic [16:0] res;
      fn = alu_fn_e'($urandom_range(0, 7)); src = alu_src_e'($urandom_range(0, 7));
      dst = alu_dst_e'($urandom_range(0, 7));
      a_addr = 5'($urandom_range(0, 16)); b_addr = 5'($urandom_range(0, 16));
      cin = 1'($urandom); d = 16'($urandom); fwe = 1'($urandom);
      a = mr[a_addr]; b = mr[b_addr];
      case (src)
        AS_AQ: begin r = a; s = mq; end
        AS_AB: begin r = a; s = b; end
        AS_ZQ: begin r = 0; s = mq; end
        AS_ZB: begin r = 0; s = b; end
        AS_ZA: begin r = 0; s = a; end
        AS_DA: begin r = d; s = a; end
        AS_DQ: begin r = d; s = mq; end
        default: begin r = d; s = 0; end
      endcase
      res = ref_f(fn, r, s, cin);
      #1;
      checks++;
      if (f !== res[15:0] || a_out !== a || y !== ((dst == AD_RAMA) ? a : res[15:0])) begin
        failures++; $display("FAIL t=%0d f=%h exp=%h", t, f, res[15:0]);
      end
      @(posedge clk); #1;
      if (fwe) begin mc = res[16]; mz = (res[15:0] == 0); mn = res[15]; end
      case (dst)
        AD_RAMA, AD_RAMF: mr[b_addr] = res[15:0];
        AD_RAMR:  mr[b_addr] = {res[0], res[15:1]};
        AD_RAML:  mr[b_addr] = {res[14:0], res[15]};
        AD_RAMQR: begin mr[b_addr] = {mq[0], res[15:1]}; mq = {res[0], mq[15:1]}; end
        AD_RAMQL: begin mr[b_addr] = {res[14:0], mq[15]}; mq = {mq[14:0], res[15]}; end
        AD_QREG:  mq = res[15:0];
        default: ;
      endcase
      checks++;
      if (c_q !== mc || z_q !== mz || n_q !== mn) begin failures++; $display("FAIL flags t=%0d", t); end
    end
    // read back every register through port A
    fn = AF_OR; src = AS_ZA; dst = AD_NOP; fwe = 0;
    for (int i = 0; i < 17; i++) begin
      a_addr = 5'(i); #1; checks++;
      if (f !== mr[i]) begin failures++; $display("FAIL reg %0d %h %h", i, f, mr[i]); end
      @(posedge clk); #1;
    end
    src = AS_ZQ; #1; checks++;
    if (f !== mq) begin failures++; $display("FAIL q"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

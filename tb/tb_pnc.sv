// tb_pnc: self-checking test of the Processor Node Controller.
// Loads a small microprogram through the control store programming port:
// a count-down loop that sums 5+4+3+2+1 with the ALU and branches on the
// not-zero flag, a subroutine call and return, then an idle loop that
// enables microinterrupts.  Two function requests are raised together; the
// higher-priority service routine must run first, each within two clocks of
// being enabled, and each increments its own register.  A third routine
// makes a 4-way branch on two external conditions, for all four cases.  Cycle counts of the
// straight-line part are checked against the one-microword-per-clock rule.
module tb_pnc;
  import pn_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] dbus, rega;
  logic [NCOND-1:0] ext_cond = '0;
  logic [NREQ-1:0] func_req = '0;
  uword_t uw;
  logic [9:0] upc;
  logic taken;
  logic pwe = 0;
  logic [9:0] paddr = 0;
  logic [63:0] pdata = 0;
  int checks = 0, failures = 0;

  pnc dut (.clk, .rst, .dbus, .ext_cond, .func_req, .uw, .rega, .upc, .uint_taken(taken),
           .prog_we(pwe), .prog_addr(paddr), .prog_data(pdata));

  // the Processor Node's bus, reduced to the two sources used here
  assign dbus = (uw.bus_src == BS_K) ? uw.k : (uw.bus_src == BS_REGA) ? rega : 16'h0;

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic logic [63:0] U(seq_op_e sq, int addr, logic [4:0] cond, alu_fn_e fn, alu_src_e src,
                                    alu_dst_e dst, int a, int b, bus_src_e bs, logic [15:0] k);
    uword_t w;
    w = '0;
    w.seq = sq; w.addr = 10'(addr); w.cond = cond; w.alu_fn = fn; w.alu_src = src; w.alu_dst = dst;
    w.a_addr = 5'(a); w.b_addr = 5'(b); w.bus_src = bs; w.bus_dst = BD_NONE; w.k = k;
    return 64'(w);
  endfunction

  task automatic prog(int a, logic [63:0] d);
    paddr = 10'(a); pdata = d; pwe = 1; @(posedge clk); #1 pwe = 0;
  endtask

  initial begin
    int cyc;
    prog(0,  U(SQ_CONT, 0, 0, AF_OR,  AS_DZ, AD_RAMF, 0, 0, BS_K, 16'd5));   // R0 = 5
    prog(1,  U(SQ_CONT, 0, 0, AF_OR,  AS_DZ, AD_RAMF, 0, 1, BS_K, 16'd0));   // R1 = 0
    prog(2,  U(SQ_CONT, 0, 0, AF_ADD, AS_AB, AD_RAMF, 0, 1, BS_NONE, 0));    // R1 += R0
    prog(3,  U(SQ_CONT, 0, 0, AF_SUBR, AS_DA, AD_RAMF, 0, 0, BS_K, 16'd1));  // R0 -= 1
    prog(4,  U(SQ_JCOND, 2, C_NZ, AF_ADD, AS_AQ, AD_NOP, 0, 0, BS_NONE, 0));
    prog(5,  U(SQ_CALL, 20, 0, AF_ADD, AS_AQ, AD_NOP, 0, 0, BS_NONE, 0));
    prog(6,  U(SQ_DISP, 6, 0, AF_ADD, AS_AQ, AD_NOP, 0, 0, BS_NONE, 0));
    prog(20, U(SQ_CONT, 0, 0, AF_OR, AS_DZ, AD_RAMF, 0, 2, BS_K, 16'h00AA)); // R2 = AA
    prog(21, U(SQ_RET, 0, 0, AF_ADD, AS_AQ, AD_NOP, 0, 0, BS_NONE, 0));
    // routine for request 3 (512 + 48) and request 7 (512 + 112)
    prog(560, U(SQ_CONT, 0, 0, AF_ADD, AS_DA, AD_RAMF, 3, 3, BS_K, 16'd1));
    prog(561, U(SQ_DISP, 6, 0, AF_ADD, AS_AQ, AD_NOP, 0, 0, BS_NONE, 0));
    prog(624, U(SQ_CONT, 0, 0, AF_ADD, AS_DA, AD_RAMF, 4, 4, BS_K, 16'd1));
    prog(625, U(SQ_DISP, 6, 0, AF_ADD, AS_AQ, AD_NOP, 0, 0, BS_NONE, 0));
    // routine for request 9 (512 + 144): 4-way branch on two external conditions
    prog(656, U(SQ_JMAP4, 40, C_AR0, AF_ADD, AS_AQ, AD_NOP, 0, 0, BS_NONE, 0));
    for (int i = 0; i < 4; i++)
      prog(40 + i, U(SQ_DISP, 6, 0, AF_OR, AS_DZ, AD_RAMF, 0, 5, BS_K, 16'h0100 + 16'(i)));
    @(posedge clk); #1 rst = 0;
    // word 0 executes one clock after reset; 2 + 5*3 + 1 + 2 words before the idle word
    cyc = 0;
    while (!(upc == 10'd6 && uw.seq == SQ_DISP) && cyc < 100) begin @(posedge clk); #1 cyc++; end
    chk(cyc == 21, $sformatf("reached idle after %0d clocks, expected 21", cyc));
    chk(dut.u_alu.regs[1] == 16'd15, "sum 15");
    chk(dut.u_alu.regs[0] == 16'd0, "counter 0");
    chk(dut.u_alu.regs[2] == 16'h00AA, "subroutine ran");
    repeat (5) @(posedge clk);
    #1 chk(upc == 10'd6, "idles");
    func_req[3] = 1; func_req[7] = 1;
    cyc = 0;
    while (upc != 10'd560 && cyc < 10) begin @(posedge clk); #1 cyc++; end
    chk(cyc <= 2, $sformatf("request 3 served after %0d clocks", cyc));
    func_req[3] = 0;
    cyc = 0;
    while (upc != 10'd624 && cyc < 10) begin @(posedge clk); #1 cyc++; end
    chk(cyc <= 2, $sformatf("request 7 served after %0d clocks", cyc));
    func_req[7] = 0;
    repeat (4) @(posedge clk);
    #1;
    chk(dut.u_alu.regs[3] == 16'd1 && dut.u_alu.regs[4] == 16'd1, "each routine ran once");
    chk(upc == 10'd6, "back to idle");
    // 4-way branch: target = base + {second condition, first condition}
    for (int i = 0; i < 4; i++) begin
      ext_cond[C_AR0] = i[0]; ext_cond[C_AR1] = i[1];
      func_req[9] = 1;
      cyc = 0;
      while (upc != 10'd656 && cyc < 10) begin @(posedge clk); #1 cyc++; end
      func_req[9] = 0;
      repeat (4) @(posedge clk);
      #1 chk(dut.u_alu.regs[5] == 16'h0100 + 16'(i), $sformatf("4-way branch case %0d gave %h", i, dut.u_alu.regs[5]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

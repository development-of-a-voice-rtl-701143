// tb_pnc_sequencer: self-checking test of the PNC microprogram sequencer.
// Steps the sequencer through every operation and compares the next address
// and the executing address with values worked out by hand: continue, jump,
// conditional and four-way branches, a 4-deep call nest and its returns, a
// fifth call that overflows the stack, return to zero, the internal
// register, and dispatch with and without a microinterrupt request.
module tb_pnc_sequencer;
  import pn_pkg::*;
  logic clk = 0, rst = 1;
  seq_op_e op = SQ_CONT;
  logic [9:0] d = '0, uaddr = '0, next_addr, upc;
  logic ca = 0, cb = 0, ureq = 0, taken;
  int checks = 0, failures = 0;

  pnc_sequencer dut (.clk, .rst, .op, .d, .cond_a(ca), .cond_b(cb), .uint_req(ureq),
                     .uint_addr(uaddr), .next_addr, .upc, .uint_taken(taken));

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic step(seq_op_e o, logic [9:0] dd, logic a, logic b, logic [9:0] exp);
    op = o; d = dd; ca = a; cb = b;
    #1;
    checks++;
    if (next_addr !== exp) begin failures++; $display("FAIL op=%s upc=%0d next=%0d exp=%0d", o.name(), upc, next_addr, exp); end
    @(posedge clk); #1;
    checks++;
    if (upc !== exp) begin failures++; $display("FAIL upc=%0d exp=%0d", upc, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (next_addr !== 10'd0) begin failures++; $display("FAIL first fetch not 0"); end
    step(SQ_CONT, 0, 0, 0, 10'd0);
    step(SQ_CONT, 0, 0, 0, 10'd1);
    step(SQ_JUMP, 10'd100, 0, 0, 10'd100);
    step(SQ_JCOND, 10'd200, 0, 0, 10'd101);
    step(SQ_JCOND, 10'd200, 1, 0, 10'd200);
    step(SQ_JMAP4, 10'd300, 1, 0, 10'd301);
    step(SQ_JMAP4, 10'd300, 0, 1, 10'd302);
    step(SQ_JMAP4, 10'd300, 1, 1, 10'd303);
    // nest of four calls
    step(SQ_CALL, 10'd400, 0, 0, 10'd400);   // ret 304
    step(SQ_CALL, 10'd410, 0, 0, 10'd410);   // ret 401
    step(SQ_CALL, 10'd420, 0, 0, 10'd420);   // ret 411
    step(SQ_CALL, 10'd430, 0, 0, 10'd430);   // ret 421
    step(SQ_RET, 0, 0, 0, 10'd421);
    step(SQ_RET, 0, 0, 0, 10'd411);
    step(SQ_RET, 0, 0, 0, 10'd401);
    step(SQ_RET, 0, 0, 0, 10'd304);
    step(SQ_RET, 0, 0, 0, 10'd0);            // empty stack returns zero
    // five calls: the oldest return address is dropped
    step(SQ_CALL, 10'd500, 0, 0, 10'd500);   // ret 1 (dropped)
    step(SQ_CALL, 10'd510, 0, 0, 10'd510);   // ret 501
    step(SQ_CALL, 10'd520, 0, 0, 10'd520);   // ret 511
    step(SQ_CALL, 10'd530, 0, 0, 10'd530);   // ret 521
    step(SQ_CALL, 10'd540, 0, 0, 10'd540);   // ret 531
    step(SQ_RET, 0, 0, 0, 10'd531);
    step(SQ_RET, 0, 0, 0, 10'd521);
    step(SQ_RET, 0, 0, 0, 10'd511);
    step(SQ_RET, 0, 0, 0, 10'd501);
    step(SQ_CCALL, 10'd600, 0, 0, 10'd502);
    step(SQ_CCALL, 10'd600, 1, 0, 10'd600);
    step(SQ_CRET, 0, 0, 0, 10'd601);
    step(SQ_CRET, 0, 1, 0, 10'd503);
    step(SQ_ZERO, 10'd77, 0, 0, 10'd0);
    step(SQ_LDREG, 10'd123, 0, 0, 10'd1);
    step(SQ_JUMP, 10'd700, 0, 0, 10'd700);
    step(SQ_JREG, 0, 0, 0, 10'd123);
    // dispatch
    step(SQ_DISP, 10'd800, 0, 0, 10'd800);
    checks++; if (taken !== 1'b0) begin failures++; $display("FAIL taken without request"); end
    ureq = 1; uaddr = 10'd528;
    op = SQ_DISP; d = 10'd800; #1;
    checks++; if (!taken) begin failures++; $display("FAIL no taken"); end
    step(SQ_DISP, 10'd800, 0, 0, 10'd528);
    ureq = 0;
    step(SQ_CONT, 0, 0, 0, 10'd529);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

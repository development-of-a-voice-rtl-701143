// tb_pnc_control_store: self-checking test of the control store.
// Programs random 64-bit words at random addresses, then reads them back
// and checks that each appears in the output register one clock after its
// address, and that reset clears the output register.
module tb_pnc_control_store;
  logic clk = 0, rst = 1;
  logic [9:0] addr = 0, paddr = 0;
  logic [63:0] uword, pdata = 0;
  logic pwe = 0;
  logic [63:0] model [logic [9:0]];
  int checks = 0, failures = 0;

  pnc_control_store dut (.clk, .rst, .addr, .uword, .prog_we(pwe), .prog_addr(paddr), .prog_data(pdata));

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    @(posedge clk); #1;
    checks++; if (uword !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      pwe = 1; paddr = 10'($urandom); pdata = {$urandom, $urandom};
      model[paddr] = pdata;
      @(posedge clk); #1;
    end
    pwe = 0;
    foreach (model[a]) begin
      addr = a;
      @(posedge clk); #1;
      checks++;
      if (uword !== model[a]) begin failures++; $display("FAIL a=%0d %h %h", a, uword, model[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_irq_arbiter: self-checking test of the interrupt request arbitrator.
// Random hardware requests and microcode-settable requests; the priority
// code one clock later must be the highest active level.
module tb_irq_arbiter;
  logic clk = 0, rst = 1;
  logic [7:1] hw = 0, pending;
  logic we = 0;
  logic [15:0] sd = 0;
  logic [2:0] ipl;
  logic [7:1] soft_m;
  int checks = 0, failures = 0;

  irq_arbiter dut (.clk, .rst, .hw_req(hw), .set_we(we), .set_data(sd), .pending, .ipl);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    soft_m = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 1000; t++) begin
      logic [7:1] all; int e;
      hw = 7'($urandom) & 7'($urandom);
      we = (t % 3 == 0); sd = 16'($urandom);
      @(posedge clk); #1;
      if (we) soft_m = {1'b0, 1'b0, sd[4], 1'b0, 1'b0, sd[1], sd[0]};
      we = 0;
      all = hw | soft_m;
      checks++;
      if (pending !== all) begin failures++; $display("FAIL pending"); end
      @(posedge clk); #1;
      e = 0;
      for (int l = 1; l <= 7; l++) if (all[l]) e = l;
      checks++;
      if (ipl !== 3'(e)) begin failures++; $display("FAIL ipl=%0d exp=%0d all=%b", ipl, e, all); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

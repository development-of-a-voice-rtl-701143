// tb_mem_module: self-checking test of one memory module.
// Checks that after reset the module is in self-refresh mode (refreshing on
// its own and ignoring accesses), that the mode-change write returns it to
// normal, word and byte writes and reads against a model with the document's
// three-microstep timing, PNC refresh, and parity: words written in
// parity-test mode read back with an error, the earliest error address is
// kept until the PNC reads it, and the interrupt request follows.
module tb_mem_module;
  import pn_pkg::*;
  localparam int W = 4096;
  logic clk = 0, rst = 1;
  logic [18:0] m_addr = 0, perr_addr;
  mop_e m_op = MOP_NONE;
  logic m_bsel = 0, m_wstb = 0, ctl_we = 0, refresh = 0, perr_clr = 0, rvalid, perr_irq;
  logic [15:0] m_wdata = 0, ctl_data = 0, rdata;
  logic [1:0] ctl_q;
  logic [6:0] row;
  logic [15:0] model [W];
  logic        known [W];
  int checks = 0, failures = 0;

  mem_module #(.WORDS(W), .MODULE_ID(2'd1), .REFRESH_INTERVAL(20)) dut (
    .clk, .rst, .m_addr, .m_op, .m_bsel, .m_wdata, .m_wstb, .ctl_we, .ctl_data, .refresh, .perr_clr,
    .rdata, .rvalid, .perr_irq, .perr_addr, .ctl_q, .refresh_row(row));

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // address cycle (what mem_interface presents), then data cycle
  task automatic wr(logic [11:0] a, logic [15:0] d, logic byt, logic bs);
    m_addr = {3'b001, 4'b0, a}; m_op = byt ? MOP_BWRITE : MOP_WWRITE; m_bsel = bs;
    @(posedge clk); #1 m_op = MOP_NONE;
    m_wdata = d; m_wstb = 1; @(posedge clk); #1 m_wstb = 0;
  endtask

  task automatic rd(logic [11:0] a, output logic [15:0] q, output logic v);
    m_addr = {3'b001, 4'b0, a}; m_op = MOP_READ;
    @(posedge clk); #1 m_op = MOP_NONE;
    v = rvalid; q = rdata;
    @(posedge clk); #1;
  endtask

  task automatic ctl(logic [15:0] v);
    ctl_data = v; ctl_we = 1; @(posedge clk); #1 ctl_we = 0;
  endtask

  initial begin
    logic [15:0] q; logic v; logic [6:0] r0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(ctl_q == 2'b00, "self-refresh after reset");
    r0 = row;
    repeat (100) @(posedge clk);
    #1 chk(row == r0 + 7'd5, $sformatf("self refresh rows %0d", row - r0));
    // locked out: a write is ignored
    wr(12'd5, 16'h1234, 0, 0);
    rd(12'd5, q, v);
    chk(!v, "read ignored in self-refresh");
    ctl(16'h0001);
    chk(ctl_q == 2'b01, "normal mode");
    r0 = row;
    repeat (50) @(posedge clk);
    #1 chk(row == r0, "no self refresh in normal mode");
    refresh = 1; @(posedge clk); #1 refresh = 0;
    chk(row == r0 + 1, "PNC refresh");
    for (int i = 0; i < W; i++) known[i] = 0;
    for (int t = 0; t < 800; t++) begin
      logic [11:0] a; logic [15:0] d;
      a = 12'($urandom_range(0, 63)); d = 16'($urandom);
      if ($urandom_range(0, 2) == 0 && known[a]) begin
        logic bs; bs = 1'($urandom);
        wr(a, d, 1, bs);
        if (bs) model[a][7:0] = d[7:0]; else model[a][15:8] = d[15:8];
      end else if ($urandom_range(0, 1) == 0) begin
        wr(a, d, 0, 0); model[a] = d; known[a] = 1;
      end else if (known[a]) begin
        rd(a, q, v);
        chk(v && q == model[a], $sformatf("read %0d got %h exp %h", a, q, model[a]));
      end
    end
    // another module's address is not answered
    m_addr = 19'h00005; m_op = MOP_READ; @(posedge clk); #1 m_op = MOP_NONE;
    chk(!rvalid, "other module ignored");
    chk(!perr_irq, "no parity error so far");
    // parity test: write two words with bad parity
    ctl(16'h0003);
    wr(12'd100, 16'hAAAA, 0, 0);
    wr(12'd101, 16'h5555, 0, 0);
    ctl(16'h0001);
    rd(12'd100, q, v);
    @(posedge clk); #1;
    chk(perr_irq && perr_addr == {3'b001, 4'b0, 12'd100}, "parity error latched");
    rd(12'd101, q, v);
    @(posedge clk); #1;
    chk(perr_addr == {3'b001, 4'b0, 12'd100}, "earliest error kept");
    perr_clr = 1; @(posedge clk); #1 perr_clr = 0;
    chk(!perr_irq, "error re-armed");
    rd(12'd101, q, v);
    @(posedge clk); #1;
    chk(perr_irq && perr_addr == {3'b001, 4'b0, 12'd101}, "second error latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
